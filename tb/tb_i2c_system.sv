// tb_i2c_system: end-to-end testbench of the whole bus at the default
// parameters (50 MHz system clock, 100 kHz SCL, so one SCL period is 500
// clocks). Behavioural models of the two slave devices hang on the bus: the
// real-time clock at address 0x68 and the EEPROM at 0x50.
//
// Sequence: set the clock's seven time registers (master transmitter), read
// them back (master receiver with repeated START), write an 8-byte EEPROM page
// with the data arriving late (SCL stalls), read the page back, run the
// one-byte write and read frames, address a device that is not there (address
// NACK), and write to the EEPROM while it refuses data (data NACK). Every protocol event is counted and must occur at
// least once; data, NACK flags, SCL period and transfer times are checked.
module tb_i2c_system;
  import i2c_pkg::*;

  localparam int unsigned Q = 50_000_000 / (4 * 100_000);  // clocks per quarter
  localparam logic [6:0] RTC_ADDR = 7'h68;
  localparam logic [6:0] EEP_ADDR = 7'h50;

  logic clk, rst_n;
  initial begin
    clk = 1'b0;
    forever #10 clk = ~clk;  // 50 MHz
  end

  logic       cmd_valid, cmd_ready, wr_valid, wr_ready, rd_valid;
  logic       busy, done, nack, scl, sda, refuse;
  logic [1:0] slave_sda;
  logic [7:0] wr_data, rd_data;
  i2c_cmd_t   cmd;

  i2c_system dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .wr_data, .wr_valid,
    .wr_ready, .rd_data, .rd_valid, .busy, .done, .nack,
    .slave_scl(scl), .sda, .slave_sda_o(slave_sda)
  );

  i2c_slave_model #(.ADDR(RTC_ADDR), .SEED(8'h00)) rtc (
    .clk, .rst_n, .scl, .sda, .refuse_data(1'b0), .sda_o(slave_sda[0]));
  i2c_slave_model #(.ADDR(EEP_ADDR), .SEED(8'hFF)) eeprom (
    .clk, .rst_n, .scl, .sda, .refuse_data(refuse), .sda_o(slave_sda[1]));

  int checks, failures;
  int unsigned cyc;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // event counters seen on the bus / at the controller ports
  int unsigned n_nack_done, n_stall, n_tx_cmd, n_rx_cmd, n_rd_bytes, n_wr_bytes;
  int unsigned scl_rises, last_rise, min_gap, busy_cycles;
  logic scl_d;
  always @(posedge clk) begin
    scl_d <= scl;
    if (busy) busy_cycles <= busy_cycles + 1;
    if (scl && !scl_d) begin
      scl_rises <= scl_rises + 1;
      if (last_rise != 0 && cyc - last_rise < min_gap) min_gap <= cyc - last_rise;
      last_rise <= cyc;
    end
    if (wr_ready && !wr_valid) n_stall <= n_stall + 1;
    if (done && nack) n_nack_done <= n_nack_done + 1;
    if (rd_valid) n_rd_bytes <= n_rd_bytes + 1;
    if (wr_valid && wr_ready) n_wr_bytes <= n_wr_bytes + 1;
    if (busy) assert (!(cmd_ready)) else $error("cmd_ready while busy");
  end

  // write data source; delay counted from wr_ready
  logic [7:0] wq[$];
  int unsigned wr_delay, wr_wait;
  always @(posedge clk) begin
    if (wq.size() == 0) begin
      wr_valid <= 1'b0;
    end else if (wr_valid && wr_ready) begin
      void'(wq.pop_front());
      wr_valid <= 1'b0;
      wr_wait  <= 0;
    end else if (!wr_valid) begin
      if (wr_wait >= wr_delay) begin
        wr_valid <= 1'b1;
        wr_data  <= wq[0];
      end else if (wr_ready) begin
        wr_wait <= wr_wait + 1;
      end
    end
  end

  logic [7:0] rq[$];
  always @(posedge clk) if (rd_valid) rq.push_back(rd_data);

  int unsigned t_start, t_done, rises0;

  task automatic run(input i2c_dir_t rw, input logic [6:0] a, input logic [7:0] r,
                     input logic [7:0] n);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd       = '{rw: rw, slave_addr: a, reg_addr: r, nbytes: n};
    cmd_valid = 1'b1;
    rises0    = scl_rises;
    if (rw == I2C_READ) n_rx_cmd++; else n_tx_cmd++;
    @(posedge clk);
    t_start = cyc;
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!done) @(posedge clk);
    t_done = cyc;
    repeat (2) @(negedge clk);
  endtask

  logic [7:0] tm [7];
  logic [7:0] page [8];

  initial begin
    checks = 0; failures = 0; cyc = 0;
    n_nack_done = 0; n_stall = 0; n_tx_cmd = 0; n_rx_cmd = 0; n_rd_bytes = 0; n_wr_bytes = 0;
    scl_rises = 0; last_rise = 0; min_gap = '1; busy_cycles = 0; scl_d = 1'b1;
    wr_delay = 0; wr_wait = 0; refuse = 1'b0;
    cmd_valid = 1'b0; cmd = '0; wr_data = '0; rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // set the clock: seconds, minutes, hours, day, date, month, year (BCD)
    tm = '{8'h45, 8'h30, 8'h12, 8'h06, 8'h03, 8'h10, 8'h26};
    foreach (tm[i]) wq.push_back(tm[i]);
    run(I2C_WRITE, RTC_ADDR, 8'h00, 8'd7);
    check(!nack, "rtc write: acknowledged");
    for (int i = 0; i < 7; i++)
      check(rtc.mem[i] == tm[i], $sformatf("rtc register %0d written", i));
    check(t_done - t_start == 1 + 4 * Q * (2 + 9 * (2 + 7)) + 7, "rtc write: time");
    check(scl_rises - rises0 == 9 * (2 + 7) + 1, "rtc write: SCL pulses");

    // read the time back
    rq = {};
    run(I2C_READ, RTC_ADDR, 8'h00, 8'd7);
    check(!nack && rq.size() == 7, "rtc read: 7 bytes");
    for (int i = 0; i < 7 && i < rq.size(); i++)
      check(rq[i] == tm[i], $sformatf("rtc read byte %0d", i));
    check(t_done - t_start == 1 + 4 * Q * (3 + 9 * (3 + 7)), "rtc read: time");

    // EEPROM page write with late data
    wr_delay = 200;
    for (int i = 0; i < 8; i++) begin
      page[i] = 8'(8'h81 * i + 8'h17);
      wq.push_back(page[i]);
    end
    run(I2C_WRITE, EEP_ADDR, 8'h40, 8'd8);
    wr_delay = 0;
    check(!nack, "eeprom write: acknowledged");
    for (int i = 0; i < 8; i++)
      check(eeprom.mem[8'(8'h40 + i)] == page[i], $sformatf("eeprom byte %0d written", i));
    check(t_done - t_start == 1 + 4 * Q * (2 + 9 * (2 + 8)) + 8 * (200 + 2),
          "eeprom write: time with stalls");

    // read the page back
    rq = {};
    run(I2C_READ, EEP_ADDR, 8'h40, 8'd8);
    check(!nack && rq.size() == 8, "eeprom read: 8 bytes");
    for (int i = 0; i < 8 && i < rq.size(); i++)
      check(rq[i] == page[i], $sformatf("eeprom read byte %0d", i));
    check(eeprom.mem[8'h48] == (8'h48 ^ 8'hFF), "eeprom: neighbour untouched");

    // single-byte frames exactly as drawn for the two modes
    wq.push_back(8'h3E);
    run(I2C_WRITE, EEP_ADDR, 8'h90, 8'd1);
    check(!nack && eeprom.mem[8'h90] == 8'h3E, "one-byte write frame");
    check(scl_rises - rises0 == 9 * 3 + 1, "one-byte write frame: 27 bit pulses + STOP");
    rq = {};
    run(I2C_READ, EEP_ADDR, 8'h90, 8'd1);
    check(!nack && rq.size() == 1 && rq[0] == 8'h3E, "one-byte read frame");
    check(scl_rises - rises0 == 9 * 4 + 2, "one-byte read frame: 36 bit pulses + Sr + STOP");

    // no device at this address
    run(I2C_WRITE, 7'h21, 8'h00, 8'd1);
    check(nack, "absent device: nack");
    check(scl_rises - rises0 == 9 + 1, "absent device: STOP after address");
    wq = {};
    repeat (2) @(posedge clk);

    // EEPROM refuses data
    refuse = 1'b1;
    wq.push_back(8'hAA); wq.push_back(8'h55);
    run(I2C_WRITE, EEP_ADDR, 8'h00, 8'd2);
    check(nack, "refused data: nack");
    check(eeprom.mem[0] == 8'hFF, "refused data: not stored");
    refuse = 1'b0;
    wq = {};
    repeat (2) @(posedge clk);

    // SCL period: 4 quarters of Q clocks = 100 kHz at 50 MHz
    check(min_gap == 4 * Q, $sformatf("shortest SCL period %0d clocks", min_gap));

    // every mechanism must have happened
    check(rtc.n_start + eeprom.n_start > 0, "START generated");
    check(rtc.n_restart + eeprom.n_restart > 0, "repeated START generated");
    check(rtc.n_stop > 0 && eeprom.n_stop > 0, "STOP generated");
    check(rtc.n_ack + eeprom.n_ack > 0, "slave ACK received");
    check(eeprom.n_nack > 0, "slave data NACK handled");
    check(n_nack_done == 2, "transfers ended by NACK: address and data");
    check(n_tx_cmd > 0 && n_wr_bytes > 0, "master transmitter mode used");
    check(n_rx_cmd > 0 && n_rd_bytes > 0, "master receiver mode used");
    check(rtc.n_mack + eeprom.n_mack > 0, "master ACK sent");
    check(rtc.n_mnack + eeprom.n_mnack > 0, "master NACK after last byte");
    check(n_stall > 0, "write stall happened");
    $display("events: start=%0d restart=%0d stop=%0d ack=%0d data_nack=%0d mack=%0d mnack=%0d stall_cycles=%0d tx=%0d rx=%0d busy_cycles=%0d",
             rtc.n_start + eeprom.n_start, rtc.n_restart + eeprom.n_restart,
             rtc.n_stop + eeprom.n_stop, rtc.n_ack + eeprom.n_ack, eeprom.n_nack,
             rtc.n_mack + eeprom.n_mack, rtc.n_mnack + eeprom.n_mnack, n_stall,
             n_tx_cmd, n_rx_cmd, busy_cycles);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
