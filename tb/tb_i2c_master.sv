// tb_i2c_master: self-checking testbench of the I2C master bus controller.
//
// Two behavioural slaves (addresses 0x50 and 0x68) share SDA with the master
// through a wired-AND. The controller runs with a short SCL period (QUARTER =
// 10 clocks). Checked: bytes written land in the slave registers, bytes read
// match the slave's registers (mem[i] = i ^ SEED), the master ACKs all read
// bytes but the last, an unknown address and a refused data byte end in STOP
// with nack, a late write byte stalls SCL low, every byte takes nine SCL
// pulses of 4*QUARTER clocks, and the total transfer time matches
//   write: 1 + 4Q*(2 + 9*(2+n)) + n   read: 1 + 4Q*(3 + 9*(3+n))
// clocks from command to done (n data bytes, one wait cycle per written byte).
module tb_i2c_master;
  import i2c_pkg::*;

  localparam int unsigned CLK_HZ = 400;
  localparam int unsigned SCL_HZ = 10;
  localparam int unsigned Q      = CLK_HZ / (4 * SCL_HZ);

  logic clk, rst_n;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic       cmd_valid, cmd_ready, wr_valid, wr_ready, rd_valid;
  logic       done, nack, scl, sda_m, sda, sda_s1, sda_s2;
  logic       refuse;
  logic [7:0] wr_data, rd_data;
  i2c_cmd_t   cmd;

  i2c_master #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .wr_data, .wr_valid, .wr_ready,
    .rd_data, .rd_valid, .busy(), .done, .nack, .scl_o(scl), .sda_o(sda_m),
    .sda_i(sda)
  );

  assign sda = sda_m & sda_s1 & sda_s2;

  i2c_slave_model #(.ADDR(7'h50), .SEED(8'hA5)) s1 (
    .clk, .rst_n, .scl, .sda, .refuse_data(refuse), .sda_o(sda_s1));
  i2c_slave_model #(.ADDR(7'h68), .SEED(8'h3C)) s2 (
    .clk, .rst_n, .scl, .sda, .refuse_data(1'b0), .sda_o(sda_s2));

  int checks = 0, failures = 0;
  int unsigned cyc;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // SCL rising edges and the spacing between them
  int unsigned scl_rises, last_rise, bad_period;
  logic scl_d;
  always @(posedge clk) begin
    scl_d <= scl;
    if (scl && !scl_d) begin
      scl_rises <= scl_rises + 1;
      last_rise <= cyc;
      // inside a byte consecutive rises are one SCL period apart; longer gaps
      // come from stalls, START and STOP
      if (last_rise != 0 && (cyc - last_rise) < 4 * Q) bad_period <= bad_period + 1;
    end
  end

  // SCL must stay low while the controller waits for a write byte
  int unsigned scl_high_in_wait;
  always @(posedge clk) if (wr_ready && scl && !scl_d) scl_high_in_wait <= scl_high_in_wait + 1;

  // write data source
  logic [7:0] wq[$];
  int unsigned wr_delay, wr_wait;
  always @(posedge clk) begin
    if (wq.size() == 0) begin
      wr_valid <= 1'b0;  // queue flushed after an aborted transfer
    end else if (wr_valid && wr_ready) begin
      void'(wq.pop_front());
      wr_valid <= 1'b0;
      wr_wait  <= 0;
    end else if (wq.size() > 0 && !wr_valid) begin
      // the delay counts from the controller asking for the byte
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
    @(posedge clk);
    t_start = cyc;
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!done) @(posedge clk);
    t_done = cyc;
    @(negedge clk);
  endtask

  initial begin
    cmd_valid = 1'b0; wr_valid = 1'b0; wr_data = '0; refuse = 1'b0;
    cmd = '0; rst_n = 1'b0; cyc = 0; scl_rises = 0; last_rise = 0;
    bad_period = 0; scl_d = 1'b1; scl_high_in_wait = 0; wr_delay = 0; wr_wait = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // 1: master transmitter, 3 bytes to 0x50 at register 0x10
    wq = '{8'hDE, 8'hAD, 8'hBE};
    run(I2C_WRITE, 7'h50, 8'h10, 8'd3);
    check(!nack, "write: no nack");
    check(s1.mem[8'h10] == 8'hDE && s1.mem[8'h11] == 8'hAD && s1.mem[8'h12] == 8'hBE,
          "write: data stored in slave 0x50");
    check(s1.mem[8'h13] == (8'h13 ^ 8'hA5), "write: next register untouched");
    check(scl_rises - rises0 == 9 * (2 + 3) + 1, "write: 9 SCL pulses per byte");
    check(t_done - t_start == 1 + 4 * Q * (2 + 9 * (2 + 3)) + 3, "write: transfer time");
    check(s1.n_start == 1 && s1.n_stop == 1 && s2.n_ack == 0, "write: START/STOP seen");

    // 2: master receiver, 4 bytes from 0x68 at register 0x20
    rq = {};
    run(I2C_READ, 7'h68, 8'h20, 8'd4);
    check(!nack, "read: no nack");
    check(rq.size() == 4, "read: 4 bytes delivered");
    for (int i = 0; i < 4 && i < rq.size(); i++)
      check(rq[i] == (8'(8'h20 + i) ^ 8'h3C), $sformatf("read: byte %0d", i));
    check(s2.n_restart == 1, "read: repeated START");
    check(s2.n_mack == 3 && s2.n_mnack == 1, "read: master ACK x3 then NACK");
    check(scl_rises - rises0 == 9 * (3 + 4) + 2, "read: SCL pulses");
    check(t_done - t_start == 1 + 4 * Q * (3 + 9 * (3 + 4)), "read: transfer time");

    // 3: read back two of the written bytes from 0x50
    rq = {};
    run(I2C_READ, 7'h50, 8'h11, 8'd2);
    check(!nack && rq.size() == 2, "readback: 2 bytes");
    if (rq.size() == 2) check(rq[0] == 8'hAD && rq[1] == 8'hBE, "readback: data");

    // 4: no device at 0x33
    rq = {};
    run(I2C_READ, 7'h33, 8'h00, 8'd1);
    check(nack, "unknown address: nack");
    check(rq.size() == 0, "unknown address: nothing read");
    check(scl_rises - rises0 == 9 + 1, "unknown address: STOP after address byte");

    // 5: slave refuses data: transfer ends after the first data byte
    refuse = 1'b1;
    wq = '{8'h11, 8'h22};
    run(I2C_WRITE, 7'h50, 8'h40, 8'd2);
    check(nack, "refused data: nack");
    check(s1.mem[8'h40] == (8'h40 ^ 8'hA5), "refused data: not stored");
    check(scl_rises - rises0 == 9 * 3 + 1, "refused data: STOP after first data byte");
    wq = {};
    refuse = 1'b0;
    repeat (2) @(posedge clk);  // let the source drop the stale byte

    // 6: late write bytes stall the transfer with SCL low
    wr_delay = 37;
    wq = '{8'h5A, 8'hC3};
    run(I2C_WRITE, 7'h68, 8'h80, 8'd2);
    check(!nack, "stall: no nack");
    check(s2.mem[8'h80] == 8'h5A && s2.mem[8'h81] == 8'hC3, "stall: data stored");
    check(scl_high_in_wait == 0, "stall: SCL low while waiting");
    check(t_done - t_start == 1 + 4 * Q * (2 + 9 * (2 + 2)) + 2 * (37 + 2),
          "stall: transfer time includes the waits");
    wr_delay = 0;

    // 7: nbytes = 0 moves one byte
    rq = {};
    run(I2C_READ, 7'h68, 8'h80, 8'd0);
    check(rq.size() == 1 && rq[0] == 8'h5A, "nbytes 0 reads one byte");

    check(bad_period == 0, "no SCL period shorter than 4*QUARTER");
    check(s1.n_start + s2.n_start >= 7, "START seen by slaves");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
