// i2c_master: I2C master bus controller.
//
// The controller runs whole register-addressed transfers on a two-wire bus.
// Master transmitter mode (cmd.rw = write):
//   START, slave address + W, ACK, register address, ACK,
//   data byte, ACK, ... (nbytes times), STOP.
// Master receiver mode (cmd.rw = read):
//   START, slave address + W, ACK, register address, ACK,
//   repeated START, slave address + R, ACK,
//   data byte, master ACK, ... last data byte, master NACK, STOP.
// Bytes go out MSB first and every byte takes nine SCL pulses, the ninth for
// the acknowledge bit. If a slave answers any byte with a high (NACK) bit the
// controller stops sending, issues STOP and reports nack with done.
// This frame format, the START/STOP conditions and the abort on NACK follow the
// protocol description; the command/stream interface, the clocking scheme, the
// input synchroniser and the NACK sent by the master after the last byte it
// reads are choices of this design.
//
// Clocking: one SCL period is four quarter periods of QUARTER = CLK_HZ /
// (4 * SCL_HZ) system clocks each. In a data or acknowledge bit SCL is low in
// quarter 0 (SDA changes here), high in quarters 1 and 2, low in quarter 3.
// SDA is sampled at the end of quarter 2. START holds SDA high then pulls it
// low while SCL is high; STOP holds SDA low then releases it while SCL is
// high. SCL is only ever driven by this controller (no clock stretching).
// scl_o and sda_o are registered; sda_o = 0 means "pull SDA low", 1 means
// "release" (the bus pull-up makes it high). sda_i is the resolved bus level;
// it passes a two-flop synchroniser, so QUARTER must be at least 4.
//
// Interface and timing:
//   cmd_valid/cmd_ready: a command is taken in the cycle both are high;
//     cmd_ready is high only while the bus is idle.
//   wr_valid/wr_ready: in master transmitter mode the controller raises
//     wr_ready each time it needs the next data byte and holds SCL low (the
//     transfer stalls) until wr_valid is high; wr_data is taken in that cycle.
//   rd_valid: one-cycle pulse with rd_data after the 8th bit of each byte read.
//   done: one-cycle pulse when STOP is complete; nack is valid with it and
//     stays until the next command.
module i2c_master
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,  // system clock
  parameter int unsigned SCL_HZ = 100_000      // SCL rate (standard mode)
) (
  input  logic       clk,
  input  logic       rst_n,
  // command
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  i2c_cmd_t   cmd,
  // write data stream (master transmitter)
  input  logic [7:0] wr_data,
  input  logic       wr_valid,
  output logic       wr_ready,
  // read data (master receiver)
  output logic [7:0] rd_data,
  output logic       rd_valid,
  // status
  output logic       busy,
  output logic       done,
  output logic       nack,
  // bus
  output logic       scl_o,
  output logic       sda_o,
  input  logic       sda_i
);

  localparam int unsigned QUARTER = CLK_HZ / (4 * SCL_HZ);
  localparam int unsigned QW      = (QUARTER > 1) ? $clog2(QUARTER) : 1;

  initial begin
    assert (QUARTER >= 4)
      else $error("i2c_master: CLK_HZ / (4 * SCL_HZ) must be at least 4");
  end

  ctrl_state_t state;
  byte_kind_t  kind;
  i2c_dir_t    rw_q;
  logic [6:0]  addr_q;
  logic [7:0]  reg_q;
  logic [QW-1:0] div_cnt;
  logic [1:0]  q;          // quarter of the current bit
  logic [2:0]  bit_cnt;    // bits left in the byte, minus one
  logic [7:0]  shreg;
  logic [7:0]  remaining;  // data bytes still to move
  logic        restarted;  // repeated START already sent
  logic        ack_bit;
  logic [1:0]  sda_sync;
  logic        tick;       // last cycle of a quarter
  logic        bit_end;    // last cycle of a bit / condition
  logic        scl_c, sda_c;

  assign tick    = (div_cnt == QW'(QUARTER - 1));
  assign bit_end = tick && (q == 2'd3);

  assign cmd_ready = (state == ST_IDLE);
  assign wr_ready  = (state == ST_WAIT_DATA);
  assign busy      = (state != ST_IDLE);

  // Bus levels wanted in the current quarter.
  always_comb begin
    scl_c = 1'b0;
    sda_c = 1'b1;
    unique case (state)
      ST_IDLE: begin
        scl_c = 1'b1;
        sda_c = 1'b1;
      end
      ST_START: begin
        // quarter 0 keeps SCL as it was: high from idle, low before a
        // repeated START
        scl_c = (q == 2'd0) ? !restarted : (q != 2'd3);
        sda_c = (q < 2'd2);
      end
      ST_WBIT: begin
        scl_c = (q == 2'd1) || (q == 2'd2);
        sda_c = shreg[7];
      end
      ST_WACK, ST_RBIT: begin
        scl_c = (q == 2'd1) || (q == 2'd2);
        sda_c = 1'b1;
      end
      ST_RACK: begin
        scl_c = (q == 2'd1) || (q == 2'd2);
        sda_c = (remaining == 8'd1);  // NACK after the last byte
      end
      ST_WAIT_DATA: begin
        scl_c = 1'b0;
        sda_c = 1'b1;
      end
      ST_STOP: begin
        scl_c = (q != 2'd0);
        sda_c = (q == 2'd3);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_o    <= 1'b1;
      sda_o    <= 1'b1;
      sda_sync <= 2'b11;
    end else begin
      // bus rule: while SCL stays high, SDA changes only as START or STOP
      if (scl_o && scl_c && (sda_c != sda_o)) begin
        assert (state == ST_START || state == ST_STOP)
          else $error("i2c_master: SDA changed while SCL high outside START/STOP");
      end
      scl_o    <= scl_c;
      sda_o    <= sda_c;
      sda_sync <= {sda_sync[0], sda_i};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      kind      <= BY_ADDR_W;
      rw_q      <= I2C_WRITE;
      addr_q    <= '0;
      reg_q     <= '0;
      div_cnt   <= '0;
      q         <= '0;
      bit_cnt   <= '0;
      shreg     <= '0;
      remaining <= '0;
      restarted <= 1'b0;
      ack_bit   <= 1'b0;
      rd_data   <= '0;
      rd_valid  <= 1'b0;
      done      <= 1'b0;
      nack      <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      done     <= 1'b0;

      // quarter-period timer, halted while idle or stalled
      if (state == ST_IDLE || state == ST_WAIT_DATA) begin
        div_cnt <= '0;
        q       <= '0;
      end else if (tick) begin
        div_cnt <= '0;
        q       <= q + 2'd1;
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end

      unique case (state)
        ST_IDLE: begin
          if (cmd_valid) begin
            rw_q      <= cmd.rw;
            addr_q    <= cmd.slave_addr;
            reg_q     <= cmd.reg_addr;
            remaining <= (cmd.nbytes == 8'd0) ? 8'd1 : cmd.nbytes;
            restarted <= 1'b0;
            nack      <= 1'b0;
            state     <= ST_START;
          end
        end

        ST_START: begin
          if (bit_end) begin
            shreg   <= {addr_q, restarted ? 1'b1 : 1'b0};
            kind    <= restarted ? BY_ADDR_R : BY_ADDR_W;
            bit_cnt <= 3'd7;
            state   <= ST_WBIT;
          end
        end

        ST_WBIT: begin
          if (bit_end) begin
            if (bit_cnt == 3'd0) begin
              state <= ST_WACK;
            end else begin
              shreg   <= {shreg[6:0], 1'b0};
              bit_cnt <= bit_cnt - 3'd1;
            end
          end
        end

        ST_WACK: begin
          if (tick && q == 2'd2) ack_bit <= sda_sync[1];
          if (bit_end) begin
            if (ack_bit) begin
              // high acknowledge: the slave takes no more, end the transfer
              nack  <= 1'b1;
              state <= ST_STOP;
            end else begin
              unique case (kind)
                BY_ADDR_W: begin
                  shreg   <= reg_q;
                  kind    <= BY_REG;
                  bit_cnt <= 3'd7;
                  state   <= ST_WBIT;
                end
                BY_REG: begin
                  if (rw_q == I2C_READ) begin
                    restarted <= 1'b1;
                    state     <= ST_START;
                  end else begin
                    kind  <= BY_DATA;
                    state <= ST_WAIT_DATA;
                  end
                end
                BY_ADDR_R: begin
                  kind    <= BY_DATA;
                  bit_cnt <= 3'd7;
                  state   <= ST_RBIT;
                end
                BY_DATA: begin
                  remaining <= remaining - 8'd1;
                  state     <= (remaining == 8'd1) ? ST_STOP : ST_WAIT_DATA;
                end
                default: state <= ST_STOP;
              endcase
            end
          end
        end

        ST_WAIT_DATA: begin
          if (wr_valid) begin
            shreg   <= wr_data;
            bit_cnt <= 3'd7;
            state   <= ST_WBIT;
          end
        end

        ST_RBIT: begin
          if (tick && q == 2'd2) shreg <= {shreg[6:0], sda_sync[1]};
          if (bit_end) begin
            if (bit_cnt == 3'd0) begin
              rd_data  <= shreg;
              rd_valid <= 1'b1;
              state    <= ST_RACK;
            end else begin
              bit_cnt <= bit_cnt - 3'd1;
            end
          end
        end

        ST_RACK: begin
          if (bit_end) begin
            remaining <= remaining - 8'd1;
            if (remaining == 8'd1) begin
              state <= ST_STOP;
            end else begin
              bit_cnt <= 3'd7;
              state   <= ST_RBIT;
            end
          end
        end

        ST_STOP: begin
          if (bit_end) begin
            done  <= 1'b1;
            state <= ST_IDLE;
          end
        end

        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
