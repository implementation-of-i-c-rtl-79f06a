// i2c_slave_model: behavioural model of a register-addressed I2C slave device
// (a real-time clock or an EEPROM) for the testbenches. Not synthesizable
// design content; it stands in for an external chip.
//
// It watches the bus levels scl/sda once per clk cycle, detects START and STOP
// (SDA falling / rising while SCL is high), shifts in bits on SCL rising edges
// and changes its own SDA output only after SCL falling edges. The first byte
// after START is the 7-bit address + R/W; on a match the model ACKs. In a
// write the next byte sets the register pointer and further bytes are stored
// at the pointer, which then increments. In a read the model sends the byte at
// the pointer, MSB first, and continues with the next one while the master
// ACKs; a master NACK ends it. An address that does not match gets no ACK.
// With refuse_data high, written data bytes are answered with NACK and not
// stored. Registers start as mem[i] = i ^ SEED.
//
// sda_o: 1 = release, 0 = pull low. Counters are read by the testbenches.
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h50,
  parameter logic [7:0] SEED = 8'hA5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic scl,
  input  logic sda,
  input  logic refuse_data,
  output logic sda_o
);

  typedef enum logic [2:0] {M_IDLE, M_RX, M_ACK, M_TX, M_MACK} mstate_t;
  typedef enum logic [1:0] {K_ADDR, K_REG, K_DATA} kind_t;

  logic [7:0] mem [256];
  mstate_t    st;
  kind_t      kind;
  logic [7:0] sh, txb, ptr;
  logic [3:0] cnt;
  logic       rw, mack, in_frame;
  logic       scl_d, sda_d;

  // event counters
  int unsigned n_start, n_restart, n_stop, n_ack, n_nack, n_wr, n_rd,
               n_mack, n_mnack;

  initial for (int i = 0; i < 256; i++) mem[i] = 8'(i) ^ SEED;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; kind <= K_ADDR; sh <= '0; txb <= '0; ptr <= '0; cnt <= '0;
      rw <= 1'b0; mack <= 1'b1; in_frame <= 1'b0; sda_o <= 1'b1;
      scl_d <= 1'b1; sda_d <= 1'b1;
      n_start <= 0; n_restart <= 0; n_stop <= 0; n_ack <= 0; n_nack <= 0;
      n_wr <= 0; n_rd <= 0; n_mack <= 0; n_mnack <= 0;
    end else begin
      scl_d <= scl;
      sda_d <= sda;
      if (scl && scl_d && sda_d && !sda) begin            // START
        if (in_frame) n_restart <= n_restart + 1;
        else          n_start   <= n_start + 1;
        in_frame <= 1'b1;
        st <= M_RX; kind <= K_ADDR; cnt <= '0; sda_o <= 1'b1;
      end else if (scl && scl_d && !sda_d && sda) begin   // STOP
        n_stop   <= n_stop + 1;
        in_frame <= 1'b0;
        st <= M_IDLE; sda_o <= 1'b1;
      end else if (scl && !scl_d) begin                   // SCL rising
        if (st == M_RX) begin
          sh  <= {sh[6:0], sda};
          cnt <= cnt + 4'd1;
        end else if (st == M_MACK) begin
          mack <= sda;
        end
      end else if (!scl && scl_d) begin                   // SCL falling
        unique case (st)
          M_RX: if (cnt == 4'd8) begin
            unique case (kind)
              K_ADDR: if (sh[7:1] == ADDR) begin
                rw <= sh[0]; sda_o <= 1'b0; st <= M_ACK; n_ack <= n_ack + 1;
              end else begin
                st <= M_IDLE;
              end
              K_REG: begin
                ptr <= sh; sda_o <= 1'b0; st <= M_ACK; n_ack <= n_ack + 1;
              end
              default: if (refuse_data) begin
                st <= M_IDLE; n_nack <= n_nack + 1;
              end else begin
                mem[ptr] <= sh; ptr <= ptr + 8'd1; n_wr <= n_wr + 1;
                sda_o <= 1'b0; st <= M_ACK; n_ack <= n_ack + 1;
              end
            endcase
          end
          M_ACK: begin
            if (kind == K_ADDR && rw) begin
              txb <= mem[ptr]; sda_o <= mem[ptr][7]; cnt <= 4'd1; st <= M_TX;
            end else begin
              sda_o <= 1'b1; cnt <= '0; st <= M_RX;
              kind  <= (kind == K_ADDR) ? K_REG : K_DATA;
            end
          end
          M_TX: begin
            if (cnt == 4'd8) begin
              sda_o <= 1'b1; st <= M_MACK; n_rd <= n_rd + 1;
            end else begin
              sda_o <= txb[3'd7 - cnt[2:0]]; cnt <= cnt + 4'd1;
            end
          end
          M_MACK: begin
            if (!mack) begin
              n_mack <= n_mack + 1;
              txb <= mem[ptr + 8'd1]; sda_o <= mem[ptr + 8'd1][7];
              ptr <= ptr + 8'd1; cnt <= 4'd1; st <= M_TX;
            end else begin
              n_mnack <= n_mnack + 1;
              ptr <= ptr + 8'd1; sda_o <= 1'b1; st <= M_IDLE;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
