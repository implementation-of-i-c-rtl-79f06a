// i2c_system: the complete bus of the design, one I2C master bus controller
// and two slave devices (a real-time clock and an EEPROM) on shared SCL and
// SDA lines.
//
// The master controller and the bus wires are built here; the two slave
// devices are external chips, so their pins are ports of this module:
// slave_scl is the clock every slave receives, slave_sda_o[0] and [1] are the
// SDA outputs of slave 1 and slave 2 (1 = release, 0 = pull low) and sda is
// the resolved level of the SDA wire that they read. The SDA wire is the
// wired-AND of the master and both slaves. Command, write-data and read-data
// ports are those of i2c_master, with the same timing.
module i2c_system
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned SCL_HZ = 100_000
) (
  input  logic       clk,
  input  logic       rst_n,
  // command and data
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  i2c_cmd_t   cmd,
  input  logic [7:0] wr_data,
  input  logic       wr_valid,
  output logic       wr_ready,
  output logic [7:0] rd_data,
  output logic       rd_valid,
  output logic       busy,
  output logic       done,
  output logic       nack,
  // bus pins of the two slave devices
  output logic       slave_scl,
  output logic       sda,
  input  logic [1:0] slave_sda_o
);

  logic scl_m, sda_m;

  i2c_master #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) u_master (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd,
    .wr_data, .wr_valid, .wr_ready,
    .rd_data, .rd_valid,
    .busy, .done, .nack,
    .scl_o(scl_m), .sda_o(sda_m), .sda_i(sda)
  );

  i2c_bus #(.N_DEV(3)) u_bus (
    .sda_drv({slave_sda_o, sda_m}),
    .scl_m  (scl_m),
    .sda    (sda),
    .scl    (slave_scl)
  );

endmodule
