// i2c_bus: the two wires of the bus with their pull-up resistors.
//
// SDA is open drain: every device, the master included, can only pull it low
// or let go, and the pull-up makes it high when all have let go. The level on
// the wire is therefore the AND of all devices' outputs (1 = release). SCL is
// driven by the master alone and reaches every device unchanged, since the
// bus here is specified with a one-way clock line. Device 0 is the master.
// This is a purely combinational model of the wires; on an FPGA the master's
// sda_o drives the enable of an open-drain pad instead.
//
// Interface: sda_drv[i] is device i's SDA output, sda is the wire level seen
// by all devices; scl_m is the master's SCL, scl the wire seen by all.
module i2c_bus #(
  parameter int unsigned N_DEV = 3  // devices on the bus: master + 2 slaves
) (
  input  logic [N_DEV-1:0] sda_drv,
  input  logic             scl_m,
  output logic             sda,
  output logic             scl
);

  assign sda = &sda_drv;  // wired-AND through the pull-up
  assign scl = scl_m;

endmodule
