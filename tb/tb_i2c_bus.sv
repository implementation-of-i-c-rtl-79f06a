// tb_i2c_bus: self-checking testbench of the bus wires. Every combination of
// device outputs is applied; SDA must be low exactly when some device pulls it
// low, and SCL must follow the master's clock.
module tb_i2c_bus;
  localparam int unsigned N = 3;

  logic [N-1:0] drv;
  logic         scl_m, sda, scl;
  int checks = 0, failures = 0;

  i2c_bus #(.N_DEV(N)) dut (.sda_drv(drv), .scl_m, .sda, .scl);

  initial begin
    for (int c = 0; c < 2 ** (N + 1); c++) begin
      drv   = c[N-1:0];
      scl_m = c[N];
      #1;
      checks++;
      if (sda != (drv == '1)) begin
        failures++;
        $display("FAIL: drv=%b sda=%b", drv, sda);
      end
      checks++;
      if (scl != scl_m) begin
        failures++;
        $display("FAIL: scl_m=%b scl=%b", scl_m, scl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
