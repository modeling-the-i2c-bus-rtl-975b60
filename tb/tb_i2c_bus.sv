// tb_i2c_bus: checks the wired-AND bus for every combination of drivers,
// with three devices as in the complete system: a line is high exactly when
// no device pulls it low, and the two lines are independent.
`timescale 1ns/1ps
module tb_i2c_bus;
  localparam int N = 3;

  logic [N-1:0] scl_drive_low = '0, sda_drive_low = '0;
  logic         scl, sda;

  i2c_bus #(.N_DEV(N)) dut (.scl_drive_low, .sda_drive_low, .scl, .sda);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    for (int c = 0; c < 2 ** N; c++)
      for (int d = 0; d < 2 ** N; d++) begin
        bit exp_scl, exp_sda;
        scl_drive_low = N'(c);
        sda_drive_low = N'(d);
        exp_scl = 1; exp_sda = 1;
        for (int i = 0; i < N; i++) begin
          if (c[i]) exp_scl = 0;
          if (d[i]) exp_sda = 0;
        end
        #1;
        check(scl == exp_scl, $sformatf("SCL with drivers %b", scl_drive_low));
        check(sda == exp_sda, $sformatf("SDA with drivers %b", sda_drive_low));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
