// tb_i2c_sslave_device: drives random wire samples into the slave symbol
// layer and answers every parsed symbol with a random SDA decision. The
// device must report the same symbols as a behavioural parser, drive SDA
// low exactly when the last answer asked for it, keep that decision while
// no symbol arrives, and never pull SCL.
`timescale 1ns/1ps
module tb_i2c_sslave_device;
  import i2c_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  always #5 clk = ~clk;
  bus_t bus_in = BUS_IDLE, bus_out;
  logic up_valid, up_release;
  sym_t up_sym;

  i2c_sslave_device dut (.clk, .rst_n, .step, .bus_in, .bus_out,
                         .up_valid, .up_sym, .up_release);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  bit   r_active = 0;
  bus_t r_prev   = BUS_IDLE;
  bit   exp_rel  = 1;
  int   n_low = 0, n_sym = 0;

  initial begin
    up_release = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(bus_out == BUS_IDLE, "lines released after reset");
    for (int i = 0; i < 3000; i++) begin
      bus_t b;
      bit   v;
      b = bus_t'($urandom % 4);
      // reference parser
      v = 0;
      if (r_prev.scl && b.scl && r_prev.sda != b.sda) begin v = 1; r_active = 0; end
      else if (r_prev.scl && !b.scl) begin v = r_active; r_active = 1; end
      else if (b == BUS_IDLE && !r_active) v = 1;
      r_prev = b;
      @(negedge clk);
      bus_in     = b;
      step       = 1'b1;
      up_release = $urandom % 2;
      #1 check(up_valid == v, $sformatf("symbol present %b expected %b", up_valid, v));
      if (v) begin exp_rel = up_release; n_sym++; end
      @(negedge clk);
      step = 1'b0;
      check(bus_out.scl == 1'b1, "SCL never pulled");
      check(bus_out.sda == exp_rel, "SDA follows the last answer");
      if (!bus_out.sda) n_low++;
    end
    check(n_low > 100 && n_sym > 100, "SDA was pulled low and symbols seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
