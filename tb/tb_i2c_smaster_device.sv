// tb_i2c_smaster_device: runs the master symbol layer in loopback. The bus
// is the device's own request ANDed with a second device that can hold SCL
// low (clock stretching). The upper layer is a script of symbols obeying
// the sequencing rules; every symbol the device parses back from the bus
// must be the one it was asked to generate, one for one. Without
// stretching a bit must take exactly two steps; with stretching it must
// wait for SCL.
`timescale 1ns/1ps
module tb_i2c_smaster_device;
  import i2c_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic step = 1'b1;
  bus_t bus_out, bus_in;
  logic up_valid;
  sym_t up_sym, up_next;
  logic ext_scl = 1'b1;

  assign bus_in = '{scl: bus_out.scl & ext_scl, sda: bus_out.sda};

  i2c_smaster_device dut (.clk, .rst_n, .step, .bus_in, .bus_out,
                          .up_valid, .up_sym, .up_next);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  sym_t script [$];
  int   k = 0;
  int   last_bit_t = -1, bits_timed = 0, bits_stretched = 0;
  bit   stretching = 0;

  assign up_next = (k < script.size()) ? script[k] : mk_sym(SYM_IDLE);

  function automatic string s2s(input sym_t s);
    case (s.kind)
      SYM_IDLE:  return "IDLE";
      SYM_START: return "START";
      SYM_STOP:  return "STOP";
      default:   return s.bit_val ? "1" : "0";
    endcase
  endfunction

  always @(posedge clk) if (rst_n && up_valid) begin
    if (k >= 1 && k <= script.size()) begin
      check(up_sym == script[k-1],
            $sformatf("symbol %0d: parsed %s, generated %s", k - 1,
                      s2s(up_sym), s2s(script[k-1])));
      if (up_sym.kind == SYM_BIT && k >= 2 && script[k-2].kind == SYM_BIT) begin
        int dt;
        dt = int'($time / 10) - last_bit_t;
        if (!stretching) begin
          check(dt == 2, $sformatf("bit took %0d steps, expected 2", dt));
          bits_timed++;
        end else if (dt > 2) bits_stretched++;
      end
    end
    if (up_sym.kind == SYM_BIT) last_bit_t = $time / 10;
    k <= k + 1;
  end

  task automatic add_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) script.push_back(mk_bit(b[i]));
    script.push_back(mk_bit($urandom % 2));   // ack slot
  endtask

  task automatic build(input int n_txn);
    for (int t = 0; t < n_txn; t++) begin
      int nb = 1 + $urandom % 3;
      script.push_back(mk_sym(SYM_START));
      for (int i = 0; i < nb; i++) add_byte(8'($urandom));
      if ($urandom % 3 == 0) begin                // repeated START
        script.push_back(mk_sym(SYM_START));
        add_byte(8'($urandom));
      end
      script.push_back(mk_sym(SYM_STOP));
      repeat ($urandom % 3) script.push_back(mk_sym(SYM_IDLE));
    end
  endtask

  initial begin
    script.push_back(mk_sym(SYM_IDLE));
    build(12);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (k > script.size() / 2);
    // Second half: another device stretches the clock.
    stretching = 1;
    fork
      begin : stretcher
        forever begin
          @(negedge bus_in.scl);
          if ($urandom % 2) begin
            ext_scl = 1'b0;
            repeat (1 + $urandom % 6) @(posedge clk);
            ext_scl = 1'b1;
          end
        end
      end
      wait (k > script.size());
    join_any
    disable stretcher;
    ext_scl = 1'b1;
    check(k > script.size(), "whole script generated");
    check(bits_timed > 50, "bit timing observed");
    check(bits_stretched > 5, "stretched bits observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
