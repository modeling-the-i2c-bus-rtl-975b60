// tb_i2c_symbol_reader: checks the symbol reader on a hand-written wire
// sequence with known symbols, then on a long random sequence against a
// behavioural reference (START/STOP on SDA edges while SCL is high, a bit
// on every SCL fall after the first one following START/STOP, IDLE while
// the bus rests high outside a transfer). Samples without `step` must be
// ignored.
`timescale 1ns/1ps
module tb_i2c_symbol_reader;
  import i2c_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  bus_t bus = BUS_IDLE;
  logic sym_valid;
  sym_t sym;
  always #5 clk = ~clk;

  i2c_symbol_reader dut (.clk, .rst_n, .step, .bus, .sym_valid, .sym);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // expected: 0 none, 1 idle, 2 start, 3 stop, 4 bit0, 5 bit1
  function automatic int code(input logic v, input sym_t s);
    if (!v) return 0;
    case (s.kind)
      SYM_IDLE:  return 1;
      SYM_START: return 2;
      SYM_STOP:  return 3;
      default:   return s.bit_val ? 5 : 4;
    endcase
  endfunction

  task automatic apply(input logic scl, input logic sda, input int exp_code);
    @(negedge clk);
    bus  = '{scl: scl, sda: sda};
    step = 1'b1;
    #1;
    check(code(sym_valid, sym) == exp_code,
          $sformatf("bus %b%b: got %0d expected %0d", scl, sda,
                    code(sym_valid, sym), exp_code));
    @(negedge clk);
    step = 1'b0;
    // Between steps the reader must stay quiet whatever the bus does.
    bus = '{scl: ~scl, sda: sda};
    #1 check(!sym_valid, "no symbol without step");
    bus = '{scl: scl, sda: sda};
  endtask

  // reference model state
  bit   r_active = 0;
  bus_t r_prev   = BUS_IDLE;
  function automatic int ref_step(input bus_t b);
    int c = 0;
    if (r_prev.scl && b.scl && r_prev.sda && !b.sda) begin c = 2; r_active = 0; end
    else if (r_prev.scl && b.scl && !r_prev.sda && b.sda) begin c = 3; r_active = 0; end
    else if (r_prev.scl && !b.scl) begin
      c = r_active ? (r_prev.sda ? 5 : 4) : 0;
      r_active = 1;
    end else if (b.scl && b.sda && !r_active) c = 1;
    r_prev = b;
    return c;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Hand-written sequence.
    apply(1, 1, 1);  // idle
    apply(1, 0, 2);  // START
    apply(0, 0, 0);  // first clock-down only arms the receiver
    apply(0, 1, 0);
    apply(1, 1, 0);
    apply(0, 1, 5);  // bit 1
    apply(0, 0, 0);
    apply(1, 0, 0);
    apply(0, 0, 4);  // bit 0
    apply(1, 0, 0);
    apply(1, 1, 3);  // STOP
    apply(1, 1, 1);  // idle again
    apply(1, 0, 2);  // START
    apply(1, 1, 3);  // STOP right after
    // Random sequence against the reference.
    r_active = 0; r_prev = BUS_IDLE;
    for (int i = 0; i < 4000; i++) begin
      bus_t b;
      b = bus_t'($urandom % 4);
      apply(b.scl, b.sda, ref_step(b));
    end
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
