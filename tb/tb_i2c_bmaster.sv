// tb_i2c_bmaster: plays both neighbours of the master byte layer. Above it,
// a random sequence of byte actions (START, STOP, WRITE, READ, IDLE); below
// it, the bus: every symbol the layer asks for is shown back to it, with a
// slave or a second master pulling the data line low where the test plan
// says so. For each action the testbench knows in advance which symbols
// must be generated, which result must come back and in which symbol, and
// checks all three. Covered: acknowledged and refused writes, reads with
// the acknowledge bit chosen by the following action, arbitration loss in a
// data bit and in a read's acknowledge slot (then waiting for STOP), a
// START from another master while idle, and undefined conditions.
`timescale 1ns/1ps
module tb_i2c_bmaster;
  import i2c_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  sym_valid = 1'b0;
  sym_t  sym = '0;
  sym_t  next_sym;
  logic  res_valid;
  bres_t res;
  bact_t act = '0;

  i2c_bmaster dut (.clk, .rst_n, .sym_valid, .sym, .next_sym,
                   .res_valid, .res, .act);

  int checks = 0, failures = 0;
  int n_ok = 0, n_nack = 0, n_read = 0, n_arb = 0, n_undef = 0, n_busy = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // One call from the symbol layer: present a symbol and the action the
  // upper layer would answer with; return what the block did.
  bit    rv;
  bres_t r;
  sym_t  ns;     // symbol the block asks for next
  task automatic call(input sym_t s, input bact_t a);
    sym_valid = 1'b1;
    sym       = s;
    act       = a;
    #1;
    rv = res_valid;
    r  = res;
    ns = next_sym;
    @(posedge clk);
    #1 sym_valid = 1'b0;
  endtask

  function automatic bact_t pick();
    int k = $urandom % 20;
    bact_t a;
    a.data = 8'($urandom);
    if      (k < 3)  a.kind = BACT_START;
    else if (k < 6)  a.kind = BACT_STOP;
    else if (k < 13) a.kind = BACT_WRITE;
    else if (k < 18) a.kind = BACT_READ;
    else             a.kind = BACT_IDLE;
    return a;
  endfunction

  function automatic sym_t first_sym(input bact_t a);
    case (a.kind)
      BACT_START: return mk_sym(SYM_START);
      BACT_STOP:  return mk_sym(SYM_STOP);
      BACT_WRITE: return mk_bit(a.data[7]);
      BACT_READ:  return mk_bit(1'b1);
      default:    return mk_sym(SYM_IDLE);
    endcase
  endfunction

  function automatic bit is_res(input bres_kind_t k, input bres_t x);
    return rv && x.kind == k;
  endfunction

  // After an arbitration loss: other traffic, then STOP frees the bus.
  task automatic wait_busy(input bact_t nxt);
    int n = 1 + $urandom % 12;
    for (int i = 0; i < n; i++) begin
      int k = $urandom % 4;
      call(k == 0 ? mk_sym(SYM_START) : (k == 1 ? mk_sym(SYM_IDLE)
                                                : mk_bit(1'($urandom))), nxt);
      check(!rv, "no result while the bus is busy");
      check(ns.kind == SYM_IDLE, "nothing generated while busy");
    end
    call(mk_sym(SYM_STOP), nxt);
    check(is_res(BRES_OK, r), "STOP frees the bus and calls up");
    n_busy++;
  endtask

  initial begin
    bact_t cur, nxt;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cur = pick();
    // First call: idle bus, the block asks for its first action.
    call(mk_sym(SYM_IDLE), cur);
    check(is_res(BRES_OK, r), "idle call after reset");

    for (int n = 0; n < 3000; n++) begin
      nxt = pick();
      check(ns == first_sym(cur), $sformatf("first symbol of action %s", cur.kind.name()));
      case (cur.kind)
        BACT_IDLE: begin
          if ($urandom % 4 == 0) begin
            // another master starts: the bus is busy until its STOP
            call(mk_sym(SYM_START), nxt);
            check(!rv, "START of another master is not a result");
            wait_busy(nxt);
          end else begin
            call(mk_sym(SYM_IDLE), nxt);
            check(is_res(BRES_OK, r), "IDLE action result");
            if (rv && r.kind == BRES_OK) n_ok++;
          end
        end
        BACT_START, BACT_STOP: begin
          if ($urandom % 10 == 0) begin
            call(cur.kind == BACT_START ? mk_sym(SYM_STOP) : mk_bit(1'b0), nxt);
            check(is_res(BRES_UNDEF, r), "wrong symbol after START/STOP");
            n_undef++;
          end else begin
            call(ns, nxt);
            check(is_res(BRES_OK, r), "START/STOP result");
            n_ok++;
          end
        end
        BACT_WRITE: begin
          int  arb_at, undef_at;
          bit  ack, done;
          arb_at   = -1;
          undef_at = -1;
          ack      = ($urandom % 4 != 0);
          done     = 0;
          if ($urandom % 8 == 0) arb_at = $urandom % 8;
          if (arb_at >= 0 && !cur.data[7 - arb_at]) arb_at = -1;
          if ($urandom % 12 == 0) undef_at = $urandom % 9;
          for (int i = 0; i < 8 && !done; i++) begin
            check(ns == mk_bit(cur.data[7 - i]), $sformatf("write bit %0d", i));
            if (i == undef_at) begin
              call(mk_sym(SYM_START), nxt);
              check(is_res(BRES_UNDEF, r), "START inside a byte");
              n_undef++;
              done = 1;
            end else if (i == arb_at) begin
              call(mk_bit(1'b0), nxt);
              check(is_res(BRES_ARB_LOST, r), "1 sent, 0 seen");
              check(ns.kind == SYM_IDLE, "master lets go after a loss");
              n_arb++;
              wait_busy(nxt);
              done = 1;
            end else begin
              call(mk_bit(cur.data[7 - i]), nxt);
              check(!rv, "no result inside the byte");
            end
          end
          if (!done) begin
            check(ns == mk_bit(1'b1), "ack slot released");
            if (undef_at == 8) begin
              call(mk_sym(SYM_STOP), nxt);
              check(is_res(BRES_UNDEF, r), "STOP in the ack slot");
              n_undef++;
            end else begin
              call(mk_bit(!ack), nxt);
              check(is_res(ack ? BRES_OK : BRES_NACK, r), "write acknowledge");
              if (ack) n_ok++; else n_nack++;
            end
          end
        end
        default: begin // BACT_READ
          logic [7:0] rb;
          rb = 8'($urandom);
          for (int i = 0; i < 8; i++) begin
            check(ns == mk_bit(1'b1), $sformatf("read bit %0d released", i));
            call(mk_bit(rb[7 - i]), nxt);
            if (i < 7) check(!rv, "no result inside the byte");
          end
          check(is_res(BRES_READ, r) && r.data == rb, "byte read");
          n_read++;
          check(ns == mk_bit(nxt.kind != BACT_READ),
                "ACK when another read follows, NACK otherwise");
          if (nxt.kind != BACT_READ && $urandom % 6 == 0) begin
            // another master acknowledges where this one does not
            call(mk_bit(1'b0), pick());
            check(is_res(BRES_ARB_LOST, r), "loss in the read ack slot");
            n_arb++;
            wait_busy(nxt);
          end else begin
            call(ns, pick());
            check(!rv, "ack slot has no result");
          end
        end
      endcase
      cur = nxt;
    end

    check(n_ok > 0 && n_nack > 0 && n_read > 0 && n_arb > 0 && n_undef > 0
          && n_busy > 0, "every result kind seen");
    $display("results: ok=%0d nack=%0d read=%0d arb=%0d undef=%0d busy=%0d",
             n_ok, n_nack, n_read, n_arb, n_undef, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
