// tb_i2c_bslave: plays a master on the symbol side of the slave byte layer
// and a random high-level slave on its upper side. Frames are START, a
// random number of bytes, then STOP or a repeated START. Each byte is
// written by the master while the slave receives (or ignores the bus), or
// read from the slave while it transmits; the master acknowledges or not
// at random, and sometimes another device pulls SDA low while the slave
// sends a 1. The testbench tracks what the slave must be doing from its own
// answers and checks every event, its data, and the SDA decision after
// every symbol.
`timescale 1ns/1ps
module tb_i2c_bslave;
  import i2c_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    sym_valid = 1'b0;
  sym_t    sym = '0;
  logic    release_sda, ev_valid;
  bev_t    ev;
  breact_t react = '0;

  i2c_bslave dut (.clk, .rst_n, .sym_valid, .sym, .release_sda,
                  .ev_valid, .ev, .react);

  int checks = 0, failures = 0;
  int n_rx = 0, n_tx = 0, n_ack = 0, n_nack = 0, n_idle_react = 0, n_arb = 0;
  int n_start = 0, n_stop = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Present one symbol with the reaction the upper layer gives if it is
  // called; return the event and the SDA decision.
  bit   evv;
  bev_t evd;
  bit   rel;
  task automatic call(input sym_t s, input breact_t r);
    sym_valid = 1'b1;
    sym       = s;
    react     = r;
    #1;
    evv = ev_valid;
    evd = ev;
    rel = release_sda;
    @(posedge clk);
    #1 sym_valid = 1'b0;
  endtask

  typedef enum { M_IDLE, M_RX, M_TX } mode_t;
  mode_t      mode;
  logic [7:0] txb;      // byte the slave is sending in M_TX
  bit         last_rel; // SDA decision for the coming bit

  function automatic breact_t rand_react();
    int k = $urandom % 10;
    if (k < 5) return '{kind: BREACT_RECEIVE, data: 8'h00};
    if (k < 8) return '{kind: BREACT_TRANSMIT, data: 8'($urandom)};
    return '{kind: BREACT_IDLE, data: 8'h00};
  endfunction

  // Mode and SDA decision after a reaction to START/STOP/ACK.
  task automatic apply(input breact_t r);
    case (r.kind)
      BREACT_RECEIVE:  begin mode = M_RX; check(rel, "released to receive"); end
      BREACT_TRANSMIT: begin
        mode = M_TX; txb = r.data;
        check(rel == r.data[7], "first transmitted bit");
      end
      default: begin mode = M_IDLE; check(rel, "released when idle"); end
    endcase
    last_rel = rel;
  endtask

  task automatic frame_edge(input sym_kind_t k);
    breact_t r;
    r = (k == SYM_START) ? '{kind: BREACT_RECEIVE, data: 8'h00} : rand_react();
    if ($urandom % 8 == 0) r = rand_react();
    call(mk_sym(k), r);
    check(evv && evd.kind == (k == SYM_START ? BEV_START : BEV_STOP), "START/STOP event");
    if (k == SYM_START) n_start++; else n_stop++;
    apply(r);
  endtask

  task automatic one_byte();
    breact_t r;
    if (mode == M_TX) begin
      int arb_at;
      bit lost, mack;
      arb_at = ($urandom % 6 == 0) ? int'($urandom % 8) : -1;
      lost   = 0;
      for (int i = 0; i < 8; i++) begin
        bit b;
        b = last_rel;
        if (!lost) check(last_rel == txb[7 - i], $sformatf("transmitted bit %0d", i));
        if (i == arb_at && b) begin b = 0; lost = 1; n_arb++; end
        call(mk_bit(b), rand_react());
        check(!evv, "no event inside a transmitted byte");
        if (lost) check(rel, "released after a loss");
        else if (i < 7) check(rel == txb[6 - i], "next transmitted bit");
        else check(rel, "released for the master's acknowledge");
        last_rel = rel;
      end
      mack = ($urandom % 4 != 0);
      r = ($urandom % 10 == 0) ? rand_react() : '{kind: BREACT_TRANSMIT, data: 8'($urandom)};
      call(mk_bit(!mack), r);
      if (lost) begin
        check(!evv && rel, "silent after a loss");
        mode = M_IDLE; last_rel = rel;
      end else if (mack) begin
        check(evv && evd.kind == BEV_ACK, "master ACK reported");
        n_ack++; n_tx++;
        apply(r);
      end else begin
        check(!evv && rel, "master NACK ends the transfer");
        n_nack++; n_tx++;
        mode = M_IDLE; last_rel = rel;
      end
    end else begin
      logic [7:0] d;
      d = 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        check(last_rel, "released while the master writes");
        r = rand_react();
        call(mk_bit(d[7 - i]), r);
        if (i == 7 && mode == M_RX) begin
          check(evv && evd.kind == BEV_RECEIVE && evd.data == d, "received byte");
          check(rel == (r.kind == BREACT_IDLE), "ACK unless the reaction is IDLE");
          n_rx++;
          if (r.kind == BREACT_IDLE) n_idle_react++;
        end else begin
          check(!evv, "no event");
          check(rel, "released");
        end
        last_rel = rel;
      end
      // acknowledge slot, driven by the slave
      call(mk_bit(last_rel), rand_react());
      check(!evv, "no event in the ack slot");
      if (mode == M_RX && r.kind == BREACT_TRANSMIT) begin
        mode = M_TX; txb = r.data;
        check(rel == r.data[7], "first bit after the ack");
      end else if (mode == M_RX && r.kind == BREACT_RECEIVE) begin
        check(rel, "released to receive");
      end else begin
        mode = M_IDLE;
        check(rel, "released");
      end
      last_rel = rel;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    mode = M_IDLE; last_rel = 1;
    call(mk_sym(SYM_IDLE), rand_react());
    check(!evv && rel, "idle bus: nothing");
    for (int f = 0; f < 600; f++) begin
      int nb;
      frame_edge(SYM_START);
      nb = $urandom % 6;
      for (int b = 0; b < nb; b++) one_byte();
      if ($urandom % 4 == 0) continue;      // repeated START
      frame_edge(SYM_STOP);
      if ($urandom % 2) begin
        call(mk_sym(SYM_IDLE), rand_react());
        check(!evv && rel, "idle symbol: nothing");
        mode = M_IDLE; last_rel = rel;
      end
    end
    check(n_rx > 0 && n_tx > 0 && n_ack > 0 && n_nack > 0 && n_idle_react > 0
          && n_arb > 0, "every case seen");
    $display("cases: start=%0d stop=%0d rx=%0d tx=%0d ack=%0d nack=%0d idle_react=%0d arb=%0d",
             n_start, n_stop, n_rx, n_tx, n_ack, n_nack, n_idle_react, n_arb);
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
