// tb_i2c_symbol_merge: tries every combination of symbols from three
// masters (IDLE, START, STOP, 0, 1) and SDA decisions from two slaves, and
// compares the merged symbol, the alternative symbol, and the race and
// deadlock flags with an expectation derived from the wire levels each
// symbol produces.
`timescale 1ns/1ps
module tb_i2c_symbol_merge;
  import i2c_pkg::*;

  localparam int NM = 3;
  localparam int NS = 2;

  sym_t          master_syms [NM];
  logic [NS-1:0] slave_release;
  sym_t          sym, alt_sym;
  logic          race, deadlock;

  i2c_symbol_merge #(.N_MASTERS(NM), .N_SLAVES(NS)) dut (
    .master_syms, .slave_release, .sym, .alt_sym, .race, .deadlock);

  int checks = 0, failures = 0;
  int n_race = 0, n_dead = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic sym_t code(input int c);
    case (c)
      0: return mk_sym(SYM_IDLE);
      1: return mk_sym(SYM_START);
      2: return mk_sym(SYM_STOP);
      3: return mk_bit(1'b0);
      default: return mk_bit(1'b1);
    endcase
  endfunction

  initial begin
    for (int c = 0; c < 5 ** NM; c++)
      for (int s = 0; s < 2 ** NS; s++) begin
        int   v, n_bit0, n_bit1, n_start, n_stop;
        bit   sda_low_by_slave;
        sym_t e_sym, e_alt;
        bit   e_race, e_dead;
        v = c;
        n_bit0 = 0; n_bit1 = 0; n_start = 0; n_stop = 0;
        for (int i = 0; i < NM; i++) begin
          master_syms[i] = code(v % 5);
          case (v % 5)
            1: n_start++;
            2: n_stop++;
            3: n_bit0++;
            4: n_bit1++;
            default: ;
          endcase
          v = v / 5;
        end
        slave_release    = NS'(s);
        sda_low_by_slave = (s != 2 ** NS - 1);
        e_alt  = mk_sym(SYM_IDLE);
        e_race = 0;
        e_dead = 0;
        // During a bit SDA is the AND of every driver; a master sending a
        // 0 or a slave pulling low wins.
        if (n_bit0 > 0 || (n_bit1 > 0 && sda_low_by_slave)) e_sym = mk_bit(1'b0);
        else if (n_bit1 > 0 && n_stop > 0) begin
          e_sym = mk_bit(1'b0); e_alt = mk_sym(SYM_STOP); e_race = 1;
        end else if (n_bit1 > 0 && n_start > 0) begin
          e_sym = mk_bit(1'b1); e_alt = mk_sym(SYM_START); e_race = 1;
        end else if (n_bit1 > 0) e_sym = mk_bit(1'b1);
        else if (sda_low_by_slave) begin e_sym = mk_sym(SYM_IDLE); e_dead = 1; end
        else if (n_stop > 0)  e_sym = mk_sym(SYM_STOP);
        else if (n_start > 0) e_sym = mk_sym(SYM_START);
        else e_sym = mk_sym(SYM_IDLE);
        #1;
        check(sym == e_sym && alt_sym == e_alt && race == e_race && deadlock == e_dead,
              $sformatf("combination %0d/%0d: sym %p alt %p race %b dead %b", c, s,
                        sym, alt_sym, race, deadlock));
        if (e_race) n_race++;
        if (e_dead) n_dead++;
      end
    check(n_race > 0 && n_dead > 0, "races and deadlocks covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
