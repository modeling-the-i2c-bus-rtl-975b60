// i2c_symbol_merge: resolves what a bus of devices working at the symbol
// level sees in one step, without going through the wires.
//
// Every master offers the symbol it generates (IDLE, START, STOP or a bit)
// and every slave says whether it releases SDA. The result follows the
// wired-AND of the lines:
//   * a 0 bit from any master, or a 1 bit while a slave pulls SDA low,
//     is seen as a 0 bit;
//   * a 1 bit together with another master's STOP or START is a race (the
//     "undefined condition"): the bus may show either the bit or the
//     condition, and different devices may see different ones. `race` is
//     set, `sym` is the bit (0 with STOP, 1 with START) and `alt_sym` the
//     condition;
//   * with no master sending a bit, a slave pulling SDA low is a deadlock:
//     nothing can happen, `deadlock` is set and `sym` is IDLE;
//   * otherwise STOP wins over START, START over IDLE.
// `sym` is the outcome a deterministic simulation takes. Purely
// combinational; the resolution table is the protocol model's symbol-level
// step, the flag outputs and the default sizes are this design's own.
module i2c_symbol_merge
  import i2c_pkg::*;
#(
  parameter int N_MASTERS = 2,
  parameter int N_SLAVES  = 1
) (
  input  sym_t                master_syms [N_MASTERS],
  input  logic [N_SLAVES-1:0] slave_release,
  output sym_t                sym,
  output sym_t                alt_sym,
  output logic                race,
  output logic                deadlock
);

  logic any_zero, any_one, any_start, any_stop, slaves_release;

  always_comb begin
    any_zero  = 1'b0;
    any_one   = 1'b0;
    any_start = 1'b0;
    any_stop  = 1'b0;
    for (int i = 0; i < N_MASTERS; i++) begin
      if (master_syms[i] == mk_bit(1'b0)) any_zero  = 1'b1;
      if (master_syms[i] == mk_bit(1'b1)) any_one   = 1'b1;
      if (master_syms[i].kind == SYM_START) any_start = 1'b1;
      if (master_syms[i].kind == SYM_STOP)  any_stop  = 1'b1;
    end
    slaves_release = &slave_release;

    sym      = mk_sym(SYM_IDLE);
    alt_sym  = mk_sym(SYM_IDLE);
    race     = 1'b0;
    deadlock = 1'b0;
    if (any_zero) begin
      sym = mk_bit(1'b0);
    end else if (any_one) begin
      if (!slaves_release) begin
        sym = mk_bit(1'b0);
      end else if (any_stop) begin
        sym = mk_bit(1'b0); alt_sym = mk_sym(SYM_STOP); race = 1'b1;
      end else if (any_start) begin
        sym = mk_bit(1'b1); alt_sym = mk_sym(SYM_START); race = 1'b1;
      end else begin
        sym = mk_bit(1'b1);
      end
    end else if (!slaves_release) begin
      deadlock = 1'b1;
    end else if (any_stop) begin
      sym = mk_sym(SYM_STOP);
    end else if (any_start) begin
      sym = mk_sym(SYM_START);
    end
  end

endmodule
