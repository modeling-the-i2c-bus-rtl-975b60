// i2c_symbol_reader: turns the sampled SCL/SDA pair into bus symbols.
//
// Shared by the master and the slave symbol layers. It compares each
// sample with the previous one:
//   SCL high, SDA 1 -> 0            START (receiver becomes inactive)
//   SCL high, SDA 0 -> 1            STOP  (receiver becomes inactive)
//   SCL 1 -> 0                      the previous SDA value is a bit, reported
//                                   only when the receiver is already active;
//                                   the first clock-down after START/STOP
//                                   only makes it active
//   both lines high while inactive  IDLE (bus free)
// Anything else reports nothing. This is the two-state machine of the
// protocol model (inactive/active); its transitions follow that model.
//
// Interface: on a cycle with `step` high, `bus` is the current sample and
// `sym_valid`/`sym` give the symbol found (combinational); the state is
// updated at the end of that cycle. Outside steps `sym_valid` is low.
// Reset (this design's choice): inactive, previous sample = both lines high.
module i2c_symbol_reader
  import i2c_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  input  bus_t bus,
  output logic sym_valid,
  output sym_t sym
);

  logic rcv_active_q, rcv_active_d;
  bus_t prev_q;

  always_comb begin
    sym_valid    = 1'b0;
    sym          = mk_sym(SYM_IDLE);
    rcv_active_d = rcv_active_q;
    if (prev_q == BUS_IDLE && bus == BUS_LOWDA) begin
      sym_valid    = 1'b1;
      sym          = mk_sym(SYM_START);
      rcv_active_d = 1'b0;
    end else if (prev_q == BUS_LOWDA && bus == BUS_IDLE) begin
      sym_valid    = 1'b1;
      sym          = mk_sym(SYM_STOP);
      rcv_active_d = 1'b0;
    end else if (prev_q.scl && !bus.scl) begin
      sym_valid    = rcv_active_q;
      sym          = mk_bit(prev_q.sda);
      rcv_active_d = 1'b1;
    end else if (bus == BUS_IDLE && !rcv_active_q) begin
      sym_valid    = 1'b1;
      sym          = mk_sym(SYM_IDLE);
    end
    if (!step) sym_valid = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcv_active_q <= 1'b0;
      prev_q       <= BUS_IDLE;
    end else if (step) begin
      rcv_active_q <= rcv_active_d;
      prev_q       <= bus;
    end
  end

endmodule
