// i2c_bmaster: master byte layer (byte actions <-> symbols).
//
// Called by the symbol layer with every parsed symbol (`sym_valid`, `sym`),
// it returns the next symbol to generate (`next_sym`) in the same cycle.
// Whenever an action has finished it calls the layer above with the result
// (`res_valid`, `res`) and takes the next action (`act`) in the same cycle.
//
//   action      symbols generated         results
//   START       START                     OK, UNDEF
//   STOP        STOP                      OK, UNDEF
//   WRITE b     8 data bits, 1 (ack slot) OK, NACK, ARB_LOST, UNDEF
//   READ        8 x 1 bits, ack bit       READ b, UNDEF
//   IDLE        nothing                   OK on the next symbol
//
// Arbitration loss is a 1 sent and a 0 seen; any other unexpected symbol is
// an undefined condition. After a loss the layer waits for STOP (bus busy)
// before calling up again; a START seen while idle also marks the bus busy.
// After a READ the acknowledge bit depends on the next action, so the next
// action is asked for before the ack bit is sent: ACK (0) if it is another
// READ, NACK (1) otherwise. The behaviour follows the protocol model's
// byte-level master; the valid-flag call convention is this design's own.
module i2c_bmaster
  import i2c_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // from/to the symbol layer
  input  logic  sym_valid,
  input  sym_t  sym,
  output sym_t  next_sym,
  // to/from the high-level layer
  output logic  res_valid,
  output bres_t res,
  input  bact_t act
);

  typedef enum logic [2:0] {
    SM_IDLE, SM_BUSY, SM_START, SM_STOP,
    SM_WRITE, SM_WRITE_ACK, SM_READ, SM_READ_ACK
  } sm_state_t;

  sm_state_t  st_q, st_d;
  logic [2:0] cnt_q, cnt_d;
  logic [7:0] byte_q, byte_d;
  bact_t      pend_q, pend_d;   // action chosen during a read's ack slot

  wire is_bit = (sym.kind == SYM_BIT);

  typedef struct packed {
    sm_state_t  st;
    logic [2:0] cnt;
    logic [7:0] byte_v;
    sym_t       sym;
  } act_next_t;

  // State entered for an action, and its first symbol.
  function automatic act_next_t action_next(input bact_t a);
    act_next_t n;
    n = '{st: SM_IDLE, cnt: 3'd0, byte_v: 8'h00, sym: mk_sym(SYM_IDLE)};
    unique case (a.kind)
      BACT_IDLE:  ;
      BACT_START: begin n.st = SM_START; n.sym = mk_sym(SYM_START); end
      BACT_STOP:  begin n.st = SM_STOP;  n.sym = mk_sym(SYM_STOP);  end
      BACT_WRITE: begin
        n.st = SM_WRITE; n.byte_v = a.data; n.sym = mk_bit(a.data[7]);
      end
      default: begin // BACT_READ
        n.st = SM_READ; n.sym = mk_bit(1'b1);
      end
    endcase
    return n;
  endfunction

  // Upward call: which symbols finish an action, and with what result.
  // Kept apart from the reaction below so that the result never depends on
  // the action it produces.
  always_comb begin
    res_valid = 1'b0;
    res       = '{kind: BRES_OK, data: 8'h00};
    if (sym_valid) begin
      unique case (st_q)
        SM_IDLE:  res_valid = (sym.kind != SYM_START);
        SM_BUSY:  res_valid = (sym.kind == SYM_STOP);
        SM_START: begin
          res_valid = 1'b1;
          if (sym.kind != SYM_START) res.kind = BRES_UNDEF;
        end
        SM_STOP: begin
          res_valid = 1'b1;
          if (sym.kind != SYM_STOP) res.kind = BRES_UNDEF;
        end
        SM_WRITE: begin
          if (!is_bit) begin
            res_valid = 1'b1; res.kind = BRES_UNDEF;
          end else if (byte_q[3'd7 - cnt_q] && !sym.bit_val) begin
            res_valid = 1'b1; res.kind = BRES_ARB_LOST;
          end
        end
        SM_WRITE_ACK: begin
          res_valid = 1'b1;
          if (!is_bit)          res.kind = BRES_UNDEF;
          else if (sym.bit_val) res.kind = BRES_NACK;
        end
        SM_READ: begin
          if (!is_bit) begin
            res_valid = 1'b1; res.kind = BRES_UNDEF;
          end else if (cnt_q == 3'd7) begin
            res_valid = 1'b1;
            res       = '{kind: BRES_READ, data: {byte_q[6:0], sym.bit_val}};
          end
        end
        default: begin // SM_READ_ACK
          if (!is_bit) begin
            res_valid = 1'b1; res.kind = BRES_UNDEF;
          end else if (pend_q.kind != BACT_READ && !sym.bit_val) begin
            res_valid = 1'b1; res.kind = BRES_ARB_LOST;
          end
        end
      endcase
    end
  end

  // Next state and next symbol.
  always_comb begin
    st_d     = st_q;
    cnt_d    = cnt_q;
    byte_d   = byte_q;
    pend_d   = pend_q;
    next_sym = mk_sym(SYM_IDLE);
    if (res_valid) begin
      unique case (res.kind)
        BRES_ARB_LOST: begin
          st_d = SM_BUSY; next_sym = mk_sym(SYM_IDLE);
        end
        BRES_READ: begin
          // Byte complete: the next action decides the acknowledge bit.
          pend_d   = act;
          st_d     = SM_READ_ACK;
          next_sym = mk_bit(act.kind != BACT_READ);
        end
        default: {st_d, cnt_d, byte_d, next_sym} = action_next(act);
      endcase
    end else if (sym_valid) begin
      unique case (st_q)
        SM_WRITE:
          if (cnt_q == 3'd7) begin
            st_d = SM_WRITE_ACK; next_sym = mk_bit(1'b1);
          end else begin
            cnt_d    = cnt_q + 3'd1;
            next_sym = mk_bit(byte_q[3'd6 - cnt_q]);
          end
        SM_READ: begin
          cnt_d    = cnt_q + 3'd1;
          byte_d   = {byte_q[6:0], sym.bit_val};
          next_sym = mk_bit(1'b1);
        end
        SM_READ_ACK: {st_d, cnt_d, byte_d, next_sym} = action_next(pend_q);
        default: begin // SM_IDLE seeing START, SM_BUSY: bus busy
          st_d = SM_BUSY; next_sym = mk_sym(SYM_IDLE);
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= SM_IDLE;
      cnt_q  <= '0;
      byte_q <= '0;
      pend_q <= '{kind: BACT_IDLE, data: 8'h00};
    end else begin
      st_q   <= st_d;
      cnt_q  <= cnt_d;
      byte_q <= byte_d;
      pend_q <= pend_d;
    end
  end

endmodule
