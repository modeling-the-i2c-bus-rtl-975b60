// i2c_bslave: slave byte layer (byte events <-> symbols).
//
// Called by the symbol layer with every parsed symbol, it returns in the
// same cycle whether SDA stays released (`release_sda`). It calls the layer
// above (`ev_valid`, `ev`) on START, STOP, every received byte and every
// transmitted byte the master acknowledged, and takes its reaction (`react`)
// in the same cycle:
//   IDLE        ignore the bus until the next START or STOP; a received
//               byte is not acknowledged
//   RECEIVE     acknowledge (for a received byte) and receive a byte
//   TRANSMIT b  acknowledge (for a received byte) and send b, MSB first
// While transmitting, a 0 seen where a 1 was sent is an arbitration loss:
// the layer stops driving and ignores the bus until the next START/STOP,
// without telling the layer above. A NACK from the master after a
// transmitted byte ends the transfer the same way. The behaviour follows
// the protocol model's byte-level slave, including its corrected handling
// of an IDLE reaction to a received byte (the layer above keeps the state
// it moved to).
module i2c_bslave
  import i2c_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sym_valid,
  input  sym_t    sym,
  output logic    release_sda,
  output logic    ev_valid,
  output bev_t    ev,
  input  breact_t react
);

  typedef enum logic [2:0] {
    SS_IDLE, SS_RECEIVE, SS_RECEIVE_ACK, SS_TRANSMIT, SS_TRANSMIT_ACK
  } ss_state_t;

  ss_state_t  st_q, st_d;
  logic [2:0] cnt_q, cnt_d;
  logic [7:0] byte_q, byte_d;
  breact_t    pend_q, pend_d;  // reaction to apply after the ack bit

  typedef struct packed {
    ss_state_t  st;
    logic [2:0] cnt;
    logic [7:0] byte_v;
    logic       rel;
  } react_next_t;

  // State entered for a reaction, and the SDA decision for the next bit.
  function automatic react_next_t reaction_next(input breact_t r);
    react_next_t n;
    n = '{st: SS_IDLE, cnt: 3'd0, byte_v: 8'h00, rel: 1'b1};
    unique case (r.kind)
      BREACT_TRANSMIT: begin
        n.st = SS_TRANSMIT; n.byte_v = r.data; n.rel = r.data[7];
      end
      BREACT_RECEIVE: n.st = SS_RECEIVE;
      default: ;
    endcase
    return n;
  endfunction

  // Upward call: START, STOP, a completed received byte, or the master's
  // ACK after a transmitted byte. Kept apart from the reaction below so
  // that the event never depends on the reaction it produces.
  always_comb begin
    ev_valid = 1'b0;
    ev       = '{kind: BEV_START, data: 8'h00};
    if (sym_valid) begin
      unique case (sym.kind)
        SYM_START: ev_valid = 1'b1;
        SYM_STOP: begin
          ev_valid = 1'b1; ev.kind = BEV_STOP;
        end
        SYM_BIT:
          if (st_q == SS_RECEIVE && cnt_q == 3'd7) begin
            ev_valid = 1'b1;
            ev       = '{kind: BEV_RECEIVE, data: {byte_q[6:0], sym.bit_val}};
          end else if (st_q == SS_TRANSMIT_ACK && !sym.bit_val) begin
            ev_valid = 1'b1; ev.kind = BEV_ACK;
          end
        default: ;
      endcase
    end
  end

  // Next state and SDA decision.
  always_comb begin
    st_d        = st_q;
    cnt_d       = cnt_q;
    byte_d      = byte_q;
    pend_d      = pend_q;
    release_sda = 1'b1;
    if (ev_valid && ev.kind == BEV_RECEIVE) begin
      if (react.kind == BREACT_IDLE) begin
        st_d = SS_IDLE;                // no ACK
      end else begin
        st_d        = SS_RECEIVE_ACK;
        pend_d      = react;
        release_sda = 1'b0;            // ACK
      end
    end else if (ev_valid) begin
      {st_d, cnt_d, byte_d, release_sda} = reaction_next(react);
    end else if (sym_valid && sym.kind == SYM_IDLE) begin
      st_d = SS_IDLE;
    end else if (sym_valid) begin    // a bit
      unique case (st_q)
        SS_RECEIVE: begin
          cnt_d  = cnt_q + 3'd1;
          byte_d = {byte_q[6:0], sym.bit_val};
        end
        SS_RECEIVE_ACK: {st_d, cnt_d, byte_d, release_sda} = reaction_next(pend_q);
        SS_TRANSMIT:
          if (byte_q[3'd7 - cnt_q] && !sym.bit_val) begin
            st_d = SS_IDLE;                // arbitration lost
          end else if (cnt_q == 3'd7) begin
            st_d = SS_TRANSMIT_ACK;
          end else begin
            cnt_d       = cnt_q + 3'd1;
            release_sda = byte_q[3'd6 - cnt_q];
          end
        default: st_d = SS_IDLE;   // bit while idle, or the master's NACK
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= SS_IDLE;
      cnt_q  <= '0;
      byte_q <= '0;
      pend_q <= '{kind: BREACT_IDLE, data: 8'h00};
    end else begin
      st_q   <= st_d;
      cnt_q  <= cnt_d;
      byte_q <= byte_d;
      pend_q <= pend_d;
    end
  end

endmodule
