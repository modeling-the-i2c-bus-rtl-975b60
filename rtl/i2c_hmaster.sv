// i2c_hmaster: high-level master layer (transactions <-> byte actions).
//
// A transaction is a list of up to MAX_MSGS messages, each a read or a write
// to a 7-bit address. Every message starts with START and its address byte;
// the transaction ends with one STOP. Each message gets a reply: whether its
// address was acknowledged and a byte count (bytes read, or written bytes the
// slave acknowledged). Rules carried over from the protocol model:
//   * a read of size N reads N bytes, ACKing all but the last; with
//     `variable` set the first byte read is added to N (SMBus block read);
//   * a NACK of an address or written byte aborts the transaction (STOP,
//     remaining messages replied as not acknowledged) unless the message
//     is `non_critical`;
//   * an arbitration loss or undefined condition reported by the byte layer
//     ends the transaction with that status and no message replies;
//   * retries are left to the user.
//
// Interface. Host side: the transaction is offered with `txn_valid`,
// `n_msgs`, `msgs` and `wr_data` and must stay stable until `reply_valid`;
// `txn_ready` pulses when it is taken. `reply_valid` pulses with
// `reply_status`; `replies` and `rd_data` then hold the results until the
// next transaction is taken. A new transaction is only taken while the bus
// is free. Byte-layer side: called with `res_valid`/`res`, answers `act` in
// the same cycle.
//
// This design's own choices: fixed-size message and data tables (MAX_MSGS,
// MAX_BYTES; read bytes beyond MAX_BYTES are counted but not stored), and
// one idle byte-layer step between the reply and the next transaction. A
// read of size 0, which the model rejects, is flagged by an assertion and
// would read one byte.
//
// Lint note: verilator reports rst_n as used both asynchronously and
// synchronously (SYNCASYNCNET). The synchronous use is only the
// `disable iff (!rst_n)` of the assertions below; the flops all reset
// asynchronously.
module i2c_hmaster
  import i2c_pkg::*;
#(
  parameter int MAX_MSGS  = 4,
  parameter int MAX_BYTES = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  // byte layer
  input  logic       res_valid,
  input  bres_t      res,
  output bact_t      act,
  // host: transaction request
  input  logic       txn_valid,
  output logic       txn_ready,
  input  logic [$clog2(MAX_MSGS+1)-1:0] n_msgs,
  input  msg_t       msgs    [MAX_MSGS],
  input  logic [7:0] wr_data [MAX_MSGS][MAX_BYTES],
  // host: transaction reply
  output logic       reply_valid,
  output tr_status_t reply_status,
  output msg_reply_t replies [MAX_MSGS],
  output logic [7:0] rd_data [MAX_MSGS][MAX_BYTES],
  output logic       active
);

  localparam int MI_BITS = $clog2(MAX_MSGS + 1);
  localparam int BI_BITS = $clog2(MAX_BYTES);

  typedef enum logic [1:0] { TR_START, TR_ADDR, TR_READ, TR_WRITE } tr_state_t;

  logic               active_q, active_d;
  logic [MI_BITS-1:0] mi_q, mi_d;
  tr_state_t          tr_q, tr_d;
  logic [8:0]         bidx_q, bidx_d;    // bytes of this message done
  logic [9:0]         rlen_q, rlen_d;    // bytes still to read
  logic [8:0]         ackd_q, ackd_d;    // written bytes acknowledged

  logic       clear_replies, reply_we, rd_we;
  msg_reply_t reply_w;
  msg_t       m;
  logic [9:0] newlen;

  wire [MI_BITS-1:0] mi_next = mi_q + 1'b1;
  wire last_msg = (mi_next == n_msgs);

  always_comb begin
    active_d      = active_q;
    mi_d          = mi_q;
    tr_d          = tr_q;
    bidx_d        = bidx_q;
    rlen_d        = rlen_q;
    ackd_d        = ackd_q;
    act           = '{kind: BACT_IDLE, data: 8'h00};
    txn_ready     = 1'b0;
    reply_valid   = 1'b0;
    reply_status  = TR_SUCCESS;
    clear_replies = 1'b0;
    reply_we      = 1'b0;
    reply_w       = '0;
    rd_we         = 1'b0;
    newlen        = '0;
    m             = msgs[mi_q[$clog2(MAX_MSGS)-1:0]];

    if (res_valid) begin
      if (res.kind == BRES_ARB_LOST || res.kind == BRES_UNDEF) begin
        if (active_q) begin
          reply_valid  = 1'b1;
          reply_status = (res.kind == BRES_ARB_LOST) ? TR_ARB_LOST : TR_UNDEFINED;
          active_d     = 1'b0;
        end
      end else if (!active_q) begin
        if (txn_valid) begin
          txn_ready     = 1'b1;
          clear_replies = 1'b1;
          active_d      = 1'b1;
          mi_d          = '0;
          tr_d          = TR_START;
          act           = '{kind: BACT_START, data: 8'h00};
        end
      end else if (mi_q == n_msgs) begin
        reply_valid = 1'b1;                 // STOP done: transaction over
        active_d    = 1'b0;
      end else begin
        unique case (tr_q)
          TR_START: begin
            act  = '{kind: BACT_WRITE, data: {m.addr, m.is_read}};
            tr_d = TR_ADDR;
          end
          TR_ADDR:
            if (res.kind == BRES_NACK) begin
              reply_we = 1'b1;
              reply_w  = '{acked: 1'b0, count: 9'd0};
            end else if (m.is_read) begin
              rlen_d = (m.len == 8'd0) ? 10'd1 : {2'b00, m.len};
              bidx_d = '0;
              tr_d   = TR_READ;
              act    = '{kind: BACT_READ, data: 8'h00};
            end else if (m.len == 8'd0) begin
              reply_we = 1'b1;
              reply_w  = '{acked: 1'b1, count: 9'd0};
            end else begin
              bidx_d = 9'd1;
              ackd_d = '0;
              tr_d   = TR_WRITE;
              act    = '{kind: BACT_WRITE,
                         data: wr_data[mi_q[$clog2(MAX_MSGS)-1:0]][0]};
            end
          TR_READ: begin
            rd_we  = 1'b1;
            newlen = rlen_q - 10'd1
                   + ((bidx_q == 9'd0 && m.variable) ? {2'b00, res.data} : 10'd0);
            if (newlen == 10'd0) begin
              reply_we = 1'b1;
              reply_w  = '{acked: 1'b1, count: bidx_q + 9'd1};
            end else begin
              rlen_d = newlen;
              bidx_d = bidx_q + 9'd1;
              act    = '{kind: BACT_READ, data: 8'h00};
            end
          end
          default: // TR_WRITE
            if (res.kind == BRES_NACK) begin
              reply_we = 1'b1;
              reply_w  = '{acked: 1'b1, count: ackd_q};
            end else if (bidx_q == {1'b0, m.len}) begin
              reply_we = 1'b1;
              reply_w  = '{acked: 1'b1, count: ackd_q + 9'd1};
            end else begin
              ackd_d = ackd_q + 9'd1;
              bidx_d = bidx_q + 9'd1;
              act    = '{kind: BACT_WRITE,
                         data: wr_data[mi_q[$clog2(MAX_MSGS)-1:0]][bidx_q[BI_BITS-1:0]]};
            end
        endcase
        // Message finished: go on, or abort after a critical NACK.
        if (reply_we) begin
          tr_d = TR_START;
          if ((reply_w.acked && (m.is_read || reply_w.count == {1'b0, m.len}))
              || m.non_critical) begin
            mi_d = mi_next;
            act  = '{kind: last_msg ? BACT_STOP : BACT_START, data: 8'h00};
          end else begin
            mi_d = n_msgs;
            act  = '{kind: BACT_STOP, data: 8'h00};
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      mi_q     <= '0;
      tr_q     <= TR_START;
      bidx_q   <= '0;
      rlen_q   <= '0;
      ackd_q   <= '0;
      for (int i = 0; i < MAX_MSGS; i++) replies[i] <= '0;
    end else begin
      active_q <= active_d;
      mi_q     <= mi_d;
      tr_q     <= tr_d;
      bidx_q   <= bidx_d;
      rlen_q   <= rlen_d;
      ackd_q   <= ackd_d;
      if (clear_replies)
        for (int i = 0; i < MAX_MSGS; i++) replies[i] <= '0;
      else if (reply_we)
        replies[mi_q[$clog2(MAX_MSGS)-1:0]] <= reply_w;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_we && bidx_q < 9'(MAX_BYTES))
      rd_data[mi_q[$clog2(MAX_MSGS)-1:0]][bidx_q[BI_BITS-1:0]] <= res.data;
  end

  assign active = active_q;

  // Transaction rules the model checks at run time: at least one message,
  // reads of at least one byte, and (this design's limit) writes that fit
  // the data table.
  function automatic logic msgs_ok();
    logic ok;
    ok = (n_msgs != '0) && (n_msgs <= MI_BITS'(MAX_MSGS));
    for (int i = 0; i < MAX_MSGS; i++)
      if (i < int'(n_msgs))
        ok &= msgs[i].is_read ? (msgs[i].len != 8'd0)
                              : (msgs[i].len <= 8'(MAX_BYTES));
    return ok;
  endfunction

  assert property (@(posedge clk) disable iff (!rst_n) txn_ready |-> msgs_ok())
    else $error("i2c_hmaster: transaction breaks the message rules");

endmodule
