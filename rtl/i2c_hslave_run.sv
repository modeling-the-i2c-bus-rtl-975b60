// i2c_hslave_run: applies a whole transaction directly to a high-level
// slave, with no bus and no byte or symbol layers in between.
//
// It takes the same transaction descriptors as i2c_hmaster and produces the
// same kind of reply, but turns each message straight into the slave's
// calls, one call per clock:
//   * *address*(addr, is_read); a refusal gives the message a NACK reply;
//   * for a write, *write* for each byte until one is refused; the reply
//     counts the accepted bytes;
//   * for a read, *read* for each byte; the size is `len`, plus the value
//     of the first byte when `variable` is set;
//   * after the last message, or after a refused message that is not
//     `non_critical` (the remaining messages then get NACK replies), one
//     *stop*.
// The status is always TR_SUCCESS: without a bus nothing can be lost.
//
// This is the protocol model's reference for what a slave must see and
// what the reply must be when the same transaction goes over the full
// stack: the wire-level path must be indistinguishable from it. One detail
// differs in form only: the model looks at the first byte of a variable
// read without keeping the slave's state change and then reads all bytes,
// while this block reads the first byte once and counts it. For a slave
// whose read depends only on its state, as the model requires, the calls
// and the reply are the same.
//
// Interface and timing: the host handshake is that of i2c_hmaster
// (`txn_valid`/`txn_ready`, descriptors held until `reply_valid`), and the
// slave port is that of i2c_hslave_adapter (`hs_req`, answered
// combinationally by `hs_rsp` in the same cycle). A transaction takes one
// clock to accept and one per call; `reply_valid` pulses on the clock after
// the *stop* call. Read bytes beyond MAX_BYTES are counted but not stored. The
// fixed table sizes and the one-call-per-clock pacing are this design's.
//
// Lint note: verilator reports rst_n as used both asynchronously and
// synchronously (SYNCASYNCNET). The synchronous use is only the
// `disable iff (!rst_n)` of the assertion below; the flops all reset
// asynchronously.
module i2c_hslave_run
  import i2c_pkg::*;
#(
  parameter int MAX_MSGS  = 4,
  parameter int MAX_BYTES = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  // transaction request
  input  logic       txn_valid,
  output logic       txn_ready,
  input  logic [$clog2(MAX_MSGS+1)-1:0] n_msgs,
  input  msg_t       msgs    [MAX_MSGS],
  input  logic [7:0] wr_data [MAX_MSGS][MAX_BYTES],
  // transaction reply
  output logic       reply_valid,
  output tr_status_t reply_status,
  output msg_reply_t replies [MAX_MSGS],
  output logic [7:0] rd_data [MAX_MSGS][MAX_BYTES],
  output logic       active,
  // high-level slave calls
  output hs_req_t    hs_req,
  input  hs_rsp_t    hs_rsp
);

  localparam int MI = (MAX_MSGS > 1) ? $clog2(MAX_MSGS) : 1;

  typedef enum logic [2:0] {
    R_IDLE, R_ADDR, R_WRITE, R_READ, R_STOP
  } run_state_t;

  run_state_t  state_q, state_d;
  logic [MI-1:0] msg_q, msg_d;      // current message
  logic [8:0]  cnt_q, cnt_d;        // bytes done in this message
  logic [8:0]  size_q, size_d;      // read size (grows with `variable`)

  msg_t        m;
  logic        last_msg;
  logic        wr_reply;            // write a reply entry this clock
  msg_reply_t  reply_val;
  logic        store_rd;
  logic [8:0]  size_now;            // read size once the first byte is known

  assign m        = msgs[msg_q];
  assign last_msg = (32'(msg_q) + 1 >= 32'(n_msgs));
  assign size_now = (cnt_q == '0 && m.variable) ? size_q + 9'(hs_rsp.rdata) : size_q;

  // The call for the current state.
  always_comb begin
    hs_req         = '0;
    hs_req.addr    = m.addr;
    hs_req.is_read = m.is_read;
    hs_req.wdata   = (cnt_q < 9'(MAX_BYTES)) ? wr_data[msg_q][cnt_q[$clog2(MAX_BYTES)-1:0]]
                                              : 8'h00;
    unique case (state_q)
      R_ADDR:  hs_req.addr_call  = 1'b1;
      R_WRITE: hs_req.write_call = 1'b1;
      R_READ:  hs_req.read_call  = 1'b1;
      R_STOP:  hs_req.stop_call  = 1'b1;
      default: ;
    endcase
  end

  // Next message, or stop: `ok` is whether this message succeeded.
  function automatic run_state_t after_msg(input logic ok);
    return ((ok || m.non_critical) && !last_msg) ? R_ADDR : R_STOP;
  endfunction

  always_comb begin
    state_d   = state_q;
    msg_d     = msg_q;
    cnt_d     = cnt_q;
    size_d    = size_q;
    wr_reply  = 1'b0;
    reply_val = '0;
    store_rd  = 1'b0;
    txn_ready = 1'b0;
    unique case (state_q)
      R_IDLE: if (txn_valid) begin
        txn_ready = 1'b1;
        msg_d     = '0;
        state_d   = R_ADDR;
      end
      R_ADDR: begin
        cnt_d  = '0;
        size_d = {1'b0, m.len};
        if (!hs_rsp.addr_ack) begin
          wr_reply = 1'b1;                  // NACK reply, already cleared
          state_d  = after_msg(1'b0);
          msg_d    = msg_q + 1'b1;
        end else begin
          wr_reply  = 1'b1;
          reply_val = '{acked: 1'b1, count: '0};
          if (m.is_read)         state_d = R_READ;
          else if (m.len == '0) begin
            state_d = after_msg(1'b1);
            msg_d   = msg_q + 1'b1;
          end else               state_d = R_WRITE;
        end
      end
      R_WRITE: begin
        wr_reply  = 1'b1;
        reply_val = '{acked: 1'b1, count: cnt_q + 9'(hs_rsp.write_ack)};
        cnt_d     = cnt_q + 1'b1;
        if (!hs_rsp.write_ack || cnt_q + 1'b1 == 9'(m.len)) begin
          state_d = after_msg(hs_rsp.write_ack);
          msg_d   = msg_q + 1'b1;
        end
      end
      R_READ: begin
        size_d    = size_now;
        store_rd  = (cnt_q < 9'(MAX_BYTES));
        wr_reply  = 1'b1;
        reply_val = '{acked: 1'b1, count: cnt_q + 1'b1};
        cnt_d     = cnt_q + 1'b1;
        if (cnt_q + 1'b1 >= size_now) begin
          state_d = after_msg(1'b1);
          msg_d   = msg_q + 1'b1;
        end
      end
      R_STOP: state_d = R_IDLE;
      default: state_d = R_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= R_IDLE;
      msg_q   <= '0;
      cnt_q   <= '0;
      size_q  <= '0;
    end else begin
      state_q <= state_d;
      msg_q   <= msg_d;
      cnt_q   <= cnt_d;
      size_q  <= size_d;
    end
  end

  // Reply tables: cleared when a transaction is taken, so messages that are
  // never reached keep a NACK reply.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_MSGS; i++) replies[i] <= '0;
    end else if (txn_ready) begin
      for (int i = 0; i < MAX_MSGS; i++) replies[i] <= '0;
    end else if (wr_reply) begin
      replies[msg_q] <= reply_val;
    end
  end

  always_ff @(posedge clk) begin
    if (store_rd) rd_data[msg_q][cnt_q[$clog2(MAX_BYTES)-1:0]] <= hs_rsp.rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reply_valid <= 1'b0;
    else        reply_valid <= (state_q == R_STOP);
  end

  assign reply_status = TR_SUCCESS;
  assign active       = (state_q != R_IDLE);

  // Same rules as the wire-level master: 1..MAX_MSGS messages, reads of at
  // least one byte, writes that fit the table.
  function automatic logic msgs_ok();
    logic ok;
    ok = (n_msgs != '0) && (32'(n_msgs) <= MAX_MSGS);
    for (int i = 0; i < MAX_MSGS; i++)
      if (32'(i) < 32'(n_msgs)) begin
        if (msgs[i].is_read && msgs[i].len == '0) ok = 1'b0;
        if (!msgs[i].is_read && 32'(msgs[i].len) > MAX_BYTES) ok = 1'b0;
      end
    return ok;
  endfunction

  assert property (@(posedge clk) disable iff (!rst_n) txn_ready |-> msgs_ok())
    else $error("i2c_hslave_run: transaction outside the supported sizes");

endmodule
