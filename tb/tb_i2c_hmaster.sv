// tb_i2c_hmaster: plays the byte layer and the host around the high-level
// master. For each random transaction (1 to 4 messages, reads and writes,
// variable-length reads, critical and non-critical messages) it draws what
// the slave will do (address acknowledged or not, a written byte refused,
// the bytes read), works out from that the exact sequence of byte actions
// the master must ask for and the replies it must report, and then checks
// every action, the reply status, every message reply and every byte read.
// Some transactions are cut short by an arbitration loss or an undefined
// condition, which must end them at once with that status.
`timescale 1ns/1ps
module tb_i2c_hmaster;
  import i2c_pkg::*;

  localparam int MAX_MSGS  = 4;
  localparam int MAX_BYTES = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       res_valid = 1'b0;
  bres_t      res = '0;
  bact_t      act;
  logic       txn_valid = 1'b0, txn_ready;
  logic [2:0] n_msgs = 3'd1;
  msg_t       msgs    [MAX_MSGS];
  logic [7:0] wr_data [MAX_MSGS][MAX_BYTES];
  logic       reply_valid, active;
  tr_status_t reply_status;
  msg_reply_t replies [MAX_MSGS];
  logic [7:0] rd_data [MAX_MSGS][MAX_BYTES];

  i2c_hmaster #(.MAX_MSGS(MAX_MSGS), .MAX_BYTES(MAX_BYTES)) dut (
    .clk, .rst_n, .res_valid, .res, .act, .txn_valid, .txn_ready, .n_msgs,
    .msgs, .wr_data, .reply_valid, .reply_status, .replies, .rd_data, .active);

  int checks = 0, failures = 0;
  int n_txn = 0, n_nack_abort = 0, n_nack_cont = 0, n_wnack = 0, n_var = 0;
  int n_arb = 0, n_undef = 0, n_long = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // One call from the byte layer.
  bact_t got_act;
  bit    got_ready, got_reply;
  tr_status_t got_status;
  task automatic call(input bres_kind_t k, input logic [7:0] d);
    repeat ($urandom % 3) @(negedge clk);
    res_valid = 1'b1;
    res       = '{kind: k, data: d};
    #1;
    got_act    = act;
    got_ready  = txn_ready;
    got_reply  = reply_valid;
    got_status = reply_status;
    @(negedge clk);
    res_valid = 1'b0;
    #1 check(!reply_valid && !txn_ready, "no reply or ready between calls");
  endtask

  // Expected exchange: the result to give and the action that must follow.
  typedef struct { bres_kind_t rk; logic [7:0] rd; bact_kind_t ak; logic [7:0] ad; } step_t;
  step_t      plan [$];
  msg_reply_t exp_rep [MAX_MSGS];
  logic [7:0] exp_rd  [MAX_MSGS][MAX_BYTES];

  function automatic step_t st(bres_kind_t rk, logic [7:0] rd, bact_kind_t ak, logic [7:0] ad);
    step_t s;
    s.rk = rk; s.rd = rd; s.ak = ak; s.ad = ad;
    return s;
  endfunction

  task automatic make_plan();
    plan.delete();
    foreach (exp_rep[i]) exp_rep[i] = '0;
    for (int i = 0; i < int'(n_msgs); i++) begin
      msg_t m;
      bit   ack, cont;
      int   nack_at;
      m       = msgs[i];
      ack     = ($urandom % 5 != 0);
      nack_at = ($urandom % 4 == 0) ? int'($urandom % (m.len + 1)) : -1;
      plan.push_back(st(BRES_OK, 0, BACT_WRITE, {m.addr, m.is_read}));
      if (!ack) begin
        plan.push_back(st(BRES_NACK, 0, BACT_IDLE, 0));
        exp_rep[i] = '{acked: 0, count: 0};
      end else if (m.is_read) begin
        int n;
        n = (m.len == 0) ? 1 : int'(m.len);
        plan.push_back(st(BRES_OK, 0, BACT_READ, 0));
        for (int k = 0; k < n; k++) begin
          logic [7:0] b;
          b = 8'($urandom);
          if (k == 0 && m.variable) begin b = 8'($urandom % 6); n += b; n_var++; end
          if (k < MAX_BYTES) exp_rd[i][k] = b;
          plan.push_back(st(BRES_READ, b, (k < n - 1) ? BACT_READ : BACT_IDLE, 0));
        end
        exp_rep[i] = '{acked: 1, count: 9'(n)};
      end else if (m.len == 0) begin
        plan.push_back(st(BRES_OK, 0, BACT_IDLE, 0));
        exp_rep[i] = '{acked: 1, count: 0};
      end else begin
        plan.push_back(st(BRES_OK, 0, BACT_WRITE, wr_data[i][0]));
        for (int k = 0; k < int'(m.len); k++) begin
          if (k == nack_at) begin
            plan.push_back(st(BRES_NACK, 0, BACT_IDLE, 0));
            exp_rep[i] = '{acked: 1, count: 9'(k)};
            n_wnack++;
            break;
          end
          plan.push_back(st(BRES_OK, 0, (k < m.len - 1) ? BACT_WRITE : BACT_IDLE,
                            (k < m.len - 1) ? wr_data[i][k + 1] : 8'h00));
          exp_rep[i] = '{acked: 1, count: 9'(k + 1)};
        end
      end
      // The last action of a message: next message, or STOP.
      cont = (exp_rep[i].acked && (m.is_read || exp_rep[i].count == m.len))
             || m.non_critical;
      plan[$].ak = (cont && i < int'(n_msgs) - 1) ? BACT_START : BACT_STOP;
      if (!ack && !cont) n_nack_abort++;
      if (!ack && cont)  n_nack_cont++;
      if (!cont) break;
    end
  endtask

  task automatic random_txn();
    int cut, i;
    bit  is_arb;
    n_msgs = 3'(1 + $urandom % MAX_MSGS);
    for (int m = 0; m < MAX_MSGS; m++) begin
      msgs[m].addr         = 7'($urandom);
      msgs[m].is_read      = $urandom % 2;
      msgs[m].len          = 8'($urandom % 6);
      if (msgs[m].is_read && msgs[m].len == 0) msgs[m].len = 8'd1;
      if ($urandom % 8 == 0) msgs[m].len = 8'(msgs[m].is_read ? 33 + $urandom % 8 : MAX_BYTES);
      msgs[m].variable     = msgs[m].is_read && ($urandom % 4 == 0);
      msgs[m].non_critical = $urandom % 2;
      for (int k = 0; k < MAX_BYTES; k++) wr_data[m][k] = 8'($urandom);
      if (msgs[m].is_read && msgs[m].len > 32) n_long++;
    end
    make_plan();
    cut    = ($urandom % 6 == 0) ? int'($urandom % (plan.size() + 1)) : -1;
    is_arb = $urandom % 2;

    // offer the transaction; the byte layer is idle
    txn_valid = 1'b1;
    call(BRES_OK, 0);
    check(got_ready && got_act.kind == BACT_START, "transaction taken with START");
    txn_valid = 1'b0;
    n_txn++;
    for (i = 0; i < plan.size(); i++) begin
      if (i == cut) begin
        call(is_arb ? BRES_ARB_LOST : BRES_UNDEF, 0);
        check(got_reply && got_status == (is_arb ? TR_ARB_LOST : TR_UNDEFINED),
              "loss or undefined condition ends the transaction");
        check(got_act.kind == BACT_IDLE, "nothing more after a loss");
        if (is_arb) n_arb++; else n_undef++;
        // bus busy until some STOP: then an idle call
        call(BRES_OK, 0);
        check(!got_reply && got_act.kind == BACT_IDLE && !active, "idle afterwards");
        return;
      end
      call(plan[i].rk, plan[i].rd);
      check(!got_reply, "no reply inside the transaction");
      check(got_act.kind == plan[i].ak &&
            (got_act.kind != BACT_WRITE || got_act.data == plan[i].ad),
            $sformatf("step %0d: action %s %h expected %s %h", i, got_act.kind.name(),
                      got_act.data, plan[i].ak.name(), plan[i].ad));
    end
    // result of the STOP
    call(BRES_OK, 0);
    check(got_reply && got_status == TR_SUCCESS, "reply after STOP");
    check(got_act.kind == BACT_IDLE, "idle step after the reply");
    for (int m = 0; m < MAX_MSGS; m++) begin
      check(replies[m] == exp_rep[m], $sformatf("reply of message %0d", m));
      if (exp_rep[m].acked && msgs[m].is_read)
        for (int k = 0; k < exp_rep[m].count && k < MAX_BYTES; k++)
          check(rd_data[m][k] == exp_rd[m][k], "byte read");
    end
  endtask

  initial begin
    foreach (msgs[m]) msgs[m] = '0;
    foreach (wr_data[m, k]) wr_data[m][k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    call(BRES_OK, 0);
    check(got_act.kind == BACT_IDLE && !got_ready, "idle without a transaction");
    for (int t = 0; t < 2000; t++) random_txn();
    check(n_nack_abort > 0 && n_nack_cont > 0 && n_wnack > 0 && n_var > 0 &&
          n_arb > 0 && n_undef > 0 && n_long > 0, "every case seen");
    $display("cases: txn=%0d nack_abort=%0d nack_continue=%0d write_nack=%0d variable=%0d arb=%0d undef=%0d long_read=%0d",
             n_txn, n_nack_abort, n_nack_cont, n_wnack, n_var, n_arb, n_undef, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
