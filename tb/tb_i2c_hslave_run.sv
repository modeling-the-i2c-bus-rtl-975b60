// tb_i2c_hslave_run: runs random transactions directly on a behavioural
// high-level slave and checks every call and the reply.
//
// The slave here answers from random tables: whether it takes an address
// depends on (address, direction), whether it takes a written byte on the
// byte's value, and the n-th read returns entry n of a byte table. A
// reference written here from the calling rules predicts, for each
// transaction, the exact list of calls (kind, address, data) and the reply
// of every message. Both must match, the reply must come exactly one clock
// after the *stop* call, and a transaction must take one clock per call.
`timescale 1ns/1ps
module tb_i2c_hslave_run;
  import i2c_pkg::*;

  localparam int MAX_MSGS  = 4;
  localparam int MAX_BYTES = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       txn_valid = 1'b0, txn_ready;
  logic [$clog2(MAX_MSGS+1)-1:0] n_msgs = '0;
  msg_t       msgs    [MAX_MSGS];
  logic [7:0] wr_data [MAX_MSGS][MAX_BYTES];
  logic       reply_valid, active;
  tr_status_t reply_status;
  msg_reply_t replies [MAX_MSGS];
  logic [7:0] rd_data [MAX_MSGS][MAX_BYTES];
  hs_req_t    hs_req;
  hs_rsp_t    hs_rsp;

  i2c_hslave_run #(.MAX_MSGS(MAX_MSGS), .MAX_BYTES(MAX_BYTES)) dut (
    .clk, .rst_n, .txn_valid, .txn_ready, .n_msgs, .msgs, .wr_data,
    .reply_valid, .reply_status, .replies, .rd_data, .active,
    .hs_req, .hs_rsp
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- behavioural slave ----------------
  bit         ack_tbl [256];
  bit         wack_tbl[256];
  logic [7:0] rd_tbl  [64];
  int         n_reads = 0;

  always_comb begin
    hs_rsp.addr_ack  = ack_tbl[{hs_req.addr, hs_req.is_read}];
    hs_rsp.write_ack = wack_tbl[hs_req.wdata];
    hs_rsp.rdata     = rd_tbl[n_reads % 64];
  end

  // Call log: kind (0 address, 1 read, 2 write, 3 stop) and its data.
  typedef struct packed { logic [1:0] kind; logic [7:0] data; } call_t;
  call_t got_calls[$], exp_calls[$];
  int    stop_time;

  always @(posedge clk) if (rst_n) begin
    int n;
    n = int'(hs_req.addr_call) + int'(hs_req.read_call) +
        int'(hs_req.write_call) + int'(hs_req.stop_call);
    if (n > 1) check(0, "more than one call in a clock");
    if (hs_req.addr_call)  got_calls.push_back('{2'd0, {hs_req.addr, hs_req.is_read}});
    if (hs_req.read_call)  begin got_calls.push_back('{2'd1, hs_rsp.rdata}); n_reads <= n_reads + 1; end
    if (hs_req.write_call) got_calls.push_back('{2'd2, hs_req.wdata});
    if (hs_req.stop_call)  begin got_calls.push_back('{2'd3, 8'h00}); stop_time = $time / 10; end
  end

  // ---------------- reference ----------------
  msg_reply_t exp_rep[MAX_MSGS];
  logic [7:0] exp_rd [MAX_MSGS][MAX_BYTES];

  task automatic reference(input int reads_before);
    int  r = reads_before;
    bit  go = 1;
    exp_calls.delete();
    for (int i = 0; i < MAX_MSGS; i++) exp_rep[i] = '0;
    for (int i = 0; i < int'(n_msgs) && go; i++) begin
      msg_t m = msgs[i];
      bit   ok;
      exp_calls.push_back('{2'd0, {m.addr, m.is_read}});
      if (!ack_tbl[{m.addr, m.is_read}]) ok = 0;
      else begin
        exp_rep[i].acked = 1;
        ok = 1;
        if (m.is_read) begin
          int size = int'(m.len);
          for (int k = 0; k < size; k++) begin
            logic [7:0] b = rd_tbl[r % 64];
            r++;
            if (k == 0 && m.variable) size += int'(b);
            exp_calls.push_back('{2'd1, b});
            if (k < MAX_BYTES) exp_rd[i][k] = b;
            exp_rep[i].count++;
          end
        end else begin
          for (int k = 0; k < int'(m.len) && ok; k++) begin
            exp_calls.push_back('{2'd2, wr_data[i][k]});
            if (wack_tbl[wr_data[i][k]]) exp_rep[i].count++;
            else ok = 0;
          end
        end
      end
      if (!ok && !m.non_critical) go = 0;
    end
    exp_calls.push_back('{2'd3, 8'h00});
  endtask

  // ---------------- stimulus ----------------
  int n_nack_addr = 0, n_nack_data = 0, n_noncrit = 0, n_variable = 0, n_long = 0;

  task automatic random_txn();
    int reads0, t_acc, t_rep;
    n_msgs = 1 + $urandom % MAX_MSGS;
    for (int i = 0; i < MAX_MSGS; i++) begin
      bit rd = $urandom % 2;
      msgs[i].addr         = 7'($urandom % 6);       // few addresses: tables repeat
      msgs[i].is_read      = rd;
      msgs[i].len          = rd ? 8'(1 + $urandom % 40) : 8'($urandom % (MAX_BYTES + 1));
      msgs[i].variable     = rd && ($urandom % 4 == 0);
      msgs[i].non_critical = ($urandom % 3 == 0);
      for (int k = 0; k < MAX_BYTES; k++) wr_data[i][k] = 8'($urandom);
    end
    got_calls.delete();
    reads0 = n_reads;
    reference(reads0);
    @(negedge clk);
    txn_valid = 1'b1;
    @(posedge clk);
    check(txn_ready, "taken at once");
    t_acc = $time / 10;
    @(negedge clk);
    txn_valid = 1'b0;
    do @(posedge clk); while (!reply_valid);
    t_rep = $time / 10;
    check(reply_status == TR_SUCCESS, "status success");
    check(t_rep == stop_time + 1, "reply one clock after stop");
    check(t_rep - t_acc == exp_calls.size() + 1,
          $sformatf("took %0d clocks for %0d calls", t_rep - t_acc, exp_calls.size()));
    check(got_calls.size() == exp_calls.size(),
          $sformatf("%0d calls, expected %0d", got_calls.size(), exp_calls.size()));
    for (int c = 0; c < exp_calls.size() && c < got_calls.size(); c++)
      check(got_calls[c] == exp_calls[c],
            $sformatf("call %0d: %p expected %p", c, got_calls[c], exp_calls[c]));
    for (int i = 0; i < MAX_MSGS; i++) begin
      check(replies[i] == exp_rep[i],
            $sformatf("msg %0d reply %p expected %p", i, replies[i], exp_rep[i]));
      if (i < int'(n_msgs) && msgs[i].is_read)
        for (int k = 0; k < int'(exp_rep[i].count) && k < MAX_BYTES; k++)
          check(rd_data[i][k] == exp_rd[i][k], $sformatf("msg %0d byte %0d", i, k));
    end
    // Mechanism counts.
    for (int i = 0; i < int'(n_msgs); i++) begin
      if (!exp_rep[i].acked && (i == 0 || exp_rep[i-1].acked || msgs[i-1].non_critical))
        n_nack_addr++;
      if (!msgs[i].is_read && exp_rep[i].acked && exp_rep[i].count < 9'(msgs[i].len))
        n_nack_data++;
      if (msgs[i].variable && exp_rep[i].acked) n_variable++;
      if (msgs[i].is_read && exp_rep[i].count > 9'(MAX_BYTES)) n_long++;
      if (msgs[i].non_critical && i + 1 < int'(n_msgs)) n_noncrit++;
    end
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 256; i++) ack_tbl[i]  = ($urandom % 4) != 0;
    for (int i = 0; i < 256; i++) wack_tbl[i] = ($urandom % 16) != 0;
    for (int i = 0; i < 64; i++)  rd_tbl[i]   = 8'($urandom % 40);
    for (int i = 0; i < MAX_MSGS; i++) msgs[i] = '0;
    foreach (wr_data[i, j]) wr_data[i][j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    check(!active && !reply_valid, "idle after reset");
    for (int t = 0; t < 2000; t++) random_txn();
    $display("mechanisms: address_nack=%0d data_nack=%0d non_critical=%0d variable=%0d beyond_table=%0d",
             n_nack_addr, n_nack_data, n_noncrit, n_variable, n_long);
    check(n_nack_addr > 0 && n_nack_data > 0 && n_noncrit > 0 && n_variable > 0 && n_long > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
