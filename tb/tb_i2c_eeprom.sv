// tb_i2c_eeprom: drives the EEPROM's high-level slave calls directly with
// random messages (writes of 0 to 70 bytes, so partial addresses and page
// wrap-around occur; reads of 1 to 40 bytes; other bus addresses) ended by
// STOP or a repeated START, and compares every acknowledge and every byte
// read with a behavioural reference kept in the testbench. It also checks
// that a page commit keeps the device busy for exactly PAGE_BYTES cycles,
// during which its address is not acknowledged, and finally compares the
// whole storage.
`timescale 1ns/1ps
module tb_i2c_eeprom;
  import i2c_pkg::*;

  localparam int         ADDR_BITS = 15;
  localparam int         PAGE      = 64;
  localparam int         SIZE      = 2 ** ADDR_BITS;
  localparam logic [6:0] EE        = 7'h50;

  logic    clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  hs_req_t hs_req = '0;
  hs_rsp_t hs_rsp;
  logic    busy;

  i2c_eeprom #(.BUS_ADDR(EE), .ADDR_BITS(ADDR_BITS), .PAGE_BYTES(PAGE)) dut (
    .clk, .rst_n, .hs_req, .hs_rsp, .busy);

  int checks = 0, failures = 0;
  int n_busy_nack = 0, n_wrap = 0, n_part_rs = 0, n_part_stop = 0, n_rs_discard = 0;
  int n_commit = 0, n_reads = 0, n_other = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- reference ----------------
  logic [7:0] rmem [SIZE];
  logic [7:0] rbuf [PAGE];
  bit         rdirty [PAGE];
  int  raddr = 0, rws = 2, racnt = 0;   // rws: 0 address, 1 write, 2 read
  longint cyc = 0, busy_beg = 0, busy_end = 0;  // reference busy window
  bit  commit_next = 0, busy_at_call;

  always @(posedge clk) cyc <= cyc + 1;

  // One call bundle in one clock cycle; returns the response.
  hs_rsp_t rsp;
  task automatic do_call(input hs_req_t q);
    @(negedge clk);
    hs_req = q;
    busy_at_call = (cyc >= busy_beg && cyc < busy_end);
    if (q.stop_call && commit_next) begin
      busy_beg = cyc + 1;
      busy_end = cyc + 1 + PAGE;
      commit_next = 0;
    end
    #1 rsp = hs_rsp;
    check(busy == busy_at_call, "busy flag");
    @(negedge clk);
    hs_req = '0;
    repeat ($urandom % 3) begin
      check(busy == (cyc >= busy_beg && cyc < busy_end), "busy flag");
      @(negedge clk);
    end
  endtask

  task automatic msg_address(input logic [6:0] a, input bit rd, output bit ack);
    hs_req_t q;
    bit exp_ack;
    q = '0;
    q.addr_call = 1; q.addr = a; q.is_read = rd; q.read_call = rd;
    if (rws == 0 && racnt == 1) raddr = ((raddr << 1) | 1) % SIZE;
    do_call(q);
    exp_ack = (a == EE) && !busy_at_call;
    ack = rsp.addr_ack;
    check(ack == exp_ack, "address acknowledge");
    if (a == EE && !exp_ack) n_busy_nack++;
    if (a != EE) n_other++;
    rws = (exp_ack && !rd) ? 0 : 2;
    racnt = 0;
    if (rd && exp_ack) begin
      check(rsp.rdata == rmem[raddr], "first byte read");
      raddr = (raddr + 1) % SIZE;
      n_reads++;
    end
  endtask

  task automatic msg_read();
    hs_req_t q;
    q = '0; q.read_call = 1;
    do_call(q);
    check(rsp.rdata == rmem[raddr], "byte read");
    raddr = (raddr + 1) % SIZE;
    n_reads++;
  endtask

  task automatic msg_write(input logic [7:0] b);
    hs_req_t q;
    q = '0; q.write_call = 1; q.wdata = b;
    do_call(q);
    check(rsp.write_ack, "write acknowledged");
    if (rws == 0) begin
      raddr = ((raddr << 8) | int'(b)) % SIZE;
      racnt++;
      if (racnt == 2) rws = 2;
    end else begin
      if (rws == 2) begin
        foreach (rdirty[i]) rdirty[i] = 0;
        rws = 1;
      end
      rbuf[raddr % PAGE]   = b;
      rdirty[raddr % PAGE] = 1;
      if (raddr % PAGE == PAGE - 1) n_wrap++;
      raddr = raddr - (raddr % PAGE) + (raddr + 1) % PAGE;
    end
  endtask

  task automatic msg_stop();
    hs_req_t q;
    q = '0; q.stop_call = 1;
    if (rws == 1) begin
      for (int i = 0; i < PAGE; i++)
        if (rdirty[i]) rmem[raddr - (raddr % PAGE) + i] = rbuf[i];
      commit_next = 1;
      n_commit++;
    end
    if (rws == 0 && racnt == 1) begin raddr = (raddr << 1) % SIZE; n_part_stop++; end
    rws = 2; racnt = 0;
    do_call(q);
  endtask

  initial begin
    @(negedge clk);
    for (int i = 0; i < SIZE; i++) rmem[i] = dut.mem[i];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1500; t++) begin
      bit ack, rd;
      logic [6:0] a;
      rd = $urandom % 2;
      a  = ($urandom % 8 == 0) ? 7'($urandom) : EE;
      msg_address(a, rd, ack);
      if (ack && rd) begin
        repeat ($urandom % 40) msg_read();
      end else if (ack) begin
        int n;
        n = ($urandom % 3 == 0) ? int'($urandom % 4) : int'($urandom % 71);
        for (int k = 0; k < n; k++) msg_write(8'($urandom));
      end
      if ($urandom % 4 == 0) begin
        if (rws == 0 && racnt == 1) n_part_rs++;
        if (rws == 1) n_rs_discard++;
        continue;                                   // repeated START
      end
      msg_stop();
      if ($urandom % 2) repeat ($urandom % (PAGE + 8)) @(negedge clk);
    end
    msg_stop();
    repeat (PAGE + 4) @(negedge clk);
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < SIZE; i++) if (dut.mem[i] != rmem[i]) bad++;
      check(bad == 0, $sformatf("%0d storage bytes differ", bad));
    end
    check(n_busy_nack > 0 && n_wrap > 0 && n_part_rs > 0 && n_part_stop > 0 &&
          n_rs_discard > 0 && n_commit > 0 && n_reads > 0 && n_other > 0,
          "every case seen");
    $display("cases: busy_nack=%0d wrap=%0d partial_rs=%0d partial_stop=%0d rs_discard=%0d commit=%0d reads=%0d other_addr=%0d",
             n_busy_nack, n_wrap, n_part_rs, n_part_stop, n_rs_discard, n_commit, n_reads, n_other);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
