// tb_i2c_system: end-to-end test of the master stack and the EEPROM slave
// over the two wires, with every parameter at its default.
//
// Each random transaction goes through the whole stack; a reference EEPROM
// written here from the device's description (no RTL shared) executes the
// same transaction directly at the transaction level, and the replies, the
// bytes read and finally the whole storage must agree. A third device on
// the bus (driven from this testbench) stretches the clock, wins
// arbitration and provokes an undefined condition. Every mechanism is
// counted and must happen at least once. Single-master transactions must
// also finish within a step budget computed from their size. Each one is
// then applied again on the top's direct path (no bus, second EEPROM,
// which starts as a copy of the first) and on the symbol-level path (third
// EEPROM, also a copy): replies and bytes must equal those that came over
// the wires, and at the end all three memories must equal the reference.
`timescale 1ns/1ps
module tb_i2c_system;
  import i2c_pkg::*;

  localparam int MAX_MSGS  = 4;
  localparam int MAX_BYTES = 32;
  localparam int STEP      = 250;        // master clocks per step (default)
  localparam int PAGE      = 64;
  localparam int ABITS     = 15;
  localparam int SIZE      = 1 << ABITS;
  localparam logic [6:0] EE = 7'h50;
  localparam int N_TXN     = 160;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       txn_valid = 1'b0, txn_ready;
  logic [$clog2(MAX_MSGS+1)-1:0] n_msgs = '0;
  msg_t       msgs    [MAX_MSGS];
  logic [7:0] wr_data [MAX_MSGS][MAX_BYTES];
  logic       reply_valid;
  tr_status_t reply_status;
  msg_reply_t replies [MAX_MSGS];
  logic [7:0] rd_data [MAX_MSGS][MAX_BYTES];
  logic       master_active, scl, sda, eeprom_busy;
  logic       ext_scl_low = 1'b0, ext_sda_low = 1'b0;
  logic       d_txn_valid = 1'b0, d_txn_ready, d_reply_valid, d_eeprom_busy, d_active;
  tr_status_t d_reply_status;
  msg_reply_t d_replies [MAX_MSGS];
  logic [7:0] d_rd_data [MAX_MSGS][MAX_BYTES];
  logic       s_txn_valid = 1'b0, s_txn_ready, s_reply_valid, s_eeprom_busy, s_active;
  tr_status_t s_reply_status;
  msg_reply_t s_replies [MAX_MSGS];
  logic [7:0] s_rd_data [MAX_MSGS][MAX_BYTES];
  sym_t       sm_master_syms [2];
  logic [0:0] sm_slave_release = 1'b1;
  sym_t       sm_sym, sm_alt_sym;
  logic       sm_race, sm_deadlock;

  i2c_system dut (
    .clk, .rst_n, .txn_valid, .txn_ready, .n_msgs, .msgs, .wr_data,
    .reply_valid, .reply_status, .replies, .rd_data, .master_active,
    .ext_scl_drive_low(ext_scl_low), .ext_sda_drive_low(ext_sda_low),
    .scl, .sda, .eeprom_busy,
    .d_txn_valid, .d_txn_ready, .d_reply_valid, .d_reply_status, .d_replies,
    .d_rd_data, .d_eeprom_busy, .d_active,
    .s_txn_valid, .s_txn_ready, .s_reply_valid, .s_reply_status, .s_replies,
    .s_rd_data, .s_eeprom_busy, .s_active,
    .sm_master_syms, .sm_slave_release, .sm_sym, .sm_alt_sym, .sm_race, .sm_deadlock
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
      if (failures == 50) begin            // clearly broken: stop early
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  // ---------------- reference EEPROM ----------------
  logic [7:0] rmem [SIZE];
  int   raddr, rws, racnt;              // rws: 0 address, 1 write, 2 read
  logic [7:0] rbuf [PAGE];
  bit   rdirty [PAGE];

  function automatic int page_adv(input int a);
    return a - (a % PAGE) + ((a % PAGE) + 1) % PAGE;
  endfunction

  task automatic ref_address(input logic [6:0] a, input bit rd, output bit ack);
    if (rws == 0 && racnt != 0) raddr = ((raddr << 1) | 1) & (SIZE - 1);
    ack   = (a == EE);
    rws   = (ack && !rd) ? 0 : 2;
    racnt = 0;
  endtask
  task automatic ref_read(output logic [7:0] b);
    b     = rmem[raddr];
    raddr = (raddr + 1) % SIZE;
  endtask
  task automatic ref_write(input logic [7:0] b);
    if (rws == 0) begin
      raddr = ((raddr << 8) | int'(b)) & (SIZE - 1);
      racnt++;
      if (racnt == 2) rws = 2;
    end else begin
      if (rws == 2) begin
        foreach (rdirty[i]) rdirty[i] = 0;
        rws = 1;
      end
      rbuf[raddr % PAGE]   = b;
      rdirty[raddr % PAGE] = 1;
      raddr = page_adv(raddr);
    end
  endtask
  task automatic ref_stop();
    if (rws == 1)
      for (int i = 0; i < PAGE; i++)
        if (rdirty[i]) rmem[raddr - (raddr % PAGE) + i] = rbuf[i];
    if (rws == 0 && racnt != 0) raddr = (raddr << 1) & (SIZE - 1);
    rws = 2; racnt = 0;
  endtask

  // Expected reply of the current transaction, computed on the reference.
  msg_reply_t exp_rep [MAX_MSGS];
  logic [7:0] exp_rd  [MAX_MSGS][MAX_BYTES];

  task automatic ref_txn();
    bit stop_now = 0;
    for (int i = 0; i < MAX_MSGS; i++) exp_rep[i] = '0;
    for (int i = 0; i < int'(n_msgs) && !stop_now; i++) begin
      bit ack, ok;
      ref_address(msgs[i].addr, msgs[i].is_read, ack);
      ok = ack;
      if (ack) begin
        if (msgs[i].is_read) begin
          int n = msgs[i].len, k = 0;
          while (k < n) begin
            logic [7:0] b;
            ref_read(b);
            if (k < MAX_BYTES) exp_rd[i][k] = b;
            if (k == 0 && msgs[i].variable) n += int'(b);
            k++;
          end
          exp_rep[i] = '{acked: 1'b1, count: 9'(n)};
        end else begin
          for (int k = 0; k < msgs[i].len; k++) ref_write(wr_data[i][k]);
          exp_rep[i] = '{acked: 1'b1, count: 9'(msgs[i].len)};
        end
      end
      if (!ok && !msgs[i].non_critical) stop_now = 1;
    end
    ref_stop();
  endtask

  // ---------------- mechanism counters ----------------
  int n_nack_abort = 0, n_nack_cont = 0, n_variable = 0, n_multi_read = 0;
  int n_page_wrap = 0, n_rs_discard = 0, n_part_rs = 0, n_part_stop = 0;
  int n_arb = 0, n_undef = 0, n_stretch = 0, n_commit = 0, n_rs = 0;

  always @(posedge eeprom_busy) n_commit++;

  // ---------------- third device on the bus ----------------
  bit stretch_en = 0;
  initial begin
    forever begin
      @(negedge scl);
      if (stretch_en && ($urandom % 4) == 0) begin
        ext_scl_low = 1'b1;
        repeat (STEP + $urandom % (3 * STEP)) @(posedge clk);
        ext_scl_low = 1'b0;
        n_stretch++;
      end
    end
  end

  // ---------------- transaction runner ----------------
  int  t_accept;
  tr_status_t got_status;

  task automatic issue(output int cycles);
    int t0;
    @(negedge clk);
    txn_valid = 1'b1;
    do @(posedge clk); while (!txn_ready);
    t0 = $time / 10;
    @(negedge clk);
    txn_valid = 1'b0;
    do @(posedge clk); while (!reply_valid);
    got_status = reply_status;
    cycles = $time / 10 - t0;
    @(negedge clk);
  endtask

  task automatic run_and_check(input bit timed);
    int cycles, budget = 0;
    ref_txn();
    issue(cycles);
    check(got_status == TR_SUCCESS, "status success");
    for (int i = 0; i < int'(n_msgs); i++) begin
      check(replies[i] == exp_rep[i],
            $sformatf("msg %0d reply %p expected %p", i, replies[i], exp_rep[i]));
      if (msgs[i].is_read && exp_rep[i].acked)
        for (int k = 0; k < int'(exp_rep[i].count) && k < MAX_BYTES; k++)
          check(rd_data[i][k] == exp_rd[i][k],
                $sformatf("msg %0d byte %0d: %02x expected %02x",
                          i, k, rd_data[i][k], exp_rd[i][k]));
    end
    // Liveness bound: START + address + data bits per message, STOP, with
    // at most 3 steps per bit and 8 steps of slack per message.
    for (int i = 0; i < int'(n_msgs); i++)
      budget += 3 * (1 + 9 * (1 + int'(exp_rep[i].count))) + 8;
    budget = (budget + 8) * STEP;
    if (timed) check(cycles <= budget,
                     $sformatf("took %0d cycles, budget %0d", cycles, budget));
    run_direct(1);
    run_symbol(1);
  endtask

  // The same transaction over the symbol-level connection to the third
  // EEPROM: replies and bytes must again equal those over the wires.
  int n_symbol = 0;
  task automatic run_symbol(input bit compare);
    while (s_eeprom_busy) @(negedge clk);
    s_txn_valid = 1'b1;
    do @(posedge clk); while (!s_txn_ready);
    @(negedge clk);
    s_txn_valid = 1'b0;
    do @(posedge clk); while (!s_reply_valid);
    check(!compare || s_reply_status == TR_SUCCESS, "symbol-level status success");
    for (int i = 0; i < int'(n_msgs) && compare; i++) begin
      check(s_replies[i] == replies[i],
            $sformatf("symbol-level msg %0d reply %p, over the wires %p", i, s_replies[i], replies[i]));
      if (msgs[i].is_read && replies[i].acked)
        for (int k = 0; k < int'(replies[i].count) && k < MAX_BYTES; k++)
          check(s_rd_data[i][k] == rd_data[i][k],
                $sformatf("symbol-level msg %0d byte %0d: %02x, over the wires %02x",
                          i, k, s_rd_data[i][k], rd_data[i][k]));
    end
    if (compare) n_symbol++;
    @(negedge clk);
  endtask

  // The same transaction applied directly to the second EEPROM: replies
  // and bytes must equal those that came over the wires (when `compare`;
  // a transaction disturbed on the wires is only applied, to keep both
  // memories in step).
  int n_direct = 0;
  task automatic run_direct(input bit compare);
    while (d_eeprom_busy) @(negedge clk);
    d_txn_valid = 1'b1;
    do @(posedge clk); while (!d_txn_ready);
    @(negedge clk);
    d_txn_valid = 1'b0;
    do @(posedge clk); while (!d_reply_valid);
    check(d_reply_status == TR_SUCCESS, "direct status success");
    for (int i = 0; i < int'(n_msgs) && compare; i++) begin
      check(d_replies[i] == replies[i],
            $sformatf("direct msg %0d reply %p, over the wires %p", i, d_replies[i], replies[i]));
      if (msgs[i].is_read && replies[i].acked)
        for (int k = 0; k < int'(replies[i].count) && k < MAX_BYTES; k++)
          check(d_rd_data[i][k] == rd_data[i][k],
                $sformatf("direct msg %0d byte %0d: %02x, over the wires %02x",
                          i, k, d_rd_data[i][k], rd_data[i][k]));
    end
    if (compare) n_direct++;
    @(negedge clk);
  endtask

  function automatic msg_t mk(input logic [6:0] a, input bit rd, input int len,
                              input bit var_ = 0, input bit nc = 0);
    return '{addr: a, is_read: rd, len: 8'(len), variable: var_, non_critical: nc};
  endfunction

  task automatic set_wr(input int m, input int addr, input int ndata);
    wr_data[m][0] = 8'(addr >> 8);
    wr_data[m][1] = 8'(addr);
    for (int k = 0; k < ndata; k++) wr_data[m][2 + k] = 8'($urandom);
  endtask

  // One random transaction.
  task automatic random_txn();
    int kind = $urandom % 8;
    int a    = $urandom % SIZE;
    int n;
    for (int m = 0; m < MAX_MSGS; m++) msgs[m] = mk(EE, 0, 0);
    if ($urandom % 3 == 0) a = a - (a % PAGE) + PAGE - 1 - ($urandom % 4);
    unique case (kind)
      0, 1: begin                                   // page write
        n = 1 + $urandom % 20;
        msgs[0] = mk(EE, 0, 2 + n); set_wr(0, a, n);
        n_msgs = 1;
        if ((a % PAGE) + n > PAGE) n_page_wrap++;
      end
      2, 3: begin                                   // random read
        n = 1 + $urandom % 12;
        msgs[0] = mk(EE, 0, 2); set_wr(0, a, 0);
        msgs[1] = mk(EE, 1, n);
        n_msgs = 2;
        if (n > 1) n_multi_read++;
      end
      4: begin                                      // wrong address
        bit nc = $urandom % 2;
        msgs[0] = mk(EE + 7'd1 + 7'($urandom % 8), 0, 1, 0, nc);
        wr_data[0][0] = 8'($urandom);
        msgs[1] = mk(EE, 1, 1 + $urandom % 4);
        n_msgs = 2;
        if (nc) n_nack_cont++; else n_nack_abort++;
      end
      5: begin                                      // write, then repeated START
        n = 1 + $urandom % 6;
        msgs[0] = mk(EE, 0, 2 + n); set_wr(0, a, n);
        msgs[1] = mk(EE, 1, 2);
        n_msgs = 2;
        n_rs_discard++;
      end
      6: begin                                      // partial address
        msgs[0] = mk(EE, 0, 1); wr_data[0][0] = 8'($urandom);
        if ($urandom % 2) begin
          msgs[1] = mk(EE, 1, 3); n_msgs = 2; n_part_rs++;
        end else begin
          n_msgs = 1; n_part_stop++;
        end
      end
      default: begin                                // block read, SMBus style
        // Plant a small length byte first, then read it back with
        // the variable flag.
        msgs[0] = mk(EE, 0, 3); set_wr(0, a, 0);
        wr_data[0][2] = 8'($urandom % 6);
        n_msgs = 1;
        run_and_check(1);
        msgs[0] = mk(EE, 0, 2); set_wr(0, a, 0);
        msgs[1] = mk(EE, 1, 1 + $urandom % 2, 1);
        n_msgs = 2;
        n_variable++;
      end
    endcase
    if (n_msgs > 1) n_rs++;
    run_and_check(!stretch_en);
  endtask

  // ---------------- arbitration loss and undefined condition ----------------
  // The third device pulls SDA low from the first SCL-low phase of the
  // address byte: the master's first address bit (1) reads back as 0. It
  // then lets the master go and finishes with a STOP of its own.
  task automatic arb_txn();
    msgs[0] = mk(EE, 1, 2); n_msgs = 1;
    fork
      begin
        int cycles;
        issue(cycles);
      end
      begin
        @(negedge sda iff scl);            // START
        @(negedge scl);
        repeat (STEP / 2) @(posedge clk);
        ext_sda_low = 1'b1;
        @(posedge scl); @(negedge scl);    // bit sampled as 0
        @(posedge scl);                    // master has let SCL go
        repeat (2 * STEP) @(posedge clk);
        ext_sda_low = 1'b0;                // STOP
      end
    join
    check(got_status == TR_ARB_LOST, "arbitration loss reported");
    if (got_status == TR_ARB_LOST) n_arb++;
    ref_stop();
  endtask

  // During the master's STOP the third device holds SDA low and then pulls
  // SCL low while SCL is high: the master, expecting its STOP, sees a bit.
  // The device then ends with a STOP of its own. The slave has received the
  // whole write and commits it at that STOP.
  task automatic undef_txn();
    msgs[0] = mk(EE, 0, 3); set_wr(0, $urandom % SIZE, 1); n_msgs = 1;
    ref_txn();
    fork
      begin
        int cycles;
        issue(cycles);
      end
      begin
        @(negedge sda iff scl);            // START
        repeat (1 + 4 * 9) @(negedge scl); // first fall, then address + 3 bytes with acks
        ext_sda_low = 1'b1;
        @(posedge scl);                    // master prepares its STOP
        repeat (STEP + STEP / 2) @(posedge clk);
        ext_scl_low = 1'b1;                // a clock pulse instead of a STOP
        repeat (2 * STEP) @(posedge clk);
        ext_scl_low = 1'b0;
        repeat (2 * STEP) @(posedge clk);
        ext_sda_low = 1'b0;                // STOP
      end
    join
    check(got_status == TR_UNDEFINED, $sformatf("undefined condition reported (got %s)", got_status.name()));
    if (got_status == TR_UNDEFINED) n_undef++;
    run_direct(0);
    run_symbol(0);
  endtask

  // ---------------- symbol-level bus resolution ----------------
  // Two masters and one slave exchanging symbols directly: a normal bit,
  // an acknowledge, START against a 1 bit (race), STOP against a 1 bit
  // (race) and a slave holding SDA with no master sending (deadlock).
  int n_sm_race = 0, n_sm_dead = 0;
  task automatic sm_case(input sym_t a, input sym_t b, input bit rel,
                         input sym_t e_sym, input sym_t e_alt, input bit e_race,
                         input bit e_dead);
    sm_master_syms[0] = a;
    sm_master_syms[1] = b;
    sm_slave_release  = rel;
    #1;
    check(sm_sym == e_sym && sm_alt_sym == e_alt && sm_race == e_race &&
          sm_deadlock == e_dead, "symbol-level resolution");
    if (sm_race) n_sm_race++;
    if (sm_deadlock) n_sm_dead++;
  endtask

  task automatic sm_cases();
    localparam sym_t I = '{kind: SYM_IDLE, bit_val: 1'b0};
    sm_case(mk_bit(1), mk_sym(SYM_IDLE), 1, mk_bit(1), I, 0, 0);
    sm_case(mk_bit(1), mk_bit(0), 1, mk_bit(0), I, 0, 0);
    sm_case(mk_bit(1), mk_sym(SYM_IDLE), 0, mk_bit(0), I, 0, 0);
    sm_case(mk_bit(1), mk_sym(SYM_START), 1, mk_bit(1), mk_sym(SYM_START), 1, 0);
    sm_case(mk_sym(SYM_STOP), mk_bit(1), 1, mk_bit(0), mk_sym(SYM_STOP), 1, 0);
    sm_case(mk_sym(SYM_START), mk_sym(SYM_STOP), 1, mk_sym(SYM_STOP), I, 0, 0);
    sm_case(mk_sym(SYM_IDLE), mk_sym(SYM_IDLE), 0, I, I, 0, 1);
    sm_case(mk_sym(SYM_IDLE), mk_sym(SYM_IDLE), 1, I, I, 0, 0);
  endtask

  // ---------------- main ----------------
  initial begin
    for (int m = 0; m < MAX_MSGS; m++) msgs[m] = '0;
    foreach (wr_data[i, j]) wr_data[i][j] = '0;
    sm_master_syms[0] = '0;
    sm_master_syms[1] = '0;
    #1;
    for (int i = 0; i < SIZE; i++) rmem[i] = dut.u_eeprom.mem[i];
    for (int i = 0; i < SIZE; i++) dut.u_d_eeprom.mem[i] = dut.u_eeprom.mem[i];
    for (int i = 0; i < SIZE; i++) dut.u_l_eeprom.mem[i] = dut.u_eeprom.mem[i];
    raddr = 0; rws = 2; racnt = 0;
    foreach (rdirty[i]) rdirty[i] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);

    for (int t = 0; t < N_TXN; t++) begin
      stretch_en = (t >= N_TXN / 2) && (t % 2 == 0);
      random_txn();
      if (t == N_TXN / 4)     arb_txn();
      if (t == N_TXN / 4 + 1) undef_txn();
    end
    stretch_en = 0;
    repeat (4 * STEP) @(posedge clk);
    sm_cases();

    // Whole storage must match.
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < SIZE; i++) if (dut.u_eeprom.mem[i] != rmem[i]) bad++;
      check(bad == 0, $sformatf("%0d storage bytes differ", bad));
      bad = 0;
      for (int i = 0; i < SIZE; i++) if (dut.u_d_eeprom.mem[i] != rmem[i]) bad++;
      check(bad == 0, $sformatf("%0d storage bytes of the direct path differ", bad));
      bad = 0;
      for (int i = 0; i < SIZE; i++) if (dut.u_l_eeprom.mem[i] != rmem[i]) bad++;
      check(bad == 0, $sformatf("%0d storage bytes of the symbol-level path differ", bad));
    end

    $display("mechanisms: nack_abort=%0d nack_continue=%0d variable_read=%0d multi_read=%0d page_wrap=%0d rs_discard=%0d partial_rs=%0d partial_stop=%0d repeated_start=%0d commit=%0d arb_lost=%0d undefined=%0d stretch=%0d",
             n_nack_abort, n_nack_cont, n_variable, n_multi_read, n_page_wrap,
             n_rs_discard, n_part_rs, n_part_stop, n_rs, n_commit, n_arb, n_undef,
             n_stretch);
    $display("symbol level: race=%0d deadlock=%0d", n_sm_race, n_sm_dead);
    $display("direct path: %0d transactions compared", n_direct);
    $display("symbol-level path: %0d transactions compared", n_symbol);
    check(n_nack_abort > 0, "NACK abort exercised");
    check(n_nack_cont > 0, "non-critical NACK exercised");
    check(n_variable > 0, "variable read exercised");
    check(n_multi_read > 0, "multi-byte read exercised");
    check(n_page_wrap > 0, "page wrap exercised");
    check(n_rs_discard > 0, "page buffer discard exercised");
    check(n_part_rs > 0, "partial address + repeated START exercised");
    check(n_part_stop > 0, "partial address + STOP exercised");
    check(n_rs > 0, "repeated START exercised");
    check(n_commit > 0, "page commit exercised");
    check(n_arb > 0, "arbitration loss exercised");
    check(n_undef > 0, "undefined condition exercised");
    check(n_stretch > 0, "clock stretching exercised");
    check(n_sm_race > 0, "symbol-level race exercised");
    check(n_sm_dead > 0, "symbol-level deadlock exercised");
    check(n_direct > 0, "direct path compared");
    check(n_symbol > 0, "symbol-level path compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
