// i2c_system: a complete layered I2C master and an EEPROM slave on one bus.
//
// Master stack, top to bottom: i2c_hmaster (transactions) -> i2c_bmaster
// (bytes) -> i2c_smaster_device (symbols) -> i2c_timing (wires).
// Slave stack: i2c_eeprom (high-level slave) -> i2c_hslave_adapter ->
// i2c_bslave -> i2c_sslave_device -> i2c_timing. Both stacks meet on
// i2c_bus, which also takes a third, external open-drain driver pair so
// that another device (a second master, a stretching slave) can share the
// wires. This is the arrangement of the protocol model's overview, with the
// model's EEPROM as the high-level slave.
//
// Each layer calls the one above it combinationally in the step where it
// has something to report, so a whole stack advances in one clock per step.
// The master steps every M_STEP_DIV clocks and so sets the bit rate; the
// slave samples every S_STEP_DIV clocks, and must sample faster than the
// master changes the lines so that it sees every transition (the default 1
// samples every clock).
//
// Host interface: see i2c_hmaster. `scl`/`sda` show the wire levels.
//
// Beside the wire-level system stands the model's symbol-level bus
// resolution (i2c_symbol_merge, SM_MASTERS masters and SM_SLAVES slaves),
// with its own ports (`sm_*`): it is what a simulation of devices that
// exchange symbols directly uses instead of wires and timing, and it flags
// the races and deadlocks such a bus can reach.
//
// Also beside it stands the model's direct path: i2c_hslave_run applies a
// transaction straight to a second EEPROM (same parameters) through the
// high-level slave calls, with no bus. It takes the same descriptors
// (`n_msgs`, `msgs`, `wr_data`) under its own handshake (`d_txn_valid`,
// `d_txn_ready`) and returns its own reply (`d_*`; `d_reply_status` is
// always success, as nothing can be lost without a bus). The model uses this
// path as the specification of the wire-level one: run on the same
// transactions, both must give the same replies and leave both memories
// alike. A host that starts the direct path must wait while
// `d_eeprom_busy` is high, since the direct path is fast enough to reach
// the EEPROM during its page commit.
//
// The third path connects a second master stack (i2c_hmaster, i2c_bmaster)
// and a third EEPROM stack (i2c_hslave_adapter, i2c_bslave) at the symbol
// level, as the model's symbol-level global step does: in every clock both
// byte layers are called with the current bus symbol, the master answers
// with the symbol it generates next and the slave with its SDA decision,
// and a one-master, one-slave i2c_symbol_merge turns the two into the next
// bus symbol. One symbol per clock replaces the wires, the timing layers
// and the symbol layers. It shares the descriptors too (`s_txn_valid`,
// `s_txn_ready`, replies on `s_*`), and the host must wait while
// `s_eeprom_busy` is high, for the same reason as on the direct path.
//
// Lint note: verilator reports rst_n as used both asynchronously and
// synchronously (SYNCASYNCNET). The synchronous use is only the
// `disable iff (!rst_n)` of the assertions here and inside
// i2c_hmaster, i2c_hslave_run and i2c_eeprom; every flop resets asynchronously.
module i2c_system
  import i2c_pkg::*;
#(
  parameter int         M_STEP_DIV = 250,
  parameter int         S_STEP_DIV = 1,
  parameter int         EDGE_GAP   = 13,
  parameter int         MAX_MSGS   = 4,
  parameter int         MAX_BYTES  = 32,
  parameter logic [6:0] EEPROM_BUS_ADDR = 7'h50,
  parameter int         ADDR_BITS  = 15,
  parameter int         PAGE_BYTES = 64,
  parameter int         SM_MASTERS = 2,
  parameter int         SM_SLAVES  = 1
) (
  input  logic       clk,
  input  logic       rst_n,
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
  output logic       master_active,
  // other devices on the bus
  input  logic       ext_scl_drive_low,
  input  logic       ext_sda_drive_low,
  output logic       scl,
  output logic       sda,
  output logic       eeprom_busy,
  // direct path: the same transaction applied to a second EEPROM
  input  logic       d_txn_valid,
  output logic       d_txn_ready,
  output logic       d_reply_valid,
  output tr_status_t d_reply_status,
  output msg_reply_t d_replies [MAX_MSGS],
  output logic [7:0] d_rd_data [MAX_MSGS][MAX_BYTES],
  output logic       d_eeprom_busy,
  output logic       d_active,
  // symbol-level path: the same transaction over a symbol-level connection
  input  logic       s_txn_valid,
  output logic       s_txn_ready,
  output logic       s_reply_valid,
  output tr_status_t s_reply_status,
  output msg_reply_t s_replies [MAX_MSGS],
  output logic [7:0] s_rd_data [MAX_MSGS][MAX_BYTES],
  output logic       s_eeprom_busy,
  output logic       s_active,
  // symbol-level bus resolution
  input  sym_t       sm_master_syms [SM_MASTERS],
  input  logic [SM_SLAVES-1:0] sm_slave_release,
  output sym_t       sm_sym,
  output sym_t       sm_alt_sym,
  output logic       sm_race,
  output logic       sm_deadlock
);

  // ---------------- master stack ----------------
  logic  m_step, m_scl_low, m_sda_low;
  bus_t  m_sample, m_dev_bus;
  logic  m_sym_valid;
  sym_t  m_sym, m_next_sym;
  logic  m_res_valid;
  bres_t m_res;
  bact_t m_act;

  i2c_timing #(.STEP_DIV(M_STEP_DIV), .EDGE_GAP(EDGE_GAP)) u_m_timing (
    .clk, .rst_n, .scl_i(scl), .sda_i(sda),
    .scl_drive_low(m_scl_low), .sda_drive_low(m_sda_low),
    .step(m_step), .bus_sample(m_sample), .dev_bus(m_dev_bus)
  );

  i2c_smaster_device u_m_sym (
    .clk, .rst_n, .step(m_step), .bus_in(m_sample), .bus_out(m_dev_bus),
    .up_valid(m_sym_valid), .up_sym(m_sym), .up_next(m_next_sym)
  );

  i2c_bmaster u_m_byte (
    .clk, .rst_n, .sym_valid(m_sym_valid), .sym(m_sym), .next_sym(m_next_sym),
    .res_valid(m_res_valid), .res(m_res), .act(m_act)
  );

  i2c_hmaster #(.MAX_MSGS(MAX_MSGS), .MAX_BYTES(MAX_BYTES)) u_m_high (
    .clk, .rst_n, .res_valid(m_res_valid), .res(m_res), .act(m_act),
    .txn_valid, .txn_ready, .n_msgs, .msgs, .wr_data,
    .reply_valid, .reply_status, .replies, .rd_data, .active(master_active)
  );

  // ---------------- slave stack ----------------
  logic    s_step, s_scl_low, s_sda_low;
  bus_t    s_sample, s_dev_bus;
  logic    s_sym_valid, s_release;
  sym_t    s_sym;
  logic    s_ev_valid;
  bev_t    s_ev;
  breact_t s_react;
  hs_req_t s_hs_req;
  hs_rsp_t s_hs_rsp;

  i2c_timing #(.STEP_DIV(S_STEP_DIV), .EDGE_GAP(EDGE_GAP)) u_s_timing (
    .clk, .rst_n, .scl_i(scl), .sda_i(sda),
    .scl_drive_low(s_scl_low), .sda_drive_low(s_sda_low),
    .step(s_step), .bus_sample(s_sample), .dev_bus(s_dev_bus)
  );

  i2c_sslave_device u_s_sym (
    .clk, .rst_n, .step(s_step), .bus_in(s_sample), .bus_out(s_dev_bus),
    .up_valid(s_sym_valid), .up_sym(s_sym), .up_release(s_release)
  );

  i2c_bslave u_s_byte (
    .clk, .rst_n, .sym_valid(s_sym_valid), .sym(s_sym), .release_sda(s_release),
    .ev_valid(s_ev_valid), .ev(s_ev), .react(s_react)
  );

  i2c_hslave_adapter u_s_high (
    .clk, .rst_n, .ev_valid(s_ev_valid), .ev(s_ev), .react(s_react),
    .hs_req(s_hs_req), .hs_rsp(s_hs_rsp)
  );

  i2c_eeprom #(.BUS_ADDR(EEPROM_BUS_ADDR), .ADDR_BITS(ADDR_BITS),
               .PAGE_BYTES(PAGE_BYTES)) u_eeprom (
    .clk, .rst_n, .hs_req(s_hs_req), .hs_rsp(s_hs_rsp), .busy(eeprom_busy)
  );

  // ---------------- the wires ----------------
  i2c_bus #(.N_DEV(3)) u_bus (
    .scl_drive_low({ext_scl_drive_low, s_scl_low, m_scl_low}),
    .sda_drive_low({ext_sda_drive_low, s_sda_low, m_sda_low}),
    .scl, .sda
  );

  // ---------------- direct path ----------------
  hs_req_t d_hs_req;
  hs_rsp_t d_hs_rsp;

  i2c_hslave_run #(.MAX_MSGS(MAX_MSGS), .MAX_BYTES(MAX_BYTES)) u_d_run (
    .clk, .rst_n, .txn_valid(d_txn_valid), .txn_ready(d_txn_ready), .n_msgs, .msgs,
    .wr_data, .reply_valid(d_reply_valid), .reply_status(d_reply_status),
    .replies(d_replies), .rd_data(d_rd_data), .active(d_active),
    .hs_req(d_hs_req), .hs_rsp(d_hs_rsp)
  );

  i2c_eeprom #(.BUS_ADDR(EEPROM_BUS_ADDR), .ADDR_BITS(ADDR_BITS),
               .PAGE_BYTES(PAGE_BYTES)) u_d_eeprom (
    .clk, .rst_n, .hs_req(d_hs_req), .hs_rsp(d_hs_rsp), .busy(d_eeprom_busy)
  );

  // ---------------- symbol-level path ----------------
  sym_t    l_bus_q;                 // symbol on the bus in this clock
  sym_t    l_m_next;                // master's next symbol
  logic    l_release;               // slave's SDA decision for the next symbol
  logic    l_res_valid, l_ev_valid;
  bres_t   l_res;
  bact_t   l_act;
  bev_t    l_ev;
  breact_t l_react;
  hs_req_t l_hs_req;
  hs_rsp_t l_hs_rsp;
  sym_t    l_merged, l_alt;
  logic    l_race, l_dead;
  sym_t    l_m_syms [1];

  i2c_bmaster u_l_byte_m (
    .clk, .rst_n, .sym_valid(1'b1), .sym(l_bus_q), .next_sym(l_m_next),
    .res_valid(l_res_valid), .res(l_res), .act(l_act)
  );

  i2c_hmaster #(.MAX_MSGS(MAX_MSGS), .MAX_BYTES(MAX_BYTES)) u_l_high_m (
    .clk, .rst_n, .res_valid(l_res_valid), .res(l_res), .act(l_act),
    .txn_valid(s_txn_valid), .txn_ready(s_txn_ready), .n_msgs, .msgs, .wr_data,
    .reply_valid(s_reply_valid), .reply_status(s_reply_status),
    .replies(s_replies), .rd_data(s_rd_data), .active(s_active)
  );

  i2c_bslave u_l_byte_s (
    .clk, .rst_n, .sym_valid(1'b1), .sym(l_bus_q), .release_sda(l_release),
    .ev_valid(l_ev_valid), .ev(l_ev), .react(l_react)
  );

  i2c_hslave_adapter u_l_high_s (
    .clk, .rst_n, .ev_valid(l_ev_valid), .ev(l_ev), .react(l_react),
    .hs_req(l_hs_req), .hs_rsp(l_hs_rsp)
  );

  i2c_eeprom #(.BUS_ADDR(EEPROM_BUS_ADDR), .ADDR_BITS(ADDR_BITS),
               .PAGE_BYTES(PAGE_BYTES)) u_l_eeprom (
    .clk, .rst_n, .hs_req(l_hs_req), .hs_rsp(l_hs_rsp), .busy(s_eeprom_busy)
  );

  assign l_m_syms[0] = l_m_next;

  // With one master a race cannot happen, and the slave only pulls SDA for
  // a bit the master clocks, so `l_race` and `l_dead` stay low (asserted
  // below).
  i2c_symbol_merge #(.N_MASTERS(1), .N_SLAVES(1)) u_l_merge (
    .master_syms(l_m_syms), .slave_release(l_release),
    .sym(l_merged), .alt_sym(l_alt), .race(l_race), .deadlock(l_dead)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) l_bus_q <= mk_sym(SYM_IDLE);
    else        l_bus_q <= l_merged;
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   !l_race && !l_dead && l_alt == mk_sym(SYM_IDLE))
    else $error("i2c_system: race or deadlock on the symbol-level path");

  // ---------------- symbol-level bus resolution ----------------
  i2c_symbol_merge #(.N_MASTERS(SM_MASTERS), .N_SLAVES(SM_SLAVES)) u_sym_merge (
    .master_syms(sm_master_syms), .slave_release(sm_slave_release),
    .sym(sm_sym), .alt_sym(sm_alt_sym), .race(sm_race), .deadlock(sm_deadlock)
  );

endmodule
