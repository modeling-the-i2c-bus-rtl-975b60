// i2c_eeprom: high-level slave model of a 24AA256-style serial EEPROM.
//
// Storage is 2**ADDR_BITS bytes behind one data-address register. A write
// message sets the register with its first ADDR_BYTES bytes (shifted in,
// most significant byte first); every further byte goes to a page buffer at
// the register's offset, and the register then advances inside its
// PAGE_BYTES-aligned page, wrapping at the page end. Only a STOP commits the
// page buffer to storage; a repeated START discards it. A read message
// returns the byte at the register and increments it, wrapping at the end
// of storage. The register is a shift register: a write that supplied only
// part of the address shifts in one extra bit, 1 when a repeated START
// follows, 0 when a STOP follows.
//
// Interface: the high-level slave calls of i2c_pkg (`hs_req`, answered
// combinationally in `hs_rsp`). All of the above follows the protocol
// model's EEPROM, which was checked against a real 24AA256.
//
// This design's own choices: the page buffer keeps a per-byte "written"
// mask instead of first copying the whole page in, which leaves storage
// the same after a commit. The commit then writes one byte per clock, so it
// takes PAGE_BYTES cycles after the STOP; like the real part during its
// write cycle, the device does not acknowledge its address meanwhile.
// Storage is not reset; the other registers reset to address 0, idle.
//
// Lint note: verilator reports rst_n as used both asynchronously and
// synchronously (SYNCASYNCNET). The synchronous use is only the
// `disable iff (!rst_n)` of the assertions below; the flops all reset
// asynchronously.
module i2c_eeprom
  import i2c_pkg::*;
#(
  parameter logic [6:0] BUS_ADDR   = 7'h50,
  parameter int         ADDR_BITS  = 15,
  parameter int         PAGE_BYTES = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  input  hs_req_t hs_req,
  output hs_rsp_t hs_rsp,
  output logic    busy      // page commit in progress
);

  localparam int SIZE       = 2 ** ADDR_BITS;
  localparam int ADDR_BYTES = (ADDR_BITS + 7) / 8;
  localparam int OFF_BITS   = $clog2(PAGE_BYTES);
  localparam int CNT_BITS   = $clog2(ADDR_BYTES + 1);

  typedef enum logic [1:0] { W_ADDRESS, W_WRITE, W_READ } wstate_t;
  typedef logic [ADDR_BITS-1:0] addr_t;
  typedef logic [OFF_BITS-1:0]  off_t;

  logic [7:0] mem [SIZE];
  logic [7:0] pbuf [PAGE_BYTES];
  logic [PAGE_BYTES-1:0] dirty_q, dirty_d;

  addr_t         addr_q, addr_d, addr_rd;
  wstate_t       ws_q, ws_d;
  logic [CNT_BITS-1:0] acnt_q, acnt_d;
  logic          busy_q;
  off_t          cidx_q;
  logic [ADDR_BITS-1:OFF_BITS] cpage_q;   // page being committed
  logic          start_commit;
  logic          buf_we;
  off_t          buf_idx;

  function automatic addr_t page_next(input addr_t a);
    off_t o;
    o = a[OFF_BITS-1:0] + off_t'(1);
    return {a[ADDR_BITS-1:OFF_BITS], o};
  endfunction

  wire partial_addr = (ws_q == W_ADDRESS) && (acnt_q != '0);

  always_comb begin
    addr_d       = addr_q;
    ws_d         = ws_q;
    acnt_d       = acnt_q;
    dirty_d      = dirty_q;
    start_commit = 1'b0;
    buf_we       = 1'b0;
    buf_idx      = addr_q[OFF_BITS-1:0];
    hs_rsp       = '0;

    // slaveAddress: a START has just happened.
    if (hs_req.addr_call) begin
      if (partial_addr) addr_d = {addr_q[ADDR_BITS-2:0], 1'b1};
      hs_rsp.addr_ack = (hs_req.addr == BUS_ADDR) && !busy_q;
      ws_d   = (hs_rsp.addr_ack && !hs_req.is_read) ? W_ADDRESS : W_READ;
      acnt_d = '0;
    end

    // slaveRead: byte at the register, then increment.
    addr_rd       = addr_d;
    hs_rsp.rdata  = mem[addr_rd];
    if (hs_req.read_call && (!hs_req.addr_call || hs_rsp.addr_ack))
      addr_d = addr_rd + addr_t'(1);

    // slaveWrite
    if (hs_req.write_call) begin
      hs_rsp.write_ack = 1'b1;
      unique case (ws_q)
        W_ADDRESS: begin
          addr_d = addr_t'({addr_q, hs_req.wdata});
          acnt_d = acnt_q + 1'b1;
          if (acnt_q == CNT_BITS'(ADDR_BYTES - 1)) ws_d = W_READ;
        end
        W_READ: begin                      // first data byte: new page
          dirty_d          = '0;
          dirty_d[buf_idx] = 1'b1;
          buf_we           = 1'b1;
          addr_d           = page_next(addr_q);
          ws_d             = W_WRITE;
        end
        default: begin                     // W_WRITE
          dirty_d[buf_idx] = 1'b1;
          buf_we           = 1'b1;
          addr_d           = page_next(addr_q);
        end
      endcase
    end

    // slaveStop
    if (hs_req.stop_call) begin
      if (ws_q == W_WRITE) start_commit = 1'b1;
      if (partial_addr)    addr_d = {addr_q[ADDR_BITS-2:0], 1'b0};
      ws_d   = W_READ;
      acnt_d = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (buf_we) pbuf[buf_idx] <= hs_req.wdata;
  end

  // Page commit, one byte per clock.
  always_ff @(posedge clk) begin
    if (busy_q && dirty_q[cidx_q])
      mem[{cpage_q, cidx_q}] <= pbuf[cidx_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q  <= '0;
      ws_q    <= W_READ;
      acnt_q  <= '0;
      dirty_q <= '0;
      busy_q  <= 1'b0;
      cidx_q  <= '0;
      cpage_q <= '0;
    end else begin
      addr_q  <= addr_d;
      ws_q    <= ws_d;
      acnt_q  <= acnt_d;
      dirty_q <= dirty_d;
      if (start_commit) begin
        busy_q  <= 1'b1;
        cidx_q  <= '0;
        cpage_q <= addr_q[ADDR_BITS-1:OFF_BITS];
      end else if (busy_q) begin
        cidx_q <= cidx_q + off_t'(1);
        if (cidx_q == off_t'(PAGE_BYTES - 1)) busy_q <= 1'b0;
      end
    end
  end

  assign busy = busy_q;

  // The adapter never issues a write or read call in the same cycle as STOP.
  assert property (@(posedge clk) disable iff (!rst_n)
                   hs_req.stop_call |-> !(hs_req.write_call || hs_req.read_call));

endmodule
