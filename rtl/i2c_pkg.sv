// i2c_pkg: types shared by every layer of the layered I2C stack.
//
// The stack is a chain of state machines. Each layer talks to the layer
// above it through a "call": in the cycle where the lower layer has
// something for the upper one it raises a valid flag and presents an event;
// the upper layer answers combinationally in the same cycle and updates its
// own state on the clock edge. A layer that is not called keeps its state.
// The structs below are the payloads of those calls.
//
// Line values follow the wire convention: 1 = released (pulled high),
// 0 = driven low. The layer types mirror the symbol, byte and high-level
// interfaces of the protocol model; the valid-flag call convention and the
// bit encodings are this design's own.
package i2c_pkg;

  // Sampled or requested state of the two wires.
  typedef struct packed {
    logic scl;
    logic sda;
  } bus_t;

  localparam bus_t BUS_IDLE  = '{scl: 1'b1, sda: 1'b1};
  localparam bus_t BUS_LOWDA = '{scl: 1'b1, sda: 1'b0};

  // Symbol layer: 0 bit, 1 bit, START, STOP, and the idle marker.
  typedef enum logic [1:0] {
    SYM_IDLE  = 2'd0,
    SYM_START = 2'd1,
    SYM_STOP  = 2'd2,
    SYM_BIT   = 2'd3
  } sym_kind_t;

  typedef struct packed {
    sym_kind_t kind;
    logic      bit_val;   // meaningful for SYM_BIT only
  } sym_t;

  // Byte layer, master side.
  typedef enum logic [2:0] {
    BACT_IDLE  = 3'd0,
    BACT_START = 3'd1,
    BACT_STOP  = 3'd2,
    BACT_WRITE = 3'd3,
    BACT_READ  = 3'd4
  } bact_kind_t;

  typedef struct packed {
    bact_kind_t kind;
    logic [7:0] data;     // byte to write for BACT_WRITE
  } bact_t;

  typedef enum logic [2:0] {
    BRES_OK       = 3'd0,
    BRES_NACK     = 3'd1,
    BRES_READ     = 3'd2,
    BRES_ARB_LOST = 3'd3,
    BRES_UNDEF    = 3'd4
  } bres_kind_t;

  typedef struct packed {
    bres_kind_t kind;
    logic [7:0] data;     // byte read for BRES_READ
  } bres_t;

  // Byte layer, slave side.
  typedef enum logic [1:0] {
    BEV_START   = 2'd0,
    BEV_STOP    = 2'd1,
    BEV_RECEIVE = 2'd2,
    BEV_ACK     = 2'd3
  } bev_kind_t;

  typedef struct packed {
    bev_kind_t  kind;
    logic [7:0] data;     // received byte for BEV_RECEIVE
  } bev_t;

  typedef enum logic [1:0] {
    BREACT_IDLE     = 2'd0,
    BREACT_TRANSMIT = 2'd1,
    BREACT_RECEIVE  = 2'd2
  } breact_kind_t;

  typedef struct packed {
    breact_kind_t kind;
    logic [7:0]   data;   // byte to send for BREACT_TRANSMIT
  } breact_t;

  // High-level slave calls. Several calls can fall in one cycle; they then
  // apply in the order address, read (a read message answers its address
  // byte and supplies its first data byte in the same step).
  typedef struct packed {
    logic       addr_call;   // slaveAddress
    logic [6:0] addr;
    logic       is_read;
    logic       read_call;   // slaveRead
    logic       write_call;  // slaveWrite
    logic [7:0] wdata;
    logic       stop_call;   // slaveStop
  } hs_req_t;

  typedef struct packed {
    logic       addr_ack;
    logic [7:0] rdata;
    logic       write_ack;
  } hs_rsp_t;

  // High-level master: one message of a transaction.
  typedef struct packed {
    logic [6:0] addr;
    logic       is_read;
    logic [7:0] len;          // bytes to write, or read size (at least 1)
    logic       variable;     // read: add the first byte read to the size
    logic       non_critical; // a NACK does not abort the transaction
  } msg_t;

  typedef struct packed {
    logic       acked;
    logic [8:0] count;        // bytes read, or written bytes acknowledged
  } msg_reply_t;

  typedef enum logic [1:0] {
    TR_SUCCESS   = 2'd0,
    TR_ARB_LOST  = 2'd1,
    TR_UNDEFINED = 2'd2
  } tr_status_t;

  function automatic sym_t mk_bit(input logic b);
    return '{kind: SYM_BIT, bit_val: b};
  endfunction

  function automatic sym_t mk_sym(input sym_kind_t k);
    return '{kind: k, bit_val: 1'b0};
  endfunction

endpackage
