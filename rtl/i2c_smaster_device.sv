// i2c_smaster_device: master symbol layer (symbols <-> wire states).
//
// Each step it parses the bus with i2c_symbol_reader. When a symbol is
// seen it is handed up (`up_valid`, `up_sym`) and the layer above answers in
// the same cycle with the next symbol to generate (`up_next`). That symbol
// is produced as a sequence of requested wire states, each one held until
// the bus shows it, so a slave holding SCL low (clock stretching) simply
// delays the sequence:
//   TX_IDLE        request both lines released
//   TX_START_WAIT  wait for an idle bus, then pull SDA low (START)
//   TX_STOP_WAIT   request SCL high/SDA low; once seen, release both (STOP)
//   TX_BIT_PREP    if SCL is high pull it low with SDA = bit, otherwise
//                  release SCL with SDA = bit and go to TX_BIT_WAIT
//   TX_BIT_WAIT    hold SCL released with SDA = bit until SCL is seen high,
//                  then pull SCL low and release SDA
// The states and transitions follow the protocol model's master symbol
// state machine; SDA is released during SCL-low periods, the simplest of
// the options the model discusses.
//
// Interface: `step` paces the device; `bus_in` is the sampled bus (the
// wired-AND of all devices), `bus_out` the registered request for this
// device's drivers (1 = release). The upper layer must obey the sequencing
// rules of the symbol layer (no START after START or IDLE, no STOP after
// STOP or IDLE, no IDLE between bits), otherwise extra symbols appear.
module i2c_smaster_device
  import i2c_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  input  bus_t bus_in,
  output bus_t bus_out,
  // to the byte layer
  output logic up_valid,
  output sym_t up_sym,
  input  sym_t up_next
);

  typedef enum logic [2:0] {
    TX_IDLE, TX_BIT_PREP, TX_BIT_WAIT, TX_START_WAIT, TX_STOP_WAIT
  } tx_state_t;

  tx_state_t st_q, tmp_st, st_d;
  logic      bit_q, tmp_bit, bit_d;
  bus_t      out_d;

  i2c_symbol_reader u_reader (
    .clk, .rst_n, .step, .bus(bus_in), .sym_valid(up_valid), .sym(up_sym)
  );

  always_comb begin
    // A parsed symbol selects the next symbol to generate.
    tmp_st  = st_q;
    tmp_bit = bit_q;
    if (up_valid) begin
      tmp_bit = up_next.bit_val;
      unique case (up_next.kind)
        SYM_IDLE:  tmp_st = TX_IDLE;
        SYM_START: tmp_st = TX_START_WAIT;
        SYM_STOP:  tmp_st = TX_STOP_WAIT;
        default:   tmp_st = TX_BIT_PREP;
      endcase
    end
    st_d  = tmp_st;
    bit_d = tmp_bit;
    out_d = BUS_IDLE;
    unique case (tmp_st)
      TX_IDLE: out_d = BUS_IDLE;
      TX_START_WAIT:
        if (bus_in == BUS_IDLE) begin
          st_d  = TX_IDLE;
          out_d = BUS_LOWDA;
        end else begin
          out_d = BUS_IDLE;
        end
      TX_STOP_WAIT:
        if (bus_in == BUS_LOWDA) begin
          st_d  = TX_IDLE;
          out_d = BUS_IDLE;
        end else begin
          out_d = BUS_LOWDA;
        end
      TX_BIT_PREP:
        if (bus_in.scl) begin
          out_d = '{scl: 1'b0, sda: tmp_bit};
        end else begin
          st_d  = TX_BIT_WAIT;
          out_d = '{scl: 1'b1, sda: tmp_bit};
        end
      default: // TX_BIT_WAIT
        if (bus_in.scl) begin
          st_d  = TX_IDLE;
          out_d = '{scl: 1'b0, sda: 1'b1};
        end else begin
          out_d = '{scl: 1'b1, sda: tmp_bit};
        end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= TX_IDLE;
      bit_q   <= 1'b1;
      bus_out <= BUS_IDLE;
    end else if (step) begin
      st_q    <= st_d;
      bit_q   <= bit_d;
      bus_out <= out_d;
    end
  end

endmodule
