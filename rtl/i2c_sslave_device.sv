// i2c_sslave_device: slave symbol layer (symbols <-> wire states).
//
// Each step it parses the bus with i2c_symbol_reader and, when a symbol is
// seen, hands it up (`up_valid`, `up_sym`). The layer above answers in the
// same cycle with `up_release`: 1 leaves SDA released, 0 turns the next
// 1 bit into a 0 bit by pulling SDA low. Without a symbol the previous SDA
// decision is kept. A slave never drives SCL here: clock stretching is not
// generated (the protocol model only accepts it), so `bus_out.scl` is
// always 1.
//
// Interface: `step` paces the device, `bus_in` is the sampled bus,
// `bus_out` the registered request for this device's drivers. Reset (this
// design's choice) releases SDA.
module i2c_sslave_device
  import i2c_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  input  bus_t bus_in,
  output bus_t bus_out,
  output logic up_valid,
  output sym_t up_sym,
  input  logic up_release
);

  logic release_q;

  i2c_symbol_reader u_reader (
    .clk, .rst_n, .step, .bus(bus_in), .sym_valid(up_valid), .sym(up_sym)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        release_q <= 1'b1;
    else if (up_valid) release_q <= up_release;
  end

  assign bus_out = '{scl: 1'b1, sda: release_q};

endmodule
