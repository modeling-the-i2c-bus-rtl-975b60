// i2c_timing: timing/electrical layer between a device and the two wires.
//
// It does three things so that the layers above can work in discrete steps:
//   * samples SCL and SDA through a two-flop synchronizer (`bus_sample`);
//   * paces the device with a `step` pulse every STEP_DIV clocks;
//   * applies the device's requested line state (`dev_bus`, 1 = release)
//     to the open-drain drivers in a safe order: a falling SCL goes first,
//     then SDA, and a rising SCL goes last. After each change of SCL or SDA
//     the next change waits EDGE_GAP clocks. So SDA is never changed while
//     SCL is high except on purpose (START/STOP), SDA meets its set-up time
//     before SCL rises and its hold time after SCL falls.
// The protocol model asks for exactly this (sample at the right interval,
// SDA before a rising SCL with set-up time; its hardware test set SCL first
// when lowering it); the synchronizer, the divider and the single gap
// count are this design's own.
//
// Timing: STEP_DIV must exceed 2*EDGE_GAP + 4 so that a step sees the
// lines its previous request produced. With a 50 MHz clock the defaults
// give 5 us steps (Standard-mode, SCL about 67-100 kHz) and a 260 ns gap,
// above the 250 ns Standard-mode data set-up time.
module i2c_timing
  import i2c_pkg::*;
#(
  parameter int STEP_DIV = 250,
  parameter int EDGE_GAP = 13
) (
  input  logic clk,
  input  logic rst_n,
  // pins
  input  logic scl_i,
  input  logic sda_i,
  output logic scl_drive_low,
  output logic sda_drive_low,
  // device side
  output logic step,
  output bus_t bus_sample,
  input  bus_t dev_bus
);

  localparam int DIV_BITS = (STEP_DIV > 1) ? $clog2(STEP_DIV) : 1;
  localparam int GAP_BITS = $clog2(EDGE_GAP + 1);

  bus_t                sync1_q, sync2_q;
  logic [DIV_BITS-1:0] div_q;
  logic                scl_q, sda_q;   // applied line state, 1 = released
  logic [GAP_BITS-1:0] gap_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1_q <= BUS_IDLE;
      sync2_q <= BUS_IDLE;
      div_q   <= '0;
      step    <= 1'b0;
      scl_q   <= 1'b1;
      sda_q   <= 1'b1;
      gap_q   <= '0;
    end else begin
      sync1_q <= '{scl: scl_i, sda: sda_i};
      sync2_q <= sync1_q;

      if (div_q == DIV_BITS'(STEP_DIV - 1)) begin
        div_q <= '0;
        step  <= 1'b1;
      end else begin
        div_q <= div_q + 1'b1;
        step  <= 1'b0;
      end

      if (!dev_bus.scl && scl_q) begin          // SCL falls first
        scl_q <= 1'b0;
        gap_q <= GAP_BITS'(EDGE_GAP);
      end else if (gap_q != '0) begin
        gap_q <= gap_q - 1'b1;
      end else if (dev_bus.sda != sda_q) begin  // then SDA
        sda_q <= dev_bus.sda;
        gap_q <= GAP_BITS'(EDGE_GAP);
      end else if (dev_bus.scl && !scl_q) begin // SCL rises last
        scl_q <= 1'b1;
        gap_q <= GAP_BITS'(EDGE_GAP);
      end
    end
  end

  assign bus_sample    = sync2_q;
  assign scl_drive_low = !scl_q;
  assign sda_drive_low = !sda_q;

  initial assert (STEP_DIV == 1 || STEP_DIV > 2 * EDGE_GAP + 4)
    else $error("i2c_timing: STEP_DIV too small for EDGE_GAP");

endmodule
