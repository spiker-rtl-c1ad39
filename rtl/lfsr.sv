// lfsr: maximal-length Fibonacci linear feedback shift register.
//
// The Spiker input interface uses one such register as the single random
// source shared by every input. Each cycle with `step` high the register
// shifts left by one and inserts the XOR of its tap bits at bit 0. The
// default 16-bit register uses the polynomial x^16 + x^14 + x^13 + x^11 + 1
// and so repeats every 2^16 - 1 steps; it never reaches 0. `load` restores
// SEED. `value` is the current state, to be read before the step takes
// effect. The width, taps and seed are this design's choices; the use of a
// single maximal LFSR for all inputs follows the published architecture.
module lfsr #(
  parameter int          WIDTH = 16,
  parameter logic [63:0] TAPS  = 64'hB400,   // bit i set: state bit i feeds back
  parameter logic [63:0] SEED  = 64'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             step,
  output logic [WIDTH-1:0] value
);

  logic feedback;

  // XOR of all tapped bits; bit WIDTH-1 of TAPS corresponds to x^WIDTH.
  always_comb feedback = ^(value & TAPS[WIDTH-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    value <= SEED[WIDTH-1:0];
    else if (load) value <= SEED[WIDTH-1:0];
    else if (step) value <= {value[WIDTH-2:0], feedback};
  end

  initial assert (SEED[WIDTH-1:0] != '0) else $error("lfsr: SEED must be non-zero");

endmodule
