// input_interface: rate (Poisson-like) spike encoder for all network inputs.
//
// Each input value (for MNIST, the 8-bit intensity of one pixel) is held in a
// register written by the host through a simple write port (pix_we,
// pix_addr, pix_data). When the network CU pulses `gen`, one new spike is
// produced for every input in parallel: input i spikes when the shared
// pseudo-random number n is below its value scaled to the random range,
//     spike[i] = n < (pixel[i] << RATE_SHIFT),
// so its spike probability per step is pixel * 2**RATE_SHIFT / 2**LFSR_W.
// The spikes are registered and stay stable until the next `gen`; the LFSR
// advances on every `gen`, so all inputs share a single random value per step.
//
// Following the published design: one LFSR for every input, one spike per
// step and input, spike probability proportional to the input value. This
// design's choices: LFSR width 16, RATE_SHIFT 1 (pixel 255 spikes with
// probability 0.0078 per step, close to the 0.0064 of a 63.75 Hz maximum
// rate at dt = 0.1 ms), the "spike when n is below the value" direction, and
// the host write port. `seed_load` restarts the random sequence.
module input_interface
  import spiker_pkg::*;
#(
  parameter int N_IN       = 784,
  parameter int LFSR_W     = 16,
  parameter int RATE_SHIFT = 1,
  localparam int AW = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host load of the input values
  input  logic                  pix_we,
  input  logic [AW-1:0]         pix_addr,
  input  logic [PIX_W-1:0]      pix_data,
  input  logic                  seed_load,
  // from the network CU
  input  logic                  gen,
  // spikes of the current step, one per input
  output logic [N_IN-1:0]       spikes
);

  logic [PIX_W-1:0]  pixel [N_IN];
  logic [LFSR_W-1:0] rnd;

  lfsr #(.WIDTH(LFSR_W)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .load (seed_load),
    .step (gen),
    .value(rnd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_IN; i++) pixel[i] <= '0;
    end else if (pix_we) begin
      pixel[pix_addr] <= pix_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) spikes <= '0;
    else if (gen) begin
      for (int i = 0; i < N_IN; i++)
        spikes[i] <= ({1'b0, rnd} < ({(LFSR_W+1)'(pixel[i])} << RATE_SHIFT));
    end
  end

  initial assert (PIX_W + RATE_SHIFT <= LFSR_W)
    else $error("input_interface: scaled input wider than the random number");

endmodule
