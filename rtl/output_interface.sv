// output_interface: one spike counter per output neuron.
//
// `clear` zeroes all counters (start of an input sample); `count` adds each
// bit of `spikes` to its neuron's counter. Because every neuron sees the
// same sequence length, the raw counts are proportional to the firing rates
// and are not normalised; the most active neuron gives the class. The
// counters saturate at their maximum. Counts are visible on `counts` the
// cycle after the `count` pulse.
//
// Simple counters, one per output neuron, and no normalisation follow the
// published design; the width (enough for N_STEPS spikes), saturation and
// clear priority are this design's own.
module output_interface #(
  parameter int N_OUT   = 400,
  parameter int N_STEPS = 3500,
  localparam int CNT_W  = $clog2(N_STEPS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             count,
  input  logic [N_OUT-1:0] spikes,
  output logic [CNT_W-1:0] counts [N_OUT]
);

  for (genvar i = 0; i < N_OUT; i++) begin : g_cnt
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                       counts[i] <= '0;
      else if (clear)                                   counts[i] <= '0;
      else if (count && spikes[i] && (counts[i] != '1)) counts[i] <= counts[i] + 1'b1;
    end
  end

endmodule
