// layer: a fully connected layer of N_NEURONS LIF neurons updated in
// parallel, with optional lateral inhibition between its neurons.
//
// The layer CU (layer_cu) walks through one time step per `start`. At start
// the N_IN input spikes and the layer's own output spikes of the previous
// step are sampled into registers. The OR of each register tells the CU
// whether an excitatory or an inhibitory phase is needed; a step without
// any spike only applies the leak and the fire check. In the excitatory
// phase a multiplexer presents sampled input `idx` to all neurons at once,
// one input per cycle, while `exc_idx`/`exc_rd` fetch that input's weights
// (one per neuron) from the weight memory, which returns them on
// `exc_weights` one cycle later; the command and spike bit are delayed one
// cycle to meet them. In the inhibitory phase the sampled output spike of
// neuron j is presented to every neuron except neuron j itself, with the
// common inhibitory weight `inh_weight`. `out_spikes` are the neurons'
// spikes of the last completed step, valid when `done` pulses.
//
// `reset_v` (from the network CU, only while ready) returns all membranes to
// the rest value and clears the output spikes. The threshold of neuron i is
// written by `vth_load` with `vth_idx` = i.
//
// Following the published layer: input and output spike sampling, the
// exc/inh ORs used to skip empty steps, the one-by-one presentation with
// excitatory spikes before inhibitory ones, and the index output used to
// address the weights. This design's choices: no neuron inhibits itself,
// one common inhibitory weight, and the one-cycle weight latency.
module layer
  import spiker_pkg::*;
#(
  parameter int N_IN        = 784,
  parameter int N_NEURONS   = 400,
  parameter int DECAY_SHIFT = DECAY_SHIFT_DEF,
  localparam int AW_IN = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int AW_N  = (N_NEURONS > 1) ? $clog2(N_NEURONS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 ready,
  output logic                 done,
  input  logic                 reset_v,
  input  logic [N_IN-1:0]      in_spikes,
  // weight memory
  output logic [AW_IN-1:0]     exc_idx,
  output logic                 exc_rd,
  input  weight_t              exc_weights [N_NEURONS],
  // model constants and thresholds
  input  v_t                   inh_weight,
  input  v_t                   v_reset,
  input  logic                 vth_load,
  input  logic [AW_N-1:0]      vth_idx,
  input  v_t                   vth_data,
  // results and status
  output logic [N_NEURONS-1:0] out_spikes,
  output v_t                   v_mem [N_NEURONS],
  output logic                 exc_phase,
  output logic                 inh_phase,
  output logic                 skipped
);

  localparam int CW = $clog2((N_IN > N_NEURONS ? N_IN : N_NEURONS) + 1);

  logic [N_IN-1:0]      in_sampled;
  logic [N_NEURONS-1:0] inh_sampled;
  logic                 exc_or, inh_or, sample;
  neuron_cmd_e          cmd_next, cmd_q, cmd_n;
  logic [CW-1:0]        idx;
  logic                 spike_q;
  logic [CW-1:0]        idx_q;

  layer_cu #(.N_IN(N_IN), .N_NEURONS(N_NEURONS)) u_cu (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .exc_or   (exc_or),
    .inh_or   (inh_or),
    .ready    (ready),
    .sample   (sample),
    .cmd      (cmd_next),
    .idx      (idx),
    .exc_rd   (exc_rd),
    .exc_phase(exc_phase),
    .inh_phase(inh_phase),
    .skipped  (skipped),
    .done     (done)
  );

  // SAMPLE IN SPIKES / SAMPLE OUT SPIKES
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sampled  <= '0;
      inh_sampled <= '0;
    end else if (sample) begin
      in_sampled  <= in_spikes;
      inh_sampled <= out_spikes;
    end
  end

  always_comb begin
    exc_or  = |in_sampled;
    inh_or  = |inh_sampled;
    exc_idx = AW_IN'(idx);
  end

  // Command pipeline: aligns the spike bit with the weights read this cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_q   <= CMD_NOP;
      spike_q <= 1'b0;
      idx_q   <= '0;
    end else begin
      cmd_q <= cmd_next;
      idx_q <= idx;
      if (cmd_next == CMD_EXC)      spike_q <= in_sampled[AW_IN'(idx)];
      else if (cmd_next == CMD_INH) spike_q <= inh_sampled[AW_N'(idx)];
      else                          spike_q <= 1'b0;
    end
  end

  always_comb cmd_n = reset_v ? CMD_RESET : cmd_q;

  for (genvar i = 0; i < N_NEURONS; i++) begin : g_neuron
    logic in_spike;
    // An inhibitory spike reaches every neuron but the one that fired it.
    always_comb in_spike = spike_q && !((cmd_q == CMD_INH) && (idx_q == CW'(i)));

    neuron #(.DECAY_SHIFT(DECAY_SHIFT)) u_neuron (
      .clk       (clk),
      .rst_n     (rst_n),
      .cmd       (cmd_n),
      .in_spike  (in_spike),
      .exc_weight(exc_weights[i]),
      .inh_weight(inh_weight),
      .v_reset   (v_reset),
      .vth_init  (vth_data),
      .vth_load  (vth_load && (vth_idx == AW_N'(i))),
      .out_spike (out_spikes[i]),
      .v         (v_mem[i])
    );
  end

  assert property (@(posedge clk) disable iff (!rst_n) reset_v |-> ready)
    else $error("layer: reset_v while a step is running");

endmodule
