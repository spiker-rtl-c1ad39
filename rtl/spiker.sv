// spiker: clock-driven spiking neural network accelerator, top level.
//
// The network turns each input value into a rate-coded spike train
// (input_interface, one shared LFSR), runs N_STEPS time steps of a fully
// connected layer of N_NEURONS Leaky Integrate-and-Fire neurons with lateral
// inhibition (layer), fetching the 5-bit weights of each input spike from
// parallel block RAMs (weight_mem), and counts the output spikes of every
// neuron (output_interface). The central control unit (network_cu) sequences
// the steps. The default configuration is the MNIST network: 784 inputs
// (28x28 pixels, 8 bits), 400 neurons, 3500 steps of 0.1 ms, dt/tau = 2**-10,
// V_reset = 5 mV, threshold 13 mV, inhibitory weight -15 (all potentials
// with the rest value shifted to 0, 16-bit with 3 fractional bits).
//
// Use: while idle, load the pixels (pix_*), the weights (w_*: one write per
// input index and group of WPW neurons) and, if wanted, one threshold per
// neuron (vth_*; all start at V_TH0). Pulse `start`; `busy` stays high for
// the whole sample and `done` pulses when `counts` hold the spike count of
// every neuron. Each time step takes 3 cycles when no spike is present; a
// step with spikes takes one cycle more, plus N_IN cycles if an input spiked
// and N_NEURONS cycles if a neuron spiked in the previous step. The status pulses exc_phase, inh_phase and
// skipped tell which happened in each step.
//
// The structure follows the published accelerator in its single-layer MNIST
// configuration; the host ports, the handshakes and the cycle timing are this
// design's own.
module spiker
  import spiker_pkg::*;
#(
  parameter int N_IN        = 784,
  parameter int N_NEURONS   = 400,
  parameter int N_STEPS     = 3500,
  parameter int DECAY_SHIFT = DECAY_SHIFT_DEF,
  parameter int LFSR_W      = 16,
  parameter int RATE_SHIFT  = 1,
  parameter int WPW         = 14,
  parameter int BRAM_DEPTH  = 512,
  parameter v_t V_RESET     = V_RESET_DEF,
  parameter v_t W_INH       = W_INH_DEF,
  localparam int AW_IN = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int AW_N  = (N_NEURONS > 1) ? $clog2(N_NEURONS) : 1,
  localparam int COLS  = (N_NEURONS + WPW - 1) / WPW,
  localparam int CLW   = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int CNT_W = $clog2(N_STEPS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic [CNT_W-1:0]     step,
  // input values
  input  logic                 pix_we,
  input  logic [AW_IN-1:0]     pix_addr,
  input  logic [PIX_W-1:0]     pix_data,
  input  logic                 seed_load,
  // weights
  input  logic                 w_we,
  input  logic [AW_IN-1:0]     w_idx,
  input  logic [CLW-1:0]       w_col,
  input  logic [WPW*W_W-1:0]   w_data,
  // per-neuron thresholds
  input  logic                 vth_load,
  input  logic [AW_N-1:0]      vth_idx,
  input  v_t                   vth_data,
  // results
  output logic [CNT_W-1:0]     counts [N_NEURONS],
  output logic [N_NEURONS-1:0] out_spikes,
  output logic                 exc_phase,
  output logic                 inh_phase,
  output logic                 skipped
);

  logic                 gen, cnt_clear, count, reset_v, layer_start;
  logic                 layer_ready, layer_done;
  logic [N_IN-1:0]      in_spikes;
  logic [AW_IN-1:0]     exc_idx;
  logic                 exc_rd;
  weight_t              exc_weights [N_NEURONS];
  v_t                   v_mem [N_NEURONS];

  network_cu #(.N_STEPS(N_STEPS), .N_LAYERS(1)) u_cu (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .busy       (busy),
    .done       (done),
    .gen        (gen),
    .cnt_clear  (cnt_clear),
    .count      (count),
    .reset_v    (reset_v),
    .layer_start(layer_start),
    .layer_ready(layer_ready),
    .layer_done (layer_done),
    .step       (step)
  );

  input_interface #(.N_IN(N_IN), .LFSR_W(LFSR_W), .RATE_SHIFT(RATE_SHIFT)) u_in (
    .clk      (clk),
    .rst_n    (rst_n),
    .pix_we   (pix_we),
    .pix_addr (pix_addr),
    .pix_data (pix_data),
    .seed_load(seed_load),
    .gen      (gen),
    .spikes   (in_spikes)
  );

  weight_mem #(.N_IN(N_IN), .N_NEURONS(N_NEURONS), .WPW(WPW), .BRAM_DEPTH(BRAM_DEPTH)) u_wmem (
    .clk    (clk),
    .rd_en  (exc_rd),
    .rd_idx (exc_idx),
    .we     (w_we),
    .wr_idx (w_idx),
    .wr_col (w_col),
    .wr_data(w_data),
    .weights(exc_weights)
  );

  layer #(.N_IN(N_IN), .N_NEURONS(N_NEURONS), .DECAY_SHIFT(DECAY_SHIFT)) u_layer (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (layer_start),
    .ready      (layer_ready),
    .done       (layer_done),
    .reset_v    (reset_v),
    .in_spikes  (in_spikes),
    .exc_idx    (exc_idx),
    .exc_rd     (exc_rd),
    .exc_weights(exc_weights),
    .inh_weight (W_INH),
    .v_reset    (V_RESET),
    .vth_load   (vth_load),
    .vth_idx    (vth_idx),
    .vth_data   (vth_data),
    .out_spikes (out_spikes),
    .v_mem      (v_mem),
    .exc_phase  (exc_phase),
    .inh_phase  (inh_phase),
    .skipped    (skipped)
  );

  output_interface #(.N_OUT(N_NEURONS), .N_STEPS(N_STEPS)) u_out (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (cnt_clear),
    .count (count),
    .spikes(out_spikes),
    .counts(counts)
  );

  // The host may only load weights while no sample is being processed.
  assert property (@(posedge clk) disable iff (!rst_n) w_we |-> !busy)
    else $error("spiker: weight write while busy");

endmodule
