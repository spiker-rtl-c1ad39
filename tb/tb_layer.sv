// tb_layer: self-checking testbench of a layer with its layer CU.
// A reduced layer (12 inputs, 5 neurons, leak shift 2 so the leak is
// visible) runs random time steps: sparse random input spikes, a weight
// table served with one cycle of read latency as the block RAMs do, random
// per-neuron thresholds. After each step the membrane potentials and output
// spikes are compared with a step-level model (leak, then every excitatory
// spike in index order, then every inhibitory spike of the previous step to
// all other neurons, then the fire check), and the cycles from start to
// done with the expected 3, plus 1 if any spike is present, plus N_IN if an
// input spiked, plus N_NEURONS if a neuron spiked in the previous step. The skip, excitatory and inhibitory phases
// and the membrane reset must each occur.
module tb_layer;
  import spiker_pkg::*;
  localparam int NI = 12, NN = 5, SH = 2;

  logic          clk = 0, rst_n = 0, start = 0, reset_v = 0, vth_load = 0;
  logic          ready, done, exc_rd, exc_phase, inh_phase, skipped;
  logic [NI-1:0] in_spikes = '0;
  logic [3:0]    exc_idx;
  logic [2:0]    vth_idx = '0;
  v_t            vth_data = '0;
  weight_t       exc_weights [NN];
  logic [NN-1:0] out_spikes;
  v_t            v_mem [NN];

  weight_t       wtab [NI][NN];
  int            mv [NN], mvth [NN];
  logic [NN-1:0] mspk;
  int checks = 0, failures = 0, n_skip = 0, n_exc = 0, n_inh = 0, n_fire = 0, n_reset = 0;

  layer #(.N_IN(NI), .N_NEURONS(NN), .DECAY_SHIFT(SH)) dut (
    .clk, .rst_n, .start, .ready, .done, .reset_v, .in_spikes, .exc_idx, .exc_rd,
    .exc_weights, .inh_weight(W_INH_DEF), .v_reset(V_RESET_DEF), .vth_load, .vth_idx,
    .vth_data, .out_spikes, .v_mem, .exc_phase, .inh_phase, .skipped);

  // block-RAM-like weight source: registered read
  always_ff @(posedge clk)
    if (exc_rd) for (int n = 0; n < NN; n++) exc_weights[n] <= wtab[exc_idx][n];

  always_ff @(posedge clk) begin
    if (skipped)   n_skip++;
    if (exc_phase) n_exc++;
    if (inh_phase) n_inh++;
  end

  always #5 clk = ~clk;

  function automatic int sat(int x);
    return (x > 32767) ? 32767 : (x < -32768) ? -32768 : x;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (wtab[i, n]) wtab[i][n] = weight_t'($urandom_range(8, 31));
    foreach (mv[n]) begin mv[n] = 0; mvth[n] = int'(V_TH0_DEF); end
    mspk = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // per-neuron thresholds
    for (int n = 0; n < NN; n++) begin
      @(negedge clk);
      vth_load = 1; vth_idx = 3'(n); vth_data = v_t'(60 + 20 * n);
      mvth[n] = 60 + 20 * n;
    end
    @(negedge clk);
    vth_load = 0;
    for (int s = 0; s < 400; s++) begin
      int cycles, exp_cycles;
      logic [NN-1:0] inh;
      // end-of-sample membrane reset now and then
      if (s % 100 == 99) begin
        reset_v = 1;
        @(negedge clk);
        reset_v = 0;
        foreach (mv[n]) mv[n] = 0;
        mspk = '0;
        n_reset++;
        for (int n = 0; n < NN; n++) check(v_mem[n] == 0 && !out_spikes[n], "reset_v");
      end
      // sparse input: about a third of the steps carry spikes
      in_spikes = ($urandom_range(0, 2) == 0) ? NI'($urandom() & $urandom()) : '0;
      inh = mspk;
      check(ready, "ready before start");
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      // model of the step
      foreach (mv[n]) mv[n] = sat(mv[n] - (mv[n] >>> SH));
      for (int i = 0; i < NI; i++)
        if (in_spikes[i]) foreach (mv[n]) mv[n] = sat(mv[n] + int'(wtab[i][n]));
      for (int j = 0; j < NN; j++)
        if (inh[j]) foreach (mv[n]) if (n != j) mv[n] = sat(mv[n] + int'(W_INH_DEF));
      foreach (mv[n]) begin
        mspk[n] = (mv[n] > mvth[n]);
        if (mspk[n]) begin mv[n] = int'(V_RESET_DEF); n_fire++; end
      end
      exp_cycles = 3 + ((in_spikes != 0 || inh != 0) ? 1 : 0) + ((in_spikes != 0) ? NI : 0) +
                   ((inh != 0) ? NN : 0);
      check(cycles == exp_cycles, $sformatf("step %0d cycles %0d expected %0d", s, cycles, exp_cycles));
      check(out_spikes == mspk, $sformatf("step %0d spikes %b expected %b", s, out_spikes, mspk));
      for (int n = 0; n < NN; n++)
        check(int'(v_mem[n]) == mv[n], $sformatf("step %0d v[%0d]=%0d expected %0d", s, n, v_mem[n], mv[n]));
    end
    $display("skipped=%0d exc=%0d inh=%0d fires=%0d resets=%0d", n_skip, n_exc, n_inh, n_fire, n_reset);
    checks++;
    if (n_skip == 0 || n_exc == 0 || n_inh == 0 || n_fire == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
