// tb_spiker: end-to-end, self-checking testbench of the accelerator at its
// default (MNIST) size: 784 inputs, 400 neurons, 3500 time steps.
//
// It loads a sparse random weight table (about one weight in eight
// non-zero, so that only some neurons fire), a threshold per neuron, and a
// synthetic 28x28 "digit" (a bright stroke with grey edges), runs two input
// samples and after each compares every neuron's spike count with a
// step-by-step integer model of the network: the shared 16-bit LFSR
// (s15 ^ s13 ^ s12 ^ s10 feedback, seed ACE1), spike = n < 2 * pixel, leak
// V -= V >>> 10, excitatory inputs in index order, inhibition (-15 mV) from
// every other neuron that fired in the previous step, fire when V > V_th,
// reset to 5 mV. It also checks the total cycle count of each sample
// against the timing of the control units (3 cycles per empty step, one
// more plus 784 for an excitatory phase and plus 400 for an inhibitory
// phase, 2 cycles of start/end overhead) and that the membranes are back at
// rest after the sample. Each mechanism (skipped step, excitatory phase,
// inhibitory phase, firing with reset to V_reset, non-zero leak, end-of-sample
// reset, per-neuron thresholds) is counted and must happen at least once.
module tb_spiker;
  import spiker_pkg::*;
  localparam int NI = 784, NN = 400, NS = 3500, WPW = 14;
  localparam int COLS = (NN + WPW - 1) / WPW;
  localparam int CW = $clog2(NS + 1);

  logic                clk = 0, rst_n = 0, start = 0;
  logic                busy, done;
  logic [CW-1:0]       step;
  logic                pix_we = 0, seed_load = 0, w_we = 0, vth_load = 0;
  logic [9:0]          pix_addr = '0, w_idx = '0;
  logic [7:0]          pix_data = '0;
  logic [4:0]          w_col = '0;
  logic [WPW*W_W-1:0]  w_data = '0;
  logic [8:0]          vth_idx = '0;
  v_t                  vth_data = '0;
  logic [CW-1:0]       counts [NN];
  logic [NN-1:0]       out_spikes;
  logic                exc_phase, inh_phase, skipped;

  spiker dut (
    .clk, .rst_n, .start, .busy, .done, .step,
    .pix_we, .pix_addr, .pix_data, .seed_load,
    .w_we, .w_idx, .w_col, .w_data,
    .vth_load, .vth_idx, .vth_data,
    .counts, .out_spikes, .exc_phase, .inh_phase, .skipped);

  always #5 clk = ~clk;

  // model state
  byte unsigned  wtab [NI][NN];
  int            pix [NI];
  int            mv [NN], mvth [NN], mcnt [NN];
  logic [NN-1:0] mspk;
  logic [15:0]   rnd;
  int checks = 0, failures = 0;
  int n_skip = 0, n_exc = 0, n_inh = 0, n_fire = 0, n_leak = 0, n_endreset = 0, n_vth = 0;
  int m_skip, m_exc, m_inh;

  always_ff @(posedge clk) begin
    if (skipped)   n_skip++;
    if (exc_phase) n_exc++;
    if (inh_phase) n_inh++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int sat(int x);
    return (x > 32767) ? 32767 : (x < -32768) ? -32768 : x;
  endfunction

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // synthetic digit: a ring-like stroke of radius ~8 with soft edges
  task automatic make_image(int cx, int cy, int r);
    for (int y = 0; y < 28; y++)
      for (int x = 0; x < 28; x++) begin
        int d2, d, p;
        d2 = (x - cx) * (x - cx) + (y - cy) * (y - cy);
        d = (d2 > r * r) ? d2 - r * r : r * r - d2;
        if (d < 8)       p = 255 - $urandom_range(0, 20);
        else if (d < 20) p = $urandom_range(40, 200);
        else             p = 0;
        pix[y * 28 + x] = p;
      end
  endtask

  task automatic load_image();
    for (int i = 0; i < NI; i++) begin
      @(negedge clk);
      pix_we = 1; pix_addr = 10'(i); pix_data = 8'(pix[i]);
    end
    @(negedge clk);
    pix_we = 0;
  endtask

  // model of one complete sample; returns the expected cycle count
  function automatic int model_sample();
    int cyc;
    logic [NI-1:0] sp;
    logic [NN-1:0] inh;
    cyc = 2;
    m_skip = 0; m_exc = 0; m_inh = 0;
    foreach (mcnt[n]) mcnt[n] = 0;
    for (int s = 0; s < NS; s++) begin
      for (int i = 0; i < NI; i++) sp[i] = (32'(rnd) < 32'(2 * pix[i]));
      rnd = {rnd[14:0], rnd[15] ^ rnd[13] ^ rnd[12] ^ rnd[10]};
      inh = mspk;
      foreach (mv[n]) begin
        int d;
        d = mv[n] >>> DECAY_SHIFT_DEF;
        if (d != 0) n_leak++;
        mv[n] = sat(mv[n] - d);
      end
      if (sp != 0) begin
        m_exc++;
        for (int i = 0; i < NI; i++)
          if (sp[i]) foreach (mv[n]) mv[n] = sat(mv[n] + int'(wtab[i][n]));
      end
      if (inh != 0) begin
        m_inh++;
        for (int j = 0; j < NN; j++)
          if (inh[j]) foreach (mv[n]) if (n != j) mv[n] = sat(mv[n] + int'(W_INH_DEF));
      end
      if (sp == 0 && inh == 0) m_skip++;
      foreach (mv[n]) begin
        mspk[n] = (mv[n] > mvth[n]);
        if (mspk[n]) begin
          mv[n] = int'(V_RESET_DEF);
          mcnt[n]++;
          n_fire++;
        end
      end
      cyc += 3 + ((sp != 0 || inh != 0) ? 1 : 0) + ((sp != 0) ? NI : 0) + ((inh != 0) ? NN : 0);
    end
    // the extra spike set generated with the last step
    rnd = {rnd[14:0], rnd[15] ^ rnd[13] ^ rnd[12] ^ rnd[10]};
    // end-of-sample membrane reset
    foreach (mv[n]) mv[n] = 0;
    mspk = '0;
    return cyc;
  endfunction

  task automatic run_sample(string name);
    int cycles, exp_cycles, s0, e0, i0, total;
    s0 = n_skip; e0 = n_exc; i0 = n_inh;
    exp_cycles = model_sample();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == exp_cycles, $sformatf("%s: %0d cycles, expected %0d", name, cycles, exp_cycles));
    @(negedge clk);
    check(!busy, "idle after done");
    total = 0;
    for (int n = 0; n < NN; n++) begin
      check(int'(counts[n]) == mcnt[n],
            $sformatf("%s: count[%0d]=%0d expected %0d", name, n, counts[n], mcnt[n]));
      total += mcnt[n];
    end
    for (int n = 0; n < NN; n++) begin
      check(dut.u_layer.v_mem[n] == 0, $sformatf("%s: membrane %0d not at rest", name, n));
      if (dut.u_layer.v_mem[n] != 0) break;
    end
    n_endreset++;
    check(n_skip - s0 == m_skip && n_exc - e0 == m_exc && n_inh - i0 == m_inh,
          $sformatf("%s: phases skip %0d/%0d exc %0d/%0d inh %0d/%0d", name,
                    n_skip - s0, m_skip, n_exc - e0, m_exc, n_inh - i0, m_inh));
    $display("%s: %0d cycles (%0.1f us at 100 MHz), %0d excitatory steps, %0d inhibitory steps, %0d skipped, %0d output spikes",
             name, cycles, real'(cycles) / 100.0, m_exc, m_inh, m_skip, total);
  endtask

  initial begin
    foreach (mv[n]) begin mv[n] = 0; mcnt[n] = 0; end
    mspk = '0;
    rnd = 16'hACE1;
    for (int i = 0; i < NI; i++)
      for (int n = 0; n < NN; n++)
        wtab[i][n] = ($urandom_range(0, 7) == 0) ? byte'($urandom_range(1, 31)) : 8'd0;
    for (int n = 0; n < NN; n++) mvth[n] = int'(V_TH0_DEF) + $urandom_range(0, 400);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // weights
    for (int i = 0; i < NI; i++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        w_we = 1; w_idx = 10'(i); w_col = 5'(c);
        for (int k = 0; k < WPW; k++)
          w_data[k*W_W +: W_W] = (c * WPW + k < NN) ? W_W'(wtab[i][c*WPW+k]) : '0;
      end
    @(negedge clk);
    w_we = 0;
    // thresholds
    for (int n = 0; n < NN; n++) begin
      @(negedge clk);
      vth_load = 1; vth_idx = 9'(n); vth_data = v_t'(mvth[n]);
      if (mvth[n] != int'(V_TH0_DEF)) n_vth++;
    end
    @(negedge clk);
    vth_load = 0;
    // two samples
    make_image(14, 14, 8);
    load_image();
    run_sample("sample 1");
    make_image(12, 15, 6);
    load_image();
    run_sample("sample 2");
    $display("mechanisms: skipped=%0d excitatory=%0d inhibitory=%0d fires=%0d leaks=%0d end_resets=%0d thresholds=%0d",
             n_skip, n_exc, n_inh, n_fire, n_leak, n_endreset, n_vth);
    check(n_skip > 0, "skipped step never happened");
    check(n_exc > 0, "excitatory phase never happened");
    check(n_inh > 0, "inhibitory phase never happened");
    check(n_fire > 0, "no neuron ever fired");
    check(n_leak > 0, "leak never changed a membrane");
    check(n_endreset > 0, "end-of-sample reset never happened");
    check(n_vth > 0, "no per-neuron threshold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
