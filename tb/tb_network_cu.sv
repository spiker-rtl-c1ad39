// tb_network_cu: self-checking testbench of the central control unit.
// Two model layers answer every layer_start after their own random number
// of cycles (ready low while busy, then a done pulse). The testbench checks
// that a new step starts only when both layers are ready and have both
// reported done, and in the very cycle the later one finishes; that the CU
// runs exactly N_STEPS steps with one output count per step, generates
// N_STEPS + 1 spike sets, clears the counters once at the start, and resets
// the membranes and pulses done once at the end.
module tb_network_cu;
  localparam int STEPS = 7, NL = 2;
  logic          clk = 0, rst_n = 0, start = 0;
  logic          busy, done, gen, cnt_clear, count, reset_v, layer_start;
  logic [NL-1:0] layer_ready, layer_done;
  logic [2:0]    step;
  int            left [NL];
  int checks = 0, failures = 0;
  int n_start, n_gen, n_count, n_clear, n_reset, n_done, cyc;

  network_cu #(.N_STEPS(STEPS), .N_LAYERS(NL)) dut (
    .clk, .rst_n, .start, .busy, .done, .gen, .cnt_clear, .count, .reset_v,
    .layer_start, .layer_ready, .layer_done, .step);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // layer models: busy for `left` cycles, done pulse in the first ready cycle
  for (genvar l = 0; l < NL; l++) begin : g_layer
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        left[l] <= 0;
        layer_done[l] <= 1'b0;
      end else begin
        layer_done[l] <= 1'b0;
        if (layer_start) left[l] <= $urandom_range(2, 9);
        else if (left[l] > 1) left[l] <= left[l] - 1;
        else if (left[l] == 1) begin
          left[l] <= 0;
          layer_done[l] <= 1'b1;
        end
      end
    end
    always_comb layer_ready[l] = (left[l] == 0);
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 20; run++) begin
      n_start = 0; n_gen = 0; n_count = 0; n_clear = 0; n_reset = 0; n_done = 0;
      rst_n = (run != 0) ? 1'b1 : 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      check(!busy, "idle");
      start = 1;
      cyc = 0;
      @(negedge clk);
      start = 0;
      while (!done && cyc < 1000) begin
        @(negedge clk);
        cyc++;
      end
      #1;
      check(n_start == STEPS, $sformatf("layer starts %0d", n_start));
      check(n_count == STEPS, $sformatf("counts %0d", n_count));
      check(n_gen == STEPS + 1, $sformatf("gens %0d", n_gen));
      check(n_clear == 1, "one clear");
      check(n_reset == 1 && n_done == 1, "one reset_v and done");
      @(negedge clk);
      check(!busy && !done, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle monitor: protocol and timing, sampled mid-cycle
  logic [NL-1:0] fin;
  logic          started;
  always @(negedge clk) begin
    if (rst_n) begin
      if (cnt_clear) begin
        n_clear++;
        fin <= '0;
        started <= 1'b0;
        check(start, "clear only on start");
      end
      if (gen) n_gen++;
      if (layer_start) begin
        n_start++;
        check(&layer_ready, "start while a layer is busy");
        check(!started || &(fin | layer_done), "start before every layer finished");
        check(int'(step) == n_start - 1 || int'(step) == n_start - 2, "step index");
        fin <= '0;
        started <= 1'b1;
      end else if (started) fin <= fin | layer_done;
      // a step must start in the very cycle all layers are done
      if (started && &(fin | layer_done) && (|layer_done) && n_count < STEPS - 1)
        check(layer_start, "no idle cycle between steps");
      if (count) begin
        n_count++;
        check(&(fin | layer_done), "count before all layers done");
      end
      if (reset_v) begin
        n_reset++;
        check(done && n_count == STEPS, "reset_v at the end");
      end
      if (done) n_done++;
    end
  end
endmodule
