// tb_output_interface: self-checking testbench of the spike counters.
// Drives random spike vectors with random count/clear pulses and compares
// every counter with an integer model each cycle, including saturation at
// the counter maximum (N_STEPS = 5 gives 3-bit counters).
module tb_output_interface;
  localparam int N = 12, STEPS = 5, W = $clog2(STEPS + 1);
  logic         clk = 0, rst_n = 0, clear = 0, count = 0;
  logic [N-1:0] spikes = '0;
  logic [W-1:0] counts [N];
  int model [N];
  int checks = 0, failures = 0, sat_seen = 0;

  output_interface #(.N_OUT(N), .N_STEPS(STEPS)) dut (.clk, .rst_n, .clear, .count, .spikes, .counts);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      foreach (model[i]) begin
        checks++;
        if (counts[i] != W'(model[i])) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d cnt[%0d]=%0d model=%0d", t, i, counts[i], model[i]);
        end
      end
      clear  = ($urandom_range(0, 40) == 0);
      count  = ($urandom_range(0, 2) != 0);
      spikes = N'($urandom());
      // model of the coming clock edge
      foreach (model[i]) begin
        if (clear) model[i] = 0;
        else if (count && spikes[i]) begin
          if (model[i] == 2**W - 1) sat_seen++;
          else model[i]++;
        end
      end
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
