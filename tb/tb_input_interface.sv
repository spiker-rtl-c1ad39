// tb_input_interface: self-checking testbench of the rate encoder.
// Loads 16 input values (including 0 and 255), then issues `gen` pulses at
// random intervals and compares every spike with a model that keeps its own
// copy of the random sequence (s15 ^ s13 ^ s12 ^ s10 feedback) and applies
// spike = n < 2*value. Also checks that spikes hold between pulses, that a
// zero input never spikes, that the spike rate of each input is close to
// value/32768, and that seed_load restarts the sequence.
module tb_input_interface;
  import spiker_pkg::*;
  localparam int N = 16;
  logic             clk = 0, rst_n = 0, pix_we = 0, seed_load = 0, gen = 0;
  logic [3:0]       pix_addr = '0;
  logic [7:0]       pix_data = '0;
  logic [N-1:0]     spikes, expect_spk;
  logic [15:0]      rnd;
  int unsigned      pix [N];
  int               nspk [N];
  int checks = 0, failures = 0;

  input_interface #(.N_IN(N), .LFSR_W(16), .RATE_SHIFT(1)) dut (
    .clk, .rst_n, .pix_we, .pix_addr, .pix_data, .seed_load, .gen, .spikes);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: spikes=%h expected=%h", what, spikes, expect_spk);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    const int NGEN = 200000;
    foreach (nspk[i]) nspk[i] = 0;
    for (int i = 0; i < N; i++) pix[i] = (i == 0) ? 0 : (i == 1) ? 255 : $urandom_range(1, 255);
    pix[2] = 128;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      pix_we = 1; pix_addr = 4'(i); pix_data = 8'(pix[i]);
    end
    @(negedge clk);
    pix_we = 0;
    check(spikes == '0, "no spikes before gen");
    rnd = 16'hACE1;
    // the exact spike rule on every pulse
    for (int g = 0; g < NGEN; g++) begin
      gen = 1;
      for (int i = 0; i < N; i++) expect_spk[i] = (32'(rnd) < 2 * pix[i]);
      rnd = {rnd[14:0], rnd[15] ^ rnd[13] ^ rnd[12] ^ rnd[10]};
      @(negedge clk);
      gen = 0;
      check(spikes == expect_spk, "spike rule");
      for (int i = 0; i < N; i++) nspk[i] += int'(spikes[i]);
      if (g % 5000 == 0) begin
        repeat (2) @(negedge clk);
        check(spikes == expect_spk, "hold without gen");
      end
    end
    check(nspk[0] == 0, "zero input never spikes");
    for (int i = 1; i < N; i++) begin
      real expct, got;
      expct = real'(NGEN) * 2.0 * real'(pix[i]) / 65536.0;
      got = real'(nspk[i]);
      check(got > 0.8 * expct - 5.0 && got < 1.2 * expct + 5.0, "rate");
    end
    // restart the sequence
    seed_load = 1;
    @(negedge clk);
    seed_load = 0;
    rnd = 16'hACE1;
    gen = 1;
    for (int i = 0; i < N; i++) expect_spk[i] = (32'(rnd) < 2 * pix[i]);
    @(negedge clk);
    gen = 0;
    check(spikes == expect_spk, "after seed_load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
