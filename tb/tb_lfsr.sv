// tb_lfsr: self-checking testbench of the 16-bit LFSR.
// Compares every state with a model using the explicit feedback
// s15 ^ s13 ^ s12 ^ s10, checks that the register holds without `step`,
// never reaches zero, returns to the seed after exactly 2^16 - 1 steps and
// that `load` restores the seed.
module tb_lfsr;
  logic        clk = 0, rst_n = 0, load = 0, step = 0;
  logic [15:0] value, model;
  int checks = 0, failures = 0;

  lfsr #(.WIDTH(16)) dut (.clk, .rst_n, .load, .step, .value);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: value=%h model=%h", what, value, model);
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    model = 16'hACE1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(value == 16'hACE1, "seed after reset");
    // hold without step
    repeat (3) @(negedge clk);
    check(value == model, "hold");
    // full period
    period = 0;
    step = 1;
    do begin
      @(negedge clk);
      model = {model[14:0], model[15] ^ model[13] ^ model[12] ^ model[10]};
      period++;
      if (period < 200 || (period % 4096) == 0) check(value == model, "sequence");
      if (value == 16'h0000) check(0, "zero state");
    end while (value != 16'hACE1 && period < 70000);
    step = 0;
    check(period == 65535, "maximal period");
    // a few steps, then load
    step = 1;
    repeat (5) @(negedge clk);
    step = 0;
    check(value != 16'hACE1, "moved away");
    load = 1;
    @(negedge clk);
    load = 0;
    check(value == 16'hACE1, "load restores seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
