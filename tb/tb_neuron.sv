// tb_neuron: self-checking testbench of the LIF neuron.
// Drives random command sequences (leak, excitatory and inhibitory inputs
// with random weights and spike bits, fire checks, membrane resets and
// threshold loads) and compares the membrane potential and output spike
// every cycle with an integer model:
//   leak:  V -= V >>> 10      input: V += w (saturating to 16 bits)
//   fire:  if V > V_th then V = V_reset, spike = 1 else spike = 0
// Counts how often the neuron fired, saturated and leaked a non-zero amount,
// and fails if any of them never happened.
module tb_neuron;
  import spiker_pkg::*;
  logic        clk = 0, rst_n = 0, in_spike = 0, vth_load = 0, out_spike;
  neuron_cmd_e cmd = CMD_NOP;
  weight_t     exc_weight = '0;
  v_t          inh_weight = W_INH_DEF, v_reset = V_RESET_DEF, vth_init = '0, v;
  int          mv, mvth, mspk;
  int checks = 0, failures = 0, fires = 0, sats = 0, leaks = 0;

  neuron dut (.clk, .rst_n, .cmd, .in_spike, .exc_weight, .inh_weight, .v_reset,
              .vth_init, .vth_load, .out_spike, .v);

  always #5 clk = ~clk;

  function automatic int sat(int x);
    if (x > 32767) begin sats++; return 32767; end
    if (x < -32768) begin sats++; return -32768; end
    return x;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mv = 0; mvth = int'(V_TH0_DEF); mspk = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50000; t++) begin
      int r;
      @(negedge clk);
      checks++;
      if (int'(v) != mv || out_spike != 1'(mspk)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d v=%0d model=%0d spike=%0d model=%0d", t, v, mv, out_spike, mspk);
      end
      // random stimulus; phases with big weights reach saturation and the leak
      r = $urandom_range(0, 99);
      in_spike   = $urandom_range(0, 1);
      exc_weight = weight_t'($urandom());
      inh_weight = ((t / 5000) % 2 == 1) ? v_t'($urandom_range(0, 4000) - 1000)
                                         : v_t'(-$urandom_range(0, 40));
      v_reset    = v_t'($urandom_range(0, 80));
      vth_load   = ($urandom_range(0, 200) == 0);
      vth_init   = v_t'($urandom_range(0, 30000));
      if (r < 10)      cmd = CMD_DECAY;
      else if (r < 55) cmd = CMD_EXC;
      else if (r < 85) cmd = CMD_INH;
      else if (r < 99) cmd = CMD_FIRE;
      else             cmd = ($urandom_range(0, 3) == 0) ? CMD_RESET : CMD_NOP;
      // model of the coming edge
      unique case (cmd)
        CMD_DECAY: begin
          int d;
          d = mv >>> 10;
          if (d != 0) leaks++;
          mv = sat(mv - d);
        end
        CMD_EXC:   if (in_spike) mv = sat(mv + int'(exc_weight));
        CMD_INH:   if (in_spike) mv = sat(mv + int'(inh_weight));
        CMD_FIRE:  begin
          mspk = (mv > mvth);
          if (mspk) begin mv = int'(v_reset); fires++; end
        end
        CMD_RESET: begin mv = 0; mspk = 0; end
        default: ;
      endcase
      if (vth_load) mvth = int'(vth_init);
    end
    checks += 3;
    if (fires == 0) begin failures++; $display("FAIL never fired"); end
    if (sats == 0)  begin failures++; $display("FAIL never saturated"); end
    if (leaks == 0) begin failures++; $display("FAIL leak never changed V"); end
    $display("fires=%0d saturations=%0d leaks=%0d", fires, sats, leaks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
