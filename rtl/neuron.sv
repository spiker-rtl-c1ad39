// neuron: one Leaky Integrate-and-Fire neuron, clock driven.
//
// The rest potential is shifted to 0, so the leak of one time step is
//     V <= V - (V >>> DECAY_SHIFT)      (dt/tau approximated by 2**-DECAY_SHIFT)
// and needs only a shift and a subtractor. The same adder adds the
// excitatory weight (5-bit unsigned, 3 fractional bits, aligned with the 3
// fractional bits of V) or the signed inhibitory weight when an input spike
// arrives. On a fire command the comparator checks V > V_th; if so V is
// loaded with V_reset and the output spike is raised. RESET V clears V to
// the rest value 0. The threshold sits in its own register, loaded from
// vth_init by vth_load, so every neuron can have its own threshold.
//
// Datapath (after the published neuron diagram): a four-input UPDATE
// multiplexer (0, V >>> shift, excitatory weight, inhibitory weight), an
// add/subtract unit, the V SEL multiplexer choosing between the sum and
// V_reset, the V register, the V_th register and the ">" comparator, all
// controlled by neuron_cu. This design's choices: the sum saturates at the
// 16-bit limits instead of wrapping, the excitatory weight is unsigned, and
// both registers are cleared/initialised by the asynchronous reset (V to 0,
// V_th to VTH_RST).
//
// Timing: a command presented in cycle t updates V at the end of cycle t;
// out_spike is valid from cycle t+1 after a CMD_FIRE.
module neuron
  import spiker_pkg::*;
#(
  parameter int DECAY_SHIFT = DECAY_SHIFT_DEF,
  parameter v_t VTH_RST     = V_TH0_DEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  neuron_cmd_e cmd,
  input  logic        in_spike,
  input  weight_t     exc_weight,
  input  v_t          inh_weight,
  input  v_t          v_reset,
  input  v_t          vth_init,
  input  logic        vth_load,
  output logic        out_spike,
  output v_t          v
);

  localparam logic signed [V_W:0] SUM_MAX = (V_W+1)'(2**(V_W-1) - 1);
  localparam logic signed [V_W:0] SUM_MIN = -(V_W+1)'(2**(V_W-1));

  upd_sel_e update;
  logic     add_sub, v_sel, sample_v, reset_v, sample_vth, vth_exceeded;
  v_t       vth, operand, v_next;
  logic signed [V_W:0] sum;

  neuron_cu u_cu (
    .clk         (clk),
    .rst_n       (rst_n),
    .cmd         (cmd),
    .in_spike    (in_spike),
    .vth_load    (vth_load),
    .vth_exceeded(vth_exceeded),
    .update      (update),
    .add_sub     (add_sub),
    .v_sel       (v_sel),
    .sample_v    (sample_v),
    .reset_v     (reset_v),
    .sample_vth  (sample_vth),
    .out_spike   (out_spike)
  );

  // UPDATE multiplexer
  always_comb begin
    unique case (update)
      UPD_ZERO:  operand = '0;
      UPD_DECAY: operand = v >>> DECAY_SHIFT;
      UPD_EXC:   operand = v_t'(exc_weight) <<< (V_FRAC - W_FRAC);
      UPD_INH:   operand = inh_weight;
      default:   operand = '0;
    endcase
  end

  // Saturating add/subtract
  always_comb begin
    sum = add_sub ? ((V_W+1)'(v) - (V_W+1)'(operand))
                  : ((V_W+1)'(v) + (V_W+1)'(operand));
    if (sum > SUM_MAX)      v_next = v_t'(SUM_MAX);
    else if (sum < SUM_MIN) v_next = v_t'(SUM_MIN);
    else                    v_next = v_t'(sum);
    if (v_sel) v_next = v_reset;
  end

  // V register with synchronous RESET V
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        v <= '0;
    else if (reset_v)  v <= '0;
    else if (sample_v) v <= v_next;
  end

  // V TH register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          vth <= VTH_RST;
    else if (sample_vth) vth <= vth_init;
  end

  // FIRE comparator
  always_comb vth_exceeded = (v > vth);

endmodule
