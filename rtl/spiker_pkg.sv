// spiker_pkg: number formats, sizes and command encodings shared by the
// Spiker blocks.
//
// Fixed-point formats follow the published configuration: the membrane
// potential and all voltage-like quantities are 16-bit signed with 3
// fractional bits (1 LSB = 0.125 mV), excitatory weights are 5 bits with 3
// fractional bits, input pixels are 8 bits. The values of Table-I style model
// parameters are given here already shifted so that the rest potential is 0.
// The neuron command encoding is this design's own.
package spiker_pkg;

  localparam int V_W    = 16;  // membrane potential width
  localparam int V_FRAC = 3;   // fractional bits of the potential
  localparam int W_W    = 5;   // excitatory weight width
  localparam int W_FRAC = 3;   // fractional bits of a weight
  localparam int PIX_W  = 8;   // input value width

  typedef logic signed [V_W-1:0] v_t;
  typedef logic [W_W-1:0]        weight_t;

  // Model constants in potential LSBs (value * 2**V_FRAC), rest shifted to 0.
  localparam v_t V_RESET_DEF = v_t'(40);    //  5.0 mV
  localparam v_t V_TH0_DEF   = v_t'(104);   // 13.0 mV
  localparam v_t W_INH_DEF   = -v_t'(120);  // -15.0
  localparam int DECAY_SHIFT_DEF = 10;      // dt/tau = 2**-10

  // Operand selected by the UPDATE multiplexer in front of the adder.
  typedef enum logic [1:0] {
    UPD_ZERO  = 2'd0,
    UPD_DECAY = 2'd1,   // V >>> DECAY_SHIFT
    UPD_EXC   = 2'd2,   // excitatory weight
    UPD_INH   = 2'd3    // inhibitory weight
  } upd_sel_e;

  // Command the layer CU broadcasts to all its neurons each cycle.
  typedef enum logic [2:0] {
    CMD_NOP   = 3'd0,
    CMD_DECAY = 3'd1,   // V <= V - V*dt/tau
    CMD_EXC   = 3'd2,   // V <= V + w_exc   if the neuron's input spike is set
    CMD_INH   = 3'd3,   // V <= V + w_inh   if the neuron's input spike is set
    CMD_FIRE  = 3'd4,   // compare with threshold, spike and reset if above
    CMD_RESET = 3'd5    // V <= 0, clear the output spike (RESET V)
  } neuron_cmd_e;

endpackage
