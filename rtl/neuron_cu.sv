// neuron_cu: control unit of one LIF neuron.
//
// Decodes the command the layer CU broadcasts (neuron_cmd_e) together with
// this neuron's input spike into the datapath controls of the neuron:
// UPDATE (operand select), ADD/SUB, V SEL, SAMPLE V, RESET V and SAMPLE V TH.
// An excitatory or inhibitory command only acts when the input spike is set.
// On CMD_FIRE it looks at V TH EXCEEDED: if set, it loads V_reset into the
// membrane register and raises OUT SPIKE; otherwise OUT SPIKE is cleared.
// OUT SPIKE is a register that holds the result of the latest CMD_FIRE until
// the next CMD_FIRE or CMD_RESET. Everything except OUT SPIKE is
// combinational, so each command takes effect at the end of the cycle in
// which it is presented.
//
// The set of control signals is the one the published neuron diagram names;
// the command encoding and the exact decode are this design's own.
module neuron_cu
  import spiker_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  neuron_cmd_e cmd,
  input  logic        in_spike,
  input  logic        vth_load,
  input  logic        vth_exceeded,
  output upd_sel_e    update,
  output logic        add_sub,      // 1: subtract the operand
  output logic        v_sel,        // 1: load V_reset instead of the sum
  output logic        sample_v,
  output logic        reset_v,
  output logic        sample_vth,
  output logic        out_spike
);

  always_comb begin
    update     = UPD_ZERO;
    add_sub    = 1'b0;
    v_sel      = 1'b0;
    sample_v   = 1'b0;
    reset_v    = 1'b0;
    sample_vth = vth_load;
    unique case (cmd)
      CMD_DECAY: begin
        update   = UPD_DECAY;
        add_sub  = 1'b1;
        sample_v = 1'b1;
      end
      CMD_EXC: begin
        update   = UPD_EXC;
        sample_v = in_spike;
      end
      CMD_INH: begin
        update   = UPD_INH;
        sample_v = in_spike;
      end
      CMD_FIRE: begin
        v_sel    = 1'b1;
        sample_v = vth_exceeded;
      end
      CMD_RESET: reset_v = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 out_spike <= 1'b0;
    else if (cmd == CMD_FIRE)   out_spike <= vth_exceeded;
    else if (cmd == CMD_RESET)  out_spike <= 1'b0;
  end

endmodule
