// layer_cu: control unit of one Spiker layer.
//
// One time step, started by a `start` pulse while `ready` is high:
//   IDLE  - on start the layer samples its input spikes and the output spikes
//           of its own neurons (the inhibitory spikes) and every neuron is
//           told to apply the leak (CMD_DECAY).
//   SEL   - the OR of the sampled excitatory and inhibitory spikes decides
//           what follows. With no spike at all the step is skipped straight
//           to the fire check.
//   EXC   - only if some input spiked: the N_IN inputs are presented one per
//           cycle (index on `idx`, weight-memory read strobe `exc_rd`).
//   INH   - only if some neuron of the layer spiked in the previous step: the
//           N_NEURONS lateral inhibitory spikes, one per cycle.
//   FIRE  - every neuron compares with its threshold.
//   WAITF - the fire command is executed; then `done` pulses for one cycle
//           and the layer is ready again.
// `cmd` is the command for the neurons one cycle later: the layer registers
// it together with the spike bit so that it meets the weights coming out of
// the synchronous weight memory. A step with no spike takes 3 cycles from
// start to the next possible start; a step with any spike takes one cycle
// more, plus N_IN cycles for an excitatory phase and N_NEURONS cycles for an
// inhibitory phase.
//
// The phases, their order (excitatory before inhibitory), the one-by-one
// presentation and the OR-based skip follow the published layer; the state
// encoding and the cycle counts are this design's own.
module layer_cu
  import spiker_pkg::*;
#(
  parameter int N_IN      = 784,
  parameter int N_NEURONS = 400,
  localparam int CW = $clog2((N_IN > N_NEURONS ? N_IN : N_NEURONS) + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          exc_or,
  input  logic          inh_or,
  output logic          ready,
  output logic          sample,     // capture input and inhibitory spikes
  output neuron_cmd_e   cmd,
  output logic [CW-1:0] idx,
  output logic          exc_rd,
  output logic          exc_phase,  // one-cycle pulse: an excitatory phase starts
  output logic          inh_phase,  // one-cycle pulse: an inhibitory phase starts
  output logic          skipped,    // one-cycle pulse: the step had no spike
  output logic          done
);

  typedef enum logic [2:0] {S_IDLE, S_SEL, S_EXC, S_INH, S_FIRE, S_WAITF} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) state <= S_SEL;
        S_SEL: begin
          idx <= '0;
          if (exc_or)      state <= S_EXC;
          else if (inh_or) state <= S_INH;
          else             state <= S_WAITF;  // the fire command is issued here
        end
        S_EXC: begin
          if (idx == CW'(N_IN - 1)) begin
            idx   <= '0;
            state <= inh_or ? S_INH : S_FIRE;
          end else idx <= idx + 1'b1;
        end
        S_INH: begin
          if (idx == CW'(N_NEURONS - 1)) begin
            idx   <= '0;
            state <= S_FIRE;
          end else idx <= idx + 1'b1;
        end
        S_FIRE:  state <= S_WAITF;
        S_WAITF: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ready     = (state == S_IDLE);
    sample    = (state == S_IDLE) && start;
    exc_rd    = (state == S_EXC);
    exc_phase = (state == S_SEL) && exc_or;
    inh_phase = ((state == S_SEL) && !exc_or && inh_or) ||
                ((state == S_EXC) && (idx == CW'(N_IN - 1)) && inh_or);
    skipped   = (state == S_SEL) && !exc_or && !inh_or;
    unique case (state)
      S_IDLE:  cmd = start ? CMD_DECAY : CMD_NOP;
      S_SEL:   cmd = (exc_or || inh_or) ? CMD_NOP : CMD_FIRE;
      S_EXC:   cmd = CMD_EXC;
      S_INH:   cmd = CMD_INH;
      S_FIRE:  cmd = CMD_FIRE;
      default: cmd = CMD_NOP;
    endcase
  end

  // A start is only accepted while the layer is idle.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> ready)
    else $error("layer_cu: start while busy");

endmodule
