// network_cu: central control unit of the network.
//
// A `start` pulse begins the processing of one input sample of N_STEPS time
// steps. The CU clears the output counters and has the input interface
// generate the spikes of step 0 (`gen`). Then, for every step, once all
// N_LAYERS layers are ready it pulses `layer_start` to all of them and, in
// the same cycle, `gen` again so the spikes of the next step are prepared
// while the layers work (the layers sample their inputs on that same clock
// edge). When every layer has reported `done` it pulses `count` so the
// output interface counts the output spikes, and starts the next step at
// once. After the last step it pulses `reset_v` to return every membrane to
// the rest value, then pulses `done` and goes back to idle (`busy` low).
// `step` is the index of the step in progress.
//
// Following the published CU: step-by-step operation, waiting for all
// layers, spikes generated in parallel for all inputs, the reset of the
// membranes at the end of a sample. This design's choices: the overlap of
// spike generation with the layers' work, the handshake, counter clearing.
module network_cu #(
  parameter int N_STEPS  = 3500,
  parameter int N_LAYERS = 1,
  localparam int SW = $clog2(N_STEPS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic                gen,
  output logic                cnt_clear,
  output logic                count,
  output logic                reset_v,
  output logic                layer_start,
  input  logic [N_LAYERS-1:0] layer_ready,
  input  logic [N_LAYERS-1:0] layer_done,
  output logic [SW-1:0]       step
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_END} state_e;
  state_e              state;
  logic [N_LAYERS-1:0] finished;
  logic                all_done;

  always_comb all_done = &(finished | layer_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      step     <= '0;
      finished <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          step  <= '0;
          state <= S_ISSUE;
        end
        S_ISSUE: if (&layer_ready) begin
          finished <= '0;
          state    <= S_WAIT;
        end
        S_WAIT: begin
          finished <= finished | layer_done;
          if (all_done) begin
            finished <= '0;
            if (step == SW'(N_STEPS - 1)) state <= S_END;
            else begin
              step <= step + 1'b1;
              if (!(&layer_ready)) state <= S_ISSUE;
            end
          end
        end
        S_END:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy        = (state != S_IDLE);
    cnt_clear   = (state == S_IDLE) && start;
    layer_start = ((state == S_ISSUE) && (&layer_ready)) ||
                  ((state == S_WAIT) && all_done && (step != SW'(N_STEPS - 1)) &&
                   (&layer_ready));
    gen         = cnt_clear || layer_start;
    count       = (state == S_WAIT) && all_done;
    reset_v     = (state == S_END);
    done        = (state == S_END);
  end

endmodule
