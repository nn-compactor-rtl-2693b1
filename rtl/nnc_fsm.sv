// nnc_fsm: top-level sequencer of the accelerator.
//
// One inference runs through these states:
//   IDLE    wait for start; clear the input buffer's count
//   LOAD    accept the input vector into the input buffer until it is full
//   LAYER   start the controller on the current weight layer
//   RUN     wait for the controller's done, then go to the next layer or,
//           after the last one, to OUTPUT
//   OUTPUT  let the output buffer stream the results; on its send_done
//           pulse `done` and return to IDLE
// The per-layer settings (input count, neuron groups, base rows in the
// weight and bias memories, source and destination, ReLU on or off) are
// constants computed from the TOPOLOGY parameter and the PU count, the way
// the design's generator fixes them in its accelerator parameter file.
// The existence of a finite state machine next to the controller is the
// design's; these states are this implementation's.
module nnc_fsm
  import nnc_pkg::*;
#(
  parameter int unsigned NUM_PU   = 128,
  parameter topo_t       TOPOLOGY = '{784, 128, 128, 10, 0}
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  // input buffer
  output logic       ib_clear,
  output logic       ib_load_en,
  input  logic       ib_full,
  // controller
  output logic       ctl_start,
  output layer_cfg_t ctl_cfg,
  input  logic       ctl_done,
  // output buffer
  output logic       ob_send_start,
  input  logic       ob_send_done
);

  localparam int unsigned NL = num_layers(TOPOLOGY);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_LAYER, S_RUN, S_OUTPUT} state_e;

  state_e     state;
  logic [2:0] layer;
  layer_cfg_t cfg_tab [MAX_LAYERS];

  for (genvar l = 0; l < MAX_LAYERS; l++) begin : g_cfg
    localparam layer_cfg_t C = make_cfg(TOPOLOGY, l, NUM_PU);
    assign cfg_tab[l] = C;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      layer <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:   if (start) begin
                    state <= S_LOAD;
                    layer <= '0;
                  end
        S_LOAD:   if (ib_full) state <= S_LAYER;
        S_LAYER:  state <= S_RUN;
        S_RUN:    if (ctl_done) begin
                    if (32'(layer) == NL - 1) state <= S_OUTPUT;
                    else begin
                      layer <= layer + 3'd1;
                      state <= S_LAYER;
                    end
                  end
        S_OUTPUT: if (ob_send_done) begin
                    state <= S_IDLE;
                    done  <= 1'b1;
                  end
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign busy          = (state != S_IDLE);
  assign ib_clear      = (state == S_IDLE) && start;
  assign ib_load_en    = (state == S_LOAD);
  assign ctl_start     = (state == S_LAYER);
  assign ctl_cfg       = cfg_tab[layer[1:0]];
  assign ob_send_start = (state == S_RUN) && ctl_done && (32'(layer) == NL - 1);

endmodule
