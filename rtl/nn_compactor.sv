// nn_compactor: compact accelerator for small fully connected networks.
//
// NUM_PU processing units work in parallel on the neurons of one layer.
// Each cycle one input neuron is broadcast to all PUs, and each PU takes its
// own weight from a row of the weight memory, so a row of weights is one
// column of the layer's weight matrix. When a layer has more neurons than
// PUs, every PU computes G = ceil(neurons / NUM_PU) neurons, interleaved one
// per cycle, and keeps their partial sums in its forwarding chain. Results
// of hidden layers go to the neuron memory, those of the last layer to the
// output buffer. Weights are stored in the compact format WTYPE (default:
// 5-bit dual-track codes, decoded to 8-bit Q2.6); neurons and biases are
// 16-bit Q6.10; hidden layers use ReLU and the last layer is linear.
//
// Usage: load the weight and bias memories through their load ports, pulse
// start, stream TOPOLOGY[0] input neurons in on in_*, and receive the
// output neurons on out_* (out_last marks the final one); done pulses at
// the end. Weight layer l occupies weight rows w_base(l) + i*G + g (input i,
// group g), lane p holding the weight from input i to neuron g*NUM_PU + p;
// bias row b_base(l) + g, lane p, holds that neuron's bias (see nnc_pkg).
// Timing: a layer of n_in inputs and G groups takes n_in*G + 6 cycles.
//
// The block structure (input and output buffers, PUs, weight memory with
// flag memory and decoders, bias and neuron memories, FSM and controller)
// follows the design. TOPOLOGY defaults to the 784-128-128-10 MNIST network
// and NUM_PU to 128, the PU count the design picks for it. Memory sizes are
// derived from the topology. The load ports stand in for memory
// initialization files.
module nn_compactor
  import nnc_pkg::*;
#(
  parameter wtype_e      WTYPE    = WT_DUAL5,
  parameter int unsigned NUM_PU   = 128,
  parameter topo_t       TOPOLOGY = '{784, 128, 128, 10, 0},
  parameter int unsigned FWD_TAPS = 4,
  localparam int unsigned NL      = num_layers(TOPOLOGY),
  localparam int unsigned W_DEPTH = w_base(TOPOLOGY, NL, NUM_PU),
  localparam int unsigned B_DEPTH = b_base(TOPOLOGY, NL, NUM_PU),
  localparam int unsigned NM_ROWS = hidden_rows(TOPOLOGY, NUM_PU),
  localparam int unsigned OB_ROWS = groups(TOPOLOGY, NL - 1, NUM_PU),
  localparam int unsigned N_IN    = TOPOLOGY[0],
  localparam int unsigned N_OUT   = TOPOLOGY[NL],
  localparam int unsigned SW      = stored_w(WTYPE),
  localparam int unsigned MW      = mult_w(WTYPE),
  localparam int unsigned W_AW    = clog2_min1(W_DEPTH),
  localparam int unsigned B_AW    = clog2_min1(B_DEPTH),
  localparam int unsigned IN_AW   = clog2_min1(N_IN),
  localparam int unsigned NM_RW   = clog2_min1(NM_ROWS),
  localparam int unsigned OB_RW   = clog2_min1(OB_ROWS),
  localparam int unsigned LW      = clog2_min1(NUM_PU)
) (
  input  logic            clk,
  input  logic            rst_n,
  // weight memory load
  input  logic            wload_en,
  input  logic [W_AW-1:0] wload_addr,
  input  logic [LW-1:0]   wload_lane,
  input  logic [SW-1:0]   wload_data,
  // bias memory load
  input  logic            bload_en,
  input  logic [B_AW-1:0] bload_addr,
  input  logic [LW-1:0]   bload_lane,
  input  neuron_t         bload_data,
  // control
  input  logic            start,
  output logic            busy,
  output logic            done,
  // input data stream
  input  logic            in_valid,
  output logic            in_ready,
  input  neuron_t         in_data,
  // output data stream
  output logic            out_valid,
  input  logic            out_ready,
  output neuron_t         out_data,
  output logic            out_last
);

  // FSM <-> blocks
  logic       ib_clear, ib_load_en, ib_full;
  logic       ctl_start, ctl_done;
  layer_cfg_t ctl_cfg;
  logic       ob_send_start, ob_send_done;

  // controller outputs
  logic             w_rd_en, b_rd_en, ib_rd_en, nm_rd_en;
  logic [W_AW-1:0]  w_rd_addr;
  logic [B_AW-1:0]  b_rd_addr;
  logic [IN_AW-1:0] ib_rd_addr;
  logic [NM_RW-1:0] nm_rd_row;
  logic [LW-1:0]    nm_rd_lane;
  logic             src_sel;
  pu_ctrl_t         pu_ctrl;
  logic             wb_valid, wb_to_out;
  logic [3:0]       wb_row;

  // datapath
  logic signed [MW-1:0] weights [NUM_PU];
  neuron_t              biases  [NUM_PU];
  neuron_t              ib_rd_data, nm_rd_data, neuron_bcast;
  neuron_t              pu_out  [NUM_PU];
  logic [NUM_PU-1:0]    pu_valid;

  nnc_fsm #(.NUM_PU(NUM_PU), .TOPOLOGY(TOPOLOGY)) u_fsm (
    .clk, .rst_n, .start, .busy, .done,
    .ib_clear, .ib_load_en, .ib_full,
    .ctl_start, .ctl_cfg, .ctl_done,
    .ob_send_start, .ob_send_done
  );

  nnc_controller #(
    .NUM_PU(NUM_PU), .W_AW(W_AW), .B_AW(B_AW), .IN_AW(IN_AW), .NM_RW(NM_RW)
  ) u_ctl (
    .clk, .rst_n,
    .start(ctl_start), .cfg(ctl_cfg), .done(ctl_done),
    .w_rd_en, .w_rd_addr, .b_rd_en, .b_rd_addr, .ib_rd_en, .ib_rd_addr,
    .nm_rd_en, .nm_rd_row, .nm_rd_lane,
    .src_sel, .pu_ctrl,
    .wb_valid, .wb_row, .wb_to_out
  );

  nnc_input_buffer #(.N(N_IN)) u_ibuf (
    .clk, .rst_n,
    .clear(ib_clear), .load_en(ib_load_en),
    .in_valid, .in_ready, .in_data, .full(ib_full),
    .rd_en(ib_rd_en), .rd_addr(ib_rd_addr), .rd_data(ib_rd_data)
  );

  nnc_weight_memory #(.WTYPE(WTYPE), .NUM_PU(NUM_PU), .DEPTH(W_DEPTH)) u_wmem (
    .clk,
    .wr_en(wload_en), .wr_addr(wload_addr), .wr_lane(wload_lane), .wr_data(wload_data),
    .rd_en(w_rd_en), .rd_addr(w_rd_addr), .rd_w(weights)
  );

  nnc_bias_memory #(.NUM_PU(NUM_PU), .DEPTH(B_DEPTH)) u_bmem (
    .clk,
    .wr_en(bload_en), .wr_addr(bload_addr), .wr_lane(bload_lane), .wr_data(bload_data),
    .rd_en(b_rd_en), .rd_addr(b_rd_addr), .rd_b(biases)
  );

  nnc_neuron_memory #(.NUM_PU(NUM_PU), .ROWS(NM_ROWS)) u_nmem (
    .clk,
    .wr_en(wb_valid && !wb_to_out), .wr_row(NM_RW'(wb_row)), .wr_data(pu_out),
    .rd_en(nm_rd_en), .rd_row(nm_rd_row), .rd_lane(nm_rd_lane), .rd_data(nm_rd_data)
  );

  assign neuron_bcast = src_sel ? ib_rd_data : nm_rd_data;

  for (genvar p = 0; p < NUM_PU; p++) begin : g_pu
    nnc_processing_unit #(.WTYPE(WTYPE), .TAPS(FWD_TAPS)) u_pu (
      .clk, .rst_n,
      .ctrl      (pu_ctrl),
      .neuron_in (neuron_bcast),
      .weight_in (weights[p]),
      .bias_in   (biases[p]),
      .out_valid (pu_valid[p]),
      .neuron_out(pu_out[p])
    );
  end

  nnc_output_buffer #(.NUM_PU(NUM_PU), .ROWS(OB_ROWS), .N(N_OUT)) u_obuf (
    .clk, .rst_n,
    .wr_en(wb_valid && wb_to_out), .wr_row(OB_RW'(wb_row)), .wr_data(pu_out),
    .send_start(ob_send_start), .send_done(ob_send_done),
    .out_valid, .out_ready, .out_data, .out_last
  );

  // The controller's write-back must coincide with the PUs' results.
  a_wb_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    wb_valid == pu_valid[0]);
  // Every layer must fit the forwarding chain.
  initial assert (max_groups(TOPOLOGY, NUM_PU) <= FWD_TAPS)
    else $error("a layer needs more neuron groups than FWD_TAPS");

endmodule
