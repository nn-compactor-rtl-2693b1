// nnc_pkg: types, constants and sizing functions shared by the accelerator.
//
// Neurons and biases are 16-bit two's-complement fixed point with 6 integer
// and 10 fraction bits (Q6.10), as the design specifies. Weights come in one
// of three stored formats, chosen per build by a WTYPE parameter:
//   WT_FIXED16 : 16-bit Q6.10, stored and multiplied as is
//   WT_FIXED4  : 4-bit Q2.2, stored and multiplied as is
//   WT_DUAL5   : 5-bit dual-track code (1 flag bit + 4 data bits), decoded
//                to an 8-bit Q2.6 multiplier operand (the main configuration)
// The helper functions give, for a format, the stored code width, the
// multiplier operand width and its number of fraction bits.
// The network topology is a parameter array of layer sizes, from the input
// layer to the output layer; unused trailing entries are 0. Sizing functions
// derive memory depths and per-layer base addresses from it, the way the
// design's generator derives them from its accelerator parameter file.
package nnc_pkg;

  localparam int unsigned NEURON_W = 16;  // Q6.10 neuron and bias width
  localparam int unsigned NEURON_F = 10;  // fraction bits of a neuron
  localparam int unsigned ACC_GUARD = 10; // accumulator headroom: up to 1024 terms
  localparam int unsigned MAX_LAYERS = 4; // weight layers the topology array can hold
  // Cycles from operands at the PU inputs to its registered output.
  localparam int unsigned PU_LAT = 3;

  typedef enum logic [1:0] {
    WT_FIXED16 = 2'd0,
    WT_FIXED4  = 2'd1,
    WT_DUAL5   = 2'd2
  } wtype_e;

  // Layer sizes: entry 0 is the input layer, entry k the output of weight layer k.
  typedef int unsigned topo_t [MAX_LAYERS+1];

  typedef logic signed [NEURON_W-1:0] neuron_t;

  // Stored bits per weight (flag bit included for the dual-track code).
  function automatic int unsigned stored_w(wtype_e wt);
    case (wt)
      WT_FIXED16: return 16;
      WT_FIXED4:  return 4;
      default:    return 5;
    endcase
  endfunction

  // Width of the decoded weight that feeds the multiplier.
  function automatic int unsigned mult_w(wtype_e wt);
    case (wt)
      WT_FIXED16: return 16;
      WT_FIXED4:  return 4;
      default:    return 8;
    endcase
  endfunction

  // Fraction bits of the decoded weight.
  function automatic int unsigned mult_f(wtype_e wt);
    case (wt)
      WT_FIXED16: return 10;
      WT_FIXED4:  return 2;
      default:    return 6;
    endcase
  endfunction

  // Accumulator width: full product plus headroom.
  function automatic int unsigned acc_w(wtype_e wt);
    return NEURON_W + mult_w(wt) + ACC_GUARD;
  endfunction

  function automatic int unsigned ceil_div(int unsigned a, int unsigned b);
    return (a + b - 1) / b;
  endfunction

  function automatic int unsigned clog2_min1(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Number of weight layers in a topology.
  function automatic int unsigned num_layers(topo_t t);
    int unsigned n;
    n = 0;
    for (int k = 1; k <= MAX_LAYERS; k++)
      if (t[k] != 0 && n == k - 1) n = k;
    return n;
  endfunction

  // Neuron groups of weight layer l (0-based): each PU computes this many
  // output neurons of the layer, interleaved cycle by cycle.
  function automatic int unsigned groups(topo_t t, int unsigned l, int unsigned npu);
    return ceil_div(t[l+1], npu);
  endfunction

  // First weight-memory row of weight layer l. A layer takes one row per
  // (input neuron, group) pair, input-major.
  function automatic int unsigned w_base(topo_t t, int unsigned l, int unsigned npu);
    int unsigned b;
    b = 0;
    for (int unsigned k = 0; k < MAX_LAYERS; k++)
      if (k < l) b += t[k] * groups(t, k, npu);
    return b;
  endfunction

  // First bias-memory row of weight layer l: one row per group.
  function automatic int unsigned b_base(topo_t t, int unsigned l, int unsigned npu);
    int unsigned b;
    b = 0;
    for (int unsigned k = 0; k < MAX_LAYERS; k++)
      if (k < l) b += groups(t, k, npu);
    return b;
  endfunction

  // Largest group count over the hidden layers (rows of the neuron memory).
  function automatic int unsigned hidden_rows(topo_t t, int unsigned npu);
    int unsigned r, n;
    n = num_layers(t);
    r = 1;
    for (int unsigned k = 0; k + 1 < MAX_LAYERS; k++)
      if (k + 1 < n && groups(t, k, npu) > r) r = groups(t, k, npu);
    return r;
  endfunction

  // Largest group count over all layers (forwarding taps needed).
  function automatic int unsigned max_groups(topo_t t, int unsigned npu);
    int unsigned r, n;
    n = num_layers(t);
    r = 1;
    for (int unsigned k = 0; k < MAX_LAYERS; k++)
      if (k < n && groups(t, k, npu) > r) r = groups(t, k, npu);
    return r;
  endfunction

  // Control word presented to every PU together with its operands.
  typedef struct packed {
    logic       valid;  // operands are valid this cycle
    logic       first;  // first input of the neuron: add the bias
    logic       last;   // last input of the neuron: emit the result
    logic       relu;   // apply ReLU to the result (hidden layers)
    logic [3:0] tap;    // forwarding tap: neuron groups in the layer minus 1
  } pu_ctrl_t;

  // Settings of one weight layer, handed from the FSM to the controller.
  typedef struct packed {
    logic [15:0] n_in;      // input neurons of the layer
    logic [4:0]  groups;    // neuron groups (output neurons per PU), 1..16
    logic [19:0] w_base;    // first weight-memory row
    logic [11:0] b_base;    // first bias-memory row
    logic        src_input; // inputs come from the input buffer (first layer)
    logic        relu;      // apply ReLU (every layer but the last)
    logic        to_out;    // results go to the output buffer (last layer)
  } layer_cfg_t;

  function automatic layer_cfg_t make_cfg(topo_t t, int unsigned l, int unsigned npu);
    layer_cfg_t c;
    c.n_in      = 16'(t[l]);
    c.groups    = 5'(groups(t, l, npu));
    c.w_base    = 20'(w_base(t, l, npu));
    c.b_base    = 12'(b_base(t, l, npu));
    c.src_input = (l == 0);
    c.relu      = (l + 1 != num_layers(t));
    c.to_out    = (l + 1 == num_layers(t));
    return c;
  endfunction

endpackage
