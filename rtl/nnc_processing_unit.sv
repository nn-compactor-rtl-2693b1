// nnc_processing_unit: one pipelined multiply-accumulate neuron engine.
//
// Each cycle the PU takes a broadcast input neuron, its own weight and its
// own bias, plus a control word, and works through three register stages:
//   1. multiplier: prod = neuron * weight (full precision); the bias is
//      registered alongside.
//   2. adder/accumulator: acc = prod + (first ? bias aligned to the product's
//      fraction : partial sum from the forwarding block).
//   3. output: on the neuron's last input the accumulator is shifted back to
//      Q6.10 (dropping the extra fraction bits, i.e. rounding toward minus
//      infinity), saturated to 16 bits, passed through ReLU or not as the
//      controller selects, and registered as neuron_out with out_valid.
// Operands given in cycle c produce neuron_out in cycle c + PU_LAT (3).
// The forwarding block (nnc_pu_forwarding) returns the partial sum of the
// same neuron G cycles later, so G neurons can be interleaved without a
// hazard; ctrl.tap = G - 1.
// The multiplier, accumulator, bias/forward select, ReLU as a sign-bit
// controlled mux, the ReLU/bypass output select and the forwarding chain are
// the design's. The wide accumulator, the shift and the saturation are this
// implementation's choices: the design does not give them.
module nnc_processing_unit
  import nnc_pkg::*;
#(
  parameter wtype_e      WTYPE = WT_DUAL5,
  parameter int unsigned TAPS  = 4,
  localparam int unsigned MW = mult_w(WTYPE),
  localparam int unsigned MF = mult_f(WTYPE),
  localparam int unsigned AW = acc_w(WTYPE),
  localparam int unsigned TW = (TAPS <= 2) ? 1 : $clog2(TAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  pu_ctrl_t             ctrl,
  input  neuron_t              neuron_in,
  input  logic signed [MW-1:0] weight_in,
  input  neuron_t              bias_in,
  output logic                 out_valid,
  output neuron_t              neuron_out
);

  localparam int unsigned PW = NEURON_W + MW;
  localparam logic signed [AW-1:0] SAT_MAX = AW'(2 ** (NEURON_W - 1) - 1);
  localparam logic signed [AW-1:0] SAT_MIN = -AW'(2 ** (NEURON_W - 1));

  pu_ctrl_t            c1, c2;
  logic signed [PW-1:0] prod_q;
  neuron_t             bias_q;
  logic signed [AW-1:0] acc_q, fwd, addend, scaled, sat;
  neuron_t             relu_y, y;

  // Stage 1: multiply, register the bias.
  always_ff @(posedge clk) begin
    prod_q <= PW'(neuron_in) * PW'(weight_in);
    bias_q <= bias_in;
  end

  // Stage 2: add to bias or to the forwarded partial sum.
  always_comb begin
    if (c1.first) addend = AW'(bias_q) <<< MF;
    else          addend = fwd;
  end

  always_ff @(posedge clk) acc_q <= AW'(prod_q) + addend;

  nnc_pu_forwarding #(.W(AW), .TAPS(TAPS)) u_fwd (
    .clk  (clk),
    .acc_i(acc_q),
    .tap  (TW'(c1.tap)),
    .fwd_o(fwd)
  );

  // Stage 3: requantize, activation, output select.
  always_comb begin
    scaled = acc_q >>> MF;
    if (scaled > SAT_MAX)      sat = SAT_MAX;
    else if (scaled < SAT_MIN) sat = SAT_MIN;
    else                       sat = scaled;
    relu_y = sat[NEURON_W-1] ? '0 : NEURON_W'(sat);   // ReLU: sign bit selects 0
    y      = c2.relu ? relu_y : NEURON_W'(sat);       // controller: ReLU or bypass
  end

  always_ff @(posedge clk) begin
    if (c2.valid && c2.last) neuron_out <= y;
  end

  // Control pipeline.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1        <= '0;
      c2        <= '0;
      out_valid <= 1'b0;
    end else begin
      c1        <= ctrl;
      c2        <= c1;
      out_valid <= c2.valid && c2.last;
    end
  end

endmodule
