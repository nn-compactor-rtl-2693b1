// nnc_weight_decoder: turns one stored weight into the multiplier operand.
//
// For the dual-track format (WT_DUAL5) the stored code is {flag, d[3:0]}
// and the result is an 8-bit Q2.6 weight w[7:0]:
//   flag = 1 (MSB-centric, |w| >= 0.25): w = {d[3:0], 4'b0000}, i.e. d holds
//            w[7:4] (sign, integer bit and the two upper fraction bits).
//   flag = 0 (LSB-centric, small values): w = {d3, d3, d3, d3, d2, d1, d0, 0},
//            i.e. d holds the sign w[7] and w[3:1]; w[6:4] equal the sign.
// Bits the code does not hold are rebuilt as zero; rounding them happens when
// the weights are quantized, before they are loaded. These bit assignments
// follow the design's dual-track scheme; rebuilding dropped bits as zero is
// this implementation's choice.
// For WT_FIXED16 (Q6.10) and WT_FIXED4 (Q2.2) the code is the operand.
// Purely combinational; one instance per PU lane sits behind the weight memory.
module nnc_weight_decoder
  import nnc_pkg::*;
#(
  parameter wtype_e WTYPE = WT_DUAL5,
  localparam int unsigned SW = stored_w(WTYPE),
  localparam int unsigned MW = mult_w(WTYPE)
) (
  input  logic [SW-1:0]        code_i,  // stored weight (flag in the MSB for WT_DUAL5)
  output logic signed [MW-1:0] w_o      // decoded multiplier operand
);

  if (WTYPE == WT_DUAL5) begin : g_dual
    logic       flag;
    logic [3:0] d;
    assign flag = code_i[4];
    assign d    = code_i[3:0];
    always_comb begin
      if (flag) w_o = {d, 4'b0000};
      else      w_o = {{4{d[3]}}, d[2:0], 1'b0};
    end
  end else begin : g_plain
    assign w_o = code_i;
  end

endmodule
