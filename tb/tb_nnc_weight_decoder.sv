// tb_nnc_weight_decoder: checks the dual-track decoder against the 8-bit
// Q2.6 value each code stands for, worked out as real numbers, for all 32
// codes; and checks that the 16-bit and 4-bit formats pass through.
// It also runs every 8-bit weight through a reference dual-track encoder
// (round to nearest on the dropped bits, saturating) and checks that the
// decoded result lies within the quantization step of the original.
module tb_nnc_weight_decoder;
  import nnc_pkg::*;

  int checks = 0, failures = 0;

  logic [4:0]         code5;
  logic signed [7:0]  w8;
  logic [15:0]        code16;
  logic signed [15:0] w16;
  logic [3:0]         code4;
  logic signed [3:0]  w4;

  nnc_weight_decoder #(.WTYPE(WT_DUAL5))   dut5  (.code_i(code5),  .w_o(w8));
  nnc_weight_decoder #(.WTYPE(WT_FIXED16)) dut16 (.code_i(code16), .w_o(w16));
  nnc_weight_decoder #(.WTYPE(WT_FIXED4))  dut4  (.code_i(code4),  .w_o(w4));

  // Value of a code in units of 2^-6, computed from its meaning.
  function automatic int expect_val(logic [4:0] c);
    int s;
    s = c[3] ? -1 : 0;
    if (c[4]) // sign + integer bit + 2 fraction bits, each worth 2^-6 * 16
      return (s * 8 + int'(c[2:0])) * 16;
    else      // sign-extended small value, bits 3..1
      return (s * 8 + int'(c[2:0])) * 2;
  endfunction

  // Reference encoder: 8-bit Q2.6 value v -> 5-bit code.
  function automatic logic [4:0] encode(int v);
    int r;
    if (v >= 16 || v < -16) begin
      r = (v + 8) >>> 4;          // round to nearest multiple of 16
      if (r > 7) r = 7;
      return {1'b1, 4'(r)};
    end else begin
      r = (v + 1) >>> 1;          // round to nearest multiple of 2
      if (r > 7) r = 7;
      return {1'b0, 4'(r)};
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 32; c++) begin
      code5 = 5'(c);
      #1;
      checks++;
      if (int'(w8) != expect_val(5'(c))) begin
        failures++;
        $display("FAIL code %b: got %0d expected %0d", code5, w8, expect_val(5'(c)));
      end
    end
    for (int v = -128; v < 128; v++) begin
      int err, lim;
      code5 = encode(v);
      #1;
      lim = (v >= 16 || v < -16) ? 8 : 1;
      err = int'(w8) - v;
      if (err < 0) err = -err;
      // values above 1.75 clip to the largest code
      if (v > 119) lim = v - 112;  // saturates at the largest code, 1.75
      checks++;
      if (err > lim) begin
        failures++;
        $display("FAIL v=%0d code=%b decoded=%0d", v, code5, w8);
      end
    end
    for (int k = 0; k < 50; k++) begin
      code16 = 16'($urandom);
      code4  = 4'($urandom);
      #1;
      checks++;
      if (w16 !== $signed(code16) || w4 !== $signed(code4)) begin
        failures++;
        $display("FAIL passthrough");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
