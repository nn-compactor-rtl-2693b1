// tb_nnc_processing_unit: runs random neurons through one PU and compares
// each result with a reference computed in the testbench: bias aligned to
// the product fraction, plus the sum of neuron*weight products, shifted back
// to Q6.10 (floor), saturated to 16 bits, then ReLU when selected.
// Each test picks a group count G (1..4, exercising every forwarding tap),
// an input count and ReLU on/off, and interleaves G neurons per input as the
// controller does. It also checks that a result appears exactly PU_LAT
// cycles after the neuron's last operands, and counts saturation and ReLU
// clamping so that both are seen.
module tb_nnc_processing_unit;
  import nnc_pkg::*;
  localparam wtype_e WT = WT_DUAL5;
  localparam int MF = mult_f(WT);

  int checks = 0, failures = 0;
  int n_relu_clamp = 0, n_sat = 0, n_tap [4] = '{0, 0, 0, 0};
  logic clk = 0, rst_n = 0;
  pu_ctrl_t ctrl;
  neuron_t nin, bias, nout;
  logic signed [7:0] w;
  logic ovalid;
  int cyc = 0;

  nnc_processing_unit #(.WTYPE(WT), .TAPS(4)) dut (
    .clk, .rst_n, .ctrl, .neuron_in(nin), .weight_in(w), .bias_in(bias),
    .out_valid(ovalid), .neuron_out(nout));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int exp_val [$];
  int exp_cyc [$];

  // monitor
  always @(posedge clk) begin
    #2;
    if (rst_n && ovalid) begin
      checks++;
      if (exp_val.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at %0d", cyc);
      end else begin
        int v, c;
        v = exp_val.pop_front();
        c = exp_cyc.pop_front();
        if (int'(nout) != v || cyc != c) begin
          failures++;
          $display("FAIL out=%0d exp=%0d cyc=%0d exp_cyc=%0d", nout, v, cyc, c);
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc [4];
    int b [4];
    ctrl = '0; nin = '0; bias = '0; w = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int G, n_in, big;
      logic relu;
      G = 1 + (t % 4);
      n_in = 1 + ($urandom % 20);
      relu = 1'($urandom);
      big = (t % 5 == 4);   // some tests with large values, to saturate
      n_tap[G-1]++;
      for (int g = 0; g < G; g++) begin
        b[g] = int'($signed(16'($urandom)));
        if (!big) b[g] = b[g] / 16;
      end
      for (int i = 0; i < n_in; i++) begin
        for (int g = 0; g < G; g++) begin
          @(posedge clk);
          #1;
          nin  = neuron_t'($urandom);
          if (!big) nin = nin >>> 4;
          w    = 8'($urandom);
          bias = neuron_t'(b[g]);
          ctrl.valid = 1'b1;
          ctrl.first = (i == 0);
          ctrl.last  = (i == n_in - 1);
          ctrl.relu  = relu;
          ctrl.tap   = 4'(G - 1);
          if (i == 0) acc[g] = longint'(b[g]) * (2 ** MF);
          acc[g] += longint'(nin) * longint'(w);
          if (i == n_in - 1) begin
            longint r;
            r = acc[g] >>> MF;
            if (r > 32767) begin r = 32767; n_sat++; end
            if (r < -32768) begin r = -32768; n_sat++; end
            if (relu && r < 0) begin r = 0; n_relu_clamp++; end
            exp_val.push_back(int'(r));
            exp_cyc.push_back(cyc + PU_LAT);
          end
        end
      end
      @(posedge clk);
      #1 ctrl = '0;
      repeat ($urandom % 3) @(posedge clk);
    end
    repeat (6) @(posedge clk);
    checks++;
    if (exp_val.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_val.size());
    end
    checks++;
    if (n_sat == 0 || n_relu_clamp == 0 || n_tap[0] == 0 || n_tap[3] == 0) begin
      failures++;
      $display("FAIL coverage sat=%0d relu=%0d", n_sat, n_relu_clamp);
    end
    $display("saturations=%0d relu_clamps=%0d", n_sat, n_relu_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
