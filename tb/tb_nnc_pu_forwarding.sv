// tb_nnc_pu_forwarding: feeds the forwarding block a new random value every
// cycle, keeps its own history of the inputs, and checks that each tap k
// returns the input from k cycles earlier (tap 0: the current input).
module tb_nnc_pu_forwarding;
  localparam int W = 34, TAPS = 4;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic signed [W-1:0] acc, fwd;
  logic [1:0] tap;
  logic signed [W-1:0] hist [TAPS];

  nnc_pu_forwarding #(.W(W), .TAPS(TAPS)) dut (.clk, .acc_i(acc), .tap, .fwd_o(fwd));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc = '0; tap = '0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      acc = W'({$urandom, $urandom});
      hist[0] = acc;
      tap = 2'($urandom);
      #1;
      if (n >= TAPS) begin
        checks++;
        if (fwd !== hist[tap]) begin
          failures++;
          $display("FAIL n=%0d tap=%0d got %0d expected %0d", n, tap, fwd, hist[tap]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
