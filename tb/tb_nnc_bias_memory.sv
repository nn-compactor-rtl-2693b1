// tb_nnc_bias_memory: writes random biases lane by lane, reads rows back in
// random order and checks every lane against a model, including that the
// output holds while rd_en is low.
module tb_nnc_bias_memory;
  import nnc_pkg::*;
  localparam int NPU = 8, DEPTH = 6;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [2:0] wr_addr, rd_addr, wr_lane;
  neuron_t wr_data, rd_b [NPU];
  neuron_t model [DEPTH][NPU];

  nnc_bias_memory #(.NUM_PU(NPU), .DEPTH(DEPTH)) dut (
    .clk, .wr_en, .wr_addr, .wr_lane, .wr_data, .rd_en, .rd_addr, .rd_b);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++)
      for (int p = 0; p < NPU; p++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = 3'(a); wr_lane = 3'(p); wr_data = neuron_t'($urandom);
        model[a][p] = wr_data;
      end
    @(negedge clk) wr_en = 0;
    for (int n = 0; n < 60; n++) begin
      int a;
      a = $urandom % DEPTH;
      @(negedge clk) rd_en = 1; rd_addr = 3'(a);
      @(negedge clk) rd_en = 0; rd_addr = 3'($urandom % DEPTH);
      @(negedge clk);
      for (int p = 0; p < NPU; p++) begin
        checks++;
        if (rd_b[p] !== model[a][p]) begin
          failures++;
          $display("FAIL row %0d lane %0d", a, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
