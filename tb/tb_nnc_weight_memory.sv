// tb_nnc_weight_memory: loads random dual-track codes into every lane and
// row through the load port, keeping a copy, then reads rows back in random
// order and checks every lane's decoded weight against the value the code
// stands for (computed here from the code's definition) and the one-cycle
// read latency. A second instance in 16-bit fixed-point mode checks the
// plain storage path.
module tb_nnc_weight_memory;
  import nnc_pkg::*;
  localparam int NPU = 8, DEPTH = 40;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic             wr_en = 0, rd_en = 0;
  logic [5:0]       wr_addr, rd_addr;
  logic [2:0]       wr_lane;
  logic [4:0]       wr_data;
  logic [15:0]      wr_data16;
  logic signed [7:0]  rd_w   [NPU];
  logic signed [15:0] rd_w16 [NPU];
  logic [4:0]  model   [DEPTH][NPU];
  logic [15:0] model16 [DEPTH][NPU];

  nnc_weight_memory #(.WTYPE(WT_DUAL5), .NUM_PU(NPU), .DEPTH(DEPTH)) dut (
    .clk, .wr_en, .wr_addr, .wr_lane, .wr_data, .rd_en, .rd_addr, .rd_w);
  nnc_weight_memory #(.WTYPE(WT_FIXED16), .NUM_PU(NPU), .DEPTH(DEPTH)) dut16 (
    .clk, .wr_en, .wr_addr, .wr_lane, .wr_data(wr_data16), .rd_en, .rd_addr, .rd_w(rd_w16));

  function automatic int value(logic [4:0] c);
    int s = c[3] ? -8 : 0;
    return c[4] ? (s + int'(c[2:0])) * 16 : (s + int'(c[2:0])) * 2;
  endfunction

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
        wr_en = 1; wr_addr = 6'(a); wr_lane = 3'(p);
        wr_data = 5'($urandom); wr_data16 = 16'($urandom);
        model[a][p] = wr_data; model16[a][p] = wr_data16;
      end
    @(negedge clk) wr_en = 0;
    for (int n = 0; n < 100; n++) begin
      int a;
      a = $urandom % DEPTH;
      @(negedge clk);
      rd_en = 1; rd_addr = 6'(a);
      @(negedge clk);
      rd_en = 0; rd_addr = 6'($urandom % DEPTH);  // must not disturb the output
      @(negedge clk);
      for (int p = 0; p < NPU; p++) begin
        checks++;
        if (int'(rd_w[p]) != value(model[a][p]) || rd_w16[p] !== $signed(model16[a][p])) begin
          failures++;
          $display("FAIL row %0d lane %0d: %0d vs %0d", a, p, rd_w[p], value(model[a][p]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
