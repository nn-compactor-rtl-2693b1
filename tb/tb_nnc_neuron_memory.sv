// tb_nnc_neuron_memory: writes whole random rows, then reads single neurons
// (row, lane) in random order and checks each against a model, with the
// one-cycle read latency and the output holding while rd_en is low.
module tb_nnc_neuron_memory;
  import nnc_pkg::*;
  localparam int NPU = 8, ROWS = 4;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [1:0] wr_row, rd_row;
  logic [2:0] rd_lane;
  neuron_t wr_data [NPU];
  neuron_t rd_data;
  neuron_t model [ROWS][NPU];

  nnc_neuron_memory #(.NUM_PU(NPU), .ROWS(ROWS)) dut (
    .clk, .wr_en, .wr_row, .wr_data, .rd_en, .rd_row, .rd_lane, .rd_data);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 3; pass++) begin
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        wr_en = 1; wr_row = 2'(r);
        for (int p = 0; p < NPU; p++) begin
          wr_data[p] = neuron_t'($urandom);
          model[r][p] = wr_data[p];
        end
      end
      @(negedge clk) wr_en = 0;
      for (int n = 0; n < 50; n++) begin
        int r, l;
        r = $urandom % ROWS; l = $urandom % NPU;
        @(negedge clk) rd_en = 1; rd_row = 2'(r); rd_lane = 3'(l);
        @(negedge clk) rd_en = 0; rd_row = 2'($urandom); rd_lane = 3'($urandom);
        @(negedge clk);
        checks++;
        if (rd_data !== model[r][l]) begin
          failures++;
          $display("FAIL row %0d lane %0d", r, l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
