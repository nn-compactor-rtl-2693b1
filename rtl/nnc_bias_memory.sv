// nnc_bias_memory: bias storage, one 16-bit Q6.10 bias per PU per row.
//
// A row holds the biases of the NUM_PU neurons that the PUs compute together
// (one neuron group of one layer), so one read serves all PUs at once.
// Interface: wr_en/wr_addr/wr_lane/wr_data load one bias; rd_en/rd_addr read
// a row, which appears on rd_b the next cycle and holds while rd_en is low.
// The row organisation follows the design's width-by-length bias memory; the
// load port is this implementation's choice.
module nnc_bias_memory
  import nnc_pkg::*;
#(
  parameter int unsigned NUM_PU = 128,
  parameter int unsigned DEPTH  = 3,
  localparam int unsigned AW = clog2_min1(DEPTH),
  localparam int unsigned LW = clog2_min1(NUM_PU)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [LW-1:0] wr_lane,
  input  neuron_t       wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output neuron_t       rd_b [NUM_PU]
);

  for (genvar p = 0; p < NUM_PU; p++) begin : g_lane
    neuron_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_en && wr_lane == LW'(p)) mem[wr_addr] <= wr_data;
      if (rd_en) rd_b[p] <= mem[rd_addr];
    end
  end

endmodule
