// nnc_neuron_memory: holds the neuron values of a hidden layer.
//
// A row holds NUM_PU neurons, the outputs that the PUs produce together for
// one neuron group; the PUs write a whole row in one cycle. The next layer
// reads one neuron per cycle (row rd_row, lane rd_lane) and broadcasts it to
// all PUs. The value appears on rd_data the cycle after rd_en (synchronous
// read) and holds while rd_en is low.
// A layer only writes its results after it has read all of its inputs, so a
// single region serves every layer and ROWS is the largest number of neuron
// groups of any hidden layer. The width-by-length organisation follows the
// design; the single shared region is this implementation's choice.
module nnc_neuron_memory
  import nnc_pkg::*;
#(
  parameter int unsigned NUM_PU = 128,
  parameter int unsigned ROWS   = 1,
  localparam int unsigned RW = clog2_min1(ROWS),
  localparam int unsigned LW = clog2_min1(NUM_PU)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [RW-1:0] wr_row,
  input  neuron_t       wr_data [NUM_PU],
  input  logic          rd_en,
  input  logic [RW-1:0] rd_row,
  input  logic [LW-1:0] rd_lane,
  output neuron_t       rd_data
);

  neuron_t mem [ROWS][NUM_PU];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_data;
    if (rd_en) rd_data <= mem[rd_row][rd_lane];
  end

endmodule
