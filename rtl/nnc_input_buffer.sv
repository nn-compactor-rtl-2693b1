// nnc_input_buffer: receives the input vector and feeds the first layer.
//
// While load_en is high the buffer accepts N input neurons (16-bit Q6.10)
// on a valid/ready stream, storing them at addresses 0..N-1; `full` rises
// once all N have arrived. clear restarts the count for the next vector.
// The first layer reads one neuron per cycle: rd_data follows rd_en/rd_addr
// by one cycle (synchronous read) and holds while rd_en is low.
// The buffer itself is part of the design; its stream handshake and reset
// behaviour are this implementation's choice.
module nnc_input_buffer
  import nnc_pkg::*;
#(
  parameter int unsigned N = 784,
  localparam int unsigned AW = clog2_min1(N),
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,     // restart the count (start of a new vector)
  input  logic          load_en,   // accept input while high
  input  logic          in_valid,
  output logic          in_ready,
  input  neuron_t       in_data,
  output logic          full,      // all N values received
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output neuron_t       rd_data
);

  neuron_t       mem [N];
  logic [CW-1:0] count;

  assign full     = (count == CW'(N));
  assign in_ready = load_en && !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    count <= '0;
    else if (clear)                count <= '0;
    else if (in_valid && in_ready) count <= count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[count[AW-1:0]] <= in_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
