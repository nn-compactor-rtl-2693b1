// nnc_output_buffer: collects the output layer and streams it out.
//
// The PUs write their last-layer results a row (NUM_PU neurons) at a time,
// wr_row being the neuron group. After send_start the buffer presents the
// first N values in neuron order on a valid/ready stream, out_last marking
// the final one, and pulses send_done when it has been accepted.
// Neuron k sits in row k / NUM_PU, lane k % NUM_PU. The buffer is part of
// the design; its stream handshake is this implementation's choice.
module nnc_output_buffer
  import nnc_pkg::*;
#(
  parameter int unsigned NUM_PU = 128,
  parameter int unsigned ROWS   = 1,
  parameter int unsigned N      = 10,
  localparam int unsigned RW = clog2_min1(ROWS),
  localparam int unsigned LW = clog2_min1(NUM_PU),
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [RW-1:0] wr_row,
  input  neuron_t       wr_data [NUM_PU],
  input  logic          send_start,
  output logic          send_done,
  output logic          out_valid,
  input  logic          out_ready,
  output neuron_t       out_data,
  output logic          out_last
);

  neuron_t       mem [ROWS][NUM_PU];
  logic [CW-1:0] idx;       // values sent so far
  logic [RW-1:0] row;
  logic [LW-1:0] lane;
  logic          sending;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending   <= 1'b0;
      idx       <= '0;
      row       <= '0;
      lane      <= '0;
      send_done <= 1'b0;
    end else begin
      send_done <= 1'b0;
      if (send_start && !sending) begin
        sending <= 1'b1;
        idx     <= '0;
        row     <= '0;
        lane    <= '0;
      end else if (sending && out_ready) begin
        if (idx == CW'(N - 1)) begin
          sending   <= 1'b0;
          send_done <= 1'b1;
        end
        idx <= idx + 1'b1;
        if (lane == LW'(NUM_PU - 1)) begin
          lane <= '0;
          row  <= row + 1'b1;
        end else begin
          lane <= lane + 1'b1;
        end
      end
    end
  end

  assign out_valid = sending;
  assign out_data  = mem[row][lane];
  assign out_last  = sending && (idx == CW'(N - 1));

endmodule
