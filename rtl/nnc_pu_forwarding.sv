// nnc_pu_forwarding: the forwarding block of a processing unit.
//
// A PU that computes G output neurons interleaves them cycle by cycle, so
// the partial sum the adder needs now was produced G cycles ago. This block
// delays the accumulator register through a chain of TAPS-1 further
// registers and returns the value selected by `tap`:
//   tap = 0 : acc_i itself (the accumulator register, 1 cycle old)
//   tap = k : acc_i delayed by k more cycles
// The controller sets tap = G - 1 for the running layer. The chain shifts
// every cycle. A register chain with a controller-driven select is what the
// design draws; the number of registers is a parameter here (TAPS = 4 covers
// every network the design was evaluated on at 128 PUs).
module nnc_pu_forwarding #(
  parameter int unsigned W    = 34,
  parameter int unsigned TAPS = 4,
  localparam int unsigned TW  = (TAPS <= 2) ? 1 : $clog2(TAPS)
) (
  input  logic                clk,
  input  logic signed [W-1:0] acc_i,
  input  logic [TW-1:0]       tap,
  output logic signed [W-1:0] fwd_o
);

  logic signed [W-1:0] taps [TAPS];

  assign taps[0] = acc_i;
  for (genvar k = 1; k < TAPS; k++) begin : g_chain
    always_ff @(posedge clk) taps[k] <= taps[k-1];
  end

  assign fwd_o = taps[tap];

endmodule
