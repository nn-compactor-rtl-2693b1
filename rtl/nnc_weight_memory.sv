// nnc_weight_memory: synaptic weight storage for all PUs, with decoders.
//
// A row holds one weight for each of the NUM_PU processing units, so one
// read delivers the weights of a whole column of PUs in a single cycle. For
// the dual-track format the row is split, as in the design, into a flag
// memory (one bit per PU) and an encoded-weight memory (four bits per PU);
// a decoder per PU lane rebuilds the 8-bit multiplier operand. For the
// 16-bit and 4-bit fixed-point formats there is no flag memory and the
// decoders pass the stored weight through.
// Each lane is a separate array, so a row costs NUM_PU * stored_w bits.
// Interface:
//   load port  - wr_en/wr_addr/wr_lane/wr_data write one weight of one lane
//                (for WT_DUAL5 wr_data is {flag, code}); this replaces the
//                memory initialization files of an FPGA flow.
//   read port  - rd_en/rd_addr; the decoded weights appear on rd_w the cycle
//                after (synchronous read, block-RAM style), and hold while
//                rd_en is low.
// The load port and per-lane organisation are this implementation's choice.
module nnc_weight_memory
  import nnc_pkg::*;
#(
  parameter wtype_e      WTYPE   = WT_DUAL5,
  parameter int unsigned NUM_PU  = 128,
  parameter int unsigned DEPTH   = 1040,
  localparam int unsigned SW = stored_w(WTYPE),
  localparam int unsigned MW = mult_w(WTYPE),
  localparam int unsigned AW = clog2_min1(DEPTH),
  localparam int unsigned LW = clog2_min1(NUM_PU)
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic [LW-1:0]        wr_lane,
  input  logic [SW-1:0]        wr_data,
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  output logic signed [MW-1:0] rd_w [NUM_PU]
);

  for (genvar p = 0; p < NUM_PU; p++) begin : g_lane
    logic [SW-1:0] code_q;

    if (WTYPE == WT_DUAL5) begin : g_split
      logic       flag_mem [DEPTH];   // flag memory
      logic [3:0] enc_mem  [DEPTH];   // encoded weight memory
      always_ff @(posedge clk) begin
        if (wr_en && wr_lane == LW'(p)) begin
          flag_mem[wr_addr] <= wr_data[4];
          enc_mem[wr_addr]  <= wr_data[3:0];
        end
        if (rd_en) code_q <= {flag_mem[rd_addr], enc_mem[rd_addr]};
      end
    end else begin : g_plain
      logic [SW-1:0] w_mem [DEPTH];
      always_ff @(posedge clk) begin
        if (wr_en && wr_lane == LW'(p)) w_mem[wr_addr] <= wr_data;
        if (rd_en) code_q <= w_mem[rd_addr];
      end
    end

    nnc_weight_decoder #(.WTYPE(WTYPE)) u_dec (
      .code_i(code_q),
      .w_o   (rd_w[p])
    );
  end

endmodule
