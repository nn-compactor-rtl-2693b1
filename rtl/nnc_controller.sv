// nnc_controller: drives the memories and PUs through one fully connected layer.
//
// After start the controller issues one step per cycle, with no stalls, for
// every (input neuron i, neuron group g) pair, input-major:
//   weight row  w_base + i*groups + g   (one weight per PU)
//   bias row    b_base + g              (read every step, used when i = 0)
//   input neuron i from the input buffer (first layer) or from the neuron
//   memory at row i / NUM_PU, lane i % NUM_PU (later layers)
// The memories answer one cycle later, and the control word for the PUs
// (first = i==0, last = i==n_in-1, relu, tap = groups-1) is registered so that
// it arrives with the data; src_sel picks the neuron source in that cycle.
// A PU finishes neuron group g PU_LAT cycles after its last operands, and
// the controller raises wb_valid with wb_row = g and wb_to_out in that cycle
// so that the row of PU results is written to the neuron memory or to the
// output buffer. `done` pulses once the last row is written.
// A layer of n_in inputs and G groups takes n_in*G issue cycles plus
// PU_LAT + 1 cycles of drain.
// That a controller sequences the memories and steers every PU mux is the
// design's; the input-major interleaving and this schedule are this
// implementation's.
module nnc_controller
  import nnc_pkg::*;
#(
  parameter int unsigned NUM_PU = 128,
  parameter int unsigned W_AW   = 11,
  parameter int unsigned B_AW   = 2,
  parameter int unsigned IN_AW  = 10,
  parameter int unsigned NM_RW  = 1,
  localparam int unsigned LW = clog2_min1(NUM_PU)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  layer_cfg_t       cfg,
  output logic             done,
  // memory read ports
  output logic             w_rd_en,
  output logic [W_AW-1:0]  w_rd_addr,
  output logic             b_rd_en,
  output logic [B_AW-1:0]  b_rd_addr,
  output logic             ib_rd_en,
  output logic [IN_AW-1:0] ib_rd_addr,
  output logic             nm_rd_en,
  output logic [NM_RW-1:0] nm_rd_row,
  output logic [LW-1:0]    nm_rd_lane,
  // PU side, aligned with the memory data
  output logic             src_sel,   // 1: input buffer, 0: neuron memory
  output pu_ctrl_t         pu_ctrl,
  // write-back, aligned with the PU outputs
  output logic             wb_valid,
  output logic [3:0]       wb_row,
  output logic             wb_to_out
);

  typedef struct packed {
    logic       valid;   // the PUs finish a neuron group here
    logic [3:0] g;       // which group
  } tag_t;

  layer_cfg_t  c;
  logic        issuing, running;
  logic [15:0] i;
  logic [4:0]  g;
  logic [19:0] w_addr;
  logic [NM_RW-1:0] row;
  logic [LW-1:0]    lane;
  logic        step_last;
  logic        pipe_busy;
  tag_t        tag [PU_LAT + 1];   // tag[0] at the PU inputs, tag[PU_LAT] at its outputs

  assign step_last = (i == c.n_in - 16'd1) && (g == c.groups - 5'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c       <= '0;
      issuing <= 1'b0;
      running <= 1'b0;
      i       <= '0;
      g       <= '0;
      w_addr  <= '0;
      row     <= '0;
      lane    <= '0;
    end else begin
      if (start && !running) begin
        c       <= cfg;
        issuing <= 1'b1;
        running <= 1'b1;
        i       <= '0;
        g       <= '0;
        w_addr  <= cfg.w_base;
        row     <= '0;
        lane    <= '0;
      end else if (issuing) begin
        w_addr <= w_addr + 20'd1;
        if (step_last) begin
          issuing <= 1'b0;
        end else if (g == c.groups - 5'd1) begin
          g <= '0;
          i <= i + 16'd1;
          if (lane == LW'(NUM_PU - 1)) begin
            lane <= '0;
            row  <= row + 1'b1;
          end else begin
            lane <= lane + 1'b1;
          end
        end else begin
          g <= g + 5'd1;
        end
      end else if (running && !pipe_busy) begin
        running <= 1'b0;
      end
    end
  end

  always_comb begin
    pipe_busy = 1'b0;
    for (int k = 0; k <= PU_LAT; k++) pipe_busy |= tag[k].valid;
  end

  assign done = running && !issuing && !pipe_busy;

  // Read addresses for the step being issued.
  assign w_rd_en    = issuing;
  assign w_rd_addr  = W_AW'(w_addr);
  assign b_rd_en    = issuing;
  assign b_rd_addr  = B_AW'(c.b_base + 12'(g));
  assign ib_rd_en   = issuing && c.src_input;
  assign ib_rd_addr = IN_AW'(i);
  assign nm_rd_en   = issuing && !c.src_input;
  assign nm_rd_row  = row;
  assign nm_rd_lane = lane;

  // Control pipeline: issue -> PU inputs -> ... -> PU outputs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pu_ctrl <= '0;
      src_sel <= 1'b0;
      for (int k = 0; k <= PU_LAT; k++) tag[k] <= '0;
    end else begin
      pu_ctrl.valid <= issuing;
      pu_ctrl.first <= issuing && (i == 16'd0);
      pu_ctrl.last  <= issuing && (i == c.n_in - 16'd1);
      pu_ctrl.relu  <= c.relu;
      pu_ctrl.tap   <= 4'(c.groups - 5'd1);
      src_sel       <= c.src_input;
      tag[0]        <= '{valid: issuing && (i == c.n_in - 16'd1), g: 4'(g)};
      for (int k = 1; k <= PU_LAT; k++) tag[k] <= tag[k-1];
    end
  end

  assign wb_valid  = tag[PU_LAT].valid;
  assign wb_row    = tag[PU_LAT].g;
  assign wb_to_out = c.to_out;

endmodule
