// tb_nnc_controller: starts the controller on random layer settings and
// checks every cycle of the schedule against an independent model:
// for step k = i*G + g the weight row w_base + k, bias row b_base + g, the
// input-buffer address i or neuron-memory (row, lane) = (i / NPU, i % NPU);
// one cycle later the PU control word (first, last, relu, tap = G-1) and
// the source select; write-back of group g PU_LAT cycles after its last
// step, to the right destination; and `done` exactly n_in*G + 5 cycles
// after start.
module tb_nnc_controller;
  import nnc_pkg::*;
  localparam int NPU = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, done;
  layer_cfg_t cfg;
  logic w_rd_en, b_rd_en, ib_rd_en, nm_rd_en, src_sel, wb_valid, wb_to_out;
  logic [11:0] w_rd_addr;
  logic [3:0]  b_rd_addr;
  logic [9:0]  ib_rd_addr;
  logic [1:0]  nm_rd_row, nm_rd_lane;
  logic [3:0]  wb_row;
  pu_ctrl_t    pu_ctrl;

  nnc_controller #(.NUM_PU(NPU), .W_AW(12), .B_AW(4), .IN_AW(10), .NM_RW(2)) dut (
    .clk, .rst_n, .start, .cfg, .done,
    .w_rd_en, .w_rd_addr, .b_rd_en, .b_rd_addr, .ib_rd_en, .ib_rd_addr,
    .nm_rd_en, .nm_rd_row, .nm_rd_lane, .src_sel, .pu_ctrl,
    .wb_valid, .wb_row, .wb_to_out);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      int n, G, steps, wb_seen, total;
      n = 1 + $urandom % 14;
      G = 1 + (t % 4);
      steps = n * G;
      cfg = '0;
      cfg.n_in = 16'(n); cfg.groups = 5'(G);
      cfg.w_base = 20'($urandom % 200); cfg.b_base = 12'($urandom % 4);
      cfg.src_input = 1'(t % 2); cfg.relu = 1'($urandom); cfg.to_out = 1'($urandom);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wb_seen = 0;
      // cycle c after start: step c issued; its control word is seen at c+1
      for (int c = 0; c < steps + 8; c++) begin
        int i, g, pi, pg;
        i = c / G; g = c % G;
        if (c < steps) begin
          check(w_rd_en && w_rd_addr == 12'(cfg.w_base + 20'(c)), $sformatf("waddr t%0d c%0d", t, c));
          check(b_rd_en && b_rd_addr == 4'(cfg.b_base + 12'(g)), "baddr");
          if (cfg.src_input)
            check(ib_rd_en && !nm_rd_en && ib_rd_addr == 10'(i), "ib addr");
          else
            check(nm_rd_en && !ib_rd_en && nm_rd_row == 2'(i / NPU) && nm_rd_lane == 2'(i % NPU),
                  "nm addr");
        end else begin
          check(!w_rd_en && !ib_rd_en && !nm_rd_en, "reads after the layer");
        end
        pi = (c - 1) / G; pg = (c - 1) % G;
        if (c >= 1 && c <= steps) begin
          check(pu_ctrl.valid && pu_ctrl.first == (pi == 0) && pu_ctrl.last == (pi == n - 1)
                && pu_ctrl.relu == cfg.relu && pu_ctrl.tap == 4'(G - 1)
                && src_sel == cfg.src_input, $sformatf("pu_ctrl t%0d c%0d", t, c));
        end else if (c > steps) begin
          check(!pu_ctrl.valid, "pu_ctrl idle");
        end
        // write-back of the step issued at c - 1 - PU_LAT
        if (c - 1 - PU_LAT >= (n - 1) * G && c - 1 - PU_LAT < steps) begin
          check(wb_valid && wb_row == 4'((c - 1 - PU_LAT) % G) && wb_to_out == cfg.to_out,
                $sformatf("wb t%0d c%0d", t, c));
          wb_seen++;
        end else begin
          check(!wb_valid, $sformatf("no wb t%0d c%0d", t, c));
        end
        check(done == (c == steps + PU_LAT + 1), $sformatf("done t%0d c%0d", t, c));
        @(negedge clk);
      end
      check(wb_seen == G, "all groups written back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
