// tb_nnc_fsm: drives the FSM with a stand-in input buffer, controller and
// output buffer (each answers after a random delay) for a 4-layer
// 6-10-7-12-3 network on 4 PUs, and checks the order of events: clear on
// start, load enabled until the buffer is full, one controller start per
// layer with the layer settings worked out here by hand, the output send
// after the last layer, and a single done pulse at the end. busy must be
// high throughout.
module tb_nnc_fsm;
  import nnc_pkg::*;
  localparam topo_t TOPO = '{6, 10, 7, 12, 3};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, ib_clear, ib_load_en, ib_full = 0;
  logic ctl_start, ctl_done = 0, ob_send_start, ob_send_done = 0;
  layer_cfg_t ctl_cfg;

  nnc_fsm #(.NUM_PU(4), .TOPOLOGY(TOPO)) dut (
    .clk, .rst_n, .start, .busy, .done, .ib_clear, .ib_load_en, .ib_full,
    .ctl_start, .ctl_cfg, .ctl_done, .ob_send_start, .ob_send_done);

  // expected settings: n_in, groups, w_base, b_base, src_input, relu, to_out
  // groups = ceil(out / 4): 3, 2, 3, 1; w_base: 0, 6*3=18, 18+10*2=38, 38+7*3=59
  int exp_n [4] = '{6, 10, 7, 12};
  int exp_g [4] = '{3, 2, 3, 1};
  int exp_w [4] = '{0, 18, 38, 59};
  int exp_b [4] = '{0, 3, 5, 8};

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wait_for(ref logic sig, input string what);
    int k = 0;
    while (!sig && k < 100) begin
      @(negedge clk);
      check(busy && !done, {"busy while waiting for ", what});
      k++;
    end
    check(sig, {"saw ", what});
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
    for (int run = 0; run < 3; run++) begin
      @(negedge clk);
      check(!busy && !ib_load_en && !ctl_start, "idle");
      start = 1;
      #1 check(ib_clear, "clear with start");
      @(negedge clk) start = 0;
      check(ib_load_en, "load enabled");
      repeat ($urandom % 5) begin
        @(negedge clk);
        check(ib_load_en && !ctl_start, "still loading");
      end
      ib_full = 1;
      @(negedge clk) ib_full = 0;
      for (int l = 0; l < 4; l++) begin
        wait_for(ctl_start, "controller start");
        check(int'(ctl_cfg.n_in) == exp_n[l] && int'(ctl_cfg.groups) == exp_g[l]
              && int'(ctl_cfg.w_base) == exp_w[l] && int'(ctl_cfg.b_base) == exp_b[l]
              && ctl_cfg.src_input == (l == 0) && ctl_cfg.relu == (l != 3)
              && ctl_cfg.to_out == (l == 3), $sformatf("layer %0d settings", l));
        @(negedge clk);
        repeat (1 + $urandom % 6) begin
          check(!ctl_start && !ob_send_start, "waiting on the layer");
          @(negedge clk);
        end
        ctl_done = 1;
        #1 check(ob_send_start == (l == 3), "send start after the last layer only");
        @(negedge clk) ctl_done = 0;
      end
      repeat (1 + $urandom % 4) begin
        check(busy && !done && !ctl_start, "sending");
        @(negedge clk);
      end
      ob_send_done = 1;
      @(negedge clk) ob_send_done = 0;
      check(done, "done pulse");
      @(negedge clk);
      check(!done && !busy, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
