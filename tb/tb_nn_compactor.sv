// tb_nn_compactor: end-to-end test of the accelerator on a small network.
//
// A 4-PU build runs a 6-16-7-12-3 network (neuron groups per layer 4, 2, 3,
// 1, so every forwarding tap is used). The testbench draws random 8-bit
// Q2.6 weights, mostly small with some large ones, encodes them with its
// own dual-track encoder, loads codes and random biases through the load
// ports, and runs several inferences with random input gaps and random
// output back-pressure. A reference model in the testbench (decoded
// weights, exact products, bias aligned to the product fraction, floor
// shift to Q6.10, 16-bit saturation, ReLU on hidden layers) predicts every
// output. It also checks the compute time: from the last input accepted to
// the first output, sum over layers of (n_in*G + 6) plus 2 cycles.
// Mechanisms counted, each must occur: MSB-centric and LSB-centric weights,
// each forwarding tap, ReLU clamping, saturation, input-buffer and
// neuron-memory sourced layers, input gaps and output stalls.
module tb_nn_compactor;
  import nnc_pkg::*;
  localparam int    NPU  = 4;
  localparam topo_t TOPO = '{6, 16, 7, 12, 3};
  localparam int    RUNS = 4;
  localparam int    NL   = num_layers(TOPO);
  localparam int    W_DEPTH = w_base(TOPO, NL, NPU);
  localparam int    B_DEPTH = b_base(TOPO, NL, NPU);
  localparam int    W_AW = clog2_min1(W_DEPTH), B_AW = clog2_min1(B_DEPTH);
  localparam int    LW = clog2_min1(NPU);
  localparam int    MAXN = 1024;

  int checks = 0, failures = 0;
  int n_msb = 0, n_lsb = 0, n_relu = 0, n_sat = 0, n_gap = 0, n_stall = 0;
  int n_tap [4] = '{0, 0, 0, 0};
  int n_src_in = 0, n_src_nm = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic            wload_en = 0, bload_en = 0, start = 0, busy, done;
  logic [W_AW-1:0] wload_addr;
  logic [B_AW-1:0] bload_addr;
  logic [LW-1:0]   wload_lane, bload_lane;
  logic [4:0]      wload_data;
  neuron_t         bload_data, in_data, out_data;
  logic            in_valid = 0, in_ready, out_valid, out_ready = 0, out_last;

  nn_compactor #(.WTYPE(WT_DUAL5), .NUM_PU(NPU), .TOPOLOGY(TOPO), .FWD_TAPS(4)) dut (
    .clk, .rst_n,
    .wload_en, .wload_addr, .wload_lane, .wload_data,
    .bload_en, .bload_addr, .bload_lane, .bload_data,
    .start, .busy, .done,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .out_last);

  // weights[l][i][j] as decoded Q2.6 integers, biases[l][j]
  int wq [NL][][];
  int bq [NL][];
  int act [NL+1][];

  // dual-track encoder for an 8-bit Q2.6 value
  function automatic logic [4:0] encode(int v);
    int r;
    if (v >= 16 || v < -16) begin
      r = (v + 8) >>> 4; if (r > 7) r = 7;
      return {1'b1, 4'(r)};
    end
    r = (v + 1) >>> 1; if (r > 7) r = 7;
    return {1'b0, 4'(r)};
  endfunction

  function automatic int decode(logic [4:0] c);
    int s = c[3] ? -8 : 0;
    return c[4] ? (s + int'(c[2:0])) * 16 : (s + int'(c[2:0])) * 2;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference forward pass over act[0]
  task automatic reference();
    for (int l = 0; l < NL; l++) begin
      act[l+1] = new[TOPO[l+1]];
      for (int j = 0; j < int'(TOPO[l+1]); j++) begin
        longint acc, r;
        acc = longint'(bq[l][j]) * 64;
        for (int i = 0; i < int'(TOPO[l]); i++) acc += longint'(act[l][i]) * wq[l][i][j];
        r = acc >>> 6;
        if (r > 32767)  begin r = 32767;  n_sat++; end
        if (r < -32768) begin r = -32768; n_sat++; end
        if (l != NL - 1 && r < 0) begin r = 0; n_relu++; end
        act[l+1][j] = int'(r);
      end
    end
  endtask

  initial begin
    int expect_lat;
    expect_lat = 2;
    for (int l = 0; l < NL; l++) begin
      int G;
      G = int'(groups(TOPO, l, NPU));
      expect_lat += int'(TOPO[l]) * G + 6;
      n_tap[G-1]++;
      if (l == 0) n_src_in++; else n_src_nm++;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // weights and biases
    for (int l = 0; l < NL; l++) begin
      int G;
      G = int'(groups(TOPO, l, NPU));
      wq[l] = new[TOPO[l]];
      bq[l] = new[G * NPU];
      for (int i = 0; i < int'(TOPO[l]); i++) begin
        wq[l][i] = new[G * NPU];
        for (int j = 0; j < G * NPU; j++) begin
          int v;
          logic [4:0] c;
          v = ($urandom % 8 == 0) ? int'($signed(8'($urandom))) : int'($urandom % 31) - 15;
          c = encode(v);
          wq[l][i][j] = decode(c);
          if (j < int'(TOPO[l+1])) begin if (c[4]) n_msb++; else n_lsb++; end
          @(negedge clk);
          wload_en = 1;
          wload_addr = W_AW'(w_base(TOPO, l, NPU) + i * G + j / NPU);
          wload_lane = LW'(j % NPU);
          wload_data = c;
        end
      end
      for (int j = 0; j < G * NPU; j++) begin
        bq[l][j] = int'($urandom % 2048) - 1024;
        if (l == 1 && j == 0) bq[l][j] = 30000;   // drives one neuron into saturation
        @(negedge clk);
        wload_en = 0;
        bload_en = 1;
        bload_addr = B_AW'(b_base(TOPO, l, NPU) + j / NPU);
        bload_lane = LW'(j % NPU);
        bload_data = neuron_t'(bq[l][j]);
      end
    end
    @(negedge clk);
    wload_en = 0; bload_en = 0;

    for (int run = 0; run < RUNS; run++) begin
      int last_in_cyc, first_out_cyc, k;
      act[0] = new[TOPO[0]];
      for (int i = 0; i < int'(TOPO[0]); i++) act[0][i] = int'($urandom % 8192) - 4096;
      if (run == RUNS - 1) act[0][0] = 32000;
      reference();
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int i = 0; i < int'(TOPO[0]); i++) begin
        if ($urandom % 3 == 0) begin
          in_valid = 0; n_gap++;
          @(negedge clk);
        end
        in_valid = 1; in_data = neuron_t'(act[0][i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        last_in_cyc = cyc;
        @(negedge clk);
      end
      in_valid = 0;
      k = 0; first_out_cyc = -1;
      while (k < int'(TOPO[NL])) begin
        out_ready = (run == 0) ? 1'b1 : 1'($urandom);
        @(posedge clk);
        if (out_valid && first_out_cyc < 0) first_out_cyc = cyc;
        if (out_valid && out_ready) begin
          check(int'(out_data) == act[NL][k],
                $sformatf("run %0d out %0d: got %0d expected %0d", run, k, out_data, act[NL][k]));
          check(out_last == (k == int'(TOPO[NL]) - 1), "out_last");
          k++;
        end else if (out_valid) n_stall++;
        @(negedge clk);
      end
      out_ready = 0;
      check(first_out_cyc - last_in_cyc == expect_lat,
            $sformatf("latency %0d expected %0d", first_out_cyc - last_in_cyc, expect_lat));
      repeat (2) @(negedge clk);
      check(!busy, "idle after the outputs");
    end
    // every mechanism must have happened
    check(n_msb > 0 && n_lsb > 0, "both weight tracks");
    for (int t = 0; t < 4; t++) check(n_tap[t] > 0, $sformatf("forwarding tap %0d", t));
    check(n_relu > 0, "ReLU clamp");
    check(n_sat > 0, "saturation");
    check(n_src_in > 0 && n_src_nm > 0, "both neuron sources");
    check(n_gap > 0 && n_stall > 0, "input gaps and output stalls");
    $display("msb=%0d lsb=%0d relu=%0d sat=%0d gaps=%0d stalls=%0d taps=%0d/%0d/%0d/%0d",
             n_msb, n_lsb, n_relu, n_sat, n_gap, n_stall, n_tap[0], n_tap[1], n_tap[2], n_tap[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
