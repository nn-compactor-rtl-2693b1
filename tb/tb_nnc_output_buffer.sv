// tb_nnc_output_buffer: writes random rows, starts a send and accepts the
// stream with random out_ready back-pressure, checking the values in neuron
// order (neuron k from row k / NUM_PU, lane k % NUM_PU), out_last on the
// final one, the stream length and the send_done pulse.
module tb_nnc_output_buffer;
  import nnc_pkg::*;
  localparam int NPU = 4, ROWS = 3, N = 10;
  int checks = 0, failures = 0, stalls = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, send_start = 0, send_done, out_valid, out_ready = 0, out_last;
  logic [1:0] wr_row;
  neuron_t wr_data [NPU], out_data;
  neuron_t model [ROWS][NPU];

  nnc_output_buffer #(.NUM_PU(NPU), .ROWS(ROWS), .N(N)) dut (
    .clk, .rst_n, .wr_en, .wr_row, .wr_data, .send_start, .send_done,
    .out_valid, .out_ready, .out_data, .out_last);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      int k, got_done;
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk) wr_en = 1; wr_row = 2'(r);
        for (int p = 0; p < NPU; p++) begin
          wr_data[p] = neuron_t'($urandom); model[r][p] = wr_data[p];
        end
      end
      @(negedge clk) wr_en = 0; send_start = 1;
      @(negedge clk) send_start = 0;
      k = 0; got_done = 0;
      while (k < N + 3) begin
        out_ready = 1'($urandom);
        #1;
        if (out_valid && out_ready) begin
          checks++;
          if (k >= N || out_data !== model[k / NPU][k % NPU] || out_last !== (k == N - 1)) begin
            failures++;
            $display("FAIL item %0d", k);
          end
          k++;
        end else if (out_valid) stalls++;
        else if (k >= N) k++;
        @(negedge clk);
        if (send_done) got_done++;
      end
      checks++;
      if (got_done != 1) begin failures++; $display("FAIL send_done %0d", got_done); end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no back-pressure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
