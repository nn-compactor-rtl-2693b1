// tb_nnc_input_buffer: streams N random values in with random gaps, checks
// that in_ready drops once N are held (and that a further value is not
// taken), that nothing is accepted while load_en is low, reads every
// address back and checks it, then clears and loads a second vector.
module tb_nnc_input_buffer;
  import nnc_pkg::*;
  localparam int N = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, load_en = 0, in_valid = 0, in_ready, full, rd_en = 0;
  neuron_t in_data, rd_data;
  logic [4:0] rd_addr;
  neuron_t model [N];

  nnc_input_buffer #(.N(N)) dut (
    .clk, .rst_n, .clear, .load_en, .in_valid, .in_ready, .in_data, .full,
    .rd_en, .rd_addr, .rd_data);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 2; v++) begin
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      in_valid = 1; in_data = 16'h1234;
      @(negedge clk);
      check(!in_ready, "ready while load_en low");
      load_en = 1;
      for (int k = 0; k < N; k++) begin
        in_valid = 0;
        repeat ($urandom % 2) @(negedge clk);
        in_valid = 1; in_data = neuron_t'($urandom); model[k] = in_data;
        #1 check(in_ready, "not ready before full");
        @(negedge clk);
      end
      in_data = 16'h7777;
      #1 check(full && !in_ready, "full and not ready after N");
      @(negedge clk);
      in_valid = 0; load_en = 0;
      for (int k = 0; k < N; k++) begin
        rd_en = 1; rd_addr = 5'(k);
        @(negedge clk);
        rd_en = 0;
        check(rd_data === model[k], $sformatf("read %0d", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
