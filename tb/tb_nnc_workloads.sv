// tb_nnc_workloads: runs the six evaluated networks, each on an accelerator
// built for it with the PU count chosen for it: 64 PUs for MNIST(S)
// 784-64-10 and CNAE-9(S) 856-64-9, 128 PUs for MNIST(L) 784-128-128-10,
// CNAE-9(L) 856-128-128-9, Forest(S) 54-128-128-7 and Forest(L)
// 54-128-512-128-7 (its 512-neuron layer uses 4 neuron groups per PU).
// Weights and inputs are random (no trained networks are available); each
// runner checks every output against a reference model and the compute
// time. The MNIST(L) network is also run with the two fixed-point weight
// formats the dual-track format is compared against (16-bit Q6.10, 4-bit
// Q2.2).
module tb_nnc_workloads;
  import nnc_pkg::*;
  localparam int N = 8;
  logic      fin [N];
  int        chk [N], fail [N], cyc [N];
  int        checks = 0, failures = 0;
  string     names [N] = '{"MNIST(S)", "MNIST(L)", "CNAE-9(S)", "CNAE-9(L)", "Forest(S)", "Forest(L)",
                           "MNIST(L) 16-bit weights", "MNIST(L) 4-bit weights"};

  nnc_net_runner #(.NPU(64),  .TOPO('{784, 64, 10, 0, 0}))      r0 (fin[0], chk[0], fail[0], cyc[0]);
  nnc_net_runner #(.NPU(128), .TOPO('{784, 128, 128, 10, 0}))   r1 (fin[1], chk[1], fail[1], cyc[1]);
  nnc_net_runner #(.NPU(64),  .TOPO('{856, 64, 9, 0, 0}))       r2 (fin[2], chk[2], fail[2], cyc[2]);
  nnc_net_runner #(.NPU(128), .TOPO('{856, 128, 128, 9, 0}))    r3 (fin[3], chk[3], fail[3], cyc[3]);
  nnc_net_runner #(.NPU(128), .TOPO('{54, 128, 128, 7, 0}))     r4 (fin[4], chk[4], fail[4], cyc[4]);
  nnc_net_runner #(.NPU(128), .TOPO('{54, 128, 512, 128, 7}))   r5 (fin[5], chk[5], fail[5], cyc[5]);

  nnc_net_runner #(.NPU(128), .TOPO('{784, 128, 128, 10, 0}), .WT(WT_FIXED16)) r6 (fin[6], chk[6], fail[6], cyc[6]);
  nnc_net_runner #(.NPU(128), .TOPO('{784, 128, 128, 10, 0}), .WT(WT_FIXED4))  r7 (fin[7], chk[7], fail[7], cyc[7]);

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5] && fin[6] && fin[7]);
    for (int k = 0; k < N; k++) begin
      $display("%s: %0d checks, %0d failures", names[k], chk[k], fail[k]);
      checks += chk[k];
      failures += fail[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
