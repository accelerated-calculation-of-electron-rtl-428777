// tb_eri_kernel: end-to-end test of the kernel for [ps|pp] quartets
// (LA=1, LB=0, LC=1, LD=1: 2 Rys roots, 27 integrals per quartet), small
// enough to simulate quickly. Stimulus, global memory model and all checks
// are in eri_kernel_harness.
module tb_eri_kernel;
  import eri_pkg::*;

  localparam int unsigned LA = 1, LB = 0, LC = 1, LD = 1;

  logic clk = 0;
  always #5 clk = ~clk;

  logic      rst_n, coef_valid, coef_ready, mem_valid, mem_ready;
  rys_coef_t coef;
  logic [31:0] mem_addr, quartets_done;
  logic [MEM_BITS-1:0] mem_data;
  logic      stall_setup, stall_compute, stall_copy;
  logic      finished;
  int        n_checks, n_failures;

  eri_kernel #(.LA(LA), .LB(LB), .LC(LC), .LD(LD)) dut (.*);

  eri_kernel_harness #(.LA(LA), .LB(LB), .LC(LC), .LD(LD), .NQ(12), .NQA(5), .SLACK(4),
                       .WATCHDOG(50000)) harness (.*);

endmodule
