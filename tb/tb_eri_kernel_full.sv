// tb_eri_kernel_full: end-to-end test of the kernel at its default size,
// [ff|ff] quartets (7 Rys roots, 10000 integrals, 625 words per quartet).
// The kernel is used with its default parameters; the harness is told the
// same angular momenta. Three quartets run with the memory always ready, so
// that the interval between the second and third shows the copy loop
// setting the rate (625 cycles against 84 for setup and 100 for compute);
// three more run under back-pressure.
module tb_eri_kernel_full;
  import eri_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic      rst_n, coef_valid, coef_ready, mem_valid, mem_ready;
  rys_coef_t coef;
  logic [31:0] mem_addr, quartets_done;
  logic [MEM_BITS-1:0] mem_data;
  logic      stall_setup, stall_compute, stall_copy;
  logic      finished;
  int        n_checks, n_failures;

  eri_kernel dut (.*);

  eri_kernel_harness #(.LA(3), .LB(3), .LC(3), .LD(3), .NQ(6), .NQA(3), .SLACK(4),
                       .WATCHDOG(60000)) harness (.*);

endmodule
