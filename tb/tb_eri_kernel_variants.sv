// tb_eri_kernel_variants: runs several quartet types of the parameterised
// kernel side by side, each against its own harness: [ss|ss] (1 integral,
// setup bound), [pp|ss] (9 integrals), [pp|pp] (81 integrals, 3 roots) and
// [ss|dd] (36 integrals, 3 roots, compute bound). For each it checks every
// stored integral and that the steady-state interval between quartets
// matches the cycle model max(3 NRYS (LD+1), n_c n_d, ceil(n_ERI/16)).
module tb_eri_kernel_variants;
  import eri_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NV = 4;
  // angular momenta LA, LB, LC, LD of variant v in hex digits 4v+3 .. 4v
  localparam logic [16*NV-1:0] VL = 64'h0022_1111_1100_0000;

  logic fin [NV];
  int   chk [NV], fl [NV];

  for (genvar v = 0; v < NV; v++) begin : g_v
    localparam int unsigned LA = VL[16*v+12 +: 4];
    localparam int unsigned LB = VL[16*v+8 +: 4];
    localparam int unsigned LC = VL[16*v+4 +: 4];
    localparam int unsigned LD = VL[16*v +: 4];
    logic      rst_n, coef_valid, coef_ready, mem_valid, mem_ready;
    rys_coef_t coef;
    logic [31:0] mem_addr, quartets_done;
    logic [MEM_BITS-1:0] mem_data;
    logic      stall_setup, stall_compute, stall_copy;

    eri_kernel #(.LA(LA), .LB(LB), .LC(LC), .LD(LD)) dut (
      .clk, .rst_n, .coef_valid, .coef_ready, .coef, .mem_valid, .mem_ready, .mem_addr,
      .mem_data, .quartets_done, .stall_setup, .stall_compute, .stall_copy);

    eri_kernel_harness #(.LA(LA), .LB(LB), .LC(LC), .LD(LD), .NQ(10), .NQA(5), .SLACK(4),
                         .WATCHDOG(50000), .REPORT(1'b0)) harness (
      .clk, .rst_n, .coef_valid, .coef_ready, .coef, .mem_valid, .mem_ready, .mem_addr,
      .mem_data, .quartets_done, .stall_setup, .stall_compute, .stall_copy,
      .finished(fin[v]), .n_checks(chk[v]), .n_failures(fl[v]));
  end

  initial begin
    int checks, failures;
    bit all_done;
    all_done = 0;
    while (!all_done) begin
      @(posedge clk);
      all_done = 1;
      for (int v = 0; v < NV; v++) if (!fin[v]) all_done = 0;
    end
    checks = 0;
    failures = 0;
    for (int v = 0; v < NV; v++) begin
      checks += chk[v];
      failures += fl[v];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", 1, 1);
    $finish;
  end

endmodule
