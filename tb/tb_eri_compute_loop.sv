// tb_eri_compute_loop: feeds the compute loop from a model of the 2-D
// integral store holding random values, captures the columns it writes, and
// compares every integral with a double precision Rys sum
//   [ab|cd] = sum_nu Ix * Iy * Iz
// over Cartesian components enumerated here independently (x power
// descending, then y power descending). It checks the write order, that a
// quartet takes n_c * n_d cycles of writes ending with done, and that a
// second quartet can start right after done.
module tb_eri_compute_loop;
  import eri_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned LA = 1, LB = 2, LC = 1, LD = 1;
  localparam int unsigned NRYS = 3;
  localparam int NA = 3, NB = 6, NC = 3, ND = 3;
  localparam int NAB = NA * NB, NCD = NC * ND;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  start = 0, busy, done;
  logic [idx_w(LC+1)-1:0] i_c [3];
  logic [idx_w(LD+1)-1:0] i_d [3];
  fp32_t i_data [3][NRYS][LA+1][LB+1];
  logic  wr_en;
  logic [idx_w(NCD)-1:0] wr_addr;
  fp32_t wr_data [NAB];

  eri_compute_loop #(.LA(LA), .LB(LB), .LC(LC), .LD(LD), .NRYS(NRYS)) dut (.*);

  // model of the 2-D integral store
  fp32_t store [3][NRYS][LA+1][LB+1][LC+1][LD+1];
  always_comb
    for (int mu = 0; mu < 3; mu++)
      for (int nu = 0; nu < int'(NRYS); nu++)
        for (int a = 0; a <= int'(LA); a++)
          for (int b = 0; b <= int'(LB); b++)
            i_data[mu][nu][a][b] = (int'(i_c[mu]) <= int'(LC) && int'(i_d[mu]) <= int'(LD)) ?
                                   store[mu][nu][a][b][i_c[mu]][i_d[mu]] : 32'hdead_beef;

  // Cartesian powers, enumerated independently of the RTL
  int pw [4][16][3];
  initial
    for (int l = 0; l < 4; l++) begin
      int k;
      k = 0;
      for (int x = l; x >= 0; x--)
        for (int y = l - x; y >= 0; y--) begin
          pw[l][k][0] = x;
          pw[l][k][1] = y;
          pw[l][k][2] = l - x - y;
          k++;
        end
    end

  int checks = 0, failures = 0;
  fp32_t got [NAB][NCD];
  int writes = 0, next_addr = 0;
  int cyc = 0, start_cyc = 0, done_cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && wr_en) begin
      checks++;
      if (int'(wr_addr) != next_addr) begin
        failures++;
        $display("FAIL write address %0d, expected %0d", wr_addr, next_addr);
      end
      for (int ab = 0; ab < NAB; ab++) got[ab][wr_addr] = wr_data[ab];
      next_addr++;
      writes++;
    end
    if (rst_n && done) done_cyc <= cyc;
  end

  task automatic run_quartet(input int q);
    foreach (store[mu, nu, a, b, c, d])
      store[mu][nu][a][b][c][d] = from_real(rand_real(-3, 1));
    next_addr = 0;
    writes = 0;
    @(negedge clk);
    start = 1;
    start_cyc = cyc;
    @(negedge clk);
    start = 0;
    wait (done);
    @(posedge clk);  // the monitor samples the last write and done here
    @(negedge clk);
    checks++;
    if (writes != NCD) begin
      failures++;
      $display("FAIL quartet %0d: %0d columns written, expected %0d", q, writes, NCD);
    end
    // done comes with the last write, n_c*n_d + 1 cycles after start
    checks++;
    if (done_cyc - start_cyc != NCD + 1) begin
      failures++;
      $display("FAIL quartet %0d: done after %0d cycles, expected %0d", q, done_cyc - start_cyc,
               NCD + 1);
    end
    for (int ia = 0; ia < NA; ia++)
      for (int ib = 0; ib < NB; ib++)
        for (int ic = 0; ic < NC; ic++)
          for (int id = 0; id < ND; id++) begin
            real e = 0.0;
            for (int nu = 0; nu < int'(NRYS); nu++) begin
              real p = 1.0;
              for (int mu = 0; mu < 3; mu++)
                p = p * to_real(store[mu][nu][pw[LA][ia][mu]][pw[LB][ib][mu]]
                                           [pw[LC][ic][mu]][pw[LD][id][mu]]);
              e += p;
            end
            checks++;
            if (!close(to_real(got[ia*NB+ib][ic*ND+id]), e, 1e-5, 1e-7)) begin
              failures++;
              if (failures < 10)
                $display("FAIL q%0d [%0d %0d|%0d %0d] got %g expected %g", q, ia, ib, ic, id,
                         to_real(got[ia*NB+ib][ic*ND+id]), e);
            end
          end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int q = 0; q < 4; q++) run_quartet(q);
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL busy after the last quartet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
