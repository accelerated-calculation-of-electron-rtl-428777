// eri_kernel_harness: stimulus and checking for a whole eri_kernel instance,
// shared by the end-to-end testbenches. It is connected to the kernel's
// ports (it does not instantiate the kernel, so that a testbench can use the
// kernel with its default parameters).
//
// What it does.
//   * Draws NQ quartets of random Rys coefficient records and streams them in.
//   * Models global memory: every accepted 512-bit store is kept by address.
//   * Phase 1 (the first NQA quartets): records always available and memory
//     always ready. The interval between consecutive finished quartets is
//     compared with the cycle model max(setup, compute, copy), setup =
//     3 NRYS (LD+1), compute = n_c n_d, copy = ceil(n_ERI/16), allowing
//     SLACK cycles of hand-over per quartet.
//   * Phase 2: gaps in the record stream, random memory back-pressure and one
//     long stretch without memory acceptance, so that every stall happens.
//   * At the end every stored word is compared with a double precision
//     reference: G(n,m) by the Rys recurrences, I(a,b,c,d) by the binomial
//     form of the transfer relations, [ab|cd] = sum over roots of
//     Ix Iy Iz, laid out 16 per word in bra-pair-major order, padded with
//     zeros.
//   * Counts each mechanism of the kernel (overlap of setup and copy, setup
//     waiting for a slot, compute waiting for a slot, copy waiting for
//     memory, record stream running dry) and fails if one never happened.
// With REPORT set it prints the TB_RESULT line and ends the simulation;
// otherwise it raises finished and leaves the totals on n_checks and
// n_failures for a testbench that runs several kernels side by side.
module eri_kernel_harness
  import eri_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter int unsigned LA    = 1,
  parameter int unsigned LB    = 0,
  parameter int unsigned LC    = 1,
  parameter int unsigned LD    = 1,
  parameter int          NQ    = 10,
  parameter int          NQA   = 4,
  parameter int          SLACK = 4,
  parameter int          WATCHDOG = 100000,
  parameter bit          REPORT = 1'b1
) (
  input  logic      clk,
  output logic      rst_n,
  output logic      coef_valid,
  input  logic      coef_ready,
  output rys_coef_t coef,
  input  logic      mem_valid,
  output logic      mem_ready,
  input  logic [31:0] mem_addr,
  input  logic [MEM_BITS-1:0] mem_data,
  input  logic [31:0] quartets_done,
  input  logic      stall_setup,
  input  logic      stall_compute,
  input  logic      stall_copy,
  output logic      finished,
  output int        n_checks,
  output int        n_failures
);

  localparam int NRYS = int'(n_rys(LA + LB + LC + LD));
  localparam int NA = int'(ncart(LA)), NB = int'(ncart(LB));
  localparam int NC = int'(ncart(LC)), ND = int'(ncart(LD));
  localparam int NERI = NA * NB * NC * ND;
  localparam int NW = (NERI + 15) / 16;
  localparam int NMAX = int'(LA + LB), MMAX = int'(LC + LD);
  localparam int T_SETUP = 3 * NRYS * (int'(LD) + 1);
  localparam int T_COMPUTE = NC * ND;
  localparam int T_COPY = NW;
  localparam int T_MODEL = (T_SETUP > T_COMPUTE) ? ((T_SETUP > T_COPY) ? T_SETUP : T_COPY)
                                                 : ((T_COMPUTE > T_COPY) ? T_COMPUTE : T_COPY);

  int checks = 0, failures = 0;
  initial finished = 0;
  assign n_checks = checks;
  assign n_failures = failures;
  rys_coef_t recs [NQ][3*NRYS];
  logic [MEM_BITS-1:0] gmem [NQ*NW];
  bit written [NQ*NW];
  int cyc = 0;
  int phase = 1;
  int phase2_cyc = 0;

  // ---- Cartesian powers ----
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

  function automatic real binom(int n, int k);
    real r = 1.0;
    for (int i = 0; i < k; i++) r = r * real'(n - i) / real'(i + 1);
    return r;
  endfunction

  // 2-D integrals of one record, I[a][b][c][d]
  typedef real i4_t [LA+1][LB+1][LC+1][LD+1];
  function automatic i4_t ref_2d(rys_coef_t c);
    real g [NMAX+1][MMAX+1];
    i4_t r;
    real c00, c00p, b00, b10, b01, ab, cd;
    c00 = to_real(c.c00); c00p = to_real(c.c00p); b00 = to_real(c.b00);
    b10 = to_real(c.b10); b01 = to_real(c.b01); ab = to_real(c.ab); cd = to_real(c.cd);
    foreach (g[n, m]) g[n][m] = 0.0;
    g[0][0] = to_real(c.i00);
    for (int n = 1; n <= NMAX; n++)
      g[n][0] = c00 * g[n-1][0] + ((n >= 2) ? real'(n-1) * b10 * g[n-2][0] : 0.0);
    for (int m = 1; m <= MMAX; m++)
      for (int n = 0; n <= NMAX; n++)
        g[n][m] = c00p * g[n][m-1] + ((m >= 2) ? real'(m-1) * b01 * g[n][m-2] : 0.0)
                + ((n >= 1) ? real'(n) * b00 * g[n-1][m-1] : 0.0);
    foreach (r[a, b, cc, d]) begin
      real s = 0.0;
      for (int i = 0; i <= b; i++)
        for (int j = 0; j <= d; j++)
          s += binom(b, i) * (ab ** (b - i)) * binom(d, j) * (cd ** (d - j)) * g[a+i][cc+j];
      r[a][b][cc][d] = s;
    end
    return r;
  endfunction

  function automatic fp32_t rnd(real lo, real hi);
    real r = lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
    return from_real(r);
  endfunction

  // ---- record driver ----
  initial begin
    rst_n = 0;
    coef_valid = 0;
    foreach (recs[q, r]) begin
      recs[q][r].c00  = rnd(-1.0, 1.0);
      recs[q][r].c00p = rnd(-1.0, 1.0);
      recs[q][r].b00  = rnd(0.05, 0.5);
      recs[q][r].b10  = rnd(0.05, 0.5);
      recs[q][r].b01  = rnd(0.05, 0.5);
      recs[q][r].ab   = rnd(-1.0, 1.0);
      recs[q][r].cd   = rnd(-1.0, 1.0);
      recs[q][r].i00  = rnd(0.2, 1.0);
    end
    coef = recs[0][0];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int q = 0; q < NQ; q++)
      for (int r = 0; r < 3 * NRYS; r++) begin
        if (q >= NQA && ($urandom % 3 == 0)) begin
          coef_valid <= 0;
          repeat (1 + $urandom % 6) @(posedge clk);
        end
        coef_valid <= 1;
        coef <= recs[q][r];
        @(posedge clk);
        while (!coef_ready) @(posedge clk);
      end
    coef_valid <= 0;
  end

  // ---- global memory model ----
  initial mem_ready = 1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && mem_valid && mem_ready) begin
      checks++;
      if (mem_addr >= 32'(NQ * NW) || written[mem_addr]) begin
        failures++;
        $display("FAIL store to address %0d out of range or written twice", mem_addr);
      end else begin
        gmem[mem_addr] = mem_data;
        written[mem_addr] = 1;
      end
    end
    if (phase == 2) begin
      // a long stretch without acceptance, then random back-pressure
      if (cyc - phase2_cyc < 2 * T_MODEL + 3 * (T_SETUP + T_COMPUTE) + 50) mem_ready <= 1'b0;
      else mem_ready <= ($urandom % 4 != 0);
    end
  end

  // ---- mechanisms ----
  int n_overlap = 0, n_stall_setup = 0, n_stall_compute = 0, n_stall_copy = 0, n_dry = 0;
  always @(posedge clk)
    if (rst_n) begin
      if (coef_valid && coef_ready && mem_valid && mem_ready) n_overlap++;
      if (stall_setup) n_stall_setup++;
      if (stall_compute) n_stall_compute++;
      if (stall_copy) n_stall_copy++;
      if (coef_ready && !coef_valid && quartets_done < 32'(NQ)) n_dry++;
    end

  // ---- throughput in phase 1 ----
  int done_cyc [NQ+1];
  logic [31:0] prev_done = 0;
  always @(posedge clk) begin
    prev_done <= quartets_done;
    if (rst_n && quartets_done != prev_done) begin
      done_cyc[quartets_done] = cyc;
      if (int'(quartets_done) == NQA) begin
        phase = 2;
        phase2_cyc = cyc;
      end
    end
  end

  // ---- final comparison ----
  initial begin
    i4_t ix [NRYS], iy [NRYS], iz [NRYS];
    real worst;
    wait (rst_n == 1);
    wait (quartets_done == 32'(NQ));
    repeat (5) @(posedge clk);
    // steady-state interval between finished quartets
    for (int q = 2; q <= NQA; q++) begin
      int iv;
      iv = done_cyc[q] - done_cyc[q-1];
      checks++;
      if (iv < T_MODEL || iv > T_MODEL + SLACK) begin
        failures++;
        $display("FAIL quartet interval %0d cycles, model max(%0d,%0d,%0d) = %0d", iv, T_SETUP,
                 T_COMPUTE, T_COPY, T_MODEL);
      end
    end
    if (NQA >= 2)
      $display("[%0d%0d|%0d%0d] steady state: %0d cycles per quartet (model %0d: setup %0d, compute %0d, copy %0d), %0d integrals, CPI %f (model %f)",
               LA, LB, LC, LD, done_cyc[NQA] - done_cyc[NQA-1], T_MODEL, T_SETUP, T_COMPUTE, T_COPY, NERI,
               real'(done_cyc[NQA] - done_cyc[NQA-1]) / real'(NERI), real'(T_MODEL) / real'(NERI));
    worst = 0.0;
    for (int q = 0; q < NQ; q++) begin
      real e [NERI];
      real scale;
      for (int nu = 0; nu < NRYS; nu++) begin
        ix[nu] = ref_2d(recs[q][0*NRYS+nu]);
        iy[nu] = ref_2d(recs[q][1*NRYS+nu]);
        iz[nu] = ref_2d(recs[q][2*NRYS+nu]);
      end
      scale = 0.0;
      for (int ia = 0; ia < NA; ia++)
        for (int ib = 0; ib < NB; ib++)
          for (int ic = 0; ic < NC; ic++)
            for (int id = 0; id < ND; id++) begin
              int i;
              real s;
              i = ((ia * NB + ib) * NC + ic) * ND + id;
              s = 0.0;
              for (int nu = 0; nu < NRYS; nu++)
                s += ix[nu][pw[LA][ia][0]][pw[LB][ib][0]][pw[LC][ic][0]][pw[LD][id][0]]
                   * iy[nu][pw[LA][ia][1]][pw[LB][ib][1]][pw[LC][ic][1]][pw[LD][id][1]]
                   * iz[nu][pw[LA][ia][2]][pw[LB][ib][2]][pw[LC][ic][2]][pw[LD][id][2]];
              e[i] = s;
              if ((s < 0 ? -s : s) > scale) scale = (s < 0 ? -s : s);
            end
      for (int w = 0; w < NW; w++) begin
        checks++;
        if (!written[q*NW+w]) begin
          failures++;
          $display("FAIL quartet %0d word %0d never stored", q, w);
          continue;
        end
        for (int l = 0; l < 16; l++) begin
          int i;
          real got, err;
          i = 16 * w + l;
          got = to_real(gmem[q*NW+w][32*l +: 32]);
          checks++;
          if (i >= NERI) begin
            if (gmem[q*NW+w][32*l +: 32] != 32'd0) begin
              failures++;
              $display("FAIL quartet %0d word %0d lane %0d padding not zero", q, w, l);
            end
          end else begin
            err = got - e[i];
            if (err < 0) err = -err;
            if (scale > 0 && err / scale > worst) worst = err / scale;
            if (!close(got, e[i], 1e-3, 1e-4 * scale)) begin
              failures++;
              if (failures < 10)
                $display("FAIL quartet %0d integral %0d got %g expected %g", q, i, got, e[i]);
            end
          end
        end
      end
    end
    $display("largest error relative to the largest integral of its quartet: %g", worst);
    $display("mechanisms: setup/copy overlap %0d, setup waits for slot %0d, compute waits for slot %0d, copy waits for memory %0d, record stream dry %0d",
             n_overlap, n_stall_setup, n_stall_compute, n_stall_copy, n_dry);
    checks += 5;
    if (n_overlap == 0) begin failures++; $display("FAIL setup and copy never overlapped"); end
    if (n_stall_setup == 0) begin failures++; $display("FAIL setup never waited for a slot"); end
    if (n_stall_compute == 0) begin failures++; $display("FAIL compute never waited for a slot"); end
    if (n_stall_copy == 0) begin failures++; $display("FAIL copy never waited for memory"); end
    if (n_dry == 0) begin failures++; $display("FAIL the record stream never ran dry"); end
    finished = 1;
    if (REPORT) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d quartets done", quartets_done, NQ);
    finished = 1;
    if (REPORT) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule
