// tb_rys_setup_loop: drives random Rys coefficient records into the setup
// loop and checks every output slice against a double precision reference
// that builds G(n,m) by the recurrences and then I(a,b,c,d) by the binomial
// expansion
//   I(a,b,c,d) = sum_i sum_j C(b,i) (A-B)^(b-i) C(d,j) (C-D)^(d-j) G(a+i, c+j),
// which does not use the transfer relations the block implements. It also
// checks the slice order, the slot alternation, that the first record of a
// quartet waits for a free slot, and that an uninterrupted quartet takes
// 3 * NRYS * (LD+1) cycles.
module tb_rys_setup_loop;
  import eri_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned LA = 2, LB = 1, LC = 1, LD = 2;
  localparam int unsigned NRYS = n_rys(LA + LB + LC + LD);
  localparam int unsigned NMAX = LA + LB, MMAX = LC + LD;
  localparam int NQ = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      coef_valid = 0;
  logic      coef_ready;
  rys_coef_t coef;
  logic [1:0] slot_free = 2'b11;
  logic      wait_slot;
  logic      out_valid, out_slot, out_last;
  logic [1:0] out_dir;
  logic [idx_w(NRYS)-1:0] out_root;
  logic [idx_w(LD+1)-1:0]   out_d;
  fp32_t     out_slice [LA+1][LB+1][LC+1];

  rys_setup_loop #(.LA(LA), .LB(LB), .LC(LC), .LD(LD)) dut (.*);

  int checks = 0, failures = 0;
  rys_coef_t recs [NQ][3*NRYS];

  function automatic real binom(int n, int k);
    real r = 1.0;
    for (int i = 0; i < k; i++) r = r * real'(n - i) / real'(i + 1);
    return r;
  endfunction

  function automatic real ref_i(rys_coef_t c, int a, int b, int cc, int d);
    real g [NMAX+1][MMAX+1];
    real s;
    real c00, c00p, b00, b10, b01, ab, cd;
    c00 = to_real(c.c00); c00p = to_real(c.c00p); b00 = to_real(c.b00);
    b10 = to_real(c.b10); b01 = to_real(c.b01); ab = to_real(c.ab); cd = to_real(c.cd);
    foreach (g[n, m]) g[n][m] = 0.0;
    g[0][0] = to_real(c.i00);
    for (int n = 1; n <= int'(NMAX); n++)
      g[n][0] = c00 * g[n-1][0] + ((n >= 2) ? real'(n-1) * b10 * g[n-2][0] : 0.0);
    for (int m = 1; m <= int'(MMAX); m++)
      for (int n = 0; n <= int'(NMAX); n++)
        g[n][m] = c00p * g[n][m-1] + ((m >= 2) ? real'(m-1) * b01 * g[n][m-2] : 0.0)
                + ((n >= 1) ? real'(n) * b00 * g[n-1][m-1] : 0.0);
    s = 0.0;
    for (int i = 0; i <= b; i++)
      for (int j = 0; j <= d; j++)
        s += binom(b, i) * (ab ** (b - i)) * binom(d, j) * (cd ** (d - j)) * g[a+i][cc+j];
    return s;
  endfunction

  function automatic fp32_t rnd(real lo, real hi);
    real r = lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
    return from_real(r);
  endfunction

  // ---- driver ----
  int stall_cycles = 0;
  initial begin
    foreach (recs[q, r]) begin
      recs[q][r].c00  = rnd(-1.0, 1.0);
      recs[q][r].c00p = rnd(-1.0, 1.0);
      recs[q][r].b00  = rnd(0.05, 0.5);
      recs[q][r].b10  = rnd(0.05, 0.5);
      recs[q][r].b01  = rnd(0.05, 0.5);
      recs[q][r].ab   = rnd(-1.5, 1.5);
      recs[q][r].cd   = rnd(-1.5, 1.5);
      recs[q][r].i00  = rnd(0.2, 1.0);
    end
    coef = recs[0][0];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int q = 0; q < NQ; q++) begin
      for (int r = 0; r < int'(3 * NRYS); r++) begin
        // quartets 0 and 1 are sent back to back; later ones with gaps
        if (q >= 2 && ($urandom % 4 == 0)) begin
          coef_valid <= 0;
          repeat ($urandom % 5) @(posedge clk);
        end
        coef_valid <= 1;
        coef <= recs[q][r];
        @(posedge clk);
        while (!coef_ready) begin
          stall_cycles++;
          @(posedge clk);
        end
      end
    end
    coef_valid <= 0;
  end

  // slot 1 is held busy for a while when quartet 2 wants it (quartet 2 uses
  // slot 0, quartet 3 slot 1): slot_free[0] drops after quartet 1 starts
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 20) slot_free[0] <= 1'b0;
    if (cyc == 3 * NRYS * (LD + 1) * 2 + 40) slot_free[0] <= 1'b1;
  end

  // ---- monitor ----
  int q_out = 0, r_out = 0, d_out = 0;
  int first_cyc = -1;
  int done = 0;
  int waited_free = 0;
  always @(posedge clk) begin
    if (rst_n && wait_slot) waited_free++;
    if (rst_n && out_valid) begin
      int exp_dir, exp_root;
      exp_dir  = r_out / NRYS;
      exp_root = r_out % NRYS;
      checks++;
      if (out_dir != 2'(exp_dir) || out_root != exp_root[$bits(out_root)-1:0] ||
          out_d != d_out[$bits(out_d)-1:0] || out_slot != 1'(q_out % 2)) begin
        failures++;
        $display("FAIL order: q%0d r%0d d%0d got dir %0d root %0d d %0d slot %0d", q_out, r_out,
                 d_out, out_dir, out_root, out_d, out_slot);
      end
      for (int a = 0; a <= int'(LA); a++)
        for (int b = 0; b <= int'(LB); b++)
          for (int c = 0; c <= int'(LC); c++) begin
            real e, g;
            e = ref_i(recs[q_out][r_out], a, b, c, d_out);
            g = to_real(out_slice[a][b][c]);
            checks++;
            if (!close(g, e, 1e-4, 1e-5)) begin
              failures++;
              if (failures < 10)
                $display("FAIL value q%0d r%0d I(%0d,%0d,%0d,%0d) got %g expected %g", q_out,
                         r_out, a, b, c, d_out, g, e);
            end
          end
      if (q_out == 0 && r_out == 0 && d_out == 0) first_cyc = cyc;
      checks++;
      if (out_last != (r_out == int'(3 * NRYS) - 1 && d_out == int'(LD))) begin
        failures++;
        $display("FAIL out_last at q%0d r%0d d%0d", q_out, r_out, d_out);
      end
      if (out_last && q_out == 0) begin
        checks++;
        if (cyc - first_cyc + 1 != int'(3 * NRYS * (LD + 1))) begin
          failures++;
          $display("FAIL quartet took %0d cycles, expected %0d", cyc - first_cyc + 1,
                   3 * NRYS * (LD + 1));
        end
      end
      if (d_out == int'(LD)) begin
        d_out = 0;
        if (r_out == int'(3 * NRYS) - 1) begin
          r_out = 0;
          q_out++;
        end else r_out++;
      end else d_out++;
      if (q_out == NQ) done = 1;
    end
  end

  initial begin
    wait (done == 1);
    repeat (5) @(posedge clk);
    checks++;
    if (waited_free == 0) begin
      failures++;
      $display("FAIL the first record never waited for a busy slot");
    end
    $display("setup quartets %0d, cycles stalled %0d, waits on a busy slot %0d", q_out,
             stall_cycles, waited_free);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
