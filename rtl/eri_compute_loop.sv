// eri_compute_loop: the compute loop of the ERI kernel. It forms the quartet
// of integrals [ab|cd] from the 2-D integrals by Rys quadrature,
//   [ab|cd] = sum over roots nu of
//             Ix_nu(ax,bx,cx,dx) * Iy_nu(ay,by,cy,dy) * Iz_nu(az,bz,cz,dz),
// where (ax,ay,az) are the powers of Cartesian component a, and so on (the
// Rys weights and the prefactor are already folded into Iz).
//
// How it works. The loop runs over the n_c * n_d ket pairs (c, d), one per
// cycle, ic outer and id inner. For the current pair it sends the powers
// (c_mu, d_mu) of each direction to the 2-D integral store and receives all
// I_{mu,nu}(a,b,c_mu,d_mu). An unrolled array of n_a * n_b units, one per
// bra pair, each with 2 * NRYS multipliers and NRYS - 1 adders, produces the
// whole column [ab|cd] for this (c, d) and writes it, one word per bank,
// into the quartet store at address cd = ic * n_d + id.
//
// Interface. start (while idle) begins a quartet; busy is high from then
// until the last column is written; done pulses with the last write.
// Timing: reads happen in cycles 1 .. n_c*n_d after start, each column is
// written one cycle after its read, so a quartet occupies the loop for
// n_c * n_d cycles plus one of latency and a new one can start in the cycle
// after done. The one-column-per-cycle schedule and its cycle count follow
// the design being modelled; the loop order and the handshake are this
// design's choice.
module eri_compute_loop
  import eri_pkg::*;
#(
  parameter int unsigned LA   = 3,
  parameter int unsigned LB   = 3,
  parameter int unsigned LC   = 3,
  parameter int unsigned LD   = 3,
  parameter int unsigned NRYS = n_rys(LA + LB + LC + LD)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  busy,
  output logic  done,
  // read port of the 2-D integral store
  output logic [idx_w(LC+1)-1:0] i_c [3],
  output logic [idx_w(LD+1)-1:0] i_d [3],
  input  fp32_t i_data [3][NRYS][LA+1][LB+1],
  // write port of the quartet store
  output logic  wr_en,
  output logic [idx_w(ncart(LC)*ncart(LD))-1:0] wr_addr,
  output fp32_t wr_data [ncart(LA)*ncart(LB)]
);

  localparam int unsigned NA  = ncart(LA);
  localparam int unsigned NB  = ncart(LB);
  localparam int unsigned NC  = ncart(LC);
  localparam int unsigned ND  = ncart(LD);
  localparam int unsigned NCD = NC * ND;
  localparam int unsigned AW  = idx_w(NCD);
  localparam int unsigned CW  = idx_w(LC + 1);
  localparam int unsigned DW  = idx_w(LD + 1);

  // Power tables of the ket components, 4 bits per entry, entry (i, mu) at
  // bit offset 4 * (3 * i + mu).
  function automatic logic [4*3*16*16-1:0] pow_table(input int unsigned l);
    logic [4*3*16*16-1:0] t;
    t = '0;
    for (int unsigned i = 0; i < ncart(l); i++)
      for (int unsigned mu = 0; mu < 3; mu++) t[4*(3*i+mu) +: 4] = 4'(cart_pow(l, i, mu));
    return t;
  endfunction

  localparam logic [4*3*16*16-1:0] CTAB = pow_table(LC);
  localparam logic [4*3*16*16-1:0] DTAB = pow_table(LD);

  logic [idx_w(NC)-1:0] ic;
  logic [idx_w(ND)-1:0] id;
  logic [AW-1:0]           cd;
  logic                    reading;

  always_comb begin
    for (int mu = 0; mu < 3; mu++) begin
      i_c[mu] = CW'(CTAB[4*(3*int'(ic)+mu) +: 4]);
      i_d[mu] = DW'(DTAB[4*(3*int'(id)+mu) +: 4]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading <= 1'b0;
      ic      <= '0;
      id      <= '0;
      cd      <= '0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      done    <= 1'b0;
    end else begin
      wr_en <= reading;
      done  <= reading && (cd == AW'(NCD - 1));
      if (reading) wr_addr <= cd;
      if (start && !busy) begin
        reading <= 1'b1;
        ic      <= '0;
        id      <= '0;
        cd      <= '0;
      end else if (reading) begin
        if (cd == AW'(NCD - 1)) reading <= 1'b0;
        cd <= cd + AW'(1);
        if (id == $bits(id)'(ND - 1)) begin
          id <= '0;
          ic <= ic + 1'b1;
        end else begin
          id <= id + 1'b1;
        end
      end
    end
  end

  assign busy = reading || wr_en;

  fp32_t col [NA*NB];

  // one sum-of-products unit per bra pair
  for (genvar ia = 0; ia < int'(NA); ia++) begin : g_a
    for (genvar ib = 0; ib < int'(NB); ib++) begin : g_b
      localparam int unsigned AX = cart_pow(LA, ia, 0);
      localparam int unsigned AY = cart_pow(LA, ia, 1);
      localparam int unsigned AZ = cart_pow(LA, ia, 2);
      localparam int unsigned BX = cart_pow(LB, ib, 0);
      localparam int unsigned BY = cart_pow(LB, ib, 1);
      localparam int unsigned BZ = cart_pow(LB, ib, 2);
      fp32_t acc;
      always_comb begin
        acc = FP_ZERO;
        for (int nu = 0; nu < int'(NRYS); nu++)
          acc = fp_add(acc, fp_mul(fp_mul(i_data[0][nu][AX][BX], i_data[1][nu][AY][BY]),
                                   i_data[2][nu][AZ][BZ]));
      end
      assign col[ia*NB+ib] = acc;
    end
  end

  always_ff @(posedge clk) if (reading) wr_data <= col;

endmodule
