// i2d_buffer: on-chip store of the 2-D integrals I_{mu,nu}(a,b,c,d) of one
// quartet, mu the direction (x, y, z), nu the Rys root, double buffered so
// that the setup loop can fill one slot while the compute loop reads the
// other.
//
// Layout. The 6-D array is split into banks indexed by (slot, mu, nu, a, b, c),
// each LD+1 words deep and addressed by d. This matches both users with one
// port each and no replicated copy:
//   * the setup loop writes one d-slice per cycle, I(a,b,c,d) for all
//     a, b, c of one (mu, nu): one word in every bank of that (mu, nu);
//   * the compute loop needs, per cycle, I_{mu,nu}(a,b,c_mu,d_mu) for every
//     mu, nu, a, b, where (c_mu, d_mu) are the powers of the ket Cartesian
//     components of that cycle: one word from bank c = c_mu of every
//     (mu, nu, a, b).
// The read is combinational (distributed RAM or registers); the write takes
// effect at the clock edge. A store that is read and written in the same
// cycle returns the old word, but the slot protocol never does this.
// Parallel banked access with a single copy follows the design being
// modelled; the choice of banking dimensions and the second slot are this
// design's.
module i2d_buffer
  import eri_pkg::*;
#(
  parameter int unsigned LA   = 3,
  parameter int unsigned LB   = 3,
  parameter int unsigned LC   = 3,
  parameter int unsigned LD   = 3,
  parameter int unsigned NRYS = n_rys(LA + LB + LC + LD)
) (
  input  logic  clk,
  // write port: one d-slice of one (direction, root)
  input  logic  wr_en,
  input  logic  wr_slot,
  input  logic [1:0] wr_dir,
  input  logic [idx_w(NRYS)-1:0] wr_root,
  input  logic [idx_w(LD+1)-1:0]   wr_d,
  input  fp32_t wr_slice [LA+1][LB+1][LC+1],
  // read port: per direction the c and d powers of the ket component
  input  logic  rd_slot,
  input  logic [idx_w(LC+1)-1:0] rd_c [3],
  input  logic [idx_w(LD+1)-1:0] rd_d [3],
  output fp32_t rd_data [3][NRYS][LA+1][LB+1]
);

  fp32_t mem [2][3][NRYS][LA+1][LB+1][LC+1][LD+1];

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int a = 0; a <= int'(LA); a++)
        for (int b = 0; b <= int'(LB); b++)
          for (int c = 0; c <= int'(LC); c++)
            mem[wr_slot][wr_dir][wr_root][a][b][c][wr_d] <= wr_slice[a][b][c];
  end

  always_comb begin
    for (int mu = 0; mu < 3; mu++)
      for (int nu = 0; nu < int'(NRYS); nu++)
        for (int a = 0; a <= int'(LA); a++)
          for (int b = 0; b <= int'(LB); b++)
            rd_data[mu][nu][a][b] = mem[rd_slot][mu][nu][a][b][rd_c[mu]][rd_d[mu]];
  end

endmodule
