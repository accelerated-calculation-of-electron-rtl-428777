// rys_setup_loop: the setup loop of the ERI kernel. It turns the Rys
// recurrence coefficients of one quartet into the 2-D integrals
// I(a,b,c,d) of every direction (x, y, z) and every Rys root.
//
// How it works. One coefficient record (eri_pkg::rys_coef_t) describes one
// (direction, root) pair. When a record is accepted, a fully unrolled
// combinational datapath evaluates
//   * the vertical recurrence (VRR) for G(n,m), n <= LA+LB, m <= LC+LD:
//       G(0,0)   = i00
//       G(n+1,0) = C00  G(n,0) + n B10 G(n-1,0)
//       G(n,m+1) = C00' G(n,m) + m B01 G(n,m-1) + n B00 G(n-1,m)
//   * the transfer relation on the bra side,
//       I(a,b+1,t) = I(a+1,b,t) + (A-B) I(a,b,t),
//     giving the 3-D array K(a,b,t), a <= LA, b <= LB, t <= LC+LD,
// and K is held in registers. K(a,b,c) for c <= LC is the d = 0 slice of
// I(a,b,c,d). In each of the following LD cycles the ket-side transfer
// relation K(a,b,t) <- K(a,b,t+1) + (C-D) K(a,b,t) is applied once to the
// registered K, giving the slices d = 1 .. LD. A (direction, root) pair thus
// takes LD+1 cycles and a quartet 3 * NRYS * (LD+1) cycles, with no bubble
// between records when the next one is waiting. Records are taken in the
// order direction-major: (x, root 0), (x, root 1), ... (z, root NRYS-1).
//
// Interface.
//   coef_valid/coef_ready/coef : record stream, a transfer when both are high.
//   slot_free[s]  : slot s of the double-buffered 2-D integral store may be
//                   overwritten. The first record of a quartet is only taken
//                   when the slot that quartet will use is free; the slot
//                   alternates from quartet to quartet, starting at 0.
//   wait_slot     : a record is waiting only because its slot is not free.
//   out_*         : one registered slice per cycle, I(a,b,c,out_d) for the
//                   pair (out_dir, out_root), to be written to slot out_slot.
//                   out_last marks the last slice of the quartet.
// Timing: a slice appears one cycle after the record (d = 0) or after the
// previous slice (d > 0). The slice-per-cycle schedule, the register
// storage of the intermediate array and the cycle count follow the design
// being modelled; the recurrences are the standard ones of the Rys method,
// and the record format, the record order and the handshake are this
// design's choice. The recurrences are combinational within one cycle here;
// a synthesis flow for a fast clock would add pipeline registers without
// changing the schedule.
module rys_setup_loop
  import eri_pkg::*;
#(
  parameter int unsigned LA   = 3,
  parameter int unsigned LB   = 3,
  parameter int unsigned LC   = 3,
  parameter int unsigned LD   = 3,
  parameter int unsigned NRYS = n_rys(LA + LB + LC + LD)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      coef_valid,
  output logic      coef_ready,
  input  rys_coef_t coef,
  input  logic [1:0] slot_free,
  output logic      wait_slot,
  output logic      out_valid,
  output logic      out_slot,
  output logic [1:0] out_dir,
  output logic [idx_w(NRYS)-1:0] out_root,
  output logic [idx_w(LD+1)-1:0]   out_d,
  output logic      out_last,
  output fp32_t     out_slice [LA+1][LB+1][LC+1]
);

  localparam int unsigned NMAX = LA + LB;
  localparam int unsigned MMAX = LC + LD;
  localparam int unsigned RW   = idx_w(NRYS);
  localparam int unsigned DW   = idx_w(LD + 1);

  // pass in progress
  logic          active;
  logic [DW-1:0] k;
  fp32_t         cd_q;
  logic          cur_slot;
  logic [1:0]    cur_dir;
  logic [RW-1:0] cur_root;
  fp32_t         kreg [LA+1][LB+1][MMAX+1];

  // position of the next record in its quartet, and the slot that quartet uses
  logic [1:0]    nxt_dir;
  logic [RW-1:0] nxt_root;
  logic          nxt_slot;
  logic          nxt_first;

  assign nxt_first  = (nxt_dir == 2'd0) && (nxt_root == '0);
  assign coef_ready = (!active || k == DW'(LD)) && (!nxt_first || slot_free[nxt_slot]);
  assign wait_slot  = coef_valid && (!active || k == DW'(LD)) && nxt_first && !slot_free[nxt_slot];

  // ---- VRR and bra transfer on the incoming record ----
  fp32_t g [NMAX+1][MMAX+1];
  fp32_t h [LB+1][NMAX+1][MMAX+1];
  fp32_t kin [LA+1][LB+1][MMAX+1];

  always_comb begin
    for (int n = 0; n <= int'(NMAX); n++)
      for (int m = 0; m <= int'(MMAX); m++) g[n][m] = FP_ZERO;
    g[0][0] = coef.i00;
    for (int n = 0; n < int'(NMAX); n++) begin
      g[n+1][0] = fp_mul(coef.c00, g[n][0]);
      if (n > 0)
        g[n+1][0] = fp_add(g[n+1][0], fp_mul(fp_mul(fp_from_uint(unsigned'(n)), coef.b10), g[n-1][0]));
    end
    for (int m = 0; m < int'(MMAX); m++) begin
      for (int n = 0; n <= int'(NMAX); n++) begin
        g[n][m+1] = fp_mul(coef.c00p, g[n][m]);
        if (m > 0)
          g[n][m+1] = fp_add(g[n][m+1], fp_mul(fp_mul(fp_from_uint(unsigned'(m)), coef.b01), g[n][m-1]));
        if (n > 0)
          g[n][m+1] = fp_add(g[n][m+1], fp_mul(fp_mul(fp_from_uint(unsigned'(n)), coef.b00), g[n-1][m]));
      end
    end
  end

  always_comb begin
    for (int b = 0; b <= int'(LB); b++)
      for (int a = 0; a <= int'(NMAX); a++)
        for (int t = 0; t <= int'(MMAX); t++) h[b][a][t] = FP_ZERO;
    for (int a = 0; a <= int'(NMAX); a++)
      for (int t = 0; t <= int'(MMAX); t++) h[0][a][t] = g[a][t];
    for (int b = 0; b < int'(LB); b++)
      for (int a = 0; a < int'(NMAX) - b; a++)
        for (int t = 0; t <= int'(MMAX); t++)
          h[b+1][a][t] = fp_add(h[b][a+1][t], fp_mul(coef.ab, h[b][a][t]));
    for (int a = 0; a <= int'(LA); a++)
      for (int b = 0; b <= int'(LB); b++)
        for (int t = 0; t <= int'(MMAX); t++) kin[a][b][t] = h[b][a][t];
  end

  // ---- ket transfer on the registered array ----
  fp32_t knext [LA+1][LB+1][MMAX+1];

  always_comb begin
    for (int a = 0; a <= int'(LA); a++)
      for (int b = 0; b <= int'(LB); b++) begin
        for (int t = 0; t < int'(MMAX); t++)
          knext[a][b][t] = fp_add(kreg[a][b][t+1], fp_mul(cd_q, kreg[a][b][t]));
        knext[a][b][MMAX] = FP_ZERO;
      end
  end

  logic take;
  assign take = coef_valid && coef_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      k         <= '0;
      cd_q      <= FP_ZERO;
      cur_slot  <= 1'b0;
      cur_dir   <= '0;
      cur_root  <= '0;
      nxt_dir   <= '0;
      nxt_root  <= '0;
      nxt_slot  <= 1'b0;
      out_valid <= 1'b0;
      out_slot  <= 1'b0;
      out_dir   <= '0;
      out_root  <= '0;
      out_d     <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (take) begin
        active    <= 1'b1;
        k         <= '0;
        cd_q      <= coef.cd;
        cur_slot  <= nxt_slot;
        cur_dir   <= nxt_dir;
        cur_root  <= nxt_root;
        out_valid <= 1'b1;
        out_slot  <= nxt_slot;
        out_dir   <= nxt_dir;
        out_root  <= nxt_root;
        out_d     <= '0;
        out_last  <= (LD == 0) && (nxt_dir == 2'd2) && (nxt_root == RW'(NRYS - 1));
        // advance the record position
        if (nxt_root == RW'(NRYS - 1)) begin
          nxt_root <= '0;
          if (nxt_dir == 2'd2) begin
            nxt_dir  <= '0;
            nxt_slot <= ~nxt_slot;
          end else begin
            nxt_dir <= nxt_dir + 2'd1;
          end
        end else begin
          nxt_root <= nxt_root + RW'(1);
        end
      end else if (active && k != DW'(LD)) begin
        k         <= k + DW'(1);
        out_valid <= 1'b1;
        out_slot  <= cur_slot;
        out_dir   <= cur_dir;
        out_root  <= cur_root;
        out_d     <= k + DW'(1);
        out_last  <= (k + DW'(1) == DW'(LD)) && (cur_dir == 2'd2) && (cur_root == RW'(NRYS - 1));
      end else begin
        active <= 1'b0;
      end
    end
  end

  // array state and slice data carry no reset
  always_ff @(posedge clk) begin
    if (take) begin
      kreg <= kin;
      for (int a = 0; a <= int'(LA); a++)
        for (int b = 0; b <= int'(LB); b++)
          for (int c = 0; c <= int'(LC); c++) out_slice[a][b][c] <= kin[a][b][c];
    end else if (active && k != DW'(LD)) begin
      kreg <= knext;
      for (int a = 0; a <= int'(LA); a++)
        for (int b = 0; b <= int'(LB); b++)
          for (int c = 0; c <= int'(LC); c++) out_slice[a][b][c] <= knext[a][b][c];
    end
  end

  // the record stream must hold its data while it waits
  property p_coef_stable;
    @(posedge clk) disable iff (!rst_n) coef_valid && !coef_ready |=> coef_valid && $stable(coef);
  endproperty
  a_coef_stable: assert property (p_coef_stable);

endmodule
