// eri_kernel: an FPGA kernel that computes electron repulsion integral (ERI)
// quartets [ab|cd] by Rys quadrature, for one combination of angular momenta
// (LA, LB, LC, LD) fixed at elaboration, [ff|ff] by default. Other quartet
// types are other instances of the same parameterised module.
//
// How it works. Three loops run concurrently on successive quartets and pass
// them on through double-buffered on-chip stores:
//   rys_setup_loop   Rys recurrence coefficients -> 2-D integrals
//                    I_{mu,nu}(a,b,c,d), one d-slice per cycle,
//                    3 * NRYS * (LD+1) cycles per quartet
//   i2d_buffer       two slots of the 2-D integrals
//   eri_compute_loop 2-D integrals -> [ab|cd], one ket pair (all bra pairs)
//                    per cycle, n_c * n_d cycles per quartet
//   eri_buffer       two slots of the quartet, n_a n_b banks x n_c n_d words
//   eri_copy_loop    quartet -> 512-bit words to global memory,
//                    ceil(n_ERI / 16) cycles per quartet
// A slot is "full" from the end of its producer's pass until the end of its
// consumer's pass; a producer only starts on an empty slot and a consumer
// only on a full one, each walking through the two slots alternately. In
// steady state a quartet thus leaves every max(setup, compute, copy) cycles,
// plus a few cycles of hand-over per quartet, and the slowest loop sets the
// rate.
//
// Interface.
//   coef_valid/coef_ready/coef : stream of Rys coefficient records, 3 * NRYS
//       per quartet in the order (x, root 0) .. (x, root NRYS-1), (y, ...),
//       (z, ...); see eri_pkg::rys_coef_t. The Rys roots and weights behind
//       them come from outside the kernel.
//   mem_valid/mem_ready/mem_addr/mem_data : store stream to global memory.
//       Quartet q goes to word addresses q*NW .. q*NW+NW-1, NW =
//       ceil(n_ERI/16), integrals in bra-pair-major order, 16 per word.
//   quartets_done : number of quartets fully handed to global memory.
//   stall_*       : one-cycle status flags for monitoring: the setup loop has
//       a record but its next slot is still full; the compute loop has a full
//       input slot but its output slot is still full; the copy loop has a word
//       that global memory does not accept.
module eri_kernel
  import eri_pkg::*;
#(
  parameter int unsigned LA = 3,
  parameter int unsigned LB = 3,
  parameter int unsigned LC = 3,
  parameter int unsigned LD = 3,
  parameter int unsigned AW = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      coef_valid,
  output logic      coef_ready,
  input  rys_coef_t coef,
  output logic      mem_valid,
  input  logic      mem_ready,
  output logic [AW-1:0] mem_addr,
  output logic [MEM_BITS-1:0] mem_data,
  output logic [31:0] quartets_done,
  output logic      stall_setup,
  output logic      stall_compute,
  output logic      stall_copy
);

  localparam int unsigned NRYS = n_rys(LA + LB + LC + LD);
  localparam int unsigned NAB  = ncart(LA) * ncart(LB);
  localparam int unsigned NCD  = ncart(LC) * ncart(LD);
  localparam int unsigned NW   = (NAB * NCD + MEM_LANES - 1) / MEM_LANES;

  // ---- setup loop -> 2-D integral store ----
  logic       s_valid, s_slot, s_last;
  logic [1:0] s_dir;
  logic [idx_w(NRYS)-1:0] s_root;
  logic [idx_w(LD+1)-1:0]   s_d;
  fp32_t      s_slice [LA+1][LB+1][LC+1];
  logic [1:0] i_full;

  rys_setup_loop #(.LA(LA), .LB(LB), .LC(LC), .LD(LD), .NRYS(NRYS)) u_setup (
    .clk, .rst_n, .coef_valid, .coef_ready, .coef,
    .slot_free(~i_full), .wait_slot(stall_setup),
    .out_valid(s_valid), .out_slot(s_slot), .out_dir(s_dir), .out_root(s_root),
    .out_d(s_d), .out_last(s_last), .out_slice(s_slice)
  );

  logic c_islot, c_eslot;
  logic [idx_w(LC+1)-1:0] c_ic [3];
  logic [idx_w(LD+1)-1:0] c_id [3];
  fp32_t c_idata [3][NRYS][LA+1][LB+1];

  i2d_buffer #(.LA(LA), .LB(LB), .LC(LC), .LD(LD), .NRYS(NRYS)) u_ibuf (
    .clk,
    .wr_en(s_valid), .wr_slot(s_slot), .wr_dir(s_dir), .wr_root(s_root), .wr_d(s_d),
    .wr_slice(s_slice),
    .rd_slot(c_islot), .rd_c(c_ic), .rd_d(c_id), .rd_data(c_idata)
  );

  // ---- compute loop -> quartet store ----
  logic c_start, c_busy, c_done, c_wr_en;
  logic [idx_w(NCD)-1:0] c_wr_addr;
  fp32_t c_wr_data [NAB];
  logic [1:0] e_full;

  assign c_start = !c_busy && i_full[c_islot] && !e_full[c_eslot];

  eri_compute_loop #(.LA(LA), .LB(LB), .LC(LC), .LD(LD), .NRYS(NRYS)) u_compute (
    .clk, .rst_n, .start(c_start), .busy(c_busy), .done(c_done),
    .i_c(c_ic), .i_d(c_id), .i_data(c_idata),
    .wr_en(c_wr_en), .wr_addr(c_wr_addr), .wr_data(c_wr_data)
  );

  logic k_slot;
  logic [idx_w(NAB)-1:0] k_bank [MEM_LANES];
  logic [idx_w(NCD)-1:0] k_addr [MEM_LANES];
  fp32_t k_data [MEM_LANES];

  eri_buffer #(.NAB(NAB), .NCD(NCD)) u_ebuf (
    .clk,
    .wr_en(c_wr_en), .wr_slot(c_eslot), .wr_addr(c_wr_addr), .wr_data(c_wr_data),
    .rd_slot(k_slot), .rd_bank(k_bank), .rd_addr(k_addr), .rd_data(k_data)
  );

  // ---- copy loop -> global memory ----
  logic k_start, k_busy, k_done;
  logic [AW-1:0] k_base;

  assign k_start = !k_busy && e_full[k_slot];

  eri_copy_loop #(.NAB(NAB), .NCD(NCD), .AW(AW)) u_copy (
    .clk, .rst_n, .start(k_start), .base_addr(k_base), .busy(k_busy), .done(k_done),
    .rd_bank(k_bank), .rd_addr(k_addr), .rd_data(k_data),
    .mem_valid, .mem_ready, .mem_addr, .mem_data
  );

  // ---- slot bookkeeping ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_full        <= '0;
      e_full        <= '0;
      c_islot       <= 1'b0;
      c_eslot       <= 1'b0;
      k_slot        <= 1'b0;
      k_base        <= '0;
      quartets_done <= '0;
    end else begin
      if (s_valid && s_last) i_full[s_slot] <= 1'b1;
      if (c_done) begin
        i_full[c_islot] <= 1'b0;
        e_full[c_eslot] <= 1'b1;
        c_islot         <= ~c_islot;
        c_eslot         <= ~c_eslot;
      end
      if (k_done) begin
        e_full[k_slot] <= 1'b0;
        k_slot         <= ~k_slot;
        k_base         <= k_base + AW'(NW);
        quartets_done  <= quartets_done + 32'd1;
      end
    end
  end

  assign stall_compute = !c_busy && i_full[c_islot] && e_full[c_eslot];
  assign stall_copy    = mem_valid && !mem_ready;

  // a slot is never filled twice without being emptied in between
  a_ifull: assert property (@(posedge clk) disable iff (!rst_n)
                            s_valid && s_last |-> !i_full[s_slot]);
  a_efull: assert property (@(posedge clk) disable iff (!rst_n) c_done |-> !e_full[c_eslot]);

endmodule
