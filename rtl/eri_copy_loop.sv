// eri_copy_loop: the copy loop of the ERI kernel. It moves one finished
// quartet from the on-chip quartet store to global memory as 512-bit words
// of 16 FP32 values.
//
// How it works. The quartet is stored in the order of its integrals,
// index i = ab * n_c*n_d + cd (bra pair major), as n_ERI = n_a n_b n_c n_d
// consecutive FP32 values starting at word address base_addr. Word w holds
// integrals 16w .. 16w+15, lane l in bits 32l+31 .. 32l. Since the compute
// loop produces whole columns of n_a*n_b values, which in general is not a
// multiple of 16, the copy loop reads each lane separately: lane l of word w
// comes from bank i / (n_c n_d) at address i mod (n_c n_d) of the store, all
// 16 reads in the same cycle. Lanes past the end of the quartet in the last
// word are zero. A quartet therefore takes ceil(n_ERI / 16) words.
//
// Interface. start (while idle) begins a quartet at word base_addr; done
// pulses in the cycle after its last word has been accepted, and busy is
// high from the cycle after start up to and including done. mem_valid/mem_ready/mem_addr/mem_data is a store request stream to
// global memory: a word is transferred when valid and ready are both high,
// and valid, address and data hold while ready is low.
// Timing: the first word is presented one cycle after start; with mem_ready
// high, one word leaves per cycle, so the loop takes ceil(n_ERI/16) cycles
// plus one. The word width and the word count follow the design being
// modelled; the integral order in memory and the handshake are this
// design's choice.
module eri_copy_loop
  import eri_pkg::*;
#(
  parameter int unsigned NAB = 100,
  parameter int unsigned NCD = 100,
  parameter int unsigned AW  = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic [AW-1:0] base_addr,
  output logic  busy,
  output logic  done,
  // read port of the quartet store
  output logic [idx_w(NAB)-1:0] rd_bank [MEM_LANES],
  output logic [idx_w(NCD)-1:0] rd_addr [MEM_LANES],
  input  fp32_t rd_data [MEM_LANES],
  // global memory store stream
  output logic  mem_valid,
  input  logic  mem_ready,
  output logic [AW-1:0] mem_addr,
  output logic [MEM_BITS-1:0] mem_data
);

  localparam int unsigned NERI = NAB * NCD;
  localparam int unsigned NW   = (NERI + MEM_LANES - 1) / MEM_LANES;
  localparam int unsigned WW   = $clog2(NW + 1);
  localparam int unsigned IW   = $clog2(NW * MEM_LANES + 1);

  logic          active;    // words of this quartet remain to be loaded
  logic [WW-1:0] w;         // next word to load
  logic          load;
  logic [AW-1:0] base_q;

  assign load = active && (!mem_valid || mem_ready);

  always_comb begin
    for (int l = 0; l < int'(MEM_LANES); l++) begin
      logic [IW-1:0] i;
      i = IW'(w) * IW'(MEM_LANES) + IW'(l);
      rd_bank[l] = $bits(rd_bank[l])'(i / IW'(NCD));
      rd_addr[l] = $bits(rd_addr[l])'(i % IW'(NCD));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      w         <= '0;
      base_q    <= '0;
      mem_valid <= 1'b0;
      mem_addr  <= '0;
      mem_data  <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (mem_valid && mem_ready && !active) begin
        // the last word of the quartet has gone
        mem_valid <= 1'b0;
        done      <= 1'b1;
      end
      if (start && !busy) begin
        active <= 1'b1;
        w      <= '0;
        base_q <= base_addr;
      end else if (load) begin
        mem_valid <= 1'b1;
        mem_addr  <= base_q + AW'(w);
        for (int l = 0; l < int'(MEM_LANES); l++)
          mem_data[32*l +: 32] <= (int'(w) * int'(MEM_LANES) + l < int'(NERI)) ? rd_data[l] : FP_ZERO;
        w <= w + WW'(1);
        if (w == WW'(NW - 1)) active <= 1'b0;
      end
    end
  end

  assign busy = active || mem_valid || done;

  // a store request must not change or vanish while it waits
  property p_mem_stable;
    @(posedge clk) disable iff (!rst_n)
      mem_valid && !mem_ready |=> mem_valid && $stable(mem_addr) && $stable(mem_data);
  endproperty
  a_mem_stable: assert property (p_mem_stable);

endmodule
