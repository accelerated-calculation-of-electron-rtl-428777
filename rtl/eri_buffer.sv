// eri_buffer: on-chip store of one ERI quartet [ab|cd], double buffered so
// that the compute loop can fill one slot while the copy loop drains the
// other.
//
// Layout. The 4-D quartet is kept as a 2-D array: one bank per bra pair
// (a, b) of Cartesian components, n_a * n_b banks, each n_c * n_d words deep
// and addressed by the ket pair index cd = ic * n_d + id. The compute loop
// writes one word into every bank per cycle (all bra pairs of one ket pair).
// The copy loop reads MEM_LANES (16) words per cycle from any banks and
// addresses, enough to fill one 512-bit global memory word; where several
// of them fall into one bank, an implementation replicates that bank, which
// a 2-D array in registers or distributed RAM provides for free.
// Reads are combinational, writes take effect at the clock edge.
// The bank/depth split is the one of the design being modelled; the second
// slot is this design's choice.
module eri_buffer
  import eri_pkg::*;
#(
  parameter int unsigned NAB = 100,
  parameter int unsigned NCD = 100
) (
  input  logic  clk,
  input  logic  wr_en,
  input  logic  wr_slot,
  input  logic [idx_w(NCD)-1:0] wr_addr,
  input  fp32_t wr_data [NAB],
  input  logic  rd_slot,
  input  logic [idx_w(NAB)-1:0] rd_bank [MEM_LANES],
  input  logic [idx_w(NCD)-1:0] rd_addr [MEM_LANES],
  output fp32_t rd_data [MEM_LANES]
);

  fp32_t mem [2][NAB][NCD];

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int ab = 0; ab < int'(NAB); ab++) mem[wr_slot][ab][wr_addr] <= wr_data[ab];
  end

  always_comb begin
    for (int l = 0; l < int'(MEM_LANES); l++) rd_data[l] = mem[rd_slot][rd_bank[l]][rd_addr[l]];
  end

endmodule
