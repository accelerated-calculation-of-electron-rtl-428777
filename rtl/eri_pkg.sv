// eri_pkg: types and arithmetic shared by the electron repulsion integral (ERI)
// kernel.
//
// * fp32_t and the two IEEE-754 single precision operators fp_mul and fp_add.
//   Both round to nearest-even. To keep the datapath small they flush
//   subnormal inputs and results to zero and do not produce NaN: an infinite
//   operand passes through, an overflowing result becomes infinity. The
//   integrals stay far from these limits, so only the normal range matters.
//   Each call is one combinational operator; a DSP block of the target FPGA
//   holds one multiplier and one adder of this kind.
// * rys_coef_t, the record of Rys recurrence coefficients that drives one
//   (direction, root) pass of the setup loop.
// * Helpers for the Cartesian components of a shell of angular momentum l:
//   n(l) = (l+1)(l+2)/2 components, ordered with the x power descending, then
//   the y power descending (for l=1: x, y, z; for l=2: xx, xy, xz, yy, yz, zz).
// * n_rys(L) = floor(L/2) + 1 Rys roots for a quartet of total angular
//   momentum L, the number that integrates its polynomial part exactly.
package eri_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3f80_0000;

  // Width of a global memory word and the number of FP32 values in it.
  localparam int unsigned MEM_BITS  = 512;
  localparam int unsigned MEM_LANES = MEM_BITS / 32;

  // Coefficients of one (direction, root) pass of the Rys recurrences.
  //   c00, c00p : C00 and C00' of the vertical recurrence (direction dependent)
  //   b00, b10, b01 : B00, B10, B01 (root dependent only)
  //   ab, cd    : A-B and C-D along this direction, for the transfer relation
  //   i00       : the (0,0) integral that seeds the recurrence (1 for x and y,
  //               weight times prefactor for z)
  typedef struct packed {
    fp32_t c00;
    fp32_t c00p;
    fp32_t b00;
    fp32_t b10;
    fp32_t b01;
    fp32_t ab;
    fp32_t cd;
    fp32_t i00;
  } rys_coef_t;

  function automatic int unsigned ncart(input int unsigned l);
    return (l + 1) * (l + 2) / 2;
  endfunction

  // Width of an index into n entries (at least one bit).
  function automatic int unsigned idx_w(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  function automatic int unsigned n_rys(input int unsigned ltot);
    return ltot / 2 + 1;
  endfunction

  // Power of direction dir (0=x, 1=y, 2=z) in Cartesian component idx of shell l.
  function automatic int unsigned cart_pow(input int unsigned l, input int unsigned idx,
                                           input int unsigned dir);
    int unsigned k;
    int unsigned p;
    k = 0;
    p = 0;
    for (int ax = int'(l); ax >= 0; ax--) begin
      for (int ay = int'(l) - ax; ay >= 0; ay--) begin
        if (k == idx) begin
          case (dir)
            0:       p = unsigned'(ax);
            1:       p = unsigned'(ay);
            default: p = l - unsigned'(ax) - unsigned'(ay);
          endcase
        end
        k++;
      end
    end
    return p;
  endfunction

  // Exact conversion of a small unsigned integer (below 2^24) to FP32.
  function automatic fp32_t fp_from_uint(input int unsigned v);
    int unsigned msb;
    logic [22:0] m;
    if (v == 0) return FP_ZERO;
    msb = 0;
    for (int i = 0; i < 24; i++) if (v[i]) msb = unsigned'(i);
    m = 23'(v << (23 - msb));  // drops the leading one
    return {1'b0, 8'(127 + msb), m[22:0]};
  endfunction

  // Round-to-nearest-even of a normalised significand and packing.
  //   e    : biased exponent of the leading one, may be out of range
  //   mant : 23 fraction bits after the leading one
  function automatic fp32_t fp_round_pack(input logic s, input int e, input logic [22:0] mant,
                                          input logic guard, input logic sticky);
    logic [23:0] m;
    int          er;
    m  = {1'b0, mant} + {23'd0, guard & (sticky | mant[0])};
    er = e;
    if (m[23]) er = er + 1;  // 1.111..1 rounded up to 10.000..0
    if (er >= 255) return {s, 8'hff, 23'd0};
    if (er <= 0) return {s, 31'd0};
    return {s, 8'(er), m[22:0]};
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic        s;
    logic [47:0] p;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'hff || b[30:23] == 8'hff) return {s, 8'hff, 23'd0};
    if (a[30:23] == 8'h00 || b[30:23] == 8'h00) return {s, 31'd0};
    p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return fp_round_pack(s, e + 1, p[46:24], p[23], |p[22:0]);
    return fp_round_pack(s, e, p[45:23], p[22], |p[21:0]);
  endfunction

  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t       x;
    fp32_t       y;
    int unsigned d;
    logic [51:0] mx;
    logic [51:0] my;
    logic [51:0] sum;
    logic        st;
    int          lead;
    int          e;
    if (a[30:23] == 8'hff) return a;
    if (b[30:23] == 8'hff) return b;
    if (a[30:23] == 8'h00) return (b[30:23] == 8'h00) ? FP_ZERO : b;
    if (b[30:23] == 8'h00) return a;
    // x is the operand of larger magnitude
    if (a[30:0] >= b[30:0]) begin
      x = a;
      y = b;
    end else begin
      x = b;
      y = a;
    end
    d  = unsigned'(int'(x[30:23]) - int'(y[30:23]));
    // significands with the leading one at bit 50 and 27 bits below the lsb
    mx = {2'b01, x[22:0], 27'd0};
    my = {2'b01, y[22:0], 27'd0};
    st = 1'b0;
    if (d > 51) begin
      st = 1'b1;
      my = '0;
    end else if (d > 0) begin
      st = |(my & ((52'd1 << d) - 52'd1));
      my = my >> d;
    end
    if (x[31] == y[31]) sum = mx + my;
    else sum = mx - my - 52'(st);  // borrow of the bits shifted out
    if (sum == 0) return FP_ZERO;
    lead = 0;
    for (int i = 0; i < 52; i++) if (sum[i]) lead = i;
    e = int'(x[30:23]) + lead - 50;
    if (lead == 51) begin
      st  = st | sum[0];
      sum = sum >> 1;
    end else begin
      sum = sum << (50 - lead);
    end
    return fp_round_pack(x[31], e, sum[49:27], sum[26], (|sum[25:0]) | st);
  endfunction

endpackage
