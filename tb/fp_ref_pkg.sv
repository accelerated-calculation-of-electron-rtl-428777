// fp_ref_pkg: reference conversions between IEEE-754 single precision bit
// patterns and SystemVerilog real (double precision), used by the testbenches
// to compute expected values independently of the RTL operators.
//   to_real   : exact widening of an FP32 pattern (subnormals read as zero)
//   from_real : narrowing with round-to-nearest-even, subnormals flushed to zero
//   close     : relative comparison with an absolute floor
package fp_ref_pkg;

  function automatic real to_real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] from_real(input real r);
    logic [63:0] d;
    logic [23:0] m;
    int          e;
    logic        guard;
    logic        sticky;
    d = $realtobits(r);
    if (d[62:0] == 0) return 32'd0;
    e      = int'(d[62:52]) - 1023 + 127;
    m      = {1'b0, d[51:29]};
    guard  = d[28];
    sticky = |d[27:0];
    m      = m + {23'd0, guard & (sticky | m[0])};
    if (m[23]) e = e + 1;
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic bit close(input real got, input real exp, input real rel, input real floor);
    real diff;
    real mag;
    diff = got - exp;
    if (diff < 0) diff = -diff;
    mag = exp < 0 ? -exp : exp;
    return diff <= rel * mag + floor;
  endfunction

  // Random value with magnitude in [2^lo, 2^hi) and random sign.
  function automatic real rand_real(input int lo, input int hi);
    real m;
    int  e;
    m = 1.0 + real'($urandom % 1000000) / 1000000.0;
    e = lo + int'($urandom % unsigned'(hi - lo));
    m = m * (2.0 ** e);
    return ($urandom % 2 == 1) ? -m : m;
  endfunction

endpackage
