// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// The reference computes in double precision (`real`) and rounds the exact
// double result to binary32 with round-to-nearest-even, with the same
// conventions as the datapath: subnormal inputs read as zero, results below
// the normal range flush to a signed zero, overflow gives infinity.
// Double precision has more than 2*24+2 significand bits, so rounding the
// double result of one +, - or * of binary32 operands to binary32 gives the
// correctly rounded binary32 result (double rounding is innocuous there).
package fp_ref_pkg;

  function automatic real f32_to_real(logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'd0) return $bitstoreal({x[31], 63'd0});
    if (x[30:23] == 8'hFF) return $bitstoreal({x[31], 11'h7FF, (x[22:0] != '0), 51'd0});
    d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real_to_f32(real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, s;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    if (d[62:52] == 11'h7FF) return (d[51:0] == '0) ? {d[63], 8'hFF, 23'd0} : 32'h7FC0_0000;
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    g = d[28];
    s = |d[27:0];
    if (g && (s || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] f32_add(logic [31:0] a, logic [31:0] b);
    return real_to_f32(f32_to_real(a) + f32_to_real(b));
  endfunction

  function automatic logic [31:0] f32_sub(logic [31:0] a, logic [31:0] b);
    return real_to_f32(f32_to_real(a) - f32_to_real(b));
  endfunction

  function automatic logic [31:0] f32_mul(logic [31:0] a, logic [31:0] b);
    return real_to_f32(f32_to_real(a) * f32_to_real(b));
  endfunction

  // random normal number with exponent in [lo, hi] (biased), random sign
  function automatic logic [31:0] rand_f32(int lo, int hi);
    int e;
    e = lo + int'($urandom_range(hi - lo));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
