// fp32_mul: single-precision floating-point multiplier, one lane of the
// packed-single execution unit.
//
// Combinational. y = a * b in IEEE-754 binary32 with round-to-nearest-even.
// Simplifications chosen for this design (the StVEC proposal only names the
// packed-single operations it extends): subnormal inputs are read as zero and
// results below the normal range are flushed to a signed zero (the SSE
// DAZ/FTZ mode); any NaN result is the canonical quiet NaN 0x7FC00000.
// The flush decision is taken after rounding.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        g, rs, rnd;
  logic [24:0] mant_r;
  logic signed [10:0] exp_s;

  always_comb begin
    sa = a[31]; ea = a[30:23]; fa = a[22:0];
    sb = b[31]; eb = b[30:23]; fb = b[22:0];
    sy = sa ^ sb;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == '0);
    b_inf  = (eb == 8'hFF) && (fb == '0);
    a_nan  = (ea == 8'hFF) && (fa != '0);
    b_nan  = (eb == 8'hFF) && (fb != '0);

    prod = {1'b1, fa} * {1'b1, fb};
    if (prod[47]) begin
      mant  = prod[47:24];
      g     = prod[23];
      rs    = |prod[22:0];
      exp_s = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'sd126;
    end else begin
      mant  = prod[46:23];
      g     = prod[22];
      rs    = |prod[21:0];
      exp_s = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'sd127;
    end
    rnd    = g & (rs | mant[0]);
    mant_r = {1'b0, mant} + 25'(rnd);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = stvec_pkg::F32_QNAN;
    end else if (a_inf || b_inf) begin
      y = {sy, 8'hFF, 23'd0};
    end else if (a_zero || b_zero) begin
      y = {sy, 31'd0};
    end else if (exp_s >= 11'sd255) begin
      y = {sy, 8'hFF, 23'd0};
    end else if (exp_s <= 11'sd0) begin
      y = {sy, 31'd0};
    end else begin
      y = {sy, exp_s[7:0], mant_r[22:0]};
    end
  end

endmodule
