// fp32_add: single-precision floating-point adder/subtractor, one lane of
// the packed-single execution unit.
//
// Combinational. y = a + b, or a - b when sub is high, in IEEE-754 binary32
// with round-to-nearest-even. The smaller operand is aligned with guard,
// round and sticky bits, the magnitudes are added or subtracted, the sum is
// normalised and rounded. As in fp32_mul (this design's choice): subnormal
// inputs read as zero, subnormal results flush to a signed zero, NaN results
// are the canonical quiet NaN. An exact zero difference is +0; the sum of
// two zeros is -0 only when both are -0.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);

  logic        sa, sb;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  // larger (x) and smaller (z) magnitude operand
  logic        sx, sz;
  logic [7:0]  ex, ez;
  logic [26:0] mx, mz, mz_sh;   // {hidden, fraction, G, R, S}
  logic [7:0]  d;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic signed [10:0] exp_s;
  logic [23:0] mant;
  logic        g, rs, rnd;
  logic [24:0] mant_r;
  logic        eff_sub;

  always_comb begin
    sa = a[31];       ea = a[30:23]; fa = a[22:0];
    sb = b[31] ^ sub; eb = b[30:23]; fb = b[22:0];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == '0);
    b_inf  = (eb == 8'hFF) && (fb == '0);
    a_nan  = (ea == 8'hFF) && (fa != '0);
    b_nan  = (eb == 8'hFF) && (fb != '0);

    if ({ea, fa} >= {eb, fb}) begin
      sx = sa; ex = ea; mx = {1'b1, fa, 3'b000};
      sz = sb; ez = eb; mz = {1'b1, fb, 3'b000};
    end else begin
      sx = sb; ex = eb; mx = {1'b1, fb, 3'b000};
      sz = sa; ez = ea; mz = {1'b1, fa, 3'b000};
    end
    eff_sub = sx ^ sz;

    // align the smaller operand, folding shifted-out bits into the sticky bit
    d = ex - ez;
    if (d >= 8'd27) begin
      mz_sh = 27'd1;
    end else begin
      mz_sh = mz >> d;
      mz_sh[0] = mz_sh[0] | ((mz & ((27'd1 << d) - 27'd1)) != '0);
    end

    exp_s = 11'(signed'({3'b000, ex}));
    sum   = eff_sub ? ({1'b0, mx} - {1'b0, mz_sh}) : ({1'b0, mx} + {1'b0, mz_sh});

    lz = '0;
    if (sum[27]) begin
      sum   = {1'b0, sum[27:2], sum[1] | sum[0]};
      exp_s = exp_s + 11'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) begin
          lz = 5'(26 - i);
          break;
        end
      end
      sum   = sum << lz;
      exp_s = exp_s - 11'(lz);
    end

    mant   = sum[26:3];
    g      = sum[2];
    rs     = |sum[1:0];
    rnd    = g & (rs | mant[0]);
    mant_r = {1'b0, mant} + 25'(rnd);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = stvec_pkg::F32_QNAN;
    end else if (a_inf) begin
      y = {sa, 8'hFF, 23'd0};
    end else if (b_inf) begin
      y = {sb, 8'hFF, 23'd0};
    end else if (a_zero && b_zero) begin
      y = {sa & sb, 31'd0};
    end else if (b_zero) begin
      y = {sa, ea, fa};
    end else if (a_zero) begin
      y = {sb, eb, fb};
    end else if (sum == '0) begin
      y = 32'd0;
    end else if (exp_s >= 11'sd255) begin
      y = {sx, 8'hFF, 23'd0};
    end else if (exp_s <= 11'sd0) begin
      y = {sx, 31'd0};
    end else begin
      y = {sx, exp_s[7:0], mant_r[22:0]};
    end
  end

endmodule
