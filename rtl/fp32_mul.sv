// fp32_mul: IEEE-754 single-precision multiplier, the arithmetic unit of each
// near-bank PE (sparse matrix multiplication is done next to the bank).
//
// Purely combinational: y = a * b. The 24x24-bit significand product is
// normalised, rounded to nearest even, and the exponent checked for overflow
// (result +-inf) and underflow (result +-0). Subnormal inputs are treated as
// zero and subnormal results flushed to zero; any NaN or inf*0 gives the quiet
// NaN 0x7fc00000. The multiplier itself follows the design; rounding mode and
// subnormal handling are this implementation's choices. Users register y.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        za, zb, ia, ib, na, nb;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        g, st, rnd;
  logic [24:0] mant_r;
  logic signed [10:0] exp_s;

  always_comb begin
    sa = a[31]; ea = a[30:23]; fa = a[22:0];
    sb = b[31]; eb = b[30:23]; fb = b[22:0];
    sy = sa ^ sb;
    za = (ea == 8'd0);   zb = (eb == 8'd0);
    ia = (ea == 8'hff) && (fa == '0); ib = (eb == 8'hff) && (fb == '0);
    na = (ea == 8'hff) && (fa != '0); nb = (eb == 8'hff) && (fb != '0);
    prod  = {1'b1, fa} * {1'b1, fb};
    exp_s = 11'(signed'({3'b0, ea})) + 11'(signed'({3'b0, eb})) - 11'sd127;
    if (prod[47]) begin
      mant  = prod[47:24];
      g     = prod[23];
      st    = |prod[22:0];
      exp_s = exp_s + 11'sd1;
    end else begin
      mant  = prod[46:23];
      g     = prod[22];
      st    = |prod[21:0];
    end
    rnd    = g & (st | mant[0]);
    mant_r = {1'b0, mant} + 25'(rnd);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 11'sd1;
    end
    if (na || nb || (ia && zb) || (ib && za))
      y = 32'h7fc0_0000;
    else if (ia || ib)
      y = {sy, 8'hff, 23'd0};
    else if (za || zb)
      y = {sy, 31'd0};
    else if (exp_s >= 11'sd255)
      y = {sy, 8'hff, 23'd0};
    else if (exp_s <= 11'sd0)
      y = {sy, 31'd0};
    else
      y = {sy, exp_s[7:0], mant_r[22:0]};
  end
endmodule
