// fp32_add: IEEE-754 single-precision adder, the accumulator of the near
// bank-group PE and of the near-rank PE (reduction of partial sums).
//
// Purely combinational: y = a + b. The operands are ordered by magnitude, the
// smaller significand is aligned with guard, round and sticky bits, added or
// subtracted, renormalised with a leading-zero count and rounded to nearest
// even. Subnormal inputs count as zero and subnormal results are flushed to
// zero; overflow gives +-inf, NaN or inf-inf gives 0x7fc00000, and an exact
// zero sum is +0 unless both operands are -0. The adder follows the design;
// rounding and subnormal handling are this implementation's choices.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic [31:0] x, z;            // |x| >= |z|
  logic        sx, sz, zx, zz;
  logic [7:0]  ex, ez, dexp;
  logic [26:0] mx, mz, mz_sh;   // 1.23 bits, then guard, round, sticky
  logic [27:0] sum;
  logic [4:0]  lz;
  logic signed [9:0] e_out;
  logic [26:0] norm;
  logic        rnd;
  logic [24:0] mant_r;
  logic        found;

  always_comb begin
    if (a[30:0] >= b[30:0]) begin x = a; z = b; end
    else                    begin x = b; z = a; end
    sx = x[31]; ex = x[30:23]; sz = z[31]; ez = z[30:23];
    zx = (ex == 8'd0); zz = (ez == 8'd0);
    mx = zx ? '0 : {1'b1, x[22:0], 3'b000};
    mz = zz ? '0 : {1'b1, z[22:0], 3'b000};
    dexp  = ex - ez;
    mz_sh = mz;
    if (dexp >= 8'd27) mz_sh = {26'd0, |mz};
    else begin
      for (int i = 0; i < 27; i++)
        if (dexp == 8'(i)) mz_sh = (mz >> i) | {26'd0, |(mz & ((27'd1 << i) - 27'd1))};
    end
    if (sx == sz) sum = {1'b0, mx} + {1'b0, mz_sh};
    else          sum = {1'b0, mx} - {1'b0, mz_sh};
    e_out = 10'(signed'({2'b0, ex}));
    norm  = '0;
    lz    = '0;
    found = 1'b0;
    if (sum[27]) begin
      norm  = sum[27:1] | {26'd0, sum[0]};
      e_out = e_out + 10'sd1;
    end else begin
      found = 1'b0;
      for (int i = 26; i >= 0; i--)
        if (!found && sum[i]) begin
          found = 1'b1;
          lz    = 5'(26 - i);
        end
      norm  = sum[26:0] << lz;
      e_out = e_out - 10'(signed'({5'b0, lz}));
    end
    rnd    = norm[2] & (norm[1] | norm[0] | norm[3]);
    mant_r = {1'b0, norm[26:3]} + 25'(rnd);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_out  = e_out + 10'sd1;
    end
    if ((ex == 8'hff && x[22:0] != '0) || (ez == 8'hff && z[22:0] != '0) ||
        (ex == 8'hff && ez == 8'hff && sx != sz))
      y = 32'h7fc0_0000;
    else if (ex == 8'hff)
      y = x;
    else if (zx && zz)
      y = {sx & sz, 31'd0};
    else if (sum == '0)
      y = 32'd0;
    else if (e_out >= 10'sd255)
      y = {sx, 8'hff, 23'd0};
    else if (e_out <= 10'sd0)
      y = {sx, 31'd0};
    else
      y = {sx, e_out[7:0], mant_r[22:0]};
  end
endmodule
