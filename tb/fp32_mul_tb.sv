// fp32_mul_tb: checks the FP32 multiplier against the simulator's own
// floating-point arithmetic (the exact double product rounded once to single
// precision is the IEEE round-to-nearest-even result). Random operands with
// moderate exponents plus corner cases: zeros, signs, rounding carries, inf,
// NaN, overflow and underflow to zero.
module fp32_mul_tb;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  function automatic logic [31:0] ref_mul(logic [31:0] x, logic [31:0] w);
    real r;
    logic [31:0] q;
    r = fp_ref_pkg::to_real(x) * fp_ref_pkg::to_real(w);
    q = fp_ref_pkg::to_bits(r);
    if (q[30:23] == 8'd0) q = {q[31], 31'd0};   // flush subnormal
    return q;
  endfunction

  task automatic check(logic [31:0] x, logic [31:0] w, logic [31:0] exp_y);
    a = x; b = w;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("MUL FAIL %h * %h = %h expected %h", x, w, y, exp_y);
    end
  endtask

  function automatic logic [31:0] rnd_fp(int emin, int emax);
    logic [31:0] v;
    v[31] = 1'($urandom);
    v[30:23] = 8'(emin + int'($urandom % (emax - emin + 1)));
    v[22:0] = 23'($urandom);
    return v;
  endfunction

  initial begin
    check(32'h3f80_0000, 32'h4000_0000, 32'h4000_0000);      // 1*2
    check(32'hbfc0_0000, 32'h4040_0000, 32'hc090_0000);      // -1.5*3 = -4.5
    check(32'h0000_0000, 32'h4040_0000, 32'h0000_0000);
    check(32'h8000_0000, 32'h4040_0000, 32'h8000_0000);
    check(32'h7f80_0000, 32'h4040_0000, 32'h7f80_0000);      // inf
    check(32'h7f80_0000, 32'h0000_0000, 32'h7fc0_0000);      // inf*0
    check(32'h7fc0_0001, 32'h3f80_0000, 32'h7fc0_0000);      // NaN
    check(32'h7f00_0000, 32'h7f00_0000, 32'h7f80_0000);      // overflow
    check(32'h0080_0000, 32'h0080_0000, 32'h0000_0000);      // underflow
    check(32'h3fff_ffff, 32'h3fff_ffff, ref_mul(32'h3fff_ffff, 32'h3fff_ffff));
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, w;
      x = rnd_fp(64, 190); w = rnd_fp(64, 190);
      check(x, w, ref_mul(x, w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
