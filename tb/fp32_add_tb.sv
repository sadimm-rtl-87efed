// fp32_add_tb: checks the FP32 adder against the simulator's floating-point
// arithmetic. The double-precision sum rounded to single precision is the
// exact IEEE result whenever the exponents differ by less than 29; for larger
// gaps one unit in the last place is allowed for double rounding. Covers
// cancellation, sign handling, rounding carries, inf/NaN and overflow.
module fp32_add_tb;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  function automatic logic [31:0] ref_add(logic [31:0] x, logic [31:0] w);
    real r;
    logic [31:0] q;
    r = fp_ref_pkg::to_real(x) + fp_ref_pkg::to_real(w);
    q = fp_ref_pkg::to_bits(r);
    if (q[30:23] == 8'd0) q = 32'd0;   // flush subnormal, exact zero is +0
    return q;
  endfunction

  task automatic check(logic [31:0] x, logic [31:0] w, logic [31:0] exp_y, bit ulp_ok);
    int diff;
    a = x; b = w;
    #1;
    checks++;
    diff = int'(y[30:0]) - int'(exp_y[30:0]);
    if (!(y === exp_y || (ulp_ok && y[31] == exp_y[31] && (diff == 1 || diff == -1)))) begin
      failures++;
      if (failures < 10) $display("ADD FAIL %h + %h = %h expected %h", x, w, y, exp_y);
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
    check(32'h3f80_0000, 32'h4000_0000, 32'h4040_0000, 0);   // 1+2=3
    check(32'h3f80_0000, 32'hbf80_0000, 32'h0000_0000, 0);   // 1-1=+0
    check(32'h8000_0000, 32'h8000_0000, 32'h8000_0000, 0);   // -0 + -0
    check(32'h4b7f_ffff, 32'h3f80_0000, 32'h4b80_0000, 0);   // carry out
    check(32'h3f80_0001, 32'hbf80_0000, 32'h3400_0000, 0);   // cancellation
    check(32'h7f80_0000, 32'hff80_0000, 32'h7fc0_0000, 0);   // inf-inf
    check(32'h7f80_0000, 32'h3f80_0000, 32'h7f80_0000, 0);
    check(32'h7f7f_ffff, 32'h7f7f_ffff, 32'h7f80_0000, 0);   // overflow
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, w;
      int gap;
      x = rnd_fp(100, 160);
      if (i % 4 == 0) w = {~x[31], x[30:8], 8'($urandom)};   // near cancellation
      else w = rnd_fp(100, 160);
      gap = int'(x[30:23]) - int'(w[30:23]);
      check(x, w, ref_add(x, w), gap > 28 || gap < -28);
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
