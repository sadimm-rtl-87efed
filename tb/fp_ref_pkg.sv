// fp_ref_pkg: reference conversions between IEEE single-precision bit patterns
// and the simulator's double-precision `real`, for the testbenches. to_real is
// exact; to_bits rounds a double to single precision (nearest even) and flushes
// subnormal results to zero, as the RTL does.
package fp_ref_pkg;

  function automatic real to_real(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    if (f[30:23] == 8'hff) d = {f[31], 11'h7ff, f[22:0], 29'd0};
    else d = {f[31], 11'(int'(f[30:23]) + 896), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to_bits(real r);
    logic [63:0] d;
    int e;
    logic [53:0] m;       // 1.52
    logic [24:0] mr;
    logic g, st;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 896;
    m = {2'b01, d[51:0]};
    mr = 25'(m[52:29]);
    g  = m[28];
    st = |m[27:0];
    if (g && (st || mr[0])) mr = mr + 25'd1;
    if (mr[24]) begin mr = mr >> 1; e = e + 1; end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

endpackage
