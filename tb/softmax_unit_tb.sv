// softmax_unit_tb: sends score rows of several lengths (1 to 300 elements,
// scattered indices as left by a sparse mask, values spread over [-12, 12])
// and compares every probability with a double-precision softmax (relative
// error below 1 % for p > 1e-5, absolute error below 1e-6 otherwise), checks
// index order, out_last, that each row sums to 1, the 3n+27 cycle row time,
// and back-pressure on the output.
module softmax_unit_tb;
  import sadimm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [IDX_W-1:0] in_idx, out_idx;
  logic [31:0] in_data, out_data, rows_done;
  int checks = 0, failures = 0, cyc = 0;

  softmax_unit #(.MAX_L(512)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_idx, .in_data, .in_last,
    .out_valid, .out_ready, .out_idx, .out_data, .out_last, .rows_done);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0d", what, cyc); end
  endtask

  task automatic run_row(int n, bit throttle);
    logic [31:0] s [];
    logic [IDX_W-1:0] id [];
    real mx, tot, p, got, psum;
    int t0, t1, k;
    s = new[n]; id = new[n];
    for (int j = 0; j < n; j++) begin
      s[j]  = fp_ref_pkg::to_bits((real'($urandom % 24000) - 12000.0) / 1000.0);
      id[j] = IDX_W'(j * 3 + ($urandom % 3));
    end
    mx = -1.0e30;
    for (int j = 0; j < n; j++) if (fp_ref_pkg::to_real(s[j]) > mx) mx = fp_ref_pkg::to_real(s[j]);
    tot = 0.0;
    for (int j = 0; j < n; j++) tot += $exp(fp_ref_pkg::to_real(s[j]) - mx);
    @(negedge clk);
    t0 = cyc;
    for (int j = 0; j < n; j++) begin
      in_valid = 1; in_data = s[j]; in_idx = id[j]; in_last = (j == n - 1);
      #1 chk(in_ready, "in_ready in LOAD");
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
    k = 0; psum = 0.0;
    while (k < n) begin
      out_ready = throttle ? (($urandom % 2) == 0) : 1'b1;
      #1;
      if (out_valid && out_ready) begin
        p   = $exp(fp_ref_pkg::to_real(s[k]) - mx) / tot;
        got = fp_ref_pkg::to_real(out_data);
        psum += got;
        if (p > 1.0e-5) chk((got - p) / p < 0.01 && (p - got) / p < 0.01, $sformatf("p[%0d] %f vs %f", k, got, p));
        else chk(got - p < 1.0e-6 && p - got < 1.0e-6, "small p");
        chk(out_idx == id[k], "index order");
        chk(out_last == (k == n - 1), "out_last");
        k++;
        t1 = cyc;
      end
      @(negedge clk);
    end
    out_ready = 1;
    chk(psum > 0.99 && psum < 1.01, $sformatf("row sum %f", psum));
    if (!throttle) chk(t1 - t0 + 1 == 3 * n + 27, $sformatf("row time %0d for n=%0d", t1 - t0 + 1, n));
  endtask

  initial begin
    in_valid = 0; in_last = 0; in_idx = 0; in_data = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_row(1, 0);
    run_row(5, 0);
    run_row(64, 0);
    run_row(300, 1);
    run_row(128, 0);
    chk(rows_done == 5, "rows_done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
