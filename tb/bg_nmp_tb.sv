// bg_nmp_tb: a bank-group with four banks. Each bank gets its own vector and
// its own operand (LDOP from its bank), so every element's result is the
// cross-bank sum of four different products. Checks SUM mode against a model
// that adds in the same order, AGG mode (all 32 bank words forwarded, compared
// as a multiset), the switch back to SUM, back-pressure from the rank and the
// number of sums formed.
module bg_nmp_tb;
  import sadimm_pkg::*;
  import tb_inst_pkg::*;
  logic clk = 0, rst_n = 0;
  logic inst_valid, inst_ready, out_valid, out_ready, busy, agg_mode;
  nmp_inst_t inst;
  red_word_t out;
  logic [31:0] sum_count;
  int checks = 0, failures = 0, cyc = 0, stall_cycles = 0;
  red_word_t expq[$];
  int agg_exp[logic [42:0]];
  bit agg_phase = 0;

  bg_nmp #(.MY_RANK(0), .MY_CHIP(1), .MY_BG(5)) dut (
    .clk, .rst_n, .inst_valid, .inst_ready, .inst, .out_valid, .out_ready, .out, .busy,
    .agg_mode, .sum_count);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0d", what, cyc); end
  endtask
  task automatic send(nmp_inst_t i);
    @(negedge clk);
    inst_valid = 1; inst = i;
    #1;
    while (!inst_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 inst_valid = 0;
  endtask
  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return fp_ref_pkg::to_bits(fp_ref_pkg::to_real(a) * fp_ref_pkg::to_real(b));
  endfunction
  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    return fp_ref_pkg::to_bits(fp_ref_pkg::to_real(a) + fp_ref_pkg::to_real(b));
  endfunction

  always @(negedge clk) begin
    out_ready = ($urandom % 100) < 60;
    if (out_valid && !out_ready) stall_cycles++;
    if (out_valid && out_ready) begin
      if (!agg_phase) begin
        red_word_t e;
        if (expq.size() == 0) chk(0, "unexpected output");
        else begin
          e = expq.pop_front();
          chk(out == e, $sformatf("sum got %h/%0d exp %h/%0d", out.data, out.idx, e.data, e.idx));
        end
      end else begin
        chk(agg_exp.exists({out.idx, out.data}) && agg_exp[{out.idx, out.data}] > 0, $sformatf("aggregated word %0d %h", out.idx, out.data));
        if (agg_exp.exists({out.idx, out.data})) agg_exp[{out.idx, out.data}]--;
      end
    end
  end

  logic [31:0] v [4][8];
  logic [31:0] op [4];
  logic [31:0] s;
  initial begin
    inst_valid = 0; inst = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 4; b++) begin
      op[b] = {1'($urandom), 8'(125 + b), 23'($urandom)};
      send(wr(0, 1, 5, b, 40, 0, op[b]));
      for (int k = 0; k < 8; k++) begin
        v[b][k] = {1'($urandom), 8'(120 + $urandom % 10), 23'($urandom)};
        send(wr(0, 1, 5, b, 32, k, v[b][k]));
      end
    end
    // SUM mode (reset default)
    send(bank_op(CMD_LDOP, 40, 0, 0, 0, 0));
    for (int k = 0; k < 8; k++) begin
      s = fadd(fadd(fadd(fmul(v[0][k], op[0]), fmul(v[1][k], op[1])), fmul(v[2][k], op[2])), fmul(v[3][k], op[3]));
      expq.push_back('{tag: 1'b1, idx: 11'(k), data: s});
    end
    send(bank_op(CMD_RD, 32, 0, 3, 0, 1));
    wait (!busy && expq.size() == 0);
    chk(sum_count == 8, "eight sums");
    // AGG mode
    send(mk(1, LVL_BG, RED_AGG, CMD_NOP, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0));
    wait (!busy);
    chk(agg_mode, "AGG mode set");
    agg_phase = 1;
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < 8; k++) begin
        logic [42:0] key;
        key = {11'(k), fmul(v[b][k], op[b])};
        agg_exp[key] = agg_exp.exists(key) ? agg_exp[key] + 1 : 1;
      end
    send(bank_op(CMD_RD, 32, 0, 3, 0, 0));
    repeat (20) @(posedge clk);
    wait (!busy);
    repeat (2) @(posedge clk);
    begin
      int left = 0;
      foreach (agg_exp[key]) left += agg_exp[key];
      chk(left == 0, $sformatf("all aggregated words seen (%0d left)", left));
    end
    // back to SUM
    agg_phase = 0;
    send(mk(1, LVL_BG, RED_SUM, CMD_NOP, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0));
    for (int k = 4; k < 6; k++) begin
      s = fadd(fadd(fadd(fmul(v[0][k], op[0]), fmul(v[1][k], op[1])), fmul(v[2][k], op[2])), fmul(v[3][k], op[3]));
      expq.push_back('{tag: 1'b0, idx: 11'(k), data: s});
    end
    send(bank_op(CMD_RD, 32, 4, 1, 0, 0));
    repeat (5) @(posedge clk);
    wait (!busy && expq.size() == 0);
    chk(!agg_mode && sum_count == 10, "back to SUM");
    chk(stall_cycles > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
