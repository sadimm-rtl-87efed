// bank_nmp_tb: drives the near-bank PE with instruction sequences and checks
// its product stream against a software model: memory-mode writes (only to
// its own address), LDOPI and LDOP operand loads, vector RDs with index and
// tag, a row miss, back-pressure from the bank-group, dropping of other
// levels' instructions, and one word per cycle once a row is open.
module bank_nmp_tb;
  import sadimm_pkg::*;
  import tb_inst_pkg::*;
  logic clk = 0, rst_n = 0;
  logic inst_valid, inst_ready, out_valid, out_ready, busy;
  nmp_inst_t inst;
  red_word_t out;
  logic [31:0] act_count;
  int checks = 0, failures = 0;
  int cyc = 0;
  red_word_t expq[$];
  int stall_cycles = 0, last_out_cyc = -10, max_gap_free = 0, consecutive = 0;
  bit throttle = 0;

  bank_nmp #(.MY_RANK(1), .MY_CHIP(2), .MY_BG(3), .MY_BA(1)) dut (
    .clk, .rst_n, .inst_valid, .inst_ready, .inst, .out_valid, .out_ready, .out, .busy, .act_count);
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

  // output monitor
  always @(negedge clk) begin
    out_ready = throttle ? (($urandom % 100) < 30) : 1'b1;
    if (out_valid && !out_ready) stall_cycles++;
    if (out_valid && out_ready) begin
      red_word_t e;
      if (expq.size() == 0) chk(0, "unexpected output");
      else begin
        e = expq.pop_front();
        chk(out == e, $sformatf("product got %h/%0d/%0d exp %h/%0d/%0d",
            out.data, out.idx, out.tag, e.data, e.idx, e.tag));
      end
      if (!throttle) begin
        consecutive = (cyc == last_out_cyc + 1) ? consecutive + 1 : 1;
        if (consecutive > max_gap_free) max_gap_free = consecutive;
      end
      last_out_cyc = cyc;
    end
  end

  logic [31:0] v [8];
  logic [31:0] w;
  initial begin
    inst_valid = 0; inst = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      v[k] = {1'b0, 8'(120 + k), 23'($urandom)};
      send(wr(1, 2, 3, 1, 16, k, v[k]));
      send(wr(1, 3, 3, 1, 16, k, 32'h4800_0000));   // another chip: ignored
    end
    w = 32'hc0a0_0000;                                 // -5.0
    send(wr(1, 2, 3, 1, 20, 5, w));
    // other levels' instructions are dropped
    send(mk(1, LVL_RANK, RED_SUM, CMD_RD, 0, 0, 0, 0, 16, 0, 3, 0, 0, 0));
    send(mk(1, LVL_BG, RED_SUM, CMD_RD, 0, 0, 0, 0, 16, 0, 3, 0, 0, 0));
    // operand from the instruction, 8-word vector: one word per cycle
    send(bank_op(CMD_ACT, 16, 0, 0, 0, 0));
    send(bank_op(CMD_LDOPI, 0, 0, 0, 32'h4000_0000, 1));
    for (int k = 0; k < 8; k++) expq.push_back('{tag: 1'b1, idx: 11'(k), data: fmul(v[k], 32'h4000_0000)});
    send(bank_op(CMD_RD, 16, 0, 3, 0, 1));
    wait (expq.size() == 0);
    repeat (5) @(posedge clk);
    chk(max_gap_free == 8, $sformatf("8 products on consecutive cycles (%0d)", max_gap_free));
    // operand loaded from the bank (row miss to row 20, then back to 16)
    throttle = 1;
    send(bank_op(CMD_LDOP, 20, 5, 0, 0, 0));
    for (int k = 4; k < 8; k++) expq.push_back('{tag: 1'b0, idx: 11'(k), data: fmul(v[k], w)});
    send(bank_op(CMD_RD, 16, 4, 2, 0, 0));
    // a long read wrapping around the row at row 17 (idx 128..)
    for (int k = 0; k < 64; k++) send(wr(1, 2, 3, 1, 17, (100 + k) % 128, {9'd127, 23'(k * 777)}));
    send(bank_op(CMD_LDOPI, 0, 0, 0, 32'h3f80_0000, 0));
    for (int k = 0; k < 64; k++) expq.push_back('{tag: 1'b0, idx: 11'(128 + ((100 + k) % 128)), data: {9'd127, 23'(k * 777)}});
    send(bank_op(CMD_RD, 17, 100, 6, 0, 0));
    // PRE closes the row
    send(bank_op(CMD_PRE, 0, 0, 0, 0, 0));
    wait (!busy);
    repeat (5) @(posedge clk);
    chk(expq.size() == 0, "all products delivered");
    chk(act_count == 6, $sformatf("activations %0d", act_count));
    chk(stall_cycles > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
