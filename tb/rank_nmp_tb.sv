// rank_nmp_tb: a near-rank unit with 2 chips x 2 bank-groups of modelled
// sources. Checks instruction broadcast to the bank-groups (and that
// rank-level instructions are not forwarded), reduction of words from all
// sources into sparse rows (integer values, so sums are exact whatever the
// arrival order), dropping of words with a stale redu_tag, a RED_SUM row, a
// RED_SOFTMAX row against a double-precision softmax, batch_done, output
// back-pressure and that both accumulators were used.
module rank_nmp_tb;
  import sadimm_pkg::*;
  import tb_inst_pkg::*;
  localparam int NCHIP = 2, NBG = 2, NSRC = 4, L = 64;
  logic clk = 0, rst_n = 0;
  logic inst_valid, inst_ready, bg_inst_valid, res_valid, res_ready, batch_done;
  nmp_inst_t inst, bg_inst;
  logic [NSRC-1:0] bg_inst_ready, bg_valid, bg_ready, bg_busy;
  red_word_t bg_word [NSRC];
  logic [IDX_W-1:0] res_idx;
  logic [31:0] res_data, words_reduced, words_dropped, rows_summed, rows_softmaxed;
  int checks = 0, failures = 0, cyc = 0, batches = 0, stall = 0;
  red_word_t srcq [NSRC][$];
  nmp_inst_t fwd[$];
  int fwd_count = 0;
  logic [IDX_W-1:0] got_idx[$];
  logic [31:0] got_data[$];
  bit double_grant = 0;

  rank_nmp #(.NCHIP(NCHIP), .NBG(NBG), .MAX_L(L), .OUT_DEPTH(64)) dut (.*);
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

  // modelled bank-groups: stream their queues, random instruction readiness
  always @(negedge clk) begin
    for (int s = 0; s < NSRC; s++) begin
      bg_valid[s] = srcq[s].size() > 0 && ($urandom % 4 != 0);
      if (srcq[s].size() > 0) bg_word[s] = srcq[s][0];
      bg_busy[s] = srcq[s].size() > 0;
      bg_inst_ready[s] = ($urandom % 4 != 0);
    end
    res_ready = ($urandom % 3 != 0);
  end
  always @(posedge clk) begin
    if (bg_ready[0] && bg_ready[2]) double_grant = 1;
    for (int s = 0; s < NSRC; s++)
      if (bg_valid[s] && bg_ready[s]) void'(srcq[s].pop_front());
    if (bg_inst_valid) begin
      chk(&bg_inst_ready, "broadcast only when all ready");
      chk(fwd.size() > 0 && bg_inst == fwd[0], "forwarded instruction");
      if (fwd.size() > 0) void'(fwd.pop_front());
      fwd_count++;
    end
    if (res_valid && !res_ready) stall++;
    if (res_valid && res_ready) begin got_idx.push_back(res_idx); got_data.push_back(res_data); end
    if (batch_done) batches++;
  end

  int ref_sum [L];
  bit present [L];
  task automatic make_row(logic tag, int density);
    for (int i = 0; i < L; i++) begin
      ref_sum[i] = 0;
      present[i] = ($urandom % 100) < density;
      if (present[i])
        for (int s = 0; s < NSRC; s++)
          if (($urandom % 3 != 0) || s == 0) begin
            int v;
            v = int'($urandom % 41) - 20;
            ref_sum[i] += v;
            srcq[s].push_back('{tag: tag, idx: IDX_W'(i), data: fp_ref_pkg::to_bits(real'(v)) });
          end
    end
  endtask

  nmp_inst_t bi;
  initial begin
    inst_valid = 0; inst = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // forwarded instruction sets the reduction tag to 1
    bi = bank_op(CMD_RD, 32, 0, 3, 0, 1);
    fwd.push_back(bi);
    send(bi);
    wait (fwd.size() == 0);
    // stale-tag words are dropped
    srcq[1].push_back('{tag: 1'b0, idx: 11'd7, data: 32'h4120_0000});
    srcq[3].push_back('{tag: 1'b0, idx: 11'd8, data: 32'h4120_0000});
    make_row(1, 40);
    // RED_SUM row
    got_idx.delete(); got_data.delete();
    send(mk(1, LVL_RANK, RED_SUM, CMD_NOP, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0));
    wait (rows_summed == 1);
    repeat (3) @(posedge clk);
    wait (!res_valid);
    repeat (5) @(posedge clk);
    begin
      int k;
      k = 0;
      for (int i = 0; i < L; i++)
        if (present[i]) begin
          chk(k < got_idx.size() && got_idx[k] == IDX_W'(i) &&
              got_data[k] == fp_ref_pkg::to_bits(real'(ref_sum[i])),
              $sformatf("sum row element %0d: got %0d:%h exp %h (n=%0d)", i, got_idx[k], got_data[k], fp_ref_pkg::to_bits(real'(ref_sum[i])), got_idx.size()));
          k++;
        end
      chk(k == got_idx.size(), "no extra sum outputs");
    end
    chk(words_dropped == 2, "stale words dropped");
    chk(rows_summed == 1, "rows_summed");
    // RED_SOFTMAX row with batch_end
    bi = bank_op(CMD_RD, 32, 0, 3, 0, 0);
    fwd.push_back(bi);
    send(bi);
    wait (fwd.size() == 0);
    make_row(0, 60);
    got_idx.delete(); got_data.delete();
    send(mk(1, LVL_RANK, RED_SOFTMAX, CMD_NOP, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1));
    wait (batches == 1);
    repeat (5) @(posedge clk);
    wait (!res_valid);
    repeat (3) @(posedge clk);
    begin
      real mx, tot, p, g;
      int k;
      k = 0;
      mx = -1.0e9; tot = 0.0;
      for (int i = 0; i < L; i++) if (present[i] && real'(ref_sum[i]) > mx) mx = real'(ref_sum[i]);
      for (int i = 0; i < L; i++) if (present[i]) tot += $exp(real'(ref_sum[i]) - mx);
      for (int i = 0; i < L; i++)
        if (present[i]) begin
          p = $exp(real'(ref_sum[i]) - mx) / tot;
          g = (k < got_data.size()) ? fp_ref_pkg::to_real(got_data[k]) : -1.0;
          if (p > 1.0e-5) chk((g - p) < 0.01 * p && (p - g) < 0.01 * p && got_idx[k] == IDX_W'(i),
                              $sformatf("softmax element %0d: %f vs %f", i, g, p));
          else chk(g - p < 1.0e-6 && p - g < 1.0e-6, "tiny softmax element");
          k++;
        end
      chk(k == got_idx.size(), "no extra softmax outputs");
    end
    chk(rows_softmaxed == 1, "rows_softmaxed");
    // a rank-level NOP with batch_end only marks the batch
    send(mk(1, LVL_RANK, RED_NONE, CMD_NOP, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1));
    repeat (5) @(posedge clk);
    chk(batches == 2, "batch_done pulses");
    chk(fwd_count == 2, "only lower-level instructions forwarded");
    chk(stall > 0, "output back-pressure exercised");
    chk(double_grant, "both accumulators active in one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
