// sadimm_flow: end-to-end sparse-attention run on one SADIMM DIMM, shared by
// the reduced-size and the full-size testbench (FULL=1 leaves every DIMM
// parameter at its default).
//
// Dimension-based layout, per rank: bank b (of NB = NCHIP*NBG*NBANK) holds
// dimension d = b of K (row 0, column = token) and of Q (row RSTEP), one
// scalar per SpMM step of the probability row (row 2*RSTEP) and, token-wise,
// the value vectors V[t] of tokens t = k*NB + b (rows 3*RSTEP + k*RSTEP ...).
// RSTEP = MAX_L/COLS so every vector starts at element index 0.
// Per query row t1 the host-side sequence is:
//   SDDMM   LDOP Q[t1][d]; one RD per key t2 kept by the sparse mask; the
//           bank-groups and the rank add the NB dimension products;
//   RED_SUM (first row only, to check S) or RED_SOFTMAX -> P[t1][t2];
//   write-back of P into the banks (memory-mode WR), then
//   SpMM    per step k: LDOP P[t1][k*NB+b]; RD of V[k*NB+b]; reduction over
//           all banks and steps gives Z[t1][:]; RED_SUM with batch_end.
// Results are compared with a double-precision model. Row 1 runs with the
// bank-groups in AGG mode. Counts each mechanism and fails if one never
// happened: sum rows, softmax rows, AGG mode, pruned keys, output
// back-pressure, batch_done, both ranks, row misses in the banks.
module sadimm_flow #(
  parameter bit FULL = 1'b0
) ();
  import sadimm_pkg::*;
  import tb_inst_pkg::*;

  localparam int NRANK = 2;
  localparam int NCHIP = FULL ? 8 : 2;
  localparam int NBG   = FULL ? 8 : 2;
  localparam int NBANK = FULL ? 4 : 2;
  localparam int COLS  = FULL ? 128 : 16;
  localparam int ROWS  = FULL ? 1024 : 64;
  localparam int MAXL  = FULL ? 2048 : 64;
  localparam int NB    = NCHIP * NBG * NBANK;     // banks per rank = model dimension
  localparam int D     = NB;
  localparam int L     = FULL ? 32 : 16;          // tokens
  localparam int NQ    = FULL ? 2 : 3;            // query rows per rank
  localparam int RSTEP = MAXL / COLS;
  localparam int NK    = (L + NB - 1) / NB;       // SpMM steps
  localparam int VR    = (D + COLS - 1) / COLS;   // DRAM rows per value vector
  localparam int VW    = (D < COLS) ? D : COLS;   // words per RD of V
  localparam int VRS   = $clog2(VW);

  logic clk = 0, rst_n = 0;
  logic inst_valid, inst_ready;
  nmp_inst_t inst;
  logic [NRANK-1:0] res_valid, res_ready, batch_done;
  logic [IDX_W-1:0] res_idx [NRANK];
  logic [31:0] res_data [NRANK];
  logic [31:0] words_reduced [NRANK], words_dropped [NRANK], rows_summed [NRANK], rows_softmaxed [NRANK];

  logic [31:0] act0;   // row activations of the first bank of rank 0
  if (FULL) begin : g_full
    sadimm_dimm dut (.*);
    assign act0 = dut.g_rank[0].g_chip[0].g_bg[0].u_bg.g_bank[0].u_bank.act_count;
  end else begin : g_small
    sadimm_dimm #(.NCHIP(NCHIP), .NBG(NBG), .NBANK(NBANK), .ROWS(ROWS), .COLS(COLS),
                  .MAX_L(MAXL), .OUT_DEPTH(256)) dut (.*);
    assign act0 = dut.g_rank[0].g_chip[0].g_bg[0].u_bg.g_bank[0].u_bank.act_count;
  end

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  int checks = 0, failures = 0;
  int n_stall = 0, n_batch = 0, n_pruned = 0, n_agg_rows = 0, n_rank_rows [NRANK];
  logic [IDX_W-1:0] gi [NRANK][$];
  logic [31:0]      gd [NRANK][$];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s at %0d", what, cyc); end
  endtask

  task automatic send(nmp_inst_t i);
    @(negedge clk);
    inst_valid = 1; inst = i;
    #1;
    while (!inst_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 inst_valid = 0;
  endtask

  always @(negedge clk) res_ready = FULL ? '1 : NRANK'($urandom);
  always @(posedge clk) begin
    for (int r = 0; r < NRANK; r++) begin
      if (res_valid[r] && !res_ready[r]) n_stall++;
      if (res_valid[r] && res_ready[r]) begin gi[r].push_back(res_idx[r]); gd[r].push_back(res_data[r]); end
      if (batch_done[r]) n_batch++;
    end
  end

  // data set
  real Q [NRANK][L][D], K [NRANK][L][D], V [NRANK][L][D];
  bit  M [NRANK][L][L];
  function automatic real rnd();
    return real'(int'($urandom % 2001) - 1000) / 1000.0;
  endfunction

  // bank number -> (chip, bg, ba)
  function automatic int chip_of(int b); return b / (NBG * NBANK); endfunction
  function automatic int bg_of(int b);   return (b / NBANK) % NBG;  endfunction
  function automatic int ba_of(int b);   return b % NBANK;          endfunction

  function automatic logic [31:0] f(real x); return fp_ref_pkg::to_bits(x); endfunction
  function automatic real rl(logic [31:0] x); return fp_ref_pkg::to_real(x); endfunction

  task automatic load_rank(int r);
    for (int b = 0; b < NB; b++)
      for (int t = 0; t < L; t++) begin
        send(wr(r, chip_of(b), bg_of(b), ba_of(b), 0, t, f(K[r][t][b])));
        send(wr(r, chip_of(b), bg_of(b), ba_of(b), RSTEP, t, f(Q[r][t][b])));
      end
    for (int t = 0; t < L; t++) begin
      int b = t % NB, k = t / NB;
      for (int j = 0; j < D; j++)
        send(wr(r, chip_of(b), bg_of(b), ba_of(b), 3 * RSTEP + k * RSTEP + j / COLS, j % COLS, f(V[r][t][j])));
    end
  endtask

  function automatic nmp_inst_t rk(int r, nmp_inst_t i);
    i.addr.rank = 1'(r);
    return i;
  endfunction

  logic tag [NRANK];

  task automatic wait_results(int r, int n);
    int t0 = cyc;
    while (gi[r].size() < n && cyc - t0 < 200000) @(posedge clk);
    chk(gi[r].size() == n, $sformatf("rank %0d: %0d results, expected %0d", r, gi[r].size(), n));
  endtask

  task automatic query_row(int r, int t1, bit s_check, bit agg);
    real s [L], p [L], mx, tot, z;
    real ph [L];
    int  kept;
    if (agg) send(rk(r, mk(1, LVL_BG, RED_AGG, CMD_NOP, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0)));
    // ---- SDDMM, optionally a RED_SUM pass to check S ----
    for (int pass = s_check ? 0 : 1; pass < 2; pass++) begin
      tag[r] = !tag[r];
      send(rk(r, bank_op(CMD_LDOP, RSTEP, t1, 0, 0, tag[r])));
      kept = 0;
      for (int t2 = 0; t2 < L; t2++)
        if (M[r][t1][t2]) begin
          send(rk(r, bank_op(CMD_RD, 0, t2, 0, 0, tag[r])));
          kept++;
        end else if (pass == 1) n_pruned++;
      gi[r].delete(); gd[r].delete();
      send(rk(r, mk(1, LVL_RANK, pass == 0 ? RED_SUM : RED_SOFTMAX, CMD_NOP, 0, 0, 0, 0, 0, 0, 0, 0, tag[r], 0)));
      wait_results(r, kept);
      mx = -1.0e30;
      for (int t2 = 0; t2 < L; t2++) begin
        s[t2] = 0.0;
        for (int d = 0; d < D; d++) s[t2] += Q[r][t1][d] * K[r][t2][d];
        if (M[r][t1][t2] && s[t2] > mx) mx = s[t2];
      end
      tot = 0.0;
      for (int t2 = 0; t2 < L; t2++) if (M[r][t1][t2]) tot += $exp(s[t2] - mx);
      begin
        int k = 0;
        for (int t2 = 0; t2 < L; t2++) begin
          ph[t2] = 0.0;
          if (M[r][t1][t2] && k < gi[r].size()) begin
            real g;
            g = rl(gd[r][k]);
            chk(gi[r][k] == IDX_W'(t2), $sformatf("index of key %0d", t2));
            if (pass == 0)
              chk(g - s[t2] < 1.0e-3 + 1.0e-4 * (s[t2] < 0 ? -s[t2] : s[t2]) &&
                  s[t2] - g < 1.0e-3 + 1.0e-4 * (s[t2] < 0 ? -s[t2] : s[t2]),
                  $sformatf("S[%0d][%0d] %f vs %f", t1, t2, g, s[t2]));
            else begin
              p[t2] = $exp(s[t2] - mx) / tot;
              chk(g - p[t2] < 0.01 * p[t2] + 1.0e-6 && p[t2] - g < 0.01 * p[t2] + 1.0e-6,
                  $sformatf("P[%0d][%0d] %f vs %f", t1, t2, g, p[t2]));
              ph[t2] = g;
            end
            k++;
          end
        end
      end
    end
    if (agg) begin
      send(rk(r, mk(1, LVL_BG, RED_SUM, CMD_NOP, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0)));
      n_agg_rows++;
    end
    // ---- write P back, one scalar per bank and SpMM step ----
    for (int k = 0; k < NK; k++)
      for (int b = 0; b < NB; b++) begin
        int t2 = k * NB + b;
        send(wr(r, chip_of(b), bg_of(b), ba_of(b), 2 * RSTEP, k, f(t2 < L ? ph[t2] : 0.0)));
      end
    // ---- SpMM ----
    tag[r] = !tag[r];
    for (int k = 0; k < NK; k++) begin
      send(rk(r, bank_op(CMD_LDOP, 2 * RSTEP, k, 0, 0, tag[r])));
      for (int v = 0; v < VR; v++)
        send(rk(r, bank_op(CMD_RD, 3 * RSTEP + k * RSTEP + v, 0, VRS, 0, tag[r])));
    end
    gi[r].delete(); gd[r].delete();
    send(rk(r, mk(1, LVL_RANK, RED_SUM, CMD_NOP, 0, 0, 0, 0, 0, 0, 0, 0, tag[r], 1)));
    wait_results(r, D);
    for (int j = 0; j < D && j < gi[r].size(); j++) begin
      real g;
      z = 0.0;
      for (int t2 = 0; t2 < L; t2++) z += ph[t2] * rl(f(V[r][t2][j]));
      g = rl(gd[r][j]);
      chk(gi[r][j] == IDX_W'(j) && g - z < 1.0e-4 && z - g < 1.0e-4,
          $sformatf("Z[%0d][%0d] %f vs %f", t1, j, g, z));
    end
    n_rank_rows[r]++;
  endtask

  initial begin
    inst_valid = 0; inst = '0;
    for (int r = 0; r < NRANK; r++) begin
      tag[r] = 0;
      n_rank_rows[r] = 0;
      for (int t = 0; t < L; t++) begin
        for (int d = 0; d < D; d++) begin
          Q[r][t][d] = rnd(); K[r][t][d] = rnd(); V[r][t][d] = rnd();
        end
        for (int u = 0; u < L; u++) M[r][t][u] = (t == u) || ($urandom % 2 == 0);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NRANK; r++) load_rank(r);
    for (int q = 0; q < NQ; q++) query_row(0, (q * 5) % L, q == 0, q == 1);
    query_row(1, 3, 1'b0, 1'b0);
    repeat (10) @(posedge clk);
    for (int r = 0; r < NRANK; r++) chk(words_dropped[r] == 0, "no words dropped");
    chk(rows_softmaxed[0] == NQ && rows_softmaxed[1] == 1, "softmax rows");
    chk(rows_summed[0] == NQ + 1 && rows_summed[1] == 1, "sum rows");
    chk(n_batch == NQ + 1, $sformatf("batch_done pulses %0d", n_batch));
    chk(n_agg_rows > 0, "AGG mode used");
    chk(n_pruned > 0, "keys pruned by the mask");
    chk(FULL || n_stall > 0, "output back-pressure");
    chk(n_rank_rows[0] > 0 && n_rank_rows[1] > 0, "both ranks used");
    chk(g_dimm_act() > 2, "row activations (misses) in the banks");
    $display("mechanisms: sum_rows=%0d softmax_rows=%0d agg_rows=%0d pruned=%0d stalls=%0d batch_done=%0d acts(bank0)=%0d cycles=%0d",
             rows_summed[0] + rows_summed[1], rows_softmaxed[0] + rows_softmaxed[1], n_agg_rows,
             n_pruned, n_stall, n_batch, g_dimm_act(), cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int g_dimm_act();
    return int'(act0);
  endfunction

  initial begin
    repeat (FULL ? 3000000 : 400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
