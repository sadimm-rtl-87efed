// sadimm_dimm: one SADIMM load-reduced DIMM with heterogeneous near-memory
// processing. The buffer chip holds one near-rank unit per rank (FP32
// accumulators and a softmax unit); every bank-group of every DRAM chip has a
// near bank-group unit (one FP32 adder) and every bank a near-bank unit (one
// FP32 multiplier). Multiplications run next to the banks, where the sparse
// operands are; reductions run at the bank-group and rank, where the partial
// results meet; softmax runs once per row at the rank.
//
// Host interface: NMP instructions (nmp_inst_t) on inst_valid/inst_ready; an
// instruction goes to the near-rank unit of the rank named in its address,
// which executes or broadcasts it further down. Each rank returns results
// (element index and FP32 value) on its own res_* stream and pulses
// batch_done[r] when an instruction with batch_end completes. The remaining
// outputs count reduced and dropped words and finished rows per rank.
// Sizes: NRANK ranks x NCHIP chips x NBG bank-groups x NBANK banks
// (2 x 8 x 8 x 4 = 512 near-bank units). The DDR PHY and the standard DIMM
// command path are not part of this model.
module sadimm_dimm
  import sadimm_pkg::*;
#(
  parameter int NRANK     = 2,
  parameter int NCHIP     = 8,
  parameter int NBG       = 8,
  parameter int NBANK     = 4,
  parameter int ROWS      = 1024,
  parameter int COLS      = 128,
  parameter int T_RCD     = 16,
  parameter int T_CL      = 16,
  parameter int T_RP      = 16,
  parameter int MAX_L     = 2048,
  parameter int OUT_DEPTH = 8192,
  parameter int QDEPTH    = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inst_valid,
  output logic             inst_ready,
  input  nmp_inst_t        inst,
  output logic [NRANK-1:0] res_valid,
  input  logic [NRANK-1:0] res_ready,
  output logic [IDX_W-1:0] res_idx  [NRANK],
  output logic [31:0]      res_data [NRANK],
  output logic [NRANK-1:0] batch_done,
  output logic [31:0]      words_reduced  [NRANK],
  output logic [31:0]      words_dropped  [NRANK],
  output logic [31:0]      rows_summed    [NRANK],
  output logic [31:0]      rows_softmaxed [NRANK]
);
  localparam int NSRC = NCHIP * NBG;

  logic [NRANK-1:0] r_inst_ready;
  logic [$clog2(NRANK > 1 ? NRANK : 2)-1:0] sel;

  assign sel        = ($bits(sel))'(inst.addr.rank);
  assign inst_ready = r_inst_ready[sel];

  for (genvar r = 0; r < NRANK; r++) begin : g_rank
    logic            bg_inst_valid;
    nmp_inst_t       bg_inst;
    logic [NSRC-1:0] bg_inst_ready, bg_valid, bg_ready, bg_busy;
    red_word_t       bg_word [NSRC];

    rank_nmp #(.NCHIP(NCHIP), .NBG(NBG), .MAX_L(MAX_L), .OUT_DEPTH(OUT_DEPTH),
               .QDEPTH(QDEPTH)) u_rank (
      .clk, .rst_n,
      .inst_valid(inst_valid && int'(sel) == r), .inst_ready(r_inst_ready[r]), .inst,
      .bg_inst_valid, .bg_inst_ready, .bg_inst,
      .bg_valid, .bg_ready, .bg_word, .bg_busy,
      .res_valid(res_valid[r]), .res_ready(res_ready[r]), .res_idx(res_idx[r]),
      .res_data(res_data[r]), .batch_done(batch_done[r]),
      .words_reduced(words_reduced[r]), .words_dropped(words_dropped[r]),
      .rows_summed(rows_summed[r]), .rows_softmaxed(rows_softmaxed[r]));

    for (genvar c = 0; c < NCHIP; c++) begin : g_chip
      for (genvar g = 0; g < NBG; g++) begin : g_bg
        logic        agg_mode;
        logic [31:0] sum_count;
        bg_nmp #(.NBANK(NBANK), .QDEPTH(QDEPTH), .ROWS(ROWS), .COLS(COLS),
                 .T_RCD(T_RCD), .T_CL(T_CL), .T_RP(T_RP),
                 .MY_RANK(r), .MY_CHIP(c), .MY_BG(g)) u_bg (
          .clk, .rst_n,
          .inst_valid(bg_inst_valid), .inst_ready(bg_inst_ready[c*NBG + g]), .inst(bg_inst),
          .out_valid(bg_valid[c*NBG + g]), .out_ready(bg_ready[c*NBG + g]),
          .out(bg_word[c*NBG + g]), .busy(bg_busy[c*NBG + g]),
          .agg_mode, .sum_count);
      end
    end
  end
endmodule
