// rank_nmp: near-rank NMP unit in the DIMM buffer chip, one per rank. It
// receives the rank's NMP instructions, broadcasts those meant for lower
// levels to every bank-group of the rank, reduces the bank-groups' partial
// sums into complete rows (e.g. one row of the attention scores S), applies
// the row-wise softmax, and returns results to the host.
//
// Instruction path: the queue's head is either forwarded to all NSRC = NCHIP x
// NBG bank-groups at once (bg_inst_valid until every bg_inst_ready is high),
// or, if it is a compute-mode LVL_RANK instruction, executed here:
//   RED_SUM      wait until all units below are idle, then emit each reduced
//                element (idx, value) of the row into the output buffer;
//   RED_SOFTMAX  same, but the row passes through the softmax unit first.
// batch_end on an executed instruction pulses batch_done when it completes.
// Reduction: the sources are split in two halves (chips 0..NCHIP/2-1 and the
// rest); each half has a round-robin arbiter and its own FP32 accumulator
// into its own half of the input buffer (2 x MAX_L words = 16 KB), with a
// valid bit per element, so two words can be reduced per cycle. A word whose
// redu_tag differs from the tag of the last forwarded instruction is dropped
// and counted. When a row is finalised, adder 0 merges the two halves while
// the row is scanned up to the highest index received; elements that never
// received a word (pruned by the sparse mask) are skipped.
// After reset the valid bits are cleared in MAX_L cycles (no instruction is
// taken meanwhile), which keeps them in a plain memory.
// Output: the output buffer (OUT_DEPTH = 8192 words = 32 KB) drains through
// res_valid/res_ready as (res_idx, res_data).
// The two adders, softmax unit, buffer sizes and the nmp_level routing follow
// the near-rank design; the arbitration, completion barrier and tag rule are
// this design's choices.
module rank_nmp
  import sadimm_pkg::*;
#(
  parameter int NCHIP     = 8,
  parameter int NBG       = 8,
  parameter int MAX_L     = 2048,
  parameter int OUT_DEPTH = 8192,
  parameter int QDEPTH    = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // instructions from the host side
  input  logic             inst_valid,
  output logic             inst_ready,
  input  nmp_inst_t        inst,
  // broadcast to the bank-groups
  output logic             bg_inst_valid,
  input  logic [NCHIP*NBG-1:0] bg_inst_ready,
  output nmp_inst_t        bg_inst,
  // partial sums from the bank-groups
  input  logic [NCHIP*NBG-1:0] bg_valid,
  output logic [NCHIP*NBG-1:0] bg_ready,
  input  red_word_t        bg_word [NCHIP*NBG],
  input  logic [NCHIP*NBG-1:0] bg_busy,
  // results to the host
  output logic             res_valid,
  input  logic             res_ready,
  output logic [IDX_W-1:0] res_idx,
  output logic [31:0]      res_data,
  output logic             batch_done,
  // event counters
  output logic [31:0]      words_reduced,
  output logic [31:0]      words_dropped,
  output logic [31:0]      rows_summed,
  output logic [31:0]      rows_softmaxed
);
  localparam int NSRC = NCHIP * NBG;
  localparam int HALF = NSRC / 2;
  localparam int SW   = $clog2(HALF);
  localparam int AW   = $clog2(MAX_L);

  // ---------------- instruction queue ----------------
  nmp_inst_t q_head;
  logic      q_full, q_empty, q_pop;
  logic [$clog2(QDEPTH+1)-1:0] q_count;

  inst_fifo #(.W($bits(nmp_inst_t)), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n,
    .push(inst_valid && !q_full), .push_data(inst), .full(q_full),
    .pop(q_pop), .pop_data(q_head), .empty(q_empty), .count(q_count));
  assign inst_ready = !q_full;

  logic own;
  assign own     = q_head.d_mode && (q_head.nmp_level == LVL_RANK);
  assign bg_inst = q_head;

  typedef enum logic [2:0] {R_CLEAR, R_DISPATCH, R_BARRIER, R_SCAN, R_DRAIN} rstate_e;
  rstate_e st;

  // ---------------- input buffer: two accumulating halves ----------------
  logic [31:0]      acc [2][MAX_L];
  logic             vld [2][MAX_L];   // element received since the last scan
  logic             cur_tag;
  logic [AW-1:0]    max_idx;
  logic             any_valid;

  logic [HALF-1:0] req [2];
  logic [SW-1:0]   ptr [2], gsel [2];
  logic            gnt [2];
  red_word_t       w [2];
  logic [31:0]     add_a [2], add_b [2], add_y [2];
  logic [AW-1:0]   widx [2];

  for (genvar h = 0; h < 2; h++) begin : g_half
    assign req[h] = bg_valid[h*HALF +: HALF];

    // round-robin: first requester at or after ptr
    always_comb begin
      gnt[h]  = 1'b0;
      gsel[h] = '0;
      for (int k = 0; k < HALF; k++) begin
        logic [SW-1:0] s;
        s = SW'(int'(ptr[h]) + k);
        if (!gnt[h] && req[h][s]) begin
          gnt[h]  = 1'b1;
          gsel[h] = s;
        end
      end
      if (st != R_DISPATCH && st != R_BARRIER) gnt[h] = 1'b0;
    end

    for (genvar s = 0; s < HALF; s++) begin : g_rdy
      assign bg_ready[h*HALF + s] = gnt[h] && (gsel[h] == SW'(s));
    end

    assign w[h]    = bg_word[h*HALF + int'(gsel[h])];
    assign widx[h] = w[h].idx[AW-1:0];
    fp32_add u_acc (.a(add_a[h]), .b(add_b[h]), .y(add_y[h]));
  end

  // ---------------- finalisation scan ----------------
  logic [AW:0]   si;              // scan index
  logic          s_v0, s_v1, s_any, s_last, emit;
  logic [31:0]   s_val;
  logic          sm_in_ready, sm_out_valid, sm_out_ready, sm_out_last;
  logic [IDX_W-1:0] sm_out_idx;
  logic [31:0]   sm_out_data, sm_rows;
  logic          is_softmax;

  assign is_softmax = (q_head.op_redu == RED_SOFTMAX);
  assign s_v0   = vld[0][si[AW-1:0]];
  assign s_v1   = vld[1][si[AW-1:0]];
  assign s_any  = s_v0 || s_v1;
  assign s_last = (si[AW-1:0] == max_idx);

  always_comb begin
    // adder 0 accumulates half 0, or merges the halves during the scan
    if (st == R_SCAN) begin
      add_a[0] = acc[0][si[AW-1:0]];
      add_b[0] = acc[1][si[AW-1:0]];
    end else begin
      add_a[0] = acc[0][widx[0]];
      add_b[0] = w[0].data;
    end
    add_a[1] = acc[1][widx[1]];
    add_b[1] = w[1].data;
    s_val    = (s_v0 && s_v1) ? add_y[0] : (s_v0 ? acc[0][si[AW-1:0]] : acc[1][si[AW-1:0]]);
  end

  // output buffer
  logic             o_push, o_full, o_empty;
  logic [IDX_W+31:0] o_in, o_out;
  logic [$clog2(OUT_DEPTH+1)-1:0] o_count;

  assign emit = (st == R_SCAN) && s_any && (is_softmax ? sm_in_ready : !o_full);

  softmax_unit #(.MAX_L(MAX_L)) u_softmax (
    .clk, .rst_n,
    .in_valid(st == R_SCAN && s_any && is_softmax), .in_ready(sm_in_ready),
    .in_idx(IDX_W'(si[AW-1:0])), .in_data(s_val), .in_last(s_last),
    .out_valid(sm_out_valid), .out_ready(sm_out_ready), .out_idx(sm_out_idx),
    .out_data(sm_out_data), .out_last(sm_out_last), .rows_done(sm_rows));

  assign sm_out_ready = !o_full;
  always_comb begin
    o_push = 1'b0;
    o_in   = {IDX_W'(si[AW-1:0]), s_val};
    if (sm_out_valid && !o_full) begin
      o_push = 1'b1;
      o_in   = {sm_out_idx, sm_out_data};
    end else if (emit && !is_softmax) begin
      o_push = 1'b1;
    end
  end

  inst_fifo #(.W(IDX_W + 32), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n,
    .push(o_push), .push_data(o_in), .full(o_full),
    .pop(res_valid && res_ready), .pop_data(o_out), .empty(o_empty), .count(o_count));
  assign res_valid = !o_empty;
  assign res_idx   = o_out[IDX_W+31:32];
  assign res_data  = o_out[31:0];

  // ---------------- control ----------------
  logic below_idle, own_nop;
  logic [1:0] acpt;
  logic [AW-1:0] max_nx;
  logic any_nx;

  // a rank-level instruction with nothing to reduce completes at once
  assign own_nop = !q_empty && st == R_DISPATCH && own &&
                   !(q_head.op_redu == RED_SUM || q_head.op_redu == RED_SOFTMAX);

  always_comb begin
    max_nx = max_idx;
    any_nx = any_valid;
    for (int h = 0; h < 2; h++) begin
      acpt[h] = gnt[h] && (w[h].tag == cur_tag);
      if (acpt[h] && (!any_nx || widx[h] > max_nx)) max_nx = widx[h];
      if (acpt[h]) any_nx = 1'b1;
    end
  end
  assign below_idle    = !(|bg_busy) && !(|bg_valid);
  assign bg_inst_valid = (st == R_DISPATCH) && !q_empty && !own && (&bg_inst_ready);

  always_comb begin
    q_pop = 1'b0;
    if (!q_empty && st == R_DISPATCH && !own) q_pop = &bg_inst_ready;
    if (own_nop) q_pop = 1'b1;
    if (!q_empty && st == R_SCAN && !any_valid) q_pop = 1'b1;
    if (!q_empty && st == R_SCAN && emit && s_last && !is_softmax) q_pop = 1'b1;
    if (!q_empty && st == R_DRAIN && sm_out_valid && !o_full && sm_out_last) q_pop = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st             <= R_CLEAR;
      cur_tag        <= 1'b0;
      max_idx        <= '0;
      any_valid      <= 1'b0;
      si             <= '0;
      ptr[0]         <= '0;
      ptr[1]         <= '0;
      batch_done     <= 1'b0;
      words_reduced  <= '0;
      words_dropped  <= '0;
      rows_summed    <= '0;
      rows_softmaxed <= '0;
    end else begin
      batch_done <= 1'b0;
      // accumulate granted words
      for (int h = 0; h < 2; h++) begin
        if (gnt[h]) begin
          ptr[h] <= gsel[h] + 1'b1;
          if (acpt[h]) begin
            acc[h][widx[h]] <= vld[h][widx[h]] ? add_y[h] : w[h].data;
            vld[h][widx[h]] <= 1'b1;
          end
        end
      end
      max_idx       <= max_nx;
      any_valid     <= any_nx;
      words_reduced <= words_reduced + 32'(acpt[0]) + 32'(acpt[1]);
      words_dropped <= words_dropped + 32'(gnt[0] && !acpt[0]) + 32'(gnt[1] && !acpt[1]);

      case (st)
        R_CLEAR: begin
          // after reset, clear the valid bits one element per cycle
          vld[0][si[AW-1:0]] <= 1'b0;
          vld[1][si[AW-1:0]] <= 1'b0;
          si <= si + 1'b1;
          if (si == (AW+1)'(MAX_L - 1)) st <= R_DISPATCH;
        end
        R_DISPATCH:
          if (!q_empty) begin
            if (!own) begin
              if (&bg_inst_ready) cur_tag <= q_head.redu_tag;
            end else if (q_head.op_redu == RED_SUM || q_head.op_redu == RED_SOFTMAX)
              st <= R_BARRIER;
            else begin
              // other rank-level operations only mark batch boundaries
              if (q_head.batch_end) batch_done <= 1'b1;
            end
          end
        R_BARRIER:
          if (below_idle && !gnt[0] && !gnt[1]) begin
            st <= R_SCAN;
            si <= '0;
          end
        R_SCAN:
          if (!any_valid) begin
            st <= R_DISPATCH;
            if (q_head.batch_end) batch_done <= 1'b1;
          end else if (!s_any || emit) begin
            vld[0][si[AW-1:0]] <= 1'b0;
            vld[1][si[AW-1:0]] <= 1'b0;
            if (s_last) begin
              any_valid <= 1'b0;
              max_idx   <= '0;
              if (is_softmax) st <= R_DRAIN;
              else begin
                st <= R_DISPATCH;
                rows_summed <= rows_summed + 1;
                if (q_head.batch_end) batch_done <= 1'b1;
              end
            end else si <= si + 1'b1;
          end
        R_DRAIN:
          if (sm_out_valid && !o_full && sm_out_last) begin
            st <= R_DISPATCH;
            rows_softmaxed <= rows_softmaxed + 1;
            if (q_head.batch_end) batch_done <= 1'b1;
          end
        default: st <= R_DISPATCH;
      endcase
    end
  end

  initial assert (NSRC % 2 == 0 && HALF == (1 << SW)) else $error("NCHIP*NBG/2 must be a power of two");
endmodule
