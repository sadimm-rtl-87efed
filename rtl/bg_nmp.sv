// bg_nmp: near bank-group NMP unit with its NBANK near-bank units. It reduces
// the per-dimension partial products of its banks (cross-dimension
// accumulation of SDDMM and SpMM) with a single FP32 adder and passes the
// partial sums to the near-rank unit.
//
// Instructions from the rank enter the bank-group queue. A compute-mode
// instruction of level LVL_BG is executed here: op_redu = RED_SUM makes the
// unit add the NBANK words of each element, RED_AGG makes it forward every
// bank word unsummed (vector aggregation, the rank then does the reduction);
// it waits until everything below is idle so the mode never changes under
// data in flight. Every other instruction is broadcast to all banks, which
// accept it together (C/A broadcast).
// The input buffer holds one word per bank (NBANK x 4 B = 16 B). In SUM mode,
// once all NBANK slots hold a word (same element index and tag from the same
// broadcast RD), the adder forms the sum in NBANK-1 cycles and the result
// enters the 8-word (32 B) output buffer; in AGG mode slots drain one per cycle
// in bank order. busy covers the queue, the banks and both buffers.
// Buffer sizes, the adder count and the queue routing by nmp_level follow the
// bank-group design; the sequential use of the adder and the AGG mode's
// meaning are this design's choices.
module bg_nmp
  import sadimm_pkg::*;
#(
  parameter int NBANK     = 4,
  parameter int OUT_WORDS = 8,
  parameter int QDEPTH    = 8,
  parameter int ROWS      = 1024,
  parameter int COLS      = 128,
  parameter int T_RCD     = 16,
  parameter int T_CL      = 16,
  parameter int T_RP      = 16,
  parameter int MY_RANK   = 0,
  parameter int MY_CHIP   = 0,
  parameter int MY_BG     = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      inst_valid,
  output logic      inst_ready,
  input  nmp_inst_t inst,
  output logic      out_valid,
  input  logic      out_ready,
  output red_word_t out,
  output logic      busy,
  output logic      agg_mode,
  output logic [31:0] sum_count
);
  // ---------------- instruction queue and routing ----------------
  nmp_inst_t q_head;
  logic      q_full, q_empty, q_pop;
  logic [$clog2(QDEPTH+1)-1:0] q_count;
  logic [NBANK-1:0] b_inst_ready, b_busy, b_out_valid, b_out_ready;
  red_word_t        b_out [NBANK];
  logic [31:0]      b_act [NBANK];
  logic             own, all_ready, below_idle;

  inst_fifo #(.W($bits(nmp_inst_t)), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n,
    .push(inst_valid && !q_full), .push_data(inst), .full(q_full),
    .pop(q_pop), .pop_data(q_head), .empty(q_empty), .count(q_count));
  assign inst_ready = !q_full;

  assign own       = q_head.d_mode && (q_head.nmp_level == LVL_BG);
  assign all_ready = &b_inst_ready;

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    bank_nmp #(.ROWS(ROWS), .COLS(COLS), .T_RCD(T_RCD), .T_CL(T_CL), .T_RP(T_RP),
               .QDEPTH(QDEPTH), .MY_RANK(MY_RANK), .MY_CHIP(MY_CHIP), .MY_BG(MY_BG),
               .MY_BA(b)) u_bank (
      .clk, .rst_n,
      .inst_valid(!q_empty && !own && all_ready), .inst_ready(b_inst_ready[b]), .inst(q_head),
      .out_valid(b_out_valid[b]), .out_ready(b_out_ready[b]), .out(b_out[b]),
      .busy(b_busy[b]), .act_count(b_act[b]));
  end

  // ---------------- input buffer, adder, output buffer ----------------
  logic [NBANK-1:0] slot_v;
  red_word_t        slot [NBANK];
  logic [$clog2(NBANK+1)-1:0] k;     // next slot to add
  logic [31:0]      acc, add_y, add_a;
  logic             o_full, o_empty, o_push;
  red_word_t        o_in;
  logic [$clog2(OUT_WORDS+1)-1:0] o_count;
  logic [$clog2(NBANK)-1:0] agg_sel;
  logic             agg_any;

  assign below_idle = !(|b_busy) && !(|slot_v) && o_empty;

  always_comb begin
    q_pop = 1'b0;
    if (!q_empty) begin
      if (own) q_pop = below_idle;
      else     q_pop = all_ready;
    end
  end

  assign add_a = (k == 1) ? slot[0].data : acc;
  fp32_add u_add (.a(add_a), .b(slot[k[$clog2(NBANK)-1:0]].data), .y(add_y));

  always_comb begin
    agg_any = |slot_v;
    agg_sel = '0;
    for (int b = NBANK - 1; b >= 0; b--)
      if (slot_v[b]) agg_sel = b[$clog2(NBANK)-1:0];
  end

  always_comb begin
    o_push = 1'b0;
    o_in   = slot[0];
    if (!agg_mode) begin
      if ((&slot_v) && (int'(k) == NBANK - 1) && !o_full) begin
        o_push  = 1'b1;
        o_in    = slot[0];
        o_in.data = add_y;
      end
    end else if (agg_any && !o_full) begin
      o_push = 1'b1;
      o_in   = slot[agg_sel];
    end
  end

  for (genvar b = 0; b < NBANK; b++) begin : g_rdy
    assign b_out_ready[b] = !slot_v[b];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot_v    <= '0;
      k         <= ($clog2(NBANK+1))'(1);
      acc       <= '0;
      agg_mode  <= 1'b0;
      sum_count <= '0;
    end else begin
      for (int b = 0; b < NBANK; b++)
        if (b_out_valid[b] && b_out_ready[b]) begin
          slot_v[b] <= 1'b1;
          slot[b]   <= b_out[b];
        end
      if (!agg_mode) begin
        if (&slot_v) begin
          if (int'(k) < NBANK - 1) begin
            acc <= add_y;
            k   <= k + 1'b1;
          end else if (o_push) begin
            slot_v    <= '0;
            k         <= ($clog2(NBANK+1))'(1);
            sum_count <= sum_count + 1;
          end
        end
      end else if (o_push)
        slot_v[agg_sel] <= 1'b0;
      if (!q_empty && own && q_pop)
        agg_mode <= (q_head.op_redu == RED_AGG);
    end
  end

  inst_fifo #(.W($bits(red_word_t)), .DEPTH(OUT_WORDS)) u_out (
    .clk, .rst_n,
    .push(o_push), .push_data(o_in), .full(o_full),
    .pop(out_valid && out_ready), .pop_data(out), .empty(o_empty), .count(o_count));
  assign out_valid = !o_empty;

  assign busy = !q_empty || !below_idle;

  // All banks of a summed element must carry the same index and tag.
  for (genvar b = 1; b < NBANK; b++) begin : g_chk
    a_same_elem: assert property (@(posedge clk) disable iff (!rst_n)
      (!agg_mode && (&slot_v)) |-> (slot[b].idx == slot[0].idx && slot[b].tag == slot[0].tag));
  end
endmodule
