// bank_nmp: near-bank NMP unit - one DRAM bank with its instruction queue,
// instruction decoder and FP32 multiplier. It does the multiplications of the
// sparse matrix products (SDDMM Q x K^T and SpMM S x V) on the dimension or
// token shard stored in its own bank, so all its data accesses are local.
//
// Instructions arrive from the bank-group on inst_valid/inst_ready into the
// queue. The decoder executes, in order, compute-mode (d_mode=1) instructions
// of level LVL_BANK, which every bank runs on its own data:
//   ACT/PRE  open/close a row;
//   LDOPI    operand register <- mat_mul field (waits for reads in flight);
//   LDOP     operand register <- word (row, col) of this bank;
//   RD       reads 2**row_size words from (row, col) on, wrapping in the row,
//            one per cycle, and sends operand * word up as a red_word_t with
//            idx = (row*COLS + col + j) mod 2**IDX_W and the instruction's
//            redu_tag.
// A memory-mode (d_mode=0) WR whose address names this bank (MY_RANK, MY_CHIP,
// MY_BG, MY_BA) writes mat_mul into the bank; all other instructions are
// dropped. Reads return T_CL cycles after issue; a read is only issued when
// the 32-entry output buffer is guaranteed room, so back-pressure from the
// bank-group stalls the bank instead of losing data. busy is high while the
// queue, the read pipeline or the output buffer hold work.
// The multiplier and queue follow the near-bank design; the operand register,
// the command set beyond ACT/RD/PRE and the index rule are this design's.
module bank_nmp
  import sadimm_pkg::*;
#(
  parameter int ROWS    = 1024,
  parameter int COLS    = 128,
  parameter int T_RCD   = 16,
  parameter int T_CL    = 16,
  parameter int T_RP    = 16,
  parameter int QDEPTH  = 8,
  parameter int MY_RANK = 0,
  parameter int MY_CHIP = 0,
  parameter int MY_BG   = 0,
  parameter int MY_BA   = 0
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
  output logic [31:0] act_count
);
  localparam int RW     = $clog2(ROWS);
  localparam int CW     = $clog2(COLS);
  localparam int ODEPTH = 32;
  localparam int META_W = 2 + IDX_W;       // {is_operand, tag, idx}
  localparam int CNTW   = $clog2(ODEPTH + 1);

  // ---------------- instruction queue ----------------
  nmp_inst_t q_head;
  logic      q_full, q_empty, q_pop;
  logic [$clog2(QDEPTH+1)-1:0] q_count;

  inst_fifo #(.W($bits(nmp_inst_t)), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n,
    .push(inst_valid && !q_full), .push_data(inst), .full(q_full),
    .pop(q_pop), .pop_data(q_head), .empty(q_empty), .count(q_count));
  assign inst_ready = !q_full;

  // ---------------- bank ----------------
  logic              b_valid, b_ready;
  ddr_cmd_e          b_cmd;
  logic [31:0]       b_wdata;
  logic [META_W-1:0] b_meta;
  logic [CW-1:0]     b_col;
  logic              rd_valid;
  logic [31:0]       rd_data;
  logic [META_W-1:0] rd_meta;

  dram_bank #(.ROWS(ROWS), .COLS(COLS), .T_RCD(T_RCD), .T_CL(T_CL), .T_RP(T_RP),
              .META_W(META_W)) u_bank (
    .clk, .rst_n,
    .req_valid(b_valid), .req_ready(b_ready), .req_cmd(b_cmd),
    .req_row(q_head.addr.row[RW-1:0]), .req_col(b_col), .req_wdata(b_wdata),
    .req_meta(b_meta), .rd_valid, .rd_data, .rd_meta, .act_count);

  // ---------------- decoder ----------------
  logic [31:0]   operand;
  logic [7:0]    j;            // word of the current RD
  logic [7:0]    n_words;
  logic [CNTW-1:0] inflight;   // reads issued, data not yet returned
  logic [CNTW-1:0] o_count;
  logic          o_full, o_empty, o_push;
  red_word_t     o_in;
  logic          is_mine_wr, is_bank_op, room;
  logic [31:0]   lin_idx;
  logic [31:0]   prod;

  assign n_words    = 8'd1 << q_head.row_size;
  assign is_bank_op = q_head.d_mode && (q_head.nmp_level == LVL_BANK);
  assign is_mine_wr = !q_head.d_mode && (q_head.ddr_cmd == CMD_WR) &&
                      (int'(q_head.addr.rank) == MY_RANK) && (int'(q_head.addr.chip) == MY_CHIP) &&
                      (int'(q_head.addr.bg) == MY_BG) && (int'(q_head.addr.ba) == MY_BA);
  assign room       = (32'(o_count) + 32'(inflight)) < ODEPTH;
  assign b_col      = CW'(q_head.addr.col) + CW'(j);
  assign lin_idx    = 32'(q_head.addr.row[RW-1:0]) * COLS + 32'(b_col);
  assign b_wdata    = q_head.mat_mul;

  always_comb begin
    b_valid = 1'b0;
    b_cmd   = CMD_NOP;
    b_meta  = {1'b0, q_head.redu_tag, lin_idx[IDX_W-1:0]};
    q_pop   = 1'b0;
    if (!q_empty) begin
      if (is_mine_wr) begin
        b_valid = 1'b1; b_cmd = CMD_WR;
        q_pop   = b_ready;
      end else if (is_bank_op) begin
        case (q_head.ddr_cmd)
          CMD_ACT, CMD_PRE: begin
            b_valid = 1'b1; b_cmd = q_head.ddr_cmd;
            q_pop   = b_ready;
          end
          CMD_RD: begin
            b_valid = room; b_cmd = CMD_RD;
            q_pop   = room && b_ready && (j == n_words - 8'd1);
          end
          CMD_LDOP: begin
            b_valid = room; b_cmd = CMD_RD;
            b_meta  = {1'b1, q_head.redu_tag, lin_idx[IDX_W-1:0]};
            q_pop   = room && b_ready;
          end
          CMD_LDOPI: q_pop = (inflight == '0);
          default:   q_pop = 1'b1;
        endcase
      end else
        q_pop = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      j        <= '0;
      operand  <= FP_ONE;
      inflight <= '0;
    end else begin
      if (!q_empty && is_bank_op && q_head.ddr_cmd == CMD_RD && b_valid && b_ready)
        j <= q_pop ? 8'd0 : j + 8'd1;
      if (!q_empty && is_bank_op && q_head.ddr_cmd == CMD_LDOPI && q_pop)
        operand <= q_head.mat_mul;
      else if (rd_valid && rd_meta[META_W-1])
        operand <= rd_data;
      inflight <= inflight + CNTW'(b_valid && b_ready && b_cmd == CMD_RD) - CNTW'(rd_valid);
    end
  end

  // ---------------- multiplier and output buffer ----------------
  fp32_mul u_mul (.a(rd_data), .b(operand), .y(prod));

  assign o_push = rd_valid && !rd_meta[META_W-1];
  assign o_in   = '{tag: rd_meta[IDX_W], idx: rd_meta[IDX_W-1:0], data: prod};

  inst_fifo #(.W($bits(red_word_t)), .DEPTH(ODEPTH)) u_out (
    .clk, .rst_n,
    .push(o_push), .push_data(o_in), .full(o_full),
    .pop(out_valid && out_ready), .pop_data(out), .empty(o_empty), .count(o_count));
  assign out_valid = !o_empty;

  assign busy = !q_empty || (inflight != '0) || !o_empty;

  a_out_room: assert property (@(posedge clk) disable iff (!rst_n) o_push |-> !o_full);
endmodule
