// sadimm_pkg: types and constants shared by every level of the SADIMM
// near-memory-processing (NMP) hierarchy.
//
// The 82-bit NMP instruction is laid out MSB first exactly as its fields are
// listed: D_mode(1) nmp_level(2) op_redu(3) ddr_cmd(3) addr(34) row_size(3)
// mat_mul(32) redu_tag(1) batch_end(1) reserved(2). The field widths and the
// two level codes 01 (near-rank) and 10 (near bank-group) follow the SADIMM
// instruction format; the remaining encodings (command, reduction and level
// codes) and the address layout are this design's choices.
//
// red_word_t is the word that travels up the reduction tree (bank -> bank-group
// -> rank): an FP32 value, the element index it belongs to, and the reduction
// tag of the instruction that produced it.
package sadimm_pkg;

  localparam int INST_W = 82;
  localparam int ADDR_W = 34;
  localparam int IDX_W  = 11;     // element index: up to 2048 tokens per row

  typedef enum logic [1:0] {
    LVL_HOST = 2'b00,
    LVL_RANK = 2'b01,
    LVL_BG   = 2'b10,
    LVL_BANK = 2'b11
  } nmp_level_e;

  typedef enum logic [2:0] {
    CMD_NOP   = 3'b000,
    CMD_ACT   = 3'b001,
    CMD_RD    = 3'b010,   // read 2**row_size words, multiply by operand, send up
    CMD_PRE   = 3'b011,
    CMD_WR    = 3'b100,   // write mat_mul into one addressed bank (memory mode)
    CMD_LDOP  = 3'b101,   // operand register <- bank word at (row, col)
    CMD_LDOPI = 3'b110    // operand register <- mat_mul
  } ddr_cmd_e;

  typedef enum logic [2:0] {
    RED_NONE    = 3'b000,
    RED_SUM     = 3'b001,  // bank-group: sum banks / rank: output reduced row
    RED_AGG     = 3'b010,  // bank-group: forward bank words without summing
    RED_SOFTMAX = 3'b011   // rank: reduced row through the softmax unit
  } op_redu_e;

  typedef struct packed {
    logic       rank;
    logic [2:0] chip;
    logic [2:0] bg;
    logic [1:0] ba;
    logic [17:0] row;
    logic [6:0] col;
  } addr_t;

  typedef struct packed {
    logic       d_mode;     // 1: NMP (compute) mode, 0: memory mode
    nmp_level_e nmp_level;
    op_redu_e   op_redu;
    ddr_cmd_e   ddr_cmd;
    addr_t      addr;
    logic [2:0] row_size;   // vector length = 2**row_size words
    logic [31:0] mat_mul;   // FP32 operand / write data
    logic       redu_tag;
    logic       batch_end;
    logic [1:0] reserved;
  } nmp_inst_t;

  typedef struct packed {
    logic             tag;
    logic [IDX_W-1:0] idx;
    logic [31:0]      data;
  } red_word_t;

  localparam logic [31:0] FP_ONE  = 32'h3f80_0000;
  localparam logic [31:0] FP_ZERO = 32'h0000_0000;

endpackage
