// dram_bank: behavioural model of one DRAM bank as the near-bank PE sees it.
// The real part is the commercial DRAM array of the DIMM; this model is
// synthesizable (a word array plus counters) but stands for an analog array.
//
// It keeps one open row (the row buffer). A request holds req_valid until
// req_ready: RD and WR complete when their row is open; if another row is open
// the model first precharges (T_RP cycles) and then activates (T_RCD cycles).
// ACT completes once its row is open, PRE once the bank is closed. A column
// read returns its word and the caller's req_meta on rd_valid/rd_data/rd_meta
// exactly T_CL cycles after it was accepted, one read per cycle; a write
// updates the array when accepted. act_count counts row activations.
// The timing values come from the DIMM's DDR timing table; refresh, tCCD and
// tFAW are not modelled. Words are FP32, COLS words per row.
module dram_bank
  import sadimm_pkg::*;
#(
  parameter int ROWS   = 1024,
  parameter int COLS   = 128,
  parameter int T_RCD  = 16,
  parameter int T_CL   = 16,
  parameter int T_RP   = 16,
  parameter int META_W = 13
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  output logic                    req_ready,
  input  ddr_cmd_e                req_cmd,
  input  logic [$clog2(ROWS)-1:0] req_row,
  input  logic [$clog2(COLS)-1:0] req_col,
  input  logic [31:0]             req_wdata,
  input  logic [META_W-1:0]       req_meta,
  output logic                    rd_valid,
  output logic [31:0]             rd_data,
  output logic [META_W-1:0]       rd_meta,
  output logic [31:0]             act_count
);
  localparam int RW = $clog2(ROWS);
  localparam int CW = $clog2(COLS);

  typedef enum logic [1:0] {B_CLOSED, B_ACT, B_OPEN, B_PRE} bstate_e;

  logic [31:0]   mem [ROWS*COLS];
  bstate_e       st;
  logic [RW-1:0] open_row, act_row;
  logic [7:0]    cnt;
  logic          row_hit, needs_row;

  logic [T_CL-1:0]   pv;
  logic [31:0]       pd [T_CL];
  logic [META_W-1:0] pm [T_CL];

  assign row_hit   = (st == B_OPEN) && (open_row == req_row);
  assign needs_row = (req_cmd == CMD_RD) || (req_cmd == CMD_WR) || (req_cmd == CMD_ACT);

  always_comb begin
    req_ready = 1'b0;
    if (req_valid) begin
      if (needs_row)             req_ready = row_hit;
      else if (req_cmd == CMD_PRE) req_ready = (st == B_CLOSED);
      else                       req_ready = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= B_CLOSED;
      open_row  <= '0;
      act_row   <= '0;
      cnt       <= '0;
      act_count <= '0;
    end else begin
      case (st)
        B_CLOSED:
          if (req_valid && needs_row) begin
            st        <= B_ACT;
            act_row   <= req_row;
            cnt       <= 8'(T_RCD - 1);
            act_count <= act_count + 1;
          end
        B_ACT:
          if (cnt == 0) begin
            st       <= B_OPEN;
            open_row <= act_row;
          end else cnt <= cnt - 1;
        B_OPEN:
          if (req_valid && ((needs_row && !row_hit) || req_cmd == CMD_PRE)) begin
            st  <= B_PRE;
            cnt <= 8'(T_RP - 1);
          end
        B_PRE:
          if (cnt == 0) st <= B_CLOSED;
          else cnt <= cnt - 1;
      endcase
    end
  end

  // Column accesses and the CAS-latency pipeline.
  always_ff @(posedge clk) begin
    if (req_valid && req_ready && req_cmd == CMD_WR)
      mem[{req_row, req_col}] <= req_wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) pv <= '0;
    else pv <= {pv[T_CL-2:0], req_valid && req_ready && req_cmd == CMD_RD};
    pd[0] <= mem[{req_row, req_col}];
    pm[0] <= req_meta;
    for (int i = 1; i < T_CL; i++) begin
      pd[i] <= pd[i-1];
      pm[i] <= pm[i-1];
    end
  end

  assign rd_valid = pv[T_CL-1];
  assign rd_data  = pd[T_CL-1];
  assign rd_meta  = pm[T_CL-1];

  initial begin
    assert (ROWS == (1 << RW) && COLS == (1 << CW)) else $error("ROWS and COLS must be powers of two");
    assert (T_CL >= 2) else $error("T_CL must be at least 2");
  end
endmodule
