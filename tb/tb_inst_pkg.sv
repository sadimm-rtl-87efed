// tb_inst_pkg: helpers the testbenches use to build SADIMM NMP instructions.
package tb_inst_pkg;
  import sadimm_pkg::*;

  function automatic nmp_inst_t mk(logic d_mode, nmp_level_e lvl, op_redu_e red, ddr_cmd_e cmd,
                                   int rank, int chip, int bg, int ba, int row, int col,
                                   int rsize, logic [31:0] val, logic tag, logic bend);
    nmp_inst_t i;
    i.d_mode    = d_mode;
    i.nmp_level = lvl;
    i.op_redu   = red;
    i.ddr_cmd   = cmd;
    i.addr      = '{rank: 1'(rank), chip: 3'(chip), bg: 3'(bg), ba: 2'(ba), row: 18'(row), col: 7'(col)};
    i.row_size  = 3'(rsize);
    i.mat_mul   = val;
    i.redu_tag  = tag;
    i.batch_end = bend;
    i.reserved  = '0;
    return i;
  endfunction

  // memory-mode write of one FP32 word into one bank
  function automatic nmp_inst_t wr(int rank, int chip, int bg, int ba, int row, int col, logic [31:0] v);
    return mk(1'b0, LVL_HOST, RED_NONE, CMD_WR, rank, chip, bg, ba, row, col, 0, v, 1'b0, 1'b0);
  endfunction

  // compute-mode instruction run by every bank
  function automatic nmp_inst_t bank_op(ddr_cmd_e cmd, int row, int col, int rsize, logic [31:0] v, logic tag);
    return mk(1'b1, LVL_BANK, RED_NONE, cmd, 0, 0, 0, 0, row, col, rsize, v, tag, 1'b0);
  endfunction
endpackage
