// dram_bank_tb: writes words, reads them back through the CAS-latency pipeline
// and checks data, meta, the read latency (T_CL) and the activate/precharge
// delays of a row miss (T_RP + T_RCD) against the configured timing.
module dram_bank_tb;
  import sadimm_pkg::*;
  localparam int T_RCD = 5, T_CL = 4, T_RP = 3;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, rd_valid;
  ddr_cmd_e cmd;
  logic [3:0] row;
  logic [3:0] col;
  logic [31:0] wdata, rd_data, act_count;
  logic [12:0] meta, rd_meta;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [31:0] ref_mem [16][16];

  dram_bank #(.ROWS(16), .COLS(16), .T_RCD(T_RCD), .T_CL(T_CL), .T_RP(T_RP)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_cmd(cmd), .req_row(row), .req_col(col),
    .req_wdata(wdata), .req_meta(meta), .rd_valid, .rd_data, .rd_meta, .act_count);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0d", what, cyc); end
  endtask

  // issue one request, return the cycles it waited for req_ready
  task automatic issue(ddr_cmd_e c, int r, int k, logic [31:0] d, logic [12:0] m, output int waited);
    int t0;
    @(negedge clk);
    req_valid = 1; cmd = c; row = 4'(r); col = 4'(k); wdata = d; meta = m;
    #1 t0 = cyc;
    while (!req_ready) @(negedge clk);
    waited = cyc - t0;
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  int w, t_issue;
  initial begin
    req_valid = 0; cmd = CMD_NOP; row = 0; col = 0; wdata = 0; meta = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first access opens the row: T_RCD wait
    issue(CMD_WR, 2, 0, 32'h1111_0000, 0, w);
    chk(w == T_RCD + 1, $sformatf("row open latency %0d", w));
    for (int k = 0; k < 16; k++) begin
      ref_mem[2][k] = 32'h1111_0000 + 32'(k);
      issue(CMD_WR, 2, k, ref_mem[2][k], 0, w);
      chk(w == 0, "row hit write waits");
    end
    // row miss: precharge then activate
    issue(CMD_WR, 5, 3, 32'h5555_0003, 0, w);
    ref_mem[5][3] = 32'h5555_0003;
    chk(w == T_RP + T_RCD + 2, $sformatf("row miss latency %0d", w));
    chk(act_count == 2, "act_count");
    // reads of row 2 (miss), then check latency of a hit read
    issue(CMD_RD, 2, 7, 0, 13'h77, w);
    chk(w == T_RP + T_RCD + 2, "read row miss");
    t_issue = cyc;
    while (!rd_valid) @(posedge clk);
    #1;
    chk(cyc - t_issue == T_CL, $sformatf("CAS latency %0d", cyc - t_issue));
    chk(rd_data == ref_mem[2][7] && rd_meta == 13'h77, "read data/meta");
    // back-to-back reads stream one per cycle
    fork
      begin
        for (int k = 0; k < 16; k++) begin
          @(negedge clk);
          req_valid = 1; cmd = CMD_RD; row = 2; col = 4'(k); meta = 13'(k);
          @(posedge clk);
          chk(req_ready, "streaming read accepted");
        end
        @(negedge clk) req_valid = 0;
      end
      begin
        int k = 0;
        while (k < 16) begin
          @(negedge clk);
          if (rd_valid) begin
            chk(rd_data == ref_mem[2][rd_meta[3:0]] && rd_meta == 13'(k), "stream data");
            k++;
          end
        end
      end
    join
    // explicit precharge closes the bank
    issue(CMD_PRE, 0, 0, 0, 0, w);
    chk(w == T_RP + 1, $sformatf("PRE latency %0d", w));
    issue(CMD_RD, 5, 3, 0, 13'h5, w);
    repeat (T_CL - 1) @(posedge clk);
    #1 chk(rd_valid && rd_data == 32'h5555_0003, "read after reopen");
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
