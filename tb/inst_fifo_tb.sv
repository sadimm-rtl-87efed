// inst_fifo_tb: random push/pop traffic against a queue model; checks order,
// full/empty flags and the fill count, including simultaneous push and pop.
module inst_fifo_tb;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [15:0] din, dout;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model[$];

  inst_fifo #(.W(16), .DEPTH(8)) dut (.clk, .rst_n, .push, .push_data(din), .full,
                                      .pop, .pop_data(dout), .empty, .count);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      chk(count == 4'(model.size()), "count");
      chk(full == (model.size() == 8), "full");
      chk(empty == (model.size() == 0), "empty");
      if (!empty) chk(dout == model[0], "data");
      push = ($urandom % 100) < ((c / 500) % 2 ? 70 : 35) && !full;
      pop  = ($urandom % 100) < 50 && !empty;
      din  = 16'($urandom);
      @(posedge clk);
      if (push) model.push_back(din);
      if (pop) void'(model.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
