// inst_fifo: synchronous first-in first-out queue. It is the instruction queue
// of every NMP level (rank, bank-group, bank) and also serves as the small data
// buffers between levels.
//
// Interface: push/push_data are written when !full; pop_data shows the oldest
// entry (first-word fall-through) and is removed by pop when !empty. count is
// the fill level. Push and pop may happen in the same cycle. Synchronous
// active-low reset empties the queue. The queue depth is a parameter; the
// design does not give it.
module inst_fifo #(
  parameter int W     = 82,
  parameter int DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               push_data,
  output logic                       full,
  input  logic                       pop,
  output logic [W-1:0]               pop_data,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign full     = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty    = (count == '0);
  assign pop_data = mem[rp];
  assign do_push  = push && !full;
  assign do_pop   = pop && !empty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) begin
        mem[wp] <= push_data;
        wp      <= (wp == AW'(DEPTH - 1)) ? '0 : wp + AW'(1);
      end
      if (do_pop)
        rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + AW'(1);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // A push into a full queue or a pop from an empty one is a protocol error.
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) push |-> !full;
  endproperty
  property p_no_underflow;
    @(posedge clk) disable iff (!rst_n) pop |-> !empty;
  endproperty
  a_no_overflow:  assert property (p_no_overflow);
  a_no_underflow: assert property (p_no_underflow);
endmodule
