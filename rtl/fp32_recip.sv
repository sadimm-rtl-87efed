// fp32_recip: sequential FP32 reciprocal used once per row by the softmax unit
// to turn the sum of exponentials into a multiplier.
//
// start with x (a positive normal number) begins a restoring division of 1.0
// by the 24-bit significand of x, one quotient bit per cycle; after 25 cycles
// done pulses for one cycle and y shows 1/x until the next start with the quotient truncated (error
// below one unit in the last place). Zero gives +inf; results below the normal
// range give 0. This divider is this design's own choice: the softmax unit's
// divider is not described further than the softmax formula.
module fp32_recip (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] x,
  output logic        busy,
  output logic        done,
  output logic [31:0] y
);
  logic [24:0] rem, div;
  logic [24:0] q;
  logic [4:0]  n;
  logic [7:0]  ex;
  logic        is_zero;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      n    <= '0;
      rem  <= '0;
      div  <= '0;
      q    <= '0;
      ex   <= '0;
      is_zero <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        ex      <= x[30:23];
        is_zero <= (x[30:23] == 8'd0);
        div     <= {2'b01, x[22:0]};
        rem     <= 25'h080_0000;          // 1.0 in the same scale
        q       <= '0;
        n       <= 5'd0;
      end else if (busy) begin
        if (rem >= div) begin
          q   <= {q[23:0], 1'b1};
          rem <= (rem - div) << 1;
        end else begin
          q   <= {q[23:0], 1'b0};
          rem <= rem << 1;
        end
        n <= n + 5'd1;
        if (n == 5'd24) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // Result assembled from the finished quotient (valid when done is high).
  logic [24:0] qf;
  logic [8:0]  e1, e2;
  always_comb begin
    qf = q;
    e1 = 9'd254 - 9'(ex);   // 1/x when the significand is exactly 1.0
    e2 = 9'd253 - 9'(ex);
  end

  always_comb begin
    if (is_zero)            y = 32'h7f80_0000;
    else if (qf[24])        y = (e1 == 9'd0 || e1[8]) ? 32'd0 : {1'b0, e1[7:0], 23'd0};
    else if (e2 == 9'd0 || e2[8]) y = 32'd0;
    else                    y = {1'b0, e2[7:0], qf[22:0]};
  end
endmodule
