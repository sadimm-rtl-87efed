// softmax_unit: row-wise softmax of the near-rank PE,
//   p_i = exp(s_i - s_max) / sum_j exp(s_j - s_max),
// over the elements of one attention-score row that survived the sparse mask.
//
// LOAD  in_valid/in_idx/in_data/in_last deliver the row, one element per cycle
//       (in_ready is high only in this phase); values and indices go into a
//       MAX_L-entry row buffer while the running maximum is kept.
// EXP   one element per cycle: d = s_max - s_i (FP32 adder), d is converted to
//       unsigned fixed point with 4 integer and 8 fraction bits (rounded,
//       saturating: d >= 16 gives 0), and exp(-d) = EXP_HI[d[11:6]] *
//       EXP_LO[d[5:0]] - the exponential table is split into an upper and a
//       lower half, each of 64 FP32 entries (EXP_HI[j] = exp(-j/4), EXP_LO[j] =
//       exp(-j/256)). The product overwrites s_i and a second adder sums it.
// RECIP 1/sum with the sequential divider (25 cycles).
// NORM  one element per cycle while out_ready: out_data = e_i * (1/sum), with
//       its out_idx, out_last on the final one.
// A row of n elements takes 3n + 27 cycles without back-pressure.
// The split exponential table and the formula follow the softmax PE design;
// the table sizes, fixed-point format and phase structure are this design's.
module softmax_unit
  import sadimm_pkg::*;
#(
  parameter int MAX_L = 2048
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IDX_W-1:0] in_idx,
  input  logic [31:0]      in_data,
  input  logic             in_last,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [IDX_W-1:0] out_idx,
  output logic [31:0]      out_data,
  output logic             out_last,
  output logic [31:0]      rows_done
);
  localparam int AW = $clog2(MAX_L);

  typedef enum logic [1:0] {P_LOAD, P_EXP, P_RECIP, P_NORM} phase_e;

  logic [31:0]      val [MAX_L];
  logic [IDX_W-1:0] ix  [MAX_L];
  logic [31:0]      exp_hi [64];
  logic [31:0]      exp_lo [64];

  initial begin
    $readmemh("rtl/softmax_exp_hi.hex", exp_hi);
    $readmemh("rtl/softmax_exp_lo.hex", exp_lo);
  end

  phase_e      ph;
  logic [AW:0] n, i;
  logic [31:0] smax, sum, rcp;
  logic        recip_start, recip_busy, recip_done;
  logic [31:0] recip_y;

  // ordered integer key of an FP32 value, for the maximum
  function automatic logic [31:0] fkey(logic [31:0] f);
    return f[31] ? ~f : (f | 32'h8000_0000);
  endfunction

  // ---------------- EXP datapath ----------------
  logic [31:0] cur, d, e, sum_y, mul_a, mul_b, mul_y;
  logic [23:0] md;
  logic [12:0] dfix;
  logic [8:0]  sh;
  logic [24:0] tmp;
  logic        sat;

  assign cur = val[i[AW-1:0]];
  fp32_add u_sub (.a(smax), .b({~cur[31], cur[30:0]}), .y(d));

  always_comb begin
    md   = {1'b1, d[22:0]};
    sat  = 1'b0;
    dfix = '0;
    sh   = 9'd142 - 9'(d[30:23]);          // d*256 = md >> (142 - exp)
    tmp  = '0;
    if (d[30:23] == 8'd0 || d[31])  dfix = '0;
    else if (d[30:23] >= 8'd131)    sat  = 1'b1;   // d >= 16
    else if (sh > 9'd25)            dfix = '0;
    else begin
      tmp  = 25'({md, 1'b0} >> (sh));              // one extra bit for rounding
      dfix = 13'((tmp + 25'd1) >> 1);
      if (dfix >= 13'd4096) sat = 1'b1;
    end
  end

  // the single multiplier serves the table product (EXP) and normalisation (NORM)
  assign mul_a = (ph == P_NORM) ? cur : exp_hi[dfix[11:6]];
  assign mul_b = (ph == P_NORM) ? rcp : exp_lo[dfix[5:0]];
  fp32_mul u_mul (.a(mul_a), .b(mul_b), .y(mul_y));
  assign e = sat ? FP_ZERO : mul_y;

  fp32_add u_sum (.a(sum), .b(e), .y(sum_y));

  fp32_recip u_recip (.clk, .rst_n, .start(recip_start), .x(sum), .busy(recip_busy),
                      .done(recip_done), .y(recip_y));

  assign in_ready    = (ph == P_LOAD);
  assign recip_start = (ph == P_RECIP) && !recip_busy && !recip_done;
  assign out_valid   = (ph == P_NORM);
  assign out_idx     = ix[i[AW-1:0]];
  assign out_data    = mul_y;
  assign out_last    = (ph == P_NORM) && (i == n - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph        <= P_LOAD;
      n         <= '0;
      i         <= '0;
      smax      <= 32'hff80_0000;           // -inf
      sum       <= '0;
      rcp       <= '0;
      rows_done <= '0;
    end else begin
      case (ph)
        P_LOAD:
          if (in_valid) begin
            val[n[AW-1:0]] <= in_data;
            ix[n[AW-1:0]]  <= in_idx;
            if (fkey(in_data) > fkey(smax)) smax <= in_data;
            n <= n + 1'b1;
            if (in_last || n == (AW+1)'(MAX_L - 1)) begin
              ph  <= P_EXP;
              i   <= '0;
              sum <= '0;
            end
          end
        P_EXP: begin
          val[i[AW-1:0]] <= e;
          sum <= sum_y;
          if (i == n - 1) ph <= P_RECIP;
          else i <= i + 1'b1;
        end
        P_RECIP:
          if (recip_done) begin
            rcp <= recip_y;
            i   <= '0;
            ph  <= P_NORM;
          end
        P_NORM:
          if (out_ready) begin
            if (i == n - 1) begin
              ph        <= P_LOAD;
              n         <= '0;
              smax      <= 32'hff80_0000;
              rows_done <= rows_done + 1;
            end else i <= i + 1'b1;
          end
      endcase
    end
  end
endmodule
