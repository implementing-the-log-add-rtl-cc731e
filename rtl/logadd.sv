// logadd: pipelined log-add unit.
//
// Computes -K ln(A + B) from x = -K ln(A) and y = -K ln(B) without leaving
// the log domain. It uses ln(A+B) = ln(A) + ln(1 + B/A) with the operands
// ordered so that A >= B. The correction ln(1 + B/A) then depends only on
// d = x - y and lies between 0 and ln 2, small enough for one 11 Kb table.
// This is the addition a recogniser needs to sum Gaussian-mixture
// components that are kept as log probabilities.
//
// Pipeline, four cycles from in_valid to out_valid, one operation accepted
// every cycle:
//   1  logadd_order  compare, swap, d = |x - y|
//   2  logadd_table  table read in parallel with the range comparators
//   3  logadd_table  4-way mux: table word, 2, 1 or 0
//   4  logadd_sub    result = min(x, y) - T(d), clamped at 0
// The smaller operand travels alongside the table in two delay registers.
// Units, table, cut-offs and the four-cycle latency follow the algorithm as
// characterised. The valid pipeline, the reset, the one-per-cycle
// throughput and the clamp flag out_sat are this design's choices. There is
// no stall: a result leaves exactly four cycles after its operands.
module logadd
  import logadd_pkg::*;
#(
  parameter int unsigned WIDTH = logadd_pkg::LA_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,     // synchronous, clears the valid bits
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_a,      // -K ln(A)
  input  logic [WIDTH-1:0] in_b,      // -K ln(B)
  output logic             out_valid,
  output logic [WIDTH-1:0] out_sum,   // -K ln(A + B)
  output logic             out_sat    // result clamped at 0
);

  logic [WIDTH-1:0] s1_min, s1_diff, s2_min, s3_min;
  logic             s1_swapped;
  logic [LA_TBL_W-1:0] s3_t;
  tsel_e            s3_sel;
  logic [LA_LATENCY-1:0] vld;

  logadd_order #(.WIDTH(WIDTH)) u_order (
    .clk       (clk),
    .in_a      (in_a),
    .in_b      (in_b),
    .min_q     (s1_min),
    .diff_q    (s1_diff),
    .swapped_q (s1_swapped)
  );

  logadd_table #(.WIDTH(WIDTH)) u_table (
    .clk   (clk),
    .d     (s1_diff),
    .t_q   (s3_t),
    .sel_q (s3_sel)
  );

  // Smaller operand, delayed to meet the table output.
  always_ff @(posedge clk) begin
    s2_min <= s1_min;
    s3_min <= s2_min;
  end

  logadd_sub #(.WIDTH(WIDTH), .DATA_W(LA_TBL_W)) u_sub (
    .clk   (clk),
    .base  (s3_min),
    .t     (s3_t),
    .sum_q (out_sum),
    .sat_q (out_sat)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LA_LATENCY-2:0], in_valid};
  end

  assign out_valid = vld[LA_LATENCY-1];

  // Adding a probability can only make the result more likely: a valid
  // result never exceeds the smaller operand it was formed from.
  a_sum_le_min: assert property (@(posedge clk) disable iff (!rst_n)
    vld[LA_LATENCY-2] |=> out_sum <= $past(s3_min))
    else $error("log-add result above its smaller operand");

  // s1_swapped and s3_sel are kept for observation in simulation.
  logic unused_obs;
  assign unused_obs = s1_swapped ^ (s3_sel == SEL_ZERO);

endmodule
