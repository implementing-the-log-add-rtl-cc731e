// logadd_sub: output subtractor, last pipeline stage of the log-add unit.
//
// Completes ln(A+B) = ln(A) + ln(1 + B/A) in the negative log domain:
// result = min(a, b) - T(d). The table holds the magnitude of the negative
// term K ln(1 + B/A), so adding it to the smaller operand is a subtraction.
//
// The subtraction cannot go below zero when A + B <= 1. If a sum of larger
// values would, the result is clamped at 0 (probability 1) and sat_q is set.
// The clamp is this design's choice; the subtraction itself follows the
// algorithm. Timing: one cycle, the result is registered.
module logadd_sub #(
  parameter int unsigned WIDTH  = logadd_pkg::LA_WIDTH,
  parameter int unsigned DATA_W = logadd_pkg::LA_TBL_W
) (
  input  logic              clk,
  input  logic [WIDTH-1:0]  base,   // min(a, b)
  input  logic [DATA_W-1:0] t,      // |K ln(1 + B/A)|
  output logic [WIDTH-1:0]  sum_q,  // -K ln(A + B)
  output logic              sat_q
);

  logic [WIDTH:0] diff;  // one extra bit holds the borrow

  always_comb diff = {1'b0, base} - {{(WIDTH + 1 - DATA_W){1'b0}}, t};

  always_ff @(posedge clk) begin
    sat_q <= diff[WIDTH];
    sum_q <= diff[WIDTH] ? '0 : diff[WIDTH-1:0];
  end

endmodule
