// logadd_order: operand ordering and difference, first pipeline stage of the
// log-add unit.
//
// The log-add identity ln(A+B) = ln(A) + ln(1 + B/A) keeps its table small
// only when A >= B, so the operands are swapped when that does not hold. In
// the negative log domain A >= B means a <= b, so a comparator picks the
// smaller integer as the base and a subtractor forms d = |a - b|, which is
// -K ln(B/A) and never negative. Both go into registers (one cycle).
//
// Interface: in_a, in_b are -K ln(A) and -K ln(B). On the next clock edge
// min_q holds min(a, b), diff_q holds |a - b| and swapped_q tells whether b
// was the smaller one. Comparator, swap and subtractor follow the algorithm;
// registering their outputs as stage 1 of 4 is this design's choice.
module logadd_order #(
  parameter int unsigned WIDTH = logadd_pkg::LA_WIDTH
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] in_a,
  input  logic [WIDTH-1:0] in_b,
  output logic [WIDTH-1:0] min_q,
  output logic [WIDTH-1:0] diff_q,
  output logic             swapped_q
);

  logic             swap;
  logic [WIDTH-1:0] lo, hi;

  always_comb begin
    swap = in_b < in_a;           // B is the larger probability
    lo   = swap ? in_b : in_a;
    hi   = swap ? in_a : in_b;
  end

  always_ff @(posedge clk) begin
    min_q     <= lo;
    diff_q    <= hi - lo;
    swapped_q <= swap;
  end

endmodule
