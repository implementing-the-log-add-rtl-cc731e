// logadd_table: correction-term generator T(d) of the log-add unit.
//
// For an operand difference d = -K ln(B/A) >= 0 it returns
// T(d) = |K ln(1 + B/A)|, which falls from 1644 at d = 0 towards 0:
//   d <  16384          : table word at address d[13:1] (LSB dropped)
//   16384 <= d < 17471  : 2
//   17471 <= d < 20077  : 1
//   d >= 20077          : 0
// The test d < 16384 is not a magnitude comparator but a NOR of all bits of
// d above bit 13. Two comparators check the other two limits, and a 4-way
// mux (inputs a to d: table, 2, 1, 0) picks the result.
//
// Timing: two cycles. Cycle 1 is the synchronous table read, done in
// parallel with the NOR and the two comparators, whose outcome is registered
// as a mux select. Cycle 2 is the mux, with its output registered in t_q.
// sel_q shows which mux input was used. The structure follows the algorithm;
// how it is split into two register stages is this design's choice.
module logadd_table
  import logadd_pkg::*;
#(
  parameter int unsigned WIDTH   = logadd_pkg::LA_WIDTH,
  parameter int unsigned ADDR_W  = logadd_pkg::LA_TBL_ADDR_W,
  parameter int unsigned DATA_W  = logadd_pkg::LA_TBL_W,
  parameter int unsigned CUT_TWO = logadd_pkg::LA_CUT_TWO,
  parameter int unsigned CUT_ONE = logadd_pkg::LA_CUT_ONE
) (
  input  logic              clk,
  input  logic [WIDTH-1:0]  d,
  output logic [DATA_W-1:0] t_q,
  output tsel_e             sel_q
);

  // The table covers d < 2**(ADDR_W+1), the bits above must all be zero.
  localparam int unsigned HI_LSB = ADDR_W + 1;

  logic [DATA_W-1:0] rom_q;
  logic              in_table;
  tsel_e             sel, sel_r;

  logadd_rom #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_rom (
    .clk    (clk),
    .addr   (d[ADDR_W:1]),
    .data_q (rom_q)
  );

  always_comb begin
    in_table = ~|d[WIDTH-1:HI_LSB];
    if (in_table)                sel = SEL_TABLE;
    else if (d < WIDTH'(CUT_TWO)) sel = SEL_TWO;
    else if (d < WIDTH'(CUT_ONE)) sel = SEL_ONE;
    else                         sel = SEL_ZERO;
  end

  always_ff @(posedge clk) sel_r <= sel;

  always_ff @(posedge clk) begin
    unique case (sel_r)
      SEL_TABLE: t_q <= rom_q;
      SEL_TWO:   t_q <= DATA_W'(2);
      SEL_ONE:   t_q <= DATA_W'(1);
      SEL_ZERO:  t_q <= '0;
    endcase
    sel_q <= sel_r;
  end

endmodule
