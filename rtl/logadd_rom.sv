// logadd_rom: the 8192 x 11-bit correction table of the log-add unit.
//
// Entry i holds T(2i) = round(K ln(1 + exp(-2i/K))), the magnitude of
// K ln(1 + B/A) for an operand difference d = 2i. The LSB of d is not used
// as an address bit: T falls by at most one per two steps of d, so the
// dropped bit moves the result by no more than 1. Entry 0 is 1644 (K ln 2)
// and the last entry is 2.
//
// The contents are computed from the formula when the array is initialised,
// so no data file is needed. The read is synchronous (one cycle, address
// registered by the memory), which maps onto an FPGA block RAM. Size and
// contents follow the algorithm; the synchronous read and computing the
// contents at initialisation are this design's choices.
module logadd_rom #(
  parameter int unsigned ADDR_W = logadd_pkg::LA_TBL_ADDR_W,
  parameter int unsigned DATA_W = logadd_pkg::LA_TBL_W,
  parameter real         K      = logadd_pkg::LA_K_SCALE
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data_q
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  // T(2i) rounded to the nearest integer.
  function automatic logic [DATA_W-1:0] entry(int unsigned i);
    real x, t;
    x = 2.0 * real'(i);
    t = K * $ln(1.0 + $exp(-x / K));
    return DATA_W'($rtoi(t + 0.5));
  endfunction

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = entry(i);
  end

  always_ff @(posedge clk) data_q <= mem[addr];

endmodule
