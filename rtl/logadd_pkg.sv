// logadd_pkg: constants and types shared by the log-add unit.
//
// Numbers are probabilities held in the negative log domain as unsigned
// integers, x = -K ln(A) with K = 2371.8 (the HTK scale factor, chosen so
// that a 16-bit value spans probabilities 1e-12 to 1). Operands are 24 bits
// wide, covering probabilities down to about 1e-3072. A larger integer
// therefore means a smaller probability.
//
// The correction term T(d) = K ln(1 + exp(-d/K)) of the log-add identity
// falls from 1644 at d = 0 towards 0. It is tabulated for d < 16384 with the
// LSB of d dropped (8192 entries of 11 bits). Beyond that T is 2 up to
// d = 17470, 1 up to d = 20076 and 0 from 20077 on. All of these numbers
// are the ones the algorithm was characterised with. The LA_LATENCY of 4 cycles
// is the design's overall pipeline depth.
package logadd_pkg;

  localparam int unsigned LA_WIDTH = 24; // log-domain operand width
  localparam real         LA_K_SCALE = 2371.8; // |K|, log-domain scale factor
  localparam int unsigned LA_TBL_ADDR_W = 13; // 8192-entry table
  localparam int unsigned LA_TBL_W = 11; // table word: max value 1644
  localparam int unsigned LA_CUT_TABLE = 16384; // d below this: table
  localparam int unsigned LA_CUT_TWO = 17471; // d below this: T = 2
  localparam int unsigned LA_CUT_ONE = 20077; // d below this: T = 1, else 0
  localparam int unsigned LA_LATENCY = 4; // input to result, cycles

  // Which of the four mux inputs of the table stage supplies T(d)
  // (options a, b, c and d of the table structure).
  typedef enum logic [1:0] {
    SEL_TABLE = 2'd0,  // a: look-up table word
    SEL_TWO   = 2'd1,  // b: constant 2
    SEL_ONE   = 2'd2,  // c: constant 1
    SEL_ZERO  = 2'd3   // d: constant 0
  } tsel_e;

endpackage
