// logadd_sub_tb: checks the output subtractor with random smaller operands
// and table values, including operands smaller than the table value, which
// must give 0 with sat_q set, and the 24-bit maximum. Results are checked
// one clock after the inputs change.
module logadd_sub_tb;
  logic        clk = 1'b0;
  logic [23:0] base, sum_q;
  logic [10:0] t;
  logic        sat_q;
  int checks = 0, failures = 0, n_sat = 0;

  logadd_sub dut (.clk(clk), .base(base), .t(t), .sum_q(sum_q), .sat_q(sat_q));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] eb;
    logic [10:0] et;
    longint      want;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      et = 11'($urandom_range(0, 1644));
      case (i % 4)
        0: eb = 24'($urandom);
        1: eb = 24'($urandom_range(0, 2000));
        2: eb = 24'hFFFFFF;
        default: eb = 24'(et) + 24'($urandom_range(0, 3)) - 24'd1;
      endcase
      base = eb; t = et;
      @(posedge clk); #1;
      want = longint'(eb) - longint'(et);
      checks++;
      if ((want < 0 && (sum_q !== 24'd0 || sat_q !== 1'b1)) ||
          (want >= 0 && (sum_q !== 24'(want) || sat_q !== 1'b0))) begin
        failures++;
        if (failures <= 10)
          $display("FAIL base=%0d t=%0d: sum=%0d sat=%0b", eb, et, sum_q, sat_q);
      end
      if (want < 0) n_sat++;
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
