// logadd_table_tb: streams one difference d per clock into the correction
// generator: every d from 0 to 25000, the range limits, and random values
// up to the 24-bit maximum. Two clocks later it checks t_q against the
// reference correction and sel_q against the expected mux input. It also
// checks that t_q is within 1 of the exact correction K ln(1 + exp(-d/K)),
// and that every one of the four mux inputs was used.
module logadd_table_tb;
  import logadd_pkg::*;
  import logadd_ref_pkg::*;

  logic        clk = 1'b0;
  logic [23:0] d;
  logic [10:0] t_q;
  tsel_e       sel_q;
  int checks = 0, failures = 0;
  int n_region[4] = '{default: 0};
  logic [23:0] hist[$];

  logadd_table dut (.clk(clk), .d(d), .t_q(t_q), .sel_q(sel_q));

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare the output with the difference sampled at the previous edge:
  // the table read and the mux are registered at consecutive edges.
  always @(posedge clk) begin
    hist.push_back(d);
    if (hist.size() > 2) void'(hist.pop_front());
    if (hist.size() == 2) begin
      longint unsigned dd;
      int              want_r;
      #1;
      dd = longint'(hist[0]);
      want_r = ref_region(dd);
      checks++;
      if (t_q !== 11'(ref_t(dd)) || int'(sel_q) != want_r ||
          absr(real'(t_q) - exact_t(dd)) > 1.0) begin
        failures++;
        if (failures <= 10)
          $display("FAIL d=%0d: t=%0d want %0d sel=%0d want %0d", dd, t_q,
                   ref_t(dd), sel_q, want_r);
      end
      n_region[want_r]++;
    end
  end

  initial begin
    static int unsigned edges[] = '{16383, 16384, 16385, 17470, 17471, 17472,
                             20076, 20077, 20078, 32767, 32768, 32'hFFFFFF};
    d = '0;
    for (int i = 0; i <= 25000; i++) begin
      @(negedge clk) d = 24'(i);
    end
    foreach (edges[i]) begin
      @(negedge clk) d = 24'(edges[i]);
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk) d = (i % 2 == 1) ? 24'($urandom) : 24'($urandom_range(0, 40000));
    end
    repeat (4) @(negedge clk);
    foreach (n_region[r]) begin
      checks++;
      if (n_region[r] == 0) begin
        failures++;
        $display("FAIL mux input %0d never used", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
