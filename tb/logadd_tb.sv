// logadd_tb: end-to-end test of the log-add unit at its default size.
//
// Operand pairs, -K ln(A) and -K ln(B), enter with random gaps in
// in_valid. Each result is compared with the reference model and with the
// exact value min - K ln(1 + exp(-|a-b|/K)), within 1.5. Each result must
// appear exactly four clocks after its operands. The test counts how often
// each mechanism occurs and fails if one never does: operand swap, the
// table range, the constant-2, constant-1 and constant-0 ranges, the
// clamp at zero, idle cycles and back-to-back operations. It also checks
// that reset clears the pipeline. A run of 16-bit operands covers the
// 16-bit format (probabilities 1e-12 to 1). A short sequence sums the mixture
// probabilities 0.5, 0.25, 0.125 and 0.125 to 1.
module logadd_tb;
  import logadd_ref_pkg::*;

  typedef struct {
    longint unsigned a, b;
    longint          cycle;
  } op_t;

  logic        clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [23:0] in_a = '0, in_b = '0, out_sum;
  logic        out_valid, out_sat;
  longint      cycle = 0;
  int checks = 0, failures = 0;
  int n_swap = 0, n_region[4] = '{default: 0}, n_sat = 0, n_idle = 0, n_b2b = 0, n_16bit = 0;
  op_t pending[$];

  logadd dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_a(in_a),
              .in_b(in_b), .out_valid(out_valid), .out_sum(out_sum),
              .out_sat(out_sat));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard, sampled just after each rising edge.
  logic prev_valid = 1'b0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid) begin
      pending.push_back('{a: longint'(in_a), b: longint'(in_b), cycle: cycle});
      if (prev_valid) n_b2b++;
    end else if (rst_n) n_idle++;
    prev_valid <= in_valid && rst_n;
    #1;
    if (out_valid) begin
      if (pending.size() == 0) check(0, "result with no operation pending");
      else begin
        op_t             op;
        bit              sat;
        longint unsigned want, d, lo;
        op   = pending.pop_front();
        want = ref_sum(op.a, op.b, sat);
        lo   = (op.a < op.b) ? op.a : op.b;
        d    = (op.a < op.b) ? op.b - op.a : op.a - op.b;
        check(cycle == op.cycle + 4,
              $sformatf("latency %0d, want 4", cycle - op.cycle));
        check(out_sum == 24'(want) && out_sat == sat,
              $sformatf("a=%0d b=%0d: got %0d sat=%0b want %0d sat=%0b",
                        op.a, op.b, out_sum, out_sat, want, sat));
        if (!sat)
          check(absr(real'(out_sum) - (real'(lo) - exact_t(d))) <= 1.5,
                $sformatf("a=%0d b=%0d: %0d too far from exact", op.a, op.b, out_sum));
        if (op.b < op.a) n_swap++;
        n_region[ref_region(d)]++;
        if (sat) n_sat++;
      end
    end
  end

  task automatic issue(longint unsigned a, longint unsigned b);
    @(negedge clk);
    in_valid = 1'b1; in_a = 24'(a); in_b = 24'(b);
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0; in_a = 24'($urandom); in_b = 24'($urandom);
    end
  endtask

  function automatic longint unsigned neglog(real p);
    return longint'($floor(-K * $ln(p) + 0.5));
  endfunction

  initial begin
    longint unsigned a, b, s;
    // Reset with operands offered: nothing may come out.
    repeat (3) begin
      @(negedge clk); in_valid = 1'b1; in_a = 24'($urandom); in_b = 24'($urandom);
    end
    repeat (6) begin
      @(negedge clk);
      check(!out_valid, "output valid during reset");
    end
    @(negedge clk); rst_n = 1'b1; in_valid = 1'b0;
    idle(2);

    // Mixture sum: 0.5 + 0.25 + 0.125 + 0.125 = 1, i.e. -K ln(1) = 0.
    issue(neglog(0.125), neglog(0.125));
    idle(4);
    s = longint'(out_sum);
    check(s + 1 >= neglog(0.25) && s <= neglog(0.25) + 1,
          $sformatf("0.125+0.125 gives %0d, want %0d", s, neglog(0.25)));
    issue(s, neglog(0.25));
    idle(4);
    s = longint'(out_sum);
    issue(neglog(0.5), s);
    idle(4);
    check(out_sum <= 24'd2, $sformatf("mixture sum to 1 gives %0d", out_sum));

    // Random traffic covering every range of the difference.
    for (int i = 0; i < 20000; i++) begin
      a = 64'($urandom_range(0, 24'hFFFFFF));
      case ($urandom_range(0, 9))
        0, 1, 2: b = a + 64'($urandom_range(0, 16383));
        3:       b = a + 64'($urandom_range(16384, 20100));
        4:       b = a + 64'($urandom_range(20077, 100000));
        5:       b = a;
        6:       begin a = 64'($urandom_range(0, 1700)); b = a + 64'($urandom_range(0, 3000)); end
        7:       b = 64'($urandom_range(0, 24'hFFFFFF));
        default: b = a + 64'($urandom_range(0, 2000));
      endcase
      if (b > 64'hFFFFFF) b = 64'hFFFFFF;
      if ($urandom_range(0, 1) == 1) issue(a, b); else issue(b, a);
      if ($urandom_range(0, 3) == 0) idle($urandom_range(1, 3));
    end
    // 16-bit operands, the range 1e-12 to 1 of the 16-bit format.
    for (int i = 0; i < 5000; i++) begin
      a = 64'($urandom_range(0, 16'hFFFF));
      b = ($urandom_range(0, 1) == 1) ? 64'($urandom_range(0, 16'hFFFF))
                                      : a + 64'($urandom_range(0, 20000));
      if (b > 64'hFFFF) b = 64'hFFFF;
      issue(a, b);
      n_16bit++;
    end
    idle(8);

    check(pending.size() == 0, $sformatf("%0d results missing", pending.size()));
    check(n_swap > 0,      "no operand swap seen");
    check(n_region[0] > 0, "table range never used");
    check(n_region[1] > 0, "constant-2 range never used");
    check(n_region[2] > 0, "constant-1 range never used");
    check(n_region[3] > 0, "constant-0 range never used");
    check(n_sat > 0,       "clamp at zero never used");
    check(n_idle > 0,      "no idle cycle");
    check(n_b2b > 0,       "no back-to-back operations");
    check(n_16bit > 0,     "no 16-bit operands");
    $display("mechanisms: swap=%0d table=%0d two=%0d one=%0d zero=%0d clamp=%0d idle=%0d back-to-back=%0d 16-bit=%0d",
             n_swap, n_region[0], n_region[1], n_region[2], n_region[3], n_sat, n_idle, n_b2b,
             n_16bit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
