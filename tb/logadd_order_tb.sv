// logadd_order_tb: drives random and corner-case operand pairs into the
// compare/swap/subtract stage, one pair per clock, and checks one clock
// later that min_q is the smaller operand, diff_q the absolute difference
// and swapped_q set exactly when b < a.
module logadd_order_tb;
  logic        clk = 1'b0;
  logic [23:0] a, b, min_q, diff_q;
  logic        swapped_q;
  int checks = 0, failures = 0, n_swap = 0, n_keep = 0;

  logadd_order dut (.clk(clk), .in_a(a), .in_b(b), .min_q(min_q),
                    .diff_q(diff_q), .swapped_q(swapped_q));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] ea, eb;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      case (i % 5)
        0: begin ea = 24'($urandom); eb = 24'($urandom); end
        1: begin ea = 24'($urandom); eb = ea; end
        2: begin ea = 24'($urandom); eb = ea + 24'($urandom_range(0, 30000)); end
        3: begin eb = 24'($urandom); ea = eb + 24'($urandom_range(0, 30000)); end
        default: begin ea = (i % 2 == 1) ? 24'hFFFFFF : 24'd0; eb = (i % 3 != 0) ? 24'd0 : 24'hFFFFFF; end
      endcase
      a = ea; b = eb;
      @(posedge clk); #1;
      checks++;
      if (min_q !== ((ea < eb) ? ea : eb) ||
          diff_q !== ((ea < eb) ? eb - ea : ea - eb) ||
          swapped_q !== (eb < ea)) begin
        failures++;
        if (failures <= 10)
          $display("FAIL a=%0d b=%0d: min=%0d diff=%0d swapped=%0b", ea, eb,
                   min_q, diff_q, swapped_q);
      end
      if (eb < ea) n_swap++; else n_keep++;
    end
    checks++;
    if (n_swap == 0 || n_keep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
