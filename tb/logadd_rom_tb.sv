// logadd_rom_tb: reads every word of the 8192 x 11 correction table and
// compares it with the rounded correction term K ln(1 + exp(-2i/K)) worked
// out here. It also checks the end points (1644 at address 0, 2 at the
// last), that the table never rises, that each word is within 1 of the
// exact correction at both even and odd d it stands for, and that the read
// takes exactly one clock.
module logadd_rom_tb;
  import logadd_ref_pkg::*;

  logic        clk = 1'b0;
  logic [12:0] addr;
  logic [10:0] data_q;
  int checks = 0, failures = 0;

  logadd_rom dut (.clk(clk), .addr(addr), .data_q(data_q));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned prev;
    prev = 2047;
    addr = '0;
    for (int i = 0; i < 8192; i++) begin
      @(negedge clk);
      addr = 13'(i);
      @(posedge clk);
      #1;
      check(data_q == 11'(ref_t(2 * i)),
            $sformatf("addr %0d: got %0d want %0d", i, data_q, ref_t(2 * i)));
      check(int'(data_q) <= prev, $sformatf("addr %0d rises", i));
      check(absr(real'(data_q) - exact_t(2 * i)) <= 0.5 &&
            absr(real'(data_q) - exact_t(2 * i + 1)) <= 1.0,
            $sformatf("addr %0d: %0d too far from exact", i, data_q));
      if (i == 0)    check(data_q == 11'd1644, "entry 0 is not 1644");
      if (i == 8191) check(data_q == 11'd2, "last entry is not 2");
      prev = int'(data_q);
    end
    // One-cycle read: a new address shows only after the next edge.
    @(negedge clk); addr = 13'd0;
    @(posedge clk); #1;
    @(negedge clk); addr = 13'd4000;
    #1 check(data_q == 11'd1644, "read output changed before the clock");
    @(posedge clk); #1;
    check(data_q == 11'(ref_t(8000)), "read not ready after one clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
