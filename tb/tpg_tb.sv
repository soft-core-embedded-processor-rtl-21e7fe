// tpg_tb: self-checking test of the exhaustive test pattern generator.
// Checks that the patterns count up by one per enabled clock, hold while
// disabled, that done rises after exactly 2**WIDTH enabled clocks and that the
// last pattern is then held, and that clear restarts from zero.
module tpg_tb;
  localparam int unsigned WIDTH = 6;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [WIDTH-1:0] pattern;
  logic done;
  int checks = 0, failures = 0;

  tpg #(.WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_pat;
    int cycles;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(pattern == 0 && !done, "reset state");
    for (int pass = 0; pass < 2; pass++) begin
      expect_pat = 0;
      cycles = 0;
      en = 1;
      while (!done && cycles < 200) begin
        check(pattern == WIDTH'(expect_pat), $sformatf("pattern %0d", expect_pat));
        // drop enable now and then: pattern must hold
        if ($urandom_range(0, 7) == 0) begin
          en = 0;
          @(negedge clk);
          check(pattern == WIDTH'(expect_pat), "hold while disabled");
          en = 1;
        end
        @(negedge clk);
        cycles++;
        if (expect_pat < 2**WIDTH - 1) expect_pat++;
      end
      check(cycles == 2**WIDTH, $sformatf("done after %0d enabled clocks", cycles));
      check(pattern == '1, "last pattern held");
      repeat (3) @(negedge clk);
      check(done && pattern == '1, "done and pattern held");
      clear = 1; @(negedge clk); clear = 0;
      en = 0;
      check(pattern == 0 && !done, "clear restarts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
