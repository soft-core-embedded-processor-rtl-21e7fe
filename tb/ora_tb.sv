// ora_tb: self-checking test of the comparison-based response analyzer.
// Drives random pairs of responses, mostly equal, and checks the sticky fail
// flag against a reference: set by the first enabled mismatch, ignored while
// disabled, cleared only by clear.
module ora_tb;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [1:0] a, b;
  logic fail;
  int checks = 0, failures = 0;
  int sets = 0;

  ora #(.W(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit model;
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      check(fail == model, $sformatf("cycle %0d fail=%0b expected %0b", i, fail, model));
      a = 2'($urandom);
      b = ($urandom_range(0, 15) == 0) ? 2'($urandom) : a;
      en = ($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 40) == 0);
      #1;
      if (clear) model = 0;
      else if (en && a != b) begin
        if (!model) sets++;
        model = 1;
      end
    end
    check(sets > 10, "fail flag was set several times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
