// wo_register_tb: self-checking test of the write-only control register.
// Random writes with random selects and byte enables, checked against a
// reference copy after every clock.
module wo_register_tb;
  logic clk = 0, rst_n = 0, sel = 0, we = 0;
  logic [3:0] be;
  logic [31:0] wdata, q;
  int checks = 0, failures = 0;

  wo_register #(.W(32)) dut (.*);

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
    logic [31:0] model = '0;
    be = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(q == 0, "reset value");
    for (int i = 0; i < 1000; i++) begin
      sel = $urandom_range(0, 1); we = $urandom_range(0, 1);
      be = 4'($urandom); wdata = $urandom;
      if (sel && we)
        for (int b = 0; b < 4; b++) if (be[b]) model[8*b +: 8] = wdata[8*b +: 8];
      @(negedge clk);
      check(q == model, $sformatf("write %0d: q=%h expected %h", i, q, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
