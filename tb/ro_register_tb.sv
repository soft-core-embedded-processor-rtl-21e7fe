// ro_register_tb: self-checking test of the read-only status register.
// The input changes every clock; a read must return the value the input had
// one clock before the read was issued, and rdata must hold between reads.
module ro_register_tb;
  logic clk = 0, rst_n = 0, sel = 0, re = 0;
  logic [31:0] d, rdata;
  int checks = 0, failures = 0;

  ro_register #(.W(32)) dut (.*);

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
    logic [31:0] prev_d, model;
    d = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    model = 0;
    prev_d = d;
    for (int i = 0; i < 1000; i++) begin
      sel = $urandom_range(0, 1); re = $urandom_range(0, 1);
      if (sel && re) model = prev_d;
      prev_d = $urandom;
      d = prev_d;
      @(negedge clk);
      check(rdata == model, $sformatf("read %0d: %h expected %h", i, rdata, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
