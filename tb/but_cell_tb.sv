// but_cell_tb: self-checking test of the block-under-test model. For several
// random truth tables it applies every input value and checks the
// combinational output against the table and the flip-flop output one clock
// later; it also checks the synchronous clear.
module but_cell_tb;
  localparam int unsigned K = 6;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [2**K-1:0] init;
  logic [K-1:0] in;
  logic [1:0] out;
  int checks = 0, failures = 0;

  but_cell #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    init = '0; in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      init = {$urandom, $urandom};
      if (t == 0) init = 64'h6996_9669_9669_6996;  // 6-input parity
      in = 0;
      @(negedge clk);
      prev = init[0];
      for (int v = 1; v < 2**K; v++) begin
        in = K'(v);
        #1;
        check(out[0] == init[v], $sformatf("lut t=%0d in=%0d", t, v));
        check(out[1] == prev, $sformatf("ff t=%0d in=%0d", t, v));
        prev = init[v];
        @(negedge clk);
      end
    end
    init = '1;
    @(negedge clk);
    check(out[1] == 1'b1, "ff holds 1");
    clear = 1; @(negedge clk); clear = 0;
    check(out[1] == 1'b0, "clear zeroes ff");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
