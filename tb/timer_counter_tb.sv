// timer_counter_tb: self-checking test of the 32-bit test-phase timer.
// Starts and stops it over known numbers of clocks and checks the count,
// checks that it holds while stopped, that clear zeroes it, and, on a narrow
// instance, that it wraps from all ones to zero.
module timer_counter_tb;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, clear = 0;
  logic running;
  logic [31:0] count;
  int checks = 0, failures = 0;

  timer_counter #(.W(32)) dut (.*);

  logic start8 = 0, clear8 = 0, running8;
  logic [7:0] count8;
  timer_counter #(.W(8)) dut8 (.clk, .rst_n, .start(start8), .stop(1'b0), .clear(clear8),
                               .running(running8), .count(count8));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(count == 0 && !running, "reset");
    total = 0;
    for (int i = 0; i < 20; i++) begin
      automatic int n = $urandom_range(1, 300);
      pulse(start);
      repeat (n) @(negedge clk);
      pulse(stop);
      total += n + 1;  // the stop clock still counts
      check(count == 32'(total), $sformatf("run %0d: count %0d expected %0d", i, count, total));
      repeat ($urandom_range(0, 20)) @(negedge clk);
      check(count == 32'(total) && !running, "holds while stopped");
    end
    pulse(clear);
    check(count == 0, "clear");
    // wrap-around, on an 8-bit instance
    pulse(clear8);
    pulse(start8);
    repeat (255) @(negedge clk);
    check(count8 == 8'hFF, $sformatf("8-bit count %h before wrap", count8));
    @(negedge clk);
    check(count8 == 8'h00, $sformatf("8-bit count %h after wrap", count8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
