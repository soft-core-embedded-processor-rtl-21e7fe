// uart_tx_tb: self-checking test of the UART transmitter. A receiver model
// samples the line in the middle of each bit and checks start bit, eight data
// bits (least significant first), stop bit, the frame length of 10 bit times
// and the ready handshake, for random bytes sent back to back.
module uart_tx_tb;
  localparam int unsigned CPB = 8;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [7:0] data = 0;
  logic ready, txd;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] sent [$];

  // Receiver: wait for a falling edge, then sample mid-bit.
  initial begin
    logic [7:0] rx;
    wait (rst_n);
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        rx[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      if (sent.size() > 0) begin
        automatic logic [7:0] e = sent.pop_front();
        check(rx == e, $sformatf("byte %h expected %h", rx, e));
      end else check(0, "unexpected frame");
    end
  end

  initial begin
    int t0, busy_clocks;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(txd == 1'b1 && ready, "idle line");
    for (int i = 0; i < 20; i++) begin
      while (!ready) @(negedge clk);
      data = 8'($urandom);
      if (i == 0) data = 8'hA5;
      sent.push_back(data);
      valid = 1;
      @(negedge clk);
      valid = 0;
      busy_clocks = 0;
      while (!ready) begin @(negedge clk); busy_clocks++; end
      check(busy_clocks == 10 * CPB, $sformatf("frame took %0d clocks", busy_clocks));
    end
    repeat (2 * CPB) @(negedge clk);
    check(sent.size() == 0, "all bytes received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
