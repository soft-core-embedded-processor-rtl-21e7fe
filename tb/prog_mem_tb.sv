// prog_mem_tb: self-checking test of the 64 kB program/data memory at its
// full size. Random byte-enabled writes over the whole address range, then
// reads checked against a reference copy, including the first and last word.
module prog_mem_tb;
  localparam int unsigned BYTES = 65536;
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW = $clog2(WORDS);
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] addr = 0;
  logic [3:0] be = 0;
  logic [31:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  prog_mem #(.BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [WORDS];

  initial begin
    // initialise every word so that reads are defined
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1; be = 4'hF; addr = AW'(i); wdata = i * 32'h9E37_79B9;
      model[i] = wdata;
    end
    @(negedge clk);
    for (int i = 0; i < 4000; i++) begin
      automatic int unsigned a = (i == 0) ? 0 : (i == 1) ? WORDS - 1 : $urandom_range(0, WORDS - 1);
      we = 1; addr = AW'(a); be = 4'($urandom); wdata = $urandom;
      for (int b = 0; b < 4; b++) if (be[b]) model[a][8*b +: 8] = wdata[8*b +: 8];
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 6000; i++) begin
      automatic int unsigned a = (i == 0) ? 0 : (i == 1) ? WORDS - 1 : $urandom_range(0, WORDS - 1);
      re = 1; addr = AW'(a);
      @(negedge clk);
      re = 0;
      check(rdata == model[a], $sformatf("word %0d: %h expected %h", a, rdata, model[a]));
      // rdata holds while no read is issued
      addr = AW'($urandom);
      @(negedge clk);
      check(rdata == model[a], "read data holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
