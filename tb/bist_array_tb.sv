// bist_array_tb: self-checking test of the BIST area (two pattern generators,
// 3 x 4 blocks under test, 3 x 4 analyzers in rings).
//
// Each phase loads truth tables into the BUTs, clears, runs, and checks:
//  * done rises exactly 2**K + 1 clocks after the first run clock;
//  * with identical tables no analyzer fails;
//  * with one table entry flipped in one BUT (an injected fault), exactly the
//    two analyzers of the ring that watch that BUT fail, and the faulty BUT can
//    be found from them (the diagnosis the processor performs);
//  * with two faulty BUTs in different rows, both pairs fail;
//  * with one generator stuck, every analyzer fails.
// Expected flags come from the ring rule, worked out here independently.
module bist_array_tb;
  localparam int unsigned ROWS = 3, BPR = 4, K = 6;
  localparam int unsigned N = ROWS * BPR;
  logic clk = 0, rst_n = 0, bist_clear = 0, bist_run = 0;
  logic [N-1:0][2**K-1:0] init;
  logic done, fail;
  logic [N-1:0] ora_fail;
  int checks = 0, failures = 0;
  int faults_detected = 0, clean_passes = 0;

  bist_array #(.ROWS(ROWS), .BUTS_PER_ROW(BPR), .K(K)) dut (.*);

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

  // Ring rule: ORA j of a row compares BUT j with BUT j+1 (mod BPR).
  function automatic logic [N-1:0] expected_flags(input logic [N-1:0] faulty);
    logic [N-1:0] f = '0;
    for (int r = 0; r < ROWS; r++)
      for (int j = 0; j < BPR; j++)
        if (faulty[r*BPR + j] || faulty[r*BPR + (j+1) % BPR]) f[r*BPR + j] = 1'b1;
    return f;
  endfunction

  task automatic run_phase(input logic [2**K-1:0] table_bits, input logic [N-1:0] faulty,
                           input string name);
    int cycles;
    logic [N-1:0] exp;
    for (int b = 0; b < N; b++) begin
      init[b] = table_bits;
      if (faulty[b]) begin
        int unsigned bit_idx = $urandom_range(0, 2**K - 1);
        init[b][bit_idx] = !init[b][bit_idx];
      end
    end
    bist_clear = 1; bist_run = 0;
    @(negedge clk);
    bist_clear = 0; bist_run = 1;
    cycles = 0;
    while (!done && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
    bist_run = 0;
    check(cycles == 2**K + 1, $sformatf("%s: done after %0d clocks", name, cycles));
    exp = expected_flags(faulty);
    check(ora_fail == exp, $sformatf("%s: ora flags %b expected %b", name, ora_fail, exp));
    check(fail == (|exp), $sformatf("%s: pass/fail", name));
    if (fail) faults_detected++; else clean_passes++;
    // Diagnosis: a BUT is suspect when both analyzers that watch it failed.
    for (int r = 0; r < ROWS; r++)
      for (int j = 0; j < BPR; j++) begin
        bit suspect = ora_fail[r*BPR + j] && ora_fail[r*BPR + (j + BPR - 1) % BPR];
        if (BPR > 2) check(suspect == faulty[r*BPR + j], $sformatf("%s: diagnosis BUT %0d", name, r*BPR + j));
      end
  endtask

  initial begin
    init = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run_phase(64'h6996_9669_9669_6996, '0, "parity");
    run_phase(64'h8000_0000_0000_0000, '0, "and6");
    run_phase({$urandom, $urandom}, '0, "random");
    for (int b = 0; b < N; b++)
      run_phase({$urandom, $urandom}, N'(1) << b, $sformatf("fault in BUT %0d", b));
    run_phase({$urandom, $urandom}, N'(1) << 1 | N'(1) << 10, "faults in BUT 1 and 10");
    // A generator stuck at pattern 0: every ORA compares one BUT from each
    // generator, so all of them must fail (the table is not constant).
    force dut.g_tpg[1].u_tpg.pattern = '0;
    bist_clear = 1; @(negedge clk); bist_clear = 0; bist_run = 1;
    repeat (2**K + 1) @(negedge clk);
    bist_run = 0;
    check(ora_fail == '1, $sformatf("stuck generator: all ORAs fail (%b)", ora_fail));
    release dut.g_tpg[1].u_tpg.pattern;
    check(faults_detected == N + 1 && clean_passes == 3, "phase outcomes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
