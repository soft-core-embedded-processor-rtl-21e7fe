// soft_bist_top_tb: end-to-end test of the embedded-processor BIST system at
// its default parameters (3 x 4 BUTs with 6-input tables, 64 kB memory, UART
// at 868 clocks per bit, Virtex-5 bit order).
//
// The testbench plays the soft-core processor through the bus ports and runs
// one BIST session the way the processor software would:
//  * the initial configuration (normally the external download) is placed
//    directly in the configuration-port model;
//  * the data for five partial reconfigurations is stored in program memory in
//    compressed form: since all BUTs are configured identically, one truth
//    table per phase is stored and expanded to every BUT when it is sent;
//  * for each of the six test phases the processor starts the timer, builds
//    the phase's configuration stream from memory and sends it to the port
//    (phases 1 to 5),
//    clears and runs the BIST through the write-only register, polls the
//    read-only register for done, stops the timer, reads the pass/fail result,
//    reads the ORA flip-flops back through the port, locates the faulty BUT
//    and sends the low byte of the time over the UART;
//  * in phase 3 the processor injects a fault by flipping one bit of the
//    table it sends to BUT 5, which must be detected and located.
// Expected results come from the ring rule worked out here, not from the
// design. Each mechanism (partial reconfiguration, port stall, bus wait state,
// BIST pass, BIST fail, read back, diagnosis, timer, UART) is counted, and one
// that never happened counts as a failure.
module soft_bist_top_tb;
  import bist_pkg::*;

  localparam int unsigned ROWS = 3, BPR = 4, K = 6;
  localparam int unsigned N = ROWS * BPR;
  localparam int unsigned LUT_BITS = 2**K;
  localparam int unsigned CPB = 868;
  localparam int unsigned FRAME_WORDS = 41;
  localparam int unsigned ORA_FAR = 1;         // frame after the truth tables
  localparam int unsigned FAULT_PHASE = 3;
  localparam int unsigned FAULT_BUT = 5;
  localparam logic [31:0] STREAM_BASE = 32'h0000_1000;   // stored tables

  logic clk = 0, rst_n = 0;
  logic [31:0] bus_addr = 0, bus_wdata = 0;
  logic [3:0] bus_be = 4'hF;
  logic bus_we = 0, bus_re = 0;
  logic bus_ready, bus_rvalid;
  logic [31:0] bus_rdata;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [31:0] icap_i, icap_o;
  logic [N-1:0][LUT_BITS-1:0] but_init;
  logic [N-1:0] ora_state;
  logic uart_txd;
  logic stall_en = 0;

  int checks = 0, failures = 0;
  int n_reconfig = 0, n_bist_pass = 0, n_bist_fail = 0, n_readback = 0;
  int n_diag_ok = 0, n_timer = 0, n_uart = 0, n_wait = 0;

  soft_bist_top dut (.*);

  icap_model #(.NUM_BUT(N), .LUT_BITS(LUT_BITS), .FRAME_WORDS(FRAME_WORDS)) u_icap (
    .clk       (clk),
    .ce_n      (icap_ce_n),
    .write_n   (icap_write_n),
    .i         (icap_i),
    .o         (icap_o),
    .busy      (icap_busy),
    .stall_en  (stall_en),
    .ora_state (ora_state),
    .but_init  (but_init)
  );

  always #5 clk = ~clk;   // 100 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ bus tasks
  task automatic bus_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_addr = a; bus_wdata = d; bus_be = 4'hF; bus_we = 1;
    #1;
    while (!bus_ready) begin n_wait++; @(negedge clk); #1; end
    @(negedge clk);
    bus_we = 0;
  endtask

  task automatic bus_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_addr = a; bus_re = 1;
    @(negedge clk);
    bus_re = 0;
    check(bus_rvalid, "read data valid one clock after the read");
    d = bus_rdata;
  endtask

  // ------------------------------------------------------ UART receiver
  logic [7:0] uart_expect [$];
  initial begin
    logic [7:0] rx;
    wait (rst_n);
    forever begin
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      check(uart_txd == 1'b0, "uart start bit");
      for (int b = 0; b < 8; b++) begin
        repeat (CPB) @(posedge clk);
        rx[b] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      check(uart_txd == 1'b1, "uart stop bit");
      if (uart_expect.size() > 0) begin
        check(rx == uart_expect[0], $sformatf("uart byte %h expected %h", rx, uart_expect[0]));
        void'(uart_expect.pop_front());
        n_uart++;
      end else check(0, "unexpected uart frame");
    end
  end

  // ---------------------------------------------------- phase contents
  function automatic logic [LUT_BITS-1:0] phase_table(input int p);
    case (p)
      0: return 64'h6996_9669_9669_6996;   // 6-input parity
      1: return 64'h8000_0000_0000_0000;   // 6-input AND
      2: return 64'hFFFF_FFFF_FFFF_FFFE;   // 6-input OR
      3: return 64'hAAAA_AAAA_AAAA_AAAA;   // buffer of input 0
      4: return 64'hFF00_FF00_FF00_FF00;   // buffer of input 3
      default: return 64'h0123_4567_89AB_CDEF;
    endcase
  endfunction

  function automatic logic [LUT_BITS-1:0] but_table(input int p, input int b);
    logic [LUT_BITS-1:0] t = phase_table(p);
    if (p == FAULT_PHASE && b == FAULT_BUT) t[37] = !t[37];
    return t;
  endfunction

  function automatic logic [N-1:0] expected_flags(input int p);
    logic [N-1:0] f = '0;
    if (p != FAULT_PHASE) return f;
    for (int r = 0; r < ROWS; r++)
      for (int j = 0; j < BPR; j++)
        if (r*BPR + j == FAULT_BUT || r*BPR + (j+1) % BPR == FAULT_BUT) f[r*BPR + j] = 1'b1;
    return f;
  endfunction

  function automatic logic [31:0] t1_write(input int reg_addr, input int count);
    return {3'b001, 2'b10, 9'b0, 5'(reg_addr), 2'b0, 11'(count)};
  endfunction
  function automatic logic [31:0] t1_read(input int reg_addr, input int count);
    return {3'b001, 2'b01, 9'b0, 5'(reg_addr), 2'b0, 11'(count)};
  endfunction

  // configuration stream of one partial reconfiguration
  function automatic int stream_len();
    return 2 + 2 + 1 + 2*N + 2;
  endfunction
  function automatic logic [31:0] stream_word(input int p, input int k);
    if (k == 0) return 32'hFFFF_FFFF;
    if (k == 1) return 32'hAA99_5566;
    if (k == 2) return t1_write(1, 1);
    if (k == 3) return 32'd0;                           // frame 0
    if (k == 4) return t1_write(2, 2*N);
    if (k < 5 + 2*N) begin
      logic [LUT_BITS-1:0] t = but_table(p, (k - 5) / 2);
      return t[32*((k - 5) % 2) +: 32];
    end
    if (k == 5 + 2*N) return t1_write(4, 1);
    return 32'h0000_000D;                               // desync
  endfunction

  // ----------------------------------------------------------- the session
  initial begin
    logic [31:0] d, t_phase, ro, flags;
    int polls;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // initial configuration (phase 0), as downloaded from outside
    for (int b = 0; b < N; b++) begin
      u_icap.cfg_mem[2*b]     = phase_table(0)[31:0];
      u_icap.cfg_mem[2*b + 1] = phase_table(0)[63:32];
    end

    // compressed reconfiguration data for phases 1..5 into program memory:
    // one 64-bit truth table per phase
    for (int p = 1; p < 6; p++) begin
      bus_write(STREAM_BASE + 32'(8 * p),     phase_table(p)[31:0]);
      bus_write(STREAM_BASE + 32'(8 * p + 4), phase_table(p)[63:32]);
    end

    for (int p = 0; p < 6; p++) begin
      stall_en = (p % 2 == 1);
      bus_write(TIMER_CTRL_ADDR, 32'(1 << TMR_CLEAR | 1 << TMR_START));
      if (p > 0) begin
        logic [LUT_BITS-1:0] tbl;
        bus_read(STREAM_BASE + 32'(8 * p), d);
        tbl[31:0] = d;
        bus_read(STREAM_BASE + 32'(8 * p + 4), d);
        tbl[63:32] = d;
        check(tbl == phase_table(p), $sformatf("phase %0d: stored table read from memory", p));
        // expand: header words, then the table once per BUT, then desync;
        // the fault is injected into one BUT's copy by the software
        for (int k = 0; k < stream_len(); k++) begin
          if (k >= 5 && k < 5 + 2*N) begin
            automatic logic [LUT_BITS-1:0] t = tbl;
            if (p == FAULT_PHASE && (k - 5) / 2 == FAULT_BUT) t[37] = !t[37];
            d = t[32*((k - 5) % 2) +: 32];
          end else d = stream_word(p, k);
          check(d == stream_word(p, k), "stream word built by the software");
          bus_write(ICAP_DATA_ADDR, d);
        end
        do bus_read(ICAP_CTRL_ADDR, d); while (d[ICAP_ST_BUSY]);
        n_reconfig++;
      end
      for (int b = 0; b < N; b++)
        check(but_init[b] == but_table(p, b), $sformatf("phase %0d: BUT %0d table loaded", p, b));

      // run the BIST
      bus_write(BIST_REG_ADDR, 32'(1 << WO_CLEAR));
      bus_write(BIST_REG_ADDR, 32'(1 << WO_RUN));
      polls = 0;
      do begin bus_read(BIST_REG_ADDR, ro); polls++; end
      while (!ro[RO_DONE] && polls < 1000);
      bus_write(BIST_REG_ADDR, 32'h0);
      bus_write(TIMER_CTRL_ADDR, 32'(1 << TMR_STOP));
      check(ro[RO_DONE], $sformatf("phase %0d: BIST done", p));
      check(ro[RO_FAIL] == (expected_flags(p) != 0), $sformatf("phase %0d: pass/fail %0b", p, ro[RO_FAIL]));
      check(ro[RO_ORA_LSB +: N] == expected_flags(p), $sformatf("phase %0d: status ORA flags", p));
      if (ro[RO_FAIL]) n_bist_fail++; else n_bist_pass++;

      // timer: at least the 2**K + 1 pattern clocks of the run
      bus_read(TIMER_VALUE_ADDR, t_phase);
      check(t_phase > 32'(LUT_BITS + 1) + (p > 0 ? 32'(stream_len()) : 0),
            $sformatf("phase %0d: timer %0d clocks", p, t_phase));
      bus_read(TIMER_VALUE_ADDR, d);
      check(d == t_phase, "timer holds when stopped");
      n_timer++;

      // read back the ORA flip-flops through the port
      bus_write(ICAP_DATA_ADDR, 32'hAA99_5566);
      bus_write(ICAP_DATA_ADDR, t1_write(1, 1));
      bus_write(ICAP_DATA_ADDR, 32'(ORA_FAR));
      bus_write(ICAP_DATA_ADDR, t1_read(3, 1));
      do bus_read(ICAP_CTRL_ADDR, d); while (d[ICAP_ST_BUSY]);
      bus_write(ICAP_CTRL_ADDR, 32'h1);
      do bus_read(ICAP_CTRL_ADDR, d); while (!d[ICAP_ST_RD_VALID]);
      bus_read(ICAP_DATA_ADDR, flags);
      bus_write(ICAP_DATA_ADDR, t1_write(4, 1));
      bus_write(ICAP_DATA_ADDR, 32'h0000_000D);
      check(flags[N-1:0] == expected_flags(p), $sformatf("phase %0d: read back ORA flags %b", p, flags[N-1:0]));
      n_readback++;

      // diagnosis: a BUT whose two watching ORAs both failed is faulty
      for (int r = 0; r < ROWS; r++)
        for (int j = 0; j < BPR; j++)
          if (flags[r*BPR + j] && flags[r*BPR + (j + BPR - 1) % BPR]) begin
            check(r*BPR + j == FAULT_BUT && p == FAULT_PHASE, $sformatf("phase %0d: BUT %0d diagnosed", p, r*BPR + j));
            n_diag_ok++;
          end

      // report the time
      do bus_read(UART_STAT_ADDR, d); while (!d[0]);
      uart_expect.push_back(t_phase[7:0]);
      bus_write(UART_DATA_ADDR, {24'b0, t_phase[7:0]});
      $display("phase %0d: %0d clocks, pass/fail=%0b, ORA flags %b", p, t_phase, ro[RO_FAIL], flags[N-1:0]);
    end

    // wait for the last UART frame
    repeat (12 * CPB) @(negedge clk);
    check(uart_expect.size() == 0, "all UART bytes received");

    check(n_reconfig == 5, $sformatf("partial reconfigurations: %0d", n_reconfig));
    check(u_icap.stall_clocks > 0, $sformatf("port stalls: %0d", u_icap.stall_clocks));
    check(n_wait > 0, $sformatf("bus wait states: %0d", n_wait));
    check(n_bist_pass == 5, $sformatf("passing phases: %0d", n_bist_pass));
    check(n_bist_fail == 1, $sformatf("failing phases: %0d", n_bist_fail));
    check(n_readback == 6, $sformatf("read backs: %0d", n_readback));
    check(n_diag_ok == 1, $sformatf("diagnoses: %0d", n_diag_ok));
    check(n_timer == 6, $sformatf("timer measurements: %0d", n_timer));
    check(n_uart == 6, $sformatf("UART bytes: %0d", n_uart));
    $display("mechanisms: reconfig=%0d stalls=%0d waits=%0d pass=%0d fail=%0d readback=%0d diag=%0d timer=%0d uart=%0d",
             n_reconfig, u_icap.stall_clocks, n_wait, n_bist_pass, n_bist_fail, n_readback, n_diag_ok, n_timer, n_uart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
