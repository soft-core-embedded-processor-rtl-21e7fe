// icap_interface_tb: self-checking test of the configuration-port interface.
//
// A small port model raises BUSY at random while words are written and for a
// few clocks before each read word. The test checks that every written word
// reaches the port exactly once, in order, with the bit order reversed inside
// each byte (Virtex-5 build); that with BUSY low a burst of words reaches the
// port at one word per clock; that a read returns the port's word in processor
// bit order; and that the port's strobes follow the CE/WRITE convention. A
// second instance built for Virtex-4 (no reordering) checks that words pass
// unchanged.
module icap_interface_tb;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_ready, rd_req = 0, rd_valid, busy;
  logic [31:0] wr_data = 0, rd_data;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [31:0] icap_i, icap_o;
  int checks = 0, failures = 0;
  int stalls = 0;
  bit random_busy = 0;
  int read_delay = 0;

  icap_interface #(.BIT_SWAP(1'b1)) dut (.*);

  // Virtex-4 build: words pass in processor order. It shares the port inputs
  // and sees writes only while `v4_on` is set.
  logic v4_on = 0, v4_ce_n, v4_write_n, v4_wr_ready, v4_rd_valid, v4_busy;
  logic [31:0] v4_i, v4_rd_data;
  icap_interface #(.BIT_SWAP(1'b0)) dut_v4 (
    .clk, .rst_n, .wr_valid(wr_valid && v4_on), .wr_ready(v4_wr_ready), .wr_data,
    .rd_req(rd_req && v4_on), .rd_data(v4_rd_data), .rd_valid(v4_rd_valid), .busy(v4_busy),
    .icap_ce_n(v4_ce_n), .icap_write_n(v4_write_n), .icap_i(v4_i), .icap_o,
    .icap_busy(1'b0));

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

  // Port model: words accepted on clocks with CE and WRITE low and BUSY low.
  logic [31:0] port_words [$];
  logic [31:0] port_read_word;
  always @(negedge clk) begin
    if (!icap_ce_n && icap_write_n) begin
      if (read_delay > 0) begin icap_busy = 1; read_delay--; end
      else icap_busy = 0;
    end else begin
      icap_busy = random_busy && ($urandom_range(0, 2) == 0);
    end
    if (icap_busy && !icap_ce_n && !icap_write_n) stalls++;
    icap_o = port_read_word;
  end
  always @(posedge clk)
    if (rst_n && !icap_ce_n && !icap_write_n && !icap_busy) port_words.push_back(icap_i);

  task automatic write_words(input int n, input bit stall, output int clocks);
    logic [31:0] sent [$];
    int i = 0;
    random_busy = stall;
    port_words.delete();
    clocks = 0;
    @(negedge clk);
    #1;
    while (i < n) begin
      if (wr_ready) begin
        wr_data  = $urandom;
        wr_valid = 1;
        sent.push_back(wr_data);
        i++;
      end
      @(negedge clk);
      clocks++;
      wr_valid = 0;
      #1;
    end
    // drain
    while (busy) begin @(negedge clk); clocks++; end
    random_busy = 0;
    check(port_words.size() == n, $sformatf("%0d words reached the port, expected %0d", port_words.size(), n));
    for (int k = 0; k < n && k < port_words.size(); k++)
      check(port_words[k] == icap_bitswap(sent[k]), $sformatf("word %0d: %h expected %h", k, port_words[k], icap_bitswap(sent[k])));
  endtask

  initial begin
    int clocks;
    icap_busy = 0; icap_o = 0; port_read_word = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(icap_ce_n && icap_write_n, "idle strobes");
    // Burst with BUSY low: one word per clock (plus the clock to drain).
    write_words(41, 0, clocks);
    check(clocks == 41 + 1, $sformatf("41-word burst took %0d clocks, expected 42", clocks));
    // Burst with random BUSY: every word still arrives once, in order.
    write_words(200, 1, clocks);
    check(stalls > 0, "port stalled at least once");
    // Reads with a few BUSY clocks before the data.
    for (int r = 0; r < 10; r++) begin
      automatic logic [31:0] w = $urandom;
      port_read_word = icap_bitswap(w);
      read_delay = $urandom_range(0, 4);
      rd_req = 1; @(negedge clk); rd_req = 0;
      check(!icap_ce_n && icap_write_n, "read strobes");
      repeat (10) begin if (!rd_valid) @(negedge clk); end
      check(rd_valid && rd_data == w, $sformatf("read %0d: %h expected %h", r, rd_data, w));
    end
    // Virtex-4 build (port never busy): a written word appears unchanged on
    // the next clock, and a read word is returned unchanged.
    v4_on = 1;
    for (int r = 0; r < 10; r++) begin
      automatic logic [31:0] w = $urandom;
      wr_data = w; wr_valid = 1; @(negedge clk); wr_valid = 0;
      check(!v4_ce_n && !v4_write_n && v4_i == w, $sformatf("v4 write %0d: %h expected %h", r, v4_i, w));
      @(negedge clk);
      port_read_word = w; read_delay = 0;
      rd_req = 1; @(negedge clk); rd_req = 0;
      repeat (10) begin if (!v4_rd_valid) @(negedge clk); end
      check(v4_rd_valid && v4_rd_data == w, $sformatf("v4 read %0d: %h expected %h", r, v4_rd_data, w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
