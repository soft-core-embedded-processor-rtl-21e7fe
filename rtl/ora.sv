// ora: comparison-based output response analyzer (ORA).
//
// Compares the outputs of two blocks under test every enabled clock and sets a
// sticky fail flag on the first mismatch. The flag stays set until `clear`, so
// it can be read back after the test phase for fault diagnosis. Comparing two
// BUTs against each other (rather than against stored good responses) follows
// the published architecture; the sticky flag is this design's reading of it.
//
// Timing: a mismatch sampled at a clock edge with `en` high shows in `fail`
// right after that edge.
module ora #(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         fail
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 fail <= 1'b0;
    else if (clear)             fail <= 1'b0;
    else if (en && (a != b))    fail <= 1'b1;
  end

endmodule
