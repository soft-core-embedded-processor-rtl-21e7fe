// tpg: exhaustive test pattern generator for the blocks under test (BUTs).
//
// Counts from zero through every value of a WIDTH-bit input vector, one new
// pattern per clock while `en` is high, then holds the last pattern and raises
// `done`. The BIST area uses two identical generators that feed alternating
// columns of BUTs, so a fault inside one generator shows up as a mismatch at the
// comparators. That two generators feed identical patterns to alternating
// BUTs follows the published architecture; the counting (exhaustive) pattern
// set and the width default of 6 (one 6-input LUT) are this design's choice.
//
// Interface: `clear` is a synchronous restart to pattern 0. After a clear,
// `done` rises on the clock edge that follows the 2**WIDTH-th enabled clock.
module tpg #(
  parameter int unsigned WIDTH = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  output logic [WIDTH-1:0] pattern,
  output logic             done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pattern <= '0;
      done    <= 1'b0;
    end else if (clear) begin
      pattern <= '0;
      done    <= 1'b0;
    end else if (en && !done) begin
      if (pattern == '1) done <= 1'b1;
      else               pattern <= pattern + 1'b1;
    end
  end

endmodule
