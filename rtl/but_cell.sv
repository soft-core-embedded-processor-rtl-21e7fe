// but_cell: model of one block under test (BUT), a configurable logic element.
//
// A K-input look-up table whose truth table `init` is set by the configuration
// memory, followed by a flip-flop that registers the table output. Both the
// combinational and the registered outputs are brought out, as `out[0]` and
// `out[1]`, so that the comparators check the look-up table and the flip-flop.
// The published design tests the logic blocks of the FPGA in many modes that
// are loaded by partial reconfiguration; here a mode is simply a new truth
// table. The LUT-plus-flip-flop structure and K = 6 (the Virtex-5 LUT size) are
// this design's own modelling choices.
//
// Timing: out[0] follows `in` combinationally; out[1] is out[0] one clock
// later. `clear` synchronously zeroes the flip-flop.
module but_cell #(
  parameter int unsigned K = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [2**K-1:0]   init,
  input  logic [K-1:0]      in,
  output logic [1:0]        out
);

  logic lut_out;
  logic ff_q;

  assign lut_out = init[in];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ff_q <= 1'b0;
    else if (clear) ff_q <= 1'b0;
    else            ff_q <= lut_out;
  end

  assign out = {ff_q, lut_out};

endmodule
