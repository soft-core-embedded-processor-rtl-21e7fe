// uart_tx: serial transmitter used by the processor to report measured test
// times to a connected PC.
//
// Sends one byte as a standard asynchronous frame: a low start bit, eight data
// bits least significant first and a high stop bit, each CLKS_PER_BIT clocks
// long. The published design only names a UART link to the PC; the 8N1 frame
// and the default of 868 clocks per bit (115200 baud from a 100 MHz clock) are
// this design's choices.
//
// Interface: a byte is taken on a clock with `valid` and `ready` both high;
// `ready` is low until its stop bit has ended. `txd` idles high.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  logic [8:0]    shreg;   // {stop, data}: bit 0 is the next bit to put on the line
  logic [3:0]    bits_left;
  logic [CW-1:0] tick;

  assign ready = (bits_left == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      tick      <= '0;
      txd       <= 1'b1;
    end else if (bits_left == 0) begin
      txd <= 1'b1;
      if (valid) begin
        shreg     <= {1'b1, data};
        bits_left <= 4'd10;
        tick      <= '0;
        txd       <= 1'b0;
      end
    end else if (tick == CW'(CLKS_PER_BIT - 1)) begin
      tick      <= '0;
      bits_left <= bits_left - 1'b1;
      shreg     <= {1'b1, shreg[8:1]};
      txd       <= (bits_left == 1) ? 1'b1 : shreg[0];
    end else begin
      tick <= tick + 1'b1;
    end
  end

endmodule
