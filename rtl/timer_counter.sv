// timer_counter: 32-bit hardware timer/counter for measuring a test phase.
//
// The processor starts it at the beginning of a test phase and stops it at
// the end; the count is then the number of clocks the phase took
// (reconfiguration, test execution and read back of the ORAs), which the
// processor reads and reports. Start, stop and clear are single-clock commands;
// clear wins over start, and start over stop when given together. The 32-bit
// width and the start/stop use follow the published design; the command
// encoding and wrap-around at the top of the range are this design's choices.
//
// Timing: the count increases by one on every clock edge while running,
// starting with the edge after the start command.
module timer_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         stop,
  input  logic         clear,
  output logic         running,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      count   <= '0;
    end else begin
      if (clear)        count <= '0;
      else if (running) count <= count + 1'b1;

      if (start)        running <= 1'b1;
      else if (stop)    running <= 1'b0;
    end
  end

endmodule
