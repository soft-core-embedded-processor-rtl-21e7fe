// ro_register: memory-mapped read-only BIST status register.
//
// Its inputs are the outputs of the BIST logic. It samples them every clock
// (which also keeps the bus read path free of the BIST area's logic) and, on a
// read at its address, returns the sampled word. It shares its address with the
// write-only control register. That follows the published design; the
// per-clock sampling, the 32-bit width and the registered read are this
// design's choices.
//
// Timing: `rdata` holds the BIST outputs as they were two clocks before the
// read completes: one clock for the sample, one for the read.
module ro_register #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         sel,
  input  logic         re,
  output logic [W-1:0] rdata
);

  logic [W-1:0] sample;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample <= '0;
      rdata  <= '0;
    end else begin
      sample <= d;
      if (sel && re) rdata <= sample;
    end
  end

endmodule
