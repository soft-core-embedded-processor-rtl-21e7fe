// prog_mem: on-chip program and data memory of the soft-core processor.
//
// A single-port RAM of BYTES bytes organised as 32-bit words with byte write
// enables, which a synthesis tool maps onto block RAM. It holds the BIST
// program and the compressed partial configuration data that the processor
// sends to the configuration port. The 64 kB size follows the published
// design; the single port and word organisation are this design's choices.
//
// Timing: writes take effect at the clock edge; a read returns the word one
// clock after `re`, and `rdata` holds it until the next read.
module prog_mem #(
  parameter int unsigned BYTES = 65536,
  localparam int unsigned WORDS = BYTES / 4,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  logic [3:0]    be,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < 4; b++)
        if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
    end
    if (re) rdata <= mem[addr];
  end

endmodule
