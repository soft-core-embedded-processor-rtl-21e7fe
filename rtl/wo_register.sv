// wo_register: memory-mapped write-only BIST control register.
//
// The processor writes it; its outputs drive the inputs of the BIST logic
// directly (here the clear and run controls of the BIST area). There is no read
// path: a read of the same address returns the read-only status register
// instead. That the register is write-only, shares its address with the status
// register and wires straight to the BIST inputs follows the published design;
// the 32-bit width, byte enables and reset value of zero are this design's
// choices.
//
// Timing: a write with `we` and `sel` high updates `q` at the same clock edge.
module wo_register #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sel,
  input  logic           we,
  input  logic [W/8-1:0] be,
  input  logic [W-1:0]   wdata,
  output logic [W-1:0]   q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (sel && we) begin
      for (int b = 0; b < W/8; b++)
        if (be[b]) q[8*b +: 8] <= wdata[8*b +: 8];
    end
  end

endmodule
