// icap_interface: processor-side interface to the FPGA's 32-bit internal
// configuration access port (ICAP).
//
// The processor writes configuration words one at a time; each accepted word
// is presented to the port with CE and WRITE low (both active low, as on the
// Xilinx ICAP primitive) on the next clock and held there while the port
// raises BUSY. With BUSY low, words written on consecutive clocks reach the
// port on consecutive clocks: one word per clock, the best case the port
// allows. A read request drives CE low with WRITE high; from the second clock
// of the read on, the interface waits for the port to drop BUSY, then captures
// the port's output word and flags it valid. This is how the ORA flip-flop
// states are read back.
//
// The published design uses the 32-bit port at 100 MHz for partial
// reconfiguration and read back, and notes that Virtex-5 needs its words
// reordered relative to Virtex-4, which is fixed when the interface is built
// for a device family. Here BIT_SWAP = 1 (Virtex-5, the default) reverses the
// bit order inside each byte of every word in both directions; BIT_SWAP = 0
// passes words unchanged (Virtex-4). The one-word holding register, the
// ready/valid handshake and the read sequencing are this design's choices.
//
// Interface: `wr_valid`/`wr_ready` hand over one word; a word offered while
// `wr_ready` is low is not accepted. `rd_req` (taken only in IDLE, when no
// write is pending) starts a read; `rd_valid` rises with the word in `rd_data`
// and falls at the next `rd_req`. `busy` is high while a word waits for the port.
//
// The assertion at the end uses the asynchronous reset in its disable clause,
// which lint reports as a reset used both synchronously and asynchronously;
// it only gates the check and drives no logic.
module icap_interface
  import bist_pkg::*;
#(
  parameter bit BIT_SWAP = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor side
  input  logic        wr_valid,
  output logic        wr_ready,
  input  logic [31:0] wr_data,
  input  logic        rd_req,
  output logic [31:0] rd_data,
  output logic        rd_valid,
  output logic        busy,
  // port side
  output logic        icap_ce_n,
  output logic        icap_write_n,
  output logic [31:0] icap_i,
  input  logic [31:0] icap_o,
  input  logic        icap_busy
);

  typedef enum logic [1:0] {IDLE, WRITE, READ_ISSUE, READ_WAIT} state_t;

  state_t      state;
  logic [31:0] word_q;

  function automatic logic [31:0] order(input logic [31:0] w);
    return BIT_SWAP ? icap_bitswap(w) : w;
  endfunction

  // A pending word leaves the holding register on a clock where BUSY is low.
  assign wr_ready = (state == IDLE) || (state == WRITE && !icap_busy);
  assign busy     = (state == WRITE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      word_q   <= '0;
      rd_data  <= '0;
      rd_valid <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          if (wr_valid) begin
            word_q <= wr_data;
            state  <= WRITE;
          end else if (rd_req) begin
            rd_valid <= 1'b0;
            state    <= READ_ISSUE;
          end
        end
        WRITE: begin
          if (!icap_busy) begin
            if (wr_valid) word_q <= wr_data;
            else          state  <= IDLE;
          end
        end
        // The port needs a clock to see the read before BUSY means anything.
        READ_ISSUE: state <= READ_WAIT;
        READ_WAIT: begin
          if (!icap_busy) begin
            rd_data  <= order(icap_o);
            rd_valid <= 1'b1;
            state    <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign icap_ce_n    = (state == IDLE);
  assign icap_write_n = (state != WRITE);
  assign icap_i       = (state == WRITE) ? order(word_q) : '0;

  // A word must not be offered while the interface cannot take it.
  a_no_write_when_not_ready: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid |-> wr_ready);

endmodule
