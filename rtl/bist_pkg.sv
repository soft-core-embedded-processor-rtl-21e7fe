// bist_pkg: constants and helpers shared by the embedded-processor BIST system.
//
// The soft-core processor reaches the BIST hardware through memory-mapped
// registers on a simple 32-bit bus. This package fixes that address map, the
// bit positions inside the BIST control (write-only) and status (read-only)
// registers, the timer command bits, and the per-byte bit reversal that the
// Virtex-5 configuration access port expects. The 32-bit data width and the
// shared address of the two BIST registers follow the published design; the
// address values and bit positions are this design's own choice.
package bist_pkg;

  localparam int unsigned ADDR_W = 32;

  // Address map. Program/data memory sits at the bottom of the space,
  // peripherals at 0x8000_0000 and up.
  localparam logic [ADDR_W-1:0] BIST_REG_ADDR    = 32'h8000_0000; // write: WO, read: RO
  localparam logic [ADDR_W-1:0] ICAP_DATA_ADDR   = 32'h8000_0010; // write: word to port, read: last word read
  localparam logic [ADDR_W-1:0] ICAP_CTRL_ADDR   = 32'h8000_0014; // write bit0: read one word; read: status
  localparam logic [ADDR_W-1:0] TIMER_CTRL_ADDR  = 32'h8000_0020; // write: start/stop/clear
  localparam logic [ADDR_W-1:0] TIMER_VALUE_ADDR = 32'h8000_0024; // read: count
  localparam logic [ADDR_W-1:0] UART_DATA_ADDR   = 32'h8000_0030; // write: byte to send
  localparam logic [ADDR_W-1:0] UART_STAT_ADDR   = 32'h8000_0034; // read bit0: transmitter ready

  // Write-only BIST control register bits.
  localparam int unsigned WO_CLEAR = 0; // clear pattern generators, BUT flip-flops and ORAs
  localparam int unsigned WO_RUN   = 1; // apply patterns and compare

  // Read-only BIST status register bits.
  localparam int unsigned RO_DONE    = 0; // all patterns applied and compared
  localparam int unsigned RO_FAIL    = 1; // single pass/fail indication (OR of all ORAs)
  localparam int unsigned RO_ORA_LSB = 2; // individual ORA flags from here up, as many as fit

  // ICAP status bits read at ICAP_CTRL_ADDR.
  localparam int unsigned ICAP_ST_BUSY     = 0; // a word is waiting for the port
  localparam int unsigned ICAP_ST_RD_VALID = 1; // a read word is available

  // Timer command bits written to TIMER_CTRL_ADDR.
  localparam int unsigned TMR_START = 0;
  localparam int unsigned TMR_STOP  = 1;
  localparam int unsigned TMR_CLEAR = 2;

  // Reverse the bit order inside each byte of a 32-bit word. Virtex-5's
  // internal configuration port takes words in this order; Virtex-4's does not.
  function automatic logic [31:0] icap_bitswap(input logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 8; i++)
        r[8*b + i] = w[8*b + 7 - i];
    return r;
  endfunction

endpackage
