// soft_bist_top: embedded soft-processor built-in self-test (BIST) system for
// the logic blocks of an FPGA.
//
// Half of the FPGA holds the BIST area: two test pattern generators, rows of
// blocks under test (BUTs) and comparison-based output response analyzers
// (ORAs) in a ring. The other half holds a soft-core processor that runs the
// whole test: it reconfigures the BUTs through the internal configuration
// access port (ICAP) for each test phase, starts and stops the BIST through a
// write-only control register, reads the pass/fail result through a read-only
// status register at the same address, reads the ORA flip-flops back through
// the ICAP for diagnosis, times each phase with a 32-bit timer and reports
// the times over a UART. This module holds everything except the processor
// and the ICAP primitive itself.
//
// Ports:
//  * bus_*    the processor's data bus (the processor is not part of this
//             RTL). A write happens on a clock with bus_we and bus_ready high;
//             bus_ready is low only while a word waits for a busy ICAP. A read
//             (bus_re) returns bus_rdata with bus_rvalid one clock later.
//             Addresses are in bist_pkg: 64 kB of memory from 0, the BIST,
//             ICAP, timer and UART registers from 0x8000_0000.
//  * icap_*   the ICAP primitive's pins (CE and WRITE active low, BUSY).
//  * but_init the truth tables of the BUTs, i.e. the part of the FPGA
//             configuration memory that the ICAP writes.
//  * ora_state the ORA flip-flops, which the configuration logic captures
//             for read back through the ICAP.
//  * uart_txd serial output to the PC.
//
// The block partition and their connections follow the published design;
// the bus, its address map and the register bit assignments are this
// design's own.
//
// The assertion at the end uses the asynchronous reset in its disable clause,
// which lint reports as a reset used both synchronously and asynchronously;
// it only gates the check and drives no logic.
module soft_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned ROWS              = 3,
  parameter int unsigned BUTS_PER_ROW      = 4,
  parameter int unsigned LUT_K             = 6,
  parameter int unsigned MEM_BYTES         = 65536,
  parameter int unsigned UART_CLKS_PER_BIT = 868,
  parameter bit          ICAP_BIT_SWAP     = 1'b1,
  localparam int unsigned NUM_BUT          = ROWS * BUTS_PER_ROW
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // processor bus
  input  logic [31:0]                       bus_addr,
  input  logic [31:0]                       bus_wdata,
  input  logic [3:0]                        bus_be,
  input  logic                              bus_we,
  input  logic                              bus_re,
  output logic                              bus_ready,
  output logic [31:0]                       bus_rdata,
  output logic                              bus_rvalid,
  // ICAP primitive
  output logic                              icap_ce_n,
  output logic                              icap_write_n,
  output logic [31:0]                       icap_i,
  input  logic [31:0]                       icap_o,
  input  logic                              icap_busy,
  // configuration memory of the BIST area and captured ORA states
  input  logic [NUM_BUT-1:0][2**LUT_K-1:0]  but_init,
  output logic [NUM_BUT-1:0]                ora_state,
  // UART
  output logic                              uart_txd
);

  localparam int unsigned MEM_AW = $clog2(MEM_BYTES / 4);

  // ---------------------------------------------------------------- decode
  logic mem_sel, bist_sel, icap_data_sel, icap_ctrl_sel;
  logic tmr_ctrl_sel, tmr_val_sel, uart_data_sel, uart_stat_sel;

  always_comb begin
    mem_sel       = (bus_addr < 32'(MEM_BYTES));
    bist_sel      = (bus_addr == BIST_REG_ADDR);
    icap_data_sel = (bus_addr == ICAP_DATA_ADDR);
    icap_ctrl_sel = (bus_addr == ICAP_CTRL_ADDR);
    tmr_ctrl_sel  = (bus_addr == TIMER_CTRL_ADDR);
    tmr_val_sel   = (bus_addr == TIMER_VALUE_ADDR);
    uart_data_sel = (bus_addr == UART_DATA_ADDR);
    uart_stat_sel = (bus_addr == UART_STAT_ADDR);
  end

  // ---------------------------------------------------------------- memory
  logic [31:0] mem_rdata;

  prog_mem #(.BYTES(MEM_BYTES)) u_mem (
    .clk   (clk),
    .we    (bus_we && mem_sel),
    .re    (bus_re && mem_sel),
    .addr  (bus_addr[MEM_AW+1:2]),
    .be    (bus_be),
    .wdata (bus_wdata),
    .rdata (mem_rdata)
  );

  // ---------------------------------------------------------- BIST registers
  logic [31:0] wo_q;
  logic [31:0] bist_status;
  logic [31:0] ro_rdata;
  logic        bist_done, bist_fail;
  logic [NUM_BUT-1:0] ora_fail;

  wo_register #(.W(32)) u_wo (
    .clk   (clk),
    .rst_n (rst_n),
    .sel   (bist_sel),
    .we    (bus_we),
    .be    (bus_be),
    .wdata (bus_wdata),
    .q     (wo_q)
  );

  bist_array #(
    .ROWS         (ROWS),
    .BUTS_PER_ROW (BUTS_PER_ROW),
    .K            (LUT_K)
  ) u_bist (
    .clk        (clk),
    .rst_n      (rst_n),
    .bist_clear (wo_q[WO_CLEAR]),
    .bist_run   (wo_q[WO_RUN]),
    .init       (but_init),
    .done       (bist_done),
    .fail       (bist_fail),
    .ora_fail   (ora_fail)
  );

  assign ora_state = ora_fail;

  // Status word: done, pass/fail, then as many ORA flags as fit.
  always_comb begin
    bist_status           = '0;
    bist_status[RO_DONE]  = bist_done;
    bist_status[RO_FAIL]  = bist_fail;
    for (int i = 0; i < NUM_BUT && i < 32 - RO_ORA_LSB; i++)
      bist_status[RO_ORA_LSB + i] = ora_fail[i];
  end

  ro_register #(.W(32)) u_ro (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (bist_status),
    .sel   (bist_sel),
    .re    (bus_re),
    .rdata (ro_rdata)
  );

  // ------------------------------------------------------------------- ICAP
  logic        icap_wr_ready, icap_rd_valid, icap_busy_st;
  logic [31:0] icap_rd_data;

  icap_interface #(.BIT_SWAP(ICAP_BIT_SWAP)) u_icap_if (
    .clk          (clk),
    .rst_n        (rst_n),
    .wr_valid     (bus_we && icap_data_sel && icap_wr_ready),
    .wr_ready     (icap_wr_ready),
    .wr_data      (bus_wdata),
    .rd_req       (bus_we && icap_ctrl_sel && bus_wdata[0]),
    .rd_data      (icap_rd_data),
    .rd_valid     (icap_rd_valid),
    .busy         (icap_busy_st),
    .icap_ce_n    (icap_ce_n),
    .icap_write_n (icap_write_n),
    .icap_i       (icap_i),
    .icap_o       (icap_o),
    .icap_busy    (icap_busy)
  );

  assign bus_ready = !(icap_data_sel && !icap_wr_ready);

  // ------------------------------------------------------------------ timer
  logic        tmr_running;
  logic [31:0] tmr_count;
  logic        tmr_cmd;

  assign tmr_cmd = bus_we && tmr_ctrl_sel;

  timer_counter #(.W(32)) u_timer (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (tmr_cmd && bus_wdata[TMR_START]),
    .stop    (tmr_cmd && bus_wdata[TMR_STOP]),
    .clear   (tmr_cmd && bus_wdata[TMR_CLEAR]),
    .running (tmr_running),
    .count   (tmr_count)
  );

  // ------------------------------------------------------------------- UART
  logic uart_ready;

  uart_tx #(.CLKS_PER_BIT(UART_CLKS_PER_BIT)) u_uart (
    .clk   (clk),
    .rst_n (rst_n),
    .valid (bus_we && uart_data_sel),
    .data  (bus_wdata[7:0]),
    .ready (uart_ready),
    .txd   (uart_txd)
  );

  // -------------------------------------------------------------- read mux
  typedef enum logic [2:0] {RD_NONE, RD_MEM, RD_RO, RD_REG} rd_src_t;
  rd_src_t     rd_src;
  logic [31:0] reg_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_src     <= RD_NONE;
      reg_rdata  <= '0;
      bus_rvalid <= 1'b0;
    end else begin
      bus_rvalid <= bus_re;
      rd_src     <= RD_NONE;
      reg_rdata  <= '0;
      if (bus_re) begin
        if (mem_sel)       rd_src <= RD_MEM;
        else if (bist_sel) rd_src <= RD_RO;
        else begin
          rd_src <= RD_REG;
          if (icap_data_sel) reg_rdata <= icap_rd_data;
          if (icap_ctrl_sel) begin
            reg_rdata[ICAP_ST_BUSY]     <= icap_busy_st;
            reg_rdata[ICAP_ST_RD_VALID] <= icap_rd_valid;
          end
          if (tmr_ctrl_sel)  reg_rdata <= {31'b0, tmr_running};
          if (tmr_val_sel)   reg_rdata <= tmr_count;
          if (uart_stat_sel) reg_rdata <= {31'b0, uart_ready};
        end
      end
    end
  end

  always_comb begin
    unique case (rd_src)
      RD_MEM:  bus_rdata = mem_rdata;
      RD_RO:   bus_rdata = ro_rdata;
      RD_REG:  bus_rdata = reg_rdata;
      default: bus_rdata = '0;
    endcase
  end

  a_one_access: assert property (@(posedge clk) disable iff (!rst_n)
    !(bus_we && bus_re));

endmodule
