// icap_model: behavioural model (not synthesizable) of the FPGA's internal
// configuration access port together with the small part of the
// configuration logic and configuration memory that the BIST system uses.
//
// It understands a reduced form of the Virtex-5 configuration packet stream:
// a sync word 0xAA99_5566 starts a session; type-1 packet headers
// ([31:29] = 3'b001, [28:27] opcode 1 = read / 2 = write, [17:13] register,
// [10:0] word count) write the frame address register (FAR, 1), write frame
// data (FDRI, 2), request frame data read back (FDRO, 3) or write the command
// register (CMD, 4; 0x0D = desync ends the session). Frames are FRAME_WORDS
// words long and the flat memory address is FAR * FRAME_WORDS + word.
//
// Memory layout: the truth table of BUT b is {word 2b+1, word 2b} from frame
// 0 on; the frame after those holds no memory but returns the captured ORA
// flip-flops (32 per word) on read back.
//
// Port timing: words are taken on clocks with CE and WRITE low and BUSY low;
// while `stall_en` is set BUSY is raised at random, for 1 to 4 clocks, outside
// reads. On a read, BUSY stays high for READ_LAT + 1 clocks, then falls with the word on `o`;
// the word is consumed on the next clock. Words on `i` and `o` are in the
// port's bit order (bits reversed inside each byte when BIT_SWAP is set).
module icap_model #(
  parameter int unsigned NUM_BUT     = 12,
  parameter int unsigned LUT_BITS    = 64,
  parameter int unsigned FRAME_WORDS = 41,
  parameter int unsigned READ_LAT    = 2,
  parameter bit          BIT_SWAP    = 1'b1
) (
  input  logic                               clk,
  input  logic                               ce_n,
  input  logic                               write_n,
  input  logic [31:0]                        i,
  output logic [31:0]                        o,
  output logic                               busy,
  input  logic                               stall_en,
  input  logic [NUM_BUT-1:0]                 ora_state,
  output logic [NUM_BUT-1:0][LUT_BITS-1:0]   but_init
);
  localparam int unsigned LUT_WORDS = (NUM_BUT * LUT_BITS + 31) / 32;
  localparam int unsigned ORA_FAR   = (LUT_WORDS + FRAME_WORDS - 1) / FRAME_WORDS;
  localparam int unsigned MEM_WORDS = (ORA_FAR + 1) * FRAME_WORDS;

  logic [31:0] cfg_mem [MEM_WORDS];

  // statistics for the testbench
  int words_written = 0;
  int frames_words_written = 0;
  int words_read = 0;
  int stall_clocks = 0;
  int syncs = 0;

  typedef enum {UNSYNCED, HEADER, FAR_DATA, FDRI_DATA, CMD_DATA} pstate_t;
  pstate_t pstate = UNSYNCED;
  int unsigned far = 0;
  int unsigned wr_left = 0, wr_ptr = 0;
  int unsigned rd_left = 0, rd_ptr = 0;
  bit in_read = 0;
  int lat = 0;
  int stall_left = 0;

  function automatic logic [31:0] order(input logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < 8; k++) r[8*b + k] = w[8*b + 7 - k];
    return BIT_SWAP ? r : w;
  endfunction

  function automatic logic [31:0] read_word(input int unsigned a);
    logic [NUM_BUT+31:0] padded;
    if (a >= ORA_FAR * FRAME_WORDS) begin
      padded = {32'b0, ora_state};
      return padded[32*(a - ORA_FAR*FRAME_WORDS) +: 32];
    end
    return cfg_mem[a];
  endfunction

  initial begin
    for (int k = 0; k < MEM_WORDS; k++) cfg_mem[k] = '0;
    busy = 1'b0;
    o = '0;
  end

  for (genvar b = 0; b < NUM_BUT; b++) begin : g_init
    for (genvar w = 0; w < LUT_BITS / 32; w++) begin : g_w
      assign but_init[b][32*w +: 32] = cfg_mem[b * (LUT_BITS / 32) + w];
    end
  end

  task automatic take_word(input logic [31:0] w);
    words_written++;
    case (pstate)
      UNSYNCED: if (w == 32'hAA99_5566) begin pstate = HEADER; syncs++; end
      HEADER: begin
        if (w[31:29] == 3'b001 && w[28:27] == 2'b10) begin
          wr_left = 32'(w[10:0]);
          case (w[17:13])
            5'd1: pstate = FAR_DATA;
            5'd2: begin pstate = FDRI_DATA; wr_ptr = far * FRAME_WORDS; end
            5'd4: pstate = CMD_DATA;
            default: pstate = HEADER;
          endcase
          if (wr_left == 0) pstate = HEADER;
        end else if (w[31:29] == 3'b001 && w[28:27] == 2'b01 && w[17:13] == 5'd3) begin
          rd_left = 32'(w[10:0]);
          rd_ptr  = far * FRAME_WORDS;
        end
      end
      FAR_DATA: begin far = w; if (--wr_left == 0) pstate = HEADER; end
      FDRI_DATA: begin
        if (wr_ptr < MEM_WORDS) cfg_mem[wr_ptr] = w;
        wr_ptr++;
        frames_words_written++;
        if (--wr_left == 0) pstate = HEADER;
      end
      CMD_DATA: begin
        if (--wr_left == 0) pstate = HEADER;
        if (w == 32'h0000_000D) pstate = UNSYNCED;
      end
      default: pstate = UNSYNCED;
    endcase
  endtask

  always @(posedge clk) begin
    if (!ce_n && write_n) begin
      if (!in_read) begin
        in_read = 1; busy <= 1'b1; lat = READ_LAT;
      end else if (!busy) begin
        words_read++;
        rd_ptr++;
        if (rd_left > 0) rd_left--;
        busy <= 1'b1; lat = READ_LAT;
      end else if (lat > 0) begin
        lat--;
      end else begin
        o    <= order(rd_left > 0 ? read_word(rd_ptr) : 32'h0);
        busy <= 1'b0;
      end
    end else begin
      in_read = 0;
      if (!ce_n && !write_n) begin
        if (!busy) take_word(order(i));
        else       stall_clocks++;
      end
      // stalls of 1 to 4 clocks start at random while stalling is enabled
      if (stall_left > 0) begin
        stall_left--;
        busy <= 1'b1;
      end else if (stall_en && $urandom_range(0, 5) == 0) begin
        stall_left = $urandom_range(0, 3);
        busy <= 1'b1;
      end else begin
        busy <= 1'b0;
      end
    end
  end
endmodule
