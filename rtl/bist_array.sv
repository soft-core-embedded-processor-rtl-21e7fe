// bist_array: the BIST area, rows of blocks under test (BUTs) checked by
// comparison-based output response analyzers (ORAs) in a circular arrangement.
//
// Two identical test pattern generators (TPGs) drive alternating columns: BUTs
// in even columns get TPG 0's patterns, BUTs in odd columns TPG 1's. In each
// row, ORA j compares BUT j with BUT (j+1) mod BUTS_PER_ROW, so the row closes
// into a ring: every BUT is watched by two ORAs and every ORA compares two BUTs
// fed by different generators. A faulty BUT k therefore sets ORAs k-1 and k of
// its row, while a faulty generator sets every ORA. This ring of comparisons,
// the two generators and the three rows of four BUTs and four ORAs follow the
// published block diagram; the column split between the two generators and
// the exhaustive patterns are this design's choices.
//
// Interface: `bist_clear` restarts the test, `bist_run` lets the generators step
// and the ORAs compare. `init` holds the truth table of every BUT, as the
// configuration memory would; BUT (r, j) is entry r*BUTS_PER_ROW + j, and so
// is its ORA in `ora_fail`. `fail` is the OR of all ORA flags, the single
// pass/fail result.
//
// Timing: with `bist_run` held high after a clear, `done` rises 2**K + 1 clocks
// after the first run clock, once the last pattern has passed the BUT
// flip-flops and been compared.
module bist_array #(
  parameter int unsigned ROWS         = 3,
  parameter int unsigned BUTS_PER_ROW = 4,
  parameter int unsigned K            = 6,
  localparam int unsigned NUM_BUT     = ROWS * BUTS_PER_ROW
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          bist_clear,
  input  logic                          bist_run,
  input  logic [NUM_BUT-1:0][2**K-1:0]  init,
  output logic                          done,
  output logic                          fail,
  output logic [NUM_BUT-1:0]            ora_fail
);

  logic [K-1:0]  pat [2];
  logic [1:0]    tpg_done;
  logic [1:0]    but_out [NUM_BUT];
  logic          done_q;

  for (genvar t = 0; t < 2; t++) begin : g_tpg
    tpg #(.WIDTH(K)) u_tpg (
      .clk     (clk),
      .rst_n   (rst_n),
      .clear   (bist_clear),
      .en      (bist_run),
      .pattern (pat[t]),
      .done    (tpg_done[t])
    );
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar j = 0; j < BUTS_PER_ROW; j++) begin : g_col
      localparam int unsigned IDX  = r * BUTS_PER_ROW + j;
      localparam int unsigned NEXT = r * BUTS_PER_ROW + ((j + 1) % BUTS_PER_ROW);

      but_cell #(.K(K)) u_but (
        .clk   (clk),
        .rst_n (rst_n),
        .clear (bist_clear),
        .init  (init[IDX]),
        .in    (pat[j % 2]),
        .out   (but_out[IDX])
      );

      ora #(.W(2)) u_ora (
        .clk   (clk),
        .rst_n (rst_n),
        .clear (bist_clear),
        .en    (bist_run),
        .a     (but_out[IDX]),
        .b     (but_out[NEXT]),
        .fail  (ora_fail[IDX])
      );
    end
  end

  // One extra clock after the generators finish lets the last pattern's
  // flip-flop output reach the ORAs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          done_q <= 1'b0;
    else if (bist_clear) done_q <= 1'b0;
    else if (bist_run)   done_q <= &tpg_done;
  end

  assign done = done_q;
  assign fail = |ora_fail;

  // The ring needs an even number of BUTs per row so that neighbours always
  // come from different generators.
  initial begin
    assert (BUTS_PER_ROW >= 2 && BUTS_PER_ROW % 2 == 0)
      else $error("bist_array: BUTS_PER_ROW must be even and at least 2");
  end

endmodule
