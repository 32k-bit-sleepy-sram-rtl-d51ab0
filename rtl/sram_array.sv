// sram_array: the 128-row by 256-column memory array.
//
// The array is COLS sram_column instances side by side, sharing the word
// lines and the precharge signal. The decoded row selects are ANDed with the
// word-line enable (the evaluate phase) here, at the word-line drivers, so at
// most one word line is high and none during precharge; an assertion checks
// the first of these.
//
// The array is split into two partitions along the bit lines. Rows
// 0 .. SLEEPY_ROWS-1, the rows nearest the column circuitry and data output,
// use sleepy cells; the remaining rows, farther along the bit lines, use
// ordinary cells. The default SLEEPY_ROWS = 64 is the 50 % sleepy partition
// (16384 sleepy and 16384 ordinary cells). Setting it to 0, 32, 96 or 128
// gives the other partitions (0 %, 25 %, 75 %, 100 %). The partition changes
// leakage and delay, not logic.
//
// Ports: precharge_i, wl_en_i, wl_sel_i[ROWS] (one-hot row), col_wr_i[COLS]
// and col_din_i[COLS] (write driver enable and data of every column),
// bl_o / blb_o[COLS] (bit-line levels). No clock; see sram_column for timing.
module sram_array #(
  parameter int unsigned ROWS        = sram_pkg::ROWS,
  parameter int unsigned COLS        = sram_pkg::COLS,
  parameter int unsigned SLEEPY_ROWS = sram_pkg::SLEEPY_ROWS_DEFAULT
) (
  input  logic            precharge_i,
  input  logic            wl_en_i,
  input  logic [ROWS-1:0] wl_sel_i,
  input  logic [COLS-1:0] col_wr_i,
  input  logic [COLS-1:0] col_din_i,
  output logic [COLS-1:0] bl_o,
  output logic [COLS-1:0] blb_o
);
  logic [ROWS-1:0] wl;

  assign wl = wl_sel_i & {ROWS{wl_en_i}};

  // Two rows on one bit line would short their cells together.
  always_comb begin
    assert ((wl & (wl - 1'b1)) == '0)
      else $error("more than one word line high: %h", wl);
  end

  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic [ROWS-1:0] q_unused;
    sram_column #(.ROWS(ROWS), .SLEEPY_ROWS(SLEEPY_ROWS)) u_col (
      .precharge_i (precharge_i),
      .wl_i        (wl),
      .wr_i        (col_wr_i[c]),
      .din_i       (col_din_i[c]),
      .bl_o        (bl_o[c]),
      .blb_o       (blb_o[c]),
      .q_o         (q_unused)
    );
  end
endmodule
