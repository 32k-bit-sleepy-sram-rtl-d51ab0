// sleepy_sram: 32,768-bit static RAM, 4096 words x 8 bits, with a sleepy
// (leakage-gated) partition.
//
// Pins: A<11:0> address, D_IN<7:0>, D_OUT<7:0>, WRITE, PHI_b. There is no
// clock. An access is one precharge/evaluate pair:
//   1. PHI_b low: all bit lines precharge high; word lines stay low.
//   2. Address (and D_IN, WRITE) set up.
//   3. PHI_b high: the word line of row A<6:0> rises. With WRITE high the
//      write drivers of column A<11:7> in each of the eight bit groups
//      overwrite the cells of that row; with WRITE low the cells discharge
//      their bit lines and D_OUT follows the selected bit lines.
//   4. PHI_b low again ends the access; D_OUT keeps the word read.
// A read that is not preceded by a precharge phase returns stale bit-line
// levels, as in the real dynamic circuit. An assertion flags inputs that
// change while a write is being evaluated.
//
// Blocks: control_logic (phase decoding), row_decoder (7-to-128),
// sram_array (128 x 256 cells in sram_column instances), column_select
// (5-to-32 column decoder, eight 32-to-1 multiplexers, write steering) and
// data_io (input buffer, output latch). SLEEPY_ROWS sets how many rows near
// the output are sleepy cells; 64 (50 %) is the default.
//
// The storage is made of latches (one per cell, one per bit line, one per
// output bit); they are intended. Reads are single-ended from BL, with no
// sense amplifier, so the BL_b levels of the array are not used here.
module sleepy_sram #(
  parameter int unsigned SLEEPY_ROWS = sram_pkg::SLEEPY_ROWS_DEFAULT
) (
  input  logic [sram_pkg::ADDR_BITS-1:0] A,
  input  logic [sram_pkg::WORD_BITS-1:0] D_IN,
  output logic [sram_pkg::WORD_BITS-1:0] D_OUT,
  input  logic                           WRITE,
  input  logic                           PHI_b
);
  import sram_pkg::*;

  logic precharge, wl_en, wr_en, rd_en;
  logic [ROWS-1:0]      wl_sel;
  logic [COLS-1:0]      col_wr, col_din, bl, blb;
  logic [WORD_BITS-1:0] wdata, rd_data;

  control_logic u_ctrl (
    .write_i     (WRITE),
    .phi_b_i     (PHI_b),
    .precharge_o (precharge),
    .wl_en_o     (wl_en),
    .wr_en_o     (wr_en),
    .rd_en_o     (rd_en)
  );

  row_decoder #(.ADDR_BITS(ROW_ADDR_BITS)) u_row_dec (
    .addr   (A[ROW_ADDR_BITS-1:0]),
    .wl_sel (wl_sel)
  );

  sram_array #(.ROWS(ROWS), .COLS(COLS), .SLEEPY_ROWS(SLEEPY_ROWS)) u_array (
    .precharge_i (precharge),
    .wl_en_i     (wl_en),
    .wl_sel_i    (wl_sel),
    .col_wr_i    (col_wr),
    .col_din_i   (col_din),
    .bl_o        (bl),
    .blb_o       (blb)
  );

  column_select #(.COL_ADDR_BITS(COL_ADDR_BITS), .WORD_BITS(WORD_BITS)) u_colsel (
    .col_addr_i (A[ADDR_BITS-1:ROW_ADDR_BITS]),
    .wr_en_i    (wr_en),
    .din_i      (wdata),
    .bl_i       (bl),
    .col_wr_o   (col_wr),
    .col_din_o  (col_din),
    .rd_data_o  (rd_data)
  );

  data_io #(.WORD_BITS(WORD_BITS)) u_io (
    .d_in_i    (D_IN),
    .rd_en_i   (rd_en),
    .rd_data_i (rd_data),
    .wdata_o   (wdata),
    .d_out_o   (D_OUT)
  );

  // Access rule: the inputs of a write are set up during precharge and must
  // not change while the write is being evaluated, or other cells are written.
  always @(A or D_IN or WRITE) begin
    assert (!(PHI_b && WRITE))
      else $error("A, D_IN or WRITE changed during the evaluate phase of a write");
  end
endmodule
