// column_select: the I/O circuit and column select block.
//
// The 256 columns form eight groups of 32, one group per data bit: column
// b*32 + c holds bit b of the words whose column address is c. A 5-to-32
// column decoder turns A<11:7> into a one-hot select c. On a read, eight
// 32-to-1 multiplexers (one per bit group) pass the BL level of column c of
// each group to rd_data_o. On a write, the write drivers of exactly those
// eight columns are enabled (col_wr_o) and each is given its data bit
// (col_din_o); all other columns keep their drivers off. The decoder and
// multiplexer sizes follow the specification; grouping the columns by bit
// (rather than interleaving them) is this design's choice.
// Combinational, zero latency.
module column_select #(
  parameter int unsigned COL_ADDR_BITS = sram_pkg::COL_ADDR_BITS,
  parameter int unsigned WORD_BITS     = sram_pkg::WORD_BITS
) (
  input  logic [COL_ADDR_BITS-1:0]                      col_addr_i,
  input  logic                                          wr_en_i,
  input  logic [WORD_BITS-1:0]                          din_i,
  input  logic [WORD_BITS*(1<<COL_ADDR_BITS)-1:0]       bl_i,
  output logic [WORD_BITS*(1<<COL_ADDR_BITS)-1:0]       col_wr_o,
  output logic [WORD_BITS*(1<<COL_ADDR_BITS)-1:0]       col_din_o,
  output logic [WORD_BITS-1:0]                          rd_data_o
);
  localparam int unsigned NSEL = 1 << COL_ADDR_BITS;

  logic [NSEL-1:0] col_sel;

  col_decoder #(.ADDR_BITS(COL_ADDR_BITS)) u_dec (
    .addr    (col_addr_i),
    .col_sel (col_sel)
  );

  for (genvar b = 0; b < WORD_BITS; b++) begin : g_bit
    mux32 #(.N(NSEL)) u_mux (
      .d   (bl_i[b*NSEL +: NSEL]),
      .sel (col_sel),
      .y   (rd_data_o[b])
    );
    assign col_wr_o[b*NSEL +: NSEL]  = col_sel & {NSEL{wr_en_i}};
    assign col_din_o[b*NSEL +: NSEL] = {NSEL{din_i[b]}};
  end
endmodule
