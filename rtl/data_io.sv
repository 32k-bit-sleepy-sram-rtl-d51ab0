// data_io: data input buffer and data output stage.
//
// D_IN<7:0> is buffered onto the internal write data bus. D_OUT<7:0> is a
// transparent latch on the read data from the column multiplexers: it follows
// them while rd_en_i is high (evaluate phase of a read) and holds the last
// value read at all other times, so the word read stays valid through the
// following precharge and through writes. The output of an unused memory is
// undefined until the first read. Holding instead of a high-impedance output
// is this design's choice. The latch is the intended storage element.
module data_io #(
  parameter int unsigned WORD_BITS = sram_pkg::WORD_BITS
) (
  input  logic [WORD_BITS-1:0] d_in_i,    // D_IN pins
  input  logic                 rd_en_i,
  input  logic [WORD_BITS-1:0] rd_data_i,
  output logic [WORD_BITS-1:0] wdata_o,
  output logic [WORD_BITS-1:0] d_out_o    // D_OUT pins
);
  logic [WORD_BITS-1:0] dout_q;

  always_latch begin
    if (rd_en_i) dout_q = rd_data_i;
  end

  assign wdata_o = d_in_i;
  assign d_out_o = dout_q;
endmodule
