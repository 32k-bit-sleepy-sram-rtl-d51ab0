// col_decoder: the 5-to-32 column decoder of the column select block.
//
// Turns the column address A<11:7> into a one-hot vector of 32 column
// selects; output bit n is high exactly when the address equals n. The same
// 32 selects serve all eight bit groups of the array: they steer both the
// 32-to-1 read multiplexers and the write drivers of the chosen column.
// Purely combinational, zero latency. The 5-to-32 size is the specified one.
//
// Ports: addr (ADDR_BITS) in, col_sel (2**ADDR_BITS) out.
module col_decoder #(
  parameter int unsigned ADDR_BITS = sram_pkg::COL_ADDR_BITS
) (
  input  logic [ADDR_BITS-1:0]      addr,
  output logic [(1<<ADDR_BITS)-1:0] col_sel
);
  localparam int unsigned N = 1 << ADDR_BITS;

  // Binary-to-one-hot by shifting a single one into place.
  assign col_sel = N'(1) << addr;
endmodule
