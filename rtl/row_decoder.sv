// row_decoder: the 7-to-128 row decoder of the row select block.
//
// Turns the row address A<6:0> into a one-hot vector of word-line selects:
// output bit n is high exactly when the address equals n. The decoder is
// purely combinational and has no enable; the precharge/evaluate phase is
// applied to the word lines afterwards (see sram_array). The one-hot code and
// the 7-to-128 size follow the specification; N is a parameter so that the
// same block can be exercised at other sizes.
//
// Ports: addr (ADDR_BITS) in, wl_sel (2**ADDR_BITS) out. Zero latency.
module row_decoder #(
  parameter int unsigned ADDR_BITS = sram_pkg::ROW_ADDR_BITS
) (
  input  logic [ADDR_BITS-1:0]      addr,
  output logic [(1<<ADDR_BITS)-1:0] wl_sel
);
  always_comb begin
    for (int unsigned i = 0; i < (1 << ADDR_BITS); i++)
      wl_sel[i] = (addr == ADDR_BITS'(i));
  end
endmodule
