// mux32: 32-to-1 multiplexer of the column select block.
//
// One instance per data bit picks the bit line of the addressed column out of
// its 32-column group and hands it to the data output. The select is the
// one-hot output of the column decoder, so the multiplexer is an AND-OR tree
// (the logic equivalent of a row of pass gates on a shared output node): the
// output is the OR over all inputs of (input AND select). With an all-zero
// select the output is 0. Combinational, zero latency.
//
// Ports: d (N) data inputs, sel (N) one-hot select, y output.
module mux32 #(
  parameter int unsigned N = sram_pkg::COLS_PER_BIT
) (
  input  logic [N-1:0] d,
  input  logic [N-1:0] sel,
  output logic         y
);
  assign y = |(d & sel);
endmodule
