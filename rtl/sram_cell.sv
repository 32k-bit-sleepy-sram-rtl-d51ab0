// sram_cell: logic model of one SRAM cell, ordinary 6T or sleepy 10T.
//
// The cell is a cross-coupled inverter pair reached through two access
// transistors gated by the word line WL. In the sleepy variant each inverter
// also has a high-threshold sleep transistor in series with its pull-up and
// pull-down network; those only lower leakage and add delay, so both variants
// behave identically as logic and SLEEPY is kept as a label of the cell's
// place in the sleepy partition.
//
// Read: with WL high the cell discharges the bit line on the side of its 0
// node: pull_bl_o is high when it stores 0 (BL pulled low), pull_blb_o when
// it stores 1 (BL_b pulled low). With WL low it leaves both lines alone.
// Write: a column write driver overpowers the cell by pulling exactly one bit
// line low; with WL high the cell then takes the value of BL
// (drv_bl_low_i -> 0, drv_blb_low_i -> 1). The stored bit is a level-sensitive
// latch: the cell has no clock and no reset, and holds its value for as long
// as WL is low. The latch is the intended storage element.
module sram_cell #(
  parameter bit SLEEPY = 1'b0
) (
  input  logic wl_i,          // word line
  input  logic drv_bl_low_i,  // write driver pulls BL low (write 0)
  input  logic drv_blb_low_i, // write driver pulls BL_b low (write 1)
  output logic pull_bl_o,     // cell discharges BL
  output logic pull_blb_o,    // cell discharges BL_b
  output logic q_o            // stored bit (node on the BL side)
);
  logic q;

  always_latch begin
    if (wl_i && (drv_bl_low_i != drv_blb_low_i))
      q = drv_blb_low_i;
  end

  assign pull_bl_o  = wl_i & ~q;
  assign pull_blb_o = wl_i &  q;
  assign q_o        = q;
endmodule
