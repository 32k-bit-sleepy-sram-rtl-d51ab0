// control_logic: phase and command decoding for the static SRAM.
//
// The memory has no clock. PHI_b is the bit-line precharge command: it drives
// the gates of the pMOS precharge devices of every column, so the bit lines
// are precharged while PHI_b is low and are free to be evaluated (read or
// written) while PHI_b is high. WRITE selects a write instead of a read.
// From these two pins the block derives
//   precharge = ~PHI_b           bit lines pulled high
//   wl_en     =  PHI_b           word lines may rise (evaluate phase)
//   wr_en     =  PHI_b &  WRITE  write drivers of the selected column on
//   rd_en     =  PHI_b & ~WRITE  data output follows the selected bit line
// Keeping the word lines low during precharge, and gating the write drivers
// and the output stage with the phase, is this design's own choice; the pin
// list and the active-low precharge follow the specification. Combinational.
module control_logic (
  input  logic write_i,    // WRITE pin
  input  logic phi_b_i,    // PHI_b pin, low = precharge
  output logic precharge_o,
  output logic wl_en_o,
  output logic wr_en_o,
  output logic rd_en_o
);
  always_comb begin
    precharge_o = ~phi_b_i;
    wl_en_o     =  phi_b_i;
    wr_en_o     =  phi_b_i &  write_i;
    rd_en_o     =  phi_b_i & ~write_i;
  end
endmodule
