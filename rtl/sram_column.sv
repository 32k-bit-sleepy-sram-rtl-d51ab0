// sram_column: one bit-line pair with its precharge, write driver and cells.
//
// Two weak pMOS devices gated by PHI_b precharge BL and BL_b high. A write
// driver of two nMOS stacks, enabled by the column's WRITE signal, pulls BL
// low when DATA_IN is 0 and BL_b low when DATA_IN is 1. ROWS cells hang on
// the pair; the selected one (its word line high) discharges one of the two
// lines on a read and is overwritten on a write.
//
// Each bit line is a dynamic node, modelled as a set/reset latch: any
// discharge path (a cell or the write driver) pulls it to 0, and it returns
// to 1 only through precharge. Discharge wins over precharge, since the
// precharge devices are sized weak so that a write is not slowed. A line
// that is neither discharged nor precharged keeps its level, as the real
// capacitance does, so a read must be preceded by a precharge phase.
//
// Rows 0 .. SLEEPY_ROWS-1 are sleepy cells (the rows nearest the column
// circuitry and output), the rest ordinary cells. Which row indices lie near
// the output is this design's choice; the partition itself follows the spec.
//
// Ports: precharge_i (PHI_b inverted), wl_i[ROWS], wr_i (WRITE for this
// column), din_i (DATA_IN), bl_o / blb_o, q_o[ROWS] (cell contents, for
// observation only). The two bit-line latches are the intended dynamic-node
// storage.
module sram_column #(
  parameter int unsigned ROWS        = sram_pkg::ROWS,
  parameter int unsigned SLEEPY_ROWS = sram_pkg::SLEEPY_ROWS_DEFAULT
) (
  input  logic            precharge_i,
  input  logic [ROWS-1:0] wl_i,
  input  logic            wr_i,
  input  logic            din_i,
  output logic            bl_o,
  output logic            blb_o,
  output logic [ROWS-1:0] q_o
);
  logic            drv_bl_low, drv_blb_low;
  logic [ROWS-1:0] pull_bl, pull_blb;
  logic            dis_bl, dis_blb;
  logic            bl, blb;

  // Write driver: WRITE-gated stack, DATA_IN inverted on the BL side.
  assign drv_bl_low  = wr_i & ~din_i;
  assign drv_blb_low = wr_i &  din_i;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    sram_cell #(.SLEEPY(r < SLEEPY_ROWS)) u_cell (
      .wl_i          (wl_i[r]),
      .drv_bl_low_i  (drv_bl_low),
      .drv_blb_low_i (drv_blb_low),
      .pull_bl_o     (pull_bl[r]),
      .pull_blb_o    (pull_blb[r]),
      .q_o           (q_o[r])
    );
  end

  assign dis_bl  = drv_bl_low  | (|pull_bl);
  assign dis_blb = drv_blb_low | (|pull_blb);

  always_latch begin
    if (dis_bl || precharge_i) bl = !dis_bl;
  end

  always_latch begin
    if (dis_blb || precharge_i) blb = !dis_blb;
  end

  assign bl_o  = bl;
  assign blb_o = blb;
endmodule
