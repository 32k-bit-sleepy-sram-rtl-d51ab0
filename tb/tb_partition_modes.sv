// tb_partition_modes: the five sleepy partitions of the array.
//
// One 128-cell column is built for each partition (SLEEPY_ROWS = 128, 96,
// 64, 32 and 0, i.e. 100 %, 75 %, 50 %, 25 % and no sleepy rows). The
// testbench reads each cell's SLEEPY label through the hierarchy, checks that
// the sleepy cells are exactly the rows 0 .. SLEEPY_ROWS-1 (the output side),
// and scales the per-column count by the 256 columns of the array; the totals
// must be 32768, 24576, 16384, 8192 and 0 sleepy cells. Each column is then
// written and read back to show that the partition does not change function.
module tb_partition_modes;
  localparam int unsigned ROWS  = 128;
  localparam int unsigned COLS  = 256;
  localparam int unsigned NMODE = 5;
  localparam int unsigned SLEEPY_ROWS [NMODE] = '{128, 96, 64, 32, 0};
  localparam int unsigned EXPECT_SLEEPY_CELLS [NMODE] = '{32768, 24576, 16384, 8192, 0};

  logic                precharge, wr, din;
  logic [ROWS-1:0]     wl;
  logic [NMODE-1:0]    bl, blb;
  logic [ROWS-1:0]     q [NMODE];
  logic [ROWS-1:0]     sleepy_map [NMODE];
  logic [ROWS-1:0]     model;
  int checks = 0, failures = 0;

  for (genvar m = 0; m < NMODE; m++) begin : g_mode
    sram_column #(.ROWS(ROWS), .SLEEPY_ROWS(SLEEPY_ROWS[m])) u_col (
      .precharge_i(precharge), .wl_i(wl), .wr_i(wr), .din_i(din),
      .bl_o(bl[m]), .blb_o(blb[m]), .q_o(q[m])
    );
    for (genvar r = 0; r < ROWS; r++) begin : g_map
      assign sleepy_map[m][r] = u_col.g_row[r].u_cell.SLEEPY;
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("ERROR %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    precharge = 1; wl = '0; wr = 0; din = 0; #5;
    for (int m = 0; m < NMODE; m++) begin
      int cells;
      cells = $countones(sleepy_map[m]) * COLS;
      $display("mode %0d: %0d sleepy rows, %0d sleepy and %0d ordinary cells",
               m, SLEEPY_ROWS[m], cells, ROWS * COLS - cells);
      check(cells == EXPECT_SLEEPY_CELLS[m],
            $sformatf("mode %0d has %0d sleepy cells, expected %0d", m, cells,
                      EXPECT_SLEEPY_CELLS[m]));
      for (int r = 0; r < ROWS; r++)
        check(sleepy_map[m][r] == (r < SLEEPY_ROWS[m]),
              $sformatf("mode %0d row %0d wrong cell type", m, r));
    end
    // same data in every mode
    for (int r = 0; r < ROWS; r++) begin
      model[r] = 1'($urandom());
      precharge = 1; #5; precharge = 0;
      din = model[r]; wr = 1; wl = '0; wl[r] = 1'b1; #5; wl = '0; #5; wr = 0; #5;
    end
    for (int r = 0; r < ROWS; r++) begin
      precharge = 1; #5; precharge = 0;
      wl = '0; wl[r] = 1'b1; #5;
      for (int m = 0; m < NMODE; m++)
        check(bl[m] === model[r] && blb[m] === !model[r],
              $sformatf("mode %0d row %0d read wrong", m, r));
      wl = '0; #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
