// tb_sram_array: the cell array at a reduced size (16 rows x 32 columns,
// 8 sleepy rows). Random words are written to random rows through the column
// write enables, then each row is read after a precharge and every bit line
// compared with a reference copy of the array. Also checked: all bit lines
// high after precharge, no word line (and so no discharge) while the word-line
// enable is low, and writes landing only in the enabled columns.
module tb_sram_array;
  localparam int unsigned ROWS = 16;
  localparam int unsigned COLS = 32;

  logic            precharge, wl_en;
  logic [ROWS-1:0] wl_sel;
  logic [COLS-1:0] col_wr, col_din, bl, blb;
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  sram_array #(.ROWS(ROWS), .COLS(COLS), .SLEEPY_ROWS(8)) dut (
    .precharge_i(precharge), .wl_en_i(wl_en), .wl_sel_i(wl_sel),
    .col_wr_i(col_wr), .col_din_i(col_din), .bl_o(bl), .blb_o(blb)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("ERROR %s", what); end
  endtask

  task automatic do_precharge();
    wl_en = 0; col_wr = '0; precharge = 1; #5;
    check(bl === '1 && blb === '1, "bit lines not precharged");
    precharge = 0; #5;
  endtask

  // write the enabled columns of row r
  task automatic do_write(input int r, input logic [COLS-1:0] en, input logic [COLS-1:0] d);
    do_precharge();
    wl_sel = '0; wl_sel[r] = 1'b1; col_din = d; col_wr = en;
    wl_en = 1; #5; wl_en = 0; #5; col_wr = '0; #5;
    model[r] = (model[r] & ~en) | (d & en);
  endtask

  task automatic do_read(input int r);
    do_precharge();
    wl_sel = '0; wl_sel[r] = 1'b1; wl_en = 1; #5;
    check(bl === model[r] && blb === ~model[r],
          $sformatf("row %0d read %h expected %h", r, bl, model[r]));
    wl_en = 0; #5;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    precharge = 1; wl_en = 0; wl_sel = '0; col_wr = '0; col_din = '0; #5;
    for (int r = 0; r < ROWS; r++) do_write(r, '1, $urandom());
    for (int r = 0; r < ROWS; r++) do_read(r);
    // word lines held off by the enable: bit lines stay precharged
    for (int r = 0; r < ROWS; r++) begin
      do_precharge();
      wl_sel = '0; wl_sel[r] = 1'b1; #5;
      check(bl === '1 && blb === '1, "discharge without word-line enable");
    end
    for (int k = 0; k < 300; k++) begin
      int r;
      r = $urandom_range(ROWS - 1);
      if ($urandom_range(1) == 1) do_write(r, $urandom(), $urandom());
      else do_read(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
