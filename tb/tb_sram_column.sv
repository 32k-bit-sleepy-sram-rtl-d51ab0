// tb_sram_column: one bit-line pair with 128 cells at the default size.
// Every row is written with a random bit, then every row is read back with
// a precharge before each access; the bit lines must show the stored bit on
// BL and its complement on BL_b, and both must be high after precharge.
// Also checked: a read without a precharge keeps a discharged line low
// (dynamic node), and a write driver wins over the precharge devices.
module tb_sram_column;
  localparam int unsigned ROWS = 128;

  logic            precharge, wr, din, bl, blb;
  logic [ROWS-1:0] wl, q;
  logic            model [ROWS];
  int checks = 0, failures = 0;

  sram_column #(.ROWS(ROWS), .SLEEPY_ROWS(64)) dut (
    .precharge_i(precharge), .wl_i(wl), .wr_i(wr), .din_i(din),
    .bl_o(bl), .blb_o(blb), .q_o(q)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("ERROR %s", what); end
  endtask

  task automatic do_precharge();
    wl = '0; wr = 0; precharge = 1; #5;
    check(bl === 1'b1 && blb === 1'b1, "bit lines not precharged");
    precharge = 0; #5;
  endtask

  task automatic do_write(input int r, input logic v);
    do_precharge();
    din = v; wr = 1; wl = '0; wl[r] = 1'b1; #5;
    wl = '0; #5; wr = 0; #5;
    model[r] = v;
  endtask

  task automatic do_read(input int r, input bit pre);
    if (pre) do_precharge();
    wl = '0; wl[r] = 1'b1; #5;
    if (pre) check(bl === model[r] && blb === !model[r],
                   $sformatf("read row %0d got bl=%b blb=%b expected %b", r, bl, blb, model[r]));
    wl = '0; #5;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r0, r1;
    precharge = 1; wl = '0; wr = 0; din = 0; #5;
    for (int r = 0; r < ROWS; r++) do_write(r, 1'($urandom()));
    for (int r = 0; r < ROWS; r++) do_read(r, 1);
    for (int k = 0; k < 200; k++) begin
      int r = $urandom_range(ROWS - 1);
      if ($urandom_range(1)) do_write(r, 1'($urandom())); else do_read(r, 1);
    end
    // stale read: discharge BL by reading a 0, then read a 1 without precharge
    do_write(3, 1'b0); do_write(5, 1'b1);
    do_read(3, 1);
    do_read(5, 0);
    wl = '0; wl[5] = 1'b1; #5;
    check(bl === 1'b0 && blb === 1'b0, "read without precharge should see a low BL");
    wl = '0; #5;
    // write driver against active precharge: driver wins
    precharge = 1; din = 0; wr = 1; #5;
    check(bl === 1'b0 && blb === 1'b1, "write driver should overpower precharge");
    wr = 0; #5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
