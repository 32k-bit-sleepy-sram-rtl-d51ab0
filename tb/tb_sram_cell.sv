// tb_sram_cell: the four cell operations (write 1, write 0, read 1, read 0)
// plus hold. A write must need both the word line and exactly one bit line
// pulled low; a read must discharge BL for a stored 0 and BL_b for a stored
// 1, and only while the word line is high. Both cell variants are tested.
module tb_sram_cell;
  logic wl, dbl, dblb;
  logic pbl[2], pblb[2], q[2];
  int checks = 0, failures = 0;

  sram_cell #(.SLEEPY(1'b0)) u_norm (.wl_i(wl), .drv_bl_low_i(dbl), .drv_blb_low_i(dblb),
                                     .pull_bl_o(pbl[0]), .pull_blb_o(pblb[0]), .q_o(q[0]));
  sram_cell #(.SLEEPY(1'b1)) u_slp  (.wl_i(wl), .drv_bl_low_i(dbl), .drv_blb_low_i(dblb),
                                     .pull_bl_o(pbl[1]), .pull_blb_o(pblb[1]), .q_o(q[1]));

  task automatic expect_state(input logic e_q, input logic e_pbl, input logic e_pblb,
                              input string what);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (q[i] !== e_q || pbl[i] !== e_pbl || pblb[i] !== e_pblb) begin
        failures++;
        $display("ERROR %s cell%0d: q=%b pull_bl=%b pull_blb=%b", what, i, q[i], pbl[i], pblb[i]);
      end
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      // write 1: BL_b pulled low
      wl = 0; dbl = 0; dblb = 0; #5;
      wl = 1; dblb = 1; #5;
      wl = 0; #5; dblb = 0; #5;
      expect_state(1, 0, 0, "hold after write 1");
      wl = 1; #5;
      expect_state(1, 0, 1, "read 1");
      wl = 0; #5;
      // bit-line drive without word line must not change the cell
      dbl = 1; #5; dbl = 0; #5;
      expect_state(1, 0, 0, "drive without word line");
      // write 0: BL pulled low
      wl = 1; dbl = 1; #5; wl = 0; #5; dbl = 0; #5;
      expect_state(0, 0, 0, "hold after write 0");
      wl = 1; #5;
      expect_state(0, 1, 0, "read 0");
      // both lines low (no write driver decision) keeps the value
      dbl = 1; dblb = 1; #5;
      expect_state(0, 1, 0, "both lines low");
      dbl = 0; dblb = 0; wl = 0; #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
