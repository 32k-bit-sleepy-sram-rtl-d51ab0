// tb_row_decoder: exhaustive test of the 7-to-128 row decoder.
// Every address 0..127 is applied; the expected word-line vector is built
// bit by bit (bit i high only for i == address) and compared with the
// decoder output, which must also be one-hot.
module tb_row_decoder;
  localparam int unsigned AB = 7;
  localparam int unsigned N  = 1 << AB;

  logic [AB-1:0] addr;
  logic [N-1:0]  wl_sel, expect_wl;
  int checks = 0, failures = 0;

  row_decoder #(.ADDR_BITS(AB)) dut (.addr(addr), .wl_sel(wl_sel));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < N; a++) begin
      addr = AB'(a);
      for (int i = 0; i < N; i++) expect_wl[i] = (i == a);
      #5;
      checks++;
      if (wl_sel !== expect_wl || $countones(wl_sel) != 1) begin
        failures++;
        $display("ERROR addr=%0d wl=%h expected %h", a, wl_sel, expect_wl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
