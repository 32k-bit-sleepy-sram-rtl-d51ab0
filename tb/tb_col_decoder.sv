// tb_col_decoder: exhaustive test of the 5-to-32 column decoder.
// All 32 addresses are applied and the output compared with a one-hot
// vector built bit by bit in the testbench.
module tb_col_decoder;
  localparam int unsigned AB = 5;
  localparam int unsigned N  = 1 << AB;

  logic [AB-1:0] addr;
  logic [N-1:0]  col_sel, expect_sel;
  int checks = 0, failures = 0;

  col_decoder #(.ADDR_BITS(AB)) dut (.addr(addr), .col_sel(col_sel));

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
      for (int i = 0; i < N; i++) expect_sel[i] = (i == a);
      #5;
      checks++;
      if (col_sel !== expect_sel) begin
        failures++;
        $display("ERROR addr=%0d sel=%h expected %h", a, col_sel, expect_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
