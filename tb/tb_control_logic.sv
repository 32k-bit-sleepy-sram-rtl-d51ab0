// tb_control_logic: truth table of the phase and command decoding.
// All four combinations of WRITE and PHI_b are applied, each several times,
// and the four outputs compared with the expected table.
module tb_control_logic;
  logic write_i, phi_b_i, precharge, wl_en, wr_en, rd_en;
  int checks = 0, failures = 0;

  control_logic dut (
    .write_i(write_i), .phi_b_i(phi_b_i),
    .precharge_o(precharge), .wl_en_o(wl_en), .wr_en_o(wr_en), .rd_en_o(rd_en)
  );

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_out;
    for (int rep = 0; rep < 3; rep++) begin
      for (int v = 0; v < 4; v++) begin
        {write_i, phi_b_i} = 2'(v);
        // {precharge, wl_en, wr_en, rd_en}
        case (v)
          0: exp_out = 4'b1000;  // precharge, read selected
          1: exp_out = 4'b0101;  // evaluate, read
          2: exp_out = 4'b1000;  // precharge, write selected
          3: exp_out = 4'b0110;  // evaluate, write
          default: exp_out = 'x;
        endcase
        #5;
        checks++;
        if ({precharge, wl_en, wr_en, rd_en} !== exp_out) begin
          failures++;
          $display("ERROR WRITE=%b PHI_b=%b got %b expected %b", write_i, phi_b_i,
                   {precharge, wl_en, wr_en, rd_en}, exp_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
