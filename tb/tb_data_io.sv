// tb_data_io: the input buffer and the output latch. D_OUT must follow the
// read data while the read enable is high and keep the last value while it
// is low, whatever the read data does; D_IN must reach the write data bus.
module tb_data_io;
  logic [7:0] d_in, rd_data, wdata, d_out, held;
  logic       rd_en;
  int checks = 0, failures = 0;

  data_io #(.WORD_BITS(8)) dut (
    .d_in_i(d_in), .rd_en_i(rd_en), .rd_data_i(rd_data),
    .wdata_o(wdata), .d_out_o(d_out)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; d_in = 0; rd_data = 0; #5;
    for (int k = 0; k < 100; k++) begin
      // transparent phase
      rd_en = 1;
      rd_data = 8'($urandom()); #5;
      checks++;
      if (d_out !== rd_data) begin failures++; $display("ERROR transparent %h vs %h", d_out, rd_data); end
      rd_data = 8'($urandom()); #5;
      checks++;
      if (d_out !== rd_data) begin failures++; $display("ERROR follow %h vs %h", d_out, rd_data); end
      held = rd_data;
      // hold phase
      rd_en = 0; #5;
      rd_data = 8'($urandom()); d_in = 8'($urandom()); #5;
      checks++;
      if (d_out !== held) begin failures++; $display("ERROR hold %h vs %h", d_out, held); end
      checks++;
      if (wdata !== d_in) begin failures++; $display("ERROR wdata %h vs %h", wdata, d_in); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
