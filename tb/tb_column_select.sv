// tb_column_select: the column decoder, the eight 32-to-1 read multiplexers
// and the write steering, at the default size (256 columns). For every
// column address and random bit-line patterns, the read data bit b must equal
// bit line b*32 + address; with the write enable on, exactly the eight
// columns b*32 + address must be enabled, each carrying data bit b.
module tb_column_select;
  localparam int unsigned CB = 5;
  localparam int unsigned WB = 8;
  localparam int unsigned NS = 1 << CB;
  localparam int unsigned NC = WB * NS;

  logic [CB-1:0] col_addr;
  logic          wr_en;
  logic [WB-1:0] din, rd_data, exp_rd;
  logic [NC-1:0] bl, col_wr, col_din, exp_wr;
  int checks = 0, failures = 0;

  column_select #(.COL_ADDR_BITS(CB), .WORD_BITS(WB)) dut (
    .col_addr_i(col_addr), .wr_en_i(wr_en), .din_i(din), .bl_i(bl),
    .col_wr_o(col_wr), .col_din_o(col_din), .rd_data_o(rd_data)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < NS; a++) begin
      for (int k = 0; k < 8; k++) begin
        col_addr = CB'(a);
        for (int i = 0; i < NC; i += 32) bl[i +: 32] = $urandom();
        din   = WB'($urandom());
        wr_en = 1'(k % 2);
        #5;
        for (int b = 0; b < WB; b++) exp_rd[b] = bl[b*NS + a];
        exp_wr = '0;
        if (wr_en) for (int b = 0; b < WB; b++) exp_wr[b*NS + a] = 1'b1;
        checks++;
        if (rd_data !== exp_rd) begin
          failures++;
          $display("ERROR addr=%0d read %h expected %h", a, rd_data, exp_rd);
        end
        checks++;
        if (col_wr !== exp_wr) begin
          failures++;
          $display("ERROR addr=%0d write enables wrong", a);
        end
        for (int b = 0; b < WB; b++) begin
          checks++;
          if (col_din[b*NS + a] !== din[b]) begin
            failures++;
            $display("ERROR addr=%0d bit %0d write data wrong", a, b);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
