// tb_mux32: test of the 32-to-1 multiplexer.
// For each of the 32 one-hot selects, 20 random data words are applied and
// the output compared with the selected data bit. An all-zero select must
// give 0.
module tb_mux32;
  localparam int unsigned N = 32;

  logic [N-1:0] d, sel;
  logic         y;
  int checks = 0, failures = 0;

  mux32 #(.N(N)) dut (.d(d), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < N; s++) begin
      for (int k = 0; k < 20; k++) begin
        d   = $urandom();
        sel = '0;
        sel[s] = 1'b1;
        #5;
        checks++;
        if (y !== d[s]) begin
          failures++;
          $display("ERROR sel=%0d d=%h y=%b", s, d, y);
        end
      end
    end
    d = '1; sel = '0; #5;
    checks++;
    if (y !== 1'b0) begin failures++; $display("ERROR empty select gives %b", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
