// tb_sleepy_sram: end-to-end test of the full 4096 x 8 memory at its default
// size (128 x 256 cells, 64 sleepy rows), driven only through its pins.
//
// Each access is a precharge phase (PHI_b low, address/data/WRITE set up)
// followed by an evaluate phase (PHI_b high), which lasts until the next
// access starts. The test writes every address,
// reads every address back, then runs random reads and writes against a
// reference memory. It also exercises and counts:
//   - accesses to the sleepy partition (rows 0..63) and the ordinary rows;
//   - a read with no precharge before it: every bit line of the previously
//     read row stays discharged, so the result must be the AND of the two
//     words sharing the column address (old row and new row);
//   - D_OUT holding the last word read through precharge and through writes.
// Any mechanism that never happens counts as a failure.
module tb_sleepy_sram;
  import sram_pkg::*;

  localparam int unsigned WORDS = 1 << ADDR_BITS;

  logic [ADDR_BITS-1:0] A;
  logic [WORD_BITS-1:0] D_IN, D_OUT;
  logic                 WRITE, PHI_b;
  logic [WORD_BITS-1:0] model [WORDS];

  int checks = 0, failures = 0;
  int n_precharge = 0, n_write = 0, n_read = 0, n_sleepy = 0, n_ordinary = 0;
  int n_stale = 0, n_hold = 0;

  sleepy_sram dut (.A(A), .D_IN(D_IN), .D_OUT(D_OUT), .WRITE(WRITE), .PHI_b(PHI_b));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("ERROR %s", what); end
  endtask

  function automatic bit in_sleepy(input logic [ADDR_BITS-1:0] a);
    return a[ROW_ADDR_BITS-1:0] < ROW_ADDR_BITS'(SLEEPY_ROWS_DEFAULT);
  endfunction

  // One access. With pre set it starts with a precharge phase (PHI_b low,
  // inputs set up) and then evaluates (PHI_b high). Without pre, PHI_b stays
  // high from the previous access and only the inputs change. PHI_b is left
  // high at the end, so the bit lines keep what this access did to them.
  task automatic access(input logic wr, input logic [ADDR_BITS-1:0] a,
                        input logic [WORD_BITS-1:0] d, input bit pre);
    if (pre) begin
      PHI_b = 1'b0;
      n_precharge++;
      #5;
    end
    A = a; D_IN = d; WRITE = wr; #5;
    PHI_b = 1'b1; #5;
    if (in_sleepy(a)) n_sleepy++; else n_ordinary++;
    if (wr) begin
      model[a] = d;
      n_write++;
    end else begin
      n_read++;
    end
    #5;
  endtask

  task automatic write_word(input logic [ADDR_BITS-1:0] a, input logic [WORD_BITS-1:0] d);
    access(1'b1, a, d, 1'b1);
  endtask

  task automatic read_check(input logic [ADDR_BITS-1:0] a);
    access(1'b0, a, 'x, 1'b1);
    check(D_OUT === model[a], $sformatf("read %h got %h expected %h", a, D_OUT, model[a]));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ADDR_BITS-1:0] a, b;
    logic [WORD_BITS-1:0] held;
    PHI_b = 1'b0; WRITE = 1'b0; A = '0; D_IN = '0; #5;
    PHI_b = 1'b1; #5;

    // fill and read back the whole memory
    for (int i = 0; i < WORDS; i++) write_word(ADDR_BITS'(i), WORD_BITS'($urandom()));
    for (int i = 0; i < WORDS; i++) read_check(ADDR_BITS'(i));

    // random traffic
    for (int k = 0; k < 3000; k++) begin
      a = ADDR_BITS'($urandom());
      if ($urandom_range(1) == 1) write_word(a, WORD_BITS'($urandom()));
      else read_check(a);
    end

    // read without precharge: bit lines of the previous row stay low
    for (int k = 0; k < 50; k++) begin
      a = ADDR_BITS'($urandom());
      b = ADDR_BITS'($urandom());
      read_check(a);
      access(1'b0, b, 'x, 1'b0);
      begin
        logic [ADDR_BITS-1:0] same_col;
        same_col = {b[ADDR_BITS-1:ROW_ADDR_BITS], a[ROW_ADDR_BITS-1:0]};
        check(D_OUT === (model[b] & model[same_col]),
              $sformatf("stale read %h after %h got %h expected %h", b, a, D_OUT,
                        model[b] & model[same_col]));
        n_stale++;
      end
    end

    // D_OUT holds through precharge and writes
    for (int k = 0; k < 50; k++) begin
      a = ADDR_BITS'($urandom());
      read_check(a);
      held = D_OUT;
      PHI_b = 1'b0; #5;
      check(D_OUT === held, "D_OUT changed during precharge");
      write_word(ADDR_BITS'($urandom()), WORD_BITS'($urandom()));
      check(D_OUT === held, "D_OUT changed during a write");
      n_hold++;
    end

    $display("mechanisms: precharge=%0d write=%0d read=%0d sleepy_rows=%0d ordinary_rows=%0d stale_read=%0d output_hold=%0d",
             n_precharge, n_write, n_read, n_sleepy, n_ordinary, n_stale, n_hold);
    check(n_precharge > 0, "no precharge phase");
    check(n_write > 0, "no write");
    check(n_read > 0, "no read");
    check(n_sleepy > 0, "no access to the sleepy partition");
    check(n_ordinary > 0, "no access to the ordinary partition");
    check(n_stale > 0, "no read without precharge");
    check(n_hold > 0, "no output hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
