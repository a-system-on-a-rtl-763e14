// tb_shared_mem -- self-checking test of the shared memory at its default
// size (4096 words): writes a pattern computed from the address to every
// word, reads all back (data one cycle after RE), checks that a read without
// RE keeps the output and that a write and a read in the same cycle return
// the old word.
module tb_shared_mem;
  localparam int W = 4096;
  logic clk = 0;
  logic re = 0, we = 0;
  logic [11:0] ab = '0;
  logic [31:0] db_in = '0, db_out;

  shared_mem dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] pat(int a);
    return 32'(a) * 32'h9E37_79B9 ^ 32'h5A5A_0000;
  endfunction

  initial begin
    for (int a = 0; a < W; a++) begin
      @(negedge clk); we = 1; re = 0; ab = 12'(a); db_in = pat(a);
    end
    @(negedge clk); we = 0;
    for (int a = W - 1; a >= 0; a--) begin
      @(negedge clk); re = 1; ab = 12'(a);
      @(negedge clk); re = 0;
      check(db_out == pat(a), "read back");
    end
    ab = 12'd5; @(negedge clk);
    check(db_out == pat(0), "output held without RE");
    @(negedge clk); re = 1; we = 1; ab = 12'd7; db_in = 32'hDEAD_BEEF;
    @(negedge clk); re = 0; we = 0;
    check(db_out == pat(7), "read during write returns old word");
    @(negedge clk); re = 1;
    @(negedge clk); re = 0;
    check(db_out == 32'hDEAD_BEEF, "written word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
