// tb_mem_ctrl -- self-checking test of the memory controller with the shared
// memory behind it.
//
// Two controllers are tested: the default (one wait state) and one with three
// wait states. For 1500 random writes and reads in the memory window each
// checks TA latency (2 + MEM_WAIT cycles after start), that RE/WE are pulsed
// exactly once per transfer, and read data against a model of the memory.
module tb_mem_ctrl;
  import soclc_pkg::*;
  localparam int MW = 1024;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Controller A: default wait states; controller B: three wait states.
  logic              start[2], we[2], ta[2], mre[2], mwe[2];
  logic [ADDR_W-1:0] addr[2];
  logic [DATA_W-1:0] wdata[2], rdata[2], mdo[2], mdi[2];
  logic [9:0]        mab[2];

  mem_ctrl #(.MEM_WORDS(MW)) u_a (
    .clk, .rst_n, .start(start[0]), .we(we[0]), .addr(addr[0]), .wdata(wdata[0]),
    .ta(ta[0]), .rdata(rdata[0]), .mem_re(mre[0]), .mem_we(mwe[0]), .mem_ab(mab[0]),
    .mem_db_out(mdo[0]), .mem_db_in(mdi[0]));
  shared_mem #(.WORDS(MW)) m_a (.clk, .re(mre[0]), .we(mwe[0]), .ab(mab[0]),
                                .db_in(mdo[0]), .db_out(mdi[0]));
  mem_ctrl #(.MEM_WORDS(MW), .MEM_WAIT(3)) u_b (
    .clk, .rst_n, .start(start[1]), .we(we[1]), .addr(addr[1]), .wdata(wdata[1]),
    .ta(ta[1]), .rdata(rdata[1]), .mem_re(mre[1]), .mem_we(mwe[1]), .mem_ab(mab[1]),
    .mem_db_out(mdo[1]), .mem_db_in(mdi[1]));
  shared_mem #(.WORDS(MW)) m_b (.clk, .re(mre[1]), .we(mwe[1]), .ab(mab[1]),
                                .db_in(mdo[1]), .db_out(mdi[1]));

  logic [DATA_W-1:0] model [2][MW];
  bit written [2][MW];

  task automatic xfer(input int c, input int waits, input bit w, input int word,
                      input logic [DATA_W-1:0] d);
    int cyc, strobes;
    @(negedge clk);
    start[c] = 1; we[c] = w; addr[c] = MEM_BASE + ADDR_W'(4 * word); wdata[c] = d;
    @(negedge clk);
    start[c] = 0;
    cyc = 1; strobes = 0;
    while (!ta[c] && cyc < 20) begin
      if (mre[c] || mwe[c]) begin
        strobes++;
        check(mab[c] == 10'(word), "word address on AB");
        check(mwe[c] == w && mre[c] == !w, "RE/WE matches transfer");
      end
      @(negedge clk);
      cyc++;
    end
    check(cyc == 2 + waits, "TA latency");
    check(strobes == 1, "one RE/WE strobe");
    if (w) begin model[c][word] = d; written[c][word] = 1; end
    else if (written[c][word]) check(rdata[c] == model[c][word], "read data");
  endtask

  initial begin
    foreach (written[c, i]) written[c][i] = 0;
    for (int c = 0; c < 2; c++) begin start[c] = 0; we[c] = 0; addr[c] = '0; wdata[c] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      int word;
      bit w;
      logic [DATA_W-1:0] d;
      word = $urandom_range(63) + (($urandom_range(1) == 1) ? MW - 64 : 0);
      w = (n < 100) || $urandom_range(1) == 1;
      d = $urandom;
      xfer(n % 2, (n % 2 == 0) ? 1 : 3, w, word, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
