// tb_addr_decoder -- self-checking test of the shared-bus address decoder.
//
// Checks the window edges (0x040C, first and last lock, one past the last
// lock, first and last memory word, one past the memory) and 5000 random
// addresses against the map computed independently from the window bounds,
// at the default 256 locks and 4096 memory words.
module tb_addr_decoder;
  import soclc_pkg::*;
  localparam longint NL = N_SHORT_DEF + N_LONG_DEF;
  localparam longint MW = MEM_WORDS_DEF;
  logic [ADDR_W-1:0] addr;
  logic sel_soclc, sel_mem, sel_none;

  addr_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%h", what, addr); end
  endtask

  task automatic probe(input logic [ADDR_W-1:0] a);
    longint ua;
    bit e_lc, e_mem;
    addr = a;
    #1;
    ua = longint'(a);
    e_lc  = (ua == 'h40C) || (ua >= 'h800 && ua < 'h800 + 4 * NL);
    e_mem = !e_lc && ua >= 'h10000 && ua < 'h10000 + 4 * MW;
    check(sel_soclc == e_lc, "sel_soclc");
    check(sel_mem == e_mem, "sel_mem");
    check(sel_none == (!e_lc && !e_mem), "sel_none");
    check((32'(sel_soclc) + 32'(sel_mem) + 32'(sel_none)) == 1, "one select");
  endtask

  initial begin
    probe(32'h040C); probe(32'h0408); probe(32'h0410); probe(32'h0000);
    probe(32'h0800); probe(32'h0BFC); probe(32'h0C00); probe(32'h07FC);
    probe(32'h1_0000); probe(32'h1_3FFC); probe(32'h1_4000); probe(32'hFFFF_FFFC);
    for (int n = 0; n < 5000; n++) begin
      case ($urandom_range(3))
        0: probe($urandom);
        1: probe(32'h0400 + 32'($urandom_range(2047)));
        2: probe(32'hFC00 + 32'($urandom_range(32'h5000)));
        default: probe(32'h0800 + 32'($urandom_range(1100)));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
