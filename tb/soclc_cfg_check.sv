// soclc_cfg_check -- drives one lock cache of a given short/long lock count
// through a fixed check sequence and reports its counts; used by
// tb_soclc_configs to cover several sizes.
//
// For every lock index of the configuration: processor 1 acquires it (reads
// 0), processor 2 reads it busy, processor 1 releases it, and processor 2 is
// interrupted and reads that index back from 0x040C. It also checks that the
// lock-kind function gives exactly N_SHORT short and N_LONG long locks,
// alternating (even = long) over the interleaved range, and that the address
// one past the last lock does nothing. Raises done when finished.
module soclc_cfg_check
  import soclc_pkg::*;
#(
  parameter int unsigned N_SHORT = 16,
  parameter int unsigned N_LONG  = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NL = N_SHORT + N_LONG;

  logic start = 0, we = 0;
  logic [ADDR_W-1:0] addr = '0;
  logic [DATA_W-1:0] wdata = '0;
  logic [1:0] pe = '0;
  logic ta;
  logic [DATA_W-1:0] rdata;
  logic [3:0] intr;

  soclc #(.N_PE(4), .N_SHORT(N_SHORT), .N_LONG(N_LONG)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL S=%0d L=%0d: %s at %0t", N_SHORT, N_LONG, what, $time);
    end
  endtask

  task automatic acc(input bit w, input logic [ADDR_W-1:0] a, input int p,
                     output logic [DATA_W-1:0] rd);
    @(negedge clk);
    start = 1; we = w; addr = a; wdata = '0; pe = 2'(p);
    @(negedge clk);
    start = 0;
    check(ta, "ta");
    rd = rdata;
  endtask

  initial begin
    logic [DATA_W-1:0] rd;
    int n_long, n_short, pairs;
    done = 0; checks = 0; failures = 0;
    n_long = 0; n_short = 0;
    pairs = (N_SHORT < N_LONG) ? N_SHORT : N_LONG;
    for (int i = 0; i < NL; i++) begin
      if (is_long_lock(i, N_SHORT, N_LONG)) n_long++; else n_short++;
      if (i < 2 * pairs) check(is_long_lock(i, N_SHORT, N_LONG) == (i % 2 == 0), "even/odd kind");
    end
    check(n_long == N_LONG && n_short == N_SHORT, "kind counts");
    wait (rst_n);
    for (int i = 0; i < NL; i++) begin
      acc(0, LOCK_BASE + ADDR_W'(4 * i), 0, rd); check(rd == 0, "acquire");
      acc(0, LOCK_BASE + ADDR_W'(4 * i), 1, rd); check(rd == 1, "busy");
      acc(1, LOCK_BASE + ADDR_W'(4 * i), 0, rd);
      @(negedge clk);
      check(intr == 4'b0010, "interrupt to processor 2");
      acc(0, INDEX_ADDR, 1, rd); check(rd == DATA_W'(i), "released index");
    end
    acc(0, LOCK_BASE + ADDR_W'(4 * NL), 0, rd); check(rd == 0, "past the last lock");
    acc(0, LOCK_BASE + ADDR_W'(4 * NL), 1, rd); check(rd == 0, "past the last lock stays free");
    done = 1;
  end
endmodule
