// tb_soclc -- self-checking bus-level test of the SoC Lock Cache at its
// default size (128 short-CS + 128 long-CS locks, four processors).
//
// Directed: test-and-set on a long-CS lock (6) and a short-CS lock (1), busy
// reads registering waiters, release interrupting the next waiter in round
// robin, the index register at 0x040C returning the released index (whose
// parity gives the lock kind) and then the empty value, the last lock, an
// address past the last lock, and the one-cycle access latency. Random: 3000
// accesses by random processors to eight locks and to 0x040C, checked against
// a model of the lock, Pr and pending-index state.
module tb_soclc;
  import soclc_pkg::*;
  localparam int NP = 4;
  localparam int NL = N_SHORT_DEF + N_LONG_DEF;

  logic clk = 0, rst_n = 0;
  logic start = 0, we = 0;
  logic [ADDR_W-1:0] addr = '0;
  logic [DATA_W-1:0] wdata = '0;
  logic [1:0] pe = '0;
  logic ta;
  logic [DATA_W-1:0] rdata;
  logic [NP-1:0] intr;

  soclc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit m_lock [NL];
  bit m_pr [NL][NP];
  bit m_pend [NP][NL];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One bus access; returns read data; checks that TA comes one cycle later.
  task automatic acc(input bit w, input logic [ADDR_W-1:0] a, input logic [DATA_W-1:0] d,
                     input int p, output logic [DATA_W-1:0] rd);
    @(negedge clk);
    start = 1; we = w; addr = a; wdata = d; pe = 2'(p);
    @(negedge clk);
    start = 0;
    check(ta == 1'b1, "ta one cycle after start");
    rd = rdata;
  endtask

  function automatic logic [ADDR_W-1:0] la(int i);
    return LOCK_BASE + ADDR_W'(4 * i);
  endfunction

  // Model of one access, applied after it.
  task automatic model(input bit w, input int li, input bit isidx, input int p,
                       input bit wbit, output logic [DATA_W-1:0] exp);
    exp = '0;
    if (isidx) begin
      exp = NO_INDEX;
      if (!w)
        for (int i = 0; i < NL; i++)
          if (m_pend[p][i]) begin exp = DATA_W'(i); m_pend[p][i] = 0; break; end
    end else if (!w) begin
      exp = DATA_W'(m_lock[li]);
      if (m_lock[li]) m_pr[li][p] = 1;
      else begin m_lock[li] = 1; m_pr[li][p] = 0; end
    end else begin
      m_lock[li] = wbit;
      if (!wbit)
        for (int k = 1; k <= NP; k++) begin
          int q = (p + k) % NP;
          if (m_pr[li][q]) begin m_pr[li][q] = 0; m_pend[q][li] = 1; break; end
        end
    end
  endtask

  task automatic op(input bit w, input int li, input bit isidx, input int p, input bit wbit);
    logic [DATA_W-1:0] rd, exp;
    acc(w, isidx ? INDEX_ADDR : la(li), DATA_W'(wbit), p, rd);
    model(w, li, isidx, p, wbit, exp);
    if (!w) check(rd == exp, "read data");
    for (int q = 0; q < NP; q++) begin
      bit any = 0;
      for (int i = 0; i < NL; i++) any |= m_pend[q][i];
      check(intr[q] == any, "interrupt line");
    end
  endtask

  initial begin
    logic [DATA_W-1:0] rd;
    foreach (m_lock[i]) m_lock[i] = 0;
    foreach (m_pr[i, q]) m_pr[i][q] = 0;
    foreach (m_pend[q, i]) m_pend[q][i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Long-CS lock 6: PE1 acquires, PE2 and PE3 wait.
    acc(0, la(6), 0, 0, rd); check(rd == 0, "lock 6 free, acquired");
    acc(0, la(6), 0, 1, rd); check(rd == 1, "lock 6 busy for PE2");
    acc(0, la(6), 0, 2, rd); check(rd == 1, "lock 6 busy for PE3");
    check(intr == '0, "no interrupt before release");
    acc(1, la(6), 0, 0, rd);
    @(negedge clk);
    check(intr == 4'b0010, "release interrupts PE2 only");
    acc(0, INDEX_ADDR, 0, 1, rd);
    check(rd == 6 && rd[0] == 0, "PE2 reads index 6 (even: long CS)");
    @(negedge clk);
    check(intr == '0, "interrupt cleared by index read");
    acc(0, INDEX_ADDR, 0, 1, rd); check(rd == NO_INDEX, "empty index register");
    acc(0, la(6), 0, 1, rd); check(rd == 0, "PE2 acquires lock 6 after notification");
    acc(1, la(6), 0, 1, rd);
    @(negedge clk);
    check(intr == 4'b0100, "second release interrupts PE3");
    acc(0, INDEX_ADDR, 0, 2, rd); check(rd == 6, "PE3 reads index 6");
    // Short-CS lock 1.
    acc(0, la(1), 0, 3, rd); check(rd == 0, "short lock 1 acquired by PE4");
    acc(0, la(1), 0, 0, rd); check(rd == 1, "short lock 1 busy for PE1");
    acc(1, la(1), 0, 3, rd);
    acc(0, INDEX_ADDR, 0, 0, rd); check(rd == 1 && rd[0] == 1, "index 1 (odd: short CS)");
    // Last lock and past the end.
    acc(0, la(NL - 1), 0, 0, rd); check(rd == 0, "last lock acquired");
    acc(0, la(NL - 1), 0, 1, rd); check(rd == 1, "last lock busy");
    acc(0, la(NL), 0, 1, rd); check(rd == 0, "address past last lock reads 0");
    acc(1, la(NL - 1), 0, 0, rd);
    acc(0, INDEX_ADDR, 0, 1, rd); check(rd == NL - 1, "index of last lock");
    // Reset model to match (all locks now free, no waiters, nothing pending).
    acc(1, la(1), 0, 0, rd);
    for (int i = 0; i < 8; i++) begin
      acc(0, la(i), 0, 0, rd); check(rd == 0, "lock free before random phase");
      acc(1, la(i), 0, 0, rd);
    end
    for (int n = 0; n < 3000; n++) begin
      int r;
      r = $urandom_range(9);
      op(r < 4, $urandom_range(7), r >= 8, $urandom_range(NP - 1), $urandom_range(4) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
