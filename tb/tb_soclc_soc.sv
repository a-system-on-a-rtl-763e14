// tb_soclc_soc -- end-to-end test of the lock-cache multiprocessor system at
// its default size (4 processors, 128 short-CS + 128 long-CS locks, 4096-word
// shared memory, one memory wait state).
//
// The four processors are modelled by bus-master threads in this testbench;
// their lock software is modelled too: a failed lock read puts the thread to
// sleep until its interrupt line rises; the interrupt routine then reads the
// released-lock index at 0x040C until it reads the empty value, takes the
// long-CS path for even indices (lock-wait table search, highest-priority
// task first) and the short-CS path for odd ones (retry the lock read).
//
// Part 1 replays the preemption example: processor 2 holds long lock 4,
// tasks 1 and 2 on processor 1 fail on it and task 3 keeps the processor busy
// with memory traffic until the release interrupt; task 1 then gets the lock
// before task 2. It also checks two releases pending for one processor at
// once, a short-CS hand-off, round-robin notification order among three
// waiters, and the idle-bus latencies (lock access 2 cycles, memory 4).
//
// Part 2 runs the client-server database copy: a server processor fills a
// 400-word (1.6 KB) object in shared memory under a long-CS lock, publishes a
// sequence flag under a short-CS lock, and three client processors, notified
// by lock-release interrupts, copy each object out under the long-CS lock,
// compare it word by word and acknowledge under the short-CS lock. The
// testbench keeps its own record of every lock holder and counts a failure on
// any overlap.
//
// Each mechanism is counted and must occur at least once: uncontended
// acquire, busy read, release interrupt, long-CS and short-CS index reads,
// empty index read, two indices pending for one processor, work done by
// another task while a task waits, and bus contention.
module tb_soclc_soc;
  import soclc_pkg::*;
  localparam int NP     = 4;
  localparam int NL     = N_SHORT_DEF + N_LONG_DEF;
  localparam int OBJW   = 400;    // 1.6 KB database object
  localparam int ROUNDS = 6;      // each client copies two objects
  localparam logic [ADDR_W-1:0] OBJ_ADDR [2] = '{MEM_BASE, MEM_BASE + 32'h800};
  localparam logic [ADDR_W-1:0] FLAG_ADDR = MEM_BASE + 32'h1000;
  localparam logic [ADDR_W-1:0] ACK_ADDR  = MEM_BASE + 32'h1004;
  localparam logic [ADDR_W-1:0] WORK_ADDR = MEM_BASE + 32'h2000;
  localparam int LOBJ  = 0;  // long-CS lock (even)
  localparam int LFLAG = 1;  // short-CS lock (odd)

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t [NP-1:0] pe_req;
  logic [NP-1:0] pe_bg, pe_ta, intr;
  logic [NP-1:0][DATA_W-1:0] pe_rdata;

  soclc_soc dut (.*);

  bus_req_t req [NP];
  always_comb for (int p = 0; p < NP; p++) pe_req[p] = req[p];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Mechanism counters.
  int n_free_acq = 0, n_busy = 0, n_irq = 0, n_long_idx = 0, n_short_idx = 0;
  int n_empty_idx = 0, n_multi = 0, n_other_work = 0, n_contention = 0;
  int holder [NL];

  always @(negedge clk) if (rst_n) begin
    int nreq;
    nreq = 0;
    for (int p = 0; p < NP; p++) nreq += int'(req[p].br);
    if (nreq > 1) n_contention++;
  end

  logic [NP-1:0] intr_q = '0;
  always @(posedge clk) begin
    intr_q <= intr;
    if (rst_n) for (int p = 0; p < NP; p++) if (intr[p] && !intr_q[p]) n_irq++;
  end

  function automatic logic [ADDR_W-1:0] la(int i);
    return LOCK_BASE + ADDR_W'(4 * i);
  endfunction

  function automatic logic [DATA_W-1:0] pat(int r, int w);
    return (32'(r) << 24) ^ (32'(w) * 32'h0001_0003) ^ 32'hC0DE_0000;
  endfunction

  // Bus transfer of processor p; called at a falling edge, returns at one.
  task automatic xfer(input int p, input bit w, input logic [ADDR_W-1:0] a,
                      input logic [DATA_W-1:0] d, output logic [DATA_W-1:0] rd,
                      output int cycles);
    req[p] = '{br: 1'b1, we: w, addr: a, wdata: d};
    cycles = 0;
    do begin @(negedge clk); cycles++; end while (!pe_ta[p]);
    rd = pe_rdata[p];
    req[p].br = 1'b0;
  endtask

  task automatic rd(input int p, input logic [ADDR_W-1:0] a, output logic [DATA_W-1:0] d);
    int c;
    xfer(p, 0, a, '0, d, c);
  endtask

  task automatic wr(input int p, input logic [ADDR_W-1:0] a, input logic [DATA_W-1:0] d);
    logic [DATA_W-1:0] unused;
    int c;
    xfer(p, 1, a, d, unused, c);
  endtask

  // Interrupt routine: read all pending indices; returns how many.
  task automatic isr(input int p, input int expect_idx, output int n);
    logic [DATA_W-1:0] ix;
    n = 0;
    forever begin
      rd(p, INDEX_ADDR, ix);
      if (ix == NO_INDEX) begin n_empty_idx++; break; end
      n++;
      if (ix[0]) n_short_idx++; else n_long_idx++;
      if (expect_idx >= 0) check(int'(ix) == expect_idx, "released index");
    end
    if (n > 1) n_multi++;
  endtask

  task automatic got_lock(input int p, input int idx);
    check(holder[idx] < 0, "mutual exclusion");
    holder[idx] = p;
  endtask

  // Lock with sleep on a busy lock (both kinds: one waiting task per processor).
  task automatic lock(input int p, input int idx);
    logic [DATA_W-1:0] d;
    int n;
    forever begin
      rd(p, la(idx), d);
      if (d[0] == 1'b0) begin n_free_acq++; got_lock(p, idx); break; end
      n_busy++;
      wait (intr[p]);
      @(negedge clk);
      isr(p, idx, n);
    end
  endtask

  task automatic unlock(input int p, input int idx);
    check(holder[idx] == p, "release by holder");
    holder[idx] = -1;
    wr(p, la(idx), '0);
  endtask

  // ---------------- Part 1: directed scenarios ----------------
  task automatic part1();
    logic [DATA_W-1:0] d;
    int c, n;
    bit wt [3];  // lock-wait table of lock 4 on processor 1 (tasks 1..2)
    // Idle-bus latencies.
    xfer(2, 0, la(4), '0, d, c);
    check(d == 0 && c == 2, "uncontended lock read: free, 2 cycles");
    n_free_acq++; got_lock(2, 4);
    @(negedge clk);  // bus turnaround: back-to-back transfers take one cycle more
    xfer(0, 1, WORK_ADDR, 32'h1234, d, c);
    check(c == 4, $sformatf("memory write: 4 cycles (%0d)", c));
    @(negedge clk);
    xfer(0, 0, WORK_ADDR, '0, d, c);
    check(c == 4 && d == 32'h1234, "memory read: 4 cycles, data");
    // Preemption example: tasks 1 and 2 of processor 1 fail on lock 4.
    wt = '{0, 0, 0};
    rd(0, la(4), d); check(d == 1, "task1 finds lock 4 busy"); n_busy++; wt[1] = 1;
    rd(0, la(4), d); check(d == 1, "task2 finds lock 4 busy"); n_busy++; wt[2] = 1;
    fork
      begin  // task 3 runs on processor 1 until the interrupt
        int k = 0;
        while (!intr[0]) begin
          wr(0, WORK_ADDR + ADDR_W'(4 * (k % 16)), 32'(k));
          k++;
        end
        n_other_work += k;
        check(k > 5, "task 3 ran while tasks 1 and 2 waited");
      end
      begin  // task 4 on processor 2 finishes its long CS
        repeat (60) @(negedge clk);
        unlock(2, 4);
      end
    join
    @(negedge clk);
    check(intr == 4'b0001, "release interrupts processor 1 only");
    isr(0, 4, n);
    check(n == 1, "one index pending");
    // ExIntr_Hdlr: highest-priority waiting task of lock 4 first.
    for (int t = 1; t <= 2; t++) if (wt[t]) begin
      wt[t] = 0;
      rd(0, la(4), d);
      check(d == 0, $sformatf("task%0d acquires lock 4", t));
      n_free_acq++; got_lock(0, 4);
      unlock(0, 4);
    end
    @(negedge clk);
    check(intr == '0, "no interrupt without waiters");
    // Two releases pending for one processor (locks 6 and 8, long CS).
    rd(3, la(6), d); rd(3, la(8), d); got_lock(3, 6); got_lock(3, 8);
    rd(0, la(6), d); check(d == 1, "task1 waits on lock 6"); n_busy++;
    rd(0, la(8), d); check(d == 1, "task2 waits on lock 8"); n_busy++;
    unlock(3, 6); unlock(3, 8);
    @(negedge clk);
    check(intr[0], "interrupt for two releases");
    rd(0, INDEX_ADDR, d); check(d == 6, "first pending index 6");
    rd(0, INDEX_ADDR, d); check(d == 8, "second pending index 8");
    n_long_idx += 2; n_multi++;
    rd(0, INDEX_ADDR, d); check(d == NO_INDEX, "index register empty"); n_empty_idx++;
    // Short-CS hand-off on lock 3 between processors 2 and 3.
    lock(1, 3);
    fork
      lock(2, 3);
      begin repeat (30) @(negedge clk); unlock(1, 3); end
    join
    check(holder[3] == 2, "processor 3 got short lock 3 after release");
    unlock(2, 3);
    // Round robin: processor 4 holds lock 10; 1, 2, 3 wait; notified 1, 2, 3.
    lock(3, 10);
    for (int p = 0; p < 3; p++) begin rd(p, la(10), d); check(d == 1, "waiter"); n_busy++; end
    unlock(3, 10);
    for (int p = 0; p < 3; p++) begin
      @(negedge clk);
      check(intr == 4'(1 << p), $sformatf("round robin notifies processor %0d", p + 1));
      isr(p, 10, n);
      rd(p, la(10), d); check(d == 0, "notified processor acquires");
      n_free_acq++; got_lock(p, 10);
      unlock(p, 10);
    end
  endtask

  // ---------------- Part 2: client-server copy ----------------
  int copied [NP];

  task automatic server();
    logic [DATA_W-1:0] a;
    for (int r = 0; r < ROUNDS; r++) begin
      // The slot of round r was last used by round r-2: wait for its ack.
      if (r >= 2) begin
        do begin
          lock(0, LFLAG); rd(0, ACK_ADDR, a); unlock(0, LFLAG);
          if (int'(a) < r - 1) repeat (20) @(negedge clk);
        end while (int'(a) < r - 1);
      end
      lock(0, LOBJ);
      for (int w = 0; w < OBJW; w++) wr(0, OBJ_ADDR[r % 2] + ADDR_W'(4 * w), pat(r, w));
      unlock(0, LOBJ);
      lock(0, LFLAG); wr(0, FLAG_ADDR, 32'(r + 1)); unlock(0, LFLAG);
    end
  endtask

  task automatic client(input int p);
    logic [DATA_W-1:0] f, d;
    int bad;
    for (int r = p - 1; r < ROUNDS; r += NP - 1) begin
      do begin
        lock(p, LFLAG); rd(p, FLAG_ADDR, f); unlock(p, LFLAG);
        if (int'(f) <= r) repeat (20) @(negedge clk);
      end while (int'(f) <= r);
      lock(p, LOBJ);
      bad = 0;
      for (int w = 0; w < OBJW; w++) begin
        rd(p, OBJ_ADDR[r % 2] + ADDR_W'(4 * w), d);
        if (d != pat(r, w)) bad++;
      end
      unlock(p, LOBJ);
      check(bad == 0, $sformatf("client %0d copy of object %0d", p, r));
      copied[p]++;
      // Acknowledge in order.
      do begin
        lock(p, LFLAG); rd(p, ACK_ADDR, f);
        if (int'(f) == r) wr(p, ACK_ADDR, 32'(r + 1));
        unlock(p, LFLAG);
        if (int'(f) < r) repeat (10) @(negedge clk);
      end while (int'(f) < r);
    end
  endtask

  initial begin
    for (int p = 0; p < NP; p++) req[p] = '0;
    foreach (holder[i]) holder[i] = -1;
    foreach (copied[i]) copied[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    part1();
    // Shared words start at zero.
    wr(0, FLAG_ADDR, '0); wr(0, ACK_ADDR, '0);
    fork
      server();
      client(1);
      client(2);
      client(3);
    join
    for (int p = 1; p < NP; p++) check(copied[p] == ROUNDS / (NP - 1), "objects per client");
    $display("mechanisms: free_acq=%0d busy=%0d irq=%0d long_idx=%0d short_idx=%0d empty_idx=%0d multi=%0d other_work=%0d contention=%0d",
             n_free_acq, n_busy, n_irq, n_long_idx, n_short_idx, n_empty_idx, n_multi,
             n_other_work, n_contention);
    check(n_free_acq > 0, "uncontended acquire happened");
    check(n_busy > 0, "busy lock read happened");
    check(n_irq > 0, "release interrupt happened");
    check(n_long_idx > 0, "long-CS index read happened");
    check(n_short_idx > 0, "short-CS index read happened");
    check(n_empty_idx > 0, "empty index read happened");
    check(n_multi > 0, "two pending indices happened");
    check(n_other_work > 0, "work during a wait happened");
    check(n_contention > 0, "bus contention happened");
    $display("cycles: %0t", $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
