// tb_soclc_db40 -- database transaction workload with 40 application tasks
// on the four-processor lock-cache system at its default size.
//
// Each processor runs ten tasks (priority 0 highest) under a small model of a
// preemptive kernel kept in this testbench: a ready list, and per lock a
// 64-entry lock-wait table. Task g (0..39) performs one transaction on
// database object g mod 4: it takes the object's long-CS lock (even index
// 2*o), adds 1 to each of the object's 400 words (1.6 KB, read-modify-write
// through the shared bus, well over 1000 cycles), releases the lock, then
// takes the short-CS lock 1 to add itself to a shared transaction counter and
// log.
//
// A task that finds its long-CS lock busy is entered in the lock-wait table,
// removed from the ready list and the processor switches to the next ready
// task (a context switch costs CTX cycles). A task that finds the short-CS lock
// busy keeps the processor and sleeps until the interrupt. The interrupt
// routine reads 0x040C until it is empty; for an even index it makes every
// task of that lock's wait table ready again (the highest-priority one runs
// first), for an odd index the sleeping short-CS task retries.
//
// Checks: no two holders of a lock at once; each object word ends at its
// initial value + 10 (no lost update); the counter ends at 40 and the log
// holds every task once. Counts that must be non-zero: preemptions, wake-ups
// through the lock-wait tables, a wake-up of two tasks of one processor by one
// release, short-CS sleeps, and a task running while another of its processor
// waits. Prints the worst lock delay (first failed attempt to acquisition).
module tb_soclc_db40;
  import soclc_pkg::*;
  localparam int NP    = 4;
  localparam int NT    = 10;     // tasks per processor
  localparam int NOBJ  = 4;
  localparam int OBJW  = 400;    // 1.6 KB object
  localparam int CTX   = 20;     // context-switch cost in cycles
  localparam int NL    = N_SHORT_DEF + N_LONG_DEF;
  localparam int LSHORT = 1;
  localparam logic [ADDR_W-1:0] CNT_ADDR = MEM_BASE + 32'h2000;
  localparam logic [ADDR_W-1:0] LOG_ADDR = MEM_BASE + 32'h2100;

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

  typedef enum int {NEED_LONG, BLOCKED, NEED_SHORT, DONE} tstate_t;
  tstate_t tstate [NP][NT];
  bit      wait_tbl [NP][NL][64];
  longint  first_try [NP][NT];
  int      holder [NL];
  longint  cycle_cnt = 0;

  int n_preempt = 0, n_wake = 0, n_multi_wake = 0, n_short_sleep = 0;
  int n_overlap_work = 0, n_idle = 0, n_ctx = 0;
  longint worst_delay = 0;

  always @(posedge clk) cycle_cnt <= cycle_cnt + 1;

  function automatic logic [ADDR_W-1:0] la(int i);
    return LOCK_BASE + ADDR_W'(4 * i);
  endfunction
  function automatic logic [ADDR_W-1:0] obj_addr(int o, int w);
    return MEM_BASE + ADDR_W'(o * 32'h800 + 4 * w);
  endfunction
  function automatic logic [DATA_W-1:0] init_val(int o, int w);
    return DATA_W'(o * 100000 + w * 7);
  endfunction

  task automatic xfer(input int p, input bit w, input logic [ADDR_W-1:0] a,
                      input logic [DATA_W-1:0] d, output logic [DATA_W-1:0] rd);
    req[p] = '{br: 1'b1, we: w, addr: a, wdata: d};
    do @(negedge clk); while (!pe_ta[p]);
    rd = pe_rdata[p];
    req[p].br = 1'b0;
  endtask
  task automatic rd(input int p, input logic [ADDR_W-1:0] a, output logic [DATA_W-1:0] d);
    xfer(p, 0, a, '0, d);
  endtask
  task automatic wr(input int p, input logic [ADDR_W-1:0] a, input logic [DATA_W-1:0] d);
    logic [DATA_W-1:0] u;
    xfer(p, 1, a, d, u);
  endtask

  task automatic got(input int p, input int idx);
    check(holder[idx] < 0, "mutual exclusion");
    holder[idx] = p;
  endtask
  task automatic release_lock(input int p, input int idx);
    check(holder[idx] == p, "release by holder");
    holder[idx] = -1;
    wr(p, la(idx), '0);
  endtask

  // Interrupt routine and ExIntr_Hdlr(): returns whether a short-CS lock was
  // among the released ones.
  task automatic isr(input int p, output bit short_released);
    logic [DATA_W-1:0] ix;
    short_released = 0;
    forever begin
      int woken;
      rd(p, INDEX_ADDR, ix);
      if (ix == NO_INDEX) break;
      if (ix[0]) begin short_released = 1; continue; end
      woken = 0;
      for (int k = 0; k < NT; k++)
        if (wait_tbl[p][ix][k]) begin
          wait_tbl[p][ix][k] = 0;
          tstate[p][k] = NEED_LONG;
          woken++;
        end
      n_wake += woken;
      if (woken > 1) n_multi_wake++;
    end
  endtask

  task automatic run_long(input int p, input int k);
    logic [DATA_W-1:0] d;
    int g, o;
    g = p * NT + k;
    o = g % NOBJ;
    if (first_try[p][k] < 0) first_try[p][k] = cycle_cnt;
    rd(p, la(2 * o), d);
    if (d[0]) begin
      // Busy: enter the lock-wait table, leave the ready list, switch.
      wait_tbl[p][2 * o][k] = 1;
      tstate[p][k] = BLOCKED;
      n_preempt++;
      return;
    end
    got(p, 2 * o);
    if (cycle_cnt - first_try[p][k] > worst_delay) worst_delay = cycle_cnt - first_try[p][k];
    for (int w = 0; w < OBJW; w++) begin
      rd(p, obj_addr(o, w), d);
      wr(p, obj_addr(o, w), d + 1);
    end
    release_lock(p, 2 * o);
    tstate[p][k] = NEED_SHORT;
  endtask

  task automatic run_short(input int p, input int k);
    logic [DATA_W-1:0] d, c;
    bit sr;
    forever begin
      rd(p, la(LSHORT), d);
      if (!d[0]) break;
      n_short_sleep++;
      wait (intr[p]);
      @(negedge clk);
      isr(p, sr);
    end
    got(p, LSHORT);
    rd(p, CNT_ADDR, c);
    wr(p, LOG_ADDR + ADDR_W'(4 * c), DATA_W'(p * NT + k));
    wr(p, CNT_ADDR, c + 1);
    release_lock(p, LSHORT);
    tstate[p][k] = DONE;
  endtask

  task automatic rtos(input int p);
    int last = -1;
    forever begin
      int pick, nblocked;
      bit all_done, sr;
      if (intr[p]) begin
        isr(p, sr);
        repeat (CTX) @(negedge clk);
      end
      pick = -1; nblocked = 0; all_done = 1;
      for (int k = 0; k < NT; k++) begin
        if (tstate[p][k] != DONE) all_done = 0;
        if (tstate[p][k] == BLOCKED) nblocked++;
        if (pick < 0 && (tstate[p][k] == NEED_LONG || tstate[p][k] == NEED_SHORT)) pick = k;
      end
      if (all_done) break;
      if (pick < 0) begin
        n_idle++;
        wait (intr[p]);
        @(negedge clk);
        continue;
      end
      if (pick != last) begin
        n_ctx++;
        repeat (CTX) @(negedge clk);
        last = pick;
      end
      if (nblocked > 0) n_overlap_work++;
      if (tstate[p][pick] == NEED_LONG) run_long(p, pick);
      else run_short(p, pick);
    end
  endtask

  initial begin
    logic [DATA_W-1:0] d;
    bit seen [NP * NT];
    for (int p = 0; p < NP; p++) req[p] = '0;
    foreach (holder[i]) holder[i] = -1;
    foreach (wait_tbl[p, l, k]) wait_tbl[p][l][k] = 0;
    foreach (tstate[p, k]) begin tstate[p][k] = NEED_LONG; first_try[p][k] = -1; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    for (int o = 0; o < NOBJ; o++)
      for (int w = 0; w < OBJW; w++) wr(0, obj_addr(o, w), init_val(o, w));
    wr(0, CNT_ADDR, '0);
    fork
      rtos(0);
      rtos(1);
      rtos(2);
      rtos(3);
    join
    for (int o = 0; o < NOBJ; o++) begin
      int bad;
      bad = 0;
      for (int w = 0; w < OBJW; w++) begin
        rd(0, obj_addr(o, w), d);
        if (d != init_val(o, w) + DATA_W'(NP * NT / NOBJ)) bad++;
      end
      check(bad == 0, $sformatf("object %0d updated by all %0d transactions", o, NP * NT / NOBJ));
    end
    rd(0, CNT_ADDR, d);
    check(d == NP * NT, "transaction counter");
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < NP * NT; i++) begin
      rd(0, LOG_ADDR + ADDR_W'(4 * i), d);
      if (d < NP * NT) seen[d] = 1;
    end
    foreach (seen[i]) check(seen[i], "every task logged once");
    check(n_preempt > 0, "preemption on a busy long-CS lock happened");
    check(n_wake > 0, "wake-up through a lock-wait table happened");
    check(n_multi_wake > 0, "one release woke two tasks of one processor");
    check(n_short_sleep > 0, "short-CS sleep happened");
    check(n_overlap_work > 0, "a task ran while another waited");
    $display("db40: cycles=%0d preempt=%0d wake=%0d multi_wake=%0d short_sleep=%0d overlap=%0d idle=%0d ctx=%0d worst_lock_delay=%0d",
             cycle_cnt, n_preempt, n_wake, n_multi_wake, n_short_sleep, n_overlap_work, n_idle,
             n_ctx, worst_delay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
