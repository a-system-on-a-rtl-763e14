// tb_soclc_lock_array -- self-checking test of the lock variables and Pr bits.
//
// A directed part replays the released-lock example (lock 2 held, processor 4
// waiting, processor 2 releases: processor 4 is notified and its Pr bit
// cleared) and checks the round-robin choice among several waiters. A random
// part then drives 3000 accesses on an 8-lock array and compares read data,
// release events and the whole lock/Pr state with a reference model kept in
// the testbench.
module tb_soclc_lock_array;
  localparam int NP = 4;
  localparam int NL = 8;
  localparam int IW = $clog2(NL);
  localparam int PW = $clog2(NP);

  logic clk = 0, rst_n = 0;
  logic acc_valid = 0, acc_we = 0, acc_wbit = 0;
  logic [IW-1:0] acc_idx = '0;
  logic [PW-1:0] acc_pe = '0;
  logic rd_bit, rel_valid;
  logic [IW-1:0] rel_idx;
  logic [PW-1:0] rel_pe;
  logic [NL-1:0] lock_o;
  logic [NL-1:0][NP-1:0] pr_o;

  soclc_lock_array #(.N_PE(NP), .N_LOCKS(NL)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [NL-1:0] m_lock;
  logic [NL-1:0][NP-1:0] m_pr;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One access: drive, check combinational outputs against the model, clock,
  // update the model, check the state.
  task automatic access(input bit we, input int idx, input int pe, input bit wbit);
    bit exp_rd, exp_rel;
    int exp_pe;
    @(negedge clk);
    acc_valid = 1; acc_we = we; acc_idx = IW'(idx); acc_pe = PW'(pe); acc_wbit = wbit;
    #1;
    exp_rd = m_lock[idx];
    exp_rel = 0; exp_pe = 0;
    if (we && !wbit) begin
      for (int k = 1; k <= NP; k++) begin
        int q = (pe + k) % NP;
        if (!exp_rel && m_pr[idx][q]) begin exp_rel = 1; exp_pe = q; end
      end
    end
    check(rd_bit == exp_rd, "rd_bit");
    check(rel_valid == exp_rel, "rel_valid");
    if (exp_rel) check(rel_pe == PW'(exp_pe) && rel_idx == IW'(idx), "rel target");
    @(posedge clk);
    if (we) begin
      m_lock[idx] = wbit;
      if (exp_rel) m_pr[idx][exp_pe] = 0;
    end else if (m_lock[idx]) m_pr[idx][pe] = 1;
    else begin m_lock[idx] = 1; m_pr[idx][pe] = 0; end
    @(negedge clk);
    acc_valid = 0;
    check(lock_o == m_lock && pr_o == m_pr, "state");
  endtask

  initial begin
    m_lock = '0; m_pr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Released-lock example: PE2 (1) holds lock 2, PE4 (3) waits.
    access(0, 2, 1, 0);  check(lock_o[2], "lock 2 acquired");
    access(0, 2, 3, 0);  check(pr_o[2][3], "Pr4 set on busy read");
    @(negedge clk);
    acc_valid = 1; acc_we = 1; acc_idx = 2; acc_pe = 1; acc_wbit = 0; #1;
    check(rel_valid && rel_pe == 3 && rel_idx == 2, "PE4 notified of lock 2");
    @(posedge clk); m_lock[2] = 0; m_pr[2][3] = 0;
    @(negedge clk); acc_valid = 0;
    check(!lock_o[2] && pr_o[2] == '0, "lock 2 free, Pr4 cleared");
    // Round robin: waiters 0 and 3 on lock 5, holder 1 -> 3 first, then 0.
    access(0, 5, 1, 0); access(0, 5, 0, 0); access(0, 5, 3, 0);
    access(1, 5, 1, 0);  // notifies 3
    access(0, 5, 2, 0);  // 2 grabs it
    access(1, 5, 2, 0);  // notifies 0 (after 2 comes 3: not waiting; then 0)
    check(pr_o[5] == '0, "all waiters of lock 5 served");
    // Random traffic.
    for (int n = 0; n < 3000; n++)
      access($urandom_range(1) == 1 && $urandom_range(2) != 0, $urandom_range(NL - 1),
             $urandom_range(NP - 1), $urandom_range(3) == 0);
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
