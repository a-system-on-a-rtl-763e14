// tb_bus_arbiter -- self-checking test of the shared-bus arbiter.
//
// A slave model answers each start with TA after a random 0..3 extra cycles.
// Checks: one-hot grant, start exactly one cycle after the grant, grants only
// to requesting masters, round-robin order (a master that keeps requesting is
// served once per round when all four request), the request-to-start latency
// of one cycle on an idle bus, and that every requester is eventually served.
module tb_bus_arbiter;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] br = '0;
  logic ta_in;
  logic [NP-1:0] bg;
  logic [1:0] gnt_id;
  logic start, busy;

  bus_arbiter #(.N_PE(NP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Slave: TA 1..4 cycles after start.
  int delay = 0;
  bit pend = 0;
  always @(posedge clk) begin
    if (start) begin pend <= 1; delay <= $urandom_range(3); end
    else if (pend && delay == 0) pend <= 0;
    else if (pend) delay <= delay - 1;
  end
  assign ta_in = pend && delay == 0;

  int served [NP];
  int last_gnt = NP - 1;
  bit prev_busy = 0;
  logic [NP-1:0] br_at_grant;

  always @(posedge clk) br_at_grant <= br;

  // Each master drops its request at the edge where it sees its TA.
  always @(posedge clk) if (rst_n) begin
    if (ta_in) br[gnt_id] <= 1'b0;
  end

  always @(negedge clk) if (rst_n) begin
    check($onehot0(bg), "grant one-hot");
    if (start) begin
      int exp;
      exp = -1;
      for (int k = 1; k <= NP && exp < 0; k++)
        if (br_at_grant[(last_gnt + k) % NP]) exp = (last_gnt + k) % NP;
      check(int'(gnt_id) == exp, "round-robin choice");
      check(bg == (1 << gnt_id), "grant matches id");
      served[gnt_id]++;
      last_gnt = gnt_id;
    end
    prev_busy = busy;
  end

  initial begin
    foreach (served[i]) served[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Latency on an idle bus: request at edge, start in the next cycle.
    @(negedge clk); br = 4'b0100;
    @(negedge clk); check(start && gnt_id == 2, "start one cycle after request");
    wait (br == 0);
    // All four request continuously for a while.
    for (int r = 0; r < 400; r++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) if (!br[p] && $urandom_range(3) != 0) br[p] = 1;
    end
    @(negedge clk);
    br = '0;
    repeat (10) @(negedge clk);
    foreach (served[i]) check(served[i] > 20, "every master served");
    check(!busy && bg == '0, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
