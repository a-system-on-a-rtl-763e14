// tb_soclc_index_unit -- self-checking test of the released-lock index unit.
//
// Directed: lock 2 released for processor 4 raises intr[3]; processor 4 reads
// 2, then the empty value, and its interrupt drops. Two releases pending for
// one processor are both returned, lowest index first. Random: 4000 cycles of
// release events and reads on a 16-lock unit against a pending-bit model.
module tb_soclc_index_unit;
  import soclc_pkg::*;
  localparam int NP = 4;
  localparam int NL = 16;
  localparam int IW = $clog2(NL);
  localparam int PW = $clog2(NP);

  logic clk = 0, rst_n = 0;
  logic rel_valid = 0, rd_valid = 0;
  logic [IW-1:0] rel_idx = '0;
  logic [PW-1:0] rel_pe = '0, rd_pe = '0;
  logic [DATA_W-1:0] rd_data;
  logic [NP-1:0] intr;

  soclc_index_unit #(.N_PE(NP), .N_LOCKS(NL)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit m_pend [NP][NL];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [DATA_W-1:0] m_head(int pe);
    for (int i = 0; i < NL; i++) if (m_pend[pe][i]) return DATA_W'(i);
    return '1;
  endfunction

  task automatic cycle(input bit rv, input int ri, input int rp, input bit dv, input int dp);
    logic [DATA_W-1:0] exp;
    @(negedge clk);
    rel_valid = rv; rel_idx = IW'(ri); rel_pe = PW'(rp);
    rd_valid = dv; rd_pe = PW'(dp);
    #1;
    exp = m_head(dp);
    if (dv) check(rd_data == exp, "rd_data");
    @(posedge clk);
    if (dv && exp != '1) m_pend[dp][exp] = 0;
    if (rv) m_pend[rp][ri] = 1;
    @(negedge clk);
    rel_valid = 0; rd_valid = 0;
    for (int p = 0; p < NP; p++) begin
      bit any = 0;
      for (int i = 0; i < NL; i++) any |= m_pend[p][i];
      check(intr[p] == any, "intr");
    end
  endtask

  initial begin
    foreach (m_pend[p, i]) m_pend[p][i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(intr == '0, "no interrupt after reset");
    cycle(1, 2, 3, 0, 0);
    check(intr == 4'b1000, "INT4 raised for lock 2");
    @(negedge clk); rd_valid = 0; rd_pe = 3; #1;
    check(rd_data == 2, "processor 4 reads index 2");
    cycle(0, 0, 0, 1, 3);
    check(intr == '0, "INT4 dropped after read");
    cycle(0, 0, 0, 1, 3);  // empty read
    cycle(1, 6, 0, 0, 0);
    cycle(1, 4, 0, 0, 0);
    @(negedge clk); rd_valid = 0; rd_pe = 0; #1;
    check(rd_data == 4, "two pending: lowest first");
    cycle(0, 0, 0, 1, 0);
    cycle(0, 0, 0, 1, 0);
    check(intr == '0, "both pending indices read");
    for (int n = 0; n < 4000; n++)
      cycle($urandom_range(1), $urandom_range(NL - 1), $urandom_range(NP - 1),
            $urandom_range(1), $urandom_range(NP - 1));
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
