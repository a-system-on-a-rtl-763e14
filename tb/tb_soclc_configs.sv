// tb_soclc_configs -- runs the lock cache at the short/long lock counts of
// the design's synthesis study: the corner and diagonal points S, L in
// {16, 128} and {32, 64} plus the unequal mixes 16/128, 128/16, 64/32 and
// 32/64, four processors each. Every lock of every configuration is
// acquired, found busy, released and its index read back by the interrupted
// processor (see soclc_cfg_check).
module tb_soclc_configs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NC = 8;
  logic [NC-1:0] done;
  int c_checks [NC];
  int c_fail [NC];

  soclc_cfg_check #(.N_SHORT(16),  .N_LONG(16))  u0 (.clk, .rst_n, .done(done[0]), .checks(c_checks[0]), .failures(c_fail[0]));
  soclc_cfg_check #(.N_SHORT(32),  .N_LONG(32))  u1 (.clk, .rst_n, .done(done[1]), .checks(c_checks[1]), .failures(c_fail[1]));
  soclc_cfg_check #(.N_SHORT(64),  .N_LONG(64))  u2 (.clk, .rst_n, .done(done[2]), .checks(c_checks[2]), .failures(c_fail[2]));
  soclc_cfg_check #(.N_SHORT(128), .N_LONG(128)) u3 (.clk, .rst_n, .done(done[3]), .checks(c_checks[3]), .failures(c_fail[3]));
  soclc_cfg_check #(.N_SHORT(16),  .N_LONG(128)) u4 (.clk, .rst_n, .done(done[4]), .checks(c_checks[4]), .failures(c_fail[4]));
  soclc_cfg_check #(.N_SHORT(128), .N_LONG(16))  u5 (.clk, .rst_n, .done(done[5]), .checks(c_checks[5]), .failures(c_fail[5]));
  soclc_cfg_check #(.N_SHORT(64),  .N_LONG(32))  u6 (.clk, .rst_n, .done(done[6]), .checks(c_checks[6]), .failures(c_fail[6]));
  soclc_cfg_check #(.N_SHORT(32),  .N_LONG(64))  u7 (.clk, .rst_n, .done(done[7]), .checks(c_checks[7]), .failures(c_fail[7]));

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (&done);
    for (int c = 0; c < NC; c++) begin checks += c_checks[c]; failures += c_fail[c]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    for (int c = 0; c < NC; c++) begin checks += c_checks[c]; failures += c_fail[c]; end
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
