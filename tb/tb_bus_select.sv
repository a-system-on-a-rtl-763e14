// tb_bus_select -- self-checking test of the processor-to-bus multiplexer.
//
// For random requests of four processors, a random grant and random slave
// responses, checks that the shared bus carries the granted processor's
// transfer, that only the granted processor sees TA and read data, and that
// an idle bus carries nothing.
module tb_bus_select;
  import soclc_pkg::*;
  localparam int NP = 4;
  bus_req_t [NP-1:0] req;
  logic busy;
  logic [1:0] gnt_id;
  logic bus_we;
  logic [ADDR_W-1:0] bus_addr;
  logic [DATA_W-1:0] bus_wdata;
  logic ta_in;
  logic [DATA_W-1:0] rdata_in;
  logic [NP-1:0] ta_out;
  logic [NP-1:0][DATA_W-1:0] rdata_out;

  bus_select #(.N_PE(NP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int p = 0; p < NP; p++) begin
        req[p].br = 1'($urandom);
        req[p].we = 1'($urandom);
        req[p].addr = $urandom;
        req[p].wdata = $urandom;
      end
      busy = 1'($urandom_range(3) != 0);
      gnt_id = 2'($urandom);
      ta_in = 1'($urandom);
      rdata_in = $urandom;
      #1;
      if (busy) begin
        check(bus_we == req[gnt_id].we, "we");
        check(bus_addr == req[gnt_id].addr, "addr");
        check(bus_wdata == req[gnt_id].wdata, "wdata");
      end else begin
        check(!bus_we && bus_addr == '0 && bus_wdata == '0, "idle bus");
      end
      for (int p = 0; p < NP; p++) begin
        bit mine;
        mine = busy && (p == int'(gnt_id));
        check(ta_out[p] == (mine && ta_in), "ta routing");
        check(rdata_out[p] == (mine ? rdata_in : '0), "rdata routing");
      end
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
