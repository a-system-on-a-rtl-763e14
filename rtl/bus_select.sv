// bus_select -- processor-to-shared-bus multiplexer.
//
// Puts the transfer of the granted processor (gnt_id, valid while busy) on
// the shared address and data bus, and routes the slave's transfer
// acknowledge and read data back to that processor only. All other
// processors see ta = 0 and rdata = 0. Purely combinational.
//
// The block is named in the design's diagram between the processors' A/D
// buses and the lock cache; here it serves the whole shared bus (memory and
// lock cache), which is this implementation's reading of the bus diagram.
module bus_select
  import soclc_pkg::*;
#(
  parameter int unsigned N_PE = 4,
  localparam int unsigned PE_W = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  bus_req_t [N_PE-1:0]              req,
  input  logic                             busy,
  input  logic [PE_W-1:0]                  gnt_id,
  output logic                             bus_we,
  output logic [ADDR_W-1:0]                bus_addr,
  output logic [DATA_W-1:0]                bus_wdata,
  input  logic                             ta_in,
  input  logic [DATA_W-1:0]                rdata_in,
  output logic [N_PE-1:0]                  ta_out,
  output logic [N_PE-1:0][DATA_W-1:0]      rdata_out
);

  bus_req_t cur;

  assign cur       = req[gnt_id];
  assign bus_we    = busy && cur.we;
  assign bus_addr  = busy ? cur.addr  : '0;
  assign bus_wdata = busy ? cur.wdata : '0;

  always_comb begin
    ta_out    = '0;
    rdata_out = '0;
    if (busy) begin
      ta_out[gnt_id]    = ta_in;
      rdata_out[gnt_id] = rdata_in;
    end
  end

endmodule
