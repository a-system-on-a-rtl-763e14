// soclc_soc -- shared-memory multiprocessor system built around the SoC Lock
// Cache (SoCLC).
//
// N_PE processors (PowerPC 750s in the reference system; outside this module)
// share one bus. Each brings its bus request (BR plus transfer) in on pe_req[p]
// and gets back its bus grant pe_bg[p], transfer acknowledge pe_ta[p] and read
// data pe_rdata[p], and its lock-cache interrupt intr[p] (INT1..INT4).
// Inside:
//   bus_arbiter   round-robin grant, one transfer at a time
//   bus_select    puts the granted processor's transfer on the shared bus
//   addr_decoder  chooses the lock cache, the shared memory or neither
//   soclc         lock variables, Pr bits, interrupt and 0x040C index register
//   mem_ctrl      memory controller with MEM_WAIT wait states
//   shared_mem    MEM_WORDS x 32-bit shared memory
// A transfer to an unmapped address is acknowledged one cycle after its start
// and reads as 0.
//
// Latency from BR to TA on an idle bus: 2 cycles for the lock cache,
// 3 + MEM_WAIT for memory; a transfer right after another adds one cycle.
//
// The block structure follows the design's system diagram (processors, memory,
// lock cache, arbiter and memory controller on one bus). The bus protocol is a
// simplified request/grant/acknowledge handshake, not the 60x bus of the
// processors; that is this implementation's choice.
module soclc_soc
  import soclc_pkg::*;
#(
  parameter int unsigned N_PE      = N_PE_DEF,
  parameter int unsigned N_SHORT   = N_SHORT_DEF,
  parameter int unsigned N_LONG    = N_LONG_DEF,
  parameter int unsigned MEM_WORDS = MEM_WORDS_DEF,
  parameter int unsigned MEM_WAIT  = 1,
  localparam int unsigned PE_W = (N_PE > 1) ? $clog2(N_PE) : 1,
  localparam int unsigned MAW  = (MEM_WORDS > 1) ? $clog2(MEM_WORDS) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  bus_req_t [N_PE-1:0]         pe_req,
  output logic [N_PE-1:0]             pe_bg,
  output logic [N_PE-1:0]             pe_ta,
  output logic [N_PE-1:0][DATA_W-1:0] pe_rdata,
  output logic [N_PE-1:0]             intr
);

  logic [N_PE-1:0]   br;
  logic [PE_W-1:0]   gnt_id;
  logic              start, busy;
  logic              bus_we;
  logic [ADDR_W-1:0] bus_addr;
  logic [DATA_W-1:0] bus_wdata;
  logic              bus_ta;
  logic [DATA_W-1:0] bus_rdata;

  always_comb begin
    for (int p = 0; p < N_PE; p++) br[p] = pe_req[p].br;
  end

  bus_arbiter #(.N_PE(N_PE)) u_arbiter (
    .clk, .rst_n, .br, .ta_in(bus_ta), .bg(pe_bg), .gnt_id, .start, .busy
  );

  bus_select #(.N_PE(N_PE)) u_select (
    .req(pe_req), .busy, .gnt_id, .bus_we, .bus_addr, .bus_wdata,
    .ta_in(bus_ta), .rdata_in(bus_rdata), .ta_out(pe_ta), .rdata_out(pe_rdata)
  );

  logic sel_soclc, sel_mem, sel_none;

  addr_decoder #(.N_LOCKS(N_SHORT + N_LONG), .MEM_WORDS(MEM_WORDS)) u_decoder (
    .addr(bus_addr), .sel_soclc, .sel_mem, .sel_none
  );

  logic              lc_ta, mc_ta;
  logic [DATA_W-1:0] lc_rdata, mc_rdata;

  soclc #(.N_PE(N_PE), .N_SHORT(N_SHORT), .N_LONG(N_LONG)) u_soclc (
    .clk, .rst_n,
    .start (start && sel_soclc),
    .we    (bus_we),
    .addr  (bus_addr),
    .wdata (bus_wdata),
    .pe    (gnt_id),
    .ta    (lc_ta),
    .rdata (lc_rdata),
    .intr  (intr)
  );

  logic              mem_re, mem_we;
  logic [MAW-1:0]    mem_ab;
  logic [DATA_W-1:0] mem_din, mem_dout;

  mem_ctrl #(.MEM_WORDS(MEM_WORDS), .MEM_WAIT(MEM_WAIT)) u_memctrl (
    .clk, .rst_n,
    .start (start && sel_mem),
    .we    (bus_we),
    .addr  (bus_addr),
    .wdata (bus_wdata),
    .ta    (mc_ta),
    .rdata (mc_rdata),
    .mem_re, .mem_we, .mem_ab,
    .mem_db_out (mem_din),
    .mem_db_in  (mem_dout)
  );

  shared_mem #(.WORDS(MEM_WORDS), .DATA_W(DATA_W)) u_mem (
    .clk, .re(mem_re), .we(mem_we), .ab(mem_ab), .db_in(mem_din), .db_out(mem_dout)
  );

  // Default responder for unmapped addresses.
  logic none_ta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) none_ta <= 1'b0;
    else        none_ta <= start && sel_none;
  end

  assign bus_ta    = lc_ta | mc_ta | none_ta;
  assign bus_rdata = lc_ta ? lc_rdata : (mc_ta ? mc_rdata : '0);

endmodule
