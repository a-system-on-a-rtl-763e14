// soclc_index_unit -- released-lock index unit of the SoC Lock Cache.
//
// When a lock is released and a waiting processor is chosen, the lock array
// raises a release event (rel_valid, rel_idx, rel_pe). This unit records the
// released lock's index for that processor and raises the processor's
// interrupt line. The interrupt routine on the processor reads the index at
// the memory-mapped index register (0x040C in the system map); the read
// returns the index and removes it, and the interrupt line stays high while
// further indices are pending for that processor.
//
// Storage is one pending bit per (processor, lock): a processor may have
// several tasks waiting on different long-CS locks, so several releases can
// be pending for it at once and none can be lost. A read returns the lowest
// pending index; with nothing pending it returns NO_INDEX (all ones).
//
// Interface: one release event and one read per cycle at most (both come from
// the single shared bus, so they never fall in the same cycle; if they do, the
// read returns the older state and the new event is still recorded).
// rd_data is combinational for rd_pe; the pending bit is cleared at the next
// clock edge. intr is registered state (a release shows on intr one cycle
// after the event).
//
// From the design: index kept per lock and per processor, written for the
// processor that receives the interrupt, read from a memory-mapped address.
// This implementation's choices: the pending-bit storage, lowest-index-first
// read order, read-to-clear, and the NO_INDEX value.
module soclc_index_unit
  import soclc_pkg::*;
#(
  parameter int unsigned N_PE    = 4,
  parameter int unsigned N_LOCKS = 256,
  localparam int unsigned IDX_W  = (N_LOCKS > 1) ? $clog2(N_LOCKS) : 1,
  localparam int unsigned PE_W   = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rel_valid,
  input  logic [IDX_W-1:0]    rel_idx,
  input  logic [PE_W-1:0]     rel_pe,
  input  logic                rd_valid,
  input  logic [PE_W-1:0]     rd_pe,
  output logic [DATA_W-1:0]   rd_data,
  output logic [N_PE-1:0]     intr
);

  logic [N_PE-1:0][N_LOCKS-1:0] pend_q;
  logic [N_LOCKS-1:0]           sel_pend;
  logic                         hit;
  logic [IDX_W-1:0]             hit_idx;

  assign sel_pend = pend_q[rd_pe];

  // Lowest pending index of the reading processor.
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = N_LOCKS - 1; i >= 0; i--) begin
      if (sel_pend[i]) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
      end
    end
  end

  assign rd_data = hit ? DATA_W'(hit_idx) : NO_INDEX;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= '0;
    end else begin
      if (rd_valid && hit) pend_q[rd_pe][hit_idx] <= 1'b0;
      if (rel_valid)       pend_q[rel_pe][rel_idx] <= 1'b1;
    end
  end

  always_comb begin
    for (int p = 0; p < N_PE; p++) intr[p] = |pend_q[p];
  end

endmodule
