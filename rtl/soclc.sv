// soclc -- SoC Lock Cache: bus slave holding the short-CS and long-CS lock
// variables and the released-lock index register.
//
// The cache is one slave on the shared processor bus. Its decoder maps
//   LOCK_BASE + 4*i  (i < N_SHORT + N_LONG)  lock variable i
//   INDEX_ADDR (0x040C)                      released-lock index of the reader
// A read of a lock variable is a test-and-set that returns the previous lock
// bit in data bit 0 (0 = free, now acquired; 1 = busy, reader now waiting). A
// write of data bit 0 = 0 releases the lock; the lock array then picks one
// waiting processor, and the index unit stores the lock index for it and
// raises its interrupt line intr[p] (INT1..INT4 for four processors). The
// interrupt routine reads INDEX_ADDR to learn which lock was released; the
// index parity tells it the lock kind (see soclc_pkg::is_long_lock: with equal
// counts, even = long CS, odd = short CS). Other addresses in the window read
// as 0 and ignore writes.
//
// Timing: start is a one-cycle strobe with we/addr/wdata/pe valid; the lock
// state changes at that edge and ta pulses one cycle later with rdata. Every
// access therefore takes one clock cycle in the cache itself.
//
// From the design: lock variables with Pr bits, decoder, RE/WE control, the
// per-processor index buffers at 0x040C, the even/odd long/short allocation
// and the lock counts of the synthesis table. This implementation's choices:
// the lock window address, one-cycle access, the protocol of start/ta and the
// behaviour on unmapped addresses.
module soclc
  import soclc_pkg::*;
#(
  parameter int unsigned N_PE    = N_PE_DEF,
  parameter int unsigned N_SHORT = N_SHORT_DEF,
  parameter int unsigned N_LONG  = N_LONG_DEF,
  localparam int unsigned N_LOCKS = N_SHORT + N_LONG,
  localparam int unsigned IDX_W  = (N_LOCKS > 1) ? $clog2(N_LOCKS) : 1,
  localparam int unsigned PE_W   = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               we,
  input  logic [ADDR_W-1:0]  addr,
  input  logic [DATA_W-1:0]  wdata,
  input  logic [PE_W-1:0]    pe,
  output logic               ta,
  output logic [DATA_W-1:0]  rdata,
  output logic [N_PE-1:0]    intr
);

  logic [ADDR_W-1:0] offset;
  logic              is_lock, is_index;
  logic [IDX_W-1:0]  idx;

  assign offset   = addr - LOCK_BASE;
  assign is_lock  = (addr >= LOCK_BASE) && (offset[ADDR_W-1:2] < (ADDR_W-2)'(N_LOCKS))
                    && (offset[1:0] == 2'b00);
  assign is_index = (addr == INDEX_ADDR);
  assign idx      = IDX_W'(offset[ADDR_W-1:2]);

  logic              la_rd_bit, rel_valid;
  logic [IDX_W-1:0]  rel_idx;
  logic [PE_W-1:0]   rel_pe;
  logic [DATA_W-1:0] iu_rdata;

  soclc_lock_array #(.N_PE(N_PE), .N_LOCKS(N_LOCKS)) u_locks (
    .clk, .rst_n,
    .acc_valid (start && is_lock),
    .acc_we    (we),
    .acc_idx   (idx),
    .acc_pe    (pe),
    .acc_wbit  (wdata[0]),
    .rd_bit    (la_rd_bit),
    .rel_valid (rel_valid),
    .rel_idx   (rel_idx),
    .rel_pe    (rel_pe),
    .lock_o    (),
    .pr_o      ()
  );

  soclc_index_unit #(.N_PE(N_PE), .N_LOCKS(N_LOCKS)) u_index (
    .clk, .rst_n,
    .rel_valid (rel_valid),
    .rel_idx   (rel_idx),
    .rel_pe    (rel_pe),
    .rd_valid  (start && is_index && !we),
    .rd_pe     (pe),
    .rd_data   (iu_rdata),
    .intr      (intr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ta    <= 1'b0;
      rdata <= '0;
    end else begin
      ta <= start;
      if (start && !we) begin
        if (is_lock)       rdata <= DATA_W'(la_rd_bit);
        else if (is_index) rdata <= iu_rdata;
        else               rdata <= '0;
      end
    end
  end

endmodule
