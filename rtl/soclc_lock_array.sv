// soclc_lock_array -- lock variables and per-processor waiting bits of the
// SoC Lock Cache (the "basic lock" part).
//
// Each of the N_LOCKS entries holds one lock bit and N_PE "Pr" bits; Pr[p] is
// set while processor p is waiting for that lock. One access is made per
// cycle, by processor acc_pe on lock acc_idx:
//   read  (test-and-set): rd_bit returns the lock bit as it was (bit 0 of the
//         data bus; 0 = free). A free lock becomes held and the reader's Pr bit
//         is cleared; a held lock stays held and the reader's Pr bit is set.
//   write: the lock bit takes acc_wbit. Writing 0 releases the lock. If any
//         processor waits on the lock, exactly one of them is chosen, its Pr
//         bit is cleared and a release event (rel_valid, rel_idx, rel_pe) is
//         raised so that the index unit can interrupt that processor. Writing 1
//         sets the lock without touching the Pr bits (start-up initialisation).
// The lock is free after a release; the notified processor acquires it by
// reading it again. Only one waiter is notified per release.
//
// Timing: rd_bit and the release event are combinational in the access cycle;
// the state is updated at the following clock edge. Reset clears all locks and
// Pr bits.
//
// From the design: lock and Pr bits per lock, test-and-set on Data[0],
// interrupting a waiting processor on release and choosing which one in
// hardware. This implementation's choices: the choice is round robin, starting
// with the processor after the releasing one, so that no waiter is passed over
// twice in a row; a write of 1 sets the lock.
module soclc_lock_array #(
  parameter int unsigned N_PE    = 4,
  parameter int unsigned N_LOCKS = 256,
  localparam int unsigned IDX_W  = (N_LOCKS > 1) ? $clog2(N_LOCKS) : 1,
  localparam int unsigned PE_W   = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // access port
  input  logic                 acc_valid,
  input  logic                 acc_we,
  input  logic [IDX_W-1:0]     acc_idx,
  input  logic [PE_W-1:0]      acc_pe,
  input  logic                 acc_wbit,
  output logic                 rd_bit,
  // release notification
  output logic                 rel_valid,
  output logic [IDX_W-1:0]     rel_idx,
  output logic [PE_W-1:0]      rel_pe,
  // state, for observation
  output logic [N_LOCKS-1:0]   lock_o,
  output logic [N_LOCKS-1:0][N_PE-1:0] pr_o
);

  logic [N_LOCKS-1:0]           lock_q;
  logic [N_LOCKS-1:0][N_PE-1:0] pr_q;

  logic [N_PE-1:0] waiters;
  logic            found;
  logic [PE_W-1:0] next_pe;

  assign waiters = pr_q[acc_idx];
  assign rd_bit  = lock_q[acc_idx];

  // Round-robin choice of the next waiter, starting after the releaser.
  always_comb begin
    int unsigned p;
    found   = 1'b0;
    next_pe = '0;
    for (int unsigned k = 1; k <= N_PE; k++) begin
      p = (int'(acc_pe) + k) % N_PE;
      if (!found && waiters[p]) begin
        found   = 1'b1;
        next_pe = PE_W'(p);
      end
    end
  end

  assign rel_valid = acc_valid && acc_we && !acc_wbit && found;
  assign rel_idx   = acc_idx;
  assign rel_pe    = next_pe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_q <= '0;
      pr_q   <= '0;
    end else if (acc_valid) begin
      if (acc_we) begin
        lock_q[acc_idx] <= acc_wbit;
        if (rel_valid) pr_q[acc_idx][next_pe] <= 1'b0;
      end else if (lock_q[acc_idx]) begin
        pr_q[acc_idx][acc_pe] <= 1'b1;
      end else begin
        lock_q[acc_idx]       <= 1'b1;
        pr_q[acc_idx][acc_pe] <= 1'b0;
      end
    end
  end

  assign lock_o = lock_q;
  assign pr_o   = pr_q;

endmodule
