// soclc_pkg -- shared types and constants of the SoC Lock Cache (SoCLC) system.
//
// The lock cache holds short-CS and long-CS lock variables. Following the
// example allocation of the design, locks are interleaved: even indices are
// long-CS locks and odd indices are short-CS locks, as far as both kinds
// exist; any surplus of one kind takes the remaining top indices. The default
// sizes (128 short + 128 long = 256 locks, four processors) are the largest
// configuration of the design's synthesis table.
//
// Memory map (byte addresses). 0x040C, the released-lock index register, is
// the design's own address. The lock window at 0x0800 (one 32-bit word per
// lock) and the shared-memory window at 0x10000 are this implementation's
// choice.
//
// The bus request bundle is a packed struct so that the same bundle is used on
// processor ports, inside the bus multiplexer and on the shared bus.
package soclc_pkg;

  parameter int unsigned ADDR_W = 32;
  parameter int unsigned DATA_W = 32;

  parameter int unsigned N_PE_DEF    = 4;
  parameter int unsigned N_SHORT_DEF = 128;
  parameter int unsigned N_LONG_DEF  = 128;

  // Released-lock index register, read by a processor's interrupt routine.
  parameter logic [ADDR_W-1:0] INDEX_ADDR = 32'h0000_040C;
  // First lock variable; lock i sits at LOCK_BASE + 4*i.
  parameter logic [ADDR_W-1:0] LOCK_BASE  = 32'h0000_0800;
  // Shared memory window.
  parameter logic [ADDR_W-1:0] MEM_BASE   = 32'h0001_0000;
  parameter int unsigned       MEM_WORDS_DEF = 4096;

  // Value returned by the index register when no released lock is pending.
  parameter logic [DATA_W-1:0] NO_INDEX = '1;

  // One processor's bus request: BR plus the transfer it wants.
  typedef struct packed {
    logic              br;     // bus request, held until TA
    logic              we;     // 1: write, 0: read
    logic [ADDR_W-1:0] addr;   // byte address, word aligned
    logic [DATA_W-1:0] wdata;  // write data
  } bus_req_t;

  // Kind of lock idx in a cache with n_short short-CS and n_long long-CS locks.
  // Returns 1 for a long-CS lock.
  function automatic logic is_long_lock(int unsigned idx, int unsigned n_short,
                                        int unsigned n_long);
    int unsigned pairs;
    pairs = (n_short < n_long) ? n_short : n_long;
    if (idx < 2 * pairs) return (idx % 2) == 0;
    return n_long > n_short;
  endfunction

endpackage
