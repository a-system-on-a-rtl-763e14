// addr_decoder -- shared-bus address decoder.
//
// Selects the slave for the address on the shared bus:
//   sel_soclc  the released-lock index register (INDEX_ADDR, 0x040C) or a lock
//              variable (LOCK_BASE + 4*i, i < N_LOCKS)
//   sel_mem    the shared memory window (MEM_BASE + 4*w, w < MEM_WORDS)
//   sel_none   anything else; the system answers such a transfer itself.
// Purely combinational; at most one output is high.
//
// The design names an address decoder in front of memory and lock cache and
// fixes 0x040C; the other windows are this implementation's choice.
module addr_decoder
  import soclc_pkg::*;
#(
  parameter int unsigned N_LOCKS   = N_SHORT_DEF + N_LONG_DEF,
  parameter int unsigned MEM_WORDS = MEM_WORDS_DEF
) (
  input  logic [ADDR_W-1:0] addr,
  output logic              sel_soclc,
  output logic              sel_mem,
  output logic              sel_none
);

  logic [ADDR_W-1:0] lock_off, mem_off;

  assign lock_off  = addr - LOCK_BASE;
  assign mem_off   = addr - MEM_BASE;
  assign sel_soclc = (addr == INDEX_ADDR) ||
                     ((addr >= LOCK_BASE) && (lock_off[ADDR_W-1:2] < (ADDR_W-2)'(N_LOCKS)));
  assign sel_mem   = !sel_soclc && (addr >= MEM_BASE) &&
                     (mem_off[ADDR_W-1:2] < (ADDR_W-2)'(MEM_WORDS));
  assign sel_none  = !sel_soclc && !sel_mem;

endmodule
