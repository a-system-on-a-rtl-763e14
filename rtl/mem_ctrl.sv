// mem_ctrl -- memory controller between the shared bus and the shared memory.
//
// On a start strobe for the memory window it latches the transfer, waits
// MEM_WAIT cycles (the memory's wait states), then drives the memory's word
// address AB, write data, and RE or WE for one cycle. In the cycle after that
// it pulses ta; for a read, rdata then carries the memory's output word.
//
// Timing: start in cycle 0, RE/WE in cycle 1 + MEM_WAIT, ta in cycle
// 2 + MEM_WAIT. A start must not arrive while a transfer is in progress
// (asserted); the arbiter serialises transfers.
//
// The design names an arbiter and memory controller on the processor bus; the
// wait-state count and this sequence are this implementation's choice.
module mem_ctrl
  import soclc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = MEM_WORDS_DEF,
  parameter int unsigned MEM_WAIT  = 1,
  localparam int unsigned AW = (MEM_WORDS > 1) ? $clog2(MEM_WORDS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // shared-bus side
  input  logic              start,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic              ta,
  output logic [DATA_W-1:0] rdata,
  // memory side
  output logic              mem_re,
  output logic              mem_we,
  output logic [AW-1:0]     mem_ab,
  output logic [DATA_W-1:0] mem_db_out,
  input  logic [DATA_W-1:0] mem_db_in
);

  typedef enum logic [1:0] {IDLE, WAIT, ACCESS, RESP} state_t;
  state_t state_q;

  logic              we_q;
  logic [AW-1:0]     ab_q;
  logic [DATA_W-1:0] wdata_q;
  logic [$clog2(MEM_WAIT + 1)-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      we_q    <= 1'b0;
      ab_q    <= '0;
      wdata_q <= '0;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        IDLE: if (start) begin
          we_q    <= we;
          ab_q    <= AW'((addr - MEM_BASE) >> 2);
          wdata_q <= wdata;
          cnt_q   <= ($bits(cnt_q))'(MEM_WAIT);
          state_q <= (MEM_WAIT == 0) ? ACCESS : WAIT;
        end
        WAIT: begin
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == 1) state_q <= ACCESS;
        end
        ACCESS: state_q <= RESP;
        RESP:   state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end

  assign mem_re     = (state_q == ACCESS) && !we_q;
  assign mem_we     = (state_q == ACCESS) && we_q;
  assign mem_ab     = ab_q;
  assign mem_db_out = wdata_q;
  assign ta         = (state_q == RESP);
  assign rdata      = (state_q == RESP && !we_q) ? mem_db_in : '0;

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> state_q == IDLE);

endmodule
