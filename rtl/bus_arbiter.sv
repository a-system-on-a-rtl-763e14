// bus_arbiter -- shared-bus arbiter and transfer sequencer.
//
// Each processor raises its bus request br[p] and holds it, with its transfer
// on its request lines, until it sees its transfer acknowledge (TA). When the
// bus is idle the arbiter grants the next requester in round-robin order
// (starting after the last master granted), asserts that master's bus grant
// bg[p] and presents its number on gnt_id. In the following cycle it sends a
// one-cycle start strobe to the slaves, then holds the grant until a slave
// answers with ta_in; the bus is idle again in the next cycle.
//
// Timing: request seen in cycle 0, grant and start in cycle 1, slave TA in
// cycle 1 + slave latency; a new grant is possible one cycle after TA.
//
// The system's arbiter is only named in the design (one arbiter shared by the
// processors, with BR/BG per processor); the round-robin policy and this
// three-state sequence are this implementation's choice. Assertions check that
// the grant is one-hot and that TA only comes while a transfer is open.
module bus_arbiter #(
  parameter int unsigned N_PE = 4,
  localparam int unsigned PE_W = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_PE-1:0] br,
  input  logic            ta_in,
  output logic [N_PE-1:0] bg,
  output logic [PE_W-1:0] gnt_id,
  output logic            start,
  output logic            busy
);

  typedef enum logic [1:0] {IDLE, ADDR, DATA} state_t;
  state_t state_q;

  logic [PE_W-1:0] last_q;
  logic            any_req;
  logic [PE_W-1:0] pick;

  always_comb begin
    int unsigned p;
    any_req = 1'b0;
    pick    = '0;
    for (int unsigned k = 1; k <= N_PE; k++) begin
      p = (int'(last_q) + k) % N_PE;
      if (!any_req && br[p]) begin
        any_req = 1'b1;
        pick    = PE_W'(p);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      gnt_id  <= '0;
      last_q  <= PE_W'(N_PE - 1);
    end else begin
      unique case (state_q)
        IDLE: if (any_req) begin
          state_q <= ADDR;
          gnt_id  <= pick;
          last_q  <= pick;
        end
        ADDR: state_q <= DATA;
        DATA: if (ta_in) state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end

  assign start = (state_q == ADDR);
  assign busy  = (state_q != IDLE);

  always_comb begin
    bg = '0;
    if (busy) bg[gnt_id] = 1'b1;
  end

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(bg));
  a_ta_in_transfer: assert property (@(posedge clk) disable iff (!rst_n)
                                     ta_in |-> state_q == DATA);

endmodule
