// shared_mem -- shared memory of the multiprocessor system.
//
// Single-port synchronous RAM of WORDS words with the memory pins of the
// system diagram: word address AB, write data and read data on DB (split into
// db_in and db_out), read enable RE and write enable WE. A read returns the
// word on db_out after the clock edge at which RE was high; a write stores
// db_in at the edge at which WE was high. Contents are not reset.
//
// The design only names this memory; the size (16 KB by default, room for
// several 1.6 KB database objects) and the synchronous single-port form are
// this implementation's choice.
module shared_mem #(
  parameter int unsigned WORDS  = 4096,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic              clk,
  input  logic              re,
  input  logic              we,
  input  logic [AW-1:0]     ab,
  input  logic [DATA_W-1:0] db_in,
  output logic [DATA_W-1:0] db_out
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[ab] <= db_in;
    if (re) db_out <= mem[ab];
  end

endmodule
