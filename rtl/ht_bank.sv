// ht_bank: one bank of the multi-banked hash table, holding the most recent
// position for each of its DEPTH hash indexes (hash table depth 1).
//
// The bank serves two requests per pipeline cycle. In the source
// architecture this is done by clocking the bank RAM at twice the pipeline
// clock, so request 0 is served in the first half cycle and request 1 in the
// second. This model keeps that behaviour in a single clock domain: each
// port reads the old entry and writes its own position (read-old-data
// mode), and port 1 sees port 0's write when both use the same index, as it
// would in the second half of a double-pumped cycle. Read data is
// registered (one cycle latency).
module ht_bank
  import lz_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              en0,
  input  logic [AW-1:0]     addr0,
  input  logic [POS_W-1:0]  wdata0,
  input  logic              en1,
  input  logic [AW-1:0]     addr1,
  input  logic [POS_W-1:0]  wdata1,
  output logic [POS_W-1:0]  rdata0,
  output logic [POS_W-1:0]  rdata1
);

  logic [POS_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    rdata0 <= mem[addr0];
    rdata1 <= (en0 && addr0 == addr1) ? wdata0 : mem[addr1];
    if (en0) mem[addr0] <= wdata0;
    if (en1) mem[addr1] <= wdata1;
  end

endmodule
