// data_memory: history memory of the compressor. Holds the last DM_BYTES
// input bytes and gives each of NRD read ports PWS consecutive bytes from
// any byte address every cycle.
//
// Each read port has its own replica of the memory (the source replicates
// the memory PWS times, one per matcher). A replica is split into PWS
// byte-wide banks; byte address a lives in bank a mod PWS, row a / PWS. A
// window write (PWS bytes at a PWS-aligned address) fills one row of all
// banks. A read at address A takes row A/PWS from banks at or above A mod
// PWS and the next row from the banks below, then the aligner rotates the
// bank outputs so that byte k of the result is address A+k. Addresses wrap
// modulo DM_BYTES.
//
// Timing: read address in cycle t, bank data registered at t+1, aligned
// data registered at t+2 (two-cycle latency). A read issued in the same
// cycle as a write to the same row returns the old bytes.
module data_memory #(
  parameter int unsigned PWS      = 32,
  parameter int unsigned NRD      = 32,
  parameter int unsigned DM_BYTES = 65536,
  localparam int unsigned AW      = $clog2(DM_BYTES),
  localparam int unsigned ROWS    = DM_BYTES / PWS,
  localparam int unsigned RW      = $clog2(ROWS),
  localparam int unsigned OW      = $clog2(PWS)
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [AW-1:0]                 waddr,   // PWS-aligned
  input  logic [PWS-1:0][7:0]           wdata,
  input  logic [NRD-1:0][AW-1:0]        raddr,
  output logic [NRD-1:0][PWS-1:0][7:0]  rdata
);

  logic [RW-1:0] wrow;
  assign wrow = RW'(waddr / AW'(PWS));

  for (genvar r = 0; r < NRD; r++) begin : g_rep
    logic [7:0]          mem [PWS][ROWS];
    logic [RW-1:0]       row0, row1;
    logic [OW-1:0]       off;
    logic [PWS-1:0][7:0] bank_q;
    logic [OW-1:0]       off_q;

    assign row0 = RW'(raddr[r] / AW'(PWS));
    assign row1 = (row0 == RW'(ROWS - 1)) ? '0 : row0 + 1'b1;
    assign off  = OW'(raddr[r] % AW'(PWS));

    for (genvar b = 0; b < PWS; b++) begin : g_b
      always_ff @(posedge clk) begin
        bank_q[b] <= mem[b][(b < off) ? row1 : row0];
        if (we) mem[b][wrow] <= wdata[b];
      end
    end

    always_ff @(posedge clk) begin
      off_q <= off;
      for (int k = 0; k < PWS; k++)
        rdata[r][k] <= bank_q[(k + int'(off_q)) % PWS];
    end
  end

endmodule
