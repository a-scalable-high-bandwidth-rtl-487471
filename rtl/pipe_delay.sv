// pipe_delay: a chain of N registers that carries W bits alongside a
// pipeline stage of the same depth. N = 0 is a wire.
//
// Interface: d is sampled every rising clock edge and appears on q N cycles
// later; there is no enable and no reset, since the data it carries is
// qualified by a valid bit that travels through the reset pipeline beside
// it. A helper of this design, not a block of the published architecture.
module pipe_delay #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] r [N];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int i = 1; i < N; i++) r[i] <= r[i-1];
    end
    assign q = r[N-1];
  end
endmodule
