// huffman_bitpack: Huffman encoding and bit-packing back end. Turns one
// window of selections per cycle into a stream of OUT_W-bit output words.
//
// Structure as in the source architecture: the encoder codes every selected
// literal and match; PWS window packers, served round robin (packer j takes
// the window of every cycle with cycle count mod PWS = j), each spend PWS
// cycles packing one window, so exactly one packer finishes per cycle; the
// output packer joins the finished windows into output words.
//
// Latency: encoder 2 + window packer PWS + output packer 2 = PWS + 4 cycles
// from a window's selections to the output word that completes with it.
module huffman_bitpack
  import lz_pkg::*;
#(
  parameter int unsigned PWS   = 32,
  parameter int unsigned WORDS = (PWS * 9 + 19 + BLOCK_HDR_W + EOB_W + 31) / 32,
  localparam int unsigned OUT_W = WORDS * 32,
  localparam int unsigned OSW   = $clog2(OUT_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_last,
  input  sel_t [PWS-1:0]    in_sel,
  output logic              out_valid,
  output logic              out_last,
  output logic [OUT_W-1:0]  out_data,
  output logic [OSW-1:0]    out_bits
);

  localparam int unsigned SW = $clog2(WORDS * 32 + 1);
  localparam int unsigned RW = (PWS > 1) ? $clog2(PWS) : 1;

  logic            e_valid, e_last;
  code_t [PWS-1:0] e_code;

  huff_encoder #(.PWS(PWS)) u_enc (
    .clk, .rst_n,
    .in_valid, .in_last, .in_sel,
    .out_valid(e_valid), .out_last(e_last), .out_code(e_code)
  );

  // round-robin slot pointer, advances every cycle
  logic [RW-1:0] slot;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slot <= '0;
    else        slot <= (int'(slot) == PWS - 1) ? '0 : slot + 1'b1;
  end

  logic [PWS-1:0]                 wp_valid, wp_last;
  logic [PWS-1:0][WORDS*32-1:0]   wp_data;
  logic [PWS-1:0][SW-1:0]         wp_size;

  for (genvar j = 0; j < PWS; j++) begin : g_wp
    window_packer #(.PWS(PWS), .WORDS(WORDS)) u_wp (
      .clk, .rst_n,
      .load     (int'(slot) == j),
      .in_valid (e_valid),
      .in_last  (e_last),
      .in_code  (e_code),
      .out_valid(wp_valid[j]),
      .out_last (wp_last[j]),
      .out_data (wp_data[j]),
      .out_size (wp_size[j])
    );
  end

  // at most one packer finishes per cycle
  logic              f_valid, f_last;
  logic [WORDS*32-1:0] f_data;
  logic [SW-1:0]     f_size;
  always_comb begin
    f_valid = 1'b0;
    f_last  = 1'b0;
    f_data  = '0;
    f_size  = '0;
    for (int j = 0; j < PWS; j++)
      if (wp_valid[j]) begin
        f_valid = 1'b1;
        f_last  = wp_last[j];
        f_data  = wp_data[j];
        f_size  = wp_size[j];
      end
  end

  output_packer #(.IN_W(WORDS * 32), .OUT_W(OUT_W)) u_out (
    .clk, .rst_n,
    .in_valid(f_valid), .in_last(f_last), .in_data(f_data), .in_size(f_size),
    .out_valid, .out_last, .out_data, .out_bits
  );

  // one window packer at a time
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wp_valid));

endmodule
