// output_packer: joins packed windows into a stream of OUT_W-bit words.
//
// A packed window (up to IN_W bits, with its size) is registered, shifted
// by a barrel shifter to the current fill level and ORed into a 2*OUT_W-bit
// double buffer. Whenever the lower half is full it is sent out as one
// output word and the upper half moves down. The stream of one input
// stream is framed as a single fixed-code block: the 3-bit block header is
// placed in front of its first window and the 7-bit end-of-block code after
// its last; the last word is then sent with out_last and out_bits, the
// number of valid bits in it. If the last window also fills a word, the
// final partial word follows in the next cycle. Framing is this design's
// choice; it makes the output a standard fixed-Huffman block (with 64 KiB
// distances).
//
// Stall-free: OUT_W must exceed the largest window plus the header, so one
// word per cycle always drains what a window adds. The source uses
// PWS*8-bit words with its own code book; here literals may take 9 bits, so
// the word is sized from the worst case (see lz_compressor).
//
// Timing: two stages, input register then accumulate; an output word
// appears two cycles after the window that completes it.
module output_packer
  import lz_pkg::*;
#(
  parameter int unsigned IN_W  = 320,
  parameter int unsigned OUT_W = 320,
  localparam int unsigned ISW  = $clog2(IN_W + 1),
  localparam int unsigned OSW  = $clog2(OUT_W + 1),
  localparam int unsigned FW   = $clog2(2 * OUT_W + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_last,
  input  logic [IN_W-1:0]       in_data,
  input  logic [ISW-1:0]        in_size,
  output logic                  out_valid,
  output logic                  out_last,
  output logic [OUT_W-1:0]      out_data,
  output logic [OSW-1:0]        out_bits
);

  // stage 1
  logic              r_valid, r_last;
  logic [IN_W-1:0]   r_data;
  logic [ISW-1:0]    r_size;

  // stage 2 state
  logic [2*OUT_W-1:0] acc;
  logic [FW-1:0]      fill;
  logic               first;      // next window starts a stream
  logic               pend;       // final partial word pending
  logic [OUT_W-1:0]   pend_data;
  logic [OSW-1:0]     pend_bits;

  logic [2*OUT_W-1:0] b_acc, n_acc;
  logic [FW-1:0]      b_fill, n_fill;

  always_comb begin
    b_acc  = first ? (2*OUT_W)'(BLOCK_HDR) : acc;
    b_fill = first ? FW'(BLOCK_HDR_W) : fill;
    n_acc  = b_acc | ((2*OUT_W)'(r_data) << b_fill);
    n_fill = b_fill + FW'(r_size) + (r_last ? FW'(EOB_W) : '0);
  end

  always_ff @(posedge clk) begin
    r_data <= in_data;
    r_size <= in_size;
    r_last <= in_last;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid   <= 1'b0;
      acc       <= '0;
      fill      <= '0;
      first     <= 1'b1;
      pend      <= 1'b0;
      pend_data <= '0;
      pend_bits <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
      out_bits  <= '0;
    end else begin
      r_valid   <= in_valid;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (pend) begin
        out_valid <= 1'b1;
        out_last  <= 1'b1;
        out_data  <= pend_data;
        out_bits  <= pend_bits;
        pend      <= 1'b0;
      end
      if (r_valid) begin
        first <= r_last;
        if (n_fill >= FW'(OUT_W)) begin
          // one full word
          out_valid <= 1'b1;
          out_data  <= n_acc[OUT_W-1:0];
          out_bits  <= OSW'(OUT_W);
          if (r_last) begin
            acc  <= '0;
            fill <= '0;
            if (n_fill == FW'(OUT_W)) out_last <= 1'b1;
            else begin
              pend      <= 1'b1;
              pend_data <= n_acc[2*OUT_W-1:OUT_W];
              pend_bits <= OSW'(n_fill - FW'(OUT_W));
            end
          end else begin
            acc  <= n_acc >> OUT_W;
            fill <= n_fill - FW'(OUT_W);
          end
        end else if (r_last) begin
          if (pend) begin
            // the previous stream's final word goes out this cycle
            pend      <= 1'b1;
            pend_data <= n_acc[OUT_W-1:0];
            pend_bits <= OSW'(n_fill);
          end else begin
            out_valid <= 1'b1;
            out_last  <= 1'b1;
            out_data  <= n_acc[OUT_W-1:0];
            out_bits  <= OSW'(n_fill);
          end
          acc       <= '0;
          fill      <= '0;
        end else begin
          acc  <= n_acc;
          fill <= n_fill;
        end
      end
    end
  end

endmodule
