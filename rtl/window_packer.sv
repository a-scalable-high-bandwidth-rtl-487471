// window_packer: collects the variable-length codes of one window into a
// contiguous bit string, one code per cycle.
//
// Datapath as in the source architecture: a 64-bit barrel shifter aligns
// the incoming code (up to 28 bits) to the current fill level; the result
// is ORed into a double buffer of two 32-bit registers (lower, upper). When
// the lower register is full it is moved to the word register file and the
// upper register becomes the lower one. At the end of the window the partly
// filled lower register is moved too. The word store is written by index
// (word count) rather than shifted, so the packed window always starts at
// bit 0 of out_data; it has WORDS words, enough for the largest window this
// code book can produce (the source sizes it at PWS/4 words for its own code
// book).
//
// Timing: a window is taken in the cycle load is high; its code 0 is
// packed in that cycle and code k in cycle k after it. The packed window is
// presented on out_* PWS cycles after load, for one cycle. PWS packers used
// round robin therefore finish one window per cycle. in_valid = 0 with load
// = 1 takes an empty slot and produces no output.
module window_packer
  import lz_pkg::*;
#(
  parameter int unsigned PWS   = 32,
  parameter int unsigned WORDS = (PWS * 9 + 19 + BLOCK_HDR_W + EOB_W + 31) / 32,
  localparam int unsigned SW   = $clog2(WORDS * 32 + 1),
  localparam int unsigned KW   = $clog2(PWS + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic                     in_valid,
  input  logic                     in_last,
  input  code_t [PWS-1:0]          in_code,
  output logic                     out_valid,
  output logic                     out_last,
  output logic [WORDS*32-1:0]      out_data,
  output logic [SW-1:0]            out_size
);

  localparam int unsigned WW = $clog2(WORDS + 1);

  code_t [PWS-1:0]         codes;
  logic                    busy, win_valid, win_last;
  logic [KW-1:0]           k;           // index of the code packed this cycle
  logic [63:0]             dbuf;        // {upper, lower}
  logic [5:0]              fill;        // bits held in dbuf (0..31 between codes)
  logic [WORDS-1:0][31:0]  words;
  logic [WW-1:0]           nwords;

  // one packing step on the current code
  code_t          cur;
  logic           active, fin;
  logic [63:0]    base_buf, shifted, nbuf;
  logic [5:0]     base_fill, nfill;
  logic [WW-1:0]  base_nw;
  logic [WORDS-1:0][31:0] base_words, nwords_q;
  logic [WW-1:0]  nnw;

  always_comb begin
    active     = load || busy;
    cur        = load ? in_code[0] : codes[k];
    base_buf   = load ? '0 : dbuf;
    base_fill  = load ? '0 : fill;
    base_nw    = load ? '0 : nwords;
    base_words = load ? '0 : words;
    // barrel shifter and OR into the double buffer
    shifted    = 64'(cur.bits) << base_fill;
    nbuf       = base_buf | shifted;
    nfill      = base_fill + 6'(cur.size);
    nnw        = base_nw;
    nwords_q   = base_words;
    if (nfill >= 6'd32) begin
      nwords_q[base_nw] = nbuf[31:0];
      nnw   = base_nw + 1'b1;
      nbuf  = nbuf >> 32;
      nfill = nfill - 6'd32;
    end
    fin = active && ((load && PWS == 1) || (!load && int'(k) == PWS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= fin && (load ? in_valid : win_valid);
      if (fin)       busy <= 1'b0;
      else if (load) busy <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (load) begin
      codes     <= in_code;
      win_valid <= in_valid;
      win_last  <= in_last;
      k         <= KW'(1);
    end else if (busy) begin
      k <= k + 1'b1;
    end
    if (active) begin
      dbuf   <= nbuf;
      fill   <= nfill;
      words  <= nwords_q;
      nwords <= nnw;
    end
    if (fin) begin
      // move the partial lower register out with the finished words
      logic [WORDS-1:0][31:0] fw;
      fw = nwords_q;
      if (nfill != 0) fw[nnw] = nbuf[31:0];
      out_data <= fw;
      out_size <= SW'(int'(nnw) * 32 + int'(nfill));
      out_last <= load ? in_last : win_last;
    end
  end

endmodule
