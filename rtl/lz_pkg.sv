// lz_pkg: types, constants and code-table functions shared by the
// LZ77 + static Huffman compression pipeline.
//
// Positions are 32-bit absolute byte counts of the input stream. A match is
// a (length, offset) pair; the smallest match worth coding is MIN_MATCH
// bytes. The static code book is the fixed literal/length code of DEFLATE
// (RFC 1951, block type 01) with the distance code extended to 32 symbols
// (codes 30 and 31 carry 14 extra bits) so that offsets up to 64 KiB, the
// size of the history memory, can be coded. The code book is this design's
// choice: the source architecture uses a static code book ROM but does not
// give its contents. All codes are emitted LSB first, so Huffman codes,
// which DEFLATE transmits MSB first, are bit-reversed here.
package lz_pkg;

  localparam int unsigned POS_W     = 32;  // absolute stream position
  localparam int unsigned LEN_W     = 8;   // match length field
  localparam int unsigned OFF_W     = 16;  // match offset field (1..65535)
  localparam int unsigned MIN_MATCH = 4;   // shortest match that is kept
  localparam int unsigned CODE_W    = 28;  // widest code for lengths <= 34
  localparam int unsigned CSIZE_W   = 5;   // code size field, 0..28

  // Header of a fixed-code block, LSB first: BFINAL=1, BTYPE=01.
  localparam logic [2:0] BLOCK_HDR   = 3'b011;
  localparam int unsigned BLOCK_HDR_W = 3;
  // End-of-block symbol 256 is the 7-bit all-zero code.
  localparam int unsigned EOB_W       = 7;

  // What the selector decided for one position of a window.
  typedef enum logic [1:0] {
    SEL_NONE    = 2'd0,  // no byte here (past the end of the stream)
    SEL_LIT     = 2'd1,  // emit the byte as a literal
    SEL_MATCH   = 2'd2,  // a match starts here
    SEL_COVERED = 2'd3   // byte is covered by an earlier match
  } sel_kind_e;

  typedef struct packed {
    logic             valid;
    logic [LEN_W-1:0] len;
    logic [OFF_W-1:0] off;
  } match_t;

  typedef struct packed {
    sel_kind_e        kind;
    logic [7:0]       lit;
    logic [LEN_W-1:0] len;
    logic [OFF_W-1:0] off;
  } sel_t;

  typedef struct packed {
    logic [CODE_W-1:0]  bits;  // LSB is sent first, bits above size are 0
    logic [CSIZE_W-1:0] size;
  } code_t;

  function automatic logic [15:0] bitrev(input logic [15:0] v, input int unsigned n);
    logic [15:0] r;
    r = '0;
    for (int unsigned i = 0; i < 16; i++)
      if (i < n) r[i] = v[n-1-i];
    return r;
  endfunction

  // floor(log2(v)) for v > 0
  function automatic int unsigned flog2(input logic [16:0] v);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < 17; i++)
      if (v[i]) r = i;
    return r;
  endfunction

  // Fixed Huffman code of a literal/length symbol (0..287), MSB-first value
  // and its length.
  function automatic void ll_code(input int unsigned sym,
                                  output logic [8:0] code, output int unsigned n);
    if (sym < 144)      begin code = 9'(8'h30 + sym);          n = 8; end
    else if (sym < 256) begin code = 9'(9'h190 + (sym - 144)); n = 9; end
    else if (sym < 280) begin code = 9'(sym - 256);            n = 7; end
    else                begin code = 9'(8'hC0 + (sym - 280));  n = 8; end
  endfunction

  // Code of a literal byte, LSB-first.
  function automatic code_t lit_code(input logic [7:0] b);
    code_t c;
    logic [8:0] hc;
    int unsigned n;
    ll_code(int'(b), hc, n);
    c.bits = CODE_W'(bitrev(16'(hc), n));
    c.size = CSIZE_W'(n);
    return c;
  endfunction

  // Code of a match: length symbol, length extra bits, distance symbol,
  // distance extra bits, concatenated LSB-first. len in 3..34.
  function automatic code_t match_code(input logic [LEN_W-1:0] len,
                                       input logic [OFF_W-1:0] off);
    code_t c;
    logic [8:0] hc;
    int unsigned n, sym, le, de, dsym, pos, v, d;
    logic [31:0] acc;
    // length symbol
    v = int'(len) - 3;
    if (len <= 10) begin sym = 257 + v; le = 0; end
    else begin
      le  = flog2(17'(v)) - 2;
      sym = 257 + 4 * (le + 1) + ((v >> le) & 3);
    end
    ll_code(sym, hc, n);
    acc = 32'(bitrev(16'(hc), n));
    pos = n;
    acc |= (v & ((32'd1 << le) - 1)) << pos;
    pos += le;
    // distance symbol (5-bit fixed code)
    d = int'(off) - 1;
    if (off <= 4) begin dsym = d; de = 0; end
    else begin
      de   = flog2(17'(d)) - 1;
      dsym = 2 * (de + 1) + ((d >> de) & 1);
    end
    acc |= 32'(bitrev(16'(dsym), 5)) << pos;
    pos += 5;
    acc |= (d & ((32'd1 << de) - 1)) << pos;
    pos += de;
    c.bits = CODE_W'(acc);
    c.size = CSIZE_W'(pos);
    return c;
  endfunction

endpackage
