// hash_calc: front end of the compressor. Accepts one window of PWS input
// bytes per cycle, writes each window into the history (data) memory as it
// arrives, and produces one HASH_W-bit hash per window position.
//
// The hash of position i covers the four bytes i..i+3, so the last three
// positions of a window need the first bytes of the following window. A
// window is therefore held in a staging register until the next window
// arrives (or released at once if it is the last window of a stream), and
// is sent on together with its successor's bytes (2*PWS bytes), which the
// string matcher later needs as well. From that point the block is a fixed
// three-stage pipeline: (1) window + look-ahead register, (2) multiply,
// (3) fold to HASH_W bits.
//
// Hash function (this design's choice, the source gives only the 0..64K-1
// range): h = upper HASH_W bits of ({b[i+3],b[i+2],b[i+1],b[i]} * 0x9E3779B1),
// a multiplicative hash that spreads consecutive keys over all banks.
//
// Interface: in_valid/in_data/in_last/in_count is the source; in_count is the
// number of valid bytes of a last window (1..PWS), ignored otherwise.
// out_avail tells how many of the 2*PWS bytes sent on belong to the stream,
// so that no match can run past its end, even from the window before a
// partial last window. After a
// last window, the next window starts a new, independent stream. Windows
// are numbered in the stream positions pos (byte position of byte 0) and
// start (position of the stream's first byte). dm_* is the memory write.
module hash_calc
  import lz_pkg::*;
#(
  parameter int unsigned PWS      = 32,
  parameter int unsigned HASH_W   = 16,
  parameter int unsigned DM_AW    = 16,
  localparam int unsigned CNT_W   = $clog2(PWS + 1),
  localparam int unsigned AV_W    = $clog2(2 * PWS + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [PWS-1:0][7:0]           in_data,
  input  logic                          in_last,
  input  logic [CNT_W-1:0]              in_count,
  // history memory write
  output logic                          dm_we,
  output logic [DM_AW-1:0]              dm_waddr,
  output logic [PWS-1:0][7:0]           dm_wdata,
  // hashed windows
  output logic                          out_valid,
  output logic [PWS-1:0][HASH_W-1:0]    out_hash,
  output logic [2*PWS-1:0][7:0]         out_bytes,
  output logic [POS_W-1:0]              out_pos,
  output logic [POS_W-1:0]              out_start,
  output logic                          out_last,
  output logic [CNT_W-1:0]              out_count,
  output logic [AV_W-1:0]               out_avail  // valid bytes in out_bytes
);

  localparam logic [31:0] HMUL = 32'h9E3779B1;

  // staging register
  logic                   st_valid, st_last;
  logic [PWS-1:0][7:0]    st_data;
  logic [CNT_W-1:0]       st_count;
  logic [POS_W-1:0]       st_pos, st_start;
  logic [POS_W-1:0]       next_pos, stream_start;
  logic                   new_stream;

  logic release_st;
  assign release_st = st_valid && (st_last || in_valid);

  // memory write as the window arrives
  assign dm_we    = in_valid;
  assign dm_waddr = next_pos[DM_AW-1:0];
  assign dm_wdata = in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_valid     <= 1'b0;
      st_last      <= 1'b0;
      st_data      <= '0;
      st_count     <= '0;
      st_pos       <= '0;
      st_start     <= '0;
      next_pos     <= '0;
      stream_start <= '0;
      new_stream   <= 1'b1;
    end else begin
      if (release_st && !in_valid) st_valid <= 1'b0;
      if (in_valid) begin
        st_valid     <= 1'b1;
        st_data      <= in_data;
        st_last      <= in_last;
        st_count     <= in_count;
        st_pos       <= next_pos;
        st_start     <= new_stream ? next_pos : stream_start;
        if (new_stream) stream_start <= next_pos;
        new_stream   <= in_last;
        // a new stream begins on a fresh window position
        next_pos     <= next_pos + POS_W'(PWS);
      end
    end
  end

  // stage 1: window plus look-ahead bytes
  logic                   s1_valid, s1_last;
  logic [2*PWS-1:0][7:0]  s1_bytes;
  logic [CNT_W-1:0]       s1_count;
  logic [AV_W-1:0]        s1_avail, s2_avail;
  logic [POS_W-1:0]       s1_pos, s1_start;
  // stage 2: products
  logic                   s2_valid, s2_last;
  logic [2*PWS-1:0][7:0]  s2_bytes;
  logic [CNT_W-1:0]       s2_count;
  logic [POS_W-1:0]       s2_pos, s2_start;
  logic [PWS-1:0][31:0]   s2_prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_valid  <= release_st;
      s2_valid  <= s1_valid;
      out_valid <= s2_valid;
    end
  end

  always_ff @(posedge clk) begin
    s1_bytes[PWS-1:0]     <= st_data;
    s1_bytes[2*PWS-1:PWS] <= st_last ? '0 : in_data;
    s1_last  <= st_last;
    s1_count <= st_count;
    // bytes of the stream present in the window and its successor
    s1_avail <= st_last ? AV_W'(st_count)
                        : AV_W'(PWS) + (in_last ? AV_W'(in_count) : AV_W'(PWS));
    s1_pos   <= st_pos;
    s1_start <= st_start;

    for (int i = 0; i < PWS; i++)
      s2_prod[i] <= {s1_bytes[i+3], s1_bytes[i+2], s1_bytes[i+1], s1_bytes[i]} * HMUL;
    s2_bytes <= s1_bytes;
    s2_last  <= s1_last;
    s2_count <= s1_count;
    s2_avail <= s1_avail;
    s2_pos   <= s1_pos;
    s2_start <= s1_start;

    for (int i = 0; i < PWS; i++)
      out_hash[i] <= s2_prod[i][31 -: HASH_W];
    out_bytes <= s2_bytes;
    out_last  <= s2_last;
    out_count <= s2_count;
    out_avail <= s2_avail;
    out_pos   <= s2_pos;
    out_start <= s2_start;
  end

endmodule
