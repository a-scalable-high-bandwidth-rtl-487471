// lz_compressor: stall-free LZ77 compressor with static Huffman coding that
// takes PWS input bytes every cycle.
//
// Pipeline, following the fully pipelined architecture described:
//   hash_calc (3 stages)     hashes of the PWS positions, history write
//   hash_table (5 stages)    one candidate per position from HBN banks
//   string_match (7 stages)  PWS parallel matchers on the history memory
//   match_select (PWS+log2(PWS)+3 stages)  head/tail match selection
//   huffman_bitpack (PWS+4 stages)         encoding and bit packing
// for 22 + 2*PWS + log2(PWS) stages in all (plus the cycle a window waits in
// hash_calc for its successor). There is no back-pressure: input rate is
// PWS bytes per cycle and the output word is wide enough for the worst case.
//
// Interface: present a window of PWS bytes with in_valid (byte i in
// in_data[i]); mark a stream's last window with in_last and give its number
// of valid bytes in in_count (1..PWS). Gaps between windows are allowed.
// The output is one fixed-Huffman block per stream (3-bit header, codes,
// end-of-block), LSB first, in OUT_W-bit words; the last word has out_last
// and out_bits valid bits. Matches use distances up to 64 KiB (distance
// codes 30 and 31 with 14 extra bits), so a stream whose history exceeds
// 32 KiB may use codes outside standard DEFLATE. The stat_* outputs report,
// per window, bank conflicts dropped by the hash table and head/tail
// events of the selector, for monitoring.
module lz_compressor
  import lz_pkg::*;
#(
  parameter int unsigned PWS       = 32,
  parameter int unsigned HBN       = 32,
  parameter int unsigned HASH_W    = 16,
  parameter int unsigned DM_BYTES  = 65536,
  parameter bit          HEAD_TAIL = 1'b1,
  localparam int unsigned WORDS    = (PWS * 9 + 19 + BLOCK_HDR_W + EOB_W + 31) / 32,
  localparam int unsigned OUT_W    = WORDS * 32,
  localparam int unsigned OSW      = $clog2(OUT_W + 1),
  localparam int unsigned CNT_W    = $clog2(PWS + 1),
  localparam int unsigned AV_W     = $clog2(2 * PWS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [PWS-1:0][7:0]  in_data,
  input  logic                 in_last,
  input  logic [CNT_W-1:0]     in_count,
  output logic                 out_valid,
  output logic                 out_last,
  output logic [OUT_W-1:0]     out_data,
  output logic [OSW-1:0]       out_bits,
  output logic [CNT_W-1:0]     stat_dropped,
  output logic                 stat_head,
  output logic                 stat_tail
);

  localparam int unsigned AW = $clog2(DM_BYTES);

  // ---------------- hash calculation ----------------
  logic                        dm_we;
  logic [AW-1:0]               dm_waddr;
  logic [PWS-1:0][7:0]         dm_wdata;
  logic                        h_valid, h_last;
  logic [PWS-1:0][HASH_W-1:0]  h_hash;
  logic [2*PWS-1:0][7:0]       h_bytes;
  logic [POS_W-1:0]            h_pos, h_start;
  logic [CNT_W-1:0]            h_count;
  logic [AV_W-1:0]             h_avail;

  hash_calc #(.PWS(PWS), .HASH_W(HASH_W), .DM_AW(AW)) u_hash (
    .clk, .rst_n,
    .in_valid, .in_data, .in_last, .in_count,
    .dm_we, .dm_waddr, .dm_wdata,
    .out_valid(h_valid), .out_hash(h_hash), .out_bytes(h_bytes),
    .out_pos(h_pos), .out_start(h_start), .out_last(h_last), .out_count(h_count),
    .out_avail(h_avail)
  );

  // ---------------- hash table ----------------
  logic                        t_valid;
  logic [PWS-1:0]              t_cvalid;
  logic [PWS-1:0][POS_W-1:0]   t_cand;

  hash_table #(.PWS(PWS), .HBN(HBN), .HASH_W(HASH_W)) u_table (
    .clk, .rst_n,
    .in_valid(h_valid), .in_hash(h_hash), .in_pos(h_pos),
    .out_valid(t_valid), .cand_valid(t_cvalid), .cand(t_cand),
    .out_dropped(stat_dropped)
  );

  // window data travels beside the hash table
  localparam int unsigned WIN_W = 2 * PWS * 8 + 2 * POS_W + 1 + CNT_W + AV_W;
  logic [2*PWS-1:0][7:0] t_bytes;
  logic [POS_W-1:0]      t_pos, t_start;
  logic                  t_last;
  logic [CNT_W-1:0]      t_count;
  logic [AV_W-1:0]       t_avail;

  pipe_delay #(.W(WIN_W), .N(5)) u_win_dly (
    .clk,
    .d({h_bytes, h_pos, h_start, h_last, h_count, h_avail}),
    .q({t_bytes, t_pos, t_start, t_last, t_count, t_avail})
  );

  // ---------------- history memory + string match ----------------
  logic [PWS-1:0][AW-1:0]        dm_raddr;
  logic [PWS-1:0][PWS-1:0][7:0]  dm_rdata;

  data_memory #(.PWS(PWS), .NRD(PWS), .DM_BYTES(DM_BYTES)) u_dmem (
    .clk, .we(dm_we), .waddr(dm_waddr), .wdata(dm_wdata),
    .raddr(dm_raddr), .rdata(dm_rdata)
  );

  logic                  m_valid, m_last;
  logic [CNT_W-1:0]      m_count;
  logic [PWS-1:0][7:0]   m_lit;
  match_t [PWS-1:0]      m_match;

  string_match #(.PWS(PWS), .DM_BYTES(DM_BYTES)) u_match (
    .clk, .rst_n,
    .in_valid(t_valid), .in_bytes(t_bytes), .in_pos(t_pos), .in_start(t_start),
    .in_last(t_last), .in_count(t_count), .in_avail(t_avail),
    .cand_valid(t_cvalid), .cand(t_cand),
    .dm_raddr, .dm_rdata,
    .out_valid(m_valid), .out_last(m_last), .out_count(m_count),
    .out_lit(m_lit), .out_match(m_match)
  );

  // ---------------- match selection ----------------
  logic            s_valid, s_last;
  sel_t [PWS-1:0]  s_sel;

  match_select #(.PWS(PWS), .HEAD_TAIL(HEAD_TAIL)) u_select (
    .clk, .rst_n,
    .in_valid(m_valid), .in_last(m_last), .in_count(m_count),
    .in_lit(m_lit), .in_match(m_match),
    .out_valid(s_valid), .out_last(s_last), .out_sel(s_sel),
    .ev_tail(stat_tail), .ev_head(stat_head)
  );

  // ---------------- Huffman encoding and bit packing ----------------
  huffman_bitpack #(.PWS(PWS), .WORDS(WORDS)) u_pack (
    .clk, .rst_n,
    .in_valid(s_valid), .in_last(s_last), .in_sel(s_sel),
    .out_valid, .out_last, .out_data, .out_bits
  );

endmodule
