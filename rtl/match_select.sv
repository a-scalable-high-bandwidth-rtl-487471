// match_select: decides, for every position of a window, whether it starts
// a match, is emitted as a literal, or is covered by an earlier match, with
// no hazard between consecutive windows (head/tail selection).
//
// Per window:
//  * Tail match: of the matches that run past the end of the window, the
//    longest (lowest position on a tie) is chosen by a pipelined max
//    reduction.
//  * The tail is trimmed against the head match (the previous window's
//    tail): its start moves past the head's end, its length shrinks by the
//    same amount, and it is dropped if that leaves fewer than MIN_MATCH
//    bytes. The trimmed tail becomes the next window's head. This one-cycle
//    loop is the only state carried from window to window.
//  * Every other match is trimmed to end before the tail's start (or before
//    the end of the window / stream when there is no tail).
//  * Selector chain, one position per stage: a position still covered by
//    the running preclusion count is COVERED; the tail start is a MATCH;
//    otherwise a match is taken if its trimmed length is at least MIN_MATCH
//    and longer than the next position's, else the byte is a LITERAL. A
//    selected match loads the preclusion count with its length - 1.
// With HEAD_TAIL = 0 there is no head or tail and all matches are trimmed
// to the end of the window.
//
// Pipeline: stage 1 input register, stages 2..L+1 reduction (L =
// ceil(log2 PWS)), stage L+2 head/tail trim, stage L+3 match trim, stages
// L+4..L+3+PWS selectors. Selections are carried to the last stage so the
// whole window leaves together, PWS + L + 3 cycles after it entered. The
// selection rules follow the source; tie-breaking, end-of-stream handling
// and the equal-length rule (a literal is chosen when the next position's
// match is as long) are this design's reading of it. The last window of a
// stream never has a tail, and the first window after it has no head.
module match_select
  import lz_pkg::*;
#(
  parameter int unsigned PWS       = 32,
  parameter bit          HEAD_TAIL = 1'b1,
  localparam int unsigned CNT_W    = $clog2(PWS + 1),
  localparam int unsigned L        = (PWS > 1) ? $clog2(PWS) : 1,
  localparam int unsigned NST      = PWS + L + 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_last,
  input  logic [CNT_W-1:0]      in_count,
  input  logic [PWS-1:0][7:0]   in_lit,
  input  match_t [PWS-1:0]      in_match,
  output logic                  out_valid,
  output logic                  out_last,
  output sel_t [PWS-1:0]        out_sel,
  // per-window events, aligned with the window at stage L+2 (for statistics)
  output logic                  ev_tail,   // window produced a tail match
  output logic                  ev_head    // window had a head match
);

  localparam int unsigned NP  = 1 << L;   // padded reduction width
  localparam int unsigned IXW = (L > 0) ? L : 1;

  typedef struct packed {
    logic             valid;
    logic [LEN_W-1:0] len;
    logic [IXW-1:0]   idx;
  } cand_t;

  typedef struct packed {
    logic             valid;
    logic [IXW-1:0]   start;
    logic [LEN_W-1:0] len;
    logic [OFF_W-1:0] off;
  } tail_t;

  typedef struct packed {
    logic                 last;
    logic [CNT_W-1:0]     count;
    logic [PWS-1:0][7:0]  lit;
    match_t [PWS-1:0]     m;
  } win_t;

  function automatic cand_t best(input cand_t a, input cand_t b);
    if (!b.valid) return a;
    if (!a.valid) return b;
    return (b.len > a.len) ? b : a;   // a has the lower index
  endfunction

  logic [NST:1] v;
  win_t         w [1:L+3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[NST-1:1], in_valid};
  end
  assign out_valid = v[NST];

  // ---------------- stage 1 + reduction stages 2..L+1 ----------------
  cand_t red [1:L+1][NP];

  always_ff @(posedge clk) begin
    w[1].last  <= in_last;
    w[1].count <= in_count;
    w[1].lit   <= in_lit;
    w[1].m     <= in_match;
    for (int i = 0; i < NP; i++) begin
      if (i < PWS) begin
        red[1][i].valid <= HEAD_TAIL && !in_last && in_match[i].valid &&
                           (i + int'(in_match[i].len) > PWS);
        red[1][i].len   <= in_match[i].len;
        red[1][i].idx   <= IXW'(i);
      end else begin
        red[1][i] <= '0;
      end
    end
    for (int s = 2; s <= L + 1; s++) begin
      w[s] <= w[s-1];
      for (int i = 0; i < NP; i++)
        red[s][i] <= (i < (NP >> (s - 1))) ? best(red[s-1][2*i], red[s-1][2*i+1]) : '0;
    end
  end

  // ---------------- stage L+2: head/tail trim ----------------
  tail_t                 head_st;        // trimmed tail of the last valid window
  logic [CNT_W-1:0]      head_cover_c;   // positions of this window covered by head
  tail_t                 tail_c;
  tail_t                 tail_r;
  logic [CNT_W-1:0]      head_cover_r;

  always_comb begin
    cand_t root;
    int unsigned hc, st, ln;
    root = red[L+1][0];
    hc = head_st.valid ? int'(head_st.start) + int'(head_st.len) - PWS : 0;
    head_cover_c = CNT_W'(hc);
    st = int'(root.idx);
    ln = int'(root.len);
    if (st < hc) begin
      ln = (ln > hc - st) ? ln - (hc - st) : 0;
      st = hc;
    end
    tail_c.valid = root.valid && (ln >= MIN_MATCH);
    tail_c.start = IXW'(st);
    tail_c.len   = LEN_W'(ln);
    tail_c.off   = w[L+1].m[root.idx].off;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) head_st <= '0;
    else if (v[L+1]) head_st <= tail_c;   // a last window has no tail
  end

  always_ff @(posedge clk) begin
    w[L+2]       <= w[L+1];
    tail_r       <= tail_c;
    head_cover_r <= head_cover_c;
  end

  assign ev_tail = v[L+2] && tail_r.valid;
  assign ev_head = v[L+2] && (head_cover_r != '0);

  // ---------------- stage L+3: trim the other matches ----------------
  typedef struct packed {
    logic [CNT_W-1:0]    pcnt;     // running preclusion count
    tail_t               tail;
    logic                last;
    logic [CNT_W-1:0]    count;
  } chain_t;

  logic [PWS-1:0][LEN_W-1:0] tl3;   // trimmed length, 0 = no match
  chain_t                    c3;

  always_ff @(posedge clk) begin
    int unsigned lim;
    lim = tail_r.valid ? int'(tail_r.start) : (w[L+2].last ? int'(w[L+2].count) : PWS);
    for (int i = 0; i < PWS; i++) begin
      int unsigned l;
      l = int'(w[L+2].m[i].len);
      if (i >= lim) l = 0;
      else if (l > lim - i) l = lim - i;
      tl3[i] <= (w[L+2].m[i].valid && l >= MIN_MATCH) ? LEN_W'(l) : '0;
    end
    w[L+3]   <= w[L+2];
    c3.pcnt <= head_cover_r;
    c3.tail  <= tail_r;
    c3.last  <= w[L+2].last;
    c3.count <= w[L+2].count;
  end

  // ---------------- selector chain: stages L+4 .. L+3+PWS ----------------
  // stage index k = 0..PWS-1 handles position k
  logic [PWS-1:0][LEN_W-1:0] tl_p [PWS+1];
  logic [PWS-1:0][7:0]       lit_p [PWS+1];
  match_t [PWS-1:0]          m_p [PWS+1];
  chain_t                    c_p [PWS+1];
  sel_t [PWS-1:0]            sel_p [PWS+1];

  assign tl_p[0]  = tl3;
  assign lit_p[0] = w[L+3].lit;
  assign m_p[0]   = w[L+3].m;
  assign c_p[0]   = c3;
  assign sel_p[0] = '0;

  for (genvar k = 0; k < PWS; k++) begin : g_sel
    sel_t   s;
    chain_t cn;
    always_comb begin
      logic [LEN_W-1:0] nxt;
      nxt     = (k + 1 < PWS) ? tl_p[k][(k + 1) % PWS] : '0;
      cn      = c_p[k];
      s.lit   = lit_p[k][k];
      s.len   = '0;
      s.off   = '0;
      if (c_p[k].last && k >= int'(c_p[k].count)) begin
        s.kind = SEL_NONE;
      end else if (c_p[k].pcnt != '0) begin
        s.kind   = SEL_COVERED;
        cn.pcnt = c_p[k].pcnt - 1'b1;
      end else if (c_p[k].tail.valid && int'(c_p[k].tail.start) == k) begin
        s.kind   = SEL_MATCH;
        s.len    = c_p[k].tail.len;
        s.off    = c_p[k].tail.off;
        cn.pcnt = CNT_W'(PWS - 1 - k);   // rest of the window
      end else if (tl_p[k][k] != '0 && tl_p[k][k] > nxt) begin
        s.kind   = SEL_MATCH;
        s.len    = tl_p[k][k];
        s.off    = m_p[k][k].off;
        cn.pcnt = CNT_W'(tl_p[k][k] - 1'b1);
      end else begin
        s.kind   = SEL_LIT;
      end
    end

    always_ff @(posedge clk) begin
      tl_p[k+1]  <= tl_p[k];
      lit_p[k+1] <= lit_p[k];
      m_p[k+1]   <= m_p[k];
      c_p[k+1]   <= cn;
      sel_p[k+1] <= sel_p[k];
      sel_p[k+1][k] <= s;
    end
  end

  assign out_sel  = sel_p[PWS];
  assign out_last = c_p[PWS].last;

endmodule
