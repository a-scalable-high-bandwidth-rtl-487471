// tb_match_select: checks the head/tail match selector with PWS = 8.
// Windows of random matches (lengths 4..PWS, some invalid, never past the
// end of the stream), random last windows with partial counts and gaps are
// driven. A reference model kept
// here applies the selection rules window by window (tail = longest match
// running past the window, trimmed against the previous tail; other matches
// trimmed to end before the tail; then a walk that takes a match when it is
// longer than the next position's) and every output selection must equal
// it, PWS + log2(PWS) + 3 cycles after the window entered. The testbench
// also checks that the output always codes each byte exactly once (no
// overlapping or missing coverage across windows) and counts head matches,
// tails shortened by a head, and tails dropped by that trim.
module tb_match_select;
  import lz_pkg::*;
  localparam int unsigned PWS = 8;
  localparam int unsigned L = $clog2(PWS);
  localparam int unsigned LAT = PWS + L + 3;
  localparam int unsigned CNT_W = $clog2(PWS + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid = 1'b0, in_last = 1'b0;
  logic [CNT_W-1:0]     in_count = '0;
  logic [PWS-1:0][7:0]  in_lit = '0;
  match_t [PWS-1:0]     in_match = '0;
  logic                 out_valid, out_last;
  sel_t [PWS-1:0]       out_sel;
  logic                 ev_tail, ev_head;

  match_select #(.PWS(PWS)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    longint         due;
    bit             last;
    sel_t [PWS-1:0] s;
  } exp_s;
  exp_s q[$];

  int hc = 0;                 // head cov of the next window
  int n_head = 0, n_tail = 0, n_trim = 0, n_kill = 0, n_match = 0, n_lit = 0;
  int dut_head = 0, dut_tail = 0;

  always @(posedge clk) if (rst_n) begin
    if (ev_head) dut_head++;
    if (ev_tail) dut_tail++;
  end

  // reference model
  always @(posedge clk) if (rst_n && in_valid) begin
    exp_s e;
    int ti, tl_len, st, lim, cnt, cur_hc;
    bit tail;
    int tl[PWS + 1];
    cur_hc = hc;
    if (cur_hc > 0) n_head++;
    ti = -1; tl_len = 0;
    for (int i = 0; i < PWS; i++)
      if (!in_last && in_match[i].valid && i + int'(in_match[i].len) > PWS &&
          int'(in_match[i].len) > tl_len) begin
        ti = i; tl_len = int'(in_match[i].len);
      end
    tail = (ti >= 0);
    st = ti;
    if (tail && st < cur_hc) begin
      n_trim++;
      tl_len -= cur_hc - st;
      st = cur_hc;
      if (tl_len < 4) begin tail = 0; n_kill++; end
    end
    if (tail) n_tail++;
    hc = tail ? st + tl_len - PWS : 0;
    lim = tail ? st : (in_last ? int'(in_count) : PWS);
    for (int i = 0; i <= PWS; i++) begin
      int l;
      l = 0;
      if (i < lim && in_match[i].valid) begin
        l = int'(in_match[i].len);
        if (l > lim - i) l = lim - i;
        if (l < 4) l = 0;
      end
      tl[i] = l;
    end
    cnt = cur_hc;
    for (int k = 0; k < PWS; k++) begin
      e.s[k].lit = in_lit[k];
      e.s[k].len = '0;
      e.s[k].off = '0;
      if (in_last && k >= int'(in_count)) e.s[k].kind = SEL_NONE;
      else if (cnt > 0) begin e.s[k].kind = SEL_COVERED; cnt--; end
      else if (tail && k == st) begin
        e.s[k].kind = SEL_MATCH; e.s[k].len = LEN_W'(tl_len);
        e.s[k].off = in_match[ti].off; cnt = PWS;
      end else if (tl[k] > 0 && tl[k] > tl[k+1]) begin
        e.s[k].kind = SEL_MATCH; e.s[k].len = LEN_W'(tl[k]);
        e.s[k].off = in_match[k].off; cnt = tl[k] - 1;
      end else e.s[k].kind = SEL_LIT;
    end
    e.due = cycle + LAT;
    e.last = in_last;
    q.push_back(e);
  end

  // compare, and check coverage across windows
  int cov = 0;
  always @(posedge clk) if (rst_n) begin
    if (q.size() != 0 && q[0].due == cycle) begin
      exp_s e;
      e = q.pop_front();
      checks++;
      if (!out_valid || out_last != e.last || out_sel != e.s) begin
        failures++;
        $display("ERROR: cycle %0d selection differs", cycle);
        for (int k = 0; k < PWS; k++)
          $display("  %0d: got %s %0d/%0d exp %s %0d/%0d", k, out_sel[k].kind.name(),
                   out_sel[k].len, out_sel[k].off, e.s[k].kind.name(), e.s[k].len, e.s[k].off);
      end
      for (int k = 0; k < PWS; k++) begin
        checks++;
        case (out_sel[k].kind)
          SEL_COVERED: if (cov == 0) begin failures++; $display("ERROR: covered by nothing"); end
                       else cov--;
          SEL_LIT:     begin n_lit++; if (cov != 0) begin failures++; $display("ERROR: literal inside match"); end end
          SEL_MATCH:   begin
                         n_match++;
                         if (cov != 0 || out_sel[k].len < 4) begin failures++; $display("ERROR: overlapping match"); end
                         cov = int'(out_sel[k].len) - 1;
                       end
          default:     if (cov != 0) begin failures++; $display("ERROR: match past end of stream"); end
        endcase
      end
      if (out_last && cov != 0) begin
        failures++; checks++;
        $display("ERROR: match runs past the end of the stream");
      end
    end else begin
      checks++;
      if (out_valid) begin failures++; $display("ERROR: unexpected output"); end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NW = 5000;
  bit w_last [NW + 1];
  int w_count [NW + 1];

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // stream structure first, so a window's matches never run past the
    // end of a following partial last window (the string matcher ensures
    // this in the compressor)
    for (int w = 0; w < NW; w++) begin
      w_last[w]  = ($urandom_range(0, 11) == 0) || (w == NW - 1);
      w_count[w] = w_last[w] ? $urandom_range(1, PWS) : PWS;
    end
    for (int w = 0; w < NW; w++) begin
      int avail;
      avail = w_last[w] ? w_count[w] : PWS + (w_last[w + 1] ? w_count[w + 1] : PWS);
      while ($urandom_range(0, 7) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        in_last  = 1'($urandom_range(0, 1));
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_last  = w_last[w];
      in_count = CNT_W'(w_count[w]);
      for (int i = 0; i < PWS; i++) begin
        int room;
        room = avail - i;
        if (room > PWS) room = PWS;
        in_lit[i]         = 8'($urandom_range(0, 255));
        in_match[i].valid = ($urandom_range(0, 2) == 0) && room >= 4;
        in_match[i].len   = LEN_W'($urandom_range(4, (room >= 4) ? room : 4));
        in_match[i].off   = OFF_W'($urandom_range(1, 65535));
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    $display("heads %0d tails %0d trimmed tails %0d dropped tails %0d matches %0d literals %0d",
             n_head, n_tail, n_trim, n_kill, n_match, n_lit);
    checks++;
    if (q.size() != 0 || n_trim == 0 || n_kill == 0 || n_head == 0 ||
        dut_head != n_head || dut_tail != n_tail) begin
      failures++;
      $display("ERROR: leftover %0d, head events %0d/%0d, tail events %0d/%0d", q.size(),
               dut_head, n_head, dut_tail, n_tail);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
