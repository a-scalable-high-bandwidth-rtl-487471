// tb_lz_compressor: end-to-end test of the compressor at its default size
// (PWS = 32, 32 hash banks, 64 KiB history).
//
// Several streams are compressed back to back: text-like data with many
// repeats, random bytes (incompressible, many 9-bit literals), runs, and a
// long stream whose repeats reach back more than 32 KiB. Gaps between
// windows and partial last windows are inserted. Every output stream is
// decoded by an independent fixed-Huffman decoder written here (with the
// 64 KiB distance codes) and must reproduce its input exactly. The
// testbench also checks the fixed latency of a lone one-window stream
// (22 + 2*PWS + log2(PWS) stages plus the cycle the window waits for its
// successor) and that each mechanism occurs: hash bank conflicts, head and
// tail matches, literals and matches, 9-bit literals, long distances,
// partial windows, input gaps and a final word flushed a cycle late.
module tb_lz_compressor;
  import lz_pkg::*;

  localparam int unsigned PWS   = 32;
  localparam int unsigned L2    = $clog2(PWS);
  localparam int unsigned WORDS = (PWS * 9 + 19 + BLOCK_HDR_W + EOB_W + 31) / 32;
  localparam int unsigned OUT_W = WORDS * 32;
  localparam int unsigned CNT_W = $clog2(PWS + 1);
  localparam int unsigned OSW   = $clog2(OUT_W + 1);
  localparam int unsigned LATENCY = 22 + 2 * PWS + L2 + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid = 1'b0, in_last = 1'b0;
  logic [PWS-1:0][7:0]  in_data = '0;
  logic [CNT_W-1:0]     in_count = '0;
  logic                 out_valid, out_last;
  logic [OUT_W-1:0]     out_data;
  logic [OSW-1:0]       out_bits;
  logic [CNT_W-1:0]     stat_dropped;
  logic                 stat_head, stat_tail;

  lz_compressor dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- stimulus data ----------------
  typedef byte unsigned bytes_t[$];
  bytes_t streams[$];     // expected streams in order
  int     n_streams_out = 0;

  function automatic bytes_t gen_text(int n);
    bytes_t s;
    string words[12] = '{"the ", "data ", "compress", "ion ", "window ", "hash ",
                         "table ", "match ", "FPGA ", "of ", "and ", "pipeline "};
    while (s.size() < n) begin
      int r = $urandom_range(0, 9);
      if (r < 6 || s.size() < 64) begin
        string w = words[$urandom_range(0, 11)];
        for (int i = 0; i < w.len(); i++) s.push_back(w[i]);
      end else if (r < 8) begin
        int off = $urandom_range(1, s.size() < 4000 ? s.size() : 4000);
        int len = $urandom_range(4, 40);
        int st = s.size() - off;
        for (int i = 0; i < len; i++) s.push_back(s[st + i]);
      end else begin
        s.push_back(byte'($urandom_range(0, 255)));
      end
    end
    while (s.size() > n) void'(s.pop_back());
    return s;
  endfunction

  function automatic bytes_t gen_random(int n);
    bytes_t s;
    for (int i = 0; i < n; i++) s.push_back(byte'($urandom_range(0, 255)));
    return s;
  endfunction

  function automatic bytes_t gen_runs(int n);
    bytes_t s;
    while (s.size() < n) begin
      byte unsigned b = byte'($urandom_range(0, 255));
      int len = $urandom_range(1, 100);
      for (int i = 0; i < len && s.size() < n; i++) s.push_back(b);
    end
    return s;
  endfunction

  // random block followed much later by copies of it (distances > 32 KiB)
  function automatic bytes_t gen_far(int n);
    bytes_t s, blk;
    blk = gen_random(2048);
    s = blk;
    while (s.size() < n) begin
      int st = $urandom_range(0, 2048 - 64);
      int len = $urandom_range(16, 64);
      if (s.size() > 40000) begin
        for (int i = 0; i < len; i++) s.push_back(blk[st + i]);
      end
      for (int i = 0; i < 200; i++) s.push_back(byte'($urandom_range(0, 255)));
    end
    while (s.size() > n) void'(s.pop_back());
    return s;
  endfunction

  // ---------------- mechanism counters ----------------
  int ev_drop = 0, ev_head = 0, ev_tail = 0, ev_gap = 0, ev_partial = 0;
  int ev_lit = 0, ev_lit9 = 0, ev_match = 0, ev_far = 0, ev_late_flush = 0;
  longint in_bytes_total = 0, out_bits_total = 0;

  always @(posedge clk) if (rst_n) begin
    if (stat_dropped != 0) ev_drop++;
    if (stat_head) ev_head++;
    if (stat_tail) ev_tail++;
  end

  // ---------------- driver ----------------
  task automatic send_stream(bytes_t s, int gap_pct);
    int nwin = (s.size() + PWS - 1) / PWS;
    streams.push_back(s);
    in_bytes_total += s.size();
    for (int w = 0; w < nwin; w++) begin
      while ($urandom_range(0, 99) < gap_pct) begin
        @(negedge clk);
        in_valid = 1'b0;
        ev_gap++;
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_last  = (w == nwin - 1);
      in_count = CNT_W'((w == nwin - 1) ? s.size() - w * PWS : PWS);
      if (in_last && in_count != CNT_W'(PWS)) ev_partial++;
      for (int i = 0; i < PWS; i++)
        in_data[i] = (w * PWS + i < s.size()) ? s[w * PWS + i] : 8'h00;
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
  endtask

  // ---------------- output collection and decoding ----------------
  bit obits[$];
  longint last_out_cycle = -10;
  longint first_out_cycle = -1;

  function automatic int getbits(ref bit q[$], ref int p, input int n);
    int v = 0;
    for (int i = 0; i < n; i++) begin
      v |= int'(q[p]) << i;
      p++;
    end
    return v;
  endfunction

  // independent tables for length and distance symbols
  int len_base[29] = '{3,4,5,6,7,8,9,10,11,13,15,17,19,23,27,31,35,43,51,59,
                       67,83,99,115,131,163,195,227,258};
  int len_ext[29]  = '{0,0,0,0,0,0,0,0,1,1,1,1,2,2,2,2,3,3,3,3,4,4,4,4,5,5,5,5,0};

  task automatic decode_and_check(ref bit q[$], input int nbits);
    bytes_t exp, got;
    int p = 0;
    int hdr;
    bit done = 0;
    exp = streams.pop_front();
    hdr = getbits(q, p, 3);
    checks++;
    if (hdr != 3) begin
      failures++;
      $display("ERROR: block header %0d", hdr);
    end
    while (!done && p < nbits) begin
      int code = 0, sym;
      for (int i = 0; i < 7; i++) code = (code << 1) | int'(q[p++]);
      if (code <= 23) sym = 256 + code;
      else begin
        code = (code << 1) | int'(q[p++]);
        if (code >= 8'h30 && code <= 8'hBF) sym = code - 8'h30;
        else if (code >= 8'hC0 && code <= 8'hC7) sym = 280 + code - 8'hC0;
        else begin
          code = (code << 1) | int'(q[p++]);
          sym = 144 + code - 9'h190;
        end
      end
      if (sym < 256) begin
        got.push_back(byte'(sym));
        ev_lit++;
        if (sym >= 144) ev_lit9++;
      end else if (sym == 256) begin
        done = 1;
      end else begin
        int len, dsym, mdist, db, de;
        len = len_base[sym - 257] + getbits(q, p, len_ext[sym - 257]);
        dsym = 0;
        for (int i = 0; i < 5; i++) dsym = (dsym << 1) | int'(q[p++]);
        if (dsym < 4) begin db = dsym + 1; de = 0; end
        else begin
          de = dsym / 2 - 1;
          db = (1 << (de + 1)) + (dsym % 2) * (1 << de) + 1;
        end
        mdist = db + getbits(q, p, de);
        if (dsym >= 30) ev_far++;
        ev_match++;
        if (mdist > got.size() || len < 4) begin
          failures++;
          $display("ERROR: bad match len %0d mdist %0d at out %0d", len, mdist, got.size());
          done = 1;
        end else
          for (int i = 0; i < len; i++) got.push_back(got[got.size() - mdist]);
      end
    end
    checks++;
    if (!done || p > nbits) begin
      failures++;
      $display("ERROR: stream %0d not terminated (bit %0d of %0d)", n_streams_out, p, nbits);
    end
    checks++;
    if (got != exp) begin
      failures++;
      $display("ERROR: stream %0d decoded %0d bytes, expected %0d", n_streams_out,
               got.size(), exp.size());
      for (int i = 0; i < got.size() && i < exp.size(); i++)
        if (got[i] != exp[i]) begin
          $display("  first difference at byte %0d: %02x vs %02x", i, got[i], exp[i]);
          break;
        end
    end else
      $display("stream %0d: %0d bytes -> %0d bits (ratio %.2f)", n_streams_out,
               exp.size(), nbits, real'(exp.size() * 8) / real'(nbits));
    n_streams_out++;
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    int n;
    n = out_last ? int'(out_bits) : OUT_W;
    if (first_out_cycle < 0) first_out_cycle = cycle;
    for (int i = 0; i < n; i++) obits.push_back(out_data[i]);
    out_bits_total += n;
    if (out_last) begin
      if (cycle == last_out_cycle + 1) ev_late_flush++;
      decode_and_check(obits, obits.size());
      obits.delete();
    end
    last_out_cycle = cycle;
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main ----------------
  initial begin
    longint t0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // latency of a lone one-window stream
    begin
      bytes_t s = gen_text(20);
      @(negedge clk);
      t0 = cycle;
      streams.push_back(s);
      in_bytes_total += s.size();
      in_valid = 1'b1; in_last = 1'b1; in_count = CNT_W'(s.size());
      for (int i = 0; i < PWS; i++) in_data[i] = (i < s.size()) ? s[i] : 8'h00;
      @(negedge clk);
      in_valid = 1'b0; in_last = 1'b0;
      wait (first_out_cycle >= 0);
      checks++;
      if (first_out_cycle - t0 != LATENCY) begin
        failures++;
        $display("ERROR: latency %0d, expected %0d", first_out_cycle - t0, LATENCY);
      end else
        $display("latency %0d cycles as expected", LATENCY);
    end

    send_stream(gen_text(6000), 0);
    send_stream(gen_random(3000), 10);
    send_stream(gen_runs(2000), 0);
    send_stream(gen_text(PWS * 20 + 7), 20);
    send_stream(gen_text(PWS * 2), 0);      // two windows, full last window
    send_stream(gen_text(33), 0);
    send_stream(gen_far(90000), 2);
    send_stream(gen_text(20000), 0);
    send_stream(gen_text(100), 0);
    send_stream(gen_text(5), 0);

    wait (n_streams_out == 11);
    repeat (10) @(posedge clk);

    $display("events: drops=%0d head=%0d tail=%0d lit=%0d lit9=%0d match=%0d far=%0d gaps=%0d partial=%0d late_flush=%0d",
             ev_drop, ev_head, ev_tail, ev_lit, ev_lit9, ev_match, ev_far, ev_gap, ev_partial, ev_late_flush);
    $display("overall ratio %.3f", real'(in_bytes_total * 8) / real'(out_bits_total));
    checks++; if (ev_drop == 0)       begin failures++; $display("ERROR: no bank conflict drop"); end
    checks++; if (ev_head == 0)       begin failures++; $display("ERROR: no head match"); end
    checks++; if (ev_tail == 0)       begin failures++; $display("ERROR: no tail match"); end
    checks++; if (ev_match == 0)      begin failures++; $display("ERROR: no match"); end
    checks++; if (ev_lit9 == 0)       begin failures++; $display("ERROR: no 9-bit literal"); end
    checks++; if (ev_far == 0)        begin failures++; $display("ERROR: no distance > 32K"); end
    checks++; if (ev_gap == 0)        begin failures++; $display("ERROR: no input gap"); end
    checks++; if (ev_partial == 0)    begin failures++; $display("ERROR: no partial window"); end
    checks++; if (ev_late_flush == 0) begin failures++; $display("ERROR: no late final word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
