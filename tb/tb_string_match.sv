// tb_string_match: checks the parallel matchers with PWS = 8 and a 1 KiB
// history memory (data_memory). A 900-byte stream over a two-letter alphabet
// (long matches) is written into the memory first; then every window is
// presented with random candidates: good ones a few bytes back, ones at or
// after the position, ones before the stream start, too far back, or
// flagged invalid. The expected length is the count of leading equal bytes
// between the stream at the position and at the candidate, computed here
// from the byte array, capped at the stream bytes present (in_avail); a match shorter
// than 4 or from a rejected candidate must be invalid. Results must appear
// seven cycles after the window.
module tb_string_match;
  import lz_pkg::*;
  localparam int unsigned PWS = 8, DM_BYTES = 1024, AW = 10;
  localparam int unsigned MAX_DIST = DM_BYTES - 16 * PWS;
  localparam int unsigned CNT_W = $clog2(PWS + 1);
  localparam int unsigned N = 900, START = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                          in_valid = 1'b0, in_last = 1'b0;
  logic [2*PWS-1:0][7:0]         in_bytes = '0;
  logic [31:0]                   in_pos = '0, in_start = '0;
  logic [CNT_W-1:0]              in_count = '0;
  logic [$clog2(2*PWS+1)-1:0]    in_avail = '0;
  logic [PWS-1:0]                cand_valid = '0;
  logic [PWS-1:0][31:0]          cand = '0;
  logic [PWS-1:0][AW-1:0]        dm_raddr;
  logic [PWS-1:0][PWS-1:0][7:0]  dm_rdata;
  logic                          out_valid, out_last;
  logic [CNT_W-1:0]              out_count;
  logic [PWS-1:0][7:0]           out_lit;
  match_t [PWS-1:0]              out_match;

  logic                we = 1'b0;
  logic [AW-1:0]       waddr = '0;
  logic [PWS-1:0][7:0] wdata = '0;

  data_memory #(.PWS(PWS), .NRD(PWS), .DM_BYTES(DM_BYTES)) u_mem (
    .clk, .we, .waddr, .wdata, .raddr(dm_raddr), .rdata(dm_rdata));

  string_match #(.PWS(PWS), .DM_BYTES(DM_BYTES)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  byte unsigned data [DM_BYTES];

  typedef struct {
    longint           due;
    match_t [PWS-1:0] m;
    logic [PWS-1:0][7:0] lit;
  } exp_s;
  exp_s q[$];
  int n_valid = 0, n_long = 0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid) begin
      exp_s e;
      e.due = cycle + 7;
      for (int i = 0; i < PWS; i++) begin
        longint p;
        int len, room;
        bit ok;
        p = longint'(in_pos) + i;
        ok = cand_valid[i] && cand[i] < p && cand[i] >= in_start && (p - cand[i]) <= MAX_DIST;
        len = 0;
        while (len < PWS && data[p + len] == data[cand[i] % DM_BYTES + len]) len++;
        room = int'(in_avail) - i;
        if (room < 0) room = 0;
        if (room > PWS) room = PWS;
        if (len > room) len = room;
        e.m[i].valid = ok && len >= 4;
        e.m[i].len   = LEN_W'(len);
        e.m[i].off   = OFF_W'(p - cand[i]);
        e.lit[i]     = in_bytes[i];
        if (e.m[i].valid) n_valid++;
        if (e.m[i].valid && len == PWS) n_long++;
      end
      q.push_back(e);
    end
    if (q.size() != 0 && q[0].due == cycle) begin
      exp_s e;
      e = q.pop_front();
      checks++;
      if (!out_valid || out_lit != e.lit) begin
        failures++;
        $display("ERROR: cycle %0d valid/literals", cycle);
      end
      for (int i = 0; i < PWS; i++) begin
        checks++;
        if (out_match[i].valid != e.m[i].valid ||
            (e.m[i].valid && (out_match[i].len != e.m[i].len || out_match[i].off != e.m[i].off))) begin
          failures++;
          $display("ERROR: cycle %0d pos %0d got %0d/%0d/%0d expected %0d/%0d/%0d", cycle, i,
                   out_match[i].valid, out_match[i].len, out_match[i].off,
                   e.m[i].valid, e.m[i].len, e.m[i].off);
        end
      end
    end else begin
      checks++;
      if (out_valid) begin failures++; $display("ERROR: unexpected output"); end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nwin;
    for (int a = 0; a < DM_BYTES; a++) data[a] = ($urandom_range(0, 3) == 0) ? 8'h62 : 8'h61;
    repeat (3) @(posedge clk);
    // fill the history memory
    for (int a = 0; a < DM_BYTES; a += PWS) begin
      @(negedge clk);
      we = 1'b1;
      waddr = AW'(a);
      for (int b = 0; b < PWS; b++) wdata[b] = data[a + b];
    end
    @(negedge clk);
    we = 1'b0;
    rst_n = 1'b1;
    nwin = N / PWS;
    for (int w = START / PWS; w < nwin; w++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      in_pos   = 32'(w * PWS);
      in_start = 32'(START);
      in_last  = (w == nwin - 1) || ($urandom_range(0, 9) == 0);
      in_count = CNT_W'($urandom_range(1, PWS));
      in_avail = in_last ? 5'(in_count) : 5'($urandom_range(PWS + 1, 2 * PWS));
      for (int b = 0; b < 2 * PWS; b++) in_bytes[b] = data[w * PWS + b];
      for (int i = 0; i < PWS; i++) begin
        int p, r;
        p = w * PWS + i;
        r = $urandom_range(0, 9);
        cand_valid[i] = (r != 0);
        if (r <= 5)      cand[i] = 32'(p - $urandom_range(1, (p - START < 40) ? p - START : 40));
        else if (r == 6) cand[i] = 32'(p + $urandom_range(0, 20));
        else if (r == 7) cand[i] = 32'($urandom_range(0, START - 1));
        else if (r == 8) cand[i] = 32'(p - $urandom_range(1, p));
        else             cand[i] = 32'(p - $urandom_range(1, 8));
        if (p == START) cand[i] = 32'(p - 1);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_valid == 0 || n_long == 0) begin
      failures++;
      $display("ERROR: leftover %0d, matches %0d, full-length %0d", q.size(), n_valid, n_long);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
