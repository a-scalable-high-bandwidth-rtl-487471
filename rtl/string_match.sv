// string_match: PWS parallel matchers. For every position i of a window it
// compares the current string (bytes i..i+PWS-1, taken from the window and
// its successor, 2*PWS bytes held in pipeline registers) with the PWS bytes
// at the candidate position read from the history memory, and reports the
// number of leading equal bytes as the match length, with offset
// (pos+i) - candidate.
//
// A candidate is used only if it lies inside the current stream, before
// the position itself, and no more than MAX_DIST bytes back, so that the
// history memory still holds its bytes when they are read. The length is
// capped at the bytes left in the stream (in_avail counts the stream bytes
// among the 2*PWS held), so no match runs past the end of a stream. Matches
// shorter than MIN_MATCH are reported as invalid.
//
// Seven pipeline stages: 1 candidate check and memory address, 2-3 memory
// read and align (data_memory, two cycles), 4 byte compare, 5 leading-
// equal count, 6 length cap and validity, 7 output register. The memory
// read port is external (dm_raddr/dm_rdata) so the top can share one
// data_memory instance; it must have exactly two cycles of read latency.
module string_match
  import lz_pkg::*;
#(
  parameter int unsigned PWS      = 32,
  parameter int unsigned DM_BYTES = 65536,
  parameter int unsigned MAX_DIST = DM_BYTES - 16 * PWS,
  localparam int unsigned AW      = $clog2(DM_BYTES),
  localparam int unsigned CNT_W   = $clog2(PWS + 1),
  localparam int unsigned AV_W    = $clog2(2 * PWS + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [2*PWS-1:0][7:0]         in_bytes,   // window and its successor
  input  logic [POS_W-1:0]              in_pos,
  input  logic [POS_W-1:0]              in_start,
  input  logic                          in_last,
  input  logic [CNT_W-1:0]              in_count,
  input  logic [AV_W-1:0]               in_avail,   // stream bytes in in_bytes
  input  logic [PWS-1:0]                cand_valid,
  input  logic [PWS-1:0][POS_W-1:0]     cand,
  // history memory read ports
  output logic [PWS-1:0][AW-1:0]        dm_raddr,
  input  logic [PWS-1:0][PWS-1:0][7:0]  dm_rdata,
  // match results
  output logic                          out_valid,
  output logic                          out_last,
  output logic [CNT_W-1:0]              out_count,
  output logic [PWS-1:0][7:0]           out_lit,
  output match_t [PWS-1:0]              out_match
);

  localparam int unsigned LCW = $clog2(PWS + 1);

  typedef struct packed {
    logic                  last;
    logic [CNT_W-1:0]      count;
    logic [AV_W-1:0]       avail;
    logic [2*PWS-1:0][7:0] bytes;
  } win_t;

  // valid flags of stages 1..6
  logic [6:1] v;
  win_t       w1, w2, w3, w4, w5, w6;

  // stage 1: candidate check
  logic [PWS-1:0]            ok1, ok2, ok3, ok4, ok5;
  logic [PWS-1:0][OFF_W-1:0] off1, off2, off3, off4, off5;

  always_ff @(posedge clk) begin
    for (int i = 0; i < PWS; i++) begin
      logic [POS_W-1:0] p, d;
      p = in_pos + POS_W'(i);
      d = p - cand[i];
      ok1[i]      <= cand_valid[i] && (cand[i] < p) && (cand[i] >= in_start) &&
                     (d <= POS_W'(MAX_DIST));
      off1[i]     <= OFF_W'(d);
      dm_raddr[i] <= AW'(cand[i]);
    end
    w1.bytes <= in_bytes;
    w1.last  <= in_last;
    w1.count <= in_count;
    w1.avail <= in_avail;
  end

  // stages 2-3: wait for the memory
  always_ff @(posedge clk) begin
    ok2 <= ok1;  off2 <= off1;  w2 <= w1;
    ok3 <= ok2;  off3 <= off2;  w3 <= w2;
  end

  // stage 4: byte compare (dm_rdata is valid while stage 3 holds the window)
  logic [PWS-1:0][PWS-1:0] eq4;
  always_ff @(posedge clk) begin
    for (int i = 0; i < PWS; i++)
      for (int k = 0; k < PWS; k++)
        eq4[i][k] <= (dm_rdata[i][k] == w3.bytes[i + k]);
    ok4 <= ok3;  off4 <= off3;  w4 <= w3;
  end

  // stage 5: count leading equal bytes
  logic [PWS-1:0][LCW-1:0] len5;
  always_ff @(posedge clk) begin
    for (int i = 0; i < PWS; i++) begin
      logic stop;
      logic [LCW-1:0] n;
      stop = 1'b0;
      n    = '0;
      for (int k = 0; k < PWS; k++) begin
        if (!eq4[i][k]) stop = 1'b1;
        if (!stop) n = n + 1'b1;
      end
      len5[i] <= n;
    end
    ok5 <= ok4;  off5 <= off4;  w5 <= w4;
  end

  // stage 6: cap at the end of the stream, drop short matches
  match_t [PWS-1:0] m6;
  always_ff @(posedge clk) begin
    for (int i = 0; i < PWS; i++) begin
      int unsigned room, l;
      room = (int'(w5.avail) > i) ? int'(w5.avail) - i : 0;
      if (room > PWS) room = PWS;
      l    = (int'(len5[i]) < room) ? int'(len5[i]) : room;
      m6[i].valid <= ok5[i] && (l >= MIN_MATCH);
      m6[i].len   <= LEN_W'(l);
      m6[i].off   <= off5[i];
    end
    w6 <= w5;
  end

  // stage 7: output
  always_ff @(posedge clk) begin
    out_match <= m6;
    out_last  <= w6.last;
    out_count <= w6.count;
    for (int i = 0; i < PWS; i++) out_lit[i] <= w6.bytes[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v         <= '0;
      out_valid <= 1'b0;
    end else begin
      v         <= {v[5:1], in_valid};
      out_valid <= v[6];
    end
  end

endmodule
