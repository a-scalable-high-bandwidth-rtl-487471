// hash_table: multi-banked hash table read and update. Every cycle it takes
// the PWS hash values of one window, returns for each position the most
// recent earlier position with the same hash (its match candidate), and
// stores the position itself in the table.
//
// The 2^HASH_W entries are split over HBN banks by the low log2(HBN) hash
// bits; the remaining bits index inside the bank. Each bank serves two
// requests per cycle (see ht_bank). When more than two positions of a
// window hit the same bank, the two lowest positions are granted and the
// others are dropped: they get no candidate and are not written. This
// removes all ordering hazards between the positions of a window.
//
// Five pipeline stages, as in the source architecture:
//   1 Req        bank number and index of each position
//   2 Grant      per-bank arbitration, forward crossbar (PWS -> 2*HBN ports)
//   3 Mem R/W    bank read (old data) and write
//   4 Read wait  bank read data registered
//   5 Cand align backward crossbar (2*HBN ports -> PWS)
// Outputs appear five cycles after the window is presented.
// Only hash table depth 1 is built, the depth the source implemented.
// Entries are not cleared at reset: a stale entry is filtered later by the
// string matcher, which accepts only candidates inside the current stream
// and checks the bytes themselves.
module hash_table
  import lz_pkg::*;
#(
  parameter int unsigned PWS    = 32,
  parameter int unsigned HBN    = 32,
  parameter int unsigned HASH_W = 16,
  localparam int unsigned BB    = $clog2(HBN),
  localparam int unsigned IW    = HASH_W - BB,
  localparam int unsigned PW    = $clog2(PWS + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [PWS-1:0][HASH_W-1:0]  in_hash,
  input  logic [POS_W-1:0]            in_pos,     // position of byte 0
  output logic                        out_valid,
  output logic [PWS-1:0]              cand_valid,
  output logic [PWS-1:0][POS_W-1:0]   cand,
  output logic [PW-1:0]               out_dropped // positions dropped in this window
);

  // ---------------- stage 1: request ----------------
  logic                      s1_valid;
  logic [PWS-1:0][BB-1:0]    s1_bank;
  logic [PWS-1:0][IW-1:0]    s1_idx;
  logic [POS_W-1:0]          s1_pos;

  always_ff @(posedge clk) begin
    for (int i = 0; i < PWS; i++) begin
      s1_bank[i] <= in_hash[i][BB-1:0];
      s1_idx[i]  <= in_hash[i][HASH_W-1:BB];
    end
    s1_pos <= in_pos;
  end

  // ---------------- stage 2: grant + forward crossbar ----------------
  logic [PWS-1:0]          g_grant, g_port;
  logic [HBN-1:0][1:0]     g_en;
  logic [HBN-1:0][1:0][IW-1:0]    g_addr;
  logic [HBN-1:0][1:0][POS_W-1:0] g_wdata;
  logic [PW-1:0]           g_drop;

  always_comb begin
    g_en    = '0;
    g_addr  = '0;
    g_wdata = '0;
    g_drop  = '0;
    for (int i = 0; i < PWS; i++) begin
      int unsigned rank;
      rank = 0;
      for (int j = 0; j < i; j++)
        if (s1_bank[j] == s1_bank[i]) rank++;
      g_grant[i] = s1_valid && (rank < 2);
      g_port[i]  = (rank == 1);
      if (g_grant[i]) begin
        g_en[s1_bank[i]][g_port[i]]    = 1'b1;
        g_addr[s1_bank[i]][g_port[i]]  = s1_idx[i];
        g_wdata[s1_bank[i]][g_port[i]] = s1_pos + POS_W'(i);
      end else if (s1_valid) begin
        g_drop = g_drop + 1'b1;
      end
    end
  end

  logic                            s2_valid;
  logic [PWS-1:0]                  s2_grant, s2_port;
  logic [PWS-1:0][BB-1:0]          s2_bank;
  logic [HBN-1:0][1:0]             s2_en;
  logic [HBN-1:0][1:0][IW-1:0]     s2_addr;
  logic [HBN-1:0][1:0][POS_W-1:0]  s2_wdata;
  logic [PW-1:0]                   s2_drop;

  always_ff @(posedge clk) begin
    s2_grant <= g_grant;
    s2_port  <= g_port;
    s2_bank  <= s1_bank;
    s2_en    <= g_en;
    s2_addr  <= g_addr;
    s2_wdata <= g_wdata;
    s2_drop  <= g_drop;
  end

  // ---------------- stage 3: bank read / write ----------------
  logic [HBN-1:0][1:0][POS_W-1:0] b_rdata;

  for (genvar b = 0; b < HBN; b++) begin : g_bank
    ht_bank #(.DEPTH(1 << IW)) u_bank (
      .clk   (clk),
      .en0   (s2_en[b][0]),
      .addr0 (s2_addr[b][0]),
      .wdata0(s2_wdata[b][0]),
      .en1   (s2_en[b][1]),
      .addr1 (s2_addr[b][1]),
      .wdata1(s2_wdata[b][1]),
      .rdata0(b_rdata[b][0]),
      .rdata1(b_rdata[b][1])
    );
  end

  logic                    s3_valid;
  logic [PWS-1:0]          s3_grant, s3_port;
  logic [PWS-1:0][BB-1:0]  s3_bank;
  logic [PW-1:0]           s3_drop;

  always_ff @(posedge clk) begin
    s3_grant <= s2_grant;
    s3_port  <= s2_port;
    s3_bank  <= s2_bank;
    s3_drop  <= s2_drop;
  end

  // ---------------- stage 4: read wait ----------------
  logic                            s4_valid;
  logic [PWS-1:0]                  s4_grant, s4_port;
  logic [PWS-1:0][BB-1:0]          s4_bank;
  logic [PW-1:0]                   s4_drop;
  logic [HBN-1:0][1:0][POS_W-1:0]  s4_rdata;

  always_ff @(posedge clk) begin
    s4_grant <= s3_grant;
    s4_port  <= s3_port;
    s4_bank  <= s3_bank;
    s4_drop  <= s3_drop;
    s4_rdata <= b_rdata;
  end

  // ---------------- stage 5: candidate align (backward crossbar) ----------------
  always_ff @(posedge clk) begin
    for (int i = 0; i < PWS; i++) begin
      cand_valid[i] <= s4_valid && s4_grant[i];
      cand[i]       <= s4_rdata[s4_bank[i]][s4_port[i]];
    end
    out_dropped <= s4_drop;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s2_valid  <= 1'b0;
      s3_valid  <= 1'b0;
      s4_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_valid  <= in_valid;
      s2_valid  <= s1_valid;
      s3_valid  <= s2_valid;
      s4_valid  <= s3_valid;
      out_valid <= s4_valid;
    end
  end

endmodule
