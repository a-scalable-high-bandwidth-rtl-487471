// tb_hash_table: checks the banked hash table with PWS = 8, HBN = 4 and an
// 8-bit hash (64 entries per bank), so that bank conflicts are frequent.
// A reference table, kept here, processes each window's positions in order:
// a position is served if fewer than two lower positions of the window went
// to the same bank; a served position reads the entry (its candidate) and
// then writes its own position. Dropped positions must come out invalid, the
// drop count must match, and results must appear five cycles after the
// window. Entries never written since reset are not compared.
module tb_hash_table;
  localparam int unsigned PWS = 8, HBN = 4, HASH_W = 8;
  localparam int unsigned PW = $clog2(PWS + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                        in_valid = 1'b0;
  logic [PWS-1:0][HASH_W-1:0]  in_hash = '0;
  logic [31:0]                 in_pos = '0;
  logic                        out_valid;
  logic [PWS-1:0]              cand_valid;
  logic [PWS-1:0][31:0]        cand;
  logic [PW-1:0]               out_dropped;

  hash_table #(.PWS(PWS), .HBN(HBN), .HASH_W(HASH_W)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [31:0] tbl [1 << HASH_W];
  bit          known [1 << HASH_W];

  typedef struct {
    longint         due;
    logic [PWS-1:0] v;
    bit   [PWS-1:0] k;
    logic [PWS-1:0][31:0] c;
    int             drops;
  } exp_s;
  exp_s q[$];
  int n_drops = 0, n_port1 = 0;

  always @(posedge clk) if (rst_n && in_valid) begin
    exp_s e;
    e.due = cycle + 5;
    e.drops = 0;
    for (int i = 0; i < PWS; i++) begin
      int rank;
      int b;
      rank = 0;
      b = int'(in_hash[i]) % HBN;
      for (int j = 0; j < i; j++) if (int'(in_hash[j]) % HBN == b) rank++;
      if (rank == 1) n_port1++;
      e.v[i] = (rank < 2);
      e.k[i] = known[in_hash[i]];
      e.c[i] = tbl[in_hash[i]];
      if (rank < 2) begin
        tbl[in_hash[i]]   = in_pos + 32'(i);
        known[in_hash[i]] = 1;
      end else begin
        e.drops++;
        n_drops++;
      end
    end
    q.push_back(e);
  end

  always @(posedge clk) if (rst_n) begin
    if (q.size() != 0 && q[0].due == cycle) begin
      exp_s e;
      e = q.pop_front();
      checks++;
      if (!out_valid || cand_valid != e.v || int'(out_dropped) != e.drops) begin
        failures++;
        $display("ERROR: cycle %0d valid %b/%b flags %b/%b drops %0d/%0d", cycle,
                 out_valid, 1'b1, cand_valid, e.v, out_dropped, e.drops);
      end
      for (int i = 0; i < PWS; i++)
        if (e.v[i] && e.k[i]) begin
          checks++;
          if (cand[i] != e.c[i]) begin
            failures++;
            $display("ERROR: cycle %0d position %0d cand %0d expected %0d", cycle, i,
                     cand[i], e.c[i]);
          end
        end
    end else begin
      checks++;
      if (out_valid) begin
        failures++;
        $display("ERROR: unexpected output at cycle %0d", cycle);
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pos;
    pos = 32'd1000;
    for (int h = 0; h < (1 << HASH_W); h++) known[h] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int w = 0; w < 3000; w++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_pos   = pos;
      // mix of spread hashes and a few hot values
      for (int i = 0; i < PWS; i++)
        in_hash[i] = ($urandom_range(0, 1) == 0) ? HASH_W'($urandom_range(0, 255))
                                                 : HASH_W'($urandom_range(0, 15));
      if (in_valid) pos += PWS;
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_drops == 0 || n_port1 == 0) begin
      failures++;
      $display("ERROR: leftover %0d, drops %0d, second-port grants %0d", q.size(), n_drops, n_port1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
