// tb_window_packer: checks one bit packer with PWS = 8. Windows of random
// codes (sizes 0..28, random bits below the size, zero above; total within
// the packer's word store) are loaded every PWS cycles or later, some marked
// empty (in_valid = 0). For each valid window the packer must present, PWS
// cycles after load, the codes concatenated LSB first from bit 0 with zeros
// above, the total size, and the last flag; empty windows give no output.
module tb_window_packer;
  import lz_pkg::*;
  localparam int unsigned PWS = 8;
  localparam int unsigned WORDS = (PWS * 9 + 19 + BLOCK_HDR_W + EOB_W + 31) / 32;
  localparam int unsigned MAXB = PWS * 9 + 19;
  localparam int unsigned SW = $clog2(WORDS * 32 + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                load = 1'b0, in_valid = 1'b0, in_last = 1'b0;
  code_t [PWS-1:0]     in_code = '0;
  logic                out_valid, out_last;
  logic [WORDS*32-1:0] out_data;
  logic [SW-1:0]       out_size;

  window_packer #(.PWS(PWS)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    longint              due;
    bit                  last;
    logic [WORDS*32-1:0] d;
    int                  n;
  } exp_s;
  exp_s q[$];
  int n_full = 0;

  always @(posedge clk) if (rst_n) begin
    if (load && in_valid) begin
      exp_s e;
      e.due  = cycle + PWS;
      e.last = in_last;
      e.d    = '0;
      e.n    = 0;
      for (int k = 0; k < PWS; k++)
        for (int b = 0; b < int'(in_code[k].size); b++) begin
          e.d[e.n] = in_code[k].bits[b];
          e.n++;
        end
      if (e.n > (WORDS - 2) * 32) n_full++;
      q.push_back(e);
    end
    if (q.size() != 0 && q[0].due == cycle) begin
      exp_s e;
      e = q.pop_front();
      checks++;
      if (!out_valid || out_last != e.last || int'(out_size) != e.n || out_data != e.d) begin
        failures++;
        $display("ERROR: cycle %0d got %0d bits %h exp %0d bits %h", cycle, out_size, out_data, e.n, e.d);
      end
    end else begin
      checks++;
      if (out_valid) begin failures++; $display("ERROR: unexpected output"); end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int w = 0; w < 5000; w++) begin
      int tot, big;
      @(negedge clk);
      load     = 1'b1;
      in_valid = ($urandom_range(0, 7) != 0);
      in_last  = ($urandom_range(0, 5) == 0);
      big      = ($urandom_range(0, 3) == 0);
      tot      = 0;
      for (int k = 0; k < PWS; k++) begin
        int sz;
        sz = big ? $urandom_range(9, 28) : $urandom_range(0, 28);
        if (tot + sz > MAXB) sz = MAXB - tot;
        tot += sz;
        in_code[k].size = 5'(sz);
        in_code[k].bits = 28'($urandom_range(0, 32'h0fffffff)) & ((28'd1 << sz) - 28'd1);
        if (sz == 28) in_code[k].bits = 28'($urandom_range(0, 32'h0fffffff));
      end
      @(negedge clk);
      load    = 1'b0;
      in_code = '0;
      repeat (PWS - 2 + (($urandom_range(0, 3) == 0) ? $urandom_range(1, 5) : 0)) @(negedge clk);
    end
    repeat (PWS + 4) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_full == 0) begin
      failures++;
      $display("ERROR: leftover %0d, windows over two words %0d", q.size(), n_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
