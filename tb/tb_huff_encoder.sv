// tb_huff_encoder: checks the static Huffman encoder with PWS = 4 against
// code tables written out here independently of lz_pkg (fixed literal/
// length code, length and distance base tables with extra bits, distance
// codes 30/31 for offsets above 32 KiB). Random windows mix literals (all
// byte values), matches (lengths 4..34, offsets 1..65535), covered and empty
// positions; each output code must equal the reference bit string, with
// zero bits above its size, two cycles after the window.
module tb_huff_encoder;
  import lz_pkg::*;
  localparam int unsigned PWS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            in_valid = 1'b0, in_last = 1'b0;
  sel_t [PWS-1:0]  in_sel = '0;
  logic            out_valid, out_last;
  code_t [PWS-1:0] out_code;

  huff_encoder #(.PWS(PWS)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int len_base [29] = '{3,4,5,6,7,8,9,10,11,13,15,17,19,23,27,31,35,43,51,59,67,83,99,115,131,163,195,227,258};
  int len_ext  [29] = '{0,0,0,0,0,0,0,0,1,1,1,1,2,2,2,2,3,3,3,3,4,4,4,4,5,5,5,5,0};
  int dist_base[32] = '{1,2,3,4,5,7,9,13,17,25,33,49,65,97,129,193,257,385,513,769,1025,1537,
                        2049,3073,4097,6145,8193,12289,16385,24577,32769,49153};

  // append n bits of v, LSB first
  function automatic void put(ref logic [63:0] acc, ref int n_acc, input longint v, input int n);
    for (int b = 0; b < n; b++) acc[n_acc + b] = v[b];
    n_acc += n;
  endfunction

  // append a Huffman code of n bits, most significant bit first
  function automatic void put_huff(ref logic [63:0] acc, ref int n_acc, input int v, input int n);
    for (int b = 0; b < n; b++) acc[n_acc + b] = v[n - 1 - b];
    n_acc += n;
  endfunction

  function automatic void put_sym(ref logic [63:0] acc, ref int n_acc, input int s);
    if (s < 144)      put_huff(acc, n_acc, 'h30 + s, 8);
    else if (s < 256) put_huff(acc, n_acc, 'h190 + s - 144, 9);
    else if (s < 280) put_huff(acc, n_acc, s - 256, 7);
    else              put_huff(acc, n_acc, 'hC0 + s - 280, 8);
  endfunction

  function automatic code_t ref_code(input sel_t s);
    logic [63:0] acc;
    int n, c, d;
    code_t r;
    acc = '0;
    n = 0;
    if (s.kind == SEL_LIT) put_sym(acc, n, int'(s.lit));
    else if (s.kind == SEL_MATCH) begin
      c = 0;
      while (c < 28 && len_base[c + 1] <= int'(s.len)) c++;
      put_sym(acc, n, 257 + c);
      put(acc, n, int'(s.len) - len_base[c], len_ext[c]);
      d = 0;
      while (d < 31 && dist_base[d + 1] <= int'(s.off)) d++;
      put_huff(acc, n, d, 5);
      put(acc, n, int'(s.off) - dist_base[d], (d < 4) ? 0 : d / 2 - 1);
    end
    r.bits = acc[27:0];
    r.size = 5'(n);
    return r;
  endfunction

  typedef struct {
    longint          due;
    bit              last;
    code_t [PWS-1:0] c;
  } exp_s;
  exp_s q[$];
  int n_lit9 = 0, n_far = 0, n_max = 0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid) begin
      exp_s e;
      e.due  = cycle + 2;
      e.last = in_last;
      for (int k = 0; k < PWS; k++) begin
        e.c[k] = ref_code(in_sel[k]);
        if (in_sel[k].kind == SEL_LIT && e.c[k].size == 9) n_lit9++;
        if (in_sel[k].kind == SEL_MATCH && in_sel[k].off > 32768) n_far++;
        if (e.c[k].size == 28) n_max++;
      end
      q.push_back(e);
    end
    if (q.size() != 0 && q[0].due == cycle) begin
      exp_s e;
      e = q.pop_front();
      checks++;
      if (!out_valid || out_last != e.last || out_code != e.c) begin
        failures++;
        $display("ERROR: cycle %0d", cycle);
        for (int k = 0; k < PWS; k++)
          $display("  %0d: got %h/%0d exp %h/%0d", k, out_code[k].bits, out_code[k].size,
                   e.c[k].bits, e.c[k].size);
      end
    end else begin
      checks++;
      if (out_valid) begin failures++; $display("ERROR: unexpected output"); end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int w = 0; w < 20000; w++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      in_last  = ($urandom_range(0, 9) == 0);
      for (int k = 0; k < PWS; k++) begin
        int r;
        r = $urandom_range(0, 9);
        in_sel[k].kind = (r < 4) ? SEL_LIT : (r < 8) ? SEL_MATCH : (r == 8) ? SEL_COVERED : SEL_NONE;
        in_sel[k].lit  = 8'($urandom_range(0, 255));
        in_sel[k].len  = LEN_W'($urandom_range(4, 34));
        r = $urandom_range(0, 3);
        in_sel[k].off  = (r == 0) ? OFF_W'($urandom_range(1, 300)) : OFF_W'($urandom_range(1, 65535));
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_lit9 == 0 || n_far == 0 || n_max == 0) begin
      failures++;
      $display("ERROR: leftover %0d, 9-bit literals %0d, far %0d, 28-bit %0d", q.size(), n_lit9, n_far, n_max);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
