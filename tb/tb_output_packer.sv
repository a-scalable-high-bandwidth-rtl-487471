// tb_output_packer: checks the stream framer with IN_W = 64 and OUT_W = 80.
// Streams of 1..12 packed windows of random size (0..64 bits) are driven,
// back to back or with gaps. The output words of a stream, joined LSB first
// (OUT_W bits each, out_bits for the last word), must equal the block
// header 3'b011, the window bits in order and seven zero bits (end of
// block). Every word but the last must report OUT_W bits. The case where a
// last window also fills a word (final word one cycle later) and a
// one-window stream following it are counted and must occur.
module tb_output_packer;
  import lz_pkg::*;
  localparam int unsigned IN_W = 64, OUT_W = 80;
  localparam int unsigned ISW = $clog2(IN_W + 1), OSW = $clog2(OUT_W + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid = 1'b0, in_last = 1'b0;
  logic [IN_W-1:0]  in_data = '0;
  logic [ISW-1:0]   in_size = '0;
  logic             out_valid, out_last;
  logic [OUT_W-1:0] out_data;
  logic [OSW-1:0]   out_bits;

  output_packer #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  int checks = 0, failures = 0;

  bit exp_bits[$];     // expected bits of all streams, in order
  int exp_len[$];      // length of each stream
  bit got_bits[$];
  int n_streams = 0, n_late = 0, n_words = 0;

  // expected stream: header, window bits, end of block
  int cur_len = 0;
  bit cur_first = 1'b1;
  always @(posedge clk) if (rst_n && in_valid) begin
    if (cur_first) begin
      exp_bits.push_back(1'b1); exp_bits.push_back(1'b1); exp_bits.push_back(1'b0);
      cur_len = 3;
    end
    for (int b = 0; b < int'(in_size); b++) exp_bits.push_back(in_data[b]);
    cur_len += int'(in_size);
    cur_first = in_last;
    if (in_last) begin
      repeat (EOB_W) exp_bits.push_back(1'b0);
      cur_len += EOB_W;
      exp_len.push_back(cur_len);
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    n_words++;
    checks++;
    if (!out_last && int'(out_bits) != OUT_W) begin
      failures++; $display("ERROR: short word without last");
    end
    for (int b = 0; b < int'(out_bits); b++) got_bits.push_back(out_data[b]);
    if (out_last) begin
      int n;
      n_streams++;
      checks++;
      n = exp_len.pop_front();
      if (got_bits.size() != n) begin
        failures++; $display("ERROR: stream %0d has %0d bits, expected %0d", n_streams, got_bits.size(), n);
      end else
        for (int b = 0; b < n; b++) begin
          bit e;
          e = exp_bits.pop_front();
          if (got_bits[b] != e) begin
            failures++; $display("ERROR: stream %0d bit %0d", n_streams, b);
            break;
          end
        end
      got_bits.delete();
    end
  end

  // a final word arriving one cycle after a full word of the same stream
  always @(posedge clk) begin
    if (rst_n && dut.pend) n_late++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_one = 0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int s = 0; s < 3000; s++) begin
      int nw;
      nw = ($urandom_range(0, 3) == 0) ? 1 : $urandom_range(1, 12);
      if (nw == 1) n_one++;
      for (int w = 0; w < nw; w++) begin
        int sz;
        while ($urandom_range(0, 5) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
        @(negedge clk);
        in_valid = 1'b1;
        in_last  = (w == nw - 1);
        sz = ($urandom_range(0, 1) == 0) ? $urandom_range(50, IN_W) : $urandom_range(0, IN_W);
        in_size = ISW'(sz);
        for (int b = 0; b < IN_W; b++) in_data[b] = (b < sz) ? 1'($urandom_range(0, 1)) : 1'b0;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (6) @(negedge clk);
    $display("streams %0d words %0d late final words %0d one-window streams %0d", n_streams, n_words, n_late, n_one);
    checks++;
    if (n_streams != 3000 || exp_len.size() != 0 || n_late == 0 || n_one == 0) begin
      failures++;
      $display("ERROR: streams %0d, left %0d", n_streams, exp_len.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
