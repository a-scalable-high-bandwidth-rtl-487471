// tb_hash_calc: checks the hash front end with PWS = 8.
// Random windows, random gaps and streams of random length are driven. The
// testbench keeps its own list of windows and checks: every arriving window
// is written to the history memory at the next window position; every
// window leaves exactly three cycles after its successor arrives (or after
// it was staged, for a last window); it carries its own bytes, its
// successor's bytes (zero after a last window), its position, its stream's
// start position, last flag and count; and each hash equals the
// multiplicative hash of the four bytes at that position, computed here.
module tb_hash_calc;
  localparam int unsigned PWS = 8, HASH_W = 16, DM_AW = 10;
  localparam int unsigned CNT_W = $clog2(PWS + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                        in_valid = 1'b0, in_last = 1'b0;
  logic [PWS-1:0][7:0]         in_data = '0;
  logic [CNT_W-1:0]            in_count = '0;
  logic                        dm_we;
  logic [DM_AW-1:0]            dm_waddr;
  logic [PWS-1:0][7:0]         dm_wdata;
  logic                        out_valid, out_last;
  logic [PWS-1:0][HASH_W-1:0]  out_hash;
  logic [2*PWS-1:0][7:0]       out_bytes;
  logic [31:0]                 out_pos, out_start;
  logic [CNT_W-1:0]            out_count;
  logic [$clog2(2*PWS+1)-1:0]  out_avail;

  hash_calc #(.PWS(PWS), .HASH_W(HASH_W), .DM_AW(DM_AW)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    logic [PWS-1:0][7:0] data;
    logic                last;
    int                  count;
    longint              pos, start;
    longint              due;       // cycle at which it must appear on out_*
    logic [PWS-1:0][7:0] next;
    int                  avail;
  } win_s;

  win_s pending[$];   // arrived, successor not yet seen
  win_s expect_q[$];  // released, waiting for output
  longint next_pos = 0, stream_start = 0;
  bit new_stream = 1;

  // model, evaluated on each rising edge with the inputs of that cycle
  always @(posedge clk) if (rst_n) begin
    if (pending.size() != 0 && pending[0].last) begin
      win_s w;
      w = pending.pop_front();
      w.next = '0;
      w.avail = w.count;
      w.due  = cycle + 3;
      expect_q.push_back(w);
    end
    if (in_valid) begin
      win_s w;
      checks++;
      if (!dm_we || dm_waddr != DM_AW'(next_pos) || dm_wdata != in_data) begin
        failures++;
        $display("ERROR: memory write at cycle %0d", cycle);
      end
      if (pending.size() != 0) begin
        win_s p;
        p = pending.pop_front();
        p.next = in_data;
        p.avail = PWS + (in_last ? int'(in_count) : PWS);
        p.due  = cycle + 3;
        expect_q.push_back(p);
      end
      w.data = in_data; w.last = in_last; w.count = int'(in_count);
      w.pos = next_pos;
      if (new_stream) stream_start = next_pos;
      w.start = stream_start;
      new_stream = in_last;
      next_pos += PWS;
      pending.push_back(w);
    end else begin
      checks++;
      if (dm_we) begin failures++; $display("ERROR: spurious memory write"); end
    end
  end

  function automatic logic [15:0] ref_hash(logic [7:0] b0, b1, b2, b3);
    logic [63:0] p;
    p = 64'({b3, b2, b1, b0}) * 64'h9E3779B1;
    return p[31:16];
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      win_s w;
      logic [2*PWS-1:0][7:0] all;
      checks++;
      if (expect_q.size() == 0) begin
        failures++;
        $display("ERROR: unexpected output at cycle %0d", cycle);
      end else begin
        w = expect_q.pop_front();
        all = {w.next, w.data};
        if (w.due != cycle) begin
          failures++;
          $display("ERROR: window %0d out at %0d, due %0d", w.pos, cycle, w.due);
        end
        if (out_bytes != all || out_pos != 32'(w.pos) || out_start != 32'(w.start) ||
            out_last != w.last || (w.last && int'(out_count) != w.count) ||
            int'(out_avail) != w.avail) begin
          failures++;
          $display("ERROR: window %0d fields %h %h pos %0d start %0d last %0d cnt %0d exp %0d %0d %0d %0d", w.pos, out_bytes, all, out_pos, out_start, out_last, out_count, w.start, w.last, w.count, w.due);
        end
        for (int i = 0; i < PWS; i++) begin
          checks++;
          if (out_hash[i] != ref_hash(all[i], all[i+1], all[i+2], all[i+3])) begin
            failures++;
            $display("ERROR: window %0d hash %0d", w.pos, i);
          end
        end
      end
    end else if (expect_q.size() != 0 && expect_q[0].due == cycle) begin
      failures++;
      checks++;
      $display("ERROR: window %0d missing at cycle %0d", expect_q[0].pos, cycle);
      void'(expect_q.pop_front());
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
    for (int s = 0; s < 60; s++) begin
      int nwin = $urandom_range(1, 6);
      for (int w = 0; w < nwin; w++) begin
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
        @(negedge clk);
        in_valid = 1'b1;
        in_last  = (w == nwin - 1);
        in_count = in_last ? CNT_W'($urandom_range(1, PWS)) : CNT_W'(PWS);
        for (int i = 0; i < PWS; i++) in_data[i] = 8'($urandom_range(0, 255));
      end
      @(negedge clk);
      in_valid = 1'b0;
      in_last  = 1'b0;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (expect_q.size() != 0 || pending.size() != 0) begin
      failures++;
      $display("ERROR: windows left over");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
