// tb_data_memory: checks the banked, replicated history memory with PWS = 8,
// three read ports and 256 bytes. Windows are written in order around the
// memory several times while every port reads random addresses, including
// ones that wrap past the end; each read must return, two cycles later, the
// PWS bytes a byte-array model held when the read was issued. Bytes never
// written are not compared.
module tb_data_memory;
  localparam int unsigned PWS = 8, NRD = 3, DM_BYTES = 256;
  localparam int unsigned AW = $clog2(DM_BYTES);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                          we = 1'b0;
  logic [AW-1:0]                 waddr = '0;
  logic [PWS-1:0][7:0]           wdata = '0;
  logic [NRD-1:0][AW-1:0]        raddr = '0;
  logic [NRD-1:0][PWS-1:0][7:0]  rdata;

  data_memory #(.PWS(PWS), .NRD(NRD), .DM_BYTES(DM_BYTES)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] model [DM_BYTES];
  bit         known [DM_BYTES];

  typedef struct {
    bit                          live;
    logic [NRD-1:0][PWS-1:0][7:0] d;
    bit   [NRD-1:0][PWS-1:0]      k;
  } exp_s;
  exp_s pipe[2];

  always @(posedge clk) begin
    exp_s e;
    // compare what was due this cycle (issued two edges ago)
    if (pipe[1].live)
      for (int r = 0; r < NRD; r++)
        for (int b = 0; b < PWS; b++)
          if (pipe[1].k[r][b]) begin
            checks++;
            if (rdata[r][b] != pipe[1].d[r][b]) begin
              failures++;
              $display("ERROR: port %0d byte %0d got %02x expected %02x", r, b,
                       rdata[r][b], pipe[1].d[r][b]);
            end
          end
    // reads see the memory before this cycle's write
    e.live = 1;
    for (int r = 0; r < NRD; r++)
      for (int b = 0; b < PWS; b++) begin
        int a;
        a = (int'(raddr[r]) + b) % DM_BYTES;
        e.d[r][b] = model[a];
        e.k[r][b] = known[a];
      end
    pipe[1] = pipe[0];
    pipe[0] = e;
    if (we)
      for (int b = 0; b < PWS; b++) begin
        model[int'(waddr) + b] = wdata[b];
        known[int'(waddr) + b] = 1;
      end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wptr;
    wptr = 0;
    for (int a = 0; a < DM_BYTES; a++) known[a] = 0;
    pipe[0].live = 0;
    pipe[1].live = 0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      we = ($urandom_range(0, 2) != 0);
      waddr = AW'(wptr);
      for (int b = 0; b < PWS; b++) wdata[b] = 8'($urandom_range(0, 255));
      if (we) wptr = (wptr + PWS) % DM_BYTES;
      for (int r = 0; r < NRD; r++) raddr[r] = AW'($urandom_range(0, DM_BYTES - 1));
    end
    @(negedge clk) we = 1'b0;
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
