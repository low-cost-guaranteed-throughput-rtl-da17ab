// tb_processor_tile: two processor tiles on a two-NI ring. Processor 0
// writes software-FIFO words into tile 1's memory; processor 1 reads them
// back through its memory port (one-cycle read). Processor 0 also streams
// words under hardware flow control into tile 1's stream FIFO, which
// processor 1 pops; with one credit the second word must wait (stall) until
// the first is read. Processor 0's own memory port is written and read too.
module tb_processor_tile;
  import ring_pkg::*;
  localparam int N = 2, NS = 20, NW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic d_valid [N]; node_t d_dest [N]; data_pl_t d_pl [N];
  logic c_valid [N]; node_t c_dest [N]; credit_pl_t c_pl [N];
  logic wv [N], ws [N], mwe [N], fe [N], fr [N];
  net_addr_t wa [N];
  word_t wd [N], mwd [N], mrd [N], fd [N];
  laddr_t ma [N];
  logic d_own [N], d_bor [N], c_own [N], c_bor [N], cstall [N];

  for (genvar g = 0; g < N; g++) begin : g_t
    processor_tile #(.N(N), .ID(g), .GAMMA(1), .ALPHA(1), .MEM_WORDS(256)) dut (
      .clk, .rst_n,
      .d_in_valid(d_valid[(g + N - 1) % N]), .d_in_dest(d_dest[(g + N - 1) % N]), .d_in_pl(d_pl[(g + N - 1) % N]),
      .d_out_valid(d_valid[g]), .d_out_dest(d_dest[g]), .d_out_pl(d_pl[g]),
      .c_in_valid(c_valid[(g + 1) % N]), .c_in_dest(c_dest[(g + 1) % N]), .c_in_pl(c_pl[(g + 1) % N]),
      .c_out_valid(c_valid[g]), .c_out_dest(c_dest[g]), .c_out_pl(c_pl[g]),
      .cpu_wr_valid(wv[g]), .cpu_wr_addr(wa[g]), .cpu_wr_data(wd[g]), .cpu_wr_stall(ws[g]),
      .cpu_mem_we(mwe[g]), .cpu_mem_addr(ma[g]), .cpu_mem_wdata(mwd[g]), .cpu_mem_rdata(mrd[g]),
      .fsl_exists(fe[g]), .fsl_data(fd[g]), .fsl_read(fr[g]),
      .d_inj_own(d_own[g]), .d_inj_borrow(d_bor[g]), .c_inj_own(c_own[g]), .c_inj_borrow(c_bor[g]),
      .credit_stall(cstall[g])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_stall = 0;
  always @(posedge clk) if (rst_n) n_stall += int'(ws[0]);

  task automatic cwrite(int c, node_t n, laddr_t la, word_t d);
    @(negedge clk);
    wv[c] = 1; wa[c] = '{node: n, laddr: la}; wd[c] = d;
    #1;
    while (ws[c]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 wv[c] = 0;
  endtask

  initial begin
    for (int g = 0; g < N; g++) begin
      wv[g] = 0; wa[g] = '0; wd[g] = 0; mwe[g] = 0; ma[g] = 0; mwd[g] = 0; fr[g] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // software FIFO writes into tile 1
    for (int k = 0; k < NW; k++) cwrite(0, node_t'(1), laddr_t'(k + 8), word_t'(32'h1000 + k));
    repeat (4) @(posedge clk);
    for (int k = 0; k < NW; k++) begin
      @(negedge clk); ma[1] = laddr_t'(k + 8);
      @(negedge clk); check(mrd[1] == word_t'(32'h1000 + k), $sformatf("tile 1 word %0d", k));
    end
    // processor 0's own memory port
    @(negedge clk); mwe[0] = 1; ma[0] = 16'd3; mwd[0] = 32'hBEEF;
    @(negedge clk); mwe[0] = 0;
    @(negedge clk); check(mrd[0] == 32'hBEEF, "own memory port");
    // stream set-up: tile 1 FIFO credits go to tile 0 output 0
    cwrite(1, node_t'(1), shell_addr(SH_CRET_ADDR, 4'd0), word_t'({node_t'(0), port_t'(0)}));
    cwrite(0, node_t'(0), shell_addr(SH_FWD_ADDR, 4'd0), word_t'({node_t'(1), shell_addr(SH_STREAM_IN, 4'd0)}));
    fork
      for (int k = 0; k < NS; k++) cwrite(0, node_t'(0), shell_addr(SH_STREAM_OUT, 4'd0), word_t'(500 + k));
      for (int k = 0; k < NS; k++) begin
        @(negedge clk); fr[1] = 0;
        repeat (6) @(negedge clk);
        #1;
        while (!fe[1]) begin @(negedge clk); #1; end
        check(fd[1] == word_t'(500 + k), $sformatf("stream word %0d got %0d", k, fd[1]));
        fr[1] = 1;
        @(posedge clk);
        #1 fr[1] = 0;
      end
    join
    check(n_stall > 0, "processor stalled waiting for the credit");
    check(!fe[1], "stream FIFO empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
