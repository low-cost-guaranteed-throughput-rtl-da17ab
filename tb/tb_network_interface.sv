// tb_network_interface: three complete NIs on both rings (N = 3, two-word
// input buffers, two credits). NI 0's processor side configures NI 2's credit
// return address over the ring and its own forward address locally, then
// streams words into its shell output while also writing software-FIFO words
// into NI 1's memory. NI 2's consumer reads slowly. Checked: stream words
// arrive complete and in order, the producer never has more words in flight
// than credits (the consumer buffer never overflows, an assertion in the
// shell), the producer waits for credits, every credit travels on the credit
// ring, and every software write reaches NI 1's memory port in order.
module tb_network_interface;
  import ring_pkg::*;
  localparam int N = 3, ALPHA = 2, NS = 40, NW = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic d_valid [N]; node_t d_dest [N]; data_pl_t d_pl [N];
  logic c_valid [N]; node_t c_dest [N]; credit_pl_t c_pl [N];
  logic loc_valid [N], loc_ready [N], mem_we [N], cfg_we [N];
  net_addr_t loc_addr [N];
  word_t loc_data [N], mem_wdata [N], cfg_data [N];
  laddr_t mem_addr [N];
  logic [0:0] sin_valid [N], sin_read [N], sout_valid [N], sout_ready [N];
  word_t sin_data [N][1], sout_data [N][1];
  logic [3:0] cfg_addr [N];
  logic d_own [N], d_bor [N], c_own [N], c_bor [N], cstall [N];

  for (genvar g = 0; g < N; g++) begin : g_ni
    network_interface #(.N(N), .ID(g), .GAMMA(1), .N_IN(1), .N_OUT(1), .ALPHA(ALPHA)) dut (
      .clk, .rst_n,
      .d_in_valid(d_valid[(g + N - 1) % N]), .d_in_dest(d_dest[(g + N - 1) % N]), .d_in_pl(d_pl[(g + N - 1) % N]),
      .d_out_valid(d_valid[g]), .d_out_dest(d_dest[g]), .d_out_pl(d_pl[g]),
      .c_in_valid(c_valid[(g + 1) % N]), .c_in_dest(c_dest[(g + 1) % N]), .c_in_pl(c_pl[(g + 1) % N]),
      .c_out_valid(c_valid[g]), .c_out_dest(c_dest[g]), .c_out_pl(c_pl[g]),
      .loc_valid(loc_valid[g]), .loc_addr(loc_addr[g]), .loc_data(loc_data[g]), .loc_ready(loc_ready[g]),
      .mem_we(mem_we[g]), .mem_addr(mem_addr[g]), .mem_wdata(mem_wdata[g]),
      .sin_valid(sin_valid[g]), .sin_data(sin_data[g]), .sin_read(sin_read[g]),
      .sout_valid(sout_valid[g]), .sout_data(sout_data[g]), .sout_ready(sout_ready[g]),
      .cfg_we(cfg_we[g]), .cfg_addr(cfg_addr[g]), .cfg_data(cfg_data[g]),
      .d_inj_own(d_own[g]), .d_inj_borrow(d_bor[g]), .c_inj_own(c_own[g]), .c_inj_borrow(c_bor[g]),
      .credit_stall(cstall[g])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic lwrite(node_t n, laddr_t la, word_t d);
    @(negedge clk);
    loc_valid[0] = 1; loc_addr[0] = '{node: n, laddr: la}; loc_data[0] = d;
    #1;
    while (!loc_ready[0]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 loc_valid[0] = 0;
  endtask

  int n_cstall = 0, n_credits = 0, n_mem = 0, n_rx = 0, inflight_max = 0;
  always @(posedge clk) if (rst_n) begin
    n_cstall += int'(cstall[0]);
    if (c_valid[1] && c_dest[1] == 0) n_credits++;  // credit passing NI 1 towards NI 0
    if (mem_we[1]) begin
      check(mem_addr[1] == laddr_t'(n_mem) && mem_wdata[1] == word_t'(1000 + n_mem), "software write order");
      n_mem++;
    end
    check(!mem_we[0] && !mem_we[2], "no stray memory writes");
  end

  initial begin
    for (int g = 0; g < N; g++) begin
      loc_valid[g] = 0; loc_addr[g] = '0; loc_data[g] = 0; sin_read[g] = '0; sout_valid[g] = '0; sout_data[g][0] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    lwrite(node_t'(2), shell_addr(SH_CRET_ADDR, 4'd0), word_t'({node_t'(0), port_t'(0)}));
    lwrite(node_t'(0), shell_addr(SH_FWD_ADDR, 4'd0), word_t'({node_t'(2), shell_addr(SH_STREAM_IN, 4'd0)}));
    fork
      begin
        int w;
        w = 0;
        for (int k = 0; k < NS; k++) begin
          lwrite(node_t'(0), shell_addr(SH_STREAM_OUT, 4'd0), word_t'(k));
          if (k % 2 == 0 && w < NW) begin
            lwrite(node_t'(1), laddr_t'(w), word_t'(1000 + w));
            w++;
          end
        end
      end
      begin
        while (n_rx < NS) begin
          @(negedge clk);
          sin_read[2] = '0;
          if (sin_valid[2][0] && $urandom_range(0, 3) == 0) begin
            check(sin_data[2][0] == word_t'(n_rx), $sformatf("stream word %0d got %0d", n_rx, sin_data[2][0]));
            sin_read[2] = 1'b1;
            n_rx++;
          end
        end
        @(negedge clk) sin_read[2] = '0;
      end
    join
    repeat (20) @(posedge clk);
    check(n_mem == NW, $sformatf("software writes %0d", n_mem));
    check(n_credits == NS, $sformatf("credits on the credit ring %0d", n_credits));
    check(n_cstall > 0, "producer waited for credits");
    check(!sin_valid[2][0], "no extra stream words");
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
