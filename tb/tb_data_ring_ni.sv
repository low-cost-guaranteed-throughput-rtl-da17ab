// tb_data_ring_ni: a ring of five data-ring NIs with buffers of depth
// GAMMA = 2. Phase 1: every NI writes random packets to random other NIs;
// each packet must arrive once, at the right NI, in issue order per
// source/destination pair, within GAMMA*N + H cycles of entering the buffer
// (worst-case stall GAMMA*N-1 plus H hops, plus the cycle into the buffer).
// Phase 2: all NIs keep their buffers full; each must inject at least one
// packet every N cycles (its fair share, 1/N of the ring bandwidth).
module tb_data_ring_ni;
  import ring_pkg::*;
  localparam int N = 5, GAMMA = 2, NPKT = 150;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      d_valid [N];
  node_t     d_dest  [N];
  data_pl_t  d_pl    [N];
  logic      wr_valid[N], wr_ready[N], ej_valid[N], inj_own[N], inj_borrow[N];
  net_addr_t wr_addr [N];
  word_t     wr_data [N], ej_data[N];
  laddr_t    ej_laddr[N];

  for (genvar g = 0; g < N; g++) begin : g_ni
    data_ring_ni #(.N(N), .ID(g), .GAMMA(GAMMA)) dut (
      .clk, .rst_n,
      .in_valid(d_valid[(g + N - 1) % N]), .in_dest(d_dest[(g + N - 1) % N]), .in_pl(d_pl[(g + N - 1) % N]),
      .out_valid(d_valid[g]), .out_dest(d_dest[g]), .out_pl(d_pl[g]),
      .wr_valid(wr_valid[g]), .wr_addr(wr_addr[g]), .wr_data(wr_data[g]), .wr_ready(wr_ready[g]),
      .ej_valid(ej_valid[g]), .ej_laddr(ej_laddr[g]), .ej_data(ej_data[g]),
      .inj_own(inj_own[g]), .inj_borrow(inj_borrow[g])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected packets per (src, dst): data word and acceptance time
  word_t  exp_d [N][N][$];
  longint exp_t [N][N][$];
  int     received = 0, max_lat = 0;
  bit     saturate = 0;
  int     injected [N];

  // receivers: laddr carries the source NI
  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < N; g++) begin
      if (inj_own[g] || inj_borrow[g]) injected[g]++;
      if (ej_valid[g] && !saturate) begin
        int src, h;
        longint lat;
        src = int'(ej_laddr[g]);
        h = (g - src + N) % N;
        if (exp_d[src][g].size() == 0) check(0, $sformatf("unexpected packet at %0d from %0d", g, src));
        else begin
          check(ej_data[g] == exp_d[src][g][0], $sformatf("order/data %0d->%0d", src, g));
          lat = cyc - exp_t[src][g][0];
          if (lat > max_lat) max_lat = int'(lat);
          check(lat <= GAMMA * N + h, $sformatf("latency %0d > %0d", lat, GAMMA * N + h));
          void'(exp_d[src][g].pop_front());
          void'(exp_t[src][g].pop_front());
        end
        received++;
      end
    end
  end

  task automatic sender(int s, int npkt);
    for (int k = 0; k < npkt; k++) begin
      int d;
      do d = int'($urandom_range(0, N - 1)); while (d == s);
      @(negedge clk);
      wr_valid[s] = saturate ? 1'b1 : ($urandom_range(0, 1) != 0);
      wr_addr[s]  = '{node: node_t'(d), laddr: laddr_t'(s)};
      wr_data[s]  = $urandom;
      #1;
      if (wr_valid[s] && wr_ready[s] && !saturate) begin
        exp_d[s][d].push_back(wr_data[s]);
        exp_t[s][d].push_back(cyc);
      end else if (!(wr_valid[s] && wr_ready[s])) k--;
    end
    @(negedge clk);
    wr_valid[s] = 0;
  endtask

  initial begin
    for (int g = 0; g < N; g++) begin
      wr_valid[g] = 0; wr_addr[g] = '0; wr_data[g] = 0; injected[g] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      sender(0, NPKT); sender(1, NPKT); sender(2, NPKT); sender(3, NPKT); sender(4, NPKT);
    join
    repeat (3 * N * GAMMA) @(posedge clk);
    check(received == N * NPKT, $sformatf("received %0d of %0d", received, N * NPKT));
    $display("max latency %0d (bound GAMMA*N+H <= %0d)", max_lat, GAMMA * N + N - 1);
    // phase 2: saturation, fair share
    saturate = 1;
    fork
      sender(0, 400); sender(1, 400); sender(2, 400); sender(3, 400); sender(4, 400);
      begin
        int base [N];
        repeat (20) @(posedge clk);
        for (int g = 0; g < N; g++) base[g] = injected[g];
        repeat (50 * N) @(posedge clk);
        for (int g = 0; g < N; g++)
          check(injected[g] - base[g] >= 50, $sformatf("NI %0d injected %0d in %0d cycles", g, injected[g] - base[g], 50 * N));
      end
    join
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
