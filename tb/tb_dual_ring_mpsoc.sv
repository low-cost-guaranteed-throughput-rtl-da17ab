// tb_dual_ring_mpsoc: end-to-end test of the full MPSoC interconnect at its
// default size (16 processor tiles, one AM demodulator tile, 17 NIs).
//
// The test bench plays the processors:
//   - processor 0 configures the accelerator shell (credit return address,
//     forward address, gain and filter shift) over the data ring, configures
//     its own shell's forward address, then streams NSAMP samples into its
//     shell's stream output, under hardware flow control;
//   - processor 1 sets its stream FIFO's credit return address to the
//     accelerator and reads the demodulated stream from its stream FIFO with
//     random pauses; every word is compared with an independent model;
//   - processors 2..15 write NSW software-FIFO words each to random other
//     tiles' memories, loading the data ring; all memories are read back and
//     compared at the end, and every memory write is checked against the
//     latency bound N + H cycles (N NIs, H hops) from leaving the processor.
// The stream's sample period is checked against the guaranteed bound
// 2*(N-1+H) + 2 cycles per word for a one-credit channel over H = 16 hops.
// Counted mechanisms (each must occur): own-slot and borrowed-slot
// injections on both rings, processor stalls on a full NI buffer, producer
// waits for a credit, consumer back-pressure on the stream FIFO.
module tb_dual_ring_mpsoc;
  import ring_pkg::*;

  localparam int NP     = 16;
  localparam int N      = NP + 1;
  localparam int ACC    = NP;
  localparam int NSAMP  = 120;
  localparam int NSW    = 40;
  localparam int GAIN   = 384;
  localparam int SHIFT  = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      cpu_wr_valid  [NP];
  net_addr_t cpu_wr_addr   [NP];
  word_t     cpu_wr_data   [NP];
  logic      cpu_wr_stall  [NP];
  logic      cpu_mem_we    [NP];
  laddr_t    cpu_mem_addr  [NP];
  word_t     cpu_mem_wdata [NP];
  word_t     cpu_mem_rdata [NP];
  logic      fsl_exists    [NP];
  word_t     fsl_data      [NP];
  logic      fsl_read      [NP];
  logic      d_inj_own [N], d_inj_borrow [N], c_inj_own [N], c_inj_borrow [N];
  logic      credit_stall [N];

  dual_ring_mpsoc dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- processor write helper ----------------
  longint accept_cyc [NP][NSW];

  task automatic cpu_write(int c, node_t node, laddr_t la, word_t d, output longint when);
    @(negedge clk);
    cpu_wr_valid[c] = 1'b1;
    cpu_wr_addr[c]  = '{node: node, laddr: la};
    cpu_wr_data[c]  = d;
    forever begin
      #1;
      if (!cpu_wr_stall[c]) break;
      @(negedge clk);
    end
    when = cyc;
    @(posedge clk);
    #1 cpu_wr_valid[c] = 1'b0;
  endtask

  // ---------------- reference model of the accelerator ----------------
  word_t exp_q [$];
  int    env_m = 0;
  function automatic word_t model(word_t s);
    int x, r;
    x = int'(signed'(s[15:0]));
    r = (x < 0) ? -x : x;
    env_m = env_m + ((r - env_m) >>> SHIFT);
    return word_t'((longint'(env_m) * GAIN) >>> 8);
  endfunction

  // ---------------- statistics ----------------
  int n_d_own = 0, n_d_borrow = 0, n_c_own = 0, n_c_borrow = 0;
  int n_credit_wait = 0, n_buf_stall = 0, n_fsl_backpressure = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      n_d_own    += int'(d_inj_own[i]);
      n_d_borrow += int'(d_inj_borrow[i]);
      n_c_own    += int'(c_inj_own[i]);
      n_c_borrow += int'(c_inj_borrow[i]);
      n_credit_wait += int'(credit_stall[i]);
    end
    for (int i = 0; i < NP; i++) begin
      n_buf_stall += int'(cpu_wr_stall[i]);
      n_fsl_backpressure += int'(fsl_exists[i] && !fsl_read[i]);
    end
  end

  // ---------------- latency monitor on every memory write ----------------
  int lat_max = 0;
  int n_lat = 0;
  for (genvar g = 0; g < NP; g++) begin : g_mon
    always @(posedge clk) if (rst_n && dut.g_proc[g].u_tile.mem_we) begin
      int src, k, h;
      longint lat;
      src = int'(dut.g_proc[g].u_tile.mem_addr) / 64;
      k   = int'(dut.g_proc[g].u_tile.mem_addr) % 64;
      if (src >= 2 && src < NP && k < NSW) begin
        h   = (g - src + N) % N;
        lat = cyc - accept_cyc[src][k];
        if (lat > lat_max) lat_max = int'(lat);
        n_lat++;
        check(lat <= longint'(N + h), $sformatf("latency %0d > N+H=%0d (src %0d dst %0d)", lat, N + h, src, g));
      end
    end
  end

  // ---------------- software FIFO traffic ----------------
  int    sw_dst [NP][NSW];
  word_t sw_val [NP][NSW];

  task automatic sw_traffic(int c);
    for (int k = 0; k < NSW; k++) begin
      int d;
      longint t;
      do d = int'($urandom_range(0, NP - 1)); while (d == c);
      sw_dst[c][k] = d;
      sw_val[c][k] = $urandom;
      cpu_write(c, node_t'(d), laddr_t'(c * 64 + k), sw_val[c][k], t);
      accept_cyc[c][k] = t;
    end
  endtask

  // ---------------- stream producer and consumer ----------------
  longint first_rx = -1, last_rx = -1;
  int     n_rx = 0;

  task automatic producer();
    longint t;
    // accelerator shell: credits go back to processor 0, output 0
    cpu_write(0, node_t'(ACC), shell_addr(SH_CRET_ADDR, 4'd0), word_t'({node_t'(0), port_t'(0)}), t);
    // accelerator shell: forward to processor 1, stream input 0
    cpu_write(0, node_t'(ACC), shell_addr(SH_FWD_ADDR, 4'd0),
              word_t'({node_t'(1), shell_addr(SH_STREAM_IN, 4'd0)}), t);
    cpu_write(0, node_t'(ACC), shell_addr(SH_ACC_CFG, 4'd0), word_t'(GAIN), t);
    cpu_write(0, node_t'(ACC), shell_addr(SH_ACC_CFG, 4'd1), word_t'(SHIFT), t);
    // own shell: output 0 forwards to the accelerator's input 0
    cpu_write(0, node_t'(0), shell_addr(SH_FWD_ADDR, 4'd0),
              word_t'({node_t'(ACC), shell_addr(SH_STREAM_IN, 4'd0)}), t);
    for (int s = 0; s < NSAMP; s++) begin
      word_t w;
      w = word_t'($urandom_range(0, 65535));
      exp_q.push_back(model(w));
      cpu_write(0, node_t'(0), shell_addr(SH_STREAM_OUT, 4'd0), w, t);
    end
  endtask

  task automatic consumer();
    int pause;
    pause = 0;
    while (n_rx < NSAMP) begin
      @(negedge clk);
      fsl_read[1] = 1'b0;
      if (fsl_exists[1]) begin
        if (pause < 3 && $urandom_range(0, 2) == 0) begin
          pause++;
        end else begin
          word_t e;
          pause = 0;
          e = (exp_q.size() != 0) ? exp_q.pop_front() : 32'hdeadbeef;
          check(fsl_data[1] == e, $sformatf("stream word %0d: got %0d exp %0d", n_rx, fsl_data[1], e));
          fsl_read[1] = 1'b1;
          if (first_rx < 0) first_rx = cyc;
          last_rx = cyc;
          n_rx++;
        end
      end
    end
    @(negedge clk);
    fsl_read[1] = 1'b0;
  endtask

  // ---------------- main ----------------
  initial begin
    longint t;
    for (int i = 0; i < NP; i++) begin
      cpu_wr_valid[i] = 0; cpu_wr_addr[i] = '0; cpu_wr_data[i] = '0;
      cpu_mem_we[i] = 0; cpu_mem_addr[i] = '0; cpu_mem_wdata[i] = '0;
      fsl_read[i] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // processor 1: its stream FIFO returns credits to the accelerator, output 0
    cpu_write(1, node_t'(1), shell_addr(SH_CRET_ADDR, 4'd0), word_t'({node_t'(ACC), port_t'(0)}), t);
    fork
      producer();
      consumer();
      begin
        for (int c = 2; c < NP; c++) begin
          fork
            automatic int cc = c;
            sw_traffic(cc);
          join_none
        end
        wait fork;
      end
    join
    repeat (3 * N) @(posedge clk);

    // memory contents
    for (int c = 2; c < NP; c++)
      for (int k = 0; k < NSW; k++) begin
        int d;
        d = sw_dst[c][k];
        @(negedge clk);
        cpu_mem_addr[d] = laddr_t'(c * 64 + k);
        @(negedge clk);
        check(cpu_mem_rdata[d] == sw_val[c][k],
              $sformatf("memory of tile %0d word %0d: got %h exp %h", d, c * 64 + k, cpu_mem_rdata[d], sw_val[c][k]));
      end

    check(n_lat == (NP - 2) * NSW, $sformatf("memory writes seen %0d", n_lat));
    check(exp_q.size() == 0, "all stream words delivered");
    // guaranteed rate for the one-credit channel processor 0 -> accelerator
    begin
      longint bound;
      bound = longint'(NSAMP - 1) * (2 * (N - 1 + 16) + 2);
      check(last_rx - first_rx <= bound,
            $sformatf("stream took %0d cycles, bound %0d", last_rx - first_rx, bound));
      $display("stream: %0d words in %0d cycles (%0.1f per word), bound %0d per word",
               NSAMP, last_rx - first_rx, real'(last_rx - first_rx) / (NSAMP - 1), 2 * (N - 1 + 16) + 2);
    end
    $display("max software write latency %0d", lat_max);
    $display("events: d_own=%0d d_borrow=%0d c_own=%0d c_borrow=%0d credit_wait=%0d buf_stall=%0d fsl_bp=%0d",
             n_d_own, n_d_borrow, n_c_own, n_c_borrow, n_credit_wait, n_buf_stall, n_fsl_backpressure);
    check(n_d_own > 0, "data ring own-slot injection happened");
    check(n_d_borrow > 0, "data ring borrowed-slot injection happened");
    check(n_c_own > 0, "credit ring own-slot injection happened");
    check(n_c_borrow > 0, "credit ring borrowed-slot injection happened");
    check(n_credit_wait > 0, "producer waited for a credit");
    check(n_buf_stall > 0, "processor stalled on a full NI buffer");
    check(n_fsl_backpressure > 0, "stream FIFO back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
