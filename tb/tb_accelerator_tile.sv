// tb_accelerator_tile: the AM demodulator tile (NI 1) and one processor tile
// (NI 0) on a two-NI ring. The processor configures the accelerator shell
// (credit return and forward addresses) and the demodulator's gain and
// filter shift over the ring, points its own stream output at the
// accelerator and its stream FIFO's credits at the accelerator's output,
// then streams random samples. The demodulated words come back into the
// processor's stream FIFO and are compared with an integer model. The
// accelerator's output must wait for credits at least once (slow reader).
module tb_accelerator_tile;
  import ring_pkg::*;
  localparam int N = 2, NS = 60, GAIN = 200, SHIFT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic d_valid [N]; node_t d_dest [N]; data_pl_t d_pl [N];
  logic c_valid [N]; node_t c_dest [N]; credit_pl_t c_pl [N];
  logic wv, ws, fe, fr;
  net_addr_t wa;
  word_t wd, fd, mrd;
  logic d_own [N], d_bor [N], c_own [N], c_bor [N], cstall [N];

  processor_tile #(.N(N), .ID(0), .MEM_WORDS(64)) u_cpu (
    .clk, .rst_n,
    .d_in_valid(d_valid[1]), .d_in_dest(d_dest[1]), .d_in_pl(d_pl[1]),
    .d_out_valid(d_valid[0]), .d_out_dest(d_dest[0]), .d_out_pl(d_pl[0]),
    .c_in_valid(c_valid[1]), .c_in_dest(c_dest[1]), .c_in_pl(c_pl[1]),
    .c_out_valid(c_valid[0]), .c_out_dest(c_dest[0]), .c_out_pl(c_pl[0]),
    .cpu_wr_valid(wv), .cpu_wr_addr(wa), .cpu_wr_data(wd), .cpu_wr_stall(ws),
    .cpu_mem_we(1'b0), .cpu_mem_addr('0), .cpu_mem_wdata('0), .cpu_mem_rdata(mrd),
    .fsl_exists(fe), .fsl_data(fd), .fsl_read(fr),
    .d_inj_own(d_own[0]), .d_inj_borrow(d_bor[0]), .c_inj_own(c_own[0]), .c_inj_borrow(c_bor[0]),
    .credit_stall(cstall[0])
  );

  accelerator_tile #(.N(N), .ID(1)) dut (
    .clk, .rst_n,
    .d_in_valid(d_valid[0]), .d_in_dest(d_dest[0]), .d_in_pl(d_pl[0]),
    .d_out_valid(d_valid[1]), .d_out_dest(d_dest[1]), .d_out_pl(d_pl[1]),
    .c_in_valid(c_valid[0]), .c_in_dest(c_dest[0]), .c_in_pl(c_pl[0]),
    .c_out_valid(c_valid[1]), .c_out_dest(c_dest[1]), .c_out_pl(c_pl[1]),
    .d_inj_own(d_own[1]), .d_inj_borrow(d_bor[1]), .c_inj_own(c_own[1]), .c_inj_borrow(c_bor[1]),
    .credit_stall(cstall[1])
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cwrite(node_t n, laddr_t la, word_t d);
    @(negedge clk);
    wv = 1; wa = '{node: n, laddr: la}; wd = d;
    #1;
    while (ws) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 wv = 0;
  endtask

  word_t exp_q [$];
  int env = 0;
  function automatic word_t model(word_t s);
    int x, r;
    x = int'(signed'(s[15:0]));
    r = (x < 0) ? -x : x;
    env = env + ((r - env) >>> SHIFT);
    return word_t'((longint'(env) * GAIN) >>> 8);
  endfunction

  int n_acc_wait = 0;
  always @(posedge clk) if (rst_n) n_acc_wait += int'(cstall[1]);

  initial begin
    wv = 0; wa = '0; wd = 0; fr = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cwrite(node_t'(1), shell_addr(SH_CRET_ADDR, 4'd0), word_t'({node_t'(0), port_t'(0)}));
    cwrite(node_t'(1), shell_addr(SH_FWD_ADDR, 4'd0), word_t'({node_t'(0), shell_addr(SH_STREAM_IN, 4'd0)}));
    cwrite(node_t'(1), shell_addr(SH_ACC_CFG, 4'd0), word_t'(GAIN));
    cwrite(node_t'(1), shell_addr(SH_ACC_CFG, 4'd1), word_t'(SHIFT));
    cwrite(node_t'(0), shell_addr(SH_CRET_ADDR, 4'd0), word_t'({node_t'(1), port_t'(0)}));
    cwrite(node_t'(0), shell_addr(SH_FWD_ADDR, 4'd0), word_t'({node_t'(1), shell_addr(SH_STREAM_IN, 4'd0)}));
    fork
      for (int k = 0; k < NS; k++) begin
        word_t s;
        s = $urandom;
        exp_q.push_back(model(s));
        cwrite(node_t'(0), shell_addr(SH_STREAM_OUT, 4'd0), s);
      end
      for (int k = 0; k < NS; k++) begin
        repeat ((k < NS / 2) ? 8 : 0) @(negedge clk);
        @(negedge clk);
        #1;
        while (!fe) begin @(negedge clk); #1; end
        check(exp_q.size() != 0 && fd == exp_q[0], $sformatf("sample %0d got %0d", k, fd));
        if (exp_q.size() != 0) void'(exp_q.pop_front());
        fr = 1;
        @(posedge clk);
        #1 fr = 0;
      end
    join
    check(n_acc_wait > 0, "accelerator output waited for a credit");
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
