// stream_harness: test-bench helper that runs one hardware-FIFO stream
// experiment on a dual_ring_mpsoc instance and measures its throughput.
//
// Processor PROD configures the accelerator shell (credits back to PROD,
// output forwarded to processor CONS's stream FIFO) and its own shell, then
// writes NWORDS samples into its stream output as fast as the shell allows
// (one write per cycle when not stalled). Processor CONS pops its stream FIFO
// in every cycle a word is there. If LOAD is set, every other processor
// keeps writing software-FIFO words to random other tiles, loading the data
// ring. After the first WARM words the harness measures the cycles between
// consecutive arrivals at CONS; cyc_x100 is the average period times 100.
// Every received word is compared with the accelerator's expected output
// for GAIN = 1.0 and SHIFT = 0 (the rectified sample).
module stream_harness
  import ring_pkg::*;
#(
  parameter int N_PROC = 15,
  parameter int ALPHA  = 1,
  parameter int PROD   = 0,
  parameter int CONS   = 1,
  parameter bit LOAD   = 1'b1,
  parameter int NWORDS = 200,
  parameter int WARM   = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   cyc_x100,
  output int   errors,
  output int   received
);
  localparam int N = N_PROC + 1;

  logic      cpu_wr_valid  [N_PROC];
  net_addr_t cpu_wr_addr   [N_PROC];
  word_t     cpu_wr_data   [N_PROC];
  logic      cpu_wr_stall  [N_PROC];
  logic      cpu_mem_we    [N_PROC];
  laddr_t    cpu_mem_addr  [N_PROC];
  word_t     cpu_mem_wdata [N_PROC];
  word_t     cpu_mem_rdata [N_PROC];
  logic      fsl_exists    [N_PROC];
  word_t     fsl_data      [N_PROC];
  logic      fsl_read      [N_PROC];
  logic      d_inj_own [N], d_inj_borrow [N], c_inj_own [N], c_inj_borrow [N], credit_stall [N];

  dual_ring_mpsoc #(.N_PROC(N_PROC), .ALPHA(ALPHA), .MEM_WORDS(256)) dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic cwrite(int c, node_t n, laddr_t la, word_t d);
    @(negedge clk);
    cpu_wr_valid[c] = 1; cpu_wr_addr[c] = '{node: n, laddr: la}; cpu_wr_data[c] = d;
    #1;
    while (cpu_wr_stall[c]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 cpu_wr_valid[c] = 0;
  endtask

  word_t  exp_q [$];
  bit     stop_load = 0;
  longint t_first = 0;

  task automatic load(int c);
    while (!stop_load) begin
      int d;
      do d = int'($urandom_range(0, N_PROC - 1)); while (d == c);
      cwrite(c, node_t'(d), laddr_t'($urandom_range(0, 255)), $urandom);
    end
  endtask

  initial begin
    done = 0; cyc_x100 = 0; errors = 0; received = 0;
    for (int i = 0; i < N_PROC; i++) begin
      cpu_wr_valid[i] = 0; cpu_wr_addr[i] = '0; cpu_wr_data[i] = '0;
      cpu_mem_we[i] = 0; cpu_mem_addr[i] = '0; cpu_mem_wdata[i] = '0; fsl_read[i] = 0;
    end
    @(posedge rst_n);
    cwrite(CONS, node_t'(CONS), shell_addr(SH_CRET_ADDR, 4'd0), word_t'({node_t'(N_PROC), port_t'(0)}));
    cwrite(PROD, node_t'(N_PROC), shell_addr(SH_CRET_ADDR, 4'd0), word_t'({node_t'(PROD), port_t'(0)}));
    cwrite(PROD, node_t'(N_PROC), shell_addr(SH_FWD_ADDR, 4'd0),
           word_t'({node_t'(CONS), shell_addr(SH_STREAM_IN, 4'd0)}));
    cwrite(PROD, node_t'(N_PROC), shell_addr(SH_ACC_CFG, 4'd1), 32'd0);
    cwrite(PROD, node_t'(PROD), shell_addr(SH_FWD_ADDR, 4'd0),
           word_t'({node_t'(N_PROC), shell_addr(SH_STREAM_IN, 4'd0)}));
    repeat (3 * N) @(posedge clk);
    for (int c = 0; c < N_PROC; c++)
      if (LOAD && c != PROD && c != CONS)
        fork
          automatic int cc = c;
          load(cc);
        join_none
    fork
      for (int k = 0; k < NWORDS; k++) begin
        word_t s;
        int x;
        s = word_t'($urandom_range(0, 65535));
        x = int'(signed'(s[15:0]));
        exp_q.push_back(word_t'((x < 0) ? -x : x));
        cwrite(PROD, node_t'(PROD), shell_addr(SH_STREAM_OUT, 4'd0), s);
      end
      while (received < NWORDS) begin
        @(negedge clk);
        fsl_read[CONS] = 0;
        #1;
        if (fsl_exists[CONS]) begin
          if (exp_q.size() == 0 || fsl_data[CONS] != exp_q[0]) errors++;
          if (exp_q.size() != 0) void'(exp_q.pop_front());
          fsl_read[CONS] = 1;
          received++;
          if (received == WARM) t_first = cyc;
          if (received == NWORDS)
            cyc_x100 = int'((cyc - t_first) * 100 / (NWORDS - WARM));
        end
      end
    join
    @(negedge clk);
    fsl_read[CONS] = 0;
    stop_load = 1;
    done = 1;
  end
endmodule
