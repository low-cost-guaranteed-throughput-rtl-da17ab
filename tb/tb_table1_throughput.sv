// tb_table1_throughput: guaranteed throughput of a processor-to-accelerator
// hardware FIFO on a 16-NI ring (15 processors and the accelerator, gamma = 1,
// H = 15 hops from processor 0 to the accelerator), for consumer buffers and
// credits alpha = 1 .. 5, with all other processors loading the data ring.
// The bound is the maximum cycle mean of the channel's data-flow model for
// one-word containers, rho = 1 for producer and consumer:
//   lambda(alpha) = max(N, (2*(gamma*N - 1 + H) + 2) / alpha)
// = 62, 31, 20.7, 16, 16 cycles per word. Each measured period must not
// exceed it (plus N cycles over the measuring window of 180 words, which
// may start and end at different points of the slot round). A second experiment uses the default 17-NI system without load
// and places the producer next to the accelerator (processor 15 -> accelerator
// -> processor 0): the video decoder's 11 MS/s at 100 MHz needs at most 9.09
// cycles per sample, which this neighbouring mapping must reach.
module tb_table1_throughput;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NA = 5;
  logic done [NA + 1];
  int   cyc_x100 [NA + 1], errors [NA + 1], received [NA + 1];

  for (genvar a = 1; a <= NA; a++) begin : g_alpha
    stream_harness #(.N_PROC(15), .ALPHA(a), .PROD(0), .CONS(1), .LOAD(1'b1)) h (
      .clk, .rst_n, .done(done[a - 1]), .cyc_x100(cyc_x100[a - 1]),
      .errors(errors[a - 1]), .received(received[a - 1]));
  end
  stream_harness #(.N_PROC(16), .ALPHA(1), .PROD(15), .CONS(0), .LOAD(1'b0)) h_pal (
    .clk, .rst_n, .done(done[NA]), .cyc_x100(cyc_x100[NA]),
    .errors(errors[NA]), .received(received[NA]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i <= NA; i++) all &= done[i];
    end while (!all);
    for (int a = 1; a <= NA; a++) begin
      int bound_x100;
      bound_x100 = (2 * (16 - 1 + 15) + 2) * 100 / a;
      if (bound_x100 < 1600) bound_x100 = 1600;
      $display("alpha=%0d: %0d.%02d cycles/word (bound %0d.%02d)", a, cyc_x100[a - 1] / 100, cyc_x100[a - 1] % 100,
               bound_x100 / 100, bound_x100 % 100);
      check(errors[a - 1] == 0 && received[a - 1] > 0, $sformatf("alpha=%0d data", a));
      // the window of 180 periods may start and end at different points of
      // the N-cycle slot round: allow N cycles over the whole window
      check(cyc_x100[a - 1] <= bound_x100 + 16 * 100 / 180, $sformatf("alpha=%0d period above the bound", a));
    end
    $display("neighbour mapping: %0d.%02d cycles/sample (11 MS/s at 100 MHz needs 9.09)",
             cyc_x100[NA] / 100, cyc_x100[NA] % 100);
    check(errors[NA] == 0, "neighbour mapping data");
    check(cyc_x100[NA] <= 909, "neighbour mapping reaches 11 MS/s");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
