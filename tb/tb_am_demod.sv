// tb_am_demod: random signed samples into the demodulator with random input
// gaps and output back-pressure; outputs are compared with an integer model
// of rectification, the first-order envelope filter and the 8.8 gain. The
// gain and filter shift are reconfigured half way. Checks that an input is
// only read when the output register can take the result.
module tb_am_demod;
  import ring_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_read, out_valid, out_ready, cfg_we;
  word_t in_data, out_data, cfg_data;
  logic [3:0] cfg_addr;
  int checks = 0, failures = 0;
  word_t exp_q [$];
  int env = 0, gain = 256, shift = 2;

  am_demod dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t model(word_t s);
    int x, r;
    x = int'(signed'(s[15:0]));
    r = (x < 0) ? -x : x;
    env = env + ((r - env) >>> shift);
    return word_t'((longint'(env) * gain) >>> 8);
  endfunction

  int sent = 0, got = 0;
  bit took;
  initial begin
    in_valid = 0; in_data = 0; out_ready = 0; cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (got < 400) begin
      @(negedge clk);
      if (sent == 200 && got == 200) begin
        // reconfigure once the pipeline is empty
        cfg_we = 1; cfg_addr = 0; cfg_data = 32'd700; gain = 700;
        @(negedge clk); cfg_addr = 1; cfg_data = 32'd3; shift = 3;
        @(negedge clk); cfg_we = 0;
      end
      out_ready = $urandom_range(0, 2) != 0;
      if (!in_valid && sent < 400 && !(sent == 200 && got < 200) && $urandom_range(0, 3) != 0) begin
        in_valid = 1;
        in_data = {16'hABCD, 16'($urandom)};
      end
      #1;
      took = in_read;
      if (took) check(!out_valid || out_ready, "read only when output can be taken");
      if (in_valid && !out_valid) check(took, "idle demodulator takes a waiting sample");
      if (out_valid && out_ready) begin
        check(exp_q.size() != 0 && out_data == exp_q[0],
              $sformatf("out %0d got %0d exp %0d", got, out_data, exp_q.size() ? exp_q[0] : 0));
        if (exp_q.size() != 0) void'(exp_q.pop_front());
        got++;
      end
      if (took) begin
        exp_q.push_back(model(in_data));
        sent++;
      end
      @(posedge clk);
      #1 if (took) in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog sent=%0d got=%0d q=%0d iv=%0d ov=%0d", sent, got, exp_q.size(), in_valid, out_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
