// tb_local_mem_dp: random writes on both ports (never to the same word in
// the same cycle) and reads on port B, compared with an array model; a read
// returns the word one cycle after its address.
module tb_local_mem_dp;
  import ring_pkg::*;
  localparam int D = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_we, b_we;
  laddr_t a_addr, b_addr;
  word_t a_wdata, b_wdata, b_rdata;
  word_t model [D];
  int checks = 0, failures = 0;

  local_mem_dp #(.DEPTH(D)) dut (.*);

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // initialise every word through port A
    for (int i = 0; i < D; i++) begin
      @(negedge clk); a_we = 1; a_addr = laddr_t'(i); a_wdata = word_t'(i * 3);
      model[i] = word_t'(i * 3);
    end
    @(negedge clk); a_we = 0;
    for (int i = 0; i < 1000; i++) begin
      word_t exp;
      @(negedge clk);
      a_we = $urandom_range(0, 1) != 0; a_addr = laddr_t'($urandom_range(0, D - 1)); a_wdata = $urandom;
      b_addr = laddr_t'($urandom_range(0, D - 1));
      b_we = ($urandom_range(0, 3) == 0) && !(a_we && a_addr == b_addr);
      b_wdata = $urandom;
      exp = model[b_addr];
      @(posedge clk);
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
      #1;
      checks++;
      if (b_rdata !== exp) begin
        failures++;
        $display("FAIL: read %0d got %h exp %h", b_addr, b_rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
