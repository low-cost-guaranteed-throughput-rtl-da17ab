// tb_sync_fifo: random pushes and pops against a queue model. Checks the
// head word, full, empty and count every cycle, with a depth of 3 so that
// wrap-around of both pointers is exercised many times.
module tb_sync_fifo;
  localparam int W = 8, D = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      check(int'(count) == q.size(), "count");
      if (q.size() != 0) check(rd_data == q[0], $sformatf("head %h exp %h", rd_data, q[0]));
      rd_en   = (q.size() != 0) && ($urandom_range(0, 2) != 0);
      wr_en   = (q.size() < D || rd_en) && ($urandom_range(0, 1) != 0) && !(q.size() == D);
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
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
