// tb_ni_shell: directed test of the flow-control shell of NI 3 with two
// inputs and two outputs, buffers of two words and two credits per output.
// Covers: memory-region ejections; configuration of credit return and
// forward addresses and of the accelerator over the ring and from the local
// processor; forwarding of producer words only while credits last, the wait
// for a returned credit, a blocked NI buffer; priority of forwarding over
// software writes; input buffering and one credit request per consumed word.
module tb_ni_shell;
  import ring_pkg::*;
  localparam int ID = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ej_valid, loc_valid, loc_ready, dr_wr_valid, dr_wr_ready, mem_we, cr_valid, cfg_we, credit_stall;
  laddr_t ej_laddr, mem_addr;
  word_t ej_data, loc_data, dr_wr_data, mem_wdata, cfg_data;
  net_addr_t loc_addr, dr_wr_addr;
  logic [1:0] sin_valid, sin_read, sout_valid, sout_ready, credit_req;
  word_t sin_data [2], sout_data [2];
  node_t cret_node [2];
  port_t cret_port [2];
  port_t cr_port;
  logic [3:0] cfg_addr;

  ni_shell #(.ID(ID), .N_IN(2), .N_OUT(2), .ALPHA(2), .CREDITS(2)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // every word that enters the NI buffer
  net_addr_t out_a [$];
  word_t     out_d [$];
  int        n_credit_req [2];
  always @(posedge clk) if (rst_n) begin
    if (dr_wr_valid && dr_wr_ready) begin
      out_a.push_back(dr_wr_addr);
      out_d.push_back(dr_wr_data);
    end
    for (int p = 0; p < 2; p++) n_credit_req[p] += int'(credit_req[p]);
  end

  task automatic idle();
    ej_valid = 0; loc_valid = 0; sout_valid = '0; sin_read = '0; cr_valid = 0;
  endtask

  task automatic ring_write(laddr_t la, word_t d);
    @(negedge clk);
    ej_valid = 1; ej_laddr = la; ej_data = d;
    @(negedge clk);
    ej_valid = 0;
  endtask

  task automatic give_credit(int q);
    @(negedge clk);
    cr_valid = 1; cr_port = port_t'(q);
    @(negedge clk);
    cr_valid = 0;
  endtask

  initial begin
    idle();
    ej_laddr = 0; ej_data = 0; loc_addr = '0; loc_data = 0; sout_data[0] = 0; sout_data[1] = 0;
    cr_port = 0; dr_wr_ready = 1; n_credit_req[0] = 0; n_credit_req[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // memory region: passed to the memory port in the same cycle
    @(negedge clk);
    ej_valid = 1; ej_laddr = 16'h0123; ej_data = 32'hCAFE0001;
    #1 check(mem_we && mem_addr == 16'h0123 && mem_wdata == 32'hCAFE0001, "memory write");
    check(!cfg_we, "no config on memory write");
    @(negedge clk); ej_valid = 0;

    // configuration over the ring
    ring_write(shell_addr(SH_CRET_ADDR, 4'd1), word_t'({node_t'(7), port_t'(2)}));
    ring_write(shell_addr(SH_FWD_ADDR, 4'd0), word_t'({node_t'(9), 16'h8001}));
    ring_write(shell_addr(SH_FWD_ADDR, 4'd1), word_t'({node_t'(10), 16'h0040}));
    check(cret_node[1] == 7 && cret_port[1] == 2, "credit return address");
    @(negedge clk);
    ej_valid = 1; ej_laddr = shell_addr(SH_ACC_CFG, 4'd5); ej_data = 32'd77;
    #1 check(cfg_we && cfg_addr == 5 && cfg_data == 77 && !mem_we, "accelerator config");
    @(negedge clk); ej_valid = 0;

    // local config while the ring also writes the shell: the local write waits
    @(negedge clk);
    ej_valid = 1; ej_laddr = shell_addr(SH_ACC_CFG, 4'd1); ej_data = 32'd5;
    loc_valid = 1; loc_addr = '{node: node_t'(ID), laddr: shell_addr(SH_CRET_ADDR, 4'd0)};
    loc_data = word_t'({node_t'(12), port_t'(1)});
    #1 check(!loc_ready, "local config waits for ring ejection");
    @(negedge clk); ej_valid = 0;
    #1 check(loc_ready, "local config proceeds");
    @(negedge clk); loc_valid = 0;
    check(cret_node[0] == 12 && cret_port[0] == 1, "local credit return address");

    // producer on output 0: two credits, then wait
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      sout_valid[0] = 1; sout_data[0] = word_t'(100 + k);
      #1;
      while (!sout_ready[0]) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk); sout_valid[0] = 0;
    repeat (4) @(negedge clk);
    check(out_d.size() == 2, $sformatf("two words forwarded on two credits (%0d)", out_d.size()));
    check(credit_stall, "output waits for a credit");
    for (int k = 0; k < 2 && out_d.size() != 0; k++) begin
      check(out_a[0] == '{node: node_t'(9), laddr: 16'h8001} && out_d[0] == word_t'(100 + k), "forward address/data");
      void'(out_a.pop_front()); void'(out_d.pop_front());
    end
    // blocked NI buffer holds the word even with a credit
    dr_wr_ready = 0;
    give_credit(0);
    repeat (3) @(negedge clk);
    check(out_d.size() == 0, "no forward while the NI buffer is full");
    dr_wr_ready = 1;
    repeat (2) @(negedge clk);
    check(out_d.size() == 1 && out_d.size() != 0 && out_d[0] == 102, "third word after credit");
    out_a.delete(); out_d.delete();
    check(!credit_stall, "no wait when the output is empty");

    // local stream-out write on output 1 and a software write: forward first
    @(negedge clk);
    loc_valid = 1; loc_addr = '{node: node_t'(ID), laddr: shell_addr(SH_STREAM_OUT, 4'd1)}; loc_data = 32'h55;
    #1 check(loc_ready, "stream-out write accepted");
    @(negedge clk);
    loc_addr = '{node: node_t'(6), laddr: 16'h0010}; loc_data = 32'h66;
    #1 check(dr_wr_valid && !loc_ready && dr_wr_addr.node == 10, "forward wins the NI buffer");
    @(negedge clk);
    #1 check(loc_ready && dr_wr_valid && dr_wr_addr.node == 6, "software write follows");
    @(negedge clk); loc_valid = 0;
    check(out_d.size() == 2 && out_d[0] == 32'h55 && out_d[1] == 32'h66, "order of forward and software write");

    // input stream 1: two words buffered, reads return credits
    ring_write(shell_addr(SH_STREAM_IN, 4'd1), 32'hA1);
    ring_write(shell_addr(SH_STREAM_IN, 4'd1), 32'hA2);
    check(sin_valid == 2'b10 && sin_data[1] == 32'hA1, "input 1 holds a word");
    check(n_credit_req[1] == 0, "no credit before the consumer reads");
    @(negedge clk); sin_read[1] = 1;
    #1 check(credit_req[1], "credit request on read");
    @(negedge clk);
    check(sin_data[1] == 32'hA2, "second word");
    @(negedge clk); sin_read[1] = 0;
    check(!sin_valid[1], "input 1 empty");
    check(n_credit_req[1] == 2 && n_credit_req[0] == 0, "one credit per consumed word");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
