// tb_credit_ring_ni: a ring of five credit-ring NIs, two shell inputs each,
// up to three pending credits per input. Input i of NI g returns its credits
// to port i of NI g+1+i (so every producer port has one consumer). Random
// credit requests are issued while the outstanding credits of an input stay
// within MAX_PEND; every credit must arrive at the right NI and port, none
// may be invented, and all must be delivered at the end.
module tb_credit_ring_ni;
  import ring_pkg::*;
  localparam int N = 5, NIN = 2, MAXP = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       c_valid [N];
  node_t      c_dest  [N];
  credit_pl_t c_pl    [N];
  logic [NIN-1:0] credit_req [N];
  node_t      cret_node [N][NIN];
  port_t      cret_port [N][NIN];
  logic       cr_valid [N], inj_own[N], inj_borrow[N];
  port_t      cr_port  [N];

  for (genvar g = 0; g < N; g++) begin : g_ni
    credit_ring_ni #(.N(N), .ID(g), .N_IN(NIN), .MAX_PEND(MAXP)) dut (
      .clk, .rst_n,
      .in_valid(c_valid[(g + 1) % N]), .in_dest(c_dest[(g + 1) % N]), .in_pl(c_pl[(g + 1) % N]),
      .out_valid(c_valid[g]), .out_dest(c_dest[g]), .out_pl(c_pl[g]),
      .credit_req(credit_req[g]), .cret_node(cret_node[g]), .cret_port(cret_port[g]),
      .cr_valid(cr_valid[g]), .cr_port(cr_port[g]),
      .inj_own(inj_own[g]), .inj_borrow(inj_borrow[g])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int sent [N][NIN];
  int rcvd [N][NIN];    // indexed by the consumer input that sent it
  int n_own = 0, n_borrow = 0;

  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < N; g++) begin
      n_own += int'(inj_own[g]);
      n_borrow += int'(inj_borrow[g]);
      if (cr_valid[g]) begin
        int src;
        // port p at NI g belongs to input p of NI g-1-p
        src = (g - 1 - int'(cr_port[g]) + 2 * N) % N;
        rcvd[src][cr_port[g]]++;
        check(rcvd[src][cr_port[g]] <= sent[src][cr_port[g]], "credit not invented");
      end
    end
  end

  initial begin
    for (int g = 0; g < N; g++)
      for (int i = 0; i < NIN; i++) begin
        cret_node[g][i] = node_t'((g + 1 + i) % N);
        cret_port[g][i] = port_t'(i);
        sent[g][i] = 0; rcvd[g][i] = 0;
      end
    for (int g = 0; g < N; g++) credit_req[g] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      for (int g = 0; g < N; g++)
        for (int i = 0; i < NIN; i++) begin
          credit_req[g][i] = (sent[g][i] - rcvd[g][i] < MAXP - 1) && ($urandom_range(0, 3) == 0);
          if (credit_req[g][i]) sent[g][i]++;
        end
    end
    @(negedge clk);
    for (int g = 0; g < N; g++) credit_req[g] = '0;
    repeat (4 * N * NIN * MAXP) @(posedge clk);
    for (int g = 0; g < N; g++)
      for (int i = 0; i < NIN; i++)
        check(sent[g][i] == rcvd[g][i] && sent[g][i] > 0,
              $sformatf("input %0d.%0d sent %0d received %0d", g, i, sent[g][i], rcvd[g][i]));
    check(n_own > 0 && n_borrow > 0, "both slot rules used");
    $display("own %0d borrow %0d", n_own, n_borrow);
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
