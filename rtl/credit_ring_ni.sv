// credit_ring_ni: the credit-ring half of a network interface.
//
// Each shell input port that hands a word to its consumer raises credit_req
// for one cycle; the credit must travel back to the producer named by that
// input's credit return address {cret_node, cret_port}. Because a credit is
// only the fact that space was freed, a per-input counter of pending credits
// replaces a buffer. A round-robin pointer picks one input with pending
// credits and offers a credit packet to the ring router; the counter drops
// when the router injects it. The credit ring runs in the direction opposite
// to the data ring (slots go from NI i to NI i-1), so a credit for data that
// went H hops also travels H hops. Credits addressed to this NI are ejected
// on cr_valid/cr_port for the shell's output credit counters.
// Each counter saturates at MAX_PEND, the most credits an input can owe
// (its buffer depth).
// Credits returning on a separate ring in the opposite direction follow
// the published design; the pending counters, the round-robin choice and the
// port index in the credit slot are this design's choices.
module credit_ring_ni
  import ring_pkg::*;
#(
  parameter int unsigned N        = 17,
  parameter int unsigned ID       = 0,
  parameter int unsigned N_IN     = 1,
  parameter int unsigned MAX_PEND = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  // ring links
  input  logic       in_valid,
  input  node_t      in_dest,
  input  credit_pl_t in_pl,
  output logic       out_valid,
  output node_t      out_dest,
  output credit_pl_t out_pl,
  // credit requests from the shell inputs
  input  logic [N_IN-1:0] credit_req,
  input  node_t      cret_node [N_IN],
  input  port_t      cret_port [N_IN],
  // credits received for this NI's shell outputs
  output logic       cr_valid,
  output port_t      cr_port,
  // statistics
  output logic       inj_own,
  output logic       inj_borrow
);

  localparam int PW = $clog2(MAX_PEND + 1);
  localparam int IW = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic [PW-1:0] pend [N_IN];
  logic [IW-1:0] rr, sel;
  logic          any, inj_accept;
  credit_pl_t    ej_pl;

  // round-robin choice among inputs with pending credits, starting at rr
  always_comb begin
    any = 1'b0;
    sel = rr;
    for (int k = N_IN - 1; k >= 0; k--) begin
      int unsigned j;
      j = (int'(rr) + k) % N_IN;
      if (pend[j] != '0) begin
        any = 1'b1;
        sel = IW'(j);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_IN; i++) pend[i] <= '0;
      rr <= '0;
    end else begin
      for (int i = 0; i < N_IN; i++) begin
        logic dec;
        dec = inj_accept && (sel == IW'(i));
        pend[i] <= pend[i] + PW'(credit_req[i]) - PW'(dec);
      end
      if (inj_accept) rr <= (sel == IW'(N_IN - 1)) ? '0 : sel + 1'b1;
    end
  end

  ring_router #(.N(N), .ID(ID), .DIR_DOWN(1'b1), .payload_t(credit_pl_t)) u_router (
    .clk, .rst_n,
    .in_valid, .in_dest, .in_pl,
    .out_valid, .out_dest, .out_pl,
    .inj_valid (any),
    .inj_dest  (cret_node[sel]),
    .inj_pl    ('{port: cret_port[sel]}),
    .inj_accept(inj_accept),
    .ej_valid  (cr_valid),
    .ej_pl     (ej_pl),
    .inj_own,
    .inj_borrow
  );

  assign cr_port = ej_pl.port;

  for (genvar i = 0; i < N_IN; i++) begin : g_chk
    a_pend_bound: assert property (@(posedge clk) disable iff (!rst_n)
      !(credit_req[i] && pend[i] == PW'(MAX_PEND)));
  end

endmodule
