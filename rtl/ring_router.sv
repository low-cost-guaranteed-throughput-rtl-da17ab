// ring_router: one hop of a slotted, unidirectional ring with guaranteed
// acceptance and the two-rule slot allocation policy.
//
// Every cycle one slot (valid bit, destination NI, payload) arrives from the
// upstream neighbour and one slot leaves, registered, to the downstream
// neighbour. A slot addressed to this NI is ejected on ej_* in the cycle it
// arrives; the local tile must take it (guaranteed acceptance, there is no
// back-pressure inside the ring). Any other occupied slot is passed on.
//
// Slot ownership: slots and NIs are numbered alike and all routers leave
// reset together, so every slot lines up with the NI of the same number once
// every N cycles, at the same moment for all NIs. A free-running modulo-N
// counter therefore tells each router the number of the passing slot without
// sending it along: when the counter is 0 the slot is this NI's own, otherwise
// the slot reaches its owner after N - cnt more hops.
//   Rule 1: in its own slot an NI may always inject (the slot cannot be in use).
//   Rule 2: an empty slot (or one emptied by ejection here) may be used if the
//           packet reaches its destination no later than the slot reaches its
//           owner: hops(dest) <= N - cnt.
// The pending injection (inj_*) is taken when inj_accept is high.
// DIR_DOWN selects the direction: 0 sends slots from NI i to NI i+1 (data
// ring), 1 from NI i to NI i-1 (credit ring, opposite to the data).
// Latency: one cycle per hop. inj_own / inj_borrow flag injections under
// rule 1 and rule 2 for statistics.
// Guaranteed acceptance, the slot numbering and both rules follow the
// published design; deriving the slot number from a counter instead of
// carrying it, and reusing a slot emptied here in the same cycle, are this
// design's choices.
module ring_router
  import ring_pkg::*;
#(
  parameter int unsigned N        = 17,
  parameter int unsigned ID       = 0,
  parameter bit          DIR_DOWN = 1'b0,
  parameter type         payload_t = data_pl_t
) (
  input  logic     clk,
  input  logic     rst_n,
  // from the upstream neighbour
  input  logic     in_valid,
  input  node_t    in_dest,
  input  payload_t in_pl,
  // to the downstream neighbour (registered)
  output logic     out_valid,
  output node_t    out_dest,
  output payload_t out_pl,
  // injection request from the local side
  input  logic     inj_valid,
  input  node_t    inj_dest,
  input  payload_t inj_pl,
  output logic     inj_accept,
  // ejection to the local side (must be accepted)
  output logic     ej_valid,
  output payload_t ej_pl,
  // statistics
  output logic     inj_own,
  output logic     inj_borrow
);

  localparam int CW = (N > 1) ? $clog2(N) : 1;

  logic [CW-1:0] cnt;
  logic          owned;
  logic          here;
  logic          slot_free;
  logic [CW:0]   hops;
  logic [CW:0]   owner_dist;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else if (cnt == CW'(N - 1)) cnt <= '0;
    else cnt <= cnt + 1'b1;
  end

  assign owned     = (cnt == '0);
  assign here      = in_valid && (in_dest == node_t'(ID));
  assign slot_free = !in_valid || here;

  // hops from this NI to the destination in the ring's direction
  always_comb begin
    int unsigned d;
    d = int'(inj_dest);
    if (!DIR_DOWN) hops = (CW+1)'((d + N - ID) % N);
    else           hops = (CW+1)'((ID + N - d) % N);
    owner_dist = owned ? (CW+1)'(N) : (CW+1)'(N) - (CW+1)'(cnt);
  end

  always_comb begin
    inj_own    = inj_valid && owned;
    inj_borrow = inj_valid && !owned && slot_free && (hops != '0) && (hops <= owner_dist);
    inj_accept = inj_own || inj_borrow;
  end

  assign ej_valid = here;
  assign ej_pl    = in_pl;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_dest  <= '0;
      out_pl    <= '0;
    end else if (inj_accept) begin
      out_valid <= 1'b1;
      out_dest  <= inj_dest;
      out_pl    <= inj_pl;
    end else begin
      out_valid <= in_valid && !here;
      out_dest  <= in_dest;
      out_pl    <= in_pl;
    end
  end

  // An owned slot can only carry a packet for its owner (rule 2 guarantees it).
  a_owned_slot_free: assert property (@(posedge clk) disable iff (!rst_n)
    owned |-> slot_free);
  // A packet is never addressed to the NI that injects it.
  a_no_self: assert property (@(posedge clk) disable iff (!rst_n)
    inj_valid |-> inj_dest != node_t'(ID));

endmodule
