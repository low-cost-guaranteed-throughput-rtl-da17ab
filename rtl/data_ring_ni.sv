// data_ring_ni: the data-ring half of a network interface.
//
// Local writes (a network address and a data word) enter a small FIFO, the
// NI "buffer", of depth GAMMA. The head of the buffer is offered to the ring
// router, which injects it under the slot allocation rules (own slot always,
// other empty slots if the packet is delivered before the slot reaches its
// owner). While the buffer is full wr_ready is low and the local writer has
// to stall. Packets addressed to this NI are ejected on ej_* in the cycle they
// arrive and must be taken by the tile.
// Slots travel from NI i to NI i+1. Worst-case wait from writing into a full
// buffer to injection of the last word is GAMMA*N-1 cycles; a packet then
// needs one cycle per hop.
// The buffer of (address, data) tuples and the stall on a full buffer
// follow the published design; widths and timing are this design's own.
module data_ring_ni
  import ring_pkg::*;
#(
  parameter int unsigned N     = 17,
  parameter int unsigned ID    = 0,
  parameter int unsigned GAMMA = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  // ring links
  input  logic      in_valid,
  input  node_t     in_dest,
  input  data_pl_t  in_pl,
  output logic      out_valid,
  output node_t     out_dest,
  output data_pl_t  out_pl,
  // local write port into the buffer
  input  logic      wr_valid,
  input  net_addr_t wr_addr,
  input  word_t     wr_data,
  output logic      wr_ready,
  // ejected packets for this tile
  output logic      ej_valid,
  output laddr_t    ej_laddr,
  output word_t     ej_data,
  // statistics
  output logic      inj_own,
  output logic      inj_borrow
);

  typedef struct packed {
    node_t    dest;
    data_pl_t pl;
  } entry_t;

  entry_t   wr_entry, head;
  logic     buf_full, buf_empty, inj_accept;
  data_pl_t ej_pl;
  logic [$clog2(GAMMA+1)-1:0] buf_count;

  assign wr_entry = '{dest: wr_addr.node, pl: '{laddr: wr_addr.laddr, data: wr_data}};
  assign wr_ready = !buf_full;

  sync_fifo #(.WIDTH($bits(entry_t)), .DEPTH(GAMMA)) u_buffer (
    .clk, .rst_n,
    .wr_en  (wr_valid && !buf_full),
    .wr_data(wr_entry),
    .full   (buf_full),
    .rd_en  (inj_accept),
    .rd_data(head),
    .empty  (buf_empty),
    .count  (buf_count)
  );

  ring_router #(.N(N), .ID(ID), .DIR_DOWN(1'b0), .payload_t(data_pl_t)) u_router (
    .clk, .rst_n,
    .in_valid, .in_dest, .in_pl,
    .out_valid, .out_dest, .out_pl,
    .inj_valid (!buf_empty),
    .inj_dest  (head.dest),
    .inj_pl    (head.pl),
    .inj_accept(inj_accept),
    .ej_valid  (ej_valid),
    .ej_pl     (ej_pl),
    .inj_own,
    .inj_borrow
  );

  assign ej_laddr = ej_pl.laddr;
  assign ej_data  = ej_pl.data;

endmodule
