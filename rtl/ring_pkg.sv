// ring_pkg: types and constants shared by the dual-ring interconnect.
//
// A data-ring slot carries a destination NI number, a local address inside
// the destination tile and one 32-bit data word. A credit-ring slot carries a
// destination NI number and the index of the shell output port the credit
// belongs to (a credit is only the fact that it exists, so no data word).
//
// Local address map inside a tile (this design's choice): addresses with
// bit 15 clear go to the tile's local software-FIFO memory; addresses with
// bit 15 set go to the NI shell. In the shell region bits 14:12 select a
// function and the low bits select a stream port or a register.
// The 32-bit data word follows the published design; all widths, the
// address map and the function codes are this design's own choices.
package ring_pkg;

  localparam int NODE_W  = 5;   // NI number width: rings of up to 32 NIs
  localparam int LADDR_W = 16;  // local (word) address inside a tile
  localparam int DATA_W  = 32;  // data word
  localparam int PORT_W  = 2;   // shell stream port index: up to 4 per tile

  typedef logic [NODE_W-1:0]  node_t;
  typedef logic [LADDR_W-1:0] laddr_t;
  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [PORT_W-1:0]  port_t;

  // Network address: destination NI plus local address in that tile.
  typedef struct packed {
    node_t  node;
    laddr_t laddr;
  } net_addr_t;

  // Payload of a data-ring slot (the destination NI travels separately).
  typedef struct packed {
    laddr_t laddr;
    word_t  data;
  } data_pl_t;

  // Payload of a credit-ring slot: which output port of the producer.
  typedef struct packed {
    port_t port;
  } credit_pl_t;

  // Shell functions, selected by laddr[14:12] when laddr[15] is set.
  typedef enum logic [2:0] {
    SH_STREAM_IN  = 3'd0,  // data word for shell input port laddr[1:0]
    SH_CRET_ADDR  = 3'd1,  // credit return address {node, port} of input laddr[1:0]
    SH_FWD_ADDR   = 3'd2,  // forward address {node, laddr} of output laddr[1:0]
    SH_ACC_CFG    = 3'd3,  // accelerator configuration register laddr[3:0]
    SH_STREAM_OUT = 3'd4   // local producer word for shell output laddr[1:0]
  } shell_fn_e;

  localparam int SHELL_BIT = LADDR_W - 1;

  function automatic laddr_t shell_addr(shell_fn_e fn, logic [3:0] idx);
    laddr_t a;
    a = '0;
    a[SHELL_BIT] = 1'b1;
    a[14:12] = fn;
    a[3:0] = idx;
    return a;
  endfunction

endpackage
