// network_interface: one NI of the dual-ring interconnect.
//
// Joins the data-ring interface (NI buffer of depth GAMMA plus router, slots
// moving to NI i+1), the credit-ring interface (pending-credit counters plus
// router, slots moving to NI i-1) and the flow-control shell. Software FIFO
// traffic from a processor only uses the data ring; streams to and from
// accelerators (or a processor's stream FIFO) are held back by the shell
// until a credit is available, and every consumed word returns a credit on
// the credit ring. Ring outputs are registered: one cycle per hop on both
// rings. Every port is passed through from the three parts; see them for
// the timing of each.
// The composition (shell plus the two ring interfaces in every NI) follows
// the published design.
module network_interface
  import ring_pkg::*;
#(
  parameter int unsigned N       = 17,
  parameter int unsigned ID      = 0,
  parameter int unsigned GAMMA   = 1,
  parameter int unsigned N_IN    = 1,
  parameter int unsigned N_OUT   = 1,
  parameter int unsigned ALPHA   = 1,
  parameter int unsigned CREDITS = ALPHA
) (
  input  logic       clk,
  input  logic       rst_n,
  // data ring
  input  logic       d_in_valid,
  input  node_t      d_in_dest,
  input  data_pl_t   d_in_pl,
  output logic       d_out_valid,
  output node_t      d_out_dest,
  output data_pl_t   d_out_pl,
  // credit ring
  input  logic       c_in_valid,
  input  node_t      c_in_dest,
  input  credit_pl_t c_in_pl,
  output logic       c_out_valid,
  output node_t      c_out_dest,
  output credit_pl_t c_out_pl,
  // local processor write port
  input  logic       loc_valid,
  input  net_addr_t  loc_addr,
  input  word_t      loc_data,
  output logic       loc_ready,
  // tile memory write port
  output logic       mem_we,
  output laddr_t     mem_addr,
  output word_t      mem_wdata,
  // streams
  output logic [N_IN-1:0]  sin_valid,
  output word_t      sin_data [N_IN],
  input  logic [N_IN-1:0]  sin_read,
  input  logic [N_OUT-1:0] sout_valid,
  input  word_t      sout_data [N_OUT],
  output logic [N_OUT-1:0] sout_ready,
  // accelerator configuration
  output logic       cfg_we,
  output logic [3:0] cfg_addr,
  output word_t      cfg_data,
  // statistics
  output logic       d_inj_own,
  output logic       d_inj_borrow,
  output logic       c_inj_own,
  output logic       c_inj_borrow,
  output logic       credit_stall
);

  logic      ej_valid;
  laddr_t    ej_laddr;
  word_t     ej_data;
  logic      dr_wr_valid, dr_wr_ready;
  net_addr_t dr_wr_addr;
  word_t     dr_wr_data;
  logic [N_IN-1:0] credit_req;
  node_t     cret_node [N_IN];
  port_t     cret_port [N_IN];
  logic      cr_valid;
  port_t     cr_port;

  data_ring_ni #(.N(N), .ID(ID), .GAMMA(GAMMA)) u_data (
    .clk, .rst_n,
    .in_valid (d_in_valid), .in_dest(d_in_dest), .in_pl(d_in_pl),
    .out_valid(d_out_valid), .out_dest(d_out_dest), .out_pl(d_out_pl),
    .wr_valid (dr_wr_valid), .wr_addr(dr_wr_addr), .wr_data(dr_wr_data),
    .wr_ready (dr_wr_ready),
    .ej_valid, .ej_laddr, .ej_data,
    .inj_own  (d_inj_own), .inj_borrow(d_inj_borrow)
  );

  credit_ring_ni #(.N(N), .ID(ID), .N_IN(N_IN), .MAX_PEND(ALPHA)) u_credit (
    .clk, .rst_n,
    .in_valid (c_in_valid), .in_dest(c_in_dest), .in_pl(c_in_pl),
    .out_valid(c_out_valid), .out_dest(c_out_dest), .out_pl(c_out_pl),
    .credit_req, .cret_node, .cret_port,
    .cr_valid, .cr_port,
    .inj_own  (c_inj_own), .inj_borrow(c_inj_borrow)
  );

  ni_shell #(.ID(ID), .N_IN(N_IN), .N_OUT(N_OUT), .ALPHA(ALPHA), .CREDITS(CREDITS)) u_shell (
    .clk, .rst_n,
    .ej_valid, .ej_laddr, .ej_data,
    .loc_valid, .loc_addr, .loc_data, .loc_ready,
    .dr_wr_valid, .dr_wr_addr, .dr_wr_data, .dr_wr_ready,
    .mem_we, .mem_addr, .mem_wdata,
    .sin_valid, .sin_data, .sin_read,
    .sout_valid, .sout_data, .sout_ready,
    .credit_req, .cret_node, .cret_port,
    .cr_valid, .cr_port,
    .cfg_we, .cfg_addr, .cfg_data,
    .credit_stall
  );

endmodule
