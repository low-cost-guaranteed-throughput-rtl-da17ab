// accelerator_tile: a stream processing accelerator (the AM demodulator)
// behind its network interface.
//
// The accelerator only sees FIFO-like handshakes: the shell raises a valid
// signal while its input buffer holds a word, the accelerator reads it and
// signals the read; on the output side the accelerator offers a word and the
// shell takes it into its one-word output register. Flow control, addresses
// and credits are handled by the shell: input words arrive over the data
// ring, each read returns a credit to the producer over the credit ring, and
// output words are forwarded to the configured forward address once a credit
// is held. The accelerator's registers are written over the ring through the
// shell's configuration function. The NI buffer holds GAMMA = 1 word.
// Ring packets for the memory region are dropped: the tile has no memory.
// The FIFO-like accelerator handshake and the one-word NI buffer follow the
// published design.
module accelerator_tile
  import ring_pkg::*;
#(
  parameter int unsigned N       = 17,
  parameter int unsigned ID      = 16,
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
  // statistics
  output logic       d_inj_own,
  output logic       d_inj_borrow,
  output logic       c_inj_own,
  output logic       c_inj_borrow,
  output logic       credit_stall
);

  logic [0:0] sin_valid, sin_read, sout_valid, sout_ready;
  word_t  sin_data [1];
  word_t  sout_data [1];
  logic   cfg_we;
  logic [3:0] cfg_addr;
  word_t  cfg_data;
  logic   unused_loc_ready, unused_mem_we;
  laddr_t unused_mem_addr;
  word_t  unused_mem_wdata;

  network_interface #(
    .N(N), .ID(ID), .GAMMA(1), .N_IN(1), .N_OUT(1),
    .ALPHA(ALPHA), .CREDITS(CREDITS)
  ) u_ni (
    .clk, .rst_n,
    .d_in_valid, .d_in_dest, .d_in_pl, .d_out_valid, .d_out_dest, .d_out_pl,
    .c_in_valid, .c_in_dest, .c_in_pl, .c_out_valid, .c_out_dest, .c_out_pl,
    .loc_valid (1'b0), .loc_addr('0), .loc_data('0), .loc_ready(unused_loc_ready),
    .mem_we    (unused_mem_we), .mem_addr(unused_mem_addr), .mem_wdata(unused_mem_wdata),
    .sin_valid, .sin_data, .sin_read,
    .sout_valid, .sout_data, .sout_ready,
    .cfg_we, .cfg_addr, .cfg_data,
    .d_inj_own, .d_inj_borrow, .c_inj_own, .c_inj_borrow, .credit_stall
  );

  am_demod u_acc (
    .clk, .rst_n,
    .in_valid (sin_valid[0]), .in_data(sin_data[0]), .in_read(sin_read[0]),
    .out_valid(sout_valid[0]), .out_data(sout_data[0]), .out_ready(sout_ready[0]),
    .cfg_we, .cfg_addr, .cfg_data
  );

endmodule
