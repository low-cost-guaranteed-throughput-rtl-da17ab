// processor_tile: everything of a processor tile except the processor core.
//
// Holds the tile's network interface and its dual-ported local memory. The
// processor itself (with its caches, timer and memory bus) is outside this
// module: its ports are brought out as
//   - cpu_wr_*  : writes into the network (stalls while cpu_wr_stall is high).
//                 Writes to another NI go over the data ring (software FIFO
//                 traffic; to an accelerator's stream input address they form
//                 a stream). Writes to the tile's own NI number reach its own
//                 shell (stream-out words under hardware flow control, or
//                 shell configuration) or its own memory.
//   - cpu_mem_* : the processor's port B of the local memory (one-cycle read).
//   - fsl_*     : the hardware stream FIFO, the shell input buffer of depth
//                 ALPHA read like a streaming link: fsl_exists shows a word,
//                 fsl_read pops it and returns a credit to the producer.
// Ring packets for this tile's memory region are written into port A in the
// cycle they leave the ring.
// The tile's contents follow the published design; the processor is
// outside and its port set is this design's choice.
module processor_tile
  import ring_pkg::*;
#(
  parameter int unsigned N         = 17,
  parameter int unsigned ID        = 0,
  parameter int unsigned GAMMA     = 1,
  parameter int unsigned ALPHA     = 1,
  parameter int unsigned CREDITS   = ALPHA,
  parameter int unsigned MEM_WORDS = 2048
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
  // processor: network writes
  input  logic       cpu_wr_valid,
  input  net_addr_t  cpu_wr_addr,
  input  word_t      cpu_wr_data,
  output logic       cpu_wr_stall,
  // processor: local memory port
  input  logic       cpu_mem_we,
  input  laddr_t     cpu_mem_addr,
  input  word_t      cpu_mem_wdata,
  output word_t      cpu_mem_rdata,
  // processor: hardware stream FIFO
  output logic       fsl_exists,
  output word_t      fsl_data,
  input  logic       fsl_read,
  // statistics
  output logic       d_inj_own,
  output logic       d_inj_borrow,
  output logic       c_inj_own,
  output logic       c_inj_borrow,
  output logic       credit_stall
);

  logic   mem_we;
  laddr_t mem_addr;
  word_t  mem_wdata;
  logic   loc_ready;
  logic [0:0] sin_valid, sout_ready;
  word_t  sin_data [1];
  word_t  sout_data [1];
  logic   unused_cfg_we;
  logic [3:0] unused_cfg_addr;
  word_t  unused_cfg_data;

  assign sout_data[0] = '0;

  network_interface #(
    .N(N), .ID(ID), .GAMMA(GAMMA), .N_IN(1), .N_OUT(1),
    .ALPHA(ALPHA), .CREDITS(CREDITS)
  ) u_ni (
    .clk, .rst_n,
    .d_in_valid, .d_in_dest, .d_in_pl, .d_out_valid, .d_out_dest, .d_out_pl,
    .c_in_valid, .c_in_dest, .c_in_pl, .c_out_valid, .c_out_dest, .c_out_pl,
    .loc_valid (cpu_wr_valid), .loc_addr(cpu_wr_addr), .loc_data(cpu_wr_data),
    .loc_ready (loc_ready),
    .mem_we, .mem_addr, .mem_wdata,
    .sin_valid (sin_valid), .sin_data(sin_data), .sin_read(fsl_read),
    .sout_valid(1'b0), .sout_data(sout_data), .sout_ready(sout_ready),
    .cfg_we    (unused_cfg_we), .cfg_addr(unused_cfg_addr), .cfg_data(unused_cfg_data),
    .d_inj_own, .d_inj_borrow, .c_inj_own, .c_inj_borrow, .credit_stall
  );

  assign cpu_wr_stall = cpu_wr_valid && !loc_ready;
  assign fsl_exists   = sin_valid[0];
  assign fsl_data     = sin_data[0];

  local_mem_dp #(.DEPTH(MEM_WORDS)) u_mem (
    .clk,
    .a_we   (mem_we), .a_addr(mem_addr), .a_wdata(mem_wdata),
    .b_we   (cpu_mem_we), .b_addr(cpu_mem_addr), .b_wdata(cpu_mem_wdata),
    .b_rdata(cpu_mem_rdata)
  );

endmodule
