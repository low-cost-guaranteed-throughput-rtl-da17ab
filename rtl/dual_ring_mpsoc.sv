// dual_ring_mpsoc: heterogeneous MPSoC interconnect with N_PROC processor
// tiles and one accelerator tile (the AM demodulator) on two rings.
//
// NIs 0 .. N_PROC-1 are processor tiles, NI N_PROC is the accelerator tile,
// N = N_PROC + 1 NIs in all. The data ring carries one slot per cycle from
// NI i to NI i+1 (and from the last NI back to NI 0); the credit ring carries
// credit slots the other way, from NI i to NI i-1. Both rings use the same
// slot allocation: each NI owns one slot per N cycles and may borrow empty
// slots that reach their owner only after the packet is delivered. Registers
// between NIs are the only storage in the rings.
// The processors are not part of this module; each processor tile's ports
// (network writes with stall, local memory port B, hardware stream FIFO) are
// brought out as arrays indexed by processor number. The *_inj_* and
// credit_stall outputs expose, per NI, the injections under rule 1 (own
// slot) and rule 2 (borrowed slot) and the cycles an output waits for a credit.
// 16 processors and one accelerator follow the published system; the
// accelerator's place on the ring is this design's choice.
module dual_ring_mpsoc
  import ring_pkg::*;
#(
  parameter int unsigned N_PROC    = 16,
  parameter int unsigned GAMMA     = 1,
  parameter int unsigned ALPHA     = 1,
  parameter int unsigned MEM_WORDS = 2048
) (
  input  logic       clk,
  input  logic       rst_n,
  // processor network write ports
  input  logic       cpu_wr_valid  [N_PROC],
  input  net_addr_t  cpu_wr_addr   [N_PROC],
  input  word_t      cpu_wr_data   [N_PROC],
  output logic       cpu_wr_stall  [N_PROC],
  // processor local memory ports
  input  logic       cpu_mem_we    [N_PROC],
  input  laddr_t     cpu_mem_addr  [N_PROC],
  input  word_t      cpu_mem_wdata [N_PROC],
  output word_t      cpu_mem_rdata [N_PROC],
  // processor hardware stream FIFOs
  output logic       fsl_exists    [N_PROC],
  output word_t      fsl_data      [N_PROC],
  input  logic       fsl_read      [N_PROC],
  // statistics per NI (index N_PROC is the accelerator tile)
  output logic       d_inj_own     [N_PROC+1],
  output logic       d_inj_borrow  [N_PROC+1],
  output logic       c_inj_own     [N_PROC+1],
  output logic       c_inj_borrow  [N_PROC+1],
  output logic       credit_stall  [N_PROC+1]
);

  localparam int unsigned N = N_PROC + 1;

  // output of NI i on each ring
  logic       d_valid [N];
  node_t      d_dest  [N];
  data_pl_t   d_pl    [N];
  logic       c_valid [N];
  node_t      c_dest  [N];
  credit_pl_t c_pl    [N];

  for (genvar i = 0; i < N_PROC; i++) begin : g_proc
    localparam int unsigned DUP = (i + N - 1) % N;  // data comes from NI i-1
    localparam int unsigned CUP = (i + 1) % N;      // credits come from NI i+1
    processor_tile #(
      .N(N), .ID(i), .GAMMA(GAMMA), .ALPHA(ALPHA), .MEM_WORDS(MEM_WORDS)
    ) u_tile (
      .clk, .rst_n,
      .d_in_valid (d_valid[DUP]), .d_in_dest(d_dest[DUP]), .d_in_pl(d_pl[DUP]),
      .d_out_valid(d_valid[i]),   .d_out_dest(d_dest[i]),  .d_out_pl(d_pl[i]),
      .c_in_valid (c_valid[CUP]), .c_in_dest(c_dest[CUP]), .c_in_pl(c_pl[CUP]),
      .c_out_valid(c_valid[i]),   .c_out_dest(c_dest[i]),  .c_out_pl(c_pl[i]),
      .cpu_wr_valid (cpu_wr_valid[i]), .cpu_wr_addr(cpu_wr_addr[i]),
      .cpu_wr_data  (cpu_wr_data[i]),  .cpu_wr_stall(cpu_wr_stall[i]),
      .cpu_mem_we   (cpu_mem_we[i]),   .cpu_mem_addr(cpu_mem_addr[i]),
      .cpu_mem_wdata(cpu_mem_wdata[i]), .cpu_mem_rdata(cpu_mem_rdata[i]),
      .fsl_exists   (fsl_exists[i]), .fsl_data(fsl_data[i]), .fsl_read(fsl_read[i]),
      .d_inj_own    (d_inj_own[i]), .d_inj_borrow(d_inj_borrow[i]),
      .c_inj_own    (c_inj_own[i]), .c_inj_borrow(c_inj_borrow[i]),
      .credit_stall (credit_stall[i])
    );
  end

  accelerator_tile #(.N(N), .ID(N_PROC), .ALPHA(ALPHA)) u_acc (
    .clk, .rst_n,
    .d_in_valid (d_valid[N_PROC-1]), .d_in_dest(d_dest[N_PROC-1]), .d_in_pl(d_pl[N_PROC-1]),
    .d_out_valid(d_valid[N_PROC]),   .d_out_dest(d_dest[N_PROC]),  .d_out_pl(d_pl[N_PROC]),
    .c_in_valid (c_valid[0]),        .c_in_dest(c_dest[0]),        .c_in_pl(c_pl[0]),
    .c_out_valid(c_valid[N_PROC]),   .c_out_dest(c_dest[N_PROC]),  .c_out_pl(c_pl[N_PROC]),
    .d_inj_own  (d_inj_own[N_PROC]), .d_inj_borrow(d_inj_borrow[N_PROC]),
    .c_inj_own  (c_inj_own[N_PROC]), .c_inj_borrow(c_inj_borrow[N_PROC]),
    .credit_stall(credit_stall[N_PROC])
  );

endmodule
