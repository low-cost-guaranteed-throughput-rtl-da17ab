// local_mem_dp: dual-ported local memory of a processor tile, holding the
// software FIFO containers and administration.
//
// Port A is written by the NI with every data-ring packet ejected for this
// tile's memory region; it accepts a write every cycle, which the ring's
// guaranteed acceptance requires. Port B is the processor's port on its
// local memory bus: a read returns data one cycle after the address
// (synchronous read); a write on port B is also supported. Both ports write
// the same word in the same cycle only if software misbehaves; port B then
// wins. Words are DATA_W bits; DEPTH words; the address is the word index
// (upper address bits beyond the depth are ignored).
// A dual-ported memory written by the NI follows the published design;
// its size and read latency are this design's choices.
module local_mem_dp
  import ring_pkg::*;
#(
  parameter int unsigned DEPTH = 2048
) (
  input  logic   clk,
  // port A: NI side
  input  logic   a_we,
  input  laddr_t a_addr,
  input  word_t  a_wdata,
  // port B: processor side
  input  logic   b_we,
  input  laddr_t b_addr,
  input  word_t  b_wdata,
  output word_t  b_rdata
);

  localparam int AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr[AW-1:0]] <= a_wdata;
    if (b_we) mem[b_addr[AW-1:0]] <= b_wdata;
    b_rdata <= mem[b_addr[AW-1:0]];
  end

endmodule
