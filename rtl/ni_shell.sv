// ni_shell: credit-based hardware flow control between the NI and a tile's
// streaming ports (accelerator inputs/outputs or a processor's stream FIFO).
//
// Inputs (N_IN ports): data words that arrive over the data ring at the
// shell address of input p are stored in that input's buffer of depth ALPHA.
// The consumer sees the head on sin_valid/sin_data and pops it with sin_read;
// every pop asks the credit ring to return one credit to the input's static
// credit return address {node, port}.
// Outputs (N_OUT ports): a word from the producer (sout_* handshake, or a
// local processor write to the shell's stream-out address) waits in a
// one-word register until its output holds a credit; it is then written into
// the NI buffer towards the output's static forward address and one credit is
// spent. Credits arriving over the credit ring add one to their output's
// counter. Writing a forward address (re)loads the counter with CREDITS, the
// depth of the consumer's buffer.
// All other local writes (software FIFO traffic to other tiles) pass straight
// to the NI buffer; a forwarding output wins the buffer port, the processor
// then stalls (loc_ready low) for that cycle.
// Ejected ring packets with address bit 15 clear go to the tile memory port;
// with bit 15 set they are decoded as shell functions (see ring_pkg).
// Configuration writes come from the ring or from the local processor (to its
// own NI number); a ring ejection wins and the local write waits one cycle.
// Static credit return and forward addresses, credit-based forwarding and
// configuration over the ring follow the published design; the address map,
// the credit reload on writing a forward address and the arbitration rules
// are this design's choices.
module ni_shell
  import ring_pkg::*;
#(
  parameter int unsigned ID      = 0,
  parameter int unsigned N_IN    = 1,
  parameter int unsigned N_OUT   = 1,
  parameter int unsigned ALPHA   = 1,
  parameter int unsigned CREDITS = ALPHA
) (
  input  logic      clk,
  input  logic      rst_n,
  // packets ejected from the data ring
  input  logic      ej_valid,
  input  laddr_t    ej_laddr,
  input  word_t     ej_data,
  // local processor writes (tie loc_valid low on accelerator tiles)
  input  logic      loc_valid,
  input  net_addr_t loc_addr,
  input  word_t     loc_data,
  output logic      loc_ready,
  // to the data-ring NI buffer
  output logic      dr_wr_valid,
  output net_addr_t dr_wr_addr,
  output word_t     dr_wr_data,
  input  logic      dr_wr_ready,
  // tile memory write port
  output logic      mem_we,
  output laddr_t    mem_addr,
  output word_t     mem_wdata,
  // stream inputs towards the consumer
  output logic [N_IN-1:0] sin_valid,
  output word_t     sin_data [N_IN],
  input  logic [N_IN-1:0] sin_read,
  // stream outputs from the producer
  input  logic [N_OUT-1:0] sout_valid,
  input  word_t     sout_data [N_OUT],
  output logic [N_OUT-1:0] sout_ready,
  // credit ring side
  output logic [N_IN-1:0] credit_req,
  output node_t     cret_node [N_IN],
  output port_t     cret_port [N_IN],
  input  logic      cr_valid,
  input  port_t     cr_port,
  // accelerator configuration
  output logic      cfg_we,
  output logic [3:0] cfg_addr,
  output word_t     cfg_data,
  // statistics: an output holds a word but has no credit
  output logic      credit_stall
);

  localparam int CRW = $clog2(CREDITS + 1);
  localparam int OW  = (N_OUT > 1) ? $clog2(N_OUT) : 1;

  // ---------------- configuration / ejection decode ----------------
  logic      loc_own;       // local write to this tile's own shell/memory
  logic      loc_remote;    // local write to another tile
  logic      ej_shell, ej_mem;
  logic      c_valid;       // a shell-region access this cycle
  laddr_t    c_addr;
  word_t     c_data;
  shell_fn_e c_fn;
  logic [3:0] c_idx;
  logic      loc_own_go;

  assign loc_own    = loc_valid && (loc_addr.node == node_t'(ID));
  assign loc_remote = loc_valid && !loc_own;
  assign ej_shell   = ej_valid && ej_laddr[SHELL_BIT];
  assign ej_mem     = ej_valid && !ej_laddr[SHELL_BIT];

  // local own-node access proceeds unless the ring uses the same path
  logic loc_own_shell, out_slot_busy;
  assign loc_own_shell = loc_addr.laddr[SHELL_BIT];

  always_comb begin
    c_valid = 1'b0;
    c_addr  = ej_laddr;
    c_data  = ej_data;
    if (ej_shell) begin
      c_valid = 1'b1;
    end else if (loc_own && loc_own_shell && !out_slot_busy) begin
      c_valid = 1'b1;
      c_addr  = loc_addr.laddr;
      c_data  = loc_data;
    end
    c_fn  = shell_fn_e'(c_addr[14:12]);
    c_idx = c_addr[3:0];
  end

  // ---------------- outputs: holding registers and credits ----------------
  logic [N_OUT-1:0] out_full;
  word_t            out_data [N_OUT];
  logic [CRW-1:0]   credits  [N_OUT];
  net_addr_t        fwd_addr [N_OUT];
  logic [N_OUT-1:0] loc_out_wr, ext_out_wr, can_fwd;
  logic             fwd_any;
  logic [OW-1:0]    fwd_sel;

  // a local stream-out write to a full holding register must wait
  always_comb begin
    out_slot_busy = 1'b0;
    if (loc_own && loc_own_shell && shell_fn_e'(loc_addr.laddr[14:12]) == SH_STREAM_OUT)
      out_slot_busy = out_full[loc_addr.laddr[OW-1:0]];
  end

  for (genvar q = 0; q < N_OUT; q++) begin : g_out_dec
    assign loc_out_wr[q] = c_valid && !ej_shell && c_fn == SH_STREAM_OUT && c_idx == 4'(q);
    assign ext_out_wr[q] = sout_valid[q] && sout_ready[q];
    assign sout_ready[q] = !out_full[q] && !loc_out_wr[q];
    assign can_fwd[q]    = out_full[q] && (credits[q] != '0);
  end

  always_comb begin
    fwd_any = 1'b0;
    fwd_sel = '0;
    for (int q = N_OUT - 1; q >= 0; q--) begin
      if (can_fwd[q]) begin
        fwd_any = 1'b1;
        fwd_sel = OW'(q);
      end
    end
  end

  always_comb begin
    credit_stall = 1'b0;
    for (int q = 0; q < N_OUT; q++)
      if (out_full[q] && credits[q] == '0) credit_stall = 1'b1;
  end

  // NI buffer port: forwarding output first, then remote software writes
  always_comb begin
    if (fwd_any) begin
      dr_wr_valid = 1'b1;
      dr_wr_addr  = fwd_addr[fwd_sel];
      dr_wr_data  = out_data[fwd_sel];
    end else begin
      dr_wr_valid = loc_remote;
      dr_wr_addr  = loc_addr;
      dr_wr_data  = loc_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int q = 0; q < N_OUT; q++) begin
        out_full[q] <= 1'b0;
        out_data[q] <= '0;
        credits[q]  <= '0;
        fwd_addr[q] <= '0;
      end
    end else begin
      for (int q = 0; q < N_OUT; q++) begin
        logic sent, got;
        sent = fwd_any && fwd_sel == OW'(q) && dr_wr_ready;
        got  = cr_valid && cr_port == port_t'(q);
        if (loc_out_wr[q]) begin
          out_full[q] <= 1'b1;
          out_data[q] <= c_data;
        end else if (ext_out_wr[q]) begin
          out_full[q] <= 1'b1;
          out_data[q] <= sout_data[q];
        end else if (sent) begin
          out_full[q] <= 1'b0;
        end
        if (c_valid && c_fn == SH_FWD_ADDR && c_idx == 4'(q)) begin
          fwd_addr[q] <= net_addr_t'(c_data[$bits(net_addr_t)-1:0]);
          credits[q]  <= CRW'(CREDITS);
        end else begin
          credits[q] <= credits[q] + CRW'(got) - CRW'(sent);
        end
      end
    end
  end

  // ---------------- inputs: buffers and credit return ----------------
  logic [N_IN-1:0] in_full, in_empty, in_push;

  for (genvar p = 0; p < N_IN; p++) begin : g_in
    logic [$clog2(ALPHA+1)-1:0] unused_count;
    assign in_push[p] = ej_shell && c_fn == SH_STREAM_IN && c_idx == 4'(p);
    sync_fifo #(.WIDTH(DATA_W), .DEPTH(ALPHA)) u_in_buf (
      .clk, .rst_n,
      .wr_en  (in_push[p]),
      .wr_data(ej_data),
      .full   (in_full[p]),
      .rd_en  (sin_read[p]),
      .rd_data(sin_data[p]),
      .empty  (in_empty[p]),
      .count  (unused_count)
    );
    assign sin_valid[p]  = !in_empty[p];
    assign credit_req[p] = sin_read[p] && !in_empty[p];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < N_IN; p++) begin
        cret_node[p] <= '0;
        cret_port[p] <= '0;
      end
    end else if (c_valid && c_fn == SH_CRET_ADDR) begin
      for (int p = 0; p < N_IN; p++) begin
        if (c_idx == 4'(p)) begin
          cret_port[p] <= c_data[PORT_W-1:0];
          cret_node[p] <= c_data[PORT_W +: NODE_W];
        end
      end
    end
  end

  // ---------------- memory and accelerator configuration ----------------
  assign loc_own_go = loc_own && (loc_own_shell ? (!ej_shell && !out_slot_busy) : !ej_mem);

  always_comb begin
    mem_we    = ej_mem || (loc_own && !loc_own_shell);
    mem_addr  = ej_mem ? ej_laddr : loc_addr.laddr;
    mem_wdata = ej_mem ? ej_data : loc_data;
  end

  assign cfg_we   = c_valid && c_fn == SH_ACC_CFG;
  assign cfg_addr = c_addr[3:0];
  assign cfg_data = c_data;

  assign loc_ready = loc_own ? loc_own_go : (dr_wr_ready && !fwd_any);

  // guaranteed acceptance: credits never let a producer overrun an input
  for (genvar p = 0; p < N_IN; p++) begin : g_chk
    a_in_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      !(in_push[p] && in_full[p]));
  end

endmodule
