// tb_ring_router: one router of a 5-NI ring (NI number 2) per direction,
// driven with random incoming slots and injection requests. A model that
// numbers the slots explicitly (slot s is at NI s at time 0 and moves one NI
// per cycle) decides every cycle whether the injection is allowed under
// rule 1 (own slot) or rule 2 (empty slot, delivered before the slot reaches
// its owner), what is ejected and what leaves on the registered output.
// Incoming traffic respects the ring invariant: an owned slot arrives empty
// or addressed to its owner.
module tb_ring_router;
  import ring_pkg::*;
  localparam int N = 5, ID = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid [2];
  node_t      in_dest  [2];
  data_pl_t   in_pl    [2];
  logic       out_valid[2];
  node_t      out_dest [2];
  data_pl_t   out_pl   [2];
  logic       inj_valid[2];
  node_t      inj_dest [2];
  data_pl_t   inj_pl   [2];
  logic       inj_accept[2], ej_valid[2], inj_own[2], inj_borrow[2];
  data_pl_t   ej_pl    [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    ring_router #(.N(N), .ID(ID), .DIR_DOWN(g[0]), .payload_t(data_pl_t)) dut (
      .clk, .rst_n,
      .in_valid(in_valid[g]), .in_dest(in_dest[g]), .in_pl(in_pl[g]),
      .out_valid(out_valid[g]), .out_dest(out_dest[g]), .out_pl(out_pl[g]),
      .inj_valid(inj_valid[g]), .inj_dest(inj_dest[g]), .inj_pl(inj_pl[g]),
      .inj_accept(inj_accept[g]), .ej_valid(ej_valid[g]), .ej_pl(ej_pl[g]),
      .inj_own(inj_own[g]), .inj_borrow(inj_borrow[g])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int md(int a);
    return ((a % N) + N) % N;
  endfunction

  int n_own = 0, n_borrow = 0, n_refused = 0;

  initial begin
    int t;
    for (int g = 0; g < 2; g++) begin
      in_valid[g] = 0; in_dest[g] = 0; in_pl[g] = 0;
      inj_valid[g] = 0; inj_dest[g] = 0; inj_pl[g] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    t = 0;   // first cycle after reset: slots are at their own NIs
    for (int i = 0; i < 3000; i++) begin
      bit       exp_acc [2];
      bit       exp_ov  [2];
      node_t    exp_od  [2];
      data_pl_t exp_opl [2];
      @(negedge clk);
      for (int g = 0; g < 2; g++) begin
        int s, to_owner, hops;
        bit owned, free_slot;
        // slot number now at this NI
        s = (g == 0) ? md(ID - t) : md(ID + t);
        owned = (s == ID);
        in_valid[g] = $urandom_range(0, 1) != 0;
        do in_dest[g] = node_t'($urandom_range(0, N - 1)); while (owned && in_dest[g] != ID);
        in_pl[g] = {16'($urandom), 32'($urandom)};
        inj_valid[g] = $urandom_range(0, 2) != 0;
        do inj_dest[g] = node_t'($urandom_range(0, N - 1)); while (inj_dest[g] == ID);
        inj_pl[g] = {16'($urandom), 32'($urandom)};
        hops     = (g == 0) ? md(inj_dest[g] - ID) : md(ID - inj_dest[g]);
        to_owner = owned ? N : ((g == 0) ? md(s - ID) : md(ID - s));
        free_slot = !in_valid[g] || in_dest[g] == ID;
        exp_acc[g] = inj_valid[g] && (owned || (free_slot && hops <= to_owner));
        if (exp_acc[g]) begin
          exp_ov[g] = 1; exp_od[g] = inj_dest[g]; exp_opl[g] = inj_pl[g];
        end else begin
          exp_ov[g] = in_valid[g] && in_dest[g] != ID; exp_od[g] = in_dest[g]; exp_opl[g] = in_pl[g];
        end
        if (exp_acc[g] && owned) n_own++;
        else if (exp_acc[g]) n_borrow++;
        else if (inj_valid[g]) n_refused++;
      end
      #1;
      for (int g = 0; g < 2; g++) begin
        check(inj_accept[g] == exp_acc[g], $sformatf("dir %0d cycle %0d accept %0d exp %0d", g, t, inj_accept[g], exp_acc[g]));
        check(ej_valid[g] == (in_valid[g] && in_dest[g] == ID), "eject valid");
        if (ej_valid[g]) check(ej_pl[g] == in_pl[g], "eject payload");
        check(inj_own[g] == (inj_valid[g] && md(t) == 0), "own-slot flag");
      end
      @(posedge clk);
      #1;
      for (int g = 0; g < 2; g++) begin
        check(out_valid[g] == exp_ov[g], $sformatf("dir %0d out valid", g));
        if (exp_ov[g]) check(out_dest[g] == exp_od[g] && out_pl[g] == exp_opl[g], $sformatf("dir %0d out slot", g));
      end
      t++;
    end
    check(n_own > 0 && n_borrow > 0 && n_refused > 0, "all three cases seen");
    $display("own %0d borrow %0d refused %0d", n_own, n_borrow, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
