// tb_adapt_noc_full: one complete operation of the 8x8 Adapt-NoC with every
// parameter at its default (50K-cycle epoch, 5% exploration).
//
// Eight 2x4 subNoCs, each with its memory controller at the north-west
// corner, carry request and reply traffic for one epoch. The DQN weights of
// subNoC k make it prefer topology k mod 4. At the end of the epoch every
// controller decides; each subNoC that did not explore must end up running
// its preferred topology, after which traffic continues on the new
// topologies. All flits must be delivered exactly once.
module tb_adapt_noc_full;
  import adapt_pkg::*;
  localparam int NSN = 8;

  logic clk = 0, rst_n = 0;
  logic cfg_we;
  logic [SN_W-1:0] cfg_idx;
  region_t cfg_region;
  logic w_we;
  logic [SN_W-1:0] w_sel;
  logic [8:0] w_addr;
  logic signed [15:0] w_data;
  logic [NODES-1:0] core_valid, core_ready, ej_valid;
  flit_t core_flit [NODES];
  flit_t ej_flit [NODES];
  logic [3:0] core_evt [NODES];
  topo_e cur_topo [MAX_SUBNOC];
  logic [MAX_SUBNOC-1:0] topo_switch_evt, topo_keep_evt, rl_decision_evt, rl_explore_evt, subnoc_hold;
  logic [NODES-1:0] router_powered, bypass_evt, express_evt, gate_evt;

  adapt_noc_top dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  flit_t txq [NODES][$];
  int    pend_dst [int];
  int    next_tag = 1;
  bit    traffic_on = 0;
  int    injected = 0, delivered = 0, express = 0;
  logic [NSN-1:0] decided, explored;

  function automatic int sn_of(input int n);
    return (n / MESH_X) / 2 * 2 + (n % MESH_X) / 4;
  endfunction
  function automatic int mc_of(input int k);
    return (k / 2) * 2 * MESH_X + (k % 2) * 4;
  endfunction

  function automatic flit_t make(input int s, input int d, input bit vn);
    flit_t f;
    f = '0;
    f.hdr.src = NODE_W'(s); f.hdr.dst = NODE_W'(d); f.hdr.vnet = vn;
    f.hdr.is_data = vn; f.hdr.tag = 16'(next_tag);
    f.payload = {$urandom, $urandom};
    pend_dst[next_tag] = d;
    next_tag = (next_tag == 65535) ? 1 : next_tag + 1;
    return f;
  endfunction

  always @(negedge clk) if (rst_n && traffic_on) begin
    for (int n = 0; n < NODES; n++) begin
      int base, d;
      base = mc_of(sn_of(n));
      if (txq[n].size() < 2 && $urandom_range(0, 99) < 3) begin
        d = base + $urandom_range(0, 1) * MESH_X + $urandom_range(0, 3);
        if (n == base) txq[n].push_back(make(n, d, 1'b1));
        else           txq[n].push_back(make(n, ($urandom_range(0, 1) == 0) ? base : d, 1'b0));
      end
    end
  end

  always_comb
    for (int n = 0; n < NODES; n++) begin
      core_valid[n] = txq[n].size() > 0;
      core_flit[n]  = (txq[n].size() > 0) ? txq[n][0] : '0;
      core_evt[n]   = 4'($urandom);
    end

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      if (core_valid[n] && core_ready[n]) begin
        void'(txq[n].pop_front());
        injected++;
      end
      if (ej_valid[n]) begin
        int tag;
        tag = int'(ej_flit[n].hdr.tag);
        checks++;
        if (!pend_dst.exists(tag) || pend_dst[tag] != n) begin
          failures++;
          $display("FAIL delivery of tag %0d at node %0d", tag, n);
        end else begin
          pend_dst.delete(tag);
          delivered++;
        end
      end
      if (express_evt[n]) express++;
    end
    for (int k = 0; k < NSN; k++) begin
      if (rl_decision_evt[k]) decided[k] <= 1'b1;
      if (rl_explore_evt[k])  explored[k] <= 1'b1;
    end
  end

  initial begin
    cfg_we = 0; cfg_idx = '0; cfg_region = '0;
    w_we = 0; w_sel = '0; w_addr = '0; w_data = '0;
    decided = '0; explored = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NSN; k++) begin
      @(negedge clk);
      cfg_we = 1; cfg_idx = SN_W'(k);
      cfg_region = '{valid: 1'b1, x0: 3'((k % 2) * 4), y0: 3'((k / 2) * 2), w: 4'd4, h: 4'd2};
    end
    @(negedge clk); cfg_we = 0;
    for (int k = 0; k < NSN; k++)
      for (int a = 0; a < 499; a++) begin
        @(negedge clk);
        w_we = 1; w_sel = SN_W'(k); w_addr = 9'(a);
        w_data = (a >= 435 && (a - 435) % 16 == 0 && (a - 435) / 16 == k % 4) ? 16'sd256 : 16'sd0;
      end
    @(negedge clk); w_we = 0;
    traffic_on = 1;
    while (decided != '1 && cyc < 60000) @(negedge clk);
    check(decided == '1, "every subNoC decided");
    repeat (2000) @(negedge clk);
    for (int k = 0; k < NSN; k++)
      if (!explored[k]) check(cur_topo[k] == topo_e'(k % 4), $sformatf("subNoC %0d topology", k));
    traffic_on = 0;
    begin
      int t;
      t = 0;
      while ((pend_dst.size() > 0 || injected < next_tag - 1) && t < 5000) begin
        @(negedge clk); t++;
      end
    end
    check(pend_dst.size() == 0, "all delivered");
    check(express > 0, "express links used after the switch");
    $display("injected %0d delivered %0d explored %b", injected, delivered, explored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
