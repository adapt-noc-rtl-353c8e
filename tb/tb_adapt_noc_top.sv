// tb_adapt_noc_top: end-to-end run of the 8x8 Adapt-NoC.
//
// Four 4x4 subNoCs carry random traffic: every node sends requests
// (virtual network 0) to nodes of its own subNoC, and the memory controller
// at each subNoC's north-west corner sends replies (virtual network 1).
// The DQN weights of each subNoC are written so that, epoch after epoch,
// its controller selects a scheduled topology (all weights zero, output
// biases favouring the wanted Q-value); the exploration rate is raised so
// that random exploration also happens. Every flit must arrive exactly once
// at the addressed node, and the network must drain at the end.
// An idle-network flit is timed first: 1 + 3 cycles per mesh hop.
// The run counts each mechanism and fails if one never happened: injection
// bypass, express (adaptable-link) hops, power gating, concentration
// (delivery through a powered-down node's concentrator), every topology
// reached by a switch, a kept topology, an explored action, injection hold
// during a switch and back-pressure at a core.
module tb_adapt_noc_top;
  import adapt_pkg::*;
  localparam int EPOCH  = 4000;
  localparam int EPOCHS = 9;
  localparam int NSN    = 4;

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

  adapt_noc_top #(.EPOCH(EPOCH), .EPS(16'd6000)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  // scheduled topology per subNoC and epoch
  topo_e sched [NSN][EPOCHS];
  initial begin
    topo_e s0 [EPOCHS] = '{TOPO_CMESH, TOPO_CMESH, TOPO_TORUS, TOPO_TREE, TOPO_MESH, TOPO_TORUS, TOPO_CMESH, TOPO_TREE, TOPO_MESH};
    for (int k = 0; k < NSN; k++)
      for (int e = 0; e < EPOCHS; e++) sched[k][e] = topo_e'((int'(s0[e]) + k) % 4);
  end

  // ---------------- traffic ----------------
  flit_t  txq [NODES][$];
  int     pend_dst [int];
  int     next_tag = 1;
  bit     traffic_on = 0;
  int     injected = 0, delivered = 0;
  int     m_bypass = 0, m_express = 0, m_gate = 0, m_conc = 0, m_keep = 0, m_explore = 0;
  int     m_hold = 0, m_backpressure = 0, m_decisions = 0;
  int     m_reach [4] = '{0, 0, 0, 0};
  topo_e  last_topo [MAX_SUBNOC];

  function automatic int sn_of(input int n);
    return (n / MESH_X) / 4 * 2 + (n % MESH_X) / 4;
  endfunction
  function automatic int mc_of(input int k);
    return (k / 2) * 4 * MESH_X + (k % 2) * 4;
  endfunction

  function automatic flit_t make(input int s, input int d, input bit vn);
    flit_t f;
    f = '0;
    f.hdr.src = NODE_W'(s); f.hdr.dst = NODE_W'(d); f.hdr.vnet = vn;
    f.hdr.is_data = vn; f.hdr.tag = 16'(next_tag);
    f.payload = {$urandom, $urandom, $urandom};
    pend_dst[next_tag] = d;
    next_tag = (next_tag == 65535) ? 1 : next_tag + 1;
    return f;
  endfunction

  always @(negedge clk) if (rst_n && traffic_on) begin
    for (int n = 0; n < NODES; n++) begin
      int k, base, d;
      k = sn_of(n);
      base = mc_of(k);
      if (txq[n].size() < 4 && $urandom_range(0, 99) < 6) begin
        d = base + $urandom_range(0, 3) * MESH_X + $urandom_range(0, 3);
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
      if (core_valid[n] && !core_ready[n]) m_backpressure++;
      if (ej_valid[n]) begin
        int tag;
        tag = int'(ej_flit[n].hdr.tag);
        checks++;
        if (!pend_dst.exists(tag) || pend_dst[tag] != n || int'(ej_flit[n].hdr.dst) != n) begin
          failures++;
          $display("FAIL delivery of tag %0d at node %0d", tag, n);
        end else begin
          pend_dst.delete(tag);
          delivered++;
        end
        if (!router_powered[n]) m_conc++;
      end
      if (bypass_evt[n])  m_bypass++;
      if (express_evt[n]) m_express++;
      if (gate_evt[n])    m_gate++;
    end
    for (int k = 0; k < MAX_SUBNOC; k++) begin
      if (topo_keep_evt[k])   m_keep++;
      if (rl_explore_evt[k])  m_explore++;
      if (rl_decision_evt[k]) m_decisions++;
      if (subnoc_hold[k])     m_hold++;
      if (cur_topo[k] != last_topo[k]) m_reach[cur_topo[k]]++;
      last_topo[k] = cur_topo[k];
    end
  end

  // ---------------- configuration helpers ----------------
  task automatic wr_weight(input int k, input int a, input int v);
    @(negedge clk);
    w_we = 1; w_sel = SN_W'(k); w_addr = 9'(a); w_data = 16'(v);
    @(negedge clk);
    w_we = 0;
  endtask

  task automatic prefer(input int k, input topo_e t);
    for (int j = 0; j < 4; j++) wr_weight(k, 435 + j * 16, (j == int'(t)) ? 256 : 0);
  endtask

  initial begin
    cfg_we = 0; cfg_idx = '0; cfg_region = '0;
    w_we = 0; w_sel = '0; w_addr = '0; w_data = '0;
    for (int k = 0; k < MAX_SUBNOC; k++) last_topo[k] = TOPO_MESH;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // subNoC allocation: four 4x4 regions
    for (int k = 0; k < NSN; k++) begin
      @(negedge clk);
      cfg_we = 1; cfg_idx = SN_W'(k);
      cfg_region = '{valid: 1'b1, x0: 3'((k % 2) * 4), y0: 3'((k / 2) * 4), w: 4'd4, h: 4'd4};
    end
    @(negedge clk); cfg_we = 0;
    // clear all weights
    for (int k = 0; k < NSN; k++)
      for (int a = 0; a < 499; a++) begin
        @(negedge clk);
        w_we = 1; w_sel = SN_W'(k); w_addr = 9'(a); w_data = '0;
      end
    @(negedge clk); w_we = 0;
    repeat (20) @(negedge clk);

    // idle-network latency: node 0 -> node 3 is 3 mesh hops
    begin
      int t0;
      txq[0].push_back(make(0, 3, 1'b0));
      @(posedge clk); t0 = cyc;
      while (!ej_valid[3] && cyc - t0 < 100) @(posedge clk);
      check(cyc - t0 == 1 + 3 * 3, $sformatf("idle 3-hop latency %0d", cyc - t0));
      @(posedge clk);
    end

    for (int k = 0; k < NSN; k++) prefer(k, sched[k][0]);
    traffic_on = 1;
    for (int e = 0; e < EPOCHS; e++) begin
      // wait for the decisions of this epoch, then set up the next preference
      int seen;
      seen = 0;
      while (seen < NSN) begin
        @(posedge clk);
        for (int k = 0; k < NSN; k++) if (rl_decision_evt[k]) seen++;
      end
      repeat (5) @(negedge clk);
      if (e + 1 < EPOCHS) for (int k = 0; k < NSN; k++) prefer(k, sched[k][e + 1]);
    end
    // let the last switches finish, then drain
    repeat (EPOCH / 2) @(negedge clk);
    traffic_on = 0;
    begin
      int t;
      t = 0;
      while ((pend_dst.size() > 0 || injected < next_tag - 1) && t < 20000) begin
        @(negedge clk); t++;
      end
    end
    check(pend_dst.size() == 0, $sformatf("all delivered (%0d missing)", pend_dst.size()));
    $display("injected %0d delivered %0d", injected, delivered);
    $display("bypass %0d express %0d gate %0d conc %0d keep %0d explore %0d hold %0d backpressure %0d decisions %0d",
             m_bypass, m_express, m_gate, m_conc, m_keep, m_explore, m_hold, m_backpressure, m_decisions);
    $display("reached mesh %0d cmesh %0d torus %0d tree %0d", m_reach[0], m_reach[1], m_reach[2], m_reach[3]);
    check(delivered > 1000, "traffic delivered");
    check(m_bypass > 0, "injection bypass");
    check(m_express > 0, "express hops");
    check(m_gate > 0, "power gating");
    check(m_conc > 0, "concentration");
    for (int t = 0; t < 4; t++) check(m_reach[t] > 0, $sformatf("topology %0d reached", t));
    check(m_keep > 0, "topology kept");
    check(m_explore > 0, "exploration");
    check(m_hold > 0, "injection hold");
    check(m_backpressure > 0, "back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (EPOCH * (EPOCHS + 4) + 30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
