// tb_subnoc_sizes: the four topologies at four subNoC sizes.
//
// The 8x8 network is tiled with equal subNoCs of 2x4, 4x4, 4x8 and 8x8
// routers (rows x columns: 8, 4, 2 and 1 subNoCs). For every size the DQN
// output biases of all subNoCs are set so that the controllers choose mesh,
// then cmesh, torus and tree, one epoch after the other. Once a topology is
// running, a measurement window carries GPU-style traffic at low load: every
// node sends requests to the memory controller at its subNoC's north-west
// corner and to random nodes of its subNoC, and the memory controller
// returns replies to random nodes. The window's flits are timed from
// injection to ejection; the network then drains before the next topology.
//
// Checks: every flit arrives once at the right node; every subNoC runs the
// chosen topology during its window; and for 4x4, 4x8 and 8x8 subNoCs the
// average latency of cmesh, torus and tree is below that of mesh (each has
// fewer hops on average at low load: two-hop links, wrap-around links, and
// the root's long reply links). The latency table is printed.
// Parameters of the top are reduced only in the epoch length (3000 cycles)
// and exploration (off), so that the run is short and the choices are fixed.
module tb_subnoc_sizes;
  import adapt_pkg::*;
  localparam int EPOCH  = 3000;
  localparam int WINDOW = 1500;

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

  adapt_noc_top #(.EPOCH(EPOCH), .EPS(16'd0)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  // current tiling
  int sw = 4, sh = 2;
  function automatic int sn_of(input int n);
    return ((n / MESH_X) / sh) * (MESH_X / sw) + (n % MESH_X) / sw;
  endfunction
  function automatic int mc_of(input int k);
    int nx;
    nx = MESH_X / sw;
    return (k / nx) * sh * MESH_X + (k % nx) * sw;
  endfunction

  // ---------------- traffic ----------------
  flit_t  txq [NODES][$];
  int     pend_dst [int];
  int     t_inj [int];
  int     next_tag = 1;
  bit     traffic_on = 0;
  int     injected = 0, delivered = 0;
  longint lat_sum = 0;
  int     lat_n = 0;

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
      d = base + $urandom_range(0, sh - 1) * MESH_X + $urandom_range(0, sw - 1);
      if (n == base) begin
        if (txq[n].size() < 2 && $urandom_range(0, 99) < 20 && d != n)
          txq[n].push_back(make(n, d, 1'b1));
      end else if (txq[n].size() < 2 && $urandom_range(0, 99) < 1) begin
        txq[n].push_back(make(n, ($urandom_range(0, 1) == 0 || d == n) ? base : d, 1'b0));
      end
    end
  end

  always_comb
    for (int n = 0; n < NODES; n++) begin
      core_valid[n] = txq[n].size() > 0;
      core_flit[n]  = (txq[n].size() > 0) ? txq[n][0] : '0;
      core_evt[n]   = '0;
    end

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      if (core_valid[n] && core_ready[n]) begin
        t_inj[int'(txq[n][0].hdr.tag)] = cyc;
        void'(txq[n].pop_front());
        injected++;
      end
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
          lat_sum += longint'(cyc - t_inj[tag]);
          lat_n++;
          t_inj.delete(tag);
        end
      end
    end
  end

  // ---------------- configuration helpers ----------------
  task automatic wr_weight(input int k, input int a, input int v);
    @(negedge clk);
    w_we = 1; w_sel = SN_W'(k); w_addr = 9'(a); w_data = 16'(v);
    @(negedge clk);
    w_we = 0;
  endtask

  task automatic prefer(input int nsn, input topo_e t);
    for (int k = 0; k < nsn; k++)
      for (int j = 0; j < 4; j++) wr_weight(k, 435 + j * 16, (j == int'(t)) ? 256 : 0);
  endtask

  task automatic drain();
    int t;
    t = 0;
    while ((pend_dst.size() > 0 || injected < next_tag - 1) && t < 20000) begin
      @(negedge clk); t++;
    end
    check(pend_dst.size() == 0, $sformatf("drained (%0d missing)", pend_dst.size()));
  endtask

  int avg [4][4];   // [size][topology], in hundredths of a cycle

  initial begin
    int sizes_w [4] = '{4, 4, 8, 8};
    int sizes_h [4] = '{2, 4, 4, 8};
    cfg_we = 0; cfg_idx = '0; cfg_region = '0;
    w_we = 0; w_sel = '0; w_addr = '0; w_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < MAX_SUBNOC; k++)
      for (int a = 0; a < 499; a++) begin
        @(negedge clk);
        w_we = 1; w_sel = SN_W'(k); w_addr = 9'(a); w_data = '0;
      end
    @(negedge clk); w_we = 0;

    for (int s = 0; s < 4; s++) begin
      int nsn;
      sw = sizes_w[s]; sh = sizes_h[s];
      nsn = (MESH_X / sw) * (MESH_Y / sh);
      // allocate the subNoCs (network idle)
      for (int k = 0; k < MAX_SUBNOC; k++) begin
        @(negedge clk);
        cfg_we = 1; cfg_idx = SN_W'(k);
        cfg_region = '{valid: 1'(k < nsn),
                       x0: 3'((k % (MESH_X / sw)) * sw), y0: 3'((k / (MESH_X / sw)) * sh),
                       w: 4'(sw), h: 4'(sh)};
      end
      @(negedge clk); cfg_we = 0;
      for (int t = 0; t < 4; t++) begin
        int seen, ok;
        prefer(nsn, topo_e'(t));
        // wait for every subNoC's decision, then for the switch to finish
        seen = 0;
        while (seen < nsn) begin
          @(posedge clk);
          for (int k = 0; k < nsn; k++) if (rl_decision_evt[k]) seen++;
        end
        do begin
          @(posedge clk);
          ok = 1;
          for (int k = 0; k < nsn; k++)
            if (cur_topo[k] != topo_e'(t) || subnoc_hold[k]) ok = 0;
        end while (!ok);
        lat_sum = 0; lat_n = 0;
        traffic_on = 1;
        repeat (WINDOW) @(negedge clk);
        for (int k = 0; k < nsn; k++)
          check(cur_topo[k] == topo_e'(t), $sformatf("size %0d subNoC %0d runs topology %0d", s, k, t));
        traffic_on = 0;
        drain();
        check(lat_n > 100, "window traffic");
        avg[s][t] = int'(lat_sum * 100 / longint'(lat_n > 0 ? lat_n : 1));
        $display("size %0dx%0d topology %0d: %0d flits, average latency %0d.%02d cycles",
                 sh, sw, t, lat_n, avg[s][t] / 100, avg[s][t] % 100);
      end
      if (s > 0)
        for (int t = 1; t < 4; t++)
          check(avg[s][t] < avg[s][0],
                $sformatf("size %0dx%0d topology %0d faster than mesh", sh, sw, t));
    end
    $display("injected %0d delivered %0d", injected, delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (EPOCH * 24 + 60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
