// tb_topology_config: for several subNoC maps it follows every packet
// through the generated routing tables and links: a mesh hop goes to the
// neighbour, an express hop travels along the adaptable channel the port
// drives until the router whose port listens to it. Every source/destination
// pair must arrive at the router that serves the destination, only through
// powered routers, with the expected largest hop count of each topology
// (4x4 subNoC: mesh 6, torus 4, cmesh 2 between concentrators, tree replies
// from the root 2).
module tb_topology_config;
  import adapt_pkg::*;
  region_t regions [MAX_SUBNOC];
  topo_e   topo    [MAX_SUBNOC];
  logic     router_on [NODES];
  portcfg_t pcfg [NODES][NUM_PORTS];
  logic [NUM_PORTS-1:0] port_use [NODES];
  logic [MESH_X-2:0] row_rep_on [MESH_Y][2];
  logic [MESH_X-2:0] row_dir    [MESH_Y][2];
  logic [MESH_Y-2:0] col_rep_on [MESH_X][2];
  logic [MESH_Y-2:0] col_dir    [MESH_X][2];
  rte_t rtable [NODES][NODES][NUM_VNET];
  logic [3:0] core_en [NODES];
  logic [MAX_SUBNOC-1:0] member [NODES];
  int checks = 0, failures = 0;

  topology_config dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // follow an express link leaving router n through port p; -1 if broken
  function automatic int follow(input int n, input int p);
    int x, y, pos, line_len, c, d;
    bit row;
    portcfg_t pc;
    pc = pcfg[n][p];
    if (!pc.out_exp) return -1;
    x = n % MESH_X; y = n / MESH_X;
    row = (p == 1 || p == 2);
    pos = row ? x : y;
    c = int'(pc.out_ch); d = int'(pc.out_dir);
    forever begin
      int nxt, m;
      logic on, dr;
      if (d == 0) begin
        if (pos == 7) return -1;
        on = row ? row_rep_on[y][c][pos] : col_rep_on[x][c][pos];
        dr = row ? row_dir[y][c][pos]    : col_dir[x][c][pos];
        nxt = pos + 1;
      end else begin
        if (pos == 0) return -1;
        on = row ? row_rep_on[y][c][pos-1] : col_rep_on[x][c][pos-1];
        dr = row ? row_dir[y][c][pos-1]    : col_dir[x][c][pos-1];
        nxt = pos - 1;
      end
      if (!on || dr != d[0]) return -1;
      pos = nxt;
      m = row ? y * MESH_X + pos : pos * MESH_X + x;
      for (int q = 1; q < NUM_PORTS; q++)
        if (((q <= 2) == row) && pcfg[m][q].in_exp && int'(pcfg[m][q].in_ch) == c &&
            int'(pcfg[m][q].in_dir) == d)
          return m;
    end
  endfunction

  function automatic int serving(input int d);
    int bx, by;
    if (core_en[d][(d % MESH_X) % 2 + 2 * ((d / MESH_X) % 2)]) return d;
    bx = (d % MESH_X) & ~1; by = (d / MESH_X) & ~1;
    for (int k = 0; k < 4; k++) begin
      int r;
      r = (by + k / 2) * MESH_X + bx + k % 2;
      if (core_en[r][(d % MESH_X) % 2 + 2 * ((d / MESH_X) % 2)]) return r;
    end
    return -1;
  endfunction

  // walk one packet; returns hop count or -1
  function automatic int walk(input int s, input int d, input int vn);
    int cur, hops, target;
    target = serving(d);
    cur = s; hops = 0;
    while (hops < 30) begin
      rte_t e;
      int p, nx;
      if (!router_on[cur]) return -1;
      e = rtable[cur][d][vn];
      p = int'(e.port);
      if (p == 0) return (cur == target) ? hops : -1;
      if (!port_use[cur][p]) return -1;
      if (e.express) nx = follow(cur, p);
      else begin
        case (p)
          1: nx = (cur % MESH_X < MESH_X - 1) ? cur + 1 : -1;
          2: nx = (cur % MESH_X > 0) ? cur - 1 : -1;
          3: nx = (cur >= MESH_X) ? cur - MESH_X : -1;
          default: nx = (cur < NODES - MESH_X) ? cur + MESH_X : -1;
        endcase
        if (nx >= 0 && pcfg[nx][(p == 1) ? 2 : (p == 2) ? 1 : (p == 3) ? 4 : 3].in_exp) nx = -1;
      end
      if (nx < 0) return -1;
      cur = nx; hops++;
    end
    return -1;
  endfunction

  task automatic all_pairs(input int k, input int max_hops, input string name);
    int worst;
    worst = 0;
    for (int s = 0; s < NODES; s++) if (member[s][k] && router_on[s])
      for (int d = 0; d < NODES; d++) if (member[d][k])
        for (int v = 0; v < 2; v++) begin
          int h;
          h = walk(s, d, v);
          checks++;
          if (h < 0) begin failures++; $display("FAIL %s: %0d -> %0d vnet %0d undeliverable", name, s, d, v); end
          if (h > worst) worst = h;
        end
    check(worst == max_hops, $sformatf("%s worst hops %0d expected %0d", name, worst, max_hops));
  endtask

  initial begin
    for (int k = 0; k < MAX_SUBNOC; k++) begin regions[k] = '0; topo[k] = TOPO_MESH; end
    // four 4x4 subNoCs
    regions[0] = '{valid: 1, x0: 0, y0: 0, w: 4, h: 4};
    regions[1] = '{valid: 1, x0: 4, y0: 0, w: 4, h: 4};
    regions[2] = '{valid: 1, x0: 0, y0: 4, w: 4, h: 4};
    regions[3] = '{valid: 1, x0: 4, y0: 4, w: 4, h: 4};
    topo[0] = TOPO_MESH; topo[1] = TOPO_TORUS; topo[2] = TOPO_CMESH; topo[3] = TOPO_TREE;
    #1;
    all_pairs(0, 6, "mesh");
    all_pairs(1, 4, "torus");
    all_pairs(3, 6, "tree");
    // cmesh: between concentrators at most 2 hops
    begin
      int worst;
      worst = 0;
      for (int s = 0; s < NODES; s++) if (member[s][2] && router_on[s])
        for (int d = 0; d < NODES; d++) if (member[d][2]) begin
          int h;
          h = walk(s, d, 0);
          checks++;
          if (h < 0) begin failures++; $display("FAIL cmesh %0d -> %0d", s, d); end
          if (h > worst) worst = h;
        end
      check(worst == 2, "cmesh diameter 2");
    end
    // cmesh powers down three of four routers and concentrates their cores
    begin
      int on;
      on = 0;
      for (int n = 0; n < NODES; n++) if (member[n][2] && router_on[n]) on++;
      check(on == 4, "cmesh concentrators");
      check(core_en[4*8+0] == 4'hF && core_en[4*8+1] == 4'h0, "concentration");
    end
    // tree: reply from the root reaches everything within two hops
    begin
      int worst, root;
      root = 0 * 8 + 4;
      worst = 0;
      for (int d = 0; d < NODES; d++) if (member[d][3]) begin
        int h;
        h = walk(4*8+4, d, 1);
        if (h > worst) worst = h;
      end
      check(worst <= 4, "tree reply depth");
      check(walk(4*8+4, 7*8+7, 1) == 2, "tree root to far corner in 2 hops");
      check(walk(4*8+4, 7*8+7, 0) == 6, "tree requests use mesh");
      check(root == 4, "root index");
    end
    // link reversal: torus row 0 of subNoC 1 uses both channels in opposite directions
    check(row_rep_on[0][0][6:4] == 3'b111 && row_dir[0][0][6:4] == 3'b000 &&
          row_rep_on[0][1][6:4] == 3'b111 && row_dir[0][1][6:4] == 3'b111, "torus channels");
    check(row_rep_on[0][0][3] == 1'b0, "segment cut at subNoC boundary");

    // 2x4 subNoCs, all eight, with mixed topologies
    for (int k = 0; k < MAX_SUBNOC; k++) begin
      regions[k] = '{valid: 1, x0: 3'((k % 2) * 4), y0: 3'((k / 2) * 2), w: 4, h: 2};
      topo[k] = topo_e'(k % 4);
    end
    #1;
    all_pairs(0, 4, "2x4 mesh");
    all_pairs(2, 3, "2x4 torus");
    all_pairs(3, 4, "2x4 tree");
    // one 8x8 torus
    for (int k = 0; k < MAX_SUBNOC; k++) regions[k] = '0;
    regions[0] = '{valid: 1, x0: 0, y0: 0, w: 8, h: 8};
    topo[0] = TOPO_TORUS;
    #1;
    all_pairs(0, 8, "8x8 torus");
    topo[0] = TOPO_MESH;
    #1;
    all_pairs(0, 14, "8x8 mesh");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
