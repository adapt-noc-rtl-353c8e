// topology_config: turns the subNoC map into router, link and routing-table
// settings (the link controller and routing-table source of Adapt-NoC).
//
// Input: up to MAX_SUBNOC rectangular subNoCs (x0, y0, width, height) and the
// topology each one runs. A router belongs to the lowest-numbered subNoC that
// covers it; a router in no subNoC works as plain mesh. Output, purely
// combinational:
//   * which routers are powered (cmesh powers down all but the north-west
//     router of each 2x2 block),
//   * per port, the input-mux select and which adaptable channel/direction
//     the port listens to or drives,
//   * per row and column, for both adaptable channels, the repeater enables
//     and directions (segmentation and reversal),
//   * the routing table of every router: for each destination node and
//     virtual network an output port and mesh-or-express choice,
//   * the cores each router's concentration mux serves.
// Routing is dimension ordered (x first, then y) in every topology, so
// cmesh, torus and tree only add or remove paths relative to the mesh.
//
// Topologies, for a subNoC with columns x0..xe and rows y0..ye:
//   mesh   mesh links only.
//   cmesh  routers at even offsets concentrate their 2x2 block; neighbouring
//          concentrators are joined by two-hop adaptable links, channel 0
//          carrying east/south, channel 1 west/north.
//   torus  wrap-around links: channel 0 from the west port of x0 to the east
//          port of xe, channel 1 back; likewise in columns. Packets take the
//          shorter way round; the router's dateline VC rule keeps it
//          deadlock free. Needs at least 3 routers in that dimension.
//   tree   reply traffic (virtual network 1) from the memory controller at
//          (x0,y0): channel 0 of row y0 links x0 straight to xe, and channel
//          0 of every column links row y0 straight to row ye, so the far
//          half of the subNoC is reached within two hops of the root. The
//          link is used only when it is strictly shorter. Requests use the
//          mesh routes.
// The use of outward-facing edge ports as express endpoints, the placement of
// the tree's links and the cmesh concentrator positions are this
// implementation's reading of the topologies; the four topologies, the mux
// and link mechanisms and dimension-ordered routing follow the design.
// Subnocs must start at even coordinates and have even sizes for cmesh.
module topology_config
  import adapt_pkg::*;
(
  input  region_t  regions   [MAX_SUBNOC],
  input  topo_e    topo      [MAX_SUBNOC],

  output logic     router_on [NODES],
  output portcfg_t pcfg      [NODES][NUM_PORTS],
  output logic [NUM_PORTS-1:0] port_use [NODES],
  output logic [MESH_X-2:0] row_rep_on [MESH_Y][2],
  output logic [MESH_X-2:0] row_dir    [MESH_Y][2],
  output logic [MESH_Y-2:0] col_rep_on [MESH_X][2],
  output logic [MESH_Y-2:0] col_dir    [MESH_X][2],
  output rte_t     rtable    [NODES][NODES][NUM_VNET],
  output logic [3:0] core_en [NODES],
  output logic [MAX_SUBNOC-1:0] member [NODES]
);

  function automatic int owner(input region_t r [MAX_SUBNOC], input int x, input int y);
    for (int k = 0; k < MAX_SUBNOC; k++)
      if (r[k].valid && x >= int'(r[k].x0) && x < int'(r[k].x0) + int'(r[k].w) &&
          y >= int'(r[k].y0) && y < int'(r[k].y0) + int'(r[k].h))
        return k;
    return -1;
  endfunction

  function automatic rte_t mk(input port_e p, input logic e);
    rte_t r;
    r.port = p;
    r.express = e;
    return r;
  endfunction

  // One routing decision at router (cx,cy) for destination node (dx,dy).
  function automatic rte_t route(input region_t rg, input topo_e tp, input logic own,
                                 input int cx, input int cy, input int dx, input int dy,
                                 input logic vnet);
    int x0, y0, w, h, xe, ye, ex, ey, fwd;
    x0 = int'(rg.x0); y0 = int'(rg.y0); w = int'(rg.w); h = int'(rg.h);
    xe = x0 + w - 1;  ye = y0 + h - 1;
    ex = dx; ey = dy;
    if (!own || dx < x0 || dx > xe || dy < y0 || dy > ye) tp = TOPO_MESH;
    if (tp == TOPO_CMESH) begin
      ex = x0 + ((dx - x0) & ~1);
      ey = y0 + ((dy - y0) & ~1);
    end
    if (cx != ex) begin
      case (tp)
        TOPO_CMESH: return mk(ex > cx ? P_E : P_W, 1'b1);
        TOPO_TORUS: if (w >= 3) begin
          fwd = (ex - cx + w) % w;
          if (fwd <= w - fwd) return mk(P_E, cx == xe);
          else                return mk(P_W, cx == x0);
        end
        TOPO_TREE: if (vnet && w >= 3 && cy == y0 && cx == x0 &&
                       1 + (xe - ex) < ex - cx)
          return mk(P_W, 1'b1);
        default: ;
      endcase
      return mk(ex > cx ? P_E : P_W, 1'b0);
    end
    if (cy != ey) begin
      case (tp)
        TOPO_CMESH: return mk(ey > cy ? P_S : P_N, 1'b1);
        TOPO_TORUS: if (h >= 3) begin
          fwd = (ey - cy + h) % h;
          if (fwd <= h - fwd) return mk(P_S, cy == ye);
          else                return mk(P_N, cy == y0);
        end
        TOPO_TREE: if (vnet && h >= 3 && cy == y0 && 1 + (ye - ey) < ey - cy)
          return mk(P_N, 1'b1);
        default: ;
      endcase
      return mk(ey > cy ? P_S : P_N, 1'b0);
    end
    return mk(P_LOCAL, 1'b0);
  endfunction

  function automatic portcfg_t pc_out(input portcfg_t c, input logic ch, input logic d);
    c.out_exp = 1'b1; c.out_ch = ch; c.out_dir = d;
    return c;
  endfunction
  function automatic portcfg_t pc_in(input portcfg_t c, input logic ch, input logic d);
    c.in_exp = 1'b1; c.in_ch = ch; c.in_dir = d;
    return c;
  endfunction

  int own [NODES];

  always_comb begin
    for (int n = 0; n < NODES; n++) begin
      own[n] = owner(regions, n % MESH_X, n / MESH_X);
      router_on[n] = 1'b1;
      core_en[n] = 4'b0001 << ((n % MESH_X) % 2 + 2 * ((n / MESH_X) % 2));
      for (int k = 0; k < MAX_SUBNOC; k++) member[n][k] = (own[n] == k);
      for (int p = 0; p < NUM_PORTS; p++) pcfg[n][p] = '0;
    end
    for (int y = 0; y < MESH_Y; y++)
      for (int c = 0; c < 2; c++) begin
        row_rep_on[y][c] = '0;
        row_dir[y][c]    = '0;
      end
    for (int x = 0; x < MESH_X; x++)
      for (int c = 0; c < 2; c++) begin
        col_rep_on[x][c] = '0;
        col_dir[x][c]    = '0;
      end

    // ---- link controller: adaptable channels and port muxes ----
    for (int k = 0; k < MAX_SUBNOC; k++) begin
      int x0, y0, xe, ye;
      x0 = int'(regions[k].x0); y0 = int'(regions[k].y0);
      xe = x0 + int'(regions[k].w) - 1; ye = y0 + int'(regions[k].h) - 1;
      if (regions[k].valid && xe < MESH_X && ye < MESH_Y) begin
        case (topo[k])
          TOPO_TORUS: begin
            if (xe - x0 >= 2)
              for (int y = y0; y <= ye; y++) if (own[y*MESH_X+x0] == k) begin
                for (int s = x0; s < xe; s++) begin
                  row_rep_on[y][0][s] = 1'b1; row_dir[y][0][s] = 1'b0;
                  row_rep_on[y][1][s] = 1'b1; row_dir[y][1][s] = 1'b1;
                end
                pcfg[y*MESH_X+x0][P_W] = pc_out(pcfg[y*MESH_X+x0][P_W], 1'b0, 1'b0);
                pcfg[y*MESH_X+xe][P_E] = pc_in (pcfg[y*MESH_X+xe][P_E], 1'b0, 1'b0);
                pcfg[y*MESH_X+xe][P_E] = pc_out(pcfg[y*MESH_X+xe][P_E], 1'b1, 1'b1);
                pcfg[y*MESH_X+x0][P_W] = pc_in (pcfg[y*MESH_X+x0][P_W], 1'b1, 1'b1);
              end
            if (ye - y0 >= 2)
              for (int x = x0; x <= xe; x++) if (own[y0*MESH_X+x] == k) begin
                for (int s = y0; s < ye; s++) begin
                  col_rep_on[x][0][s] = 1'b1; col_dir[x][0][s] = 1'b0;
                  col_rep_on[x][1][s] = 1'b1; col_dir[x][1][s] = 1'b1;
                end
                pcfg[y0*MESH_X+x][P_N] = pc_out(pcfg[y0*MESH_X+x][P_N], 1'b0, 1'b0);
                pcfg[ye*MESH_X+x][P_S] = pc_in (pcfg[ye*MESH_X+x][P_S], 1'b0, 1'b0);
                pcfg[ye*MESH_X+x][P_S] = pc_out(pcfg[ye*MESH_X+x][P_S], 1'b1, 1'b1);
                pcfg[y0*MESH_X+x][P_N] = pc_in (pcfg[y0*MESH_X+x][P_N], 1'b1, 1'b1);
              end
          end
          TOPO_CMESH: begin
            for (int y = y0; y <= ye; y++)
              for (int x = x0; x <= xe; x++)
                if (own[y*MESH_X+x] == k) begin
                  if (((x - x0) % 2) != 0 || ((y - y0) % 2) != 0) begin
                    router_on[y*MESH_X+x] = 1'b0;
                    core_en[y*MESH_X+x]   = '0;
                  end else begin
                    core_en[y*MESH_X+x] = 4'b1111;
                    if (x + 2 <= xe) begin
                      for (int s = x; s < x + 2; s++) begin
                        row_rep_on[y][0][s] = 1'b1; row_dir[y][0][s] = 1'b0;
                        row_rep_on[y][1][s] = 1'b1; row_dir[y][1][s] = 1'b1;
                      end
                      pcfg[y*MESH_X+x][P_E]   = pc_out(pcfg[y*MESH_X+x][P_E], 1'b0, 1'b0);
                      pcfg[y*MESH_X+x+2][P_W] = pc_in (pcfg[y*MESH_X+x+2][P_W], 1'b0, 1'b0);
                      pcfg[y*MESH_X+x+2][P_W] = pc_out(pcfg[y*MESH_X+x+2][P_W], 1'b1, 1'b1);
                      pcfg[y*MESH_X+x][P_E]   = pc_in (pcfg[y*MESH_X+x][P_E], 1'b1, 1'b1);
                    end
                    if (y + 2 <= ye) begin
                      for (int s = y; s < y + 2; s++) begin
                        col_rep_on[x][0][s] = 1'b1; col_dir[x][0][s] = 1'b0;
                        col_rep_on[x][1][s] = 1'b1; col_dir[x][1][s] = 1'b1;
                      end
                      pcfg[y*MESH_X+x][P_S]     = pc_out(pcfg[y*MESH_X+x][P_S], 1'b0, 1'b0);
                      pcfg[(y+2)*MESH_X+x][P_N] = pc_in (pcfg[(y+2)*MESH_X+x][P_N], 1'b0, 1'b0);
                      pcfg[(y+2)*MESH_X+x][P_N] = pc_out(pcfg[(y+2)*MESH_X+x][P_N], 1'b1, 1'b1);
                      pcfg[y*MESH_X+x][P_S]     = pc_in (pcfg[y*MESH_X+x][P_S], 1'b1, 1'b1);
                    end
                  end
                end
          end
          TOPO_TREE: begin
            if (xe - x0 >= 2 && own[y0*MESH_X+x0] == k) begin
              for (int s = x0; s < xe; s++) begin
                row_rep_on[y0][0][s] = 1'b1; row_dir[y0][0][s] = 1'b0;
              end
              pcfg[y0*MESH_X+x0][P_W] = pc_out(pcfg[y0*MESH_X+x0][P_W], 1'b0, 1'b0);
              pcfg[y0*MESH_X+xe][P_E] = pc_in (pcfg[y0*MESH_X+xe][P_E], 1'b0, 1'b0);
            end
            if (ye - y0 >= 2)
              for (int x = x0; x <= xe; x++) if (own[y0*MESH_X+x] == k) begin
                for (int s = y0; s < ye; s++) begin
                  col_rep_on[x][0][s] = 1'b1; col_dir[x][0][s] = 1'b0;
                end
                pcfg[y0*MESH_X+x][P_N] = pc_out(pcfg[y0*MESH_X+x][P_N], 1'b0, 1'b0);
                pcfg[ye*MESH_X+x][P_S] = pc_in (pcfg[ye*MESH_X+x][P_S], 1'b0, 1'b0);
              end
          end
          default: ;
        endcase
      end
    end

    // ---- ports in use (for the power-gating controller) ----
    for (int n = 0; n < NODES; n++) begin
      int x, y;
      x = n % MESH_X; y = n / MESH_X;
      port_use[n][P_LOCAL] = router_on[n];
      port_use[n][P_E] = router_on[n] && (pcfg[n][P_E].in_exp || pcfg[n][P_E].out_exp ||
                         (x + 1 < MESH_X && router_on[(n + 1) % NODES]));
      port_use[n][P_W] = router_on[n] && (pcfg[n][P_W].in_exp || pcfg[n][P_W].out_exp ||
                         (x > 0 && router_on[(n + NODES - 1) % NODES]));
      port_use[n][P_N] = router_on[n] && (pcfg[n][P_N].in_exp || pcfg[n][P_N].out_exp ||
                         (y > 0 && router_on[(n + NODES - MESH_X) % NODES]));
      port_use[n][P_S] = router_on[n] && (pcfg[n][P_S].in_exp || pcfg[n][P_S].out_exp ||
                         (y + 1 < MESH_Y && router_on[(n + MESH_X) % NODES]));
    end

    // ---- routing tables ----
    for (int n = 0; n < NODES; n++)
      for (int d = 0; d < NODES; d++)
        for (int v = 0; v < NUM_VNET; v++)
          rtable[n][d][v] = route(regions[own[n] < 0 ? 0 : own[n]],
                                  topo[own[n] < 0 ? 0 : own[n]], own[n] >= 0,
                                  n % MESH_X, n / MESH_X, d % MESH_X, d / MESH_X, v[0]);
  end
endmodule
