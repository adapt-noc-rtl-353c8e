// adapt_noc_top: an 8x8 Adapt-NoC, a mesh whose regions (subNoCs) can each
// run their own topology: mesh, concentrated mesh, torus or tree.
//
// Contents:
//   * 64 adaptable routers with registered mesh links (one-cycle link
//     latency) between neighbours; a router takes two cycles, so a mesh hop
//     takes three.
//   * Per row and per column, two adaptable channels (one bidirectional
//     adaptable link), each with a data path and an opposite-going credit
//     path, also registered at the receiving router.
//   * A concentration mux at every router's local port; every core's flit
//     is offered to all four routers of its 2x2 block, and the one that
//     currently serves the core takes it.
//   * A power-gating controller per router.
//   * topology_config, which derives every link, port, power and
//     routing-table setting from the subNoC map and the topology each subNoC
//     currently runs.
//   * Per subNoC slot (eight, one per 2x4 block of the NoC): a state monitor,
//     a DQN controller and a reconfiguration controller. At the end of each
//     epoch the monitor normalises the epoch's statistics, the DQN picks a
//     topology and, if it differs, the reconfiguration controller switches
//     the subNoC to it.
//
// Interface: system software allocates subNoCs through cfg_we/cfg_idx/
// cfg_region (slot k then restarts as a mesh) and loads the off-line trained
// DQN weights through w_we/w_sel/w_addr/w_data. Each node (core or memory
// controller) injects with core_valid/core_flit/core_ready and receives
// flits on ej_valid/ej_flit (never back-pressured); core_evt carries its
// per-cycle L1D, L1I and L2 miss and retired-instruction events. The other
// outputs expose the current topologies and per-cycle event flags.
// Subnoc slots should only be rewritten while no traffic crosses them.
module adapt_noc_top
  import adapt_pkg::*;
#(
  parameter int          EPOCH = 50000,
  parameter int          TS    = 14,
  parameter logic [15:0] EPS   = 16'd3277
) (
  input  logic              clk,
  input  logic              rst_n,

  input  logic              cfg_we,
  input  logic [SN_W-1:0]   cfg_idx,
  input  region_t           cfg_region,

  input  logic              w_we,
  input  logic [SN_W-1:0]   w_sel,
  input  logic [8:0]        w_addr,
  input  logic signed [15:0] w_data,

  input  logic [NODES-1:0]  core_valid,
  input  flit_t             core_flit [NODES],
  output logic [NODES-1:0]  core_ready,
  output logic [NODES-1:0]  ej_valid,
  output flit_t             ej_flit   [NODES],
  input  logic [3:0]        core_evt  [NODES],

  output topo_e             cur_topo  [MAX_SUBNOC],
  output logic [MAX_SUBNOC-1:0] topo_switch_evt,
  output logic [MAX_SUBNOC-1:0] topo_keep_evt,
  output logic [MAX_SUBNOC-1:0] rl_decision_evt,
  output logic [MAX_SUBNOC-1:0] rl_explore_evt,
  output logic [MAX_SUBNOC-1:0] subnoc_hold,
  output logic [NODES-1:0]  router_powered,
  output logic [NODES-1:0]  bypass_evt,
  output logic [NODES-1:0]  express_evt,
  output logic [NODES-1:0]  gate_evt
);
  // ---------------- subNoC map ----------------
  region_t regions [MAX_SUBNOC];
  logic    tbl_load_all;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < MAX_SUBNOC; k++) regions[k] <= '0;
      tbl_load_all <= 1'b1;
    end else begin
      tbl_load_all <= cfg_we;
      if (cfg_we) regions[cfg_idx] <= cfg_region;
    end
  end

  // ---------------- topology configuration ----------------
  logic     router_on [NODES];
  portcfg_t pcfg      [NODES][NUM_PORTS];
  logic [NUM_PORTS-1:0] port_use [NODES];
  logic [MESH_X-2:0] row_rep_on [MESH_Y][2];
  logic [MESH_X-2:0] row_dir    [MESH_Y][2];
  logic [MESH_Y-2:0] col_rep_on [MESH_X][2];
  logic [MESH_Y-2:0] col_dir    [MESH_X][2];
  rte_t     rtable    [NODES][NODES][NUM_VNET];
  logic [3:0] core_en [NODES];
  logic [MAX_SUBNOC-1:0] member [NODES];

  topology_config u_tcfg (
    .regions, .topo(cur_topo), .router_on, .pcfg, .port_use,
    .row_rep_on, .row_dir, .col_rep_on, .col_dir, .rtable, .core_en, .member
  );

  // ---------------- per-subNoC control ----------------
  logic [MAX_SUBNOC-1:0] sn_table_load, sn_table_busy, sn_idle;
  logic [NODES-1:0]      inj_coh, inj_data;
  logic [7:0]            occ_total [NODES];
  logic [3:0]            occ_local [NODES];
  logic [2:0]            flits_sw  [NODES];
  logic [NODES-1:0]      node_idle;

  for (genvar k = 0; k < MAX_SUBNOC; k++) begin : g_sn
    logic        epoch_end, state_valid, act_valid, explored;
    logic [1:0]  act;
    logic [15:0] svec [12];
    logic signed [15:0] qv [4];
    logic [NODES-1:0] mem_k;

    always_comb begin
      for (int n = 0; n < NODES; n++) mem_k[n] = member[n][k];
      sn_idle[k] = ((mem_k & ~node_idle) == '0);
    end

    reconfig_controller #(.EPOCH(EPOCH), .TS(TS)) u_rc (
      .clk, .rst_n,
      .enable      (regions[k].valid),
      .w           (regions[k].w),
      .h           (regions[k].h),
      .sw_load     (cfg_we && cfg_idx == SN_W'(k)),
      .action_valid(act_valid),
      .action      (topo_e'(act)),
      .region_idle (sn_idle[k]),
      .epoch_end,
      .cur_topo    (cur_topo[k]),
      .hold        (subnoc_hold[k]),
      .table_load  (sn_table_load[k]),
      .table_busy  (sn_table_busy[k]),
      .switch_evt  (topo_switch_evt[k]),
      .keep_evt    (topo_keep_evt[k])
    );

    state_monitor #(.EPOCH(EPOCH)) u_sm (
      .clk, .rst_n, .epoch_end,
      .member(mem_k), .core_evt, .inj_coh, .inj_data,
      .occ_total, .occ_local, .flits_sw(flits_sw),
      .cur_topo(cur_topo[k]), .w(regions[k].w), .h(regions[k].h),
      .state_vec(svec), .state_valid
    );

    dqn_controller #(.EPS(EPS)) u_dqn (
      .clk, .rst_n,
      .w_we  (w_we && w_sel == SN_W'(k)),
      .w_addr, .w_data,
      .start (state_valid),
      .state_vec(svec),
      .busy  (),
      .action_valid(act_valid),
      .action(act),
      .explored,
      .q_out (qv)
    );

    assign rl_decision_evt[k] = act_valid;
    assign rl_explore_evt[k]  = act_valid && explored;
  end

  // ---------------- routers and their surroundings ----------------
  link_t   out_mesh [NODES][NUM_PORTS];
  link_t   out_exp  [NODES][NUM_PORTS];
  credit_t cr_out_mesh [NODES][NUM_PORTS];
  credit_t cr_out_exp  [NODES][NUM_PORTS];
  link_t   in_mesh_q [NODES][NUM_PORTS];
  link_t   in_exp_q  [NODES][NUM_PORTS];
  credit_t cr_in_mesh_q [NODES][NUM_PORTS];
  credit_t cr_in_exp_q  [NODES][NUM_PORTS];
  link_t   in_exp_d  [NODES][NUM_PORTS];
  credit_t cr_in_exp_d [NODES][NUM_PORTS];
  link_t   inj       [NODES];

  logic [3:0] cm_ready [NODES];
  logic [3:0] cm_ej    [NODES];
  flit_t      cm_ejf   [NODES];

  function automatic int nb(input int n, input int p);
    int x, y;
    x = n % MESH_X; y = n / MESH_X;
    case (p)
      1: return (x + 1 < MESH_X) ? n + 1 : -1;
      2: return (x > 0) ? n - 1 : -1;
      3: return (y > 0) ? n - MESH_X : -1;
      4: return (y + 1 < MESH_Y) ? n + MESH_X : -1;
      default: return -1;
    endcase
  endfunction

  function automatic int opp(input int p);
    case (p)
      1: return 2;
      2: return 1;
      3: return 4;
      4: return 3;
      default: return 0;
    endcase
  endfunction

  function automatic int blk(input int n, input int k);
    int bx, by;
    bx = (n % MESH_X) & ~1; by = (n / MESH_X) & ~1;
    return (by + k / 2) * MESH_X + bx + k % 2;
  endfunction

  for (genvar n = 0; n < NODES; n++) begin : g_node
    logic                 power_on, tload, tbusy, hold_n, idle_r;
    logic [NUM_PORTS-1:0] port_on, in_sel;
    logic [NUM_VC-1:0]    inj_ready;
    logic [NODE_W-1:0]    ids [4];
    logic [3:0]           cv;
    flit_t                cf  [4];

    always_comb begin
      tload  = tbl_load_all || ((member[n] & sn_table_load) != '0);
      tbusy  = (member[n] & sn_table_busy) != '0;
      hold_n = (member[n] & subnoc_hold) != '0;
      for (int p = 0; p < NUM_PORTS; p++) in_sel[p] = pcfg[n][p].in_exp;
      for (int k = 0; k < 4; k++) begin
        ids[k] = NODE_W'(blk(n, k));
        cv[k]  = core_valid[blk(n, k)];
        cf[k]  = core_flit[blk(n, k)];
      end
    end

    pg_controller u_pg (
      .clk, .rst_n,
      .on_req(router_on[n]), .port_req(port_use[n]), .router_idle(idle_r),
      .power_on, .port_on, .gate_evt(gate_evt[n])
    );

    concentration_mux u_cm (
      .clk, .rst_n,
      .core_en(core_en[n]), .hold(hold_n), .core_id(ids),
      .core_valid(cv), .core_flit(cf), .core_ready(cm_ready[n]),
      .to_router(inj[n]), .inj_ready,
      .from_router(out_mesh[n][0]), .ej_valid(cm_ej[n]), .ej_flit(cm_ejf[n])
    );

    link_t in_m [NUM_PORTS];
    always_comb begin
      for (int p = 0; p < NUM_PORTS; p++) in_m[p] = in_mesh_q[n][p];
      in_m[0] = inj[n];
    end

    adaptable_router u_rt (
      .clk, .rst_n,
      .power_on, .port_on, .cfg_in_exp(in_sel),
      .table_load(tload), .table_in(rtable[n]), .table_busy(tbusy),
      .in_mesh(in_m), .in_exp(in_exp_q[n]),
      .cr_out_mesh(cr_out_mesh[n]), .cr_out_exp(cr_out_exp[n]),
      .inj_ready,
      .out_mesh(out_mesh[n]), .out_exp(out_exp[n]),
      .cr_in_mesh(cr_in_mesh_q[n]), .cr_in_exp(cr_in_exp_q[n]),
      .occ_total(occ_total[n]), .occ_local(occ_local[n]),
      .flits_switched(flits_sw[n]),
      .bypass_evt(bypass_evt[n]), .express_evt(express_evt[n]),
      .idle(idle_r)
    );

    always_comb begin
      logic busy_links;
      busy_links = 1'b0;
      for (int p = 0; p < NUM_PORTS; p++)
        busy_links = busy_links || in_mesh_q[n][p].valid || in_exp_q[n][p].valid ||
                     cr_in_mesh_q[n][p].valid || cr_in_exp_q[n][p].valid;
      node_idle[n] = idle_r && !busy_links && !inj[n].valid;
      router_powered[n] = power_on;
      inj_coh[n]  = core_valid[n] && core_ready[n] && !core_flit[n].hdr.is_data;
      inj_data[n] = core_valid[n] && core_ready[n] &&  core_flit[n].hdr.is_data;
    end
  end

  // delivery to the cores: each core hears the routers of its 2x2 block
  always_comb begin
    for (int m = 0; m < NODES; m++) begin
      int idx;
      idx = (m % MESH_X) % 2 + 2 * ((m / MESH_X) % 2);
      core_ready[m] = 1'b0;
      ej_valid[m]   = 1'b0;
      ej_flit[m]    = '0;
      for (int k = 0; k < 4; k++) begin
        int r;
        r = blk(m, k);
        if (cm_ready[r][idx]) core_ready[m] = 1'b1;
        if (cm_ej[r][idx]) begin
          ej_valid[m] = 1'b1;
          ej_flit[m]  = cm_ejf[r];
        end
      end
    end
  end

  // ---------------- mesh links (registered) ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NODES; n++)
        for (int p = 0; p < NUM_PORTS; p++) begin
          in_mesh_q[n][p]    <= '0;
          cr_in_mesh_q[n][p] <= '0;
          in_exp_q[n][p]     <= '0;
          cr_in_exp_q[n][p]  <= '0;
        end
    end else begin
      for (int n = 0; n < NODES; n++)
        for (int p = 1; p < NUM_PORTS; p++) begin
          int s;
          s = nb(n, p);
          if (s >= 0) begin
            in_mesh_q[n][p]    <= out_mesh[s][opp(p)];
            cr_in_mesh_q[n][p] <= cr_out_mesh[s][opp(p)];
          end else begin
            in_mesh_q[n][p]    <= '0;
            cr_in_mesh_q[n][p] <= '0;
          end
          in_exp_q[n][p]    <= in_exp_d[n][p];
          cr_in_exp_q[n][p] <= cr_in_exp_d[n][p];
        end
    end
  end

  // ---------------- adaptable channels ----------------
  // Row channels connect the E/W ports, column channels the N/S ports. For
  // a port, "forward" is towards higher x (rows) or higher y (columns).
  localparam int LW = $bits(link_t);
  localparam int CRW = $bits(credit_t);

  localparam int LEN    = MESH_X;   // rows and columns have equal length
  localparam int NLINES = MESH_X + MESH_Y;

  logic [LW-1:0]  drx_fw [NLINES][2][LEN];
  logic [LW-1:0]  drx_bw [NLINES][2][LEN];
  logic [CRW-1:0] crx_fw [NLINES][2][LEN];
  logic [CRW-1:0] crx_bw [NLINES][2][LEN];

  // node at position i of line l (lines 0..MESH_Y-1 are rows, then columns)
  function automatic int node_at(input int l, input int i);
    return (l < MESH_Y) ? l * MESH_X + i : i * MESH_X + (l - MESH_Y);
  endfunction

  for (genvar line = 0; line < NLINES; line++) begin : g_line
    localparam bit IS_ROW = (line < MESH_Y);
    localparam int PA     = IS_ROW ? 1 : 4;    // port facing higher index
    localparam int PB     = IS_ROW ? 2 : 3;    // port facing lower index
    for (genvar c = 0; c < 2; c++) begin : g_ch
      logic [LEN-2:0] rep_on, dir;
      logic [LEN-1:0] dfw_en, dbw_en, cfw_en, cbw_en;
      logic [LW-1:0]  dfw [LEN];
      logic [LW-1:0]  dbw [LEN];
      logic [CRW-1:0] cfw [LEN];
      logic [CRW-1:0] cbw [LEN];

      always_comb begin
        if (IS_ROW) begin
          rep_on = row_rep_on[line % MESH_Y][c];
          dir    = row_dir[line % MESH_Y][c];
        end else begin
          rep_on = col_rep_on[(line - MESH_Y) % MESH_X][c];
          dir    = col_dir[(line - MESH_Y) % MESH_X][c];
        end
        for (int i = 0; i < LEN; i++) begin
          int nd;
          nd = node_at(line, i);
          dfw_en[i] = 1'b0; dbw_en[i] = 1'b0; cfw_en[i] = 1'b0; cbw_en[i] = 1'b0;
          dfw[i] = '0; dbw[i] = '0; cfw[i] = '0; cbw[i] = '0;
          for (int pp = 0; pp < 2; pp++) begin
            int p;
            p = (pp == 0) ? PA : PB;
            // data leaves a port that drives this channel
            if (pcfg[nd][p].out_exp && pcfg[nd][p].out_ch == c[0]) begin
              if (!pcfg[nd][p].out_dir) begin dfw_en[i] = 1'b1; dfw[i] = out_exp[nd][p]; end
              else                      begin dbw_en[i] = 1'b1; dbw[i] = out_exp[nd][p]; end
            end
            // credits leave a port that listens to this channel, going back
            if (pcfg[nd][p].in_exp && pcfg[nd][p].in_ch == c[0]) begin
              if (!pcfg[nd][p].in_dir) begin cbw_en[i] = 1'b1; cbw[i] = cr_out_exp[nd][p]; end
              else                     begin cfw_en[i] = 1'b1; cfw[i] = cr_out_exp[nd][p]; end
            end
          end
        end
      end

      adaptable_link #(.N(LEN), .W(LW)) u_data (
        .rep_on, .dir, .tx_fw_en(dfw_en), .tx_fw(dfw), .tx_bw_en(dbw_en), .tx_bw(dbw),
        .rx_fw(drx_fw[line][c]), .rx_bw(drx_bw[line][c])
      );
      adaptable_link #(.N(LEN), .W(CRW)) u_credit (
        .rep_on, .dir(~dir), .tx_fw_en(cfw_en), .tx_fw(cfw), .tx_bw_en(cbw_en), .tx_bw(cbw),
        .rx_fw(crx_fw[line][c]), .rx_bw(crx_bw[line][c])
      );
    end
  end

  // receiving side of the channels: the listening port takes the data, the
  // driving port takes the returning credits
  always_comb begin
    for (int n = 0; n < NODES; n++) begin
      int x, y;
      x = n % MESH_X; y = n / MESH_X;
      in_exp_d[n][0]    = '0;
      cr_in_exp_d[n][0] = '0;
      for (int p = 1; p < NUM_PORTS; p++) begin
        portcfg_t pc;
        int l, i;
        pc = pcfg[n][p];
        l  = (p <= 2) ? y : MESH_Y + x;
        i  = (p <= 2) ? x : y;
        in_exp_d[n][p]    = '0;
        cr_in_exp_d[n][p] = '0;
        if (pc.in_exp)
          in_exp_d[n][p] = link_t'(pc.in_dir ? drx_bw[l][pc.in_ch][i] : drx_fw[l][pc.in_ch][i]);
        if (pc.out_exp)
          cr_in_exp_d[n][p] = credit_t'(pc.out_dir ? crx_fw[l][pc.out_ch][i] : crx_bw[l][pc.out_ch][i]);
      end
    end
  end

  if (MESH_X != MESH_Y) begin : g_bad_shape
    $error("adapt_noc_top expects a square mesh");
  end
endmodule
