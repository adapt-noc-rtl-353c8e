// adaptable_router: the five-port virtual-channel router of Adapt-NoC.
//
// Each of the east, west, north and south input ports has a mux in front of
// it that takes flits either from the mesh link of that side or from an
// adaptable (express) link, so a router can be joined to a non-adjacent router
// without any extra input port. Likewise every output port feeds two wires,
// its mesh link and an adaptable link; the routing-table entry of each packet
// says which one it leaves on. The local port is fed by the concentration
// mux, so one router can serve several cores.
//
// Pipeline (one flit per packet, virtual cut-through):
//   cycle 1  buffer write into the input virtual channel;
//   cycle 2  route lookup in the reconfigurable routing table, virtual-channel
//            choice, separable round-robin switch allocation (one VC per
//            input, then one input per output) and switch traversal into the
//            output register.
// A flit injected from the local port into an empty virtual channel may skip
// the buffer write and compete in switch allocation in the cycle it arrives
// (the injection bypass), saving one cycle at the source.
//
// Flow control is credit based, one credit counter per downstream virtual
// channel, kept separately for the mesh wire and the adaptable wire of each
// output port. The output virtual channel is chosen inside the packet's
// virtual network: the lower one normally, the upper one after the packet
// has taken an adaptable link in the current dimension (the dateline that
// keeps torus wrap-around links deadlock free). Ejection through the local
// output is never back-pressured.
//
// While table_busy is high (the connection set-up time of a reconfiguration)
// no route can be looked up, so nothing is switched. power_on=0 gates the
// whole router; port_on gates single ports. The power-gating controller only
// powers down a router or port that holds no flit.
//
// The port and virtual-channel counts and buffer depth follow the design;
// single-flit packets, the dateline rule and the arbiter types are choices
// of this implementation.
module adaptable_router
  import adapt_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,

  input  logic                  power_on,
  input  logic [NUM_PORTS-1:0]  port_on,
  input  logic [NUM_PORTS-1:0]  cfg_in_exp,
  input  logic                  table_load,
  input  rte_t                  table_in [NODES][NUM_VNET],
  input  logic                  table_busy,

  input  link_t   in_mesh     [NUM_PORTS],
  input  link_t   in_exp      [NUM_PORTS],
  output credit_t cr_out_mesh [NUM_PORTS],
  output credit_t cr_out_exp  [NUM_PORTS],
  output logic [NUM_VC-1:0] inj_ready,

  output link_t   out_mesh    [NUM_PORTS],
  output link_t   out_exp     [NUM_PORTS],
  input  credit_t cr_in_mesh  [NUM_PORTS],
  input  credit_t cr_in_exp   [NUM_PORTS],

  output logic [7:0] occ_total,
  output logic [3:0] occ_local,
  output logic [2:0] flits_switched,
  output logic       bypass_evt,
  output logic       express_evt,
  output logic       idle
);
  localparam int CW = $clog2(VC_DEPTH + 1);
  localparam int FW = $bits(flit_t);

  rte_t rtable [NODES][NUM_VNET];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NODES; d++)
        for (int n = 0; n < NUM_VNET; n++)
          rtable[d][n] <= '{express: 1'b0, port: P_LOCAL};
    end else if (table_load) begin
      rtable <= table_in;
    end
  end

  // ---------------- input muxes and buffers ----------------
  link_t in_link [NUM_PORTS];
  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_link[p] = (p != 0 && cfg_in_exp[p]) ? in_exp[p] : in_mesh[p];
      if (!power_on || !port_on[p]) in_link[p].valid = 1'b0;
    end
  end

  logic [FW-1:0]  fifo_head  [NUM_PORTS][NUM_VC];
  logic           fifo_empty [NUM_PORTS][NUM_VC];
  logic           fifo_full  [NUM_PORTS][NUM_VC];
  logic [CW-1:0]  fifo_cnt   [NUM_PORTS][NUM_VC];
  logic           fifo_wr    [NUM_PORTS][NUM_VC];
  logic           fifo_rd    [NUM_PORTS][NUM_VC];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      vc_buffer #(.DEPTH(VC_DEPTH), .WIDTH(FW)) u_buf (
        .clk, .rst_n,
        .wr_en  (fifo_wr[p][v]),
        .wr_data(in_link[p].flit),
        .rd_en  (fifo_rd[p][v]),
        .rd_data(fifo_head[p][v]),
        .empty  (fifo_empty[p][v]),
        .full   (fifo_full[p][v]),
        .count  (fifo_cnt[p][v])
      );
    end
  end

  always_comb
    for (int v = 0; v < NUM_VC; v++)
      inj_ready[v] = power_on && port_on[P_LOCAL] && !fifo_full[P_LOCAL][v];

  // ---------------- heads, routing, virtual-channel choice ----------------
  logic           hv     [NUM_PORTS][NUM_VC];  // head valid
  logic           hbyp   [NUM_PORTS][NUM_VC];  // head comes through the bypass
  flit_t          hflit  [NUM_PORTS][NUM_VC];
  rte_t           hroute [NUM_PORTS][NUM_VC];
  logic [VC_W-1:0] hovc  [NUM_PORTS][NUM_VC];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        hbyp[p][v] = (p == 0) && fifo_empty[p][v] && in_link[p].valid &&
                     (int'(in_link[p].vc) == v);
        hv[p][v]   = !fifo_empty[p][v] || hbyp[p][v];
        hflit[p][v] = fifo_empty[p][v] ? in_link[p].flit : flit_t'(fifo_head[p][v]);
        hroute[p][v] = rtable[hflit[p][v].hdr.dst][hflit[p][v].hdr.vnet];
        hovc[p][v] = {hflit[p][v].hdr.vnet,
                      hroute[p][v].express ||
                      ((v % VC_PER_VN) == 1 && same_dim(port_e'(p), hroute[p][v].port))};
      end
    end
  end

  // ---------------- credits ----------------
  logic [CW-1:0] cred [NUM_PORTS][2][NUM_VC];
  logic          take [NUM_PORTS][2][NUM_VC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++)
        for (int e = 0; e < 2; e++)
          for (int v = 0; v < NUM_VC; v++)
            cred[o][e][v] <= CW'(VC_DEPTH);
    end else begin
      for (int o = 0; o < NUM_PORTS; o++)
        for (int v = 0; v < NUM_VC; v++) begin
          logic back_m, back_e;
          back_m = cr_in_mesh[o].valid && int'(cr_in_mesh[o].vc) == v;
          back_e = cr_in_exp[o].valid  && int'(cr_in_exp[o].vc) == v;
          cred[o][0][v] <= cred[o][0][v] + CW'(back_m) - CW'(take[o][0][v]);
          cred[o][1][v] <= cred[o][1][v] + CW'(back_e) - CW'(take[o][1][v]);
        end
    end
  end

  // ---------------- switch allocation ----------------
  logic [NUM_VC-1:0]    vreq  [NUM_PORTS];
  logic [NUM_VC-1:0]    vgnt  [NUM_PORTS];
  logic                 vany  [NUM_PORTS];
  logic [VC_W-1:0]      vsel  [NUM_PORTS];
  logic [NUM_PORTS-1:0] oreq  [NUM_PORTS];
  logic [NUM_PORTS-1:0] ognt  [NUM_PORTS];
  logic                 oany  [NUM_PORTS];
  logic [NUM_PORTS-1:0] in_won;

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NUM_VC; v++) begin
        int o;
        logic ok;
        o  = int'(hroute[p][v].port);
        ok = (o == 0) ? 1'b1 : (cred[o][hroute[p][v].express][hovc[p][v]] != 0);
        vreq[p][v] = power_on && !table_busy && hv[p][v] && port_on[o] && ok &&
                     !(o != 0 && o == p);   // no U-turns
      end
  end

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_vsa
    rr_arbiter #(.N(NUM_VC)) u_varb (
      .clk, .rst_n, .req(vreq[p]), .advance(in_won[p]), .gnt(vgnt[p]), .any(vany[p])
    );
    always_comb begin
      vsel[p] = '0;
      for (int v = 0; v < NUM_VC; v++) if (vgnt[p][v]) vsel[p] = VC_W'(v);
    end
  end

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++)
      for (int p = 0; p < NUM_PORTS; p++)
        oreq[o][p] = vany[p] && (int'(hroute[p][vsel[p]].port) == o);
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_osa
    rr_arbiter #(.N(NUM_PORTS)) u_oarb (
      .clk, .rst_n, .req(oreq[o]), .advance(1'b1), .gnt(ognt[o]), .any(oany[o])
    );
  end

  always_comb begin
    in_won = '0;
    for (int o = 0; o < NUM_PORTS; o++)
      for (int p = 0; p < NUM_PORTS; p++)
        if (ognt[o][p]) in_won[p] = 1'b1;
  end

  // ---------------- buffer control and crossbar ----------------
  logic bypass_taken;
  always_comb begin
    bypass_taken = 1'b0;
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NUM_VC; v++) begin
        logic granted;
        granted = in_won[p] && int'(vsel[p]) == v;
        fifo_rd[p][v] = granted && !fifo_empty[p][v];
        fifo_wr[p][v] = in_link[p].valid && int'(in_link[p].vc) == v &&
                        !(granted && hbyp[p][v]);
        if (granted && hbyp[p][v]) bypass_taken = 1'b1;
      end
    for (int o = 0; o < NUM_PORTS; o++)
      for (int e = 0; e < 2; e++)
        for (int v = 0; v < NUM_VC; v++) take[o][e][v] = 1'b0;
    for (int o = 1; o < NUM_PORTS; o++)
      for (int p = 0; p < NUM_PORTS; p++)
        if (ognt[o][p])
          take[o][hroute[p][vsel[p]].express][hovc[p][vsel[p]]] = 1'b1;
  end

  link_t   xbar_q [NUM_PORTS];
  logic    xbar_e [NUM_PORTS];
  credit_t crq    [NUM_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        xbar_q[o] <= '0;
        xbar_e[o] <= 1'b0;
        crq[o]    <= '0;
      end
      bypass_evt     <= 1'b0;
      express_evt    <= 1'b0;
      flits_switched <= '0;
    end else begin
      logic [2:0] nsw;
      logic       anyexp;
      nsw = '0;
      anyexp = 1'b0;
      for (int o = 0; o < NUM_PORTS; o++) begin
        xbar_q[o].valid <= 1'b0;
        for (int p = 0; p < NUM_PORTS; p++)
          if (ognt[o][p]) begin
            xbar_q[o].valid <= 1'b1;
            xbar_q[o].vc    <= hovc[p][vsel[p]];
            xbar_q[o].flit  <= hflit[p][vsel[p]];
            xbar_e[o]       <= (o != 0) && hroute[p][vsel[p]].express;
            nsw = nsw + 1'b1;
            if (o != 0 && hroute[p][vsel[p]].express) anyexp = 1'b1;
          end
      end
      for (int p = 0; p < NUM_PORTS; p++) begin
        crq[p].valid <= (p != 0) && in_won[p] && !hbyp[p][vsel[p]];
        crq[p].vc    <= vsel[p];
      end
      bypass_evt     <= bypass_taken;
      express_evt    <= anyexp;
      flits_switched <= nsw;
    end
  end

  logic cr_exp_sel [NUM_PORTS];
  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_mesh[o] = xbar_q[o];
      out_exp[o]  = xbar_q[o];
      out_mesh[o].valid = xbar_q[o].valid && !xbar_e[o];
      out_exp[o].valid  = xbar_q[o].valid &&  xbar_e[o];
      cr_exp_sel[o]     = cfg_in_exp[o] && (o != 0);
      cr_out_mesh[o]    = crq[o];
      cr_out_exp[o]     = crq[o];
      cr_out_mesh[o].valid = crq[o].valid && !cr_exp_sel[o];
      cr_out_exp[o].valid  = crq[o].valid &&  cr_exp_sel[o];
    end
  end

  // ---------------- statistics ----------------
  always_comb begin
    logic [7:0] t;
    logic       busy;
    t = '0;
    busy = 1'b0;
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NUM_VC; v++) t = t + 8'(fifo_cnt[p][v]);
    occ_total = t;
    occ_local = 4'(fifo_cnt[0][0]) + 4'(fifo_cnt[0][1]) + 4'(fifo_cnt[0][2]) + 4'(fifo_cnt[0][3]);
    for (int o = 0; o < NUM_PORTS; o++) busy = busy || xbar_q[o].valid || crq[o].valid;
    idle = (t == 0) && !busy;
  end

  a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
    cred[1][0][0] <= CW'(VC_DEPTH));
endmodule
