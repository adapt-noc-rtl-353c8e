// tb_adaptable_router: one router with random traffic on all five inputs.
// The routing table maps each destination to a port and a mesh/express
// choice; the testbench predicts, for every flit, the output port, the wire
// (mesh or adaptable), the output virtual channel (dateline rule) and checks
// that each flit leaves exactly once. It plays the upstream routers (with
// their own credit counters) and the downstream routers (returning credits
// after a random delay, and sometimes withholding them to force back-
// pressure). Directed parts check the two-cycle buffered path, the
// one-cycle injection bypass, the input muxes, table_busy and U-turns.
module tb_adaptable_router;
  import adapt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic power_on, table_load, table_busy;
  logic [NUM_PORTS-1:0] port_on, cfg_in_exp;
  rte_t table_in [NODES][NUM_VNET];
  link_t in_mesh [NUM_PORTS], in_exp [NUM_PORTS], out_mesh [NUM_PORTS], out_exp [NUM_PORTS];
  credit_t cr_out_mesh [NUM_PORTS], cr_out_exp [NUM_PORTS], cr_in_mesh [NUM_PORTS], cr_in_exp [NUM_PORTS];
  logic [NUM_VC-1:0] inj_ready;
  logic [7:0] occ_total;
  logic [3:0] occ_local;
  logic [2:0] flits_switched;
  logic bypass_evt, express_evt, idle;
  int checks = 0, failures = 0;
  int cyc = 0;

  adaptable_router dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  // expected departures, keyed by tag
  typedef struct { int port; bit exp; int vc; int sent; } exp_t;
  exp_t expect_q [int];
  int up_cred [NUM_PORTS][NUM_VC];       // upstream's view of our buffers
  int down_cred_pending [NUM_PORTS][2][$];
  bit withhold = 0;
  int next_tag = 1;
  int delivered = 0, bypasses = 0, expresses = 0;

  function automatic rte_t rt(input int d, input int vn);
    rte_t r;
    r.port = port_e'((d + vn) % 5);
    r.express = (r.port != P_LOCAL) && (((d >> 1) & 1) == 1);
    return r;
  endfunction

  function automatic flit_t mkflit(input int port, output int tag, output int vc_in);
    flit_t f;
    int d, vn, o;
    f = '0;
    do begin
      d = $urandom_range(0, NODES - 1); vn = $urandom_range(0, 1);
      o = int'(rt(d, vn).port);
    end while (o == port && port != 0);
    f.hdr.dst = NODE_W'(d); f.hdr.vnet = vn[0]; f.hdr.tag = 16'(next_tag);
    f.payload = {$urandom, $urandom};
    tag = next_tag; next_tag++;
    vc_in = (port == 0) ? vn * 2 : vn * 2 + $urandom_range(0, 1);
    return f;
  endfunction

  task automatic predict(input flit_t f, input int port, input int vc_in, input int tag);
    exp_t e;
    rte_t r;
    r = rt(int'(f.hdr.dst), int'(f.hdr.vnet));
    e.port = int'(r.port); e.exp = r.express;
    e.vc = int'(f.hdr.vnet) * 2 +
           ((r.express || ((vc_in % 2) == 1 && same_dim(port_e'(port), r.port))) ? 1 : 0);
    e.sent = cyc;
    expect_q[tag] = e;
  endtask

  // monitor outputs at every negedge
  always @(negedge clk) if (rst_n) begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int w = 0; w < 2; w++) begin
        link_t l;
        int tag;
        l = w ? out_exp[o] : out_mesh[o];
        if (l.valid) begin
          tag = int'(l.flit.hdr.tag);
          checks++;
          if (!expect_q.exists(tag)) begin
            failures++; $display("FAIL unexpected/duplicate flit tag %0d at port %0d", tag, o);
          end else begin
            if (expect_q[tag].port != o || expect_q[tag].exp != w[0] ||
                (o != 0 && expect_q[tag].vc != int'(l.vc))) begin
              failures++;
              $display("FAIL tag %0d: port %0d/%0d exp %0d/%0d vc %0d/%0d", tag, o, expect_q[tag].port,
                       w, expect_q[tag].exp, l.vc, expect_q[tag].vc);
            end
            expect_q.delete(tag);
            delivered++;
          end
          if (o != 0) down_cred_pending[o][w].push_back(int'(l.vc) + 16 * (cyc + $urandom_range(2, 6)));
        end
      end
    end
  end

  // downstream returns credits; upstream collects ours
  always @(negedge clk) begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      cr_in_mesh[o] = '0; cr_in_exp[o] = '0;
      for (int w = 0; w < 2; w++)
        if (!withhold && down_cred_pending[o][w].size() > 0 &&
            down_cred_pending[o][w][0] / 16 <= cyc) begin
          credit_t c;
          c.valid = 1; c.vc = VC_W'(down_cred_pending[o][w][0] % 16);
          void'(down_cred_pending[o][w].pop_front());
          if (w) cr_in_exp[o] = c; else cr_in_mesh[o] = c;
        end
    end
  end
  always @(posedge clk) if (rst_n)
    for (int p = 1; p < NUM_PORTS; p++) begin
      if (cr_out_mesh[p].valid) begin
        up_cred[p][cr_out_mesh[p].vc]++;
        checks++;
        if (cfg_in_exp[p]) begin failures++; $display("FAIL credit on wrong wire"); end
      end
      if (cr_out_exp[p].valid) begin
        up_cred[p][cr_out_exp[p].vc]++;
        checks++;
        if (!cfg_in_exp[p]) begin failures++; $display("FAIL credit on wrong wire"); end
      end
    end
  always @(posedge clk) if (bypass_evt) bypasses++;
  always @(posedge clk) if (express_evt) expresses++;

  task automatic clear_inputs();
    for (int p = 0; p < NUM_PORTS; p++) begin in_mesh[p] = '0; in_exp[p] = '0; end
  endtask

  // send one flit on a port this cycle (call at negedge)
  task automatic drive(input int p, input bit on_exp, output int tag);
    link_t l;
    int vc;
    l.flit = mkflit(p, tag, vc);
    l.valid = 1; l.vc = VC_W'(vc);
    if (p != 0) up_cred[p][vc]--;
    predict(l.flit, p, vc, tag);
    if (on_exp) in_exp[p] = l; else in_mesh[p] = l;
  endtask

  initial begin
    int tag, t0;
    power_on = 1; port_on = '1; cfg_in_exp = '0; table_busy = 0; table_load = 0;
    clear_inputs();
    for (int o = 0; o < NUM_PORTS; o++) begin cr_in_mesh[o] = '0; cr_in_exp[o] = '0; end
    for (int d = 0; d < NODES; d++) for (int v = 0; v < NUM_VNET; v++) table_in[d][v] = rt(d, v);
    for (int p = 0; p < NUM_PORTS; p++) for (int v = 0; v < NUM_VC; v++) up_cred[p][v] = VC_DEPTH;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); table_load = 1;
    @(negedge clk); table_load = 0;

    // directed: buffered path from the west mesh input takes two cycles
    drive(2, 0, tag); t0 = cyc;
    @(negedge clk); clear_inputs();
    @(negedge clk); #1;
    check(!expect_q.exists(tag) && cyc - t0 == 2, "two-cycle router");
    // directed: injection bypass takes one cycle
    repeat (3) @(negedge clk);
    drive(0, 0, tag); t0 = cyc;
    @(negedge clk); clear_inputs(); #1;
    check(!expect_q.exists(tag) && cyc - t0 == 1 && bypass_evt, "one-cycle bypass");
    // directed: table_busy stalls everything
    table_busy = 1;
    drive(3, 0, tag);
    @(negedge clk); clear_inputs();
    repeat (5) begin @(negedge clk); check(expect_q.exists(tag), "stalled while table busy"); end
    table_busy = 0;
    repeat (3) @(negedge clk);
    check(!expect_q.exists(tag), "released after table busy");

    // random traffic, with the east and north inputs on the adaptable links
    cfg_in_exp = 5'b01010;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      clear_inputs();
      withhold = (c % 1000) > 900;
      for (int p = 0; p < NUM_PORTS; p++) begin
        if ($urandom_range(0, 2) == 0) begin
          link_t l;
          int vc;
          l.flit = mkflit(p, tag, vc);
          if ((p == 0 && inj_ready[vc]) || (p != 0 && up_cred[p][vc] > 0)) begin
            l.valid = 1; l.vc = VC_W'(vc);
            if (p != 0) up_cred[p][vc]--;
            predict(l.flit, p, vc, tag);
            if (cfg_in_exp[p]) in_exp[p] = l; else in_mesh[p] = l;
          end
          // a flit on the unselected wire must be ignored
          if (p != 0) begin
            link_t junk;
            junk = '0; junk.valid = 1; junk.flit.hdr.tag = 16'hFFFF;
            if (cfg_in_exp[p]) in_mesh[p] = junk; else in_exp[p] = junk;
          end
        end
      end
    end
    @(negedge clk); clear_inputs(); withhold = 0;
    repeat (100) @(negedge clk);
    check(expect_q.size() == 0, "all flits delivered");
    check(idle, "router idle at the end");
    for (int p = 1; p < NUM_PORTS; p++)
      for (int v = 0; v < NUM_VC; v++) check(up_cred[p][v] == VC_DEPTH, "upstream credits home");
    check(bypasses > 10 && expresses > 10, "bypass and express used");
    $display("delivered %0d bypasses %0d express %0d", delivered, bypasses, expresses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
