// tb_reconfig_controller: epoch period, the notification time
// (w+h-2)*(TR+TL), waiting for the drain, TS cycles of unavailable tables
// and injection hold, and no switch when the action equals the running
// topology.
module tb_reconfig_controller;
  import adapt_pkg::*;
  localparam int EPOCH = 200, TR = 2, TL = 1, TS = 14;
  logic clk = 0, rst_n = 0;
  logic enable, sw_load, action_valid, region_idle;
  logic [XW:0] w;
  logic [YW:0] h;
  topo_e action, cur_topo;
  logic epoch_end, hold, table_load, table_busy, switch_evt, keep_evt;
  int checks = 0, failures = 0;
  int cyc = 0;

  reconfig_controller #(.EPOCH(EPOCH), .TR(TR), .TL(TL), .TS(TS)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  int last_epoch = -1, epochs = 0;
  always @(posedge clk) if (rst_n && epoch_end) begin
    if (last_epoch >= 0) begin
      checks++;
      if (cyc - last_epoch != EPOCH) begin failures++; $display("FAIL epoch period %0d", cyc - last_epoch); end
    end
    last_epoch = cyc;
    epochs++;
  end

  task automatic do_switch(input topo_e t, input int idle_delay);
    int t0, t_busy, n_busy;
    @(negedge clk);
    action = t; action_valid = 1;
    @(negedge clk);
    action_valid = 0;
    check(switch_evt == 1, "switch event");
    t0 = cyc;
    // notification phase: no hold yet
    while (!hold) @(negedge clk);
    check(cyc - t0 == (int'(w) + int'(h) - 2) * (TR + TL), "notify time");
    // drain: waits for idle
    repeat (idle_delay) begin
      @(negedge clk);
      check(hold && !table_busy && cur_topo != t, "draining");
    end
    region_idle = 1;
    @(negedge clk);
    region_idle = 0;
    check(table_load && table_busy && cur_topo == t, "tables reloaded");
    n_busy = 0;
    while (table_busy) begin n_busy++; check(hold, "hold in setup"); @(negedge clk); end
    check(n_busy == TS, "setup time TS");
    check(!hold, "injection resumes");
  endtask

  initial begin
    enable = 0; sw_load = 0; action_valid = 0; region_idle = 0;
    action = TOPO_MESH; w = 4; h = 4;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(table_busy, "reset setup");
    repeat (TS + 2) @(negedge clk);
    check(!table_busy && cur_topo == TOPO_MESH, "mesh after reset");
    enable = 1;
    do_switch(TOPO_TORUS, 7);
    w = 2; h = 4;
    do_switch(TOPO_CMESH, 0);
    do_switch(TOPO_TREE, 3);
    @(negedge clk);
    action = TOPO_TREE; action_valid = 1;
    @(negedge clk);
    action_valid = 0;
    check(keep_evt && !switch_evt, "keep same topology");
    repeat (3) @(negedge clk);
    check(!hold, "no hold when kept");
    sw_load = 1;
    @(negedge clk);
    sw_load = 0;
    check(cur_topo == TOPO_MESH && table_busy, "software reload");
    repeat (3 * EPOCH) @(negedge clk);
    check(epochs >= 3, "epochs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
