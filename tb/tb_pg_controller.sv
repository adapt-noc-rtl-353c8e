// tb_pg_controller: a router asked to power down must stay on until it is
// idle; ports follow the same rule; power-up is immediate.
module tb_pg_controller;
  import adapt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic on_req, router_idle, power_on, gate_evt;
  logic [NUM_PORTS-1:0] port_req, port_on;
  int checks = 0, failures = 0;

  pg_controller dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    logic exp_power;
    logic [NUM_PORTS-1:0] exp_port;
    on_req = 1; port_req = '1; router_idle = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_power = 1; exp_port = '1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(power_on == exp_power, "power_on");
      check(port_on == exp_port, "port_on");
      if ($urandom_range(0, 9) == 0) on_req = ~on_req;
      if ($urandom_range(0, 5) == 0) port_req = NUM_PORTS'($urandom);
      router_idle = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (on_req) exp_power = 1; else if (router_idle) exp_power = 0;
      for (int p = 0; p < NUM_PORTS; p++)
        if (port_req[p] && on_req) exp_port[p] = 1; else if (router_idle) exp_port[p] = 0;
    end
    // directed: power-down request while busy must wait
    @(negedge clk); on_req = 1; port_req = '1; router_idle = 0;
    @(negedge clk); on_req = 0;
    repeat (5) @(negedge clk);
    check(power_on == 1, "held on while busy");
    router_idle = 1;
    @(negedge clk);
    check(power_on == 0 && port_on == 0, "off once idle");
    check(gate_evt == 1, "gate event");
    on_req = 1; port_req = 5'b00011; router_idle = 0;
    @(negedge clk);
    check(power_on == 1 && port_on == 5'b00011, "immediate wake");
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
