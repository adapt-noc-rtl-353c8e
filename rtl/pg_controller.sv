// pg_controller: power-gating controller of one adaptable router.
//
// The topology configuration says which routers and ports a subNoC uses
// (on_req, port_req). An unused router or port is switched off to save static
// power, but only once the router holds no flit (router_idle), so no packet
// is ever trapped in a powered-down buffer. Switching on is immediate.
// Ports of a powered-down router are off too. gate_evt pulses for one cycle
// whenever the router or one of its ports is switched off.
// Timing: decisions are registered; power_on/port_on change one cycle after
// the request (and the idle condition) is seen.
// Gating idle routers and ports follows the design; the wait-for-idle rule
// is this implementation's way of making it safe.
module pg_controller
  import adapt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 on_req,
  input  logic [NUM_PORTS-1:0] port_req,
  input  logic                 router_idle,
  output logic                 power_on,
  output logic [NUM_PORTS-1:0] port_on,
  output logic                 gate_evt
);
  logic [NUM_PORTS-1:0] port_next;
  logic                 power_next;

  always_comb begin
    power_next = power_on;
    if (on_req)           power_next = 1'b1;
    else if (router_idle) power_next = 1'b0;
    port_next = port_on;
    for (int p = 0; p < NUM_PORTS; p++) begin
      if (port_req[p] && on_req) port_next[p] = 1'b1;
      else if (router_idle)      port_next[p] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      power_on <= 1'b1;
      port_on  <= '1;
      gate_evt <= 1'b0;
    end else begin
      power_on <= power_next;
      port_on  <= port_next;
      gate_evt <= (power_on && !power_next) || ((port_on & ~port_next) != 0);
    end
  end

  a_off_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (power_on && !power_next) |-> router_idle);
endmodule
