// concentration_mux: the network-interface side of a router's local port.
//
// Concentration links join the cores of an aligned 2x2 block to one router.
// Core k of the block is (x+k%2, y+k/2) relative to the block's north-west
// corner. core_en says which cores currently belong to this router: only its
// own core in a mesh, torus or tree subNoC, all four in a cmesh subNoC where
// this router is the block's concentrator (the others are powered off).
//
// Injection: every core offers one flit (valid/ready). A round-robin arbiter
// picks one enabled core whose target virtual channel has room in the router
// (inj_ready); the flit is written to the lowest virtual channel of its
// virtual network. hold (set while the subNoC is being reconfigured) stops
// all injection. Ejection: a flit leaving the router's local output is handed
// to the core named by its destination id. Both directions are
// combinational; the router registers the flit.
// Sharing one injection port among cores through a mux follows the design;
// the arbitration and the virtual-channel choice are this implementation's.
module concentration_mux
  import adapt_pkg::*;
#(
  parameter int NCORE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NCORE-1:0]  core_en,
  input  logic              hold,
  input  logic [NODE_W-1:0] core_id [NCORE],

  input  logic [NCORE-1:0]  core_valid,
  input  flit_t             core_flit [NCORE],
  output logic [NCORE-1:0]  core_ready,

  output link_t             to_router,
  input  logic [NUM_VC-1:0] inj_ready,

  input  link_t             from_router,
  output logic [NCORE-1:0]  ej_valid,
  output flit_t             ej_flit
);
  logic [NCORE-1:0] req, gnt;
  logic             any;

  always_comb
    for (int k = 0; k < NCORE; k++)
      req[k] = !hold && core_en[k] && core_valid[k] &&
               inj_ready[{core_flit[k].hdr.vnet, 1'b0}];

  rr_arbiter #(.N(NCORE)) u_arb (
    .clk, .rst_n, .req, .advance(1'b1), .gnt, .any
  );

  always_comb begin
    to_router = '0;
    for (int k = 0; k < NCORE; k++)
      if (gnt[k]) begin
        to_router.valid = 1'b1;
        to_router.vc    = {core_flit[k].hdr.vnet, 1'b0};
        to_router.flit  = core_flit[k];
      end
    core_ready = gnt;
    ej_flit    = from_router.flit;
    for (int k = 0; k < NCORE; k++)
      ej_valid[k] = from_router.valid && core_en[k] &&
                    (from_router.flit.hdr.dst == core_id[k]);
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(core_ready));
  a_any: assert property (@(posedge clk) disable iff (!rst_n) any == (core_ready != 0));
endmodule
