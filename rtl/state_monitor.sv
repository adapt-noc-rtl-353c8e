// state_monitor: builds the 12-entry RL state vector of one subNoC.
//
// During an epoch it accumulates, over the nodes and routers that belong to
// the subNoC (member mask):
//   0 L1D misses, 1 L1I misses, 2 L2 misses, 3 retired instructions
//     (one event bit per node per cycle from the cores),
//   4 coherence packets, 5 data packets injected,
//   6 router buffer occupancy, 7 injection-port buffer occupancy,
//   8 flits switched by the routers (throughput).
// At epoch_end it freezes the totals and normalises each into (0,1) by
// dividing by its largest possible value over the epoch (EPOCH cycles times
// node count times the per-cycle maximum: 1 event, 80 buffer slots, 16
// injection slots, 5 switch outputs). The division is a restoring divider
// producing 8 fraction bits, one bit per cycle, attribute after attribute
// (72 cycles). Attributes 9-11 are the running topology (code/4) and the
// subNoC column and row counts (size/8). The vector is Q8.8, values in
// [0,1]; state_valid pulses when it is complete.
// The twelve attributes and the (0,1) normalisation follow the design; the
// per-cycle maxima and the fixed-point format are this implementation's.
module state_monitor
  import adapt_pkg::*;
#(
  parameter int EPOCH = 50000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 epoch_end,
  input  logic [NODES-1:0]     member,
  input  logic [3:0]           core_evt [NODES],  // l1d, l1i, l2, instr
  input  logic [NODES-1:0]     inj_coh,
  input  logic [NODES-1:0]     inj_data,
  input  logic [7:0]           occ_total [NODES],
  input  logic [3:0]           occ_local [NODES],
  input  logic [2:0]           flits_sw  [NODES],
  input  topo_e                cur_topo,
  input  logic [XW:0]          w,
  input  logic [YW:0]          h,
  output logic [15:0]          state_vec [12],
  output logic                 state_valid
);
  localparam int NACC = 9;
  localparam int AW   = 40;

  logic [AW-1:0] acc  [NACC];
  logic [AW-1:0] snap [NACC];
  logic [6:0]    nodes_q;
  logic [AW-1:0] inc  [NACC];
  logic [6:0]    nodes_now;

  always_comb begin
    for (int a = 0; a < NACC; a++) inc[a] = '0;
    nodes_now = '0;
    for (int n = 0; n < NODES; n++) if (member[n]) begin
      for (int e = 0; e < 4; e++) inc[e] = inc[e] + AW'(core_evt[n][e]);
      inc[4] = inc[4] + AW'(inj_coh[n]);
      inc[5] = inc[5] + AW'(inj_data[n]);
      inc[6] = inc[6] + AW'(occ_total[n]);
      inc[7] = inc[7] + AW'(occ_local[n]);
      inc[8] = inc[8] + AW'(flits_sw[n]);
      nodes_now = nodes_now + 1'b1;
    end
  end

  function automatic logic [AW-1:0] max_per_node(input int a);
    case (a)
      6: return AW'(NUM_PORTS * NUM_VC * VC_DEPTH);
      7: return AW'(NUM_VC * VC_DEPTH);
      8: return AW'(NUM_PORTS);
      default: return AW'(1);
    endcase
  endfunction

  // ---- restoring divider, one quotient bit per cycle ----
  typedef enum logic [1:0] {D_IDLE, D_RUN, D_DONE} dstate_e;
  dstate_e       dstate;
  logic [3:0]    attr;
  logic [2:0]    bitn;
  logic [AW-1:0] rem;
  logic [7:0]    quo;
  logic [7:0]    frac [NACC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NACC; a++) begin
        acc[a]  <= '0;
        snap[a] <= '0;
        frac[a] <= '0;
      end
      nodes_q     <= '0;
      dstate      <= D_IDLE;
      attr        <= '0;
      bitn        <= '0;
      rem         <= '0;
      quo         <= '0;
      state_valid <= 1'b0;
    end else begin
      state_valid <= 1'b0;
      if (epoch_end) begin
        for (int a = 0; a < NACC; a++) begin
          snap[a] <= acc[a] + inc[a];
          acc[a]  <= '0;
        end
        nodes_q <= nodes_now;
        dstate  <= D_RUN;
        attr    <= '0;
        bitn    <= '0;
        quo     <= '0;
      end else begin
        for (int a = 0; a < NACC; a++) acc[a] <= acc[a] + inc[a];
      end

      if (!epoch_end) case (dstate)
        D_RUN: begin
          logic [AW-1:0] d, r;
          d = AW'(EPOCH) * AW'(nodes_q) * max_per_node(int'(attr));
          if (d == 0) d = 1;
          r = (bitn == 0) ? snap[attr] : rem;
          if (bitn == 0 && r >= d) begin
            frac[attr] <= 8'hFF;                 // saturate: value reaches 1
            bitn <= '0;
            quo  <= '0;
            if (attr == 4'(NACC - 1)) dstate <= D_DONE;
            else                      attr   <= attr + 1'b1;
          end else begin
            logic [AW-1:0] r2;
            logic          qb;
            r2 = r << 1;
            qb = (r2 >= d);
            rem <= qb ? r2 - d : r2;
            if (bitn == 3'd7) begin
              frac[attr] <= {quo[6:0], qb};
              bitn <= '0;
              quo  <= '0;
              if (attr == 4'(NACC - 1)) dstate <= D_DONE;
              else                      attr   <= attr + 1'b1;
            end else begin
              quo  <= {quo[6:0], qb};
              bitn <= bitn + 1'b1;
            end
          end
        end
        D_DONE: begin
          dstate      <= D_IDLE;
          state_valid <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    for (int a = 0; a < NACC; a++) state_vec[a] = {8'h00, frac[a]};
    state_vec[9]  = {8'h00, cur_topo, 6'b0};
    state_vec[10] = 16'(w) << 5;
    state_vec[11] = 16'(h) << 5;
  end
endmodule
