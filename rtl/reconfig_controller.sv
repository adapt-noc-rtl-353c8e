// reconfig_controller: epoch timer and topology-switch sequencer of one subNoC.
//
// Every EPOCH cycles (50K in the design) it pulses epoch_end: the state
// monitor freezes the epoch's statistics and the RL controller picks a
// topology. When the chosen topology (action) differs from the one running,
// the switch proceeds in steps:
//   NOTIFY  (w+h-2)*(TR+TL) cycles, the time for the notification to reach
//           every router of a w x h subNoC (TR hop, TL link latency);
//   DRAIN   injection into the subNoC is held until its routers are empty;
//   SETUP   the new topology is applied: the routing tables are reloaded
//           (table_load, first cycle) and stay unavailable for TS cycles
//           (table_busy), then injection resumes.
// After reset, and after sw_load, the controller runs SETUP once with the
// mesh topology so every routing table is valid.
// The epoch length, the notification time formula and TS come from the
// design. Draining before the links change is this implementation's
// simplification of the design's drain-free sequence (mesh routes first,
// old routes removed, then new routes added).
module reconfig_controller
  import adapt_pkg::*;
#(
  parameter int EPOCH = 50000,
  parameter int TR    = 2,
  parameter int TL    = 1,
  parameter int TS    = 14
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [XW:0] w,
  input  logic [YW:0] h,
  input  logic        sw_load,
  input  logic        action_valid,
  input  topo_e       action,
  input  logic        region_idle,

  output logic        epoch_end,
  output topo_e       cur_topo,
  output logic        hold,
  output logic        table_load,
  output logic        table_busy,
  output logic        switch_evt,
  output logic        keep_evt
);
  typedef enum logic [1:0] {S_RUN, S_NOTIFY, S_DRAIN, S_SETUP} state_e;
  state_e state;
  topo_e  next_topo;
  logic [31:0] epoch_cnt;
  logic [15:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      epoch_cnt  <= '0;
      epoch_end  <= 1'b0;
    end else begin
      epoch_end <= 1'b0;
      if (!enable || epoch_cnt == 32'(EPOCH - 1)) begin
        epoch_cnt <= '0;
        epoch_end <= enable;
      end else begin
        epoch_cnt <= epoch_cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_SETUP;
      cnt        <= '0;
      cur_topo   <= TOPO_MESH;
      next_topo  <= TOPO_MESH;
      table_load <= 1'b1;
      switch_evt <= 1'b0;
      keep_evt   <= 1'b0;
    end else begin
      table_load <= 1'b0;
      switch_evt <= 1'b0;
      keep_evt   <= 1'b0;
      if (sw_load) begin
        state      <= S_SETUP;
        cnt        <= '0;
        cur_topo   <= TOPO_MESH;
        table_load <= 1'b1;
      end else begin
        case (state)
          S_RUN: if (enable && action_valid) begin
            if (action != cur_topo) begin
              next_topo  <= action;
              state      <= S_NOTIFY;
              cnt        <= 16'((int'(w) + int'(h) - 2) * (TR + TL));
              switch_evt <= 1'b1;
            end else begin
              keep_evt <= 1'b1;
            end
          end
          S_NOTIFY: begin
            if (cnt <= 1) state <= S_DRAIN;
            else          cnt   <= cnt - 1'b1;
          end
          S_DRAIN: if (region_idle) begin
            state      <= S_SETUP;
            cur_topo   <= next_topo;
            table_load <= 1'b1;
            cnt        <= '0;
          end
          S_SETUP: begin
            if (cnt == 16'(TS - 1)) state <= S_RUN;
            else                    cnt   <= cnt + 1'b1;
          end
          default: state <= S_RUN;
        endcase
      end
    end
  end

  assign hold       = (state == S_DRAIN) || (state == S_SETUP);
  assign table_busy = (state == S_SETUP);
endmodule
