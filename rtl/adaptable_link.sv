// adaptable_link: one adaptable link running along a row or a column.
//
// The link passes every router of the row (positions 0..N-1). Between
// position i and i+1 sits a quad-state repeater stage i that is either off
// (rep_on[i]=0, which cuts the link into independent segments) or passes the
// signal in one direction: dir[i]=0 towards higher positions, dir[i]=1
// towards lower ones (link reversal). A router drives the link at its own
// position with tx_fw (travelling up) or tx_bw (travelling down); a driven
// value replaces what arrived from further away, so each segment carries the
// value of the router at its upstream end. rx_fw[i] is what arrives at
// position i from below, rx_bw[i] what arrives from above.
//
// In silicon the stages are tri-state/quad-state repeaters on one set of
// wires; here each stage is a pair of gated buffers so the link is ordinary
// logic. The value a disabled stage passes on is all zeros. The link is
// purely combinational; the one-cycle link latency is a register outside.
// The segment/direction control follows the design; the model of a repeater
// as gates is this implementation's.
module adaptable_link #(
  parameter int N = 8,
  parameter int W = 32
) (
  input  logic [N-2:0] rep_on,
  input  logic [N-2:0] dir,
  input  logic [N-1:0] tx_fw_en,
  input  logic [W-1:0] tx_fw [N],
  input  logic [N-1:0] tx_bw_en,
  input  logic [W-1:0] tx_bw [N],
  output logic [W-1:0] rx_fw [N],
  output logic [W-1:0] rx_bw [N]
);
  logic [W-1:0] fw_out [N];   // value leaving position i upwards
  logic [W-1:0] bw_out [N];   // value leaving position i downwards

  for (genvar i = 0; i < N; i++) begin : g_pos
    if (i == 0) begin : g_lo
      assign rx_fw[i] = '0;
    end else begin : g_fw
      assign rx_fw[i] = (rep_on[i-1] && !dir[i-1]) ? fw_out[i-1] : '0;
    end
    if (i == N - 1) begin : g_hi
      assign rx_bw[i] = '0;
    end else begin : g_bw
      assign rx_bw[i] = (rep_on[i] && dir[i]) ? bw_out[i+1] : '0;
    end
    assign fw_out[i] = tx_fw_en[i] ? tx_fw[i] : rx_fw[i];
    assign bw_out[i] = tx_bw_en[i] ? tx_bw[i] : rx_bw[i];
  end
endmodule
