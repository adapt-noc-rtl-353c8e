// rr_arbiter: round-robin arbiter used by the switch allocator and the
// concentration mux.
//
// Grants one of N requesters (one-hot gnt). The search starts just after the
// last requester that was granted and accepted (advance=1), so every
// requester that keeps requesting is served within N grants. Combinational
// from req to gnt; the priority pointer moves at the clock edge.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt,
  output logic         any
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] last;
  logic [IW-1:0] win;

  logic [IW-1:0] idx;

  always_comb begin
    gnt = '0;
    win = last;
    any = 1'b0;
    idx = '0;
    for (int k = 1; k <= N; k++) begin
      idx = IW'((int'(last) + k) % N);
      if (!any && req[idx]) begin
        any      = 1'b1;
        gnt[idx] = 1'b1;
        win      = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             last <= IW'(N - 1);
    else if (advance && any) last <= win;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
