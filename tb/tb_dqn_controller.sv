// tb_dqn_controller: loads random weights, runs inference on random states
// and compares the four Q-values, the greedy action and the latency with a
// fixed-point model of the 12-15-15-4 network written here. A second
// instance with exploration probability ~1 must report explored actions.
module tb_dqn_controller;
  localparam int NW = 499;
  localparam int LATENCY = 504;
  logic clk = 0, rst_n = 0;
  logic w_we, start, busy, action_valid, explored;
  logic [8:0] w_addr;
  logic signed [15:0] w_data;
  logic [15:0] state_vec [12];
  logic [1:0] action;
  logic signed [15:0] q_out [4];
  logic busy2, av2, ex2;
  logic [1:0] act2;
  logic signed [15:0] q2 [4];
  int checks = 0, failures = 0;
  logic signed [15:0] wm [NW];

  dqn_controller #(.EPS(16'd0)) dut (.*);
  dqn_controller #(.EPS(16'hFFFF)) dut_explore (
    .clk, .rst_n, .w_we, .w_addr, .w_data, .start, .state_vec,
    .busy(busy2), .action_valid(av2), .action(act2), .explored(ex2), .q_out(q2));

  always #5 clk = ~clk;

  function automatic logic signed [15:0] sat(input longint v, input bit relu);
    longint s;
    s = v >>> 8;
    if (relu && s < 0) return 0;
    if (s > 32767) return 16'sh7fff;
    if (s < -32768) return 16'sh8000;
    return 16'(s);
  endfunction

  task automatic model(output logic signed [15:0] q [4]);
    logic signed [15:0] x [12], a1 [15], a2 [15];
    int base;
    for (int i = 0; i < 12; i++) x[i] = state_vec[i];
    for (int j = 0; j < 15; j++) begin
      longint acc;
      base = j * 13;
      acc = longint'(wm[base]) * 256;
      for (int i = 0; i < 12; i++) acc += longint'(wm[base + 1 + i]) * longint'(x[i]);
      a1[j] = sat(acc, 1);
    end
    for (int j = 0; j < 15; j++) begin
      longint acc;
      base = 195 + j * 16;
      acc = longint'(wm[base]) * 256;
      for (int i = 0; i < 15; i++) acc += longint'(wm[base + 1 + i]) * longint'(a1[i]);
      a2[j] = sat(acc, 1);
    end
    for (int j = 0; j < 4; j++) begin
      longint acc;
      base = 435 + j * 16;
      acc = longint'(wm[base]) * 256;
      for (int i = 0; i < 15; i++) acc += longint'(wm[base + 1 + i]) * longint'(a2[i]);
      q[j] = sat(acc, 0);
    end
  endtask

  initial begin
    logic signed [15:0] qe [4];
    int bi, t, explored_cnt;
    w_we = 0; w_addr = 0; w_data = 0; start = 0;
    for (int i = 0; i < 12; i++) state_vec[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    explored_cnt = 0;
    for (int trial = 0; trial < 6; trial++) begin
      for (int a = 0; a < NW; a++) begin
        @(negedge clk);
        wm[a] = 16'($signed($urandom_range(0, 255)) - 128);   // about +-0.5
        w_we = 1; w_addr = 9'(a); w_data = wm[a];
      end
      @(negedge clk);
      w_we = 0;
      for (int i = 0; i < 12; i++) state_vec[i] = 16'($urandom_range(0, 255));
      model(qe);
      bi = 0;
      for (int j = 1; j < 4; j++) if (qe[j] > qe[bi]) bi = j;
      start = 1;
      @(negedge clk);
      start = 0;
      for (int i = 0; i < 12; i++) state_vec[i] = '0;   // the controller keeps its copy
      t = 1;
      while (!action_valid && t < 2000) begin @(negedge clk); t++; end
      checks++;
      if (t != LATENCY) begin failures++; $display("FAIL latency %0d", t); end
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (q_out[j] != qe[j]) begin failures++; $display("FAIL q%0d %0d exp %0d", j, q_out[j], qe[j]); end
      end
      checks++;
      if (action != 2'(bi) || explored) begin failures++; $display("FAIL action %0d exp %0d", action, bi); end
      checks++;
      if (!av2) failures++;
      if (ex2) explored_cnt++;
    end
    checks++;
    if (explored_cnt < 5) begin failures++; $display("FAIL exploration %0d", explored_cnt); end
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
