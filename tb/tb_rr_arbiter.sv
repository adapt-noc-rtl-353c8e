// tb_rr_arbiter: random request patterns; the grant must be the first
// requester after the last granted one (rotating priority), and a
// permanently requesting input must be served within N grants.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic advance, any;
  int checks = 0, failures = 0;
  int last = N - 1;
  int wait0 = 0;

  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    req = '0; advance = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int exp_idx;
      @(negedge clk);
      req = N'($urandom) | 1'b1;    // input 0 always requests
      advance = ($urandom_range(0, 3) != 0);
      #1;
      exp_idx = -1;
      for (int k = 1; k <= N; k++)
        if (exp_idx < 0 && req[(last + k) % N]) exp_idx = (last + k) % N;
      checks++;
      if (gnt != (N'(1) << exp_idx) || !any) begin
        failures++;
        $display("FAIL cyc %0d req %b gnt %b expected %0d", cyc, req, gnt, exp_idx);
      end
      @(posedge clk);
      if (advance) begin
        last = exp_idx;
        if (exp_idx == 0) wait0 = 0; else wait0++;
        checks++;
        if (wait0 >= N) begin failures++; $display("FAIL starvation"); end
      end
    end
    @(negedge clk);
    req = '0; #1;
    checks++;
    if (any || gnt != 0) failures++;
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
