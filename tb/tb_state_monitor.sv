// tb_state_monitor: drives random events for one epoch over a subNoC of 8
// nodes and checks each normalised attribute against floor(256*count/max),
// saturated to 255, with max = EPOCH * nodes * per-cycle maximum.
module tb_state_monitor;
  import adapt_pkg::*;
  localparam int EPOCH = 300;
  logic clk = 0, rst_n = 0;
  logic epoch_end, state_valid;
  logic [NODES-1:0] member, inj_coh, inj_data;
  logic [3:0] core_evt [NODES];
  logic [7:0] occ_total [NODES];
  logic [3:0] occ_local [NODES];
  logic [2:0] flits_sw [NODES];
  topo_e cur_topo;
  logic [XW:0] w;
  logic [YW:0] h;
  logic [15:0] state_vec [12];
  int checks = 0, failures = 0;
  longint cnt [9];

  state_monitor #(.EPOCH(EPOCH)) dut (.*);
  always #5 clk = ~clk;

  task automatic run_epoch(input int scale);
    for (int a = 0; a < 9; a++) cnt[a] = 0;
    for (int c = 0; c < EPOCH; c++) begin
      @(negedge clk);
      epoch_end = (c == EPOCH - 1);
      for (int n = 0; n < NODES; n++) begin
        core_evt[n]  = 4'($urandom) & (scale > 0 ? 4'hF : 4'h1);
        inj_coh[n]   = ($urandom_range(0, 3) == 0);
        inj_data[n]  = ($urandom_range(0, 5) == 0);
        occ_total[n] = 8'($urandom_range(0, 80));
        occ_local[n] = 4'($urandom_range(0, 16 / (scale + 1)));
        flits_sw[n]  = 3'($urandom_range(0, 5));
        if (member[n]) begin
          for (int e = 0; e < 4; e++) cnt[e] += core_evt[n][e];
          cnt[4] += inj_coh[n]; cnt[5] += inj_data[n];
          cnt[6] += occ_total[n]; cnt[7] += occ_local[n]; cnt[8] += flits_sw[n];
        end
      end
    end
    @(negedge clk);
    epoch_end = 0;
    for (int n = 0; n < NODES; n++) begin
      core_evt[n] = '0; occ_total[n] = '0; occ_local[n] = '0; flits_sw[n] = '0;
    end
    inj_coh = '0; inj_data = '0;
  endtask

  task automatic check_vec();
    longint mx [9];
    int t;
    for (int a = 0; a < 9; a++) mx[a] = longint'(EPOCH) * 8;
    mx[6] *= 80; mx[7] *= 16; mx[8] *= 5;
    t = 0;
    while (!state_valid && t < 200) begin @(negedge clk); t++; end
    checks++;
    if (!state_valid) begin failures++; $display("FAIL no state_valid"); end
    checks++;
    if (t > 80) begin failures++; $display("FAIL divider took %0d cycles", t); end
    for (int a = 0; a < 9; a++) begin
      longint e;
      e = (cnt[a] * 256) / mx[a];
      if (e > 255) e = 255;
      checks++;
      if (state_vec[a] != 16'(e)) begin
        failures++;
        $display("FAIL attr %0d got %h exp %h (cnt %0d)", a, state_vec[a], e, cnt[a]);
      end
    end
    checks++;
    if (state_vec[9] != 16'h0080 || state_vec[10] != 16'h0040 || state_vec[11] != 16'h0080) begin
      failures++; $display("FAIL topology attributes");
    end
  endtask

  initial begin
    for (int a = 0; a < 9; a++) cnt[a] = 0;
    epoch_end = 0; cur_topo = TOPO_TORUS; w = 2; h = 4;
    member = '0;
    for (int y = 2; y < 6; y++) for (int x = 4; x < 6; x++) member[y*8+x] = 1'b1;
    for (int n = 0; n < NODES; n++) begin
      core_evt[n] = '0; occ_total[n] = '0; occ_local[n] = '0; flits_sw[n] = '0;
    end
    inj_coh = '0; inj_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_epoch(0);
    check_vec();
    run_epoch(1);
    check_vec();
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
