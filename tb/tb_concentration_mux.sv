// tb_concentration_mux: four cores compete for one injection port. Only
// enabled cores whose virtual channel has room may be granted, at most one
// per cycle, nothing while hold is set, every enabled requester is served
// within four grants, and ejected flits reach exactly the addressed core.
module tb_concentration_mux;
  import adapt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] core_en, core_valid, core_ready, ej_valid;
  logic hold;
  logic [NODE_W-1:0] core_id [4];
  flit_t core_flit [4];
  link_t to_router, from_router;
  logic [NUM_VC-1:0] inj_ready;
  flit_t ej_flit;
  int checks = 0, failures = 0;
  int waitc [4];

  concentration_mux dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    core_id = '{6'd18, 6'd19, 6'd26, 6'd27};
    core_en = '1; hold = 0; core_valid = '0; inj_ready = '1; from_router = '0;
    for (int k = 0; k < 4; k++) begin core_flit[k] = '0; waitc[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int g;
      @(negedge clk);
      if (cyc % 500 == 0) core_en = (cyc < 1500) ? 4'hF : 4'($urandom);
      hold = ($urandom_range(0, 9) == 0);
      inj_ready = NUM_VC'($urandom) | ((cyc < 1500) ? 4'b0101 : 4'b0);
      for (int k = 0; k < 4; k++) begin
        core_valid[k] = ($urandom_range(0, 3) != 0);
        core_flit[k] = flit_t'({$urandom, $urandom});
        core_flit[k].hdr.src = core_id[k];
      end
      from_router.valid = $urandom_range(0, 1);
      from_router.flit = '0;
      from_router.flit.hdr.dst = core_id[$urandom_range(0, 3)];
      if ($urandom_range(0, 7) == 0) from_router.flit.hdr.dst = 6'd5;
      #1;
      check($onehot0(core_ready), "one grant");
      g = -1;
      for (int k = 0; k < 4; k++) if (core_ready[k]) g = k;
      if (g >= 0) begin
        check(core_en[g] && core_valid[g] && !hold &&
              inj_ready[{core_flit[g].hdr.vnet, 1'b0}], "grant legal");
        check(to_router.valid && to_router.flit == core_flit[g] &&
              to_router.vc == {core_flit[g].hdr.vnet, 1'b0}, "flit forwarded");
      end else begin
        check(!to_router.valid, "no flit without grant");
        for (int k = 0; k < 4; k++)
          check(!(core_en[k] && core_valid[k] && !hold &&
                  inj_ready[{core_flit[k].hdr.vnet, 1'b0}]), "work conserving");
      end
      for (int k = 0; k < 4; k++) begin
        logic req;
        req = core_en[k] && core_valid[k] && !hold && inj_ready[{core_flit[k].hdr.vnet, 1'b0}];
        if (req && g != k) waitc[k]++;
        else waitc[k] = 0;
        check(waitc[k] < 4, "fairness");
        check(ej_valid[k] == (from_router.valid && core_en[k] &&
                              from_router.flit.hdr.dst == core_id[k]), "ejection demux");
      end
      check(ej_flit == from_router.flit, "ejection data");
    end
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
