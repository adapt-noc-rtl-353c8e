// tb_vc_buffer: random pushes and pops against a queue model; checks data
// order, count, full and empty flags.
module tb_vc_buffer;
  localparam int DEPTH = 4, WIDTH = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, empty, full;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];

  vc_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      rd_en   = (model.size() > 0) && ($urandom_range(0, 1) == 1);
      wr_en   = (model.size() < DEPTH || rd_en) && ($urandom_range(0, 2) != 0);
      wr_data = WIDTH'($urandom);
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      wr_en = 0; rd_en = 0;
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
