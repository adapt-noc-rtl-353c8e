// tb_adaptable_link: random segmentations and directions. The expected value
// at every position is worked out by walking from the position upstream
// along enabled stages of the matching direction until a driving router is
// found.
module tb_adaptable_link;
  localparam int N = 8, W = 12;
  logic [N-2:0] rep_on, dir;
  logic [N-1:0] tx_fw_en, tx_bw_en;
  logic [W-1:0] tx_fw [N], tx_bw [N], rx_fw [N], rx_bw [N];
  int checks = 0, failures = 0;

  adaptable_link #(.N(N), .W(W)) dut (.*);

  initial begin
    for (int t = 0; t < 500; t++) begin
      rep_on = (N-1)'($urandom); dir = (N-1)'($urandom);
      tx_fw_en = N'($urandom); tx_bw_en = N'($urandom);
      for (int i = 0; i < N; i++) begin tx_fw[i] = W'($urandom); tx_bw[i] = W'($urandom); end
      #1;
      for (int i = 0; i < N; i++) begin
        logic [W-1:0] e;
        int j;
        // travelling up: stage i-1 must be on and forward
        e = '0; j = i;
        while (j > 0 && rep_on[j-1] && !dir[j-1]) begin
          if (tx_fw_en[j-1]) begin e = tx_fw[j-1]; break; end
          j--;
        end
        checks++;
        if (rx_fw[i] !== e) begin failures++; $display("FAIL fw pos %0d", i); end
        e = '0; j = i;
        while (j < N - 1 && rep_on[j] && dir[j]) begin
          if (tx_bw_en[j+1]) begin e = tx_bw[j+1]; break; end
          j++;
        end
        checks++;
        if (rx_bw[i] !== e) begin failures++; $display("FAIL bw pos %0d", i); end
      end
    end
    // the segmentation example: R0->R2 forward, R2->R3 backward
    rep_on = 7'b0000011; dir = '0; tx_fw_en = 8'b1; tx_bw_en = '0;
    tx_fw[0] = 12'hABC;
    #1;
    checks++;
    if (rx_fw[2] !== 12'hABC || rx_fw[3] !== '0) failures++;
    rep_on = 7'b0000111; dir = 7'b0000100; tx_fw_en = 8'b1; tx_bw_en = 8'b1000;
    tx_bw[3] = 12'h123;
    #1;
    checks++;
    if (rx_fw[2] !== 12'hABC || rx_bw[2] !== 12'h123) failures++;
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
