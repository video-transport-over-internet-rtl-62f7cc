// Self-checking testbench of the Gray counter: the output is decoded to
// binary in the testbench and must count up by one on each enabled edge,
// hold when disabled, change in exactly one bit per step, and wrap at 2^W
// (W = 8 here so the wrap is reached).
`timescale 1ns/1ps
module tb_gray_counter;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] gray, prev_gray;
  int checks = 0, failures = 0, wraps = 0, holds = 0;
  int unsigned exp_cnt = 0;

  gray_counter #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic int unsigned g2b(input logic [W-1:0] g);
    int unsigned b = 0;
    for (int i = W - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    prev_gray = gray;
    checks++; if (gray != 0) begin failures++; $display("FAIL not zero after reset"); end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 9) != 0);
      @(posedge clk); #1;
      if (en) begin
        exp_cnt = (exp_cnt + 1) % (1 << W);
        if (exp_cnt == 0) wraps++;
        checks++;
        if ($countones(gray ^ prev_gray) != 1) begin failures++; $display("FAIL %0d bits changed", $countones(gray ^ prev_gray)); end
      end else holds++;
      checks++;
      if (g2b(gray) != exp_cnt) begin
        failures++;
        if (failures < 10) $display("FAIL count %0d expected %0d", g2b(gray), exp_cnt);
      end
      prev_gray = gray;
    end
    checks++; if (wraps == 0 || holds == 0) begin failures++; $display("FAIL no wrap or hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
