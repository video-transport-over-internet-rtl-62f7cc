// Self-checking testbench of the emulation's sampler and PI controller,
// with a 10-cycle sampling interval. A random offset is driven every cycle;
// the testbench keeps its own integrator and checks that a tick comes exactly
// every SAMPLE_CYCLES cycles and that each command equals o + sum(o) of the
// offsets seen at the ticks (P = I = 1), one cycle after the tick.
`timescale 1ns/1ps
module tb_emu_pi;
  localparam int W = 32, N = 10;
  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] offset, cmd;
  logic tick, cmd_valid;
  int checks = 0, failures = 0, ticks = 0;
  longint acc = 0, exp_cmd = 0;
  int last_tick = -1;

  emu_pi #(.W(W), .SAMPLE_CYCLES(N)) dut (.*);
  always #4 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    offset = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      bit was_tick;
      @(negedge clk);
      offset = $signed($urandom_range(0, 2000)) - 1000;
      was_tick = tick;
      if (tick) begin
        ticks++;
        if (last_tick >= 0) begin
          checks++;
          if (cyc - last_tick != N) begin failures++; $display("FAIL tick spacing %0d", cyc - last_tick); end
        end
        last_tick = cyc;
        acc += offset;
        exp_cmd = offset + acc;
      end
      @(posedge clk); #1;
      checks++;
      if (cmd_valid != was_tick) begin failures++; $display("FAIL cmd_valid at cycle %0d", cyc); end
      if (was_tick) begin
        checks++;
        if (longint'(cmd) != exp_cmd) begin
          failures++;
          if (failures < 10) $display("FAIL cmd %0d expected %0d", cmd, exp_cmd);
        end
      end
    end
    checks++; if (ticks < 2000 / N - 1) begin failures++; $display("FAIL only %0d ticks", ticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
