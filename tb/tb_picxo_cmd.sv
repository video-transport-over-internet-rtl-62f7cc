// Self-checking testbench of the PICXO command formatter at its default
// one-second interval of 125 000 000 cycles, where one tick per interval is
// 0.008 ppm, i.e. 68.72 OFFSET_PPM LSBs. Random commands are applied; the
// output must be within one LSB of the floor of the exact real-valued product,
// saturate at the 22-bit limits, change only on cmd_valid, and raise
// offset_en with the first command.
`timescale 1ns/1ps
module tb_picxo_cmd;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] cmd;
  logic cmd_valid;
  logic signed [21:0] offset_ppm;
  logic offset_en;
  int checks = 0, failures = 0, sats = 0;

  picxo_cmd dut (.*);
  always #4 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real    exact;
    longint exp_lo, exp_hi, held;
    cmd = 0; cmd_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    checks++; if (offset_en !== 1'b0) begin failures++; $display("FAIL offset_en before a command"); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: cmd = $signed($urandom_range(0, 200)) - 100;
        1: cmd = $signed($urandom_range(0, 60000)) - 30000;
        2: cmd = 32'sd40000 + $signed($urandom_range(0, 100000));
        default: cmd = -32'sd40000 - $signed($urandom_range(0, 100000));
      endcase
      cmd_valid = (i % 3 != 2);
      held = offset_ppm;
      exact = real'(cmd) * 8589.9346 * 1.0e6 / 125.0e6;
      exp_hi = longint'($floor(exact));
      exp_lo = exp_hi - 1;
      exp_hi = exp_hi + 1;
      if (exp_hi > 2097151) begin exp_hi = 2097151; exp_lo = 2097151; sats++; end
      if (exp_lo < -2097152) begin exp_hi = -2097152; exp_lo = -2097152; sats++; end
      @(posedge clk); #1;
      checks++;
      if (cmd_valid) begin
        if (longint'(offset_ppm) < exp_lo || longint'(offset_ppm) > exp_hi) begin
          failures++;
          if (failures < 10) $display("FAIL cmd %0d -> %0d, expected %0d..%0d", cmd, offset_ppm, exp_lo, exp_hi);
        end
        checks++; if (!offset_en) begin failures++; $display("FAIL offset_en low"); end
      end else if (longint'(offset_ppm) != held) begin
        failures++; $display("FAIL output moved without cmd_valid");
      end
    end
    checks++; if (sats == 0) begin failures++; $display("FAIL no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
