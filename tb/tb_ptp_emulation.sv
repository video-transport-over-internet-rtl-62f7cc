// Closed-loop testbench of the hardware PTP emulation.
// The reference clock is an ideal 125 MHz clock; the HDMI clock comes from a
// behavioural PICXO model whose crystal is XTAL_PPM off and which follows
// the emulation's OFFSET_PPM command. The sampling interval is shortened to
// 2^16 cycles (about 0.5 ms) so that many intervals fit in the run; one tick
// of offset per interval is then 15.3 ppm. Checks: the reset skew makes the
// first command saturate; afterwards the offset sampled at each tick must
// settle within +/-1 tick and stay there, and the frequency command must
// settle to cancel the crystal error to within one tick per interval.
`timescale 1ns/1fs
module tb_ptp_emulation;
  localparam int W = 32;
  localparam int N = 65536;
  localparam real XTAL_PPM = 47.0;

  logic ref_clk = 0, ref_rst_n = 0, hdmi_clk, hdmi_rst_n = 0;
  logic signed [21:0] offset_ppm;
  logic offset_en, tick;
  logic signed [W-1:0] offset, cmd;

  int checks = 0, failures = 0, intervals = 0, sat = 0, locked = 0;

  ptp_emulation #(.W(W), .SAMPLE_CYCLES(N)) dut (.*);

  picxo_hdmi_model #(.NOMINAL_NS(8.0), .XTAL_PPM(XTAL_PPM), .START_NS(1.7)) u_picxo (
    .offset_ppm, .offset_en, .clk(hdmi_clk)
  );

  always #4 ref_clk = ~ref_clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20 ref_rst_n = 1;
    #80 hdmi_rst_n = 1;   // slave starts about 10 ticks behind
  end

  always @(posedge hdmi_clk) begin
    if (hdmi_rst_n && tick) begin
      intervals++;
      if (offset_ppm == 22'sh1FFFFF || offset_ppm == -22'sh200000) sat++;
      if (intervals <= 12 || intervals % 10 == 0)
        $display("interval %0d: offset %0d ticks, cmd %0d, OFFSET_PPM %0d (%.2f ppm)",
                 intervals, offset, cmd, offset_ppm, real'(offset_ppm) / 8589.9346);
      if (intervals > 15) begin
        checks++;
        if (offset > 1 || offset < -1) begin
          failures++;
          $display("FAIL offset %0d ticks after lock at interval %0d", offset, intervals);
        end else locked++;
        // the command must cancel the crystal error to one tick per interval
        checks++;
        if ((real'(offset_ppm) / 8589.9346 + XTAL_PPM) > 2.0 * 1.0e6 / N ||
            (real'(offset_ppm) / 8589.9346 + XTAL_PPM) < -2.0 * 1.0e6 / N) begin
          failures++;
          $display("FAIL residual frequency error %.2f ppm", real'(offset_ppm) / 8589.9346 + XTAL_PPM);
        end
      end
      if (intervals == 60) begin
        checks++; if (sat == 0) begin failures++; $display("FAIL command never saturated"); end
        checks++; if (!offset_en) begin failures++; $display("FAIL offset_en low"); end
        $display("intervals=%0d saturated=%0d locked=%0d", intervals, sat, locked);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
