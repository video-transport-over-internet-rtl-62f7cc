// Self-checking testbench of the real-time counter.
// A cycle-by-cycle reference model (seconds plus a signed nanoseconds
// accumulator normalised into [0, 10^9)) is compared with the counter after
// every clock edge while random positive and negative time offsets and
// frequency commands are applied. Checks: the counter advances by exactly
// period_ns per cycle, rolls over and borrows correctly, applies offsets in
// one cycle, and saturates the 22-bit PPM command.
`timescale 1ns/1ps
module tb_rtc;
  import ptp_clk_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [31:0] offset_s, offset_ns, ppm_cmd;
  logic offset_s_valid, offset_ns_valid, ppm_valid;
  logic [47:0] seconds;
  logic [31:0] nanoseconds;
  logic signed [21:0] offset_ppm;
  logic offset_en;

  int checks = 0, failures = 0;
  int rollovers = 0, borrows = 0, sat_hi = 0, sat_lo = 0;

  rtc #(.PERIOD_W(8)) dut (
    .clk, .rst_n, .period_ns(8'd8),
    .offset_s, .offset_s_valid, .offset_ns, .offset_ns_valid,
    .ppm_cmd, .ppm_valid, .seconds, .nanoseconds, .offset_ppm, .offset_en
  );

  always #4 clk = ~clk;

  // reference model
  longint m_sec, m_ns;
  longint m_ppm;
  bit     m_en;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    offset_s = 0; offset_ns = 0; ppm_cmd = 0;
    offset_s_valid = 0; offset_ns_valid = 0; ppm_valid = 0;
    m_sec = 0; m_ns = 0; m_ppm = 0; m_en = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // drive on the falling edge, model and compare after the rising edge
    for (int cyc = 0; cyc < 100000; cyc++) begin
      @(negedge clk);
      offset_s_valid  = ($urandom_range(0, 499) == 0);
      offset_s        = $signed($urandom_range(0, 2000)) - 1000;
      offset_ns_valid = ($urandom_range(0, 99) == 0) || cyc == 10;
      offset_ns       = (cyc == 10) ? 999_999_000 :
                        ($urandom_range(0, 1) == 1 ? $signed($urandom_range(0, 999_999_999))
                                              : -$signed($urandom_range(0, 999_999_999)));
      ppm_valid       = ($urandom_range(0, 199) == 0);
      case ($urandom_range(0, 2))
        0: ppm_cmd = $signed($urandom_range(0, 4_000_000)) - 2_000_000;
        1: ppm_cmd = 32'sd3_000_000 + $signed($urandom_range(0, 1000));
        default: ppm_cmd = -32'sd3_000_000 - $signed($urandom_range(0, 1000));
      endcase
      // model of the next state
      m_ns = m_ns + 8 + (offset_ns_valid ? longint'(offset_ns) : 0);
      if (m_ns >= 1_000_000_000) begin m_ns -= 1_000_000_000; m_sec += 1; rollovers++; end
      else if (m_ns < 0)         begin m_ns += 1_000_000_000; m_sec -= 1; borrows++; end
      if (offset_s_valid) m_sec += longint'(offset_s);
      if (ppm_valid) begin
        m_en = 1;
        if (ppm_cmd > 2097151)       begin m_ppm = 2097151;  sat_hi++; end
        else if (ppm_cmd < -2097152) begin m_ppm = -2097152; sat_lo++; end
        else m_ppm = longint'(ppm_cmd);
      end
      @(posedge clk); #1;
      check("nanoseconds", longint'(nanoseconds), m_ns);
      check("seconds",     longint'(seconds), m_sec & 64'hFFFF_FFFF_FFFF);
      check("offset_ppm",  longint'(offset_ppm), m_ppm);
      check("offset_en",   longint'(offset_en), longint'(m_en));
    end
    // free run: exactly 125_000_000 cycles of 8 ns make one second; check
    // the rate over a shorter stretch: 1000 cycles = 8000 ns
    @(negedge clk);
    offset_s_valid = 0; offset_ns_valid = 0; ppm_valid = 0;
    begin
      longint t0, t1;
      @(posedge clk); #1 t0 = longint'(seconds) * 1_000_000_000 + longint'(nanoseconds);
      repeat (1000) @(posedge clk);
      #1 t1 = longint'(seconds) * 1_000_000_000 + longint'(nanoseconds);
      check("8 ns per cycle over 1000 cycles", t1 - t0, 8000);
    end
    checks++; if (rollovers == 0) begin failures++; $display("FAIL no rollover seen"); end
    checks++; if (borrows == 0)   begin failures++; $display("FAIL no borrow seen"); end
    checks++; if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("FAIL no saturation seen"); end
    $display("rollovers=%0d borrows=%0d sat_hi=%0d sat_lo=%0d", rollovers, borrows, sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
