// Real-time counter of the PTP adjustable clock, clocked by the HDMI clock.
//
// It counts the time since an epoch as a 48-bit seconds count and a
// nanoseconds count below 10^9. Every HDMI clock cycle the nanoseconds grow
// by period_ns (8 ns at 125 MHz). The next nanoseconds value is formed first;
// 10^9 is subtracted from it, and when the difference is not negative the
// second has rolled over: the nanoseconds take the difference and the seconds
// count one up. This rollover path is the one of the original design.
//
// Time offsets: offset_ns (signed) is added to the next nanoseconds value in
// the cycle offset_ns_valid is high; offset_s (signed) is added to the
// seconds in the cycle offset_s_valid is high. Both may come in the same cycle.
// Because software writes negative nanosecond offsets (new time minus current
// time), this design also borrows from the seconds when the next nanoseconds
// value falls below zero; offsets are expected within +/-(10^9 - 1) ns.
//
// Frequency command: ppm_valid loads ppm_cmd, saturated to the 22-bit signed
// range, into offset_ppm, the OFFSET_PPM word of the PICXO that tunes the HDMI
// clock; offset_en (the PICXO's OFFSET_EN) rises with the first such command
// and stays high.
//
// Timing: all outputs are registers; an offset or command presented in a
// cycle shows on the outputs after the next rising edge.
//
// Rollover by subtracting 10^9 from the next value follows the original
// design; the borrow path for negative offsets and the PPM saturation are this
// design's additions.
module rtc
  import ptp_clk_pkg::*;
#(
  parameter int unsigned PERIOD_W = 8
) (
  input  logic                       clk,          // HDMI clock
  input  logic                       rst_n,
  input  logic [PERIOD_W-1:0]        period_ns,    // HDMI clock period in ns
  input  logic signed [DATA_W-1:0]   offset_s,
  input  logic                       offset_s_valid,
  input  logic signed [DATA_W-1:0]   offset_ns,
  input  logic                       offset_ns_valid,
  input  logic signed [DATA_W-1:0]   ppm_cmd,
  input  logic                       ppm_valid,
  output logic [SEC_W-1:0]           seconds,
  output logic [NS_W-1:0]            nanoseconds,
  output logic signed [PPM_W-1:0]    offset_ppm,
  output logic                       offset_en
);
  localparam int unsigned SUM_W = NS_W + 3;   // room for ns + offset, signed

  logic signed [SUM_W-1:0] ns_sum, ns_wrap, ns_unwrap;
  logic signed [SEC_W-1:0] sec_add;
  logic                    rollover, borrow;

  always_comb begin
    ns_sum = signed'({3'b000, nanoseconds})
           + signed'(SUM_W'(period_ns))
           + (offset_ns_valid ? SUM_W'(offset_ns) : '0);
    ns_wrap   = ns_sum - SUM_W'(NS_PER_S);    // negative means no rollover
    ns_unwrap = ns_sum + SUM_W'(NS_PER_S);
    rollover  = !ns_wrap[SUM_W-1];
    borrow    = ns_sum[SUM_W-1];
    sec_add   = (offset_s_valid ? SEC_W'(offset_s) : '0)
              + (rollover ? SEC_W'(1) : '0)
              - (borrow   ? SEC_W'(1) : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seconds     <= '0;
      nanoseconds <= '0;
    end else begin
      nanoseconds <= rollover ? NS_W'(ns_wrap) : borrow ? NS_W'(ns_unwrap) : NS_W'(ns_sum);
      if (offset_s_valid || rollover || borrow)
        seconds <= seconds + sec_add;
    end
  end

  localparam logic signed [DATA_W-1:0] PPM_MAX = DATA_W'((1 << (PPM_W-1)) - 1);
  localparam logic signed [DATA_W-1:0] PPM_MIN = -DATA_W'(1 << (PPM_W-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset_ppm <= '0;
      offset_en  <= 1'b0;
    end else if (ppm_valid) begin
      offset_en  <= 1'b1;
      if (ppm_cmd > PPM_MAX)      offset_ppm <= PPM_MAX[PPM_W-1:0];
      else if (ppm_cmd < PPM_MIN) offset_ppm <= PPM_MIN[PPM_W-1:0];
      else                        offset_ppm <= ppm_cmd[PPM_W-1:0];
    end
  end

  // The nanoseconds count never reaches one second
  a_ns_range: assert property (@(posedge clk) disable iff (!rst_n) nanoseconds < NS_PER_S);
endmodule
