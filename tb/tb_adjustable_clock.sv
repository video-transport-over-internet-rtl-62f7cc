// Self-checking testbench of the adjustable clock with its AXI clock
// (100 MHz) and HDMI clock (125 MHz) unrelated in phase.
// A monitor on the HDMI clock checks that the time outputs advance by exactly
// 8 ns per cycle, except where a written offset lands; each such jump must
// equal the next offset written over AXI, in order, and arrive within a
// bounded number of cycles. The driver then does what the PTP software does:
// sample and read the time (it must lie between the outputs seen before the
// sample write and after the last read), step the clock to a target epoch
// time the way settimeofday does, apply a nanosecond offset and a frequency
// command the way adjtimex does, and cross a second boundary.
`timescale 1ns/1ps
module tb_adjustable_clock;
  import ptp_clk_pkg::*;

  logic aclk = 0, aresetn = 0, hdmi_clk = 0, hdmi_rst_n = 0;
  logic [4:0]  s_axi_awaddr, s_axi_araddr;
  logic        s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [3:0]  s_axi_wstrb;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        s_axi_bvalid, s_axi_bready, s_axi_arvalid, s_axi_arready;
  logic        s_axi_rvalid, s_axi_rready;
  logic [47:0] seconds;
  logic [31:0] nanoseconds;
  logic signed [21:0] offset_ppm;
  logic offset_en;

  int checks = 0, failures = 0;
  int jumps = 0, rollovers = 0, max_latency = 0;

  adjustable_clock dut (.*);

  always #5 aclk = ~aclk;
  initial begin #1.3; forever #4 hdmi_clk = ~hdmi_clk; end

  `include "axil_tasks.svh"

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint now_ns();
    return longint'(seconds) * 1_000_000_000 + longint'(nanoseconds);
  endfunction

  // ---- expected jumps, in write order ----
  longint exp_jump[$];
  longint exp_write_cyc[$];
  longint hcyc = 0;

  always @(posedge hdmi_clk) hcyc <= hcyc + 1;

  // ---- monitor ----
  longint prev;
  bit     prev_ok = 0;
  always @(posedge hdmi_clk) begin
    #0.5;
    if (hdmi_rst_n) begin
      if (prev_ok) begin
        longint d;
        d = now_ns() - prev;
        if (nanoseconds < 8 && prev % 1_000_000_000 >= 999_999_992) rollovers++;
        if (d != 8) begin
          jumps++;
          checks++;
          if (exp_jump.size() == 0) begin
            failures++; $display("FAIL unexpected jump %0d at %0t", d - 8, $time);
          end else begin
            longint e, lat;
            e   = exp_jump.pop_front();
            lat = hcyc - exp_write_cyc.pop_front();
            if (lat > max_latency) max_latency = int'(lat);
            if (d - 8 != e) begin
              failures++; $display("FAIL jump %0d expected %0d at %0t", d - 8, e, $time);
            end
          end
        end else checks++;
      end
      prev = now_ns();
      prev_ok = 1;
    end
  end

  logic [1:0]  resp;
  logic [31:0] rd;

  task automatic wr(input int idx, input logic [31:0] d);
    if (idx <= 1) begin
      exp_jump.push_back(idx == 0 ? longint'($signed(d)) * 1_000_000_000 : longint'($signed(d)));
      exp_write_cyc.push_back(hcyc);
    end
    axil_write(5'(idx * 4), d, resp);
    check("bresp", resp, 0);
  endtask

  // gettimeofday: sample, then read MSB, LSB, ns
  task automatic get_time(output longint sec, output longint ns);
    longint lo, hi;
    while (exp_jump.size() != 0) @(posedge hdmi_clk);
    @(negedge hdmi_clk);
    lo = now_ns();
    wr(3, 1);
    axil_read(5'h10, rd, resp); sec = longint'(rd) << 32;
    axil_read(5'h14, rd, resp); sec |= longint'(rd);
    axil_read(5'h18, rd, resp); ns = longint'(rd);
    hi = now_ns();
    checks++;
    if (sec * 1_000_000_000 + ns < lo || sec * 1_000_000_000 + ns > hi) begin
      failures++;
      $display("FAIL sampled time %0d.%09d outside [%0d, %0d]", sec, ns, lo, hi);
    end
  endtask

  initial begin
    longint s, n, s2, n2;
    axil_idle();
    repeat (4) @(posedge aclk);
    aresetn = 1; hdmi_rst_n = 1;
    repeat (20) @(posedge aclk);

    // first read of the time
    get_time(s, n);
    check("seconds after reset", s, 0);

    // settimeofday to the epoch time 1528378844.738925482: the seconds
    // offset is split into writes that fit the signed 32-bit register
    get_time(s, n);
    wr(0, 32'sd1_000_000_000);
    wr(0, 32'sd528_378_844 - 32'(s));
    wr(1, 32'(738_925_482 - n));
    get_time(s2, n2);
    check("settimeofday seconds", s2, 1_528_378_844);
    checks++;
    if (n2 < 738_925_482 || n2 > 738_925_482 + 5000) begin
      failures++; $display("FAIL settimeofday ns %0d", n2);
    end

    // large seconds: push the count past 2^32 to exercise the MSB register
    wr(0, 32'sh7FFF_FFFF);
    wr(0, 32'sh7FFF_FFFF);
    get_time(s, n);
    check("seconds past 2^32", s, 1_528_378_844 + 2 * 64'h7FFF_FFFF);
    checks++; if ((s >> 32) == 0) begin failures++; $display("FAIL MSB register still zero"); end

    // adjtimex: negative nanosecond offset larger than the current ns
    get_time(s, n);
    wr(1, -32'(n + 100_000));
    get_time(s2, n2);
    check("borrow into seconds", s2, s - 1);

    // cross a second boundary: put the counter 2 us before the next second
    get_time(s, n);
    wr(1, 32'(999_998_000 - n - 200));
    repeat (600) @(posedge aclk);
    get_time(s2, n2);
    check("second rolled over", s2, s + 1);

    // frequency command (adjtimex freq): 10 ppm * 8589.9346 LSB/ppm
    wr(2, 32'sd85899);
    repeat (10) @(posedge hdmi_clk);
    check("offset_ppm", offset_ppm, 85899);
    check("offset_en", offset_en, 1);
    wr(2, -32'sd2_061_584);   // -240 ppm, the software's anti-windup limit
    repeat (10) @(posedge hdmi_clk);
    check("offset_ppm negative", offset_ppm, -2_061_584);
    axil_read(5'h08, rd, resp);
    check("Update PPM readback", $signed(rd), -2_061_584);

    // a burst of offsets written back to back: order and count preserved
    for (int i = 0; i < 40; i++) wr(1, 32'(($urandom_range(0, 2000)) - 1000));
    repeat (100) @(posedge hdmi_clk);
    check("all jumps applied", exp_jump.size(), 0);

    checks++; if (rollovers == 0) begin failures++; $display("FAIL no rollover seen"); end
    checks++;
    if (max_latency > 12) begin failures++; $display("FAIL command latency %0d HDMI cycles", max_latency); end
    $display("jumps=%0d rollovers=%0d max_latency=%0d HDMI cycles", jumps, rollovers, max_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
