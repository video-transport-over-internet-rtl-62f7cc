// Full-size testbench of the top level: every parameter at its default
// (125 MHz clocks, one-second sampling interval of the emulation).
// It takes the design through one complete operation of each side:
//  * adjustable clock - reset, step to an epoch time with seconds and
//    nanoseconds offsets, read the time back, send a frequency command and
//    see the PICXO model apply it (HDMI edges counted over 1 ms);
//  * emulation - the slave starts a known number of ticks behind; at the
//    first one-second tick the sampled offset, the PI command (2 x offset for
//    the first sample) and the scaled OFFSET_PPM word are checked.
// The AXI clock is stopped once the processor-side work is done, to keep the
// one-second run short.
`timescale 1ns/1fs
module tb_ptp_sync_top_full;
  import ptp_clk_pkg::*;

  logic aclk = 0, aresetn = 0, hdmi_clk, hdmi_rst_n = 0;
  logic [4:0]  s_axi_awaddr, s_axi_araddr;
  logic        s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [3:0]  s_axi_wstrb;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        s_axi_bvalid, s_axi_bready, s_axi_arvalid, s_axi_arready;
  logic        s_axi_rvalid, s_axi_rready;
  logic [47:0] clk_seconds;
  logic [31:0] clk_nanoseconds;
  logic signed [21:0] clk_offset_ppm, emu_offset_ppm;
  logic clk_offset_en, emu_offset_en, emu_tick;
  logic emu_ref_clk = 0, emu_ref_rst_n = 0, emu_hdmi_clk, emu_hdmi_rst_n = 0;
  logic signed [31:0] emu_offset, emu_cmd;
  bit   aclk_on = 1;

  int checks = 0, failures = 0;

  ptp_sync_top dut (.*);

  picxo_hdmi_model #(.XTAL_PPM(0.0), .START_NS(0.9)) u_picxo (
    .offset_ppm(clk_offset_ppm), .offset_en(clk_offset_en), .clk(hdmi_clk));
  picxo_hdmi_model #(.XTAL_PPM(0.0), .START_NS(2.3)) u_emu_picxo (
    .offset_ppm(emu_offset_ppm), .offset_en(emu_offset_en), .clk(emu_hdmi_clk));

  always #5 if (aclk_on) aclk = ~aclk;
  always #4 emu_ref_clk = ~emu_ref_clk;

  `include "axil_tasks.svh"

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #1_100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0]  resp;
  logic [31:0] rd;
  longint sec, ns;
  int edges;

  initial begin
    axil_idle();
    repeat (4) @(posedge aclk);
    aresetn = 1; hdmi_rst_n = 1; emu_ref_rst_n = 1;
    #80 emu_hdmi_rst_n = 1;        // 10 reference ticks of head start

    // step to 1528378844.738925482 s and read back
    axil_write(5'h00, 32'sd1_528_378_844, resp);  check("bresp", resp, 0);
    axil_write(5'h04, 32'sd738_925_482, resp);    check("bresp", resp, 0);
    axil_write(5'h0C, 32'd1, resp);
    axil_read(5'h10, rd, resp); sec = longint'(rd) << 32;
    axil_read(5'h14, rd, resp); sec |= longint'(rd);
    axil_read(5'h18, rd, resp); ns = longint'(rd);
    check("seconds", sec, 1_528_378_844);
    checks++;
    if (ns < 738_925_482 || ns > 738_925_482 + 2000) begin failures++; $display("FAIL ns %0d", ns); end

    // frequency command of +100 ppm, then count HDMI edges for 1 ms
    axil_write(5'h08, 32'sd858_993, resp);
    repeat (20) @(posedge hdmi_clk);
    check("offset_ppm", clk_offset_ppm, 858_993);
    aclk_on = 0;
    edges = 0;
    fork
      begin #1_000_000; end
      forever @(posedge hdmi_clk) edges++;
    join_any
    disable fork;
    // 125 000 edges per ms nominal, +100 ppm gives 125 012.5
    checks++;
    if (edges < 125_011 || edges > 125_014) begin failures++; $display("FAIL %0d HDMI edges in 1 ms", edges); end
    $display("HDMI edges in 1 ms at +100 ppm: %0d", edges);

    // emulation: the first one-second tick
    @(posedge emu_hdmi_clk iff emu_tick);
    $display("first tick at %0t: offset %0d, cmd %0d, OFFSET_PPM %0d", $time, emu_offset, emu_cmd, emu_offset_ppm);
    checks++;
    if (emu_offset < 8 || emu_offset > 12) begin failures++; $display("FAIL offset %0d", emu_offset); end
    @(posedge emu_hdmi_clk); #0.1;
    check("cmd = P*o + I*o", emu_cmd, 2 * emu_offset);
    @(posedge emu_hdmi_clk); #0.1;
    checks++;
    if (emu_offset_ppm < $floor(real'(emu_cmd) * 68.7194768) - 1 ||
        emu_offset_ppm > $floor(real'(emu_cmd) * 68.7194768) + 1) begin
      failures++; $display("FAIL OFFSET_PPM %0d for cmd %0d", emu_offset_ppm, emu_cmd);
    end
    check("emu offset_en", emu_offset_en, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
