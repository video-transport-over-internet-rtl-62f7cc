// Timing-synchronization hardware for a video-over-IP endpoint.
//
// Two independent designs stand side by side:
//
//  * adjustable_clock - the PTP clock of the endpoint. A processor running a
//    PTP stack reads the time of a counter driven by the HDMI clock, steps it
//    and tunes the HDMI clock frequency, all through AXI4-Lite registers. The
//    counter's time (seconds, nanoseconds) leaves on clk_seconds and
//    clk_nanoseconds; the frequency command leaves on clk_offset_ppm /
//    clk_offset_en towards the PICXO, the transceiver-based oscillator that
//    produces hdmi_clk. The processor, the PICXO and the transceiver are not
//    part of this RTL, so their connections are ports.
//
//  * ptp_emulation - a self-contained imitation of the PTP servo loop with a
//    perfect offset measurement, tuning a second HDMI clock (emu_hdmi_clk)
//    to a reference clock (emu_ref_clk) through its own PICXO command
//    (emu_offset_ppm / emu_offset_en).
//
// Each side has its own clocks and active-low resets.
//
// Both designs follow the original; the port list, which stands in for the
// processor system, PICXO and transceiver, is this design's own.
module ptp_sync_top
  import ptp_clk_pkg::*;
#(
  parameter int unsigned PERIOD_NS     = 8,
  parameter int unsigned FIFO_DEPTH    = 16,
  parameter int unsigned EMU_W         = 32,
  parameter int unsigned SAMPLE_CYCLES = 125_000_000
) (
  // ---- adjustable clock: AXI4-Lite from the processor ----
  input  logic              aclk,
  input  logic              aresetn,
  input  logic [4:0]        s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [4:0]        s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // ---- adjustable clock: HDMI side and PICXO command ----
  input  logic              hdmi_clk,
  input  logic              hdmi_rst_n,
  output logic [47:0]       clk_seconds,
  output logic [31:0]       clk_nanoseconds,
  output logic signed [ptp_clk_pkg::PPM_W-1:0] clk_offset_ppm,
  output logic              clk_offset_en,
  // ---- hardware PTP emulation ----
  input  logic              emu_ref_clk,
  input  logic              emu_ref_rst_n,
  input  logic              emu_hdmi_clk,
  input  logic              emu_hdmi_rst_n,
  output logic signed [ptp_clk_pkg::PPM_W-1:0] emu_offset_ppm,
  output logic              emu_offset_en,
  output logic signed [EMU_W-1:0] emu_offset,
  output logic              emu_tick,
  output logic signed [EMU_W-1:0] emu_cmd
);
  adjustable_clock #(
    .PERIOD_NS(PERIOD_NS), .FIFO_DEPTH(FIFO_DEPTH), .ADDR_W(5)
  ) u_adjclk (
    .aclk, .aresetn,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .hdmi_clk, .hdmi_rst_n,
    .seconds(clk_seconds), .nanoseconds(clk_nanoseconds),
    .offset_ppm(clk_offset_ppm), .offset_en(clk_offset_en)
  );

  ptp_emulation #(
    .W(EMU_W), .SAMPLE_CYCLES(SAMPLE_CYCLES), .PPM_W(ptp_clk_pkg::PPM_W)
  ) u_emu (
    .ref_clk(emu_ref_clk), .ref_rst_n(emu_ref_rst_n),
    .hdmi_clk(emu_hdmi_clk), .hdmi_rst_n(emu_hdmi_rst_n),
    .offset_ppm(emu_offset_ppm), .offset_en(emu_offset_en),
    .offset(emu_offset), .tick(emu_tick), .cmd(emu_cmd)
  );
endmodule
