// PTP adjustable clock: a time-of-day counter running on the HDMI clock that
// a processor can read, step in time and tune in frequency over AXI4-Lite.
//
// Structure (AXI side on the left, HDMI side on the right):
//   adjclk_axi_regs --cmd FIFO--> command decode --> rtc --> seconds, nanoseconds
//         ^                                          |   --> offset_ppm, offset_en (to the PICXO)
//         +---------------time FIFO <-- sample ------+
// The processor runs on the AXI clock while the counter must run on the HDMI
// clock it keeps the time of, so every command crosses clock domains through
// an asynchronous FIFO and every sampled time comes back through another.
//
// The HDMI side pops one command per cycle. Offset commands reach the
// counter in the cycle they are popped; a sample command copies the current
// counter value into the time FIFO. The PICXO then moves the HDMI clock
// frequency by offset_ppm (Update PPM register), which closes the
// frequency-control loop outside this block.
//
// Latency: a command is applied about 4 HDMI cycles after its AXI write is
// accepted (FIFO synchronizers plus the pop); a sample comes back about 4 AXI
// cycles after the HDMI side takes it.
//
// The split into AXI registers, two FIFOs and a counter on the HDMI clock
// follows the original design; FIFO depth and the command encoding are this
// design's choices.
module adjustable_clock
  import ptp_clk_pkg::*;
#(
  parameter int unsigned PERIOD_NS  = 8,    // HDMI clock period (125 MHz)
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned ADDR_W     = 5
) (
  input  logic              aclk,
  input  logic              aresetn,
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [DATA_W-1:0] s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [DATA_W-1:0] s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,

  input  logic                    hdmi_clk,
  input  logic                    hdmi_rst_n,
  output logic [SEC_W-1:0]        seconds,
  output logic [NS_W-1:0]         nanoseconds,
  output logic signed [PPM_W-1:0] offset_ppm,
  output logic                    offset_en
);
  localparam int unsigned CMD_W  = $bits(clk_cmd_t);
  localparam int unsigned TIME_W = $bits(ptp_time_t);

  logic      cmd_wr_en, cmd_full, cmd_rd_en, cmd_empty;
  clk_cmd_t  cmd_wr_data, cmd_rd_data;
  logic      time_wr_en, time_full, time_rd_en, time_empty;
  ptp_time_t time_rd_data, time_wr_data;

  adjclk_axi_regs #(.ADDR_W(ADDR_W)) u_regs (
    .aclk, .aresetn,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .cmd_wr_en, .cmd_wr_data, .cmd_full,
    .time_rd_en, .time_rd_data, .time_empty
  );

  async_fifo #(.W(CMD_W), .DEPTH(FIFO_DEPTH)) u_cmd_fifo (
    .wr_clk(aclk), .wr_rst_n(aresetn), .wr_en(cmd_wr_en), .wr_data(cmd_wr_data),
    .full(cmd_full),
    .rd_clk(hdmi_clk), .rd_rst_n(hdmi_rst_n), .rd_en(cmd_rd_en), .rd_data(cmd_rd_data),
    .empty(cmd_empty)
  );

  // ---------------- HDMI-side command decode ----------------
  logic is_sample;
  assign is_sample  = (cmd_rd_data.op == CMD_SAMPLE);
  assign cmd_rd_en  = !cmd_empty && !(is_sample && time_full);
  assign time_wr_en = cmd_rd_en && is_sample;
  assign time_wr_data = '{sec: seconds, ns: nanoseconds};

  rtc #(.PERIOD_W(8)) u_rtc (
    .clk(hdmi_clk), .rst_n(hdmi_rst_n),
    .period_ns(8'(PERIOD_NS)),
    .offset_s(cmd_rd_data.data),
    .offset_s_valid(cmd_rd_en && cmd_rd_data.op == CMD_OFFSET_S),
    .offset_ns(cmd_rd_data.data),
    .offset_ns_valid(cmd_rd_en && cmd_rd_data.op == CMD_OFFSET_NS),
    .ppm_cmd(cmd_rd_data.data),
    .ppm_valid(cmd_rd_en && cmd_rd_data.op == CMD_PPM),
    .seconds, .nanoseconds, .offset_ppm, .offset_en
  );

  async_fifo #(.W(TIME_W), .DEPTH(FIFO_DEPTH)) u_time_fifo (
    .wr_clk(hdmi_clk), .wr_rst_n(hdmi_rst_n), .wr_en(time_wr_en), .wr_data(time_wr_data),
    .full(time_full),
    .rd_clk(aclk), .rd_rst_n(aresetn), .rd_en(time_rd_en), .rd_data(time_rd_data),
    .empty(time_empty)
  );
endmodule
