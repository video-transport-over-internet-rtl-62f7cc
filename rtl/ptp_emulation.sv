// Hardware PTP emulation: two clocks kept in step by a noise-free imitation
// of the PTP servo loop, used to show what the adjustable-clock loop can
// reach when the offset measurement is perfect.
//
// A Gray counter on the reference clock is the master time and one on the
// HDMI clock the slave time. emu_offset subtracts them in the HDMI domain
// (the exact offset from master), emu_pi samples it once per Sync Interval
// and runs a PI controller with P = I = 1, and picxo_cmd turns the result
// into the OFFSET_PPM / OFFSET_EN command of the PICXO that tunes the HDMI
// clock. The loop closes outside this block: the PICXO changes hdmi_clk.
//
// offset, tick and cmd are brought out for observation. All outputs except
// master_gray change on hdmi_clk.
//
// The structure follows the original design's block diagram of the
// emulation; widths and reset scheme are this design's choices.
module ptp_emulation #(
  parameter int unsigned W             = 32,
  parameter int unsigned SAMPLE_CYCLES = 125_000_000,
  parameter int unsigned PPM_W         = 22
) (
  input  logic                    ref_clk,
  input  logic                    ref_rst_n,
  input  logic                    hdmi_clk,
  input  logic                    hdmi_rst_n,
  output logic signed [PPM_W-1:0] offset_ppm,
  output logic                    offset_en,
  output logic signed [W-1:0]     offset,
  output logic                    tick,
  output logic signed [W-1:0]     cmd
);
  logic [W-1:0] master_gray, slave_gray;
  logic         cmd_valid;

  gray_counter #(.W(W)) u_master (
    .clk(ref_clk), .rst_n(ref_rst_n), .en(1'b1), .gray(master_gray)
  );

  gray_counter #(.W(W)) u_slave (
    .clk(hdmi_clk), .rst_n(hdmi_rst_n), .en(1'b1), .gray(slave_gray)
  );

  emu_offset #(.W(W)) u_offset (
    .clk(hdmi_clk), .rst_n(hdmi_rst_n),
    .master_gray, .slave_gray, .offset
  );

  emu_pi #(.W(W), .SAMPLE_CYCLES(SAMPLE_CYCLES)) u_pi (
    .clk(hdmi_clk), .rst_n(hdmi_rst_n), .offset, .tick, .cmd, .cmd_valid
  );

  picxo_cmd #(.W(W), .SAMPLE_CYCLES(SAMPLE_CYCLES), .PPM_W(PPM_W)) u_fmt (
    .clk(hdmi_clk), .rst_n(hdmi_rst_n), .cmd, .cmd_valid, .offset_ppm, .offset_en
  );
endmodule
