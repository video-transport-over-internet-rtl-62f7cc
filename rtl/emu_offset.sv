// Offset-from-master computation of the hardware PTP emulation (HDMI clock
// domain).
//
// It replaces the whole PTP measurement (Sync, Delay_Req and the offset
// formula of the protocol) by a direct, noise-free subtraction: the master's
// Gray count comes in from the reference clock domain through a two-stage
// synchronizer, the slave's Gray count is delayed by the same two stages so
// that both are taken at the same instant, both are converted to binary, and
// offset = master - slave, as a signed count of clock ticks (two's
// complement, so counter wrap-around does not matter).
//
// Timing: offset is registered; it reflects the counters as they were three
// HDMI clock edges earlier.
//
// The original design gives only "an adder" fed by the two Gray counters;
// the Gray-to-binary conversion and the matching delay of the slave count are
// this design's choices.
module emu_offset #(
  parameter int unsigned W = 32
) (
  input  logic                clk,         // HDMI clock
  input  logic                rst_n,
  input  logic [W-1:0]        master_gray, // from the reference clock domain
  input  logic [W-1:0]        slave_gray,  // from the HDMI clock domain
  output logic signed [W-1:0] offset
);
  import ptp_clk_pkg::*;

  logic [W-1:0] master_s, slave_d1, slave_d2;

  sync_2ff #(.W(W)) u_sync_master (
    .clk, .rst_n, .d(master_gray), .q(master_s)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slave_d1 <= '0;
      slave_d2 <= '0;
      offset   <= '0;
    end else begin
      slave_d1 <= slave_gray;
      slave_d2 <= slave_d1;
      offset   <= signed'(W'(gray2bin(64'(master_s))) - W'(gray2bin(64'(slave_d2))));
    end
  end
endmodule
