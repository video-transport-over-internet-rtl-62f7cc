// Free-running W-bit counter with a Gray-coded, registered output.
//
// In the PTP emulation one such counter is the master time (on the reference
// clock) and one the slave time (on the HDMI clock). Gray coding lets the
// count be sampled from another clock domain: between two samples only one
// bit changes, so a sample taken mid-change is the old or the new count,
// never a mix. The output advances by one code every enabled clock edge.
//
// Gray-coded master and slave counters follow the original design; the
// width and the enable input are this design's choices.
module gray_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] gray
);
  import ptp_clk_pkg::*;

  logic [W-1:0] bin, bin_nx;

  assign bin_nx = bin + W'(en);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin  <= '0;
      gray <= '0;
    end else begin
      bin  <= bin_nx;
      gray <= W'(bin2gray(64'(bin_nx)));
    end
  end

  // Exactly one output bit moves per enabled step
  a_one_bit: assert property (@(posedge clk) disable iff (!rst_n)
               $past(en) && $past(rst_n) |-> $countones(gray ^ $past(gray)) == 1);
endmodule
