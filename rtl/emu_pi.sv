// Sampler and PI controller of the hardware PTP emulation (HDMI clock domain).
//
// A divider raises a one-cycle tick every SAMPLE_CYCLES HDMI cycles, one
// second at 125 MHz, standing for the PTP Sync Interval. At each tick the
// offset is sampled and the integrator register adds it in:
//   acc(k) = acc(k-1) + o(k),   cmd(k) = P*o(k) + I*acc(k),   P = I = 1.
// With gains of one the loop needs only adders, no multipliers. When cmd is
// scaled so that one unit moves the slave by one tick per interval, P = I = 1
// places both closed-loop poles at z = 0: a constant frequency error is
// cancelled within two intervals.
//
// Timing: cmd and cmd_valid are registered and change one cycle after a tick;
// cmd_valid is a one-cycle pulse. acc wraps at W bits (no anti-windup).
//
// Sampling once per second and P = I = 1 follow the original design; the
// divider, the exact PI form and the widths are this design's choices.
module emu_pi #(
  parameter int unsigned W             = 32,
  parameter int unsigned SAMPLE_CYCLES = 125_000_000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] offset,
  output logic                tick,      // sampling instant
  output logic signed [W-1:0] cmd,
  output logic                cmd_valid
);
  localparam int unsigned CW = $clog2(SAMPLE_CYCLES);

  logic [CW-1:0]       div;
  logic signed [W-1:0] acc, acc_nx;

  assign tick   = (div == CW'(SAMPLE_CYCLES - 1));
  assign acc_nx = acc + offset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div       <= '0;
      acc       <= '0;
      cmd       <= '0;
      cmd_valid <= 1'b0;
    end else begin
      div       <= tick ? '0 : div + 1'b1;
      cmd_valid <= tick;
      if (tick) begin
        acc <= acc_nx;
        cmd <= offset + acc_nx;
      end
    end
  end
endmodule
