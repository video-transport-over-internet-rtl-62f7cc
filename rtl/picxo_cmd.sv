// PICXO command formatter of the hardware PTP emulation.
//
// The PI command counts clock ticks per sampling interval. The PICXO wants a
// 22-bit signed OFFSET_PPM word where one LSB moves the clock by
// 1/LSB_PER_PPM ppm (LSB_PER_PPM = 8589.9346 with ACC_STEP = 1). One tick per
// interval of SAMPLE_CYCLES cycles is 10^6/SAMPLE_CYCLES ppm, so
//   offset_ppm = cmd * LSB_PER_PPM * 10^6 / SAMPLE_CYCLES,
// computed with a constant gain in 24 fractional bits, rounded toward minus
// infinity and saturated to the 22-bit range. offset_en goes high with the
// first command and stays high.
//
// Timing: one register stage; the output follows cmd_valid by one cycle.
//
// The OFFSET_PPM width and the 8589.9346 LSB-per-ppm scale follow the
// original design, which only names this formatter; the fixed-point gain,
// rounding and saturation are this design's choices.
module picxo_cmd #(
  parameter int unsigned W             = 32,
  parameter int unsigned SAMPLE_CYCLES = 125_000_000,
  parameter real         LSB_PER_PPM   = 8589.9346,
  parameter int unsigned PPM_W         = 22
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [W-1:0]     cmd,
  input  logic                    cmd_valid,
  output logic signed [PPM_W-1:0] offset_ppm,
  output logic                    offset_en
);
  localparam longint GAIN_Q24 = longint'(LSB_PER_PPM * 1.0e6 * 16777216.0 / real'(SAMPLE_CYCLES));
  localparam int     PW       = W + 64;

  localparam longint MAXL = (longint'(1) <<< (PPM_W - 1)) - 1;
  localparam logic signed [PW-1:0] MAXV = PW'(MAXL);
  localparam logic signed [PW-1:0] MINV = -MAXV - 1;

  logic signed [PW-1:0] prod, scaled;

  assign prod   = PW'(cmd) * PW'(GAIN_Q24);
  assign scaled = prod >>> 24;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset_ppm <= '0;
      offset_en  <= 1'b0;
    end else if (cmd_valid) begin
      offset_en <= 1'b1;
      if (scaled > MAXV)      offset_ppm <= MAXV[PPM_W-1:0];
      else if (scaled < MINV) offset_ppm <= MINV[PPM_W-1:0];
      else                    offset_ppm <= scaled[PPM_W-1:0];
    end
  end
endmodule
