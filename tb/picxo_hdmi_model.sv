// Behavioural model (not synthesizable) of the PICXO together with the
// transceiver that produces the HDMI clock.
//
// The real parts are a sigma-delta modulator driving the phase interpolator
// of a serial transceiver; here only their effect is modelled: a clock of
// nominal period NOMINAL_NS, off by the crystal's own error XTAL_PPM, and
// moved by OFFSET_PPM / LSB_PER_PPM ppm while OFFSET_EN is high. With
// ACC_STEP = 1 at 125 MHz one OFFSET_PPM LSB is 1/8589.9346 ppm and the
// 22-bit command spans about +/-244 ppm; a larger ACC_STEP scales the step.
// A change of the command takes effect from the next clock half-period.
`timescale 1ns/1fs
module picxo_hdmi_model #(
  parameter real NOMINAL_NS  = 8.0,
  parameter real XTAL_PPM    = 0.0,
  parameter real LSB_PER_PPM = 8589.9346,
  parameter int  ACC_STEP    = 1,
  parameter real START_NS    = 0.0
) (
  input  logic signed [21:0] offset_ppm,
  input  logic               offset_en,
  output logic               clk
);
  real ppm;

  initial begin
    clk = 1'b0;
    #(START_NS);
    forever begin
      ppm = XTAL_PPM + (offset_en ? real'(offset_ppm) * real'(ACC_STEP) / LSB_PER_PPM : 0.0);
      #(NOMINAL_NS / 2.0 / (1.0 + ppm * 1.0e-6));
      clk = ~clk;
    end
  end
endmodule
