// Self-checking testbench of the offset-from-master block. Master and slave
// counts are generated in the testbench (the master advancing by 0, 1 or 2
// per cycle to mimic a frequency difference, and both started near 2^32 to
// cross the wrap-around), Gray-coded and fed in. The output must equal
// master - slave as both were three clock edges earlier.
`timescale 1ns/1ps
module tb_emu_offset;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] master_gray, slave_gray;
  logic signed [W-1:0] offset;
  int checks = 0, failures = 0, wraps = 0;
  logic [W-1:0] m, s;
  logic signed [W-1:0] hist [4];

  emu_offset #(.W(W)) dut (.*);
  always #4 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = 32'hFFFF_FF00; s = 32'hFFFF_FE80;
    master_gray = m ^ (m >> 1); slave_gray = s ^ (s >> 1);
    for (int i = 0; i < 4; i++) hist[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      m = m + 32'($urandom_range(0, 2));
      s = s + 1;
      if (s == 0) wraps++;
      master_gray = m ^ (m >> 1);
      slave_gray  = s ^ (s >> 1);
      @(posedge clk); #1;
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = signed'(m - s);
      if (cyc >= 4) begin
        checks++;
        if (offset != hist[2]) begin
          failures++;
          if (failures < 10) $display("FAIL offset %0d expected %0d at cycle %0d", offset, hist[2], cyc);
        end
      end
    end
    checks++; if (wraps == 0) begin failures++; $display("FAIL no wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
