// End-to-end testbench of the whole design.
//
// Adjustable-clock side: the HDMI clock comes from a behavioural PICXO model
// whose crystal runs 50 ppm slow (the 50 ppm master bias of the
// frequency-tracking experiment) and which follows clk_offset_ppm, so the
// frequency loop closes through the model. The testbench plays the PTP
// slave software against an ideal master time (simulation time): it steps
// the clock to the master's epoch time with seconds and nanoseconds offsets
// (settimeofday), then every sync interval it samples and reads the time,
// computes the offset from master and sends a PI frequency command
// (adjtimex), as the driver code does with P = 0.5, I = 0.3 and the +/-240
// ppm clamp. It checks that the clock syntonizes (command cancels the crystal
// error on average over the last 50 intervals) and that the offset stays
// within 100 ns. Midway a negative
// nanosecond step forces a borrow and the loop must recover.
//
// Emulation side: a second PICXO model tunes emu_hdmi_clk; the interval is
// shortened to 2^16 cycles. The emulation must lock within +/-1 tick.
//
// Each mechanism is counted and must occur: time sample, read held while
// sampling, seconds offset, nanoseconds offset, second rollover, borrow,
// PPM update, emulation tick, emulation saturation, emulation lock.
`timescale 1ns/1fs
module tb_ptp_sync_top;
  import ptp_clk_pkg::*;
  localparam int  N        = 65536;
  localparam real XTAL_PPM = -50.0;
  localparam real EMU_PPM  = -62.0;

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

  int checks = 0, failures = 0;
  int n_sample = 0, n_held = 0, n_ofs_s = 0, n_ofs_ns = 0, n_roll = 0, n_borrow = 0;
  int n_ppm = 0, n_tick = 0, n_sat = 0, n_lock = 0;

  ptp_sync_top #(.SAMPLE_CYCLES(N)) dut (.*);

  picxo_hdmi_model #(.XTAL_PPM(XTAL_PPM), .START_NS(0.9)) u_picxo (
    .offset_ppm(clk_offset_ppm), .offset_en(clk_offset_en), .clk(hdmi_clk));
  picxo_hdmi_model #(.XTAL_PPM(EMU_PPM), .START_NS(2.3)) u_emu_picxo (
    .offset_ppm(emu_offset_ppm), .offset_en(emu_offset_en), .clk(emu_hdmi_clk));

  always #5 aclk = ~aclk;
  always #4 emu_ref_clk = ~emu_ref_clk;

  `include "axil_tasks.svh"

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #60_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  logic [31:0] prev_ns = 0;
  logic [47:0] prev_s = 0;
  always @(posedge hdmi_clk) begin
    if (hdmi_rst_n) begin
      if (clk_seconds == prev_s + 1 && clk_nanoseconds < prev_ns) n_roll++;
      if (clk_seconds == prev_s - 1) n_borrow++;
    end
    prev_ns <= clk_nanoseconds;
    prev_s  <= clk_seconds;
  end
  always @(posedge aclk)
    if (s_axi_arvalid && !s_axi_arready && s_axi_araddr >= 5'h10) n_held++;

  // ---------------- emulation monitor ----------------
  always @(posedge emu_hdmi_clk) begin
    if (emu_hdmi_rst_n && emu_tick) begin
      n_tick++;
      if (emu_offset_ppm == 22'sh1FFFFF || emu_offset_ppm == -22'sh200000) n_sat++;
      if (n_tick > 12) begin
        checks++;
        if (emu_offset > 1 || emu_offset < -1) begin
          failures++; $display("FAIL emulation offset %0d at interval %0d", emu_offset, n_tick);
        end else n_lock++;
      end
    end
  end

  // ---------------- PTP slave software model ----------------
  localparam longint EPOCH_S  = 1_528_378_844;   // master time at t = 0
  localparam longint EPOCH_NS = 738_925_482;

  logic [1:0]  resp;
  logic [31:0] rd;

  // master time (ns since its epoch origin) at simulation time t
  function automatic longint master_ns(input real t);
    return EPOCH_S * 64'd1_000_000_000 + EPOCH_NS + longint'(t);
  endfunction

  task automatic wr(input int idx, input logic [31:0] d);
    axil_write(5'(idx * 4), d, resp);
    check("bresp", resp, 0);
    case (idx) 0: n_ofs_s++; 1: n_ofs_ns++; 2: n_ppm++; 3: n_sample++; default: ; endcase
  endtask

  // gettimeofday, returning also the master time at the middle of the call
  task automatic get_time(output longint sec, output longint ns, output longint m);
    real t0, t1;
    t0 = $realtime;
    wr(3, 1);
    axil_read(5'h10, rd, resp); sec = longint'(rd) << 32;
    axil_read(5'h14, rd, resp); sec |= longint'(rd);
    axil_read(5'h18, rd, resp); ns = longint'(rd);
    t1 = $realtime;
    m = master_ns(t0 + 60.0);   // the sample lands about 60 ns after the call starts
  endtask

  real    o, o_int, ppm, ppm_sum = 0.0;
  longint m;
  longint s, ns;
  localparam real T_NS = 20_000.0;    // sync interval of the model: 20 us
  localparam real P = 0.5, I = 0.3;

  initial begin
    axil_idle();
    repeat (4) @(posedge aclk);
    aresetn = 1; hdmi_rst_n = 1;
    emu_ref_rst_n = 1;
    #100 emu_hdmi_rst_n = 1;
    repeat (10) @(posedge aclk);

    // settimeofday: step to the master's time
    get_time(s, ns, m);
    begin
      longint ds, dns;
      ds  = m / 1_000_000_000 - s;
      dns = m % 1_000_000_000 - ns;
      while (ds > 32'sh7FFF_FFFF) begin wr(0, 32'sh7FFF_FFFF); ds -= 32'sh7FFF_FFFF; end
      wr(0, 32'(ds));
      wr(1, 32'(dns));
    end

    o_int = 0.0;
    for (int k = 0; k < 120; k++) begin
      #(T_NS);
      get_time(s, ns, m);
      o = real'(m - (s * 1_000_000_000 + ns));          // offset of master minus slave, ns
      if (k == 0) begin
        checks++;
        if (o > 1000.0 || o < -1000.0) begin failures++; $display("FAIL settimeofday left %.0f ns", o); end
      end
      if (k == 60) begin
        // an abrupt nanosecond step backwards that crosses into the previous second
        wr(1, -32'(ns + 1000));
        wr(1, 32'(ns + 1000));
        continue;
      end
      // PI on the offset, turned into a rate in ppm over one interval
      o_int += o;
      ppm = (P * o + I * o_int) / T_NS * 1.0e6;
      if (ppm > 240.0) ppm = 240.0;
      if (ppm < -240.0) ppm = -240.0;
      wr(2, 32'($rtoi(ppm * 8589.9346)));
      if (k >= 70) ppm_sum += real'($rtoi(ppm * 8589.9346)) / 8589.9346;
      if (k > 40 && k != 61) begin
        checks++;
        if (o > 100.0 || o < -100.0) begin failures++; $display("FAIL offset %.1f ns at interval %0d", o, k); end
      end
      if (k % 20 == 0) $display("interval %0d: offset %.1f ns, command %.2f ppm", k, o, ppm);
    end
    // syntonized: the command cancels the crystal error
    checks++;
    $display("mean command over the last 50 intervals %.2f ppm", ppm_sum / 50.0);
    if (ppm_sum / 50.0 + XTAL_PPM > 10.0 || ppm_sum / 50.0 + XTAL_PPM < -10.0) begin
      failures++; $display("FAIL not syntonized: residual %.2f ppm", ppm_sum / 50.0 + XTAL_PPM);
    end

    // let the emulation run for 40 intervals
    wait (n_tick >= 40);

    $display("samples=%0d held_reads=%0d ofs_s=%0d ofs_ns=%0d rollovers=%0d borrows=%0d ppm=%0d",
             n_sample, n_held, n_ofs_s, n_ofs_ns, n_roll, n_borrow, n_ppm);
    $display("emulation: ticks=%0d saturated=%0d locked=%0d", n_tick, n_sat, n_lock);
    checks++; if (n_sample == 0) begin failures++; $display("FAIL no sample"); end
    checks++; if (n_held == 0)   begin failures++; $display("FAIL no held read"); end
    checks++; if (n_ofs_s == 0)  begin failures++; $display("FAIL no seconds offset"); end
    checks++; if (n_ofs_ns == 0) begin failures++; $display("FAIL no ns offset"); end
    checks++; if (n_roll == 0)   begin failures++; $display("FAIL no rollover"); end
    checks++; if (n_borrow == 0) begin failures++; $display("FAIL no borrow"); end
    checks++; if (n_ppm == 0)    begin failures++; $display("FAIL no ppm update"); end
    checks++; if (n_tick == 0)   begin failures++; $display("FAIL no emulation tick"); end
    checks++; if (n_sat == 0)    begin failures++; $display("FAIL no emulation saturation"); end
    checks++; if (n_lock == 0)   begin failures++; $display("FAIL emulation never locked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
