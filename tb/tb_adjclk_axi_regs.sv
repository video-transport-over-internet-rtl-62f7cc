// Self-checking testbench of the AXI4-Lite register block of the adjustable
// clock. The two FIFOs are replaced by testbench models: a command sink that
// records every command word and is randomly full, and a time source that
// answers each sample command after a random delay with a known time value.
// Checks: each write to registers 0..3 produces exactly one command with the
// right opcode and data (byte strobes merged into the old value); writes
// are held off while the command FIFO is full; registers read back; a read
// of 4..6 waits for the pending sample and returns its 80-bit time split
// 16/32/32; index 7 answers SLVERR.
`timescale 1ns/1ps
module tb_adjclk_axi_regs;
  import ptp_clk_pkg::*;

  logic aclk = 0, aresetn = 0;
  logic [4:0]  s_axi_awaddr, s_axi_araddr;
  logic        s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [3:0]  s_axi_wstrb;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        s_axi_bvalid, s_axi_bready, s_axi_arvalid, s_axi_arready;
  logic        s_axi_rvalid, s_axi_rready;
  logic        cmd_wr_en, cmd_full, time_rd_en, time_empty;
  clk_cmd_t    cmd_wr_data;
  ptp_time_t   time_rd_data;

  int checks = 0, failures = 0, full_stalls = 0, read_stalls = 0;

  adjclk_axi_regs dut (.*);

  always #5 aclk = ~aclk;

  `include "axil_tasks.svh"

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- command sink model ----
  clk_cmd_t cmds[$];
  bit       full_mode = 0;
  always_ff @(posedge aclk) begin
    if (cmd_wr_en) begin
      cmds.push_back(cmd_wr_data);
      if (cmd_full) begin failures++; $display("FAIL command written while full"); end
    end
    cmd_full <= full_mode && ($urandom_range(0, 3) != 0);
    if (full_mode && cmd_full && s_axi_awvalid && s_axi_wvalid) full_stalls++;
  end

  // ---- time source model: answers sample commands after a delay ----
  int        samples_req = 0, samples_done = 0;
  ptp_time_t next_time;
  always_ff @(posedge aclk)
    if (cmd_wr_en && cmd_wr_data.op == CMD_SAMPLE) samples_req++;

  initial begin
    time_empty = 1; time_rd_data = '0;
    forever begin
      @(negedge aclk);
      if (samples_done < samples_req) begin
        repeat ($urandom_range(5, 40)) @(negedge aclk);
        time_rd_data = next_time;
        time_empty   = 0;
        @(posedge aclk);
        checks++;
        if (!time_rd_en) begin failures++; $display("FAIL time word not taken"); end
        samples_done++;
        @(negedge aclk);
        time_empty = 1;
      end
    end
  end

  // count cycles a time-register read is held
  always_ff @(posedge aclk)
    if (s_axi_arvalid && !s_axi_arready && s_axi_araddr[4:2] >= 3'd4) read_stalls++;

  logic [1:0]  resp;
  logic [31:0] rd;
  logic [31:0] shadow [4];

  initial begin
    axil_idle();
    cmd_full = 0;
    next_time = '0;
    for (int i = 0; i < 4; i++) shadow[i] = '0;
    repeat (3) @(posedge aclk);
    aresetn = 1;

    // 1. writes to registers 0..2 become commands
    for (int n = 0; n < 200; n++) begin
      int idx; logic [31:0] d; logic [3:0] st;
      idx = $urandom_range(0, 2);
      d   = $urandom;
      st  = (n % 5 == 0) ? 4'($urandom_range(1, 15)) : 4'hF;
      if (n == 100) full_mode = 1;
      if (n == 150) full_mode = 0;
      for (int b = 0; b < 4; b++) if (st[b]) shadow[idx][8*b +: 8] = d[8*b +: 8];
      axil_write(5'(idx * 4), d, resp, st);
      check("bresp", resp, 0);
      checks++;
      if (cmds.size() != 1) begin failures++; $display("FAIL %0d commands for one write", cmds.size()); end
      else begin
        clk_cmd_t c;
        c = cmds.pop_front();
        check("cmd op", c.op, idx);
        check("cmd data", c.data, shadow[idx]);
      end
      axil_read(5'(idx * 4), rd, resp);
      check("readback", rd, shadow[idx]);
    end

    // 2. sample then read 4, 5, 6 as the driver software does
    for (int n = 0; n < 30; n++) begin
      ptp_time_t t;
      t.sec = {$urandom, $urandom} & 48'hFFFF_FFFF_FFFF;
      t.ns  = $urandom_range(0, 999_999_999);
      next_time = t;
      axil_write(5'h0C, 32'h1, resp);
      check("sample cmd", cmds.pop_front().op, CMD_SAMPLE);
      axil_read(5'h10, rd, resp);  check("MSB seconds", rd, {16'h0, t.sec[47:32]});
      axil_read(5'h14, rd, resp);  check("LSB seconds", rd, t.sec[31:0]);
      axil_read(5'h18, rd, resp);  check("nanoseconds", rd, t.ns);
    end

    // 3. invalid index
    axil_write(5'h1C, 32'h5, resp);  check("write SLVERR", resp, 2);
    axil_read(5'h1C, rd, resp);      check("read SLVERR", resp, 2);
    checks++; if (cmds.size() != 0) begin failures++; $display("FAIL command from index 7"); end

    checks++; if (full_stalls == 0) begin failures++; $display("FAIL never stalled on full"); end
    checks++; if (read_stalls == 0) begin failures++; $display("FAIL never held a time read"); end
    $display("full_stalls=%0d read_stalls=%0d", full_stalls, read_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
