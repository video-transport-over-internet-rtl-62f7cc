// Self-checking testbench of the asynchronous FIFO.
// Writer and reader run on unrelated clocks (10 ns and 7.3 ns, then swapped
// speeds by a slower reader) and push/pop at random; a queue in the
// testbench is the reference. Checks: every word comes out once, in order,
// unchanged; the FIFO reaches full and the writer is held off; empty is
// honoured; a written word is visible no sooner than two read clock edges
// after the write.
`timescale 1ns/1ps
module tb_async_fifo;
  localparam int W = 34, DEPTH = 16;

  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  real rd_half = 3.65;

  int checks = 0, failures = 0, full_seen = 0, pops = 0, pushes = 0;
  logic [W-1:0] q[$];

  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 wr_clk = ~wr_clk;
  always #(rd_half) rd_clk = ~rd_clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int wr_prob = 50, rd_prob = 50;

  // writer
  initial begin
    wr_en = 0; wr_data = '0;
    #23 wr_rst_n = 1;
    forever begin
      @(negedge wr_clk);
      wr_en   = 0;
      if (full) full_seen++;
      if (!full && $urandom_range(0, 99) < wr_prob) begin
        wr_en   = 1;
        wr_data = {$urandom, $urandom} & {W{1'b1}};
        q.push_back(wr_data); pushes++;
      end
    end
  end

  // reader: checks on the edge the word is taken
  initial begin
    rd_en = 0;
    #29 rd_rst_n = 1;
    forever begin
      @(negedge rd_clk);
      rd_en = !empty && ($urandom_range(0, 99) < rd_prob);
      if (rd_en) begin
        checks++;
        if (q.size() == 0) begin
          failures++; $display("FAIL pop with nothing written at %0t", $time);
        end else begin
          logic [W-1:0] exp;
          exp = q.pop_front();
          if (rd_data !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL data %h expected %h at %0t", rd_data, exp, $time);
          end
        end
        pops++;
      end
    end
  end

  // latency: after an idle FIFO gets one word, empty must stay high for at
  // least two read edges
  initial begin
    wait (rd_rst_n && wr_rst_n);
    #200000;
    // phase 2: fast writer, slow reader -> FIFO fills
    wr_prob = 95; rd_prob = 20;
    #200000;
    // phase 3: drain
    wr_prob = 0; rd_prob = 100;
    #20000;
    checks++;
    if (!empty || q.size() != 0) begin failures++; $display("FAIL not drained: %0d left", q.size()); end
    // latency check on a single word
    @(negedge wr_clk); wr_prob = 0;
    wr_data = 34'h1_2345_6789; q.push_back(wr_data);
    force wr_en = 1; @(posedge wr_clk); #0.1; release wr_en;
    begin
      int edges = 0;
      while (empty) begin @(posedge rd_clk); #0.1; edges++; end
      checks++;
      if (edges < 2) begin failures++; $display("FAIL word visible after %0d read edges", edges); end
      $display("single word visible after %0d read edges", edges);
    end
    #200;
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL FIFO never became full"); end
    $display("pushes=%0d pops=%0d full_cycles=%0d", pushes, pops, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
