// Asynchronous FIFO for crossing between the AXI clock and the HDMI clock.
//
// Data is written in the write clock domain and read in the read clock
// domain. Each side keeps a binary pointer one bit wider than the address and
// publishes it Gray-coded; the other side sees it through a two-stage
// synchronizer. Because a Gray pointer changes one bit per step, a sampled
// pointer is never corrupt, only late, so the FIFO can report full or empty
// too early but never too late: no word is lost, repeated or torn.
//
// Interface: wr_en is honoured only when full is low; rd_en pops the word on
// rd_data (show-ahead: rd_data holds the oldest word whenever empty is low).
// A written word becomes visible to the reader three read clock edges after
// the write; freed space is seen by the writer three write clock edges after
// the read. DEPTH must be a power of two.
//
// The original design calls for an asynchronous FIFO with a Gray-coded
// count; the pointer scheme, depth and show-ahead read are this design's own.
module async_fifo #(
  parameter int unsigned W     = 34,
  parameter int unsigned DEPTH = 16
) (
  input  logic         wr_clk,
  input  logic         wr_rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,

  input  logic         rd_clk,
  input  logic         rd_rst_n,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);
  import ptp_clk_pkg::*;

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] wr_gray_s, rd_gray_s;  // pointer of the other side, synchronized
  logic [AW:0] wr_bin_nx, rd_bin_nx;

  // ---------------- write side ----------------
  assign wr_bin_nx = wr_bin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wr_bin  <= '0;
      wr_gray <= '0;
    end else begin
      wr_bin  <= wr_bin_nx;
      wr_gray <= (AW+1)'(bin2gray(64'(wr_bin_nx)));
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wr_bin[AW-1:0]] <= wr_data;
  end

  sync_2ff #(.W(AW+1)) u_sync_rd (
    .clk(wr_clk), .rst_n(wr_rst_n), .d(rd_gray), .q(rd_gray_s)
  );

  // Full when the pointers differ only in their top bit (in Gray code: the
  // two top bits inverted, the rest equal).
  assign full = (wr_gray == {~rd_gray_s[AW:AW-1], rd_gray_s[AW-2:0]});

  // ---------------- read side ----------------
  assign rd_bin_nx = rd_bin + (AW+1)'(rd_en && !empty);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rd_bin  <= '0;
      rd_gray <= '0;
    end else begin
      rd_bin  <= rd_bin_nx;
      rd_gray <= (AW+1)'(bin2gray(64'(rd_bin_nx)));
    end
  end

  sync_2ff #(.W(AW+1)) u_sync_wr (
    .clk(rd_clk), .rst_n(rd_rst_n), .d(wr_gray), .q(wr_gray_s)
  );

  assign empty   = (rd_gray == wr_gray_s);
  assign rd_data = mem[rd_bin[AW-1:0]];

  initial begin
    assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("async_fifo: DEPTH must be a power of two, at least 4");
  end

  // A push into a full FIFO or a pop from an empty one is dropped; flag it.
  property p_no_overflow;
    @(posedge wr_clk) disable iff (!wr_rst_n) wr_en |-> !full;
  endproperty
  property p_no_underflow;
    @(posedge rd_clk) disable iff (!rd_rst_n) rd_en |-> !empty;
  endproperty
  a_no_overflow:  assert property (p_no_overflow)  else $warning("async_fifo: write while full dropped");
  a_no_underflow: assert property (p_no_underflow) else $warning("async_fifo: read while empty ignored");
endmodule
