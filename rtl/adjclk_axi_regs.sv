// AXI4-Lite register interface of the PTP adjustable clock (AXI clock domain).
//
// Seven 32-bit registers at byte addresses 4*index:
//   0 Offset seconds      W  signed offset added once to the seconds counter
//   1 Offset nanoseconds  W  signed offset added once to the nanoseconds
//   2 Update PPM          W  new PICXO frequency command (OFFSET_PPM)
//   3 Sample Time         W  any write samples the counter into regs 4..6
//   4 MSB Seconds         R  bits 47:32 of the sampled seconds (zero-extended)
//   5 LSB Seconds         R  bits 31:0 of the sampled seconds
//   6 Nanoseconds         R  sampled nanoseconds
// Registers 0..3 read back the last value written to them. Writes to 4..6
// are ignored; index 7 answers SLVERR.
//
// A write to 0..3 becomes one command word (opcode and data) pushed into the
// command FIFO towards the HDMI clock domain; the write is not accepted while
// that FIFO is full. The counter side answers a sample command with the
// 80-bit time through the return FIFO, which this block drains into regs
// 4..6. Because the 80-bit time cannot be read in one 32-bit transfer, the
// processor writes Sample Time and then reads 4, 5 and 6; a read of 4..6 is
// held (no ARREADY) while a sample is still in flight, so those reads always
// return the time of the latest sample.
//
// Protocol: one transfer at a time per direction; AWREADY and WREADY are
// raised together for one cycle when both AWVALID and WVALID are high; a read
// answers one cycle after the address handshake. Only OKAY (00) and SLVERR
// (10) are ever returned, so bit 0 of BRESP and RRESP is constant 0; address
// bits 1:0 are unused because every access is a whole 32-bit word.
//
// The seven-register map and its 16/32/32 split of the time follow the
// original design; the byte addressing, readback, SLVERR on index 7 and the
// held read are this design's choices.
module adjclk_axi_regs
  import ptp_clk_pkg::*;
#(
  parameter int unsigned ADDR_W = 5
) (
  input  logic              aclk,
  input  logic              aresetn,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [DATA_W-1:0] s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [DATA_W-1:0] s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // command FIFO (write side)
  output logic              cmd_wr_en,
  output clk_cmd_t          cmd_wr_data,
  input  logic              cmd_full,
  // sampled-time FIFO (read side)
  output logic              time_rd_en,
  input  ptp_time_t         time_rd_data,
  input  logic              time_empty
);
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

  logic [DATA_W-1:0] reg_ofs_s, reg_ofs_ns, reg_ppm, reg_sample;
  ptp_time_t         sampled;
  logic [3:0]        samples_pending;     // sample commands not answered yet

  reg_idx_e   widx, ridx;
  logic       wr_fire, rd_fire, widx_cmd;
  logic [DATA_W-1:0] wdata_m;

  assign widx     = reg_idx_e'(s_axi_awaddr[4:2]);
  assign ridx     = reg_idx_e'(s_axi_araddr[4:2]);
  assign widx_cmd = (s_axi_awaddr[4:2] <= 3'd3);

  // Byte strobes merge the new data into the register's old value
  always_comb begin
    logic [DATA_W-1:0] old;
    unique case (widx)
      REG_OFFSET_S:   old = reg_ofs_s;
      REG_OFFSET_NS:  old = reg_ofs_ns;
      REG_UPDATE_PPM: old = reg_ppm;
      default:        old = reg_sample;
    endcase
    for (int b = 0; b < 4; b++)
      wdata_m[8*b +: 8] = s_axi_wstrb[b] ? s_axi_wdata[8*b +: 8] : old[8*b +: 8];
  end

  // ---------------- write channel ----------------
  assign wr_fire = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid
                && !(widx_cmd && cmd_full)
                && !(widx == REG_SAMPLE && samples_pending == '1);
  assign s_axi_awready = wr_fire;
  assign s_axi_wready  = wr_fire;

  assign cmd_wr_en        = wr_fire && widx_cmd;
  assign cmd_wr_data.op   = cmd_op_e'(s_axi_awaddr[3:2]);
  assign cmd_wr_data.data = wdata_m;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      reg_ofs_s    <= '0;
      reg_ofs_ns   <= '0;
      reg_ppm      <= '0;
      reg_sample   <= '0;
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= RESP_OKAY;
    end else begin
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (wr_fire) begin
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= (s_axi_awaddr[4:2] == 3'd7) ? RESP_SLVERR : RESP_OKAY;
        case (widx)
          REG_OFFSET_S:   reg_ofs_s  <= wdata_m;
          REG_OFFSET_NS:  reg_ofs_ns <= wdata_m;
          REG_UPDATE_PPM: reg_ppm    <= wdata_m;
          REG_SAMPLE:     reg_sample <= wdata_m;
          default: ;
        endcase
      end
    end
  end

  // ---------------- sampled time ----------------
  assign time_rd_en = !time_empty;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      sampled         <= '0;
      samples_pending <= '0;
    end else begin
      if (time_rd_en) sampled <= time_rd_data;
      samples_pending <= samples_pending
                       + 4'(cmd_wr_en && widx == REG_SAMPLE)
                       - 4'(time_rd_en);
    end
  end

  // ---------------- read channel ----------------
  logic rd_time_reg;
  assign rd_time_reg   = (ridx == REG_SEC_MSB) || (ridx == REG_SEC_LSB) || (ridx == REG_NS);
  assign rd_fire       = s_axi_arvalid && !s_axi_rvalid
                      && !(rd_time_reg && (samples_pending != '0));
  assign s_axi_arready = rd_fire;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      s_axi_rresp  <= RESP_OKAY;
    end else begin
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (rd_fire) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rresp  <= RESP_OKAY;
        unique case (ridx)
          REG_OFFSET_S:   s_axi_rdata <= reg_ofs_s;
          REG_OFFSET_NS:  s_axi_rdata <= reg_ofs_ns;
          REG_UPDATE_PPM: s_axi_rdata <= reg_ppm;
          REG_SAMPLE:     s_axi_rdata <= reg_sample;
          REG_SEC_MSB:    s_axi_rdata <= DATA_W'(sampled.sec[SEC_W-1:32]);
          REG_SEC_LSB:    s_axi_rdata <= sampled.sec[31:0];
          REG_NS:         s_axi_rdata <= sampled.ns;
          default: begin
            s_axi_rdata <= '0;
            s_axi_rresp <= RESP_SLVERR;
          end
        endcase
      end
    end
  end

  // ---------------- handshake rules ----------------
  a_bvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
                   s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
                   s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
  a_no_spurious_time: assert property (@(posedge aclk) disable iff (!aresetn)
                   time_rd_en |-> samples_pending != '0);
endmodule
