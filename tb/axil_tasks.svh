// AXI4-Lite master tasks shared by the testbenches of the adjustable clock.
// Included inside a module that declares aclk and the s_axi_* signals.
// axil_write/axil_read drive one transfer, wait for its response and return
// the response code; the handshakes follow the AXI rule that VALID stays up
// until READY is seen.

task automatic axil_write(input logic [4:0] addr, input logic [31:0] data,
                          output logic [1:0] resp, input logic [3:0] strb = 4'hF);
  @(negedge aclk);
  s_axi_awaddr  = addr;  s_axi_awvalid = 1'b1;
  s_axi_wdata   = data;  s_axi_wstrb   = strb;  s_axi_wvalid = 1'b1;
  s_axi_bready  = 1'b1;
  do @(posedge aclk); while (!(s_axi_awready && s_axi_wready));
  @(negedge aclk);
  s_axi_awvalid = 1'b0;  s_axi_wvalid = 1'b0;
  while (!s_axi_bvalid) @(negedge aclk);
  resp = s_axi_bresp;
  @(posedge aclk);
  @(negedge aclk);
  s_axi_bready = 1'b0;
endtask

task automatic axil_read(input logic [4:0] addr, output logic [31:0] data,
                         output logic [1:0] resp);
  @(negedge aclk);
  s_axi_araddr = addr;  s_axi_arvalid = 1'b1;  s_axi_rready = 1'b1;
  do @(posedge aclk); while (!s_axi_arready);
  @(negedge aclk);
  s_axi_arvalid = 1'b0;
  while (!s_axi_rvalid) @(negedge aclk);
  data = s_axi_rdata;
  resp = s_axi_rresp;
  @(posedge aclk);
  @(negedge aclk);
  s_axi_rready = 1'b0;
endtask

task automatic axil_idle();
  s_axi_awaddr = '0; s_axi_awvalid = 1'b0; s_axi_wdata = '0; s_axi_wstrb = '0;
  s_axi_wvalid = 1'b0; s_axi_bready = 1'b0; s_axi_araddr = '0; s_axi_arvalid = 1'b0;
  s_axi_rready = 1'b0;
endtask
