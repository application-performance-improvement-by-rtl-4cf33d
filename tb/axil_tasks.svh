// AXI-Lite master tasks shared by the testbenches. They drive a request
// struct named `axil_req` and watch a response struct named `axil_rsp`, both
// on the rising edge of `clk`, which the including module must declare.
// Requests are driven just after a falling edge and handshakes looked at one
// time unit later, when every signal has settled; a handshake seen there takes
// effect on the following rising edge.
task automatic axil_write(input logic [31:0] addr, input logic [31:0] data);
  @(negedge clk);
  axil_req.awvalid = 1'b1;
  axil_req.awaddr  = addr;
  axil_req.wvalid  = 1'b1;
  axil_req.wdata   = data;
  axil_req.wstrb   = 4'hF;
  axil_req.bready  = 1'b1;
  #1;
  while (!(axil_rsp.awready && axil_rsp.wready)) begin @(negedge clk); #1; end
  @(posedge clk);
  #1;
  axil_req.awvalid = 1'b0;
  axil_req.wvalid  = 1'b0;
  @(negedge clk); #1;
  while (!axil_rsp.bvalid) begin @(negedge clk); #1; end
  @(posedge clk);
  #1;
  axil_req.bready  = 1'b0;
endtask

task automatic axil_read(input logic [31:0] addr, output logic [31:0] data);
  @(negedge clk);
  axil_req.arvalid = 1'b1;
  axil_req.araddr  = addr;
  axil_req.rready  = 1'b1;
  #1;
  while (!axil_rsp.arready) begin @(negedge clk); #1; end
  @(posedge clk);
  #1;
  axil_req.arvalid = 1'b0;
  @(negedge clk); #1;
  while (!axil_rsp.rvalid) begin @(negedge clk); #1; end
  data = axil_rsp.rdata;
  @(posedge clk);
  #1;
  axil_req.rready  = 1'b0;
endtask
