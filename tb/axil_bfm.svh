// AXI4-Lite master tasks for the testbenches. The including module must
// declare `clk`, `req` (axil_req_t, driven only here) and `rsp`
// (axil_rsp_t). Signals are driven and sampled on the falling edge, so a
// handshake seen just after a falling edge completes at the following
// rising edge.
// Each task runs one complete transaction and returns the response code.

task automatic axil_write(input logic [31:0] addr, input logic [31:0] data,
                          output logic [1:0] resp);
  @(negedge clk);
  req.awaddr  = addr;
  req.awvalid = 1'b1;
  req.wdata   = data;
  req.wstrb   = 4'hf;
  req.wvalid  = 1'b1;
  req.bready  = 1'b1;
  #1;
  while (!(rsp.awready && rsp.wready)) begin @(negedge clk); #1; end
  @(negedge clk);
  req.awvalid = 1'b0;
  req.wvalid  = 1'b0;
  while (!rsp.bvalid) @(negedge clk);
  resp = rsp.bresp;
  @(negedge clk);
  req.bready  = 1'b0;
endtask

task automatic axil_read(input logic [31:0] addr, output logic [31:0] data,
                         output logic [1:0] resp);
  @(negedge clk);
  req.araddr  = addr;
  req.arvalid = 1'b1;
  req.rready  = 1'b1;
  #1;
  while (!rsp.arready) begin @(negedge clk); #1; end
  @(negedge clk);
  req.arvalid = 1'b0;
  while (!rsp.rvalid) @(negedge clk);
  data = rsp.rdata;
  resp = rsp.rresp;
  @(negedge clk);
  req.rready  = 1'b0;
endtask
