// Testbench for axil_bram_ctrl: drives the controller with AXI4-Lite writes
// and reads against a model memory attached to its memory port, and checks
// stored values, read data (sign-extended), SLVERR past the end of the memory,
// and a read-to-response latency of 2 cycles after the address handshake.
module tb_axil_bram_ctrl;
  import cnn_pkg::*;
  localparam int DEPTH = 40, MAW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  axil_req_t req;
  axil_rsp_t rsp;
  logic mem_en, mem_we;
  logic [MAW-1:0] mem_addr;
  logic [15:0] mem_wdata, mem_rdata;
  logic [15:0] mem [64];
  int checks = 0, failures = 0;

  axil_bram_ctrl #(.MEM_AW(MAW), .MEM_DW(16), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .s_req(req), .s_rsp(rsp), .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);

  // model memory, one cycle read latency
  always_ff @(posedge clk) if (mem_en) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    mem_rdata <= mem[mem_addr];
  end

  `include "tb/axil_bfm.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] model [DEPTH];
  logic [31:0] rd;
  logic [1:0] resp;
  int t0;
  initial begin
    req = '0; rst_n = 0;
    for (int i = 0; i < 64; i++) mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = 16'($urandom);
      axil_write(32'h0010_0000 + 4*i, {16'hdead, model[i]}, resp);
      check(resp == RESP_OKAY, "write resp OKAY");
    end
    for (int i = 0; i < DEPTH; i++)
      check(mem[i] == model[i], $sformatf("stored element %0d", i));
    for (int i = DEPTH - 1; i >= 0; i--) begin
      axil_read(32'h0010_0000 + 4*i, rd, resp);
      check(resp == RESP_OKAY && rd == {{16{model[i][15]}}, model[i]},
            $sformatf("read element %0d got %h", i, rd));
    end
    // out of range
    axil_write(4*DEPTH, 32'h1234, resp);
    check(resp == RESP_SLVERR, "write past end SLVERR");
    axil_read(4*DEPTH, rd, resp);
    check(resp == RESP_SLVERR, "read past end SLVERR");
    // read latency: AR accepted at a rising edge, R valid two edges later
    @(negedge clk);
    req.araddr = 4*5; req.arvalid = 1; req.rready = 1;
    #1 check(rsp.arready, "arready when idle");
    @(negedge clk); req.arvalid = 0; t0 = 0;
    while (!rsp.rvalid) begin @(negedge clk); t0++; end
    check(t0 == 1, $sformatf("read latency %0d", t0));
    check(rsp.rdata[15:0] == model[5], "latency read data");
    @(negedge clk); req.rready = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
