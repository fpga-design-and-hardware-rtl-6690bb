// Testbench for axil_interconnect: one master, three behavioural slaves that
// store words and answer after a random delay with their own index in the
// upper data bits. Checks that every write lands only in the addressed slave,
// reads come back from the right slave, and unmapped addresses get DECERR.
module tb_axil_interconnect;
  import cnn_pkg::*;
  localparam int N = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  axil_req_t req;
  axil_rsp_t rsp;
  axil_req_t s_req [N];
  axil_rsp_t s_rsp [N];
  int checks = 0, failures = 0;

  axil_interconnect #(.N(N)) dut (.clk, .rst_n, .m_req(req), .m_rsp(rsp), .s_req, .s_rsp);

  // behavioural slaves
  logic [15:0] smem [N][16];
  int          nwrites [N];
  for (genvar s = 0; s < N; s++) begin : g_slave
    logic bv, rv;
    logic [31:0] rdat;
    int wdly, rdly;
    always_comb begin
      s_rsp[s] = '0;
      s_rsp[s].awready = s_req[s].awvalid && s_req[s].wvalid && !bv && wdly == 0;
      s_rsp[s].wready  = s_rsp[s].awready;
      s_rsp[s].bvalid  = bv;
      s_rsp[s].arready = s_req[s].arvalid && !rv && rdly == 0;
      s_rsp[s].rvalid  = rv;
      s_rsp[s].rdata   = rdat;
    end
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        bv <= 0; rv <= 0; wdly <= 2; rdly <= 1; nwrites[s] <= 0; rdat <= 0;
      end else begin
        if (s_req[s].awvalid && s_req[s].wvalid && !bv && wdly != 0) wdly <= wdly - 1;
        if (s_rsp[s].awready) begin
          bv <= 1; wdly <= int'($urandom_range(0, 3));
          smem[s][s_req[s].awaddr[5:2]] <= s_req[s].wdata[15:0];
          nwrites[s] <= nwrites[s] + 1;
        end else if (bv && s_req[s].bready) bv <= 0;
        if (s_req[s].arvalid && !rv && rdly != 0) rdly <= rdly - 1;
        if (s_rsp[s].arready) begin
          rv <= 1; rdly <= int'($urandom_range(0, 3));
          rdat <= {16'(s), smem[s][s_req[s].araddr[5:2]]};
        end else if (rv && s_req[s].rready) rv <= 0;
      end
    end
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

  logic [15:0] model [N][16];
  logic [31:0] rd;
  logic [1:0] resp;
  int expw [N];
  initial begin
    req = '0; rst_n = 0;
    for (int s = 0; s < N; s++) expw[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      int s, a;
      s = $urandom_range(0, N-1); a = $urandom_range(0, 15);
      model[s][a] = 16'($urandom);
      axil_write((32'(s) << SLV_SEL_LSB) | (32'(a) << 2), 32'(model[s][a]), resp);
      expw[s]++;
      check(resp == RESP_OKAY, "write OKAY");
    end
    for (int s = 0; s < N; s++)
      check(nwrites[s] == expw[s], $sformatf("slave %0d got %0d writes, expected %0d", s, nwrites[s], expw[s]));
    for (int s = 0; s < N; s++)
      for (int a = 0; a < 16; a++)
        if (expw[s] > 0 && model[s][a] === smem[s][a]) begin
          axil_read((32'(s) << SLV_SEL_LSB) | (32'(a) << 2), rd, resp);
          check(resp == RESP_OKAY && rd == {16'(s), model[s][a]},
                $sformatf("read slave %0d addr %0d got %h", s, a, rd));
        end
    // unmapped slave index
    axil_write(32'(5) << SLV_SEL_LSB, 32'h55, resp);
    check(resp == RESP_DECERR, "write DECERR");
    axil_read(32'(7) << SLV_SEL_LSB, rd, resp);
    check(resp == RESP_DECERR && rd == 0, "read DECERR");
    for (int s = 0; s < N; s++)
      check(nwrites[s] == expw[s], "no stray writes after DECERR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
