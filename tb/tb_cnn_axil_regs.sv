// Testbench for cnn_axil_regs: writes and reads back input samples, checks
// that a start write produces one start pulse (and none while busy), that
// the done bit and irq follow a done pulse and are cleared by the next start,
// and that scores, softmax values and class read back at their offsets.
module tb_cnn_axil_regs;
  import cnn_pkg::*;
  localparam int NI = 8, NO = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done, irq;
  axil_req_t req;
  axil_rsp_t rsp;
  data_t x [NI];
  data_t logits [NO];
  logic [15:0] probs [NO];
  logic [1:0] cls;
  int checks = 0, failures = 0, nstart = 0;

  cnn_axil_regs #(.N_IN(NI), .N_OUT(NO)) dut (
    .clk, .rst_n, .s_req(req), .s_rsp(rsp), .start, .busy, .done, .x,
    .logits, .probs, .cls, .irq);

  always @(negedge clk) if (rst_n && start) nstart++;

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

  logic [31:0] rd;
  logic [1:0] resp;
  data_t model [NI];
  initial begin
    req = '0; rst_n = 0; busy = 0; done = 0; cls = 0;
    for (int i = 0; i < NO; i++) begin logits[i] = 0; probs[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NI; i++) begin
      model[i] = data_t'($urandom);
      axil_write(REG_INPUT + 4*i, 32'(model[i]), resp);
    end
    for (int i = 0; i < NI; i++) begin
      check(x[i] == model[i], $sformatf("x[%0d] register", i));
      axil_read(REG_INPUT + 4*i, rd, resp);
      check(rd == 32'($signed(model[i])), $sformatf("x[%0d] readback %h", i, rd));
    end
    axil_read(REG_CTRL, rd, resp);
    check(rd[2:0] == 3'b100, "idle after reset");
    axil_write(REG_CTRL, 1, resp);
    repeat (2) @(negedge clk);
    check(nstart == 1, "one start pulse");
    busy = 1;
    axil_write(REG_CTRL, 1, resp);
    repeat (2) @(negedge clk);
    check(nstart == 1, "no start while busy");
    axil_read(REG_CTRL, rd, resp);
    check(rd[2:0] == 3'b001, "busy bit");
    // finish: results and done
    for (int i = 0; i < NO; i++) begin logits[i] = data_t'(-100 * i + 7); probs[i] = 16'(1000 + i); end
    cls = 2;
    @(negedge clk); busy = 0; done = 1; @(negedge clk); done = 0;
    @(negedge clk);
    check(irq, "irq after done");
    axil_read(REG_CTRL, rd, resp);
    check(rd[2:0] == 3'b110, "done and idle bits");
    axil_read(REG_CLASS, rd, resp);
    check(rd == 2, "class");
    for (int i = 0; i < NO; i++) begin
      axil_read(REG_LOGIT + 4*i, rd, resp);
      check(rd == 32'(-100 * i + 7), $sformatf("logit %0d %h", i, rd));
      axil_read(REG_PROB + 4*i, rd, resp);
      check(rd == 32'(1000 + i), $sformatf("prob %0d", i));
    end
    axil_write(REG_CTRL, 1, resp);
    @(negedge clk);
    check(!irq && nstart == 2, "start clears done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
