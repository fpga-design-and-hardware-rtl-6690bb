// End-to-end testbench of cnn_system at its default (published) sizes.
//
// The processor is played by AXI4-Lite master tasks. For each of four
// random networks it loads all eight weight and bias memories over the bus,
// reads a sample of them back, writes the 192 input samples, starts the CNN,
// polls the control register until the done bit is set, and reads the class,
// the three scores and the three softmax values. Scores must equal the
// reference model exactly, the class its argmax, the softmax values a
// floating-point softmax within 2%.
//
// Each mechanism of the design is counted and must occur at least once:
// ReLU clipping in conv1, conv2 and FC3; max-pooling choosing the second
// element of a pair; saturation in layer 1; a start request ignored while the
// CNN is busy; a poll that found the CNN still busy; the irq line; a DECERR
// for an unmapped address; a SLVERR past the end of a memory; more than one
// distinct class over the runs.
module tb_cnn_system;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  localparam int NRUNS = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, irq;
  axil_req_t req;
  axil_rsp_t rsp;
  int checks = 0, failures = 0;

  cnn_system dut (.clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp), .irq);

  `include "tb/axil_bfm.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] base(input slave_e s);
    return 32'h4000_0000 | (32'(s) << SLV_SEL_LSB);
  endfunction

  task automatic load(input slave_e s, input int v[]);
    logic [1:0] resp;
    foreach (v[i]) begin
      axil_write(base(s) + 4*i, 32'(v[i]), resp);
      if (resp != RESP_OKAY) begin failures++; $display("FAIL write resp"); end
    end
    checks++;
  endtask

  task automatic spot_check(input slave_e s, input int v[]);
    logic [31:0] rd;
    logic [1:0] resp;
    for (int k = 0; k < 3; k++) begin
      int i;
      i = (k == 2) ? v.size() - 1 : $urandom_range(0, v.size() - 1);
      axil_read(base(s) + 4*i, rd, resp);
      check(resp == RESP_OKAY && rd == 32'(v[i]), $sformatf("memory %0d element %0d readback", s, i));
    end
  endtask

  net_t n;
  int n_clip1, n_clip2, n_clip3, n_odd, n_sat, n_ignored, n_busy_poll, n_irq, n_decerr, n_slverr;
  bit cls_seen [4];
  initial begin
    logic [31:0] rd;
    logic [1:0] resp;
    real pr[];
    int ncls;
    req = '0; rst_n = 0;
    {n_clip1, n_clip2, n_clip3, n_odd, n_sat, n_ignored, n_busy_poll, n_irq, n_decerr, n_slverr} = '0;
    foreach (cls_seen[i]) cls_seen[i] = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // bus errors
    axil_write(base(slave_e'(12)), 1, resp);
    if (resp == RESP_DECERR) n_decerr++;
    axil_read(base(SLV_B4) + 4*N4, rd, resp);
    if (resp == RESP_SLVERR) n_slverr++;
    for (int r = 0; r < NRUNS; r++) begin
      make_net(n, L_IN, K1, NF1, K2, NF2, N3, N4, r == 1);
      eval_net(n, L_IN, K1, NF1, K2, NF2, N3, N4);
      n_clip1 += (n.clip1 > 0); n_clip2 += (n.clip2 > 0); n_clip3 += (n.clip3 > 0);
      n_odd += (n.odd1 > 0 && n.odd2 > 0); n_sat += (n.sat1 > 0);
      load(SLV_W1, n.w1); load(SLV_B1, n.b1); load(SLV_W2, n.w2); load(SLV_B2, n.b2);
      load(SLV_W3, n.w3); load(SLV_B3, n.b3); load(SLV_W4, n.w4); load(SLV_B4, n.b4);
      spot_check(SLV_W1, n.w1); spot_check(SLV_W2, n.w2); spot_check(SLV_W3, n.w3);
      spot_check(SLV_B3, n.b3); spot_check(SLV_W4, n.w4); spot_check(SLV_B4, n.b4);
      for (int i = 0; i < L_IN; i++) axil_write(base(SLV_CNN) + REG_INPUT + 4*i, 32'(n.x[i]), resp);
      axil_read(base(SLV_CNN) + REG_INPUT + 4*7, rd, resp);
      check(rd == 32'(n.x[7]), "input readback");
      axil_write(base(SLV_CNN) + REG_CTRL, 1, resp);
      // a second start while running must be ignored
      axil_write(base(SLV_CNN) + REG_CTRL, 1, resp);
      axil_read(base(SLV_CNN) + REG_CTRL, rd, resp);
      if (rd[0]) n_ignored++;
      do begin
        axil_read(base(SLV_CNN) + REG_CTRL, rd, resp);
        if (!rd[1]) n_busy_poll++;
      end while (!rd[1]);
      if (irq) n_irq++;
      check(rd[2:0] == 3'b110, "done and idle");
      axil_read(base(SLV_CNN) + REG_CLASS, rd, resp);
      check(int'(rd) == n.cls, $sformatf("run %0d class %0d want %0d", r, rd, n.cls));
      cls_seen[rd[1:0]] = 1;
      for (int i = 0; i < N4; i++) begin
        axil_read(base(SLV_CNN) + REG_LOGIT + 4*i, rd, resp);
        check(rd == 32'(n.z[i]), $sformatf("run %0d score %0d got %0d want %0d", r, i, $signed(rd), n.z[i]));
      end
      softmax_real(N4, n.z, pr);
      for (int i = 0; i < N4; i++) begin
        real d;
        axil_read(base(SLV_CNN) + REG_PROB + 4*i, rd, resp);
        d = real'(rd) - pr[i];
        check(d < 655.0 && d > -655.0, $sformatf("run %0d softmax %0d", r, i));
      end
      $display("run %0d: class %0d scores %0d %0d %0d", r, n.cls, n.z[0], n.z[1], n.z[2]);
    end
    ncls = 0;
    foreach (cls_seen[i]) ncls += cls_seen[i];
    $display("mechanisms: clip1=%0d clip2=%0d clip3=%0d pool_odd=%0d sat=%0d ignored_start=%0d busy_polls=%0d irq=%0d decerr=%0d slverr=%0d classes=%0d",
             n_clip1, n_clip2, n_clip3, n_odd, n_sat, n_ignored, n_busy_poll, n_irq, n_decerr, n_slverr, ncls);
    check(n_clip1 > 0, "ReLU clipping conv1");
    check(n_clip2 > 0, "ReLU clipping conv2");
    check(n_clip3 > 0, "ReLU clipping FC3");
    check(n_odd > 0, "pooling picked second element");
    check(n_sat > 0, "layer-1 saturation");
    check(n_ignored > 0, "start ignored while busy");
    check(n_busy_poll > 0, "poll found CNN busy");
    check(n_irq > 0, "irq raised");
    check(n_decerr > 0, "DECERR");
    check(n_slverr > 0, "SLVERR");
    check(ncls > 1, "more than one class");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
