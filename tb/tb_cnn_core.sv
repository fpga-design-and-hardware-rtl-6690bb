// Testbench for cnn_core at the published sizes: behavioural weight memories
// (one cycle of read latency, the layout the processor uses) feed the block;
// several random networks, one built to saturate layer 1, are run and the
// three scores are compared exactly with the reference model, the class with
// its argmax and the softmax values with a floating-point softmax (2%).
// Also checked: one inference takes exactly the cycle count the sequence
// predicts (EXP_CYCLES below), well inside 7,900 cycles (79 us at 100 MHz).
module tb_cnn_core;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  // copy of the 900 layer-2 weights (N+2, plus 1 to register the last done), conv1 (L+2) and its drain (1),
  // conv2 (L/2+2) and drain (1), FC3 (480+3), FC4 (60+3), softmax (2+16*3),
  // counted from the start edge to the done pulse
  localparam int EXP_CYCLES = (NF2*NF1*K2 + 3) + (L_IN + 3) + (L_IN/2 + 3)
                              + (NF2*(L_IN/4) + 3) + (N3 + 3) + (2 + 16*N4) + 1;
  localparam int NW1 = NF1*K1, NW2 = NF2*NF1*K2, NIN3 = NF2*(L_IN/4);
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done;
  data_t x [L_IN];
  logic [$clog2(NW1)-1:0] w1_addr;  logic [DW-1:0] w1_data;
  logic [$clog2(NF1)-1:0] b1_addr;  logic [DW-1:0] b1_data;
  logic [$clog2(NW2)-1:0] w2_addr;  logic [DW-1:0] w2_data;
  logic [$clog2(NF2)-1:0] b2_addr;  logic [DW-1:0] b2_data;
  logic [$clog2(NIN3)-1:0] w3_addr; logic [N3-1:0][DW-1:0] w3_row, b3_row;
  logic [$clog2(N3)-1:0] w4_addr;   logic [N4-1:0][DW-1:0] w4_row, b4_row;
  data_t logits [N4];
  logic [15:0] probs [N4];
  logic [1:0] cls;
  int checks = 0, failures = 0;

  cnn_core dut (.*);

  // behavioural memories
  logic [DW-1:0] m_w1 [NW1], m_b1 [NF1], m_w2 [NW2], m_b2 [NF2];
  logic [N3-1:0][DW-1:0] m_w3 [NIN3];
  logic [N4-1:0][DW-1:0] m_w4 [N3];
  always_ff @(posedge clk) begin
    w1_data <= m_w1[w1_addr]; b1_data <= m_b1[b1_addr];
    w2_data <= m_w2[w2_addr]; b2_data <= m_b2[b2_addr];
    w3_row  <= m_w3[w3_addr]; w4_row  <= m_w4[w4_addr];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  net_t n;
  initial begin
    int cyc, sat_seen, clip_seen, odd_seen;
    real pr[];
    rst_n = 0; start = 0;
    sat_seen = 0; clip_seen = 0; odd_seen = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      make_net(n, L_IN, K1, NF1, K2, NF2, N3, N4, r == 1);
      eval_net(n, L_IN, K1, NF1, K2, NF2, N3, N4);
      sat_seen += n.sat1;
      clip_seen += (n.clip1 > 0) + (n.clip2 > 0) + (n.clip3 > 0);
      odd_seen += (n.odd1 > 0) && (n.odd2 > 0);
      foreach (n.w1[i]) m_w1[i] = 16'(n.w1[i]);
      foreach (n.b1[i]) m_b1[i] = 16'(n.b1[i]);
      foreach (n.w2[i]) m_w2[i] = 16'(n.w2[i]);
      foreach (n.b2[i]) m_b2[i] = 16'(n.b2[i]);
      foreach (n.w3[i]) m_w3[i / N3][i % N3] = 16'(n.w3[i]);
      foreach (n.b3[i]) b3_row[i] = 16'(n.b3[i]);
      foreach (n.w4[i]) m_w4[i / N4][i % N4] = 16'(n.w4[i]);
      foreach (n.b4[i]) b4_row[i] = 16'(n.b4[i]);
      foreach (n.x[i]) x[i] = data_t'(n.x[i]);
      @(negedge clk); start = 1; @(negedge clk); start = 0; cyc = 1;
      check(busy, "busy after start");
      while (!done) begin @(negedge clk); cyc++; end
      $display("inference %0d: %0d cycles, class %0d", r, cyc, cls);
      check(cyc < 7900, $sformatf("inference took %0d cycles", cyc));
      check(cyc == EXP_CYCLES, $sformatf("inference took %0d cycles, expected %0d", cyc, EXP_CYCLES));
      for (int i = 0; i < N4; i++)
        check(int'(logits[i]) == n.z[i], $sformatf("score %0d got %0d want %0d", i, logits[i], n.z[i]));
      check(int'(cls) == n.cls, "class");
      softmax_real(N4, n.z, pr);
      for (int i = 0; i < N4; i++) begin
        real d;
        d = real'(probs[i]) - pr[i];
        check(d < 655.0 && d > -655.0, $sformatf("softmax %0d", i));
      end
      @(negedge clk);
      check(!busy, "idle after done");
    end
    check(sat_seen > 0, "layer-1 saturation exercised");
    check(clip_seen >= 3, "ReLU clipping in every ReLU layer");
    check(odd_seen > 0, "pooling picks both elements of a pair");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
