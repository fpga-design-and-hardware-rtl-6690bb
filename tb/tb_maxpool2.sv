// Testbench for maxpool2: streams 20 positions of 3 channels with random
// gaps and checks the 10 pooled outputs (index and per-channel max of each
// pair), including negative values and equal pairs.
module tb_maxpool2;
  import cnn_pkg::*;
  localparam int C = 3, L = 20, IW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, i_valid, o_valid;
  logic [IW-1:0] i_idx;
  logic [IW-2:0] o_idx;
  data_t i_data [C];
  data_t o_data [C];
  data_t inp [L][C];
  int checks = 0, failures = 0, nout = 0;

  maxpool2 #(.C(C), .IW(IW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && o_valid) begin
    check(int'(o_idx) == nout, $sformatf("output index %0d", o_idx));
    for (int c = 0; c < C; c++) begin
      data_t a, b, m;
      a = inp[2*nout][c]; b = inp[2*nout+1][c];
      m = (a > b) ? a : b;
      check(o_data[c] == m, $sformatf("pair %0d ch %0d got %0d want %0d", nout, c, o_data[c], m));
    end
    nout++;
  end

  initial begin
    rst_n = 0; i_valid = 0; i_idx = 0;
    for (int c = 0; c < C; c++) i_data[c] = 0;
    for (int i = 0; i < L; i++)
      for (int c = 0; c < C; c++) inp[i][c] = data_t'($urandom_range(0, 600)) - 300;
    inp[4][1] = 17; inp[5][1] = 17;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < L; i++) begin
      if ($urandom_range(0, 2) == 0) begin i_valid = 0; @(negedge clk); end
      i_valid = 1; i_idx = IW'(i);
      for (int c = 0; c < C; c++) i_data[c] = inp[i][c];
      @(negedge clk);
    end
    i_valid = 0;
    repeat (3) @(negedge clk);
    check(nout == L/2, $sformatf("%0d outputs", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
