// Testbench for conv1d_bank: a small bank (3 channels, 5 taps, 4 filters,
// 16 positions) against the reference convolution, with random inputs and
// weights large enough to hit ReLU clipping and saturation. Checks every
// output, the consecutive output indices (one position per cycle), the
// first output three cycles after start, and the done pulse; runs twice with new data.
module tb_conv1d_bank;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  localparam int C = 3, K = 5, NF = 4, L = 16, LP = L + K - 1, PAD = (K-1)/2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, o_valid, busy, done;
  logic [$clog2(L)-1:0] o_idx;
  data_t x [C][LP];
  data_t w [NF][C][K];
  data_t b [NF];
  data_t o_data [NF];
  int checks = 0, failures = 0;
  int xr[], wr[], br[], yr[];
  int nclip, nsat, nout, cyc_first, cyc;

  conv1d_bank #(.C(C), .K(K), .NF(NF), .L(L)) dut (.*);

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

  always @(negedge clk) begin
    cyc++;
    if (rst_n && o_valid) begin
      if (nout == 0) cyc_first = cyc;
      check(int'(o_idx) == nout, $sformatf("index %0d want %0d", o_idx, nout));
      for (int f = 0; f < NF; f++)
        check(int'(o_data[f]) == yr[f*L + nout],
              $sformatf("f%0d t%0d got %0d want %0d", f, nout, o_data[f], yr[f*L + nout]));
      check(done == (nout == L - 1), "done on last output");
      nout++;
    end
  end

  initial begin
    int start_cyc;
    rst_n = 0; start = 0; cyc = 0; nsat = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      xr = new[C*L]; wr = new[NF*C*K]; br = new[NF];
      for (int i = 0; i < C*L; i++) xr[i] = $urandom_range(0, 4000) - 2000;
      for (int i = 0; i < NF*C*K; i++) wr[i] = $urandom_range(0, 2000) - 1000;
      for (int i = 0; i < NF; i++) br[i] = $urandom_range(0, 512) - 256;
      if (run == 1) begin xr[0] = 32767; wr[PAD] = 32767; end   // force saturation of f0 t0
      conv(C, K, NF, L, xr, wr, br, yr, nclip);
      if (yr[0] == 32767) nsat++;
      for (int c = 0; c < C; c++)
        for (int p = 0; p < LP; p++)
          x[c][p] = (p < PAD || p >= PAD + L) ? '0 : data_t'(xr[c*L + p - PAD]);
      for (int f = 0; f < NF; f++) begin
        b[f] = data_t'(br[f]);
        for (int c = 0; c < C; c++)
          for (int k = 0; k < K; k++) w[f][c][k] = data_t'(wr[(f*C + c)*K + k]);
      end
      nout = 0;
      @(negedge clk);
      start = 1; start_cyc = cyc + 1; @(negedge clk); start = 0;
      while (nout < L) @(negedge clk);
      check(cyc_first - start_cyc == 3, $sformatf("latency %0d", cyc_first - start_cyc));
      check(nclip > 0, "ReLU clipping exercised");
      repeat (3) @(negedge clk);
      check(!busy && nout == L, "idle, no extra outputs");
    end
    check(nsat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
