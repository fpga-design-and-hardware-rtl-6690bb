// Testbench for softmax: random and hand-picked score vectors (equal scores,
// one dominant score, large spreads, negative scores). Each probability is
// compared with a floating-point softmax and must be within 2% of full scale
// (655 in Q1.15); the class must be the first largest score; the three
// probabilities must add up to 1.0 within the same tolerance; and done must
// come 2 + 16*N cycles after start.
module tb_softmax;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  localparam int N = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done;
  data_t z [N];
  logic [15:0] p [N];
  logic [1:0] cls;
  int checks = 0, failures = 0;

  softmax #(.N(N)) dut (.*);

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

  task automatic run(input int z0, input int z1, input int z2);
    int zi[];
    real pr[];
    int cyc, sum;
    zi = new[N];
    zi[0] = z0; zi[1] = z1; zi[2] = z2;
    for (int i = 0; i < N; i++) z[i] = data_t'(zi[i]);
    softmax_real(N, zi, pr);
    @(negedge clk); start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 2 + 16*N, $sformatf("softmax took %0d cycles", cyc));
    sum = 0;
    for (int i = 0; i < N; i++) begin
      real d;
      d = real'(p[i]) - pr[i];
      if (d < 0) d = -d;
      check(d < 655.0, $sformatf("z=(%0d,%0d,%0d) p%0d=%0d want %0.1f", z0, z1, z2, i, p[i], pr[i]));
      sum += p[i];
    end
    check(sum > 32768 - 655 && sum < 32768 + 655, $sformatf("sum %0d", sum));
    check(int'(cls) == argmax(N, zi), $sformatf("class %0d", cls));
  endtask

  initial begin
    rst_n = 0; start = 0;
    for (int i = 0; i < N; i++) z[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 0, 0);
    run(256, 256, -256);
    run(-5000, 3000, 200);
    run(32767, -32768, 0);
    run(100, 90, 80);
    run(-300, -200, -250);
    for (int r = 0; r < 40; r++)
      run($urandom_range(0, 2048) - 1024, $urandom_range(0, 2048) - 1024, $urandom_range(0, 2048) - 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
