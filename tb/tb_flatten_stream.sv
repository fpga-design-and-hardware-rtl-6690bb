// Testbench for flatten_stream: serialises a random 4 x 6 array twice and
// checks order (index c*T + t), values, a gap-free stream of C*T beats
// starting the cycle after start, and done on the last beat.
module tb_flatten_stream;
  import cnn_pkg::*;
  localparam int C = 4, T = 6, N = C * T;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, o_valid, done;
  logic [$clog2(N)-1:0] o_idx;
  data_t o_data;
  data_t a [C][T];
  int checks = 0, failures = 0;

  flatten_stream #(.C(C), .T(T)) dut (.*);

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

  initial begin
    rst_n = 0; start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      for (int c = 0; c < C; c++) for (int t = 0; t < T; t++) a[c][t] = data_t'($urandom);
      @(negedge clk);
      check(!o_valid, "idle before start");
      start = 1; @(negedge clk); start = 0;
      for (int n = 0; n < N; n++) begin
        check(o_valid && int'(o_idx) == n, $sformatf("beat %0d valid/index", n));
        check(o_data == a[n / T][n % T], $sformatf("beat %0d data", n));
        check(done == (n == N - 1), $sformatf("beat %0d done", n));
        @(negedge clk);
      end
      check(!o_valid, "stops after last beat");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
