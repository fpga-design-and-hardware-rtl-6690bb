// Testbench for distribute: attaches a model memory with one cycle of read
// latency, runs two copies with different contents and checks every copied
// register and that done comes exactly N+2 cycles after start.
module tb_distribute;
  import cnn_pkg::*;
  localparam int N = 23;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done;
  logic [$clog2(N)-1:0] rd_addr;
  data_t rd_data;
  data_t q [N];
  data_t mem [N];
  int checks = 0, failures = 0;

  distribute #(.N(N)) dut (.*);
  always_ff @(posedge clk) rd_data <= mem[rd_addr];

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
    int cyc;
    rst_n = 0; start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      for (int i = 0; i < N; i++) mem[i] = data_t'($urandom);
      @(negedge clk);
      start = 1; @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == N + 2, $sformatf("copy took %0d cycles", cyc));
      for (int i = 0; i < N; i++) check(q[i] == mem[i], $sformatf("run %0d element %0d", run, i));
      @(negedge clk);
      check(!busy && !done, "idle after copy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
