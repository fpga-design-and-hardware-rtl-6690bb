// Testbench for fc_layer: a 20-input, 6-neuron layer with ReLU and a 7-input,
// 3-neuron layer without, each fed by a gap-free input stream and a model
// weight memory (one cycle of read latency, whole rows). Outputs are checked
// against the reference layer, and y_valid must come NIN+2 cycles after the
// first input. ReLU clipping and negative outputs of the plain layer are
// both required to occur.
module tb_fc_layer;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

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

  // ---- layer A: 20 -> 6, ReLU ----
  localparam int NA = 20, MA = 6;
  logic a_start, a_xv, a_yv;
  logic [$clog2(NA)-1:0] a_xi, a_wa;
  data_t a_xd;
  logic [MA-1:0][DW-1:0] a_row, a_bias;
  data_t a_y [MA];
  logic [MA-1:0][DW-1:0] a_mem [NA];
  fc_layer #(.NIN(NA), .NOUT(MA), .RELU(1'b1)) dut_a (
    .clk, .rst_n, .start(a_start), .x_valid(a_xv), .x_idx(a_xi), .x_data(a_xd),
    .w_addr(a_wa), .w_row(a_row), .bias(a_bias), .y_valid(a_yv), .y(a_y));
  always_ff @(posedge clk) a_row <= a_mem[a_wa];

  // ---- layer B: 7 -> 3, no ReLU ----
  localparam int NB = 7, MB = 3;
  logic b_start, b_xv, b_yv;
  logic [$clog2(NB)-1:0] b_xi, b_wa;
  data_t b_xd;
  logic [MB-1:0][DW-1:0] b_row, b_bias;
  data_t b_y [MB];
  logic [MB-1:0][DW-1:0] b_mem [NB];
  fc_layer #(.NIN(NB), .NOUT(MB), .RELU(1'b0)) dut_b (
    .clk, .rst_n, .start(b_start), .x_valid(b_xv), .x_idx(b_xi), .x_data(b_xd),
    .w_addr(b_wa), .w_row(b_row), .bias(b_bias), .y_valid(b_yv), .y(b_y));
  always_ff @(posedge clk) b_row <= b_mem[b_wa];

  int nclip = 0, nneg = 0;

  task automatic run_a();
    int xr[], wr[], br[], yr[], nc, cyc;
    xr = new[NA]; wr = new[NA*MA]; br = new[MA];
    for (int i = 0; i < NA; i++) xr[i] = $urandom_range(0, 1000) - 500;
    for (int i = 0; i < NA*MA; i++) begin
      wr[i] = $urandom_range(0, 1000) - 500;
      a_mem[i / MA][i % MA] = 16'(wr[i]);
    end
    for (int n = 0; n < MA; n++) begin br[n] = $urandom_range(0, 400) - 200; a_bias[n] = 16'(br[n]); end
    fc(NA, MA, 1'b1, xr, wr, br, yr, nc);
    nclip += nc;
    @(negedge clk); a_start = 1; @(negedge clk); a_start = 0;
    for (int i = 0; i < NA; i++) begin
      a_xv = 1; a_xi = 5'(i); a_xd = data_t'(xr[i]);
      @(negedge clk);
    end
    a_xv = 0; cyc = NA;
    while (!a_yv) begin @(negedge clk); cyc++; end
    check(cyc == NA + 2, $sformatf("layer A latency %0d", cyc));
    for (int n = 0; n < MA; n++)
      check(int'(a_y[n]) == yr[n], $sformatf("A neuron %0d got %0d want %0d", n, a_y[n], yr[n]));
  endtask

  task automatic run_b();
    int xr[], wr[], br[], yr[], nc;
    xr = new[NB]; wr = new[NB*MB]; br = new[MB];
    for (int i = 0; i < NB; i++) xr[i] = $urandom_range(0, 1000) - 500;
    for (int i = 0; i < NB*MB; i++) begin
      wr[i] = $urandom_range(0, 1000) - 500;
      b_mem[i / MB][i % MB] = 16'(wr[i]);
    end
    for (int n = 0; n < MB; n++) begin br[n] = $urandom_range(0, 400) - 200; b_bias[n] = 16'(br[n]); end
    fc(NB, MB, 1'b0, xr, wr, br, yr, nc);
    @(negedge clk); b_start = 1; @(negedge clk); b_start = 0;
    for (int i = 0; i < NB; i++) begin
      // a gap in the middle of the stream
      if (i == 3) begin b_xv = 0; @(negedge clk); end
      b_xv = 1; b_xi = 3'(i); b_xd = data_t'(xr[i]);
      @(negedge clk);
    end
    b_xv = 0;
    while (!b_yv) @(negedge clk);
    for (int n = 0; n < MB; n++) begin
      check(int'(b_y[n]) == yr[n], $sformatf("B neuron %0d got %0d want %0d", n, b_y[n], yr[n]));
      if (yr[n] < 0) nneg++;
    end
  endtask

  initial begin
    rst_n = 0; a_start = 0; b_start = 0; a_xv = 0; b_xv = 0; a_xi = 0; b_xi = 0; a_xd = 0; b_xd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin run_a(); run_b(); end
    check(nclip > 0, "ReLU clipping exercised");
    check(nneg > 0, "negative outputs without ReLU");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
