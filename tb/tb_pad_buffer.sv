// Testbench for pad_buffer: fills a 2-channel buffer of 10 positions with
// PAD = 3 from a stream in random order, after earlier junk contents, and
// checks every padded position (zeros at both ends, data at i + PAD), then
// checks that clear empties the buffer again.
module tb_pad_buffer;
  import cnn_pkg::*;
  localparam int C = 2, L = 10, PAD = 3, LP = L + 2*PAD;
  logic clk = 0;
  always #5 clk = ~clk;
  logic clear, wr_en;
  logic [$clog2(L)-1:0] wr_idx;
  data_t wr_data [C];
  data_t q [C][LP];
  int checks = 0, failures = 0;
  data_t model [C][L];

  pad_buffer #(.C(C), .L(L), .PAD(PAD)) dut (.*);

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
    clear = 0; wr_en = 0; wr_idx = 0;
    for (int c = 0; c < C; c++) wr_data[c] = 16'h7777;
    // junk everywhere first: write all positions without clearing
    @(negedge clk);
    for (int i = 0; i < L; i++) begin wr_en = 1; wr_idx = 4'(i); @(negedge clk); end
    wr_en = 0;
    clear = 1; @(negedge clk); clear = 0;
    for (int i = L - 1; i >= 0; i--) begin
      for (int c = 0; c < C; c++) begin
        model[c][i] = data_t'($urandom);
        wr_data[c] = model[c][i];
      end
      wr_en = 1; wr_idx = 4'(i);
      @(negedge clk);
    end
    wr_en = 0;
    @(negedge clk);
    for (int c = 0; c < C; c++)
      for (int p = 0; p < LP; p++)
        if (p < PAD || p >= PAD + L) check(q[c][p] == 0, $sformatf("pad c%0d p%0d", c, p));
        else check(q[c][p] == model[c][p-PAD], $sformatf("data c%0d p%0d", c, p));
    clear = 1; @(negedge clk); clear = 0; @(negedge clk);
    for (int c = 0; c < C; c++)
      for (int p = 0; p < LP; p++) check(q[c][p] == 0, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
