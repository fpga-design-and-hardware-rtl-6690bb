// Testbench for weight_ram: fills a small memory through port A with random
// values, reads every element back on port A and every row on port B, and
// checks both against a model array; also checks the one-cycle read latency
// and that port B sees a port-A write from the following cycle on.
module tb_weight_ram;
  localparam int ROWS = 12, ROW = 5, DW = 16, NEL = ROWS * ROW;
  localparam int AWA = $clog2(NEL), AWB = $clog2(ROWS);
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en, a_we;
  logic [AWA-1:0] a_addr;
  logic [DW-1:0] a_wdata, a_rdata;
  logic [AWB-1:0] b_addr;
  logic [ROW-1:0][DW-1:0] b_rdata;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [NEL];

  weight_ram #(.ROWS(ROWS), .ROW(ROW), .DW(DW)) dut (.*);

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

  initial begin
    a_en = 0; a_we = 0; a_addr = 0; a_wdata = 0; b_addr = 0;
    @(negedge clk);
    for (int i = 0; i < NEL; i++) begin
      model[i] = DW'($urandom);
      a_en = 1; a_we = 1; a_addr = AWA'(i); a_wdata = model[i];
      @(negedge clk);
    end
    a_we = 0;
    for (int i = 0; i < NEL; i++) begin
      a_en = 1; a_addr = AWA'(i);
      @(negedge clk);
      check(a_rdata == model[i], $sformatf("port A element %0d", i));
    end
    a_en = 0;
    for (int r = 0; r < ROWS; r++) begin
      b_addr = AWB'(r);
      @(negedge clk);
      for (int c = 0; c < ROW; c++)
        check(b_rdata[c] == model[r*ROW + c], $sformatf("port B row %0d col %0d", r, c));
    end
    // write through A, row visible on B in the following cycle, not before
    b_addr = 3;
    @(negedge clk);
    a_en = 1; a_we = 1; a_addr = AWA'(3*ROW + 2); a_wdata = ~model[3*ROW + 2];
    @(negedge clk);
    check(b_rdata[2] == model[3*ROW + 2], "port B old value in write cycle");
    a_en = 0; a_we = 0;
    model[3*ROW + 2] = ~model[3*ROW + 2];
    @(negedge clk);
    check(b_rdata[2] == model[3*ROW + 2], "port B new value after write");
    // no write without enable
    a_en = 0; a_we = 1; a_addr = AWA'(7); a_wdata = ~model[7];
    @(negedge clk);
    a_we = 0; a_en = 1;
    @(negedge clk);
    check(a_rdata == model[7], "no write without a_en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
