// weight_ram: dual-port memory for one layer's weights or biases.
//
// Each weight and bias array of the network lives in a memory of its own, so
// that the CNN block can read all of them at the same time while the processor
// can still load new values. Port A serves the processor: it addresses single
// elements (row-major, element = row*ROW + column) and can write or read them.
// Port B serves the CNN block and is read-only: it returns a whole row of ROW
// elements at once, which lets a fully connected layer fetch the weights of all
// its neurons for one input in a single cycle. Both ports are synchronous with
// one cycle of read latency. A write and a read of the same element in the
// same cycle on the two ports return the old value on port B.
//
// The dual-port arrangement follows the published system; the row-wide second
// port and the single-cycle latency are this design's choices.
module weight_ram #(
  parameter int unsigned ROWS = 480,
  parameter int unsigned ROW  = 60,
  parameter int unsigned DW   = 16,
  localparam int unsigned NEL  = ROWS * ROW,
  localparam int unsigned AW_A = (NEL  > 1) ? $clog2(NEL)  : 1,
  localparam int unsigned AW_B = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                     clk,
  // port A: processor side
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [AW_A-1:0]          a_addr,
  input  logic [DW-1:0]            a_wdata,
  output logic [DW-1:0]            a_rdata,
  // port B: CNN side, whole rows
  input  logic [AW_B-1:0]          b_addr,
  output logic [ROW-1:0][DW-1:0]   b_rdata
);

  logic [ROW-1:0][DW-1:0] mem [ROWS];

  logic [AW_B-1:0] a_row;
  logic [$clog2(ROW+1)-1:0] a_col;
  always_comb begin
    a_row = AW_B'(a_addr / AW_A'(ROW));
    a_col = $bits(a_col)'(a_addr % AW_A'(ROW));
  end

  always_ff @(posedge clk) begin
    if (a_en && 32'(a_addr) < NEL) begin
      if (a_we) mem[a_row][a_col] <= a_wdata;
      a_rdata <= mem[a_row][a_col];
    end
  end

  always_ff @(posedge clk) begin
    b_rdata <= (32'(b_addr) < ROWS) ? mem[b_addr] : '0;
  end

endmodule
