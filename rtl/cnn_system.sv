// cnn_system: programmable-logic side of the saccade classifier.
//
// The processor (outside this module) is the only bus master. Through one
// AXI4-Lite port it loads the network's weights and biases into eight
// dual-port memories, writes a 192-sample saccade record into the CNN
// block's registers, sets the start bit, waits for DONE (the irq output or
// the done bit) and reads the three class scores, their softmax values and
// the winning class. Inside, an interconnect splits the port by address
// bits [21:18] into nine slaves:
//   0 CNN registers (see cnn_axil_regs)
//   1 layer-1 weights [f][k]      190   2 layer-1 biases  10
//   3 layer-2 weights [f][c][k]   900   4 layer-2 biases  10
//   5 layer-3 weights [i][n]    28800   6 layer-3 biases  60
//   7 layer-4 weights [i][n]      180   8 layer-4 biases   3
// Every memory is word-addressed from its window base (element i at byte
// offset 4*i, Q8.8 in the low 16 bits). Each memory has an AXI RAM controller
// on one port and the CNN block on the other, so all of them can be read by
// the CNN at the same time.
//
// The arrangement (processor, AXI bus, RAM controllers, one dual-port memory
// per weight and bias array, CNN block with start/done) follows the
// published system. The address map is this design's. Reset is synchronous
// and active low. Results stay readable until the next run; the weight memories
// must not be written while the CNN is busy.
module cnn_system
  import cnn_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  output logic      irq
);

  localparam int unsigned NW1 = NF1 * K1;
  localparam int unsigned NW2 = NF2 * NF1 * K2;
  localparam int unsigned NIN3 = NF2 * (L_IN / 4);

  axil_req_t s_req [N_SLAVES];
  axil_rsp_t s_rsp [N_SLAVES];

  axil_interconnect #(.N(N_SLAVES)) u_xbar (
    .clk, .rst_n, .m_req(s_axil_req), .m_rsp(s_axil_rsp), .s_req(s_req), .s_rsp(s_rsp));

  // ---------------- CNN block and its registers ----------------
  logic        cnn_start, cnn_busy, cnn_done;
  data_t       x [L_IN];
  data_t       logits [N4];
  logic [15:0] probs [N4];
  logic [$clog2(N4)-1:0] cls;

  cnn_axil_regs #(.N_IN(L_IN), .N_OUT(N4)) u_regs (
    .clk, .rst_n, .s_req(s_req[SLV_CNN]), .s_rsp(s_rsp[SLV_CNN]),
    .start(cnn_start), .busy(cnn_busy), .done(cnn_done), .x(x),
    .logits(logits), .probs(probs), .cls(cls), .irq(irq));

  // port-B wiring between the memories and the CNN block
  logic [$clog2(NW1)-1:0]  w1_addr;
  logic [$clog2(NF1)-1:0]  b1_addr;
  logic [$clog2(NW2)-1:0]  w2_addr;
  logic [$clog2(NF2)-1:0]  b2_addr;
  logic [$clog2(NIN3)-1:0] w3_addr;
  logic [$clog2(N3)-1:0]   w4_addr;
  logic [0:0][DW-1:0]      w1_row, b1_row, w2_row, b2_row;
  logic [N3-1:0][DW-1:0]   w3_row, b3_row;
  logic [N4-1:0][DW-1:0]   w4_row, b4_row;

  cnn_core u_cnn (
    .clk, .rst_n, .start(cnn_start), .busy(cnn_busy), .done(cnn_done), .x(x),
    .w1_addr, .w1_data(w1_row[0]), .b1_addr, .b1_data(b1_row[0]),
    .w2_addr, .w2_data(w2_row[0]), .b2_addr, .b2_data(b2_row[0]),
    .w3_addr, .w3_row, .b3_row, .w4_addr, .w4_row, .b4_row,
    .logits, .probs, .cls);

  // ---------------- weight and bias memories ----------------
  // one AXI RAM controller + one dual-port memory per array
  `define CNN_WEIGHT_MEM(NAME, SLV, ROWS_, ROW_, BADDR) \
    localparam int unsigned NAME``_AW = $clog2(ROWS_ * ROW_); \
    logic                 NAME``_pa_en, NAME``_pa_we; \
    logic [NAME``_AW-1:0] NAME``_pa_addr; \
    logic [DW-1:0]        NAME``_pa_wdata, NAME``_pa_rdata; \
    axil_bram_ctrl #(.MEM_AW(NAME``_AW), .MEM_DW(DW), .DEPTH(ROWS_ * ROW_)) u_ctrl_``NAME ( \
      .clk, .rst_n, .s_req(s_req[SLV]), .s_rsp(s_rsp[SLV]), \
      .mem_en(NAME``_pa_en), .mem_we(NAME``_pa_we), .mem_addr(NAME``_pa_addr), \
      .mem_wdata(NAME``_pa_wdata), .mem_rdata(NAME``_pa_rdata)); \
    weight_ram #(.ROWS(ROWS_), .ROW(ROW_), .DW(DW)) u_ram_``NAME ( \
      .clk, .a_en(NAME``_pa_en), .a_we(NAME``_pa_we), .a_addr(NAME``_pa_addr), \
      .a_wdata(NAME``_pa_wdata), .a_rdata(NAME``_pa_rdata), \
      .b_addr(BADDR), .b_rdata(NAME``_row));

  `CNN_WEIGHT_MEM(w1, SLV_W1, NW1,  1,  w1_addr)
  `CNN_WEIGHT_MEM(b1, SLV_B1, NF1,  1,  b1_addr)
  `CNN_WEIGHT_MEM(w2, SLV_W2, NW2,  1,  w2_addr)
  `CNN_WEIGHT_MEM(b2, SLV_B2, NF2,  1,  b2_addr)
  `CNN_WEIGHT_MEM(w3, SLV_W3, NIN3, N3, w3_addr)
  `CNN_WEIGHT_MEM(b3, SLV_B3, 1,    N3, 1'b0)
  `CNN_WEIGHT_MEM(w4, SLV_W4, N3,   N4, w4_addr)
  `CNN_WEIGHT_MEM(b4, SLV_B4, 1,    N4, 1'b0)
  `undef CNN_WEIGHT_MEM

endmodule
