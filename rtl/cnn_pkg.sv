// cnn_pkg: types and constants shared by the saccade-classification CNN.
//
// Numbers: every activation, weight and bias is a signed 16-bit fixed-point
// value with 8 fraction bits (Q8.8). Products are summed at full precision in
// 40-bit accumulators and brought back to Q8.8 by an arithmetic shift and
// saturation. The network sizes (192 input samples, 19-tap and 9-tap
// convolutions with 10 filters each, 60 and 3 fully connected neurons) are the
// ones of the published network; the number format is this design's choice.
//
// Bus: the processor reaches the programmable logic through AXI4-Lite with
// 32-bit addresses and data. Requests and responses are carried in the two
// structs below; the address map is given by the SLV_* indices, each slave
// owning a 256 KiB window selected by address bits [21:18].
package cnn_pkg;

  // ---------------- number format ----------------
  parameter int unsigned DW    = 16;   // data width of activations/weights
  parameter int unsigned FRAC  = 8;    // fraction bits
  parameter int unsigned ACC_W = 40;   // accumulator width
  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  localparam data_t DATA_MAX = data_t'({1'b0, {(DW-1){1'b1}}});
  localparam data_t DATA_MIN = data_t'({1'b1, {(DW-1){1'b0}}});

  // Bring a sum of Q(2*FRAC) products back to Q8.8 with saturation.
  function automatic data_t requant(input acc_t a);
    acc_t s;
    s = a >>> FRAC;
    if (s > acc_t'(DATA_MAX)) return DATA_MAX;
    if (s < acc_t'(DATA_MIN)) return DATA_MIN;
    return data_t'(s);
  endfunction

  function automatic data_t relu(input data_t v);
    return v[DW-1] ? '0 : v;
  endfunction

  // ---------------- network dimensions ----------------
  parameter int unsigned L_IN = 192;  // samples of one saccade record
  parameter int unsigned K1   = 19;   // layer-1 kernel length
  parameter int unsigned NF1  = 10;   // layer-1 filters
  parameter int unsigned K2   = 9;    // layer-2 kernel length
  parameter int unsigned NF2  = 10;   // layer-2 filters
  parameter int unsigned N3   = 60;   // layer-3 neurons
  parameter int unsigned N4   = 3;    // layer-4 neurons (classes)

  // ---------------- AXI4-Lite ----------------
  parameter int unsigned AXI_AW = 32;
  parameter int unsigned AXI_DW = 32;
  typedef logic [AXI_AW-1:0] axi_addr_t;
  typedef logic [AXI_DW-1:0] axi_data_t;
  typedef logic [1:0] axi_resp_t;
  localparam axi_resp_t RESP_OKAY   = 2'b00;
  localparam axi_resp_t RESP_SLVERR = 2'b10;
  localparam axi_resp_t RESP_DECERR = 2'b11;

  typedef struct packed {
    axi_addr_t             awaddr;
    logic                  awvalid;
    axi_data_t             wdata;
    logic [AXI_DW/8-1:0]   wstrb;
    logic                  wvalid;
    logic                  bready;
    axi_addr_t             araddr;
    logic                  arvalid;
    logic                  rready;
  } axil_req_t;

  typedef struct packed {
    logic       awready;
    logic       wready;
    axi_resp_t  bresp;
    logic       bvalid;
    logic       arready;
    axi_data_t  rdata;
    axi_resp_t  rresp;
    logic       rvalid;
  } axil_rsp_t;

  // ---------------- address map ----------------
  parameter int unsigned SLV_SEL_LSB = 18;  // 256 KiB per slave
  parameter int unsigned SLV_SEL_W   = 4;
  typedef enum logic [SLV_SEL_W-1:0] {
    SLV_CNN = 4'd0,   // CNN control, inputs, outputs
    SLV_W1  = 4'd1,   // layer-1 weights  [f][k]
    SLV_B1  = 4'd2,   // layer-1 biases   [f]
    SLV_W2  = 4'd3,   // layer-2 weights  [f][c][k]
    SLV_B2  = 4'd4,   // layer-2 biases   [f]
    SLV_W3  = 4'd5,   // layer-3 weights  [i][n]
    SLV_B3  = 4'd6,   // layer-3 biases   [n]
    SLV_W4  = 4'd7,   // layer-4 weights  [i][n]
    SLV_B4  = 4'd8    // layer-4 biases   [n]
  } slave_e;
  parameter int unsigned N_SLAVES = 9;

  // CNN register block, byte offsets inside its window
  parameter int unsigned REG_CTRL   = 'h000;  // [0] start (W1), [1] done, [2] idle
  parameter int unsigned REG_CLASS  = 'h004;  // argmax of the scores
  parameter int unsigned REG_LOGIT  = 'h010;  // 3 layer-4 scores, Q8.8 sign-extended
  parameter int unsigned REG_PROB   = 'h020;  // 3 softmax values, Q1.15
  parameter int unsigned REG_INPUT  = 'h400;  // 192 input samples, Q8.8

endpackage
