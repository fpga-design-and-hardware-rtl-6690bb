// axil_interconnect: connects the processor's AXI4-Lite master port to the
// N slaves of the programmable logic (the CNN register block and the RAM
// controllers of the weight memories).
//
// The slave is chosen by address bits [SLV_SEL_LSB +: SLV_SEL_W]. Reads and
// writes are routed independently, one transaction at a time each: when AW
// (or AR) becomes valid and the channel is idle, the target is latched, the
// request is forwarded only to that slave, and the channel is freed by the
// B (or R) handshake. An address that selects no slave is answered by the
// interconnect itself with DECERR (reads return 0). Routing adds one cycle:
// the selection register is loaded in the cycle AW/AR first appears, and the
// request reaches the slave from the next cycle on.
//
// The published system uses the vendor's AXI interconnect; this is a minimal
// single-outstanding replacement written for this design.
module axil_interconnect
  import cnn_pkg::*;
#(
  parameter int unsigned N = 9
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t m_req,
  output axil_rsp_t m_rsp,
  output axil_req_t s_req [N],
  input  axil_rsp_t s_rsp [N]
);

  typedef enum logic [1:0] {CH_IDLE, CH_SLAVE, CH_ERR_ADDR, CH_ERR_RESP} ch_state_e;

  ch_state_e wst_q, rst_q;
  logic [SLV_SEL_W-1:0] wsel_q, rsel_q;
  logic [SLV_SEL_W-1:0] wdec, rdec;

  always_comb begin
    wdec = m_req.awaddr[SLV_SEL_LSB +: SLV_SEL_W];
    rdec = m_req.araddr[SLV_SEL_LSB +: SLV_SEL_W];
  end

  // forward paths
  always_comb begin
    m_rsp = '0;
    for (int i = 0; i < N; i++) begin
      s_req[i]         = m_req;
      s_req[i].awvalid = 1'b0;
      s_req[i].wvalid  = 1'b0;
      s_req[i].bready  = 1'b0;
      s_req[i].arvalid = 1'b0;
      s_req[i].rready  = 1'b0;
    end
    // write channel
    if (wst_q == CH_SLAVE) begin
      for (int i = 0; i < N; i++) begin
        if (wsel_q == SLV_SEL_W'(i)) begin
          s_req[i].awvalid = m_req.awvalid;
          s_req[i].wvalid  = m_req.wvalid;
          s_req[i].bready  = m_req.bready;
          m_rsp.awready    = s_rsp[i].awready;
          m_rsp.wready     = s_rsp[i].wready;
          m_rsp.bvalid     = s_rsp[i].bvalid;
          m_rsp.bresp      = s_rsp[i].bresp;
        end
      end
    end else if (wst_q == CH_ERR_ADDR) begin
      m_rsp.awready = m_req.awvalid && m_req.wvalid;
      m_rsp.wready  = m_req.awvalid && m_req.wvalid;
    end else if (wst_q == CH_ERR_RESP) begin
      m_rsp.bvalid = 1'b1;
      m_rsp.bresp  = RESP_DECERR;
    end
    // read channel
    if (rst_q == CH_SLAVE) begin
      for (int i = 0; i < N; i++) begin
        if (rsel_q == SLV_SEL_W'(i)) begin
          s_req[i].arvalid = m_req.arvalid;
          s_req[i].rready  = m_req.rready;
          m_rsp.arready    = s_rsp[i].arready;
          m_rsp.rvalid     = s_rsp[i].rvalid;
          m_rsp.rresp      = s_rsp[i].rresp;
          m_rsp.rdata      = s_rsp[i].rdata;
        end
      end
    end else if (rst_q == CH_ERR_ADDR) begin
      m_rsp.arready = m_req.arvalid;
    end else if (rst_q == CH_ERR_RESP) begin
      m_rsp.rvalid = 1'b1;
      m_rsp.rresp  = RESP_DECERR;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wst_q  <= CH_IDLE;
      rst_q  <= CH_IDLE;
      wsel_q <= '0;
      rsel_q <= '0;
    end else begin
      unique case (wst_q)
        CH_IDLE: if (m_req.awvalid) begin
          wsel_q <= wdec;
          wst_q  <= (32'(wdec) < N) ? CH_SLAVE : CH_ERR_ADDR;
        end
        CH_SLAVE:    if (m_rsp.bvalid && m_req.bready) wst_q <= CH_IDLE;
        CH_ERR_ADDR: if (m_req.awvalid && m_req.wvalid) wst_q <= CH_ERR_RESP;
        CH_ERR_RESP: if (m_req.bready) wst_q <= CH_IDLE;
        default:     wst_q <= CH_IDLE;
      endcase
      unique case (rst_q)
        CH_IDLE: if (m_req.arvalid) begin
          rsel_q <= rdec;
          rst_q  <= (32'(rdec) < N) ? CH_SLAVE : CH_ERR_ADDR;
        end
        CH_SLAVE:    if (m_rsp.rvalid && m_req.rready) rst_q <= CH_IDLE;
        CH_ERR_ADDR: if (m_req.arvalid) rst_q <= CH_ERR_RESP;
        CH_ERR_RESP: if (m_req.rready) rst_q <= CH_IDLE;
        default:     rst_q <= CH_IDLE;
      endcase
    end
  end

  // A master must keep AWVALID/ARVALID up until the address is accepted.
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.awvalid && !m_rsp.awready |=> m_req.awvalid);
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.arvalid && !m_rsp.arready |=> m_req.arvalid);

endmodule
