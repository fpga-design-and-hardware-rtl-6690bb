// axil_bram_ctrl: AXI4-Lite slave that gives the processor access to one
// port of a memory (the "AXI RAM controller" between the processor and each
// weight memory).
//
// Each 32-bit bus word maps to one memory element: element address =
// (byte address within the slave's window) / 4. Writes take the low MEM_DW
// bits of the word; reads return the element sign-extended to 32 bits.
// Handling is one transaction at a time per direction:
//   write: AW and W are accepted together in the cycle both are valid and no
//          response is pending; the memory is written in that cycle and BRESP
//          (OKAY, or SLVERR past the end of the memory) is offered next cycle.
//   read:  AR is accepted when no read is in flight; the memory is read with
//          one cycle of latency and R is offered the cycle after.
// Write strobes are ignored (whole-element writes), a simplification of this
// design. The bus protocol rule that a raised VALID stays up until READY is
// checked by assertions.
module axil_bram_ctrl
  import cnn_pkg::*;
#(
  parameter int unsigned MEM_AW = 15,
  parameter int unsigned MEM_DW = 16,
  parameter int unsigned DEPTH  = 28800
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axil_req_t         s_req,
  output axil_rsp_t         s_rsp,
  output logic              mem_en,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [MEM_DW-1:0] mem_wdata,
  input  logic [MEM_DW-1:0] mem_rdata
);

  logic bvalid_q, rpend_q, rvalid_q;
  axi_resp_t bresp_q, rresp_q;
  logic [MEM_DW-1:0] rdata_q;

  logic wr_go, rd_go;
  logic [AXI_AW-1:0] wr_idx, rd_idx;
  always_comb begin
    wr_idx = AXI_AW'(s_req.awaddr[SLV_SEL_LSB-1:2]);
    rd_idx = AXI_AW'(s_req.araddr[SLV_SEL_LSB-1:2]);
    wr_go  = s_req.awvalid && s_req.wvalid && !bvalid_q;
    // a write has priority for the memory port in the same cycle
    rd_go  = s_req.arvalid && !rpend_q && !rvalid_q && !wr_go;

    mem_en    = wr_go || rd_go;
    mem_we    = wr_go && (wr_idx < DEPTH);
    mem_addr  = wr_go ? MEM_AW'(wr_idx) : MEM_AW'(rd_idx);
    mem_wdata = s_req.wdata[MEM_DW-1:0];

    s_rsp         = '0;
    s_rsp.awready = wr_go;
    s_rsp.wready  = wr_go;
    s_rsp.bvalid  = bvalid_q;
    s_rsp.bresp   = bresp_q;
    s_rsp.arready = rd_go;
    s_rsp.rvalid  = rvalid_q;
    s_rsp.rresp   = rresp_q;
    s_rsp.rdata   = AXI_DW'($signed(rdata_q));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      bresp_q  <= RESP_OKAY;
      rpend_q  <= 1'b0;
      rvalid_q <= 1'b0;
      rresp_q  <= RESP_OKAY;
      rdata_q  <= '0;
    end else begin
      if (wr_go) begin
        bvalid_q <= 1'b1;
        bresp_q  <= (wr_idx < DEPTH) ? RESP_OKAY : RESP_SLVERR;
      end else if (bvalid_q && s_req.bready) begin
        bvalid_q <= 1'b0;
      end
      if (rd_go) begin
        rpend_q <= 1'b1;
        rresp_q <= (rd_idx < DEPTH) ? RESP_OKAY : RESP_SLVERR;
      end
      if (rpend_q) begin
        rpend_q  <= 1'b0;
        rvalid_q <= 1'b1;
        rdata_q  <= (rresp_q == RESP_OKAY) ? mem_rdata : '0;
      end else if (rvalid_q && s_req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  // VALID must be held until the handshake completes.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rsp.bvalid && !s_req.bready |=> s_rsp.bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rsp.rvalid && !s_req.rready |=> s_rsp.rvalid && $stable(s_rsp.rdata));

endmodule
