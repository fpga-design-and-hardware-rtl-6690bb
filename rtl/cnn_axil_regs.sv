// cnn_axil_regs: the AXI4-Lite register block through which the processor
// drives the CNN block.
//
// The processor writes the 192 input samples, writes 1 to the start bit,
// waits for the done bit (or the irq line) and then reads the results.
// Register map (byte offsets, 32-bit words):
//   0x000 CTRL   W: bit0 = 1 starts an inference (ignored while busy)
//                R: bit0 busy, bit1 done (set when a run ends, cleared by
//                   the next start), bit2 idle
//   0x004 CLASS  R: index of the largest output score
//   0x010+4i     R: output score i (Q8.8, sign-extended), i < N_OUT
//   0x020+4i     R: softmax value i (Q1.15), i < N_OUT
//   0x400+4i     R/W: input sample i (Q8.8, low 16 bits), i < N_IN
// Other offsets read as 0 and ignore writes. Writes are accepted when AW and
// W are both valid and no write response is pending, with BRESP one cycle
// later; a read is answered one cycle after AR is accepted. Write strobes are
// ignored. Start/done/inputs/outputs over the bus follow the published
// system; the map and the handshake timing are this design's.
module cnn_axil_regs
  import cnn_pkg::*;
#(
  parameter int unsigned N_IN  = 192,
  parameter int unsigned N_OUT = 3,
  localparam int unsigned CW   = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  axil_req_t     s_req,
  output axil_rsp_t     s_rsp,
  // to/from the CNN core
  output logic          start,
  input  logic          busy,
  input  logic          done,
  output data_t         x [N_IN],
  input  data_t         logits [N_OUT],
  input  logic [15:0]   probs [N_OUT],
  input  logic [CW-1:0] cls,
  output logic          irq
);

  logic      bvalid_q, rvalid_q, done_q;
  axi_data_t rdata_q;
  logic      wr_go, rd_go;
  logic [SLV_SEL_LSB-1:0] woff, roff;

  always_comb begin
    woff  = s_req.awaddr[SLV_SEL_LSB-1:0];
    roff  = s_req.araddr[SLV_SEL_LSB-1:0];
    wr_go = s_req.awvalid && s_req.wvalid && !bvalid_q;
    rd_go = s_req.arvalid && !rvalid_q;
    s_rsp         = '0;
    s_rsp.awready = wr_go;
    s_rsp.wready  = wr_go;
    s_rsp.bvalid  = bvalid_q;
    s_rsp.bresp   = RESP_OKAY;
    s_rsp.arready = rd_go;
    s_rsp.rvalid  = rvalid_q;
    s_rsp.rresp   = RESP_OKAY;
    s_rsp.rdata   = rdata_q;
  end

  assign irq = done_q;

  // read multiplexer
  axi_data_t rmux;
  always_comb begin
    rmux = '0;
    if (32'(roff) == REG_CTRL)
      rmux = AXI_DW'({!busy, done_q, busy});
    else if (32'(roff) == REG_CLASS)
      rmux = AXI_DW'(cls);
    else if (32'(roff) >= REG_INPUT && 32'(roff) < REG_INPUT + 4*N_IN)
      rmux = AXI_DW'($signed(x[(32'(roff) - REG_INPUT) >> 2]));
    else
      for (int i = 0; i < N_OUT; i++) begin
        if (32'(roff) == REG_LOGIT + 4*i) rmux = AXI_DW'($signed(logits[i]));
        if (32'(roff) == REG_PROB  + 4*i) rmux = AXI_DW'(probs[i]);
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
      done_q   <= 1'b0;
      start    <= 1'b0;
      for (int i = 0; i < N_IN; i++) x[i] <= '0;
    end else begin
      start <= 1'b0;
      if (done) done_q <= 1'b1;
      if (wr_go) begin
        bvalid_q <= 1'b1;
        if (32'(woff) == REG_CTRL && s_req.wdata[0] && !busy) begin
          start  <= 1'b1;
          done_q <= 1'b0;
        end
        if (32'(woff) >= REG_INPUT && 32'(woff) < REG_INPUT + 4*N_IN)
          x[(32'(woff) - REG_INPUT) >> 2] <= data_t'(s_req.wdata[DW-1:0]);
      end else if (bvalid_q && s_req.bready) begin
        bvalid_q <= 1'b0;
      end
      if (rd_go) begin
        rvalid_q <= 1'b1;
        rdata_q  <= rmux;
      end else if (rvalid_q && s_req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rsp.bvalid && !s_req.bready |=> s_rsp.bvalid);

endmodule
