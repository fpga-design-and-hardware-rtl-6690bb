// distribute: copies a weight or bias memory into registers.
//
// The convolution layers use every weight of every filter in the same cycle,
// which a memory port cannot deliver. On `start` this unit walks the memory
// from element 0 to N-1, one element per cycle, and drops each value into
// its register, so that afterwards all N values are available in parallel on
// `q`. The memory has one cycle of read latency: address i is issued in cycle
// i and its data stored in cycle i+1. `done` pulses one cycle after the last
// value is stored; a copy of N elements takes N+2 cycles from `start`.
//
// The unit is named in the published data-flow figure; how it works is this
// design's choice.
module distribute
  import cnn_pkg::*;
#(
  parameter int unsigned N  = 190,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [AW-1:0] rd_addr,
  input  data_t         rd_data,
  output data_t         q [N],
  output logic          busy,
  output logic          done
);

  logic [AW-1:0] cnt_q, widx_q;
  logic          issue_q, wr_q;

  assign rd_addr = cnt_q;
  assign busy    = issue_q || wr_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      widx_q  <= '0;
      issue_q <= 1'b0;
      wr_q    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      wr_q <= issue_q;
      widx_q <= cnt_q;
      if (start) begin
        cnt_q   <= '0;
        issue_q <= 1'b1;
      end else if (issue_q) begin
        if (32'(cnt_q) == N - 1) issue_q <= 1'b0;
        else                     cnt_q   <= cnt_q + 1'b1;
      end
      if (wr_q && 32'(widx_q) == N - 1) done <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_q) q[widx_q] <= rd_data;
  end

endmodule
