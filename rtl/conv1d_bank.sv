// conv1d_bank: a bank of NF one-dimensional convolution filters with bias
// and ReLU, computing one output position of every filter per cycle.
//
// Input is a zero-padded array x[C][L+K-1] (see pad_buffer). For output
// position p the filter f computes
//     y[f][p] = ReLU( b[f] + sum_c sum_k w[f][c][k] * x[c][p+k] )
// in Q8.8, with the sum kept at full precision and then shifted back and
// saturated. All NF filters and all C*K products of one position are worked
// out in parallel, so a new position starts every cycle (initiation interval
// 1) and L positions take L cycles.
//
// Pipeline: after `start` the position counter issues p = 0 .. L-1 on
// consecutive cycles; stage 1 registers the NF*C*K products; stage 2 adds
// them up, adds the bias, requantises, applies ReLU and registers the result.
// Position p therefore appears on o_valid/o_idx/o_data two cycles after it is
// issued: the first output comes 3 cycles after `start`, and `done` comes
// with the last output, L+2 cycles after `start`.
// x, w and b must stay stable while the bank runs.
//
// Parallel filters, the II of 1 and the formula follow the published
// data-flow; the two-stage pipeline depth is this design's choice.
module conv1d_bank
  import cnn_pkg::*;
#(
  parameter int unsigned C  = 1,
  parameter int unsigned K  = 19,
  parameter int unsigned NF = 10,
  parameter int unsigned L  = 192,
  localparam int unsigned LP = L + K - 1,
  localparam int unsigned IW = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  data_t         x [C][LP],
  input  data_t         w [NF][C][K],
  input  data_t         b [NF],
  output logic          o_valid,
  output logic [IW-1:0] o_idx,
  output data_t         o_data [NF],
  output logic          busy,
  output logic          done
);

  // stage 0: position counter
  logic [IW-1:0] pos_q;
  logic          run_q;
  // stage 1: products
  logic                    v1_q;
  logic [IW-1:0]           idx1_q;
  logic signed [2*DW-1:0]  prod_q [NF][C][K];

  assign busy = run_q || v1_q || o_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos_q <= '0;
      run_q <= 1'b0;
    end else if (start) begin
      pos_q <= '0;
      run_q <= 1'b1;
    end else if (run_q) begin
      if (32'(pos_q) == L - 1) run_q <= 1'b0;
      else                     pos_q <= pos_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1_q   <= 1'b0;
      idx1_q <= '0;
    end else begin
      v1_q   <= run_q && !start;
      idx1_q <= pos_q;
    end
  end

  always_ff @(posedge clk) begin
    if (run_q && !start)
      for (int f = 0; f < NF; f++)
        for (int c = 0; c < C; c++)
          for (int k = 0; k < K; k++)
            prod_q[f][c][k] <= w[f][c][k] * x[c][32'(pos_q) + k];
  end

  // stage 2: sum, bias, requantise, ReLU
  acc_t sum [NF];
  always_comb begin
    for (int f = 0; f < NF; f++) begin
      sum[f] = acc_t'(b[f]) <<< FRAC;
      for (int c = 0; c < C; c++)
        for (int k = 0; k < K; k++)
          sum[f] += acc_t'(prod_q[f][c][k]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      o_idx   <= '0;
      done    <= 1'b0;
    end else begin
      o_valid <= v1_q;
      o_idx   <= idx1_q;
      done    <= v1_q && 32'(idx1_q) == L - 1;
    end
  end

  always_ff @(posedge clk) begin
    if (v1_q)
      for (int f = 0; f < NF; f++)
        o_data[f] <= relu(requant(sum[f]));
  end

endmodule
