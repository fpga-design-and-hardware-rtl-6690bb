// fc_layer: fully connected layer, input-serial and neuron-parallel.
//
// Inputs arrive one per cycle as (x_valid, x_idx, x_data). For each input the
// layer puts x_idx on w_addr; the weight memory answers one cycle later with
// the row w_row holding that input's weight for every neuron, and all NOUT
// accumulators add x * w in that cycle. After input NIN-1 has been added, the
// next cycle forms
//     y[n] = ReLU?( requant( acc[n] + (bias[n] << FRAC) ) )
// registers it and pulses y_valid. `start` clears the accumulators and must
// come before the first input. With a gap-free input stream the layer needs
// NIN + 2 cycles from the first input to y_valid.
//
// The neuron counts and the ReLU of the hidden layer follow the published
// network; the input-serial organisation and the row-wide weight memory are
// this design's choices.
module fc_layer
  import cnn_pkg::*;
#(
  parameter int unsigned NIN  = 480,
  parameter int unsigned NOUT = 60,
  parameter bit          RELU = 1'b1,
  localparam int unsigned IW = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    x_valid,
  input  logic [IW-1:0]           x_idx,
  input  data_t                   x_data,
  output logic [IW-1:0]           w_addr,
  input  logic [NOUT-1:0][DW-1:0] w_row,
  input  logic [NOUT-1:0][DW-1:0] bias,
  output logic                    y_valid,
  output data_t                   y [NOUT]
);

  logic          v_q, fin_q;
  logic [IW-1:0] idx_q;
  data_t         x_q;
  acc_t          acc_q [NOUT];

  assign w_addr = x_idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q     <= 1'b0;
      idx_q   <= '0;
      x_q     <= '0;
      fin_q   <= 1'b0;
      y_valid <= 1'b0;
    end else begin
      v_q     <= x_valid;
      idx_q   <= x_idx;
      x_q     <= x_data;
      fin_q   <= v_q && 32'(idx_q) == NIN - 1;
      y_valid <= fin_q;
    end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      for (int n = 0; n < NOUT; n++) acc_q[n] <= '0;
    end else if (v_q) begin
      for (int n = 0; n < NOUT; n++)
        acc_q[n] <= acc_q[n] + acc_t'(x_q * $signed(w_row[n]));
    end
  end

  always_ff @(posedge clk) begin
    if (fin_q)
      for (int n = 0; n < NOUT; n++) begin
        if (RELU) y[n] <= relu(requant(acc_q[n] + (acc_t'($signed(bias[n])) <<< FRAC)));
        else      y[n] <= requant(acc_q[n] + (acc_t'($signed(bias[n])) <<< FRAC));
      end
  end

endmodule
