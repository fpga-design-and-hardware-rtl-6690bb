// maxpool2: max-pooling of size 2 and stride 2 on a stream of positions.
//
// Each input beat carries position i_idx of all C channels. Beats with an
// even position are held; the following odd position is compared channel by
// channel with the held one and the larger value is sent out, one cycle
// later, as position i_idx/2. The stream may have gaps; positions must come
// in order, even before odd.
//
// Pool size 2 follows the published network; the streaming form is this
// design's choice.
module maxpool2
  import cnn_pkg::*;
#(
  parameter int unsigned C  = 10,
  parameter int unsigned IW = 8,
  localparam int unsigned OW = (IW > 1) ? IW - 1 : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          i_valid,
  input  logic [IW-1:0] i_idx,
  input  data_t         i_data [C],
  output logic          o_valid,
  output logic [OW-1:0] o_idx,
  output data_t         o_data [C]
);

  data_t held_q [C];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      o_idx   <= '0;
    end else begin
      o_valid <= i_valid && i_idx[0];
      if (i_valid && i_idx[0]) o_idx <= OW'(i_idx >> 1);
    end
  end

  always_ff @(posedge clk) begin
    if (i_valid) begin
      for (int c = 0; c < C; c++) begin
        if (!i_idx[0]) held_q[c] <= i_data[c];
        else           o_data[c] <= (i_data[c] > held_q[c]) ? i_data[c] : held_q[c];
      end
    end
  end

endmodule
