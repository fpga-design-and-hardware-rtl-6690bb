// pad_buffer: zero-padded feature buffer in front of a convolution layer.
//
// A convolution with a K-tap kernel that keeps the sequence length needs
// (K-1)/2 zeros on each side of the input ("same" padding): 192 samples
// become 210 positions for the 19-tap first layer, 96 positions become 104
// for the 9-tap second layer. The buffer is cleared with `clear`, then filled
// by a stream that writes C channel values per cycle at position
// wr_idx + PAD. Its whole contents `q` are read in parallel; every filter of
// the following layer looks at the same copy, which is how this design
// provides the per-filter replication of the input. A write in the same cycle
// as `clear` is lost; writes take effect at the next clock edge.
//
// The padded sizes come from the published network; clearing and streaming
// are this design's choices.
module pad_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned C   = 1,
  parameter int unsigned L   = 192,
  parameter int unsigned PAD = 9,
  localparam int unsigned LP = L + 2 * PAD,
  localparam int unsigned IW = $clog2(L)
) (
  input  logic           clk,
  input  logic           clear,
  input  logic           wr_en,
  input  logic [IW-1:0]  wr_idx,
  input  data_t          wr_data [C],
  output data_t          q [C][LP]
);

  always_ff @(posedge clk) begin
    if (clear) begin
      for (int c = 0; c < C; c++)
        for (int p = 0; p < LP; p++)
          q[c][p] <= '0;
    end else if (wr_en && 32'(wr_idx) < L) begin
      for (int c = 0; c < C; c++)
        q[c][32'(wr_idx) + PAD] <= wr_data[c];
    end
  end

endmodule
