// flatten_stream: turns a C x T feature array into a serial stream.
//
// The fully connected layers take their inputs one per cycle. On `start` this
// unit sends element a[c][t] with index c*T + t, channel by channel (all T
// positions of channel 0 first), one element per cycle, so C*T elements take
// C*T cycles; o_valid goes high the cycle after `start`. `done` pulses
// together with the last element. The array must stay stable meanwhile.
//
// The channel-major order follows the published flatten step (480 = 10
// groups of 48); the serial form is this design's choice.
module flatten_stream
  import cnn_pkg::*;
#(
  parameter int unsigned C  = 10,
  parameter int unsigned T  = 48,
  localparam int unsigned N  = C * T,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW = (C > 1) ? $clog2(C) : 1,
  localparam int unsigned TW = (T > 1) ? $clog2(T) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  data_t         a [C][T],
  output logic          o_valid,
  output logic [IW-1:0] o_idx,
  output data_t         o_data,
  output logic          done
);

  logic [CW-1:0] c_q;
  logic [TW-1:0] t_q;
  logic          last;

  assign last   = o_valid && 32'(o_idx) == N - 1;
  assign o_data = a[c_q][t_q];
  assign done   = last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      o_idx   <= '0;
      c_q     <= '0;
      t_q     <= '0;
    end else if (start) begin
      o_valid <= 1'b1;
      o_idx   <= '0;
      c_q     <= '0;
      t_q     <= '0;
    end else if (o_valid) begin
      if (last) begin
        o_valid <= 1'b0;
      end else begin
        o_idx <= o_idx + 1'b1;
        if (32'(t_q) == T - 1) begin
          t_q <= '0;
          c_q <= c_q + 1'b1;
        end else begin
          t_q <= t_q + 1'b1;
        end
      end
    end
  end

endmodule
