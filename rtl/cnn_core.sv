// cnn_core: the CNN hardware block that classifies one saccade record.
//
// Network (sizes from the published design, Q8.8 arithmetic of this design):
//   input 192 samples
//   -> zero padding to 210          -> conv 19 taps x 10 filters + ReLU -> 10 x 192
//   -> max-pool 2                   -> 10 x 96
//   -> zero padding to 104          -> conv 9 taps x 10 ch x 10 filters + ReLU -> 10 x 96
//   -> max-pool 2                   -> 10 x 48
//   -> flatten (index c*48 + t)     -> 480
//   -> fully connected 60 + ReLU    -> fully connected 3 -> softmax, argmax
//
// Weights and biases are not stored here: they sit in eight dual-port
// memories outside the block, which the processor fills. The block reads the
// convolution weights and biases into registers ("distribute"), and streams
// the fully connected weights row by row while it computes.
//
// Sequence after `start` (one inference, all steps one after the other):
//   LOAD   input samples into the layer-1 padded buffer and copy the four
//          convolution weight/bias memories into registers, all at once;
//          the longest copy (900 layer-2 weights) sets the time
//   CONV1  192 positions, one per cycle, pooled on the fly into the layer-2
//          padded buffer
//   CONV2  96 positions, one per cycle, pooled on the fly into a 10 x 48 buffer
//   FC3    480 inputs, one per cycle, 60 neurons in parallel
//   FC4    60 inputs, one per cycle, 3 neurons in parallel
//   SMAX   softmax and argmax
// then `done` pulses for one cycle with logits, probs and cls valid; they stay
// until the next run. `busy` is high from the cycle after `start` to `done`.
// A `start` while busy is ignored. With the default sizes one inference
// takes 1,794 cycles from `start` to `done`.
module cnn_core
  import cnn_pkg::*;
#(
  parameter int unsigned L_IN_P = L_IN,
  parameter int unsigned K1_P   = K1,
  parameter int unsigned NF1_P  = NF1,
  parameter int unsigned K2_P   = K2,
  parameter int unsigned NF2_P  = NF2,
  parameter int unsigned N3_P   = N3,
  parameter int unsigned N4_P   = N4,
  localparam int unsigned L2    = L_IN_P / 2,          // after first pooling
  localparam int unsigned L3    = L2 / 2,              // after second pooling
  localparam int unsigned NFLAT = NF2_P * L3,
  localparam int unsigned NW1   = NF1_P * K1_P,
  localparam int unsigned NW2   = NF2_P * NF1_P * K2_P,
  localparam int unsigned AW1   = $clog2(NW1),
  localparam int unsigned AWB1  = (NF1_P > 1) ? $clog2(NF1_P) : 1,
  localparam int unsigned AW2   = $clog2(NW2),
  localparam int unsigned AWB2  = (NF2_P > 1) ? $clog2(NF2_P) : 1,
  localparam int unsigned AW3   = $clog2(NFLAT),
  localparam int unsigned AW4   = (N3_P > 1) ? $clog2(N3_P) : 1,
  localparam int unsigned CW    = (N4_P > 1) ? $clog2(N4_P) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  input  data_t                   x [L_IN_P],
  // port B of the weight and bias memories
  output logic [AW1-1:0]          w1_addr,
  input  logic [DW-1:0]           w1_data,
  output logic [AWB1-1:0]         b1_addr,
  input  logic [DW-1:0]           b1_data,
  output logic [AW2-1:0]          w2_addr,
  input  logic [DW-1:0]           w2_data,
  output logic [AWB2-1:0]         b2_addr,
  input  logic [DW-1:0]           b2_data,
  output logic [AW3-1:0]          w3_addr,
  input  logic [N3_P-1:0][DW-1:0] w3_row,
  input  logic [N3_P-1:0][DW-1:0] b3_row,
  output logic [AW4-1:0]          w4_addr,
  input  logic [N4_P-1:0][DW-1:0] w4_row,
  input  logic [N4_P-1:0][DW-1:0] b4_row,
  // results
  output data_t                   logits [N4_P],
  output logic [15:0]             probs [N4_P],
  output logic [CW-1:0]           cls
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_CONV1, S_CONV2, S_FC3, S_FC4, S_SMAX
  } state_e;
  state_e st_q;

  // ------------------------------------------------------------------
  // control pulses, decoded from the state machine below
  logic go_load, go_conv1, go_conv2, go_fc3, go_fc4, go_smax;

  // ------------------------------------------------------------------
  // LOAD: input stream into padded buffer 1, weight distribution
  data_t                      x_arr [1][L_IN_P];
  logic                       in_valid, in_done;
  logic [$clog2(L_IN_P)-1:0]  in_idx;
  data_t                      in_data [1];
  always_comb x_arr[0] = x;

  flatten_stream #(.C(1), .T(L_IN_P)) u_in_stream (
    .clk, .rst_n, .start(go_load), .a(x_arr),
    .o_valid(in_valid), .o_idx(in_idx), .o_data(in_data[0]), .done(in_done));

  localparam int unsigned PAD1 = (K1_P - 1) / 2;
  localparam int unsigned PAD2 = (K2_P - 1) / 2;
  data_t pad1_q [1][L_IN_P + 2*PAD1];
  pad_buffer #(.C(1), .L(L_IN_P), .PAD(PAD1)) u_pad1 (
    .clk, .clear(go_load), .wr_en(in_valid), .wr_idx(in_idx),
    .wr_data(in_data), .q(pad1_q));

  data_t w1_q [NW1];
  data_t b1_q [NF1_P];
  data_t w2_q [NW2];
  data_t b2_q [NF2_P];
  logic  d_w1_done, d_b1_done, d_w2_done, d_b2_done;
  logic  d_w1_busy, d_b1_busy, d_w2_busy, d_b2_busy;

  distribute #(.N(NW1))   u_dist_w1 (.clk, .rst_n, .start(go_load), .rd_addr(w1_addr),
    .rd_data(w1_data), .q(w1_q), .busy(d_w1_busy), .done(d_w1_done));
  distribute #(.N(NF1_P)) u_dist_b1 (.clk, .rst_n, .start(go_load), .rd_addr(b1_addr),
    .rd_data(b1_data), .q(b1_q), .busy(d_b1_busy), .done(d_b1_done));
  distribute #(.N(NW2))   u_dist_w2 (.clk, .rst_n, .start(go_load), .rd_addr(w2_addr),
    .rd_data(w2_data), .q(w2_q), .busy(d_w2_busy), .done(d_w2_done));
  distribute #(.N(NF2_P)) u_dist_b2 (.clk, .rst_n, .start(go_load), .rd_addr(b2_addr),
    .rd_data(b2_data), .q(b2_q), .busy(d_b2_busy), .done(d_b2_done));

  // reshape the flat copies: w1[f][0][k] = w1_q[f*K1+k],
  // w2[f][c][k] = w2_q[(f*NF1+c)*K2+k]
  data_t w1 [NF1_P][1][K1_P];
  data_t w2 [NF2_P][NF1_P][K2_P];
  always_comb begin
    for (int f = 0; f < NF1_P; f++)
      for (int k = 0; k < K1_P; k++)
        w1[f][0][k] = w1_q[f*K1_P + k];
    for (int f = 0; f < NF2_P; f++)
      for (int c = 0; c < NF1_P; c++)
        for (int k = 0; k < K2_P; k++)
          w2[f][c][k] = w2_q[(f*NF1_P + c)*K2_P + k];
  end

  // ------------------------------------------------------------------
  // CONV1 -> pool -> padded buffer 2
  logic                       c1_valid, c1_done, c1_busy;
  logic [$clog2(L_IN_P)-1:0]  c1_idx;
  data_t                      c1_data [NF1_P];
  conv1d_bank #(.C(1), .K(K1_P), .NF(NF1_P), .L(L_IN_P)) u_conv1 (
    .clk, .rst_n, .start(go_conv1), .x(pad1_q), .w(w1), .b(b1_q),
    .o_valid(c1_valid), .o_idx(c1_idx), .o_data(c1_data), .busy(c1_busy), .done(c1_done));

  logic                       p1_valid;
  logic [$clog2(L_IN_P)-2:0]  p1_idx;
  data_t                      p1_data [NF1_P];
  maxpool2 #(.C(NF1_P), .IW($clog2(L_IN_P))) u_pool1 (
    .clk, .rst_n, .i_valid(c1_valid), .i_idx(c1_idx), .i_data(c1_data),
    .o_valid(p1_valid), .o_idx(p1_idx), .o_data(p1_data));

  data_t pad2_q [NF1_P][L2 + 2*PAD2];
  pad_buffer #(.C(NF1_P), .L(L2), .PAD(PAD2)) u_pad2 (
    .clk, .clear(go_load), .wr_en(p1_valid), .wr_idx($clog2(L2)'(p1_idx)),
    .wr_data(p1_data), .q(pad2_q));

  // ------------------------------------------------------------------
  // CONV2 -> pool -> 10 x 48 buffer
  logic                   c2_valid, c2_done, c2_busy;
  logic [$clog2(L2)-1:0]  c2_idx;
  data_t                  c2_data [NF2_P];
  conv1d_bank #(.C(NF1_P), .K(K2_P), .NF(NF2_P), .L(L2)) u_conv2 (
    .clk, .rst_n, .start(go_conv2), .x(pad2_q), .w(w2), .b(b2_q),
    .o_valid(c2_valid), .o_idx(c2_idx), .o_data(c2_data), .busy(c2_busy), .done(c2_done));

  logic                   p2_valid;
  logic [$clog2(L2)-2:0]  p2_idx;
  data_t                  p2_data [NF2_P];
  maxpool2 #(.C(NF2_P), .IW($clog2(L2))) u_pool2 (
    .clk, .rst_n, .i_valid(c2_valid), .i_idx(c2_idx), .i_data(c2_data),
    .o_valid(p2_valid), .o_idx(p2_idx), .o_data(p2_data));

  data_t feat_q [NF2_P][L3];
  always_ff @(posedge clk) begin
    if (p2_valid)
      for (int c = 0; c < NF2_P; c++) feat_q[c][p2_idx] <= p2_data[c];
  end

  // ------------------------------------------------------------------
  // FC3: flatten stream into 60 neurons with ReLU
  logic            f3_valid, f3_done;
  logic [AW3-1:0]  f3_idx;
  data_t           f3_data;
  flatten_stream #(.C(NF2_P), .T(L3)) u_flat3 (
    .clk, .rst_n, .start(go_fc3), .a(feat_q),
    .o_valid(f3_valid), .o_idx(f3_idx), .o_data(f3_data), .done(f3_done));

  logic  h_valid;
  data_t h [N3_P];
  fc_layer #(.NIN(NFLAT), .NOUT(N3_P), .RELU(1'b1)) u_fc3 (
    .clk, .rst_n, .start(go_fc3), .x_valid(f3_valid), .x_idx(f3_idx), .x_data(f3_data),
    .w_addr(w3_addr), .w_row(w3_row), .bias(b3_row), .y_valid(h_valid), .y(h));

  // ------------------------------------------------------------------
  // FC4: 60 hidden values into 3 output neurons, no ReLU
  data_t           h_arr [1][N3_P];
  logic            f4_valid, f4_done;
  logic [AW4-1:0]  f4_idx;
  data_t           f4_data;
  always_comb h_arr[0] = h;
  flatten_stream #(.C(1), .T(N3_P)) u_flat4 (
    .clk, .rst_n, .start(go_fc4), .a(h_arr),
    .o_valid(f4_valid), .o_idx(f4_idx), .o_data(f4_data), .done(f4_done));

  logic  z_valid;
  data_t z [N4_P];
  fc_layer #(.NIN(N3_P), .NOUT(N4_P), .RELU(1'b0)) u_fc4 (
    .clk, .rst_n, .start(go_fc4), .x_valid(f4_valid), .x_idx(f4_idx), .x_data(f4_data),
    .w_addr(w4_addr), .w_row(w4_row), .bias(b4_row), .y_valid(z_valid), .y(z));

  // ------------------------------------------------------------------
  // softmax and argmax
  logic sm_busy, sm_done;
  softmax #(.N(N4_P)) u_smax (
    .clk, .rst_n, .start(go_smax), .z(z), .busy(sm_busy), .done(sm_done),
    .p(probs), .cls(cls));

  always_ff @(posedge clk) begin
    if (z_valid) logits <= z;
  end

  // ------------------------------------------------------------------
  // sequencer
  logic [4:0] load_done_q;    // {input, w1, b1, w2, b2}
  logic       drain_q;        // one extra cycle for the last pooled write

  always_comb begin
    go_load  = (st_q == S_IDLE) && start;
    go_conv1 = (st_q == S_LOAD) && (&load_done_q);
    go_conv2 = (st_q == S_CONV1) && drain_q;
    go_fc3   = (st_q == S_CONV2) && drain_q;
    go_fc4   = (st_q == S_FC3) && h_valid;
    go_smax  = (st_q == S_FC4) && z_valid;
  end

  assign busy = (st_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q        <= S_IDLE;
      load_done_q <= '0;
      drain_q     <= 1'b0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        S_IDLE: if (go_load) begin
          load_done_q <= '0;
          st_q        <= S_LOAD;
        end
        S_LOAD: begin
          load_done_q <= load_done_q | {in_done, d_w1_done, d_b1_done, d_w2_done, d_b2_done};
          if (go_conv1) st_q <= S_CONV1;
        end
        S_CONV1: begin
          // the pooled value of the last pair is written one cycle after c1_done
          drain_q <= c1_done;
          if (drain_q) begin
            drain_q <= 1'b0;
            st_q    <= S_CONV2;
          end
        end
        S_CONV2: begin
          drain_q <= c2_done;
          if (drain_q) begin
            drain_q <= 1'b0;
            st_q    <= S_FC3;
          end
        end
        S_FC3:  if (go_fc4)  st_q <= S_FC4;
        S_FC4:  if (go_smax) st_q <= S_SMAX;
        S_SMAX: if (sm_done) begin
          done <= 1'b1;
          st_q <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

endmodule
