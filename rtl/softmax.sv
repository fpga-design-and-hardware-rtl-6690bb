// softmax: softmax over the N class scores of the output layer, plus the
// index of the largest score.
//
// Scores z are Q8.8. The unit computes p[i] = exp(z[i]-m) / sum_j exp(z[j]-m)
// with m the largest score, so every exponent is <= 0 and the largest term is
// exactly 1.0. The exponential is evaluated as a power of two:
//     t = (z[i]-m) * log2(e)        in steps of 1/32 (rounded toward -inf)
//     exp(z[i]-m) ~ 2^(t mod 1) >> -floor(t)
// where 2^(k/32), k = 0..31, comes from a 32-entry table in Q1.15
// (entry k = round(32768 * 2^(k/32))). Each p[i] is then the quotient
// (e[i] << 15) / sum, found by a restoring divider one quotient bit per
// cycle, so p is Q1.15 (32768 = 1.0). The error is below about 2% of full
// scale, set by the table step.
//
// Timing: `start` (scores stable) -> 1 cycle for the exponentials and their
// sum -> 16 cycles per division, one division per class -> `done` pulses with
// p and cls valid, 2 + 16*N cycles after `start`. cls is the argmax (lowest index on ties) and is known
// already when `done` comes.
//
// The softmax output stage follows the published network; the whole
// arithmetic here is this design's choice.
module softmax
  import cnn_pkg::*;
#(
  parameter int unsigned N  = 3,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  data_t         z [N],
  output logic          busy,
  output logic          done,
  output logic [15:0]   p [N],
  output logic [CW-1:0] cls
);

  localparam logic [15:0] EXP2_LUT [32] = '{
    16'd32768, 16'd33486, 16'd34219, 16'd34968, 16'd35734, 16'd36516, 16'd37316, 16'd38133,
    16'd38968, 16'd39821, 16'd40693, 16'd41584, 16'd42495, 16'd43425, 16'd44376, 16'd45348,
    16'd46341, 16'd47356, 16'd48393, 16'd49452, 16'd50535, 16'd51642, 16'd52773, 16'd53928,
    16'd55109, 16'd56316, 16'd57549, 16'd58809, 16'd60097, 16'd61413, 16'd62757, 16'd64132};
  localparam int LOG2E_Q14 = 23637;   // round(log2(e) * 2^14)

  // ---- combinational: max, exponentials ----
  data_t         zmax;
  logic [CW-1:0] amax;
  logic [16:0]   e [N];     // Q1.15 plus headroom, at most 32768
  always_comb begin
    zmax = z[0];
    amax = '0;
    for (int i = 1; i < N; i++)
      if (z[i] > zmax) begin
        zmax = z[i];
        amax = CW'(i);
      end
    for (int i = 0; i < N; i++) begin
      logic signed [DW:0]    d;
      logic signed [DW+16:0] prod;
      logic signed [DW+16:0] t;
      int                    sh;
      d    = (DW+1)'(z[i]) - (DW+1)'(zmax);
      prod = (DW+17)'(d) * (DW+17)'(LOG2E_Q14);
      t    = prod >>> (FRAC + 14 - 5);          // units of 1/32
      sh   = -int'(t >>> 5);                    // 0 .. large
      if (sh > 16) e[i] = '0;
      else         e[i] = 17'(EXP2_LUT[t[4:0]]) >> sh;
    end
  end

  // ---- sequential: sum and divisions ----
  typedef enum logic [1:0] {S_IDLE, S_DIV, S_DONE} state_e;
  state_e        st_q;
  logic [16:0]   e_q [N];
  logic [18:0]   sum_q;
  logic [CW-1:0] i_q;
  logic [3:0]    bit_q;
  logic [33:0]   rem_q;
  logic [15:0]   quo_q;

  assign busy = (st_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q  <= S_IDLE;
      done  <= 1'b0;
      cls   <= '0;
      i_q   <= '0;
      bit_q <= '0;
      sum_q <= '0;
      rem_q <= '0;
      quo_q <= '0;
      for (int i = 0; i < N; i++) p[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        S_IDLE: if (start) begin
          logic [18:0] s;
          s = '0;
          for (int i = 0; i < N; i++) begin
            e_q[i] <= e[i];
            s      += 19'(e[i]);
          end
          sum_q <= s;
          cls   <= amax;
          i_q   <= '0;
          bit_q <= 4'd15;
          rem_q <= 34'(e[0]) << 15;
          quo_q <= '0;
          st_q  <= S_DIV;
        end
        S_DIV: begin
          logic [33:0] trial;
          logic [15:0] q;
          trial = 34'(sum_q) << bit_q;
          q     = quo_q;
          if (rem_q >= trial) begin
            rem_q     <= rem_q - trial;
            q[bit_q]   = 1'b1;
          end
          quo_q <= q;
          if (bit_q == 4'd0) begin
            p[i_q] <= q;
            if (32'(i_q) == N - 1) begin
              st_q <= S_DONE;
            end else begin
              i_q   <= i_q + 1'b1;
              bit_q <= 4'd15;
              rem_q <= 34'(e_q[32'(i_q) + 1]) << 15;
              quo_q <= '0;
            end
          end else begin
            bit_q <= bit_q - 1'b1;
          end
        end
        S_DONE: begin
          done <= 1'b1;
          st_q <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

endmodule
