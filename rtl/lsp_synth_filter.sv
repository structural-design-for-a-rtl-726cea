// lsp_synth_filter -- 8th-order all-pole synthesis filter 1/A(z) built
// directly from the LSP cosines.
//
// With c_i = 2cos(w_i), A(z) = (P(z) + Q(z))/2 where
//   P(z) = (1 + z^-1) prod_{i odd}  (1 - c_i z^-1 + z^-2)
//   Q(z) = (1 - z^-1) prod_{i even} (1 - c_i z^-1 + z^-2).
// Each factor is one "trunk" circuit: two delays, one multiplier by c_i and
// two adders. Four trunks in cascade form the P branch (c1, c3, c5, c7) and
// four the Q branch (c2, c4, c6, c8). Writing Pp, Qp for the two cascades,
//   A(z) - 1 = 1/2 [ (Pp - 1) + (Qp - 1) + z^-1 (Pp - Qp) ],
// and (Pp - 1) s(n) is just the sum of the trunks' increments
// t_i(n) = w_i(n-2) - c_i w_i(n-1), all of which use past values only. So
// per sample
//   s(n) = e(n) - 1/2 [ sum t_P + sum t_Q + Pp(n-1) - Qp(n-1) ]
// after which s(n) is pushed through both cascades to update the delays.
// The trunk structure and its regular eight-fold repetition follow the
// original coder design; this particular arrangement of the final summation (one
// halving of the summed branches instead of separate -1/2 and -1 paths)
// and all word lengths are this design's choices. Internal values are
// 40-bit with 8 fraction bits (to keep truncation from biasing the
// recursion), c_i is Q12, the output is saturated to 16 bits.
// Timing: one sample per en strobe; s is registered (valid one cycle later).
module lsp_synth_filter #(
  parameter int unsigned ORDER = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic signed [15:0] c [ORDER],     // c[0] = c1 ... c[7] = c8, Q12
  input  logic signed [23:0] e,
  output logic signed [15:0] s,
  output logic               valid
);
  localparam int unsigned NT = ORDER / 2;   // trunks per branch
  localparam int unsigned FB = 8;           // internal fraction bits
  localparam logic signed [39:0] SMAX = 40'sd32767 <<< FB;
  localparam logic signed [39:0] SMIN = -(40'sd32768 <<< FB);

  // branch 0 = P (odd c), branch 1 = Q (even c)
  logic signed [39:0] d1 [2][NT];   // w_j(n-1)
  logic signed [39:0] d2 [2][NT];   // w_j(n-2)
  logic signed [39:0] bout [2];     // branch outputs at n-1

  logic signed [39:0] t [2][NT];
  logic signed [39:0] w [2][NT+1];
  logic signed [39:0] sum_t [2];
  logic signed [39:0] s_full;
  logic signed [39:0] s_sat;

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      sum_t[b] = '0;
      for (int j = 0; j < NT; j++) begin
        logic signed [55:0] m;
        m = 56'(c[2*j + b]) * 56'(d1[b][j]);
        t[b][j] = d2[b][j] - 40'(m >>> 12);
        sum_t[b] = sum_t[b] + t[b][j];
      end
    end
    s_full = (40'(e) <<< FB) - ((sum_t[0] + sum_t[1] + bout[0] - bout[1]) >>> 1);
    if (s_full > SMAX)      s_sat = SMAX;
    else if (s_full < SMIN) s_sat = SMIN;
    else                    s_sat = s_full;
    for (int b = 0; b < 2; b++) begin
      w[b][0] = s_sat;
      for (int j = 0; j < NT; j++) w[b][j+1] = w[b][j] + t[b][j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0; valid <= 1'b0;
      for (int b = 0; b < 2; b++) begin
        bout[b] <= '0;
        for (int j = 0; j < NT; j++) begin d1[b][j] <= '0; d2[b][j] <= '0; end
      end
    end else begin
      valid <= en;
      if (en) begin
        s <= 16'((s_sat + (40'sd1 <<< (FB - 1))) >>> FB);
        for (int b = 0; b < 2; b++) begin
          bout[b] <= w[b][NT];
          for (int j = 0; j < NT; j++) begin
            d1[b][j] <= w[b][j];
            d2[b][j] <= d1[b][j];
          end
        end
      end
    end
  end
endmodule
