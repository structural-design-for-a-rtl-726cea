// pitch_detector -- sign-bit pitch detection and voicing decision.
//
// The frame's samples arrive one per x_valid. They are lowpass filtered
// (4-tap moving sum) and only the sign of each filtered sample is kept, so
// the whole frame becomes one FRAME-bit word. For every lag k = 21..147
// (one lag per clock) the word is compared with itself shifted by k: the
// bitwise XNOR over the FRAME-k overlapping bits is summed (popcount) to
// give m_c(k), which is scaled towards an unbiased estimate
//   m~(k) = (1 + 0.002 k) m_c(k)        (Q8: 0.002*256 ~ 131/256)
// and the largest m~ gives the candidate pitch p_c (the smallest lag wins
// a tie). The frame is unvoiced when any of
//   (i)   Rss(0) < 240
//   (ii)  Rss(1) < 0.3 Rss(0)  and  m~(p_c) < 185
//   (iii) |p_c - p_p| > 0.15 p_p  and  m~(p_c) < 160
// holds, p_p being the previous frame's p_c (0 after reset).
// Lag range, the sign/XNOR/popcount method, the scaling and the three
// criteria follow the original coder design. The lowpass filter, the Q8 scaling,
// and reading Rss as a per-sample average (rss0 < 240*FRAME on the raw
// sums) are this design's choices.
// Timing: done pulses PITCH_MAX-PITCH_MIN+3 cycles after x_last.
module pitch_detector #(
  parameter int unsigned FRAME     = 256,
  parameter int unsigned PITCH_MIN = 21,
  parameter int unsigned PITCH_MAX = 147
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               x_valid,
  input  logic               x_last,
  input  logic signed [7:0]  x,
  input  logic signed [31:0] rss0,   // raw autocorrelation sums, stable
  input  logic signed [31:0] rss1,   // from x_last until done
  output logic [7:0]         pitch,
  output logic               voiced,
  output logic [15:0]        score,  // m~(p_c), Q8
  output logic               done
);
  localparam int unsigned CW = $clog2(FRAME + 1);

  logic signed [7:0]  h [3];            // last three inputs
  logic [FRAME-1:0]   sw;               // sign word, bit n = sample n
  logic [7:0]         k;
  logic               searching, decide;
  logic [15:0]        best;
  logic [7:0]         best_k, p_prev;

  // filtered sign of the incoming sample
  logic signed [9:0] lp;
  assign lp = 10'(x) + 10'(h[0]) + 10'(h[1]) + 10'(h[2]);

  // correlation of the sign word at lag k
  logic [CW-1:0] mc;
  logic [15:0]   mt;
  always_comb begin
    logic [FRAME-1:0] eqv, mask;
    eqv  = ~(sw ^ (sw >> k));
    mask = ~({FRAME{1'b1}} << (FRAME - int'(k)));
    eqv  = eqv & mask;
    mc   = '0;
    for (int n = 0; n < FRAME; n++) mc = mc + CW'(eqv[n]);
    mt   = 16'((32'(mc) << 8) + ((32'(mc) * 32'(k) * 32'd131) >> 8));
  end

  // voicing decision
  logic uv1, uv2, uv3;
  logic [15:0] dp;
  always_comb begin
    dp  = (best_k > p_prev) ? 16'(best_k - p_prev) : 16'(p_prev - best_k);
    uv1 = rss0 < 32'sd240 * $signed(32'(FRAME));
    uv2 = (64'(rss1) * 10 < 64'(rss0) * 3) && (best < 16'(185 * 256));
    uv3 = (32'(dp) * 100 > 32'(p_prev) * 15) && (best < 16'(160 * 256));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h[0] <= '0; h[1] <= '0; h[2] <= '0; sw <= '0; k <= '0;
      searching <= 1'b0; decide <= 1'b0; best <= '0; best_k <= '0;
      p_prev <= '0; pitch <= '0; voiced <= 1'b0; score <= '0; done <= 1'b0;
    end else begin
      done   <= 1'b0;
      decide <= 1'b0;
      if (x_valid) begin
        h[0] <= x; h[1] <= h[0]; h[2] <= h[1];
        sw   <= {~lp[9], sw[FRAME-1:1]};   // oldest sample ends in bit 0
        if (x_last) begin
          k <= 8'(PITCH_MIN); searching <= 1'b1; best <= '0; best_k <= 8'(PITCH_MIN);
          h[0] <= '0; h[1] <= '0; h[2] <= '0;
        end
      end else if (searching) begin
        if (mt > best) begin best <= mt; best_k <= k; end
        if (k == 8'(PITCH_MAX)) begin searching <= 1'b0; decide <= 1'b1; end
        else k <= k + 1'b1;
      end
      if (decide) begin
        pitch  <= best_k;
        score  <= best;
        voiced <= !(uv1 || uv2 || uv3);
        p_prev <= best_k;
        done   <= 1'b1;
      end
    end
  end
endmodule
