// gain_quantizer -- 5-bit encoding of the frame gain.
//
// Picks the index of the gain codebook word (gelp_pkg::gain_level) nearest
// to the gain G = sqrt(E) measured by the analysis, in the same Q4 units.
// Because the codebook is increasing, the index is the number of midpoints
// between neighbouring words that G exceeds. The 5-bit size is the
// original coder's; the nearest-word rule is this design's choice.
// Timing: idx registered one cycle after start, valid pulses with it.
module gain_quantizer
  import gelp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [15:0]          g,      // Q4
  output logic [GAIN_BITS-1:0] idx,
  output logic                 valid
);
  logic [GAIN_BITS-1:0] cnt;
  always_comb begin
    cnt = '0;
    for (int i = 0; i < 2**GAIN_BITS - 1; i++) begin
      // 2*g > g(i) + g(i+1)  <=>  g is past the midpoint
      if ((17'(g) << 1) > 17'(gain_level(i)) + 17'(gain_level(i + 1))) cnt = cnt + 1'b1;
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin idx <= '0; valid <= 1'b0; end
    else begin
      valid <= start;
      if (start) idx <= cnt;
    end
  end
endmodule
