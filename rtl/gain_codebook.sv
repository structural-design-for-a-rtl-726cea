// gain_codebook -- 32-word gain ROM of the synthesizer.
//
// Maps a 5-bit gain index to the excitation gain A_g (unsigned Q4). The
// original coder design fixes only the size (2^5 words, a lookup table in ROM);
// the contents here are log-spaced, 1.5 dB apart from 0.5 to about 108:
// g(i) = 0.5 * 2^(i/4), generated by gelp_pkg::gain_level. Combinational
// read.
module gain_codebook
  import gelp_pkg::*;
(
  input  logic [GAIN_BITS-1:0] idx,
  output logic [11:0]          gain
);
  logic [11:0] rom [2**GAIN_BITS];
  always_comb begin
    for (int i = 0; i < 2**GAIN_BITS; i++) rom[i] = gain_level(i);
  end
  assign gain = rom[idx];
endmodule
