// noise_gen -- pseudo-random white noise for unvoiced excitation.
//
// A 16-bit Fibonacci LFSR with the maximal-length polynomial
// x^16 + x^14 + x^13 + x^11 + 1 (period 65535, far more than the 200
// samples a frame needs) advances once per adv strobe; its upper byte is
// the signed noise sample. Using an LFSR follows the original coder design; the
// length, polynomial, seed and output bits are this design's choices.
module noise_gen #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adv,
  output logic signed [7:0] noise
);
  logic [15:0] lfsr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   lfsr <= SEED;
    else if (adv) lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end
  assign noise = lfsr[15:8];
endmodule
