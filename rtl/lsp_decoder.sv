// lsp_decoder -- LSF parameter decoder of the synthesizer.
//
// Splits the 28-bit spectrum field into eight indices of 4, 3, 4, 3, 4, 3,
// 4, 3 bits (parameter 0 in bits 27:24) and looks each up in its level
// table (gelp_pkg::lsp_level), giving the eight cosines 2cos(w_i) in Q12
// for the synthesis filter. Bit allocation follows the original coder design; the
// tables are this design's uniform stand-ins. Combinational.
module lsp_decoder
  import gelp_pkg::*;
(
  input  logic [LSP_BITS-1:0] code,
  output logic signed [15:0]  clsp [LP_ORDER]
);
  always_comb begin
    for (int unsigned i = 0; i < LP_ORDER; i++) begin
      logic [3:0] j;
      j = 4'((32'(code) >> lsp_lsb(i)) & ((1 << lsp_nbits(i)) - 1));
      clsp[i] = lsp_level(i, 32'(j));
    end
  end
endmodule
