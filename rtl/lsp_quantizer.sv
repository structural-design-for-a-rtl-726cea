// lsp_quantizer -- 28-bit scalar quantizer of the eight LSP cosines.
//
// Each cosine 2cos(w_i) is coded on its own with 4, 3, 4, 3, 4, 3, 4, 3 bits
// (more bits for the odd-numbered parameters, which are the more sensitive
// ones). The index is that of the nearest level of the parameter's table,
// gelp_pkg::lsp_level. Bit allocation and scalar (not vector) coding follow
// the original coder design; the level tables are uniform stand-ins for the trained
// nonuniform ones. Parameter 0's index is put in bits 27:24.
// Timing: code registered one cycle after start, valid pulses with it.
module lsp_quantizer
  import gelp_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [15:0]  clsp [LP_ORDER],
  output logic [LSP_BITS-1:0] code,
  output logic                valid
);
  logic [LSP_BITS-1:0] c;
  always_comb begin
    c = '0;
    for (int unsigned i = 0; i < LP_ORDER; i++) begin
      logic [16:0] best_err, err;
      logic [3:0]  best_j;
      best_err = '1; best_j = '0;
      for (int unsigned j = 0; j < (1 << lsp_nbits(i)); j++) begin
        logic signed [16:0] diff;
        diff = 17'(clsp[i]) - 17'(lsp_level(i, j));
        err  = (diff < 0) ? 17'(-diff) : 17'(diff);
        if (err < best_err) begin best_err = err; best_j = 4'(j); end
      end
      c = c | (LSP_BITS'(best_j) << lsp_lsb(i));
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin code <= '0; valid <= 1'b0; end
    else begin
      valid <= start;
      if (start) code <= c;
    end
  end
endmodule
