// interpolator -- subframe interpolation of decoded parameters.
//
// Each 200-sample frame is synthesised in four subframes k = 0..3. For
// subframe k the parameter used is
//   theta_k = (7-2k)/8 * prev + (2k+1)/8 * cur
// (7/8,1/8 ; 5/8,3/8 ; 3/8,5/8 ; 1/8,7/8), prev and cur being the values
// decoded for the previous and the current frame. The eighths are formed
// from arithmetic right shifts and additions only (x/8 = x>>>3,
// 3x/8 = x>>>2 + x>>>3, 5x/8 = x>>>1 + x>>>3, 7x/8 = x - x>>>3), as the
// original coder design prescribes. N lanes of W-bit signed values are processed
// in parallel. Combinational.
module interpolator #(
  parameter int unsigned N = 1,
  parameter int unsigned W = 16
) (
  input  logic [1:0]          k,
  input  logic signed [W-1:0] prev [N],
  input  logic signed [W-1:0] cur  [N],
  output logic signed [W-1:0] theta [N]
);
  function automatic logic signed [W+1:0] eighths(input logic signed [W-1:0] v,
                                                   input logic [2:0] m);
    logic signed [W+1:0] x;
    x = (W+2)'(v);
    case (m)
      3'd1:    return x >>> 3;
      3'd3:    return (x >>> 2) + (x >>> 3);
      3'd5:    return (x >>> 1) + (x >>> 3);
      default: return x - (x >>> 3);   // 7/8
    endcase
  endfunction

  always_comb begin
    for (int n = 0; n < N; n++) begin
      logic [2:0] wc;
      wc = 3'({k, 1'b1});                 // 2k+1
      theta[n] = W'(eighths(prev[n], 3'(7 - 2 * int'(k))) + eighths(cur[n], wc));
    end
  end
endmodule
