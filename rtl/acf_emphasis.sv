// acf_emphasis -- autocorrelation of the pre-emphasised signal, computed
// from the autocorrelation of the raw signal.
//
// Filtering the speech with y(n) = s(n) - 0.925 s(n-1) before LP analysis
// would need a second frame buffer. Instead the same filter is applied to
// the autocorrelation:
//   Ryy(k) = (1 + 0.925^2) Rss(k) - 0.925 (Rss(k+1) + Rss(k-1)),
// with Rss(-1) = Rss(1). This is why Rss needs one lag more than the LP
// order. The formula and 0.925 are the original coder's; the constants are
// rounded here to Q14 (1.855625 -> 30403/16384, 0.925 -> 15155/16384), a choice
// of this design. Timing: result registered, valid one cycle after start.
module acf_emphasis #(
  parameter int unsigned ORDER = 8,
  parameter int unsigned AW    = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [AW-1:0] rss [ORDER+2],
  output logic signed [AW-1:0] ryy [ORDER+1],
  output logic                 valid
);
  localparam int signed C0 = 30403;  // (1 + 0.925^2) * 2^14
  localparam int signed C1 = 15155;  // 0.925 * 2^14

  logic signed [AW-1:0] ryy_c [ORDER+1];
  always_comb begin
    for (int k = 0; k <= ORDER; k++) begin
      logic signed [AW+17:0] lo, hi, acc;
      lo  = (AW+18)'(rss[(k == 0) ? 1 : k - 1]);
      hi  = (AW+18)'(rss[k + 1]);
      acc = C0 * (AW+18)'(rss[k]) - C1 * (lo + hi);
      ryy_c[k] = AW'(acc >>> 14);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      for (int k = 0; k <= ORDER; k++) ryy[k] <= '0;
    end else begin
      valid <= start;
      if (start) for (int k = 0; k <= ORDER; k++) ryy[k] <= ryy_c[k];
    end
  end
endmodule
