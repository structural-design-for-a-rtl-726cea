// quartic_solver -- closed-form roots of x^4 + a x^3 + b x^2 + c x + d.
//
// Used by the LPC-to-LSP conversion: with an 8th-order predictor each of
// the two LSP polynomials reduces to such a quartic in x = 2cos(w), whose
// four roots are four LSP cosines. Ferrari's method is used:
//   y1  = a real root of the resolvent cubic
//         y^3 - b y^2 + (ac - 4d) y - a^2 d + 4bd - c^2 = 0
//   E = a/2,  A = sqrt(a^2/4 - b + y1),  B = (E y1 - c) / A
//   x1,2 = (-(A+E) -/+ sqrt((A+E)^2 - 2(y1+B))) / 2
//   x3,4 = ( (A-E) -/+ sqrt((A-E)^2 - 2(y1-B))) / 2
// (the second pair uses y1 - B: only then does the product of the two
// quadratic factors give back the quartic). The roots are clamped to
// |x| <= 1.9 and sorted in decreasing order.
// The cubic's largest root is found here by Newton's iteration started at
// y = 9, above every root (each root is a sum of two products of numbers
// below 2 in size); from there the iteration falls monotonically onto the
// largest root. The largest root maximises A and keeps the division by A
// well conditioned. How the cubic is solved is this design's choice. One divider, multipliers, one
// comparator/clamp and one shared square-root unit (sqrt_unit) are used.
// Inputs and outputs are Q12 (1.0 = 4096). Internally all values carry 16
// fraction bits in 64-bit registers (the resolvent's roots can lie close
// together, and Q12 alone loses the smaller roots); the square-root unit is
// 48 bits wide.
// Timing: done pulses at most NITER + 60 cycles after start.
module quartic_solver (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic signed [31:0] ca, cb, cc, cd,   // quartic coefficients, Q12
  output logic signed [15:0] root [4],          // decreasing, Q12
  output logic               done
);
  localparam int signed F = 16;                        // internal fraction bits
  localparam logic signed [63:0] YHI  = 64'sd589824;  // 9.0
  localparam int unsigned        NITER = 40;          // Newton step limit
  localparam logic signed [63:0] XMAX = 64'sd124518;  // 1.9 * 2^16

  typedef enum logic [3:0] {IDLE, COEF, NEWT, SQA, SQA_W, SQB, SQ1, SQ1_W,
                            SQ2, SQ2_W, SORT} state_t;
  state_t st;

  logic signed [63:0] a, b, c, d, p2, p1, p0;
  logic signed [63:0] y, ee, aa, bb, r1;
  logic [5:0]         nit;
  logic signed [63:0] xr [4];

  // resolvent cubic and its derivative at y, evaluated with extra
  // fraction bits (f in Q48, f' in Q32), and the Newton step f/f' (Q16)
  logic signed [63:0] y2, fy, fpy, dy;
  always_comb begin
    y2  = y * y;                                                // Q32
    fy  = y2 * y + p2 * y2 + ((p1 * y) <<< F) + (p0 <<< (2*F)); // Q48
    fpy = 3 * y2 + ((2 * p2 * y)) + (p1 <<< F);                 // Q32
    if (fpy > 0) dy = fy / fpy;
    else         dy = '0;
  end

  // square-root unit, shared by the three radicals (Q32 in, Q16 out)
  logic        sq_start, sq_done;
  logic [47:0] sq_d;
  logic [23:0] sq_q;
  sqrt_unit #(.W(48)) u_sqrt (.clk, .rst_n, .start(sq_start), .d(sq_d),
                              .q(sq_q), .busy(), .done(sq_done));

  function automatic logic [47:0] sat_u48(input logic signed [63:0] v);
    if (v < 0)                      return '0;
    else if (v > 64'sh0FFFFFFFFFFFF) return '1;
    else                            return 48'(v);
  endfunction

  logic signed [63:0] rad_a, rad_1, rad_2, s1, s2;
  assign rad_a = ((a * a) >>> 2) - (b <<< F) + (y <<< F);
  assign s1    = aa + ee;
  assign s2    = aa - ee;
  assign rad_1 = s1 * s1 - ((y + bb) <<< (F + 1));
  assign rad_2 = s2 * s2 - ((y - bb) <<< (F + 1));

  always_comb begin
    sq_start = 1'b0;
    sq_d     = '0;
    case (st)
      SQA: begin sq_start = 1'b1; sq_d = sat_u48(rad_a); end
      SQ1: begin sq_start = 1'b1; sq_d = sat_u48(rad_1); end
      SQ2: begin sq_start = 1'b1; sq_d = sat_u48(rad_2); end
      default: ;
    endcase
  end

  function automatic logic signed [63:0] clampx(input logic signed [63:0] v);
    if (v > XMAX)       return XMAX;
    else if (v < -XMAX) return -XMAX;
    else                return v;
  endfunction

  // decreasing sort of the four roots (5-comparator network)
  logic signed [63:0] vs [4];
  always_comb begin
    logic signed [63:0] t;
    t = 0;
    for (int n = 0; n < 4; n++) vs[n] = xr[n];
    if (vs[0] < vs[1]) begin t = vs[0]; vs[0] = vs[1]; vs[1] = t; end
    if (vs[2] < vs[3]) begin t = vs[2]; vs[2] = vs[3]; vs[3] = t; end
    if (vs[0] < vs[2]) begin t = vs[0]; vs[0] = vs[2]; vs[2] = t; end
    if (vs[1] < vs[3]) begin t = vs[1]; vs[1] = vs[3]; vs[3] = t; end
    if (vs[1] < vs[2]) begin t = vs[1]; vs[1] = vs[2]; vs[2] = t; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; done <= 1'b0;
      a <= '0; b <= '0; c <= '0; d <= '0; p2 <= '0; p1 <= '0; p0 <= '0;
      y <= '0; ee <= '0; aa <= '0; bb <= '0; r1 <= '0; nit <= '0;
      for (int n = 0; n < 4; n++) begin xr[n] <= '0; root[n] <= '0; end
    end else begin
      done <= 1'b0;
      case (st)
        IDLE: if (start) begin
          a <= 64'(ca) <<< 4; b <= 64'(cb) <<< 4; c <= 64'(cc) <<< 4; d <= 64'(cd) <<< 4;
          st <= COEF;
        end
        COEF: begin
          p2 <= -b;
          p1 <= ((a * c) >>> F) - (d <<< 2);
          p0 <= -((((a * a) >>> F) * d) >>> F) + (((b * d) >>> F) <<< 2) - ((c * c) >>> F);
          y   <= YHI;
          nit <= '0;
          st  <= NEWT;
        end
        NEWT: begin
          y   <= y - dy;
          nit <= nit + 1'b1;
          if (dy == 0 || nit == 6'(NITER - 1)) st <= SQA;
        end
        SQA:   begin ee <= a >>> 1; st <= SQA_W; end
        SQA_W: if (sq_done) begin aa <= 64'(sq_q); st <= SQB; end
        SQB: begin
          if (aa == 0) bb <= '0;
          else         bb <= ((((ee * y) >>> F) - c) <<< F) / aa;
          st <= SQ1;
        end
        SQ1:   st <= SQ1_W;
        SQ1_W: if (sq_done) begin r1 <= 64'(sq_q); st <= SQ2; end
        SQ2: begin
          xr[0] <= clampx((-s1 - r1) >>> 1);
          xr[1] <= clampx((-s1 + r1) >>> 1);
          st <= SQ2_W;
        end
        SQ2_W: if (sq_done) begin
          xr[2] <= clampx((s2 - $signed({40'd0, sq_q})) >>> 1);
          xr[3] <= clampx((s2 + $signed({40'd0, sq_q})) >>> 1);
          st <= SORT;
        end
        SORT: begin
          for (int n = 0; n < 4; n++) root[n] <= 16'((vs[n] + 64'sd8) >>> 4);
          done <= 1'b1;
          st   <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
