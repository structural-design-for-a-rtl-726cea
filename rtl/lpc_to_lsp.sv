// lpc_to_lsp -- conversion of 8th-order LP coefficients to LSP cosines.
//
// From A(z) = 1 + a1 z^-1 + ... + a8 z^-8 the symmetric and antisymmetric
// polynomials P(z) = A(z) + z^-9 A(1/z) and Q(z) = A(z) - z^-9 A(1/z) are
// formed. Their trivial roots (z = -1 for P, z = +1 for Q) are divided out,
// which leaves two symmetric 8th-degree polynomials with coefficients
// r4 = 1, r3, r2, r1, r0. In x = z + 1/z = 2cos(w) each becomes the quartic
//   x^4 + r3 x^3 + (r2 - 4) x^2 + (r1 - 3 r3) x + (r0 - 2 r2 + 2).
// quartic_solver is run twice, first on P then on Q (one shared instance),
// and the two decreasing root lists are interleaved:
//   clsp = {P0, Q0, P1, Q1, P2, Q2, P3, Q3},
// i.e. 2cos(w_i) for w_1 < w_2 < ... < w_8. The polynomial forms and the
// closed-form solution follow the original coder design; the deflation, the
// interleaving order and the Q12 formats are this design's reading of it.
// Timing: done pulses after two solver runs plus three cycles.
module lpc_to_lsp #(
  parameter int unsigned ORDER = 8   // the closed form needs exactly 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic signed [15:0] a [ORDER+1],   // a[0] unused (1.0), Q12
  output logic signed [15:0] clsp [ORDER],  // 2cos(w_i), decreasing, Q12
  output logic               done
);
  localparam int signed ONE = 4096;

  typedef enum logic [2:0] {IDLE, FORM, RUN_P, WAIT_P, RUN_Q, WAIT_Q, FIN} state_t;
  state_t st;

  logic signed [31:0] qa [2], qb [2], qc [2], qd [2];   // [0] = P, [1] = Q
  logic signed [15:0] proot [4];

  // deflated symmetric coefficients, combinational from a[]
  always_comb begin
    logic signed [31:0] ak [10];
    logic signed [31:0] pp [5], qq [5];
    ak[0] = ONE; ak[9] = 0;
    for (int n = 1; n <= 8; n++) ak[n] = 32'(a[n]);
    pp[0] = ONE; qq[0] = ONE;
    for (int n = 1; n <= 4; n++) begin
      pp[n] = ak[n] + ak[9-n] - pp[n-1];
      qq[n] = ak[n] - ak[9-n] + qq[n-1];
    end
    // quartic coefficients (r3 = x[1], r2 = x[2], r1 = x[3], r0 = x[4])
    qa[0] = pp[1]; qb[0] = pp[2] - 4*ONE; qc[0] = pp[3] - 3*pp[1]; qd[0] = pp[4] - 2*pp[2] + 2*ONE;
    qa[1] = qq[1]; qb[1] = qq[2] - 4*ONE; qc[1] = qq[3] - 3*qq[1]; qd[1] = qq[4] - 2*qq[2] + 2*ONE;
  end

  logic        s_start, s_done;
  logic        sel;
  logic signed [15:0] s_root [4];
  quartic_solver u_solver (.clk, .rst_n, .start(s_start),
    .ca(qa[sel]), .cb(qb[sel]), .cc(qc[sel]), .cd(qd[sel]),
    .root(s_root), .done(s_done));

  assign s_start = (st == RUN_P) || (st == RUN_Q);
  assign sel     = (st == RUN_Q) || (st == WAIT_Q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; done <= 1'b0;
      for (int n = 0; n < 4; n++) proot[n] <= '0;
      for (int n = 0; n < ORDER; n++) clsp[n] <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        IDLE:   if (start) st <= FORM;
        FORM:   st <= RUN_P;
        RUN_P:  st <= WAIT_P;
        WAIT_P: if (s_done) begin
          for (int n = 0; n < 4; n++) proot[n] <= s_root[n];
          st <= RUN_Q;
        end
        RUN_Q:  st <= WAIT_Q;
        WAIT_Q: if (s_done) begin
          for (int n = 0; n < 4; n++) begin
            clsp[2*n]     <= proot[n];
            clsp[2*n + 1] <= s_root[n];
          end
          st <= FIN;
        end
        FIN: begin done <= 1'b1; st <= IDLE; end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
