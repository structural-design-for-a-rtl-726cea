// levinson_durbin -- LP analysis by the Levinson-Durbin recursion.
//
// Input: pre-emphasised autocorrelation ryy[0..ORDER] (raw sums, 32 bits).
// Output: coefficients of A(z) = 1 + a1 z^-1 + ... + a8 z^-8 (Q12) and the
// prediction error E, from which the gain G = sqrt(E) is taken.
//
// The autocorrelation is first normalised: every lag is shifted left by
// `shift` so that Rn(0) lies in [2^30, 2^31), and the top 16 bits are kept
// (16-bit R bus). For i = 1..ORDER the recursion then runs on one shared
// multiplier, one divider and one subtractor:
//   acc  = Rn(i) + sum_{j<i} a_j Rn(i-j)            (one MAC per cycle)
//   k_i  = -acc / E                                 (Q14, divider)
//   a_j += k_i a_{i-j} (j < i),  a_i = k_i          (one product per cycle)
//   E    = E (2^28 - k_i^2) / 2^28                  (1 - k^2 in Q28)
// E is kept as a 32-bit value in units of Rn/2^15. In raw units the error
// energy is e_out * 2^(1-shift); the analyzer uses that for the gain.
// The recursion, the 16-bit R/K buses, the 32-bit E/M buses and the 2^28
// constant follow the original coder design. Q formats, the normalisation, the
// serial schedule, clamping |k| < 1 and saturating a_j to the
// 16-bit bus are this design's choices.
// If ryy[0] <= 0 the outputs are a = 0, E = 0 and ok = 0.
// Timing: roughly ORDER*(ORDER+3) + 3 cycles from start to done.
module levinson_durbin #(
  parameter int unsigned ORDER = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic signed [31:0] ryy [ORDER+1],
  output logic signed [15:0] a [ORDER+1],   // a[0] = 1.0 (4096), a[1..ORDER]
  output logic [31:0]        e_out,
  output logic [4:0]         shift,
  output logic               ok,
  output logic               done
);
  typedef enum logic [2:0] {IDLE, NORM, ACC, DIV, UPD, ERR, FIN} state_t;
  state_t st;

  logic signed [15:0] rn [ORDER+1];
  logic signed [15:0] a_old [ORDER+1];
  logic signed [47:0] acc;
  logic signed [15:0] kk;
  logic [31:0]        e;
  logic [3:0]         i, j;

  // normalisation shift: leading zeros of ryy[0] minus one
  logic [4:0] sh_c;
  always_comb begin
    sh_c = '0;
    for (int b = 0; b <= 30; b++) if (ryy[0][b]) sh_c = 5'(30 - b);
  end

  // shared arithmetic
  logic signed [31:0] prod;
  always_comb begin
    if (st == ACC) prod = a[j] * rn[i - j];      // Q12 * R
    else           prod = kk * a_old[i - j];    // Q14 * Q12
  end

  logic signed [63:0] kq;
  always_comb begin
    if (e == 0) kq = 0;
    else        kq = -((64'(acc)) <<< 17) / $signed({32'd0, e});
    if (kq > 64'sd16383)       kq = 64'sd16383;
    else if (kq < -64'sd16383) kq = -64'sd16383;
  end

  // coefficient update, saturated to the 16-bit a bus (|a| < 8 in Q12)
  logic signed [31:0] a_sum;
  logic signed [15:0] a_sat;
  always_comb begin
    a_sum = 32'(a_old[j]) + (prod >>> 14);
    if (a_sum > 32'sd32767)       a_sat = 16'sd32767;
    else if (a_sum < -32'sd32767) a_sat = -16'sd32767;
    else                          a_sat = 16'(a_sum);
  end

  logic [31:0] mm;   // 1 - k^2, Q28
  assign mm = 32'd1 << 28;
  logic [31:0] m_temp;
  assign m_temp = mm - 32'(kk * kk);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; done <= 1'b0; ok <= 1'b0; e <= '0; e_out <= '0; shift <= '0;
      acc <= '0; kk <= '0; i <= '0; j <= '0;
      for (int n = 0; n <= ORDER; n++) begin a[n] <= '0; a_old[n] <= '0; rn[n] <= '0; end
    end else begin
      done <= 1'b0;
      case (st)
        IDLE: if (start) st <= NORM;
        NORM: begin
          for (int n = 1; n <= ORDER; n++) begin a[n] <= '0; a_old[n] <= '0; end
          a[0] <= 16'sd4096; a_old[0] <= 16'sd4096;
          shift <= sh_c;
          for (int n = 0; n <= ORDER; n++) rn[n] <= 16'((ryy[n] <<< sh_c) >>> 16);
          if (ryy[0] <= 0) begin
            ok <= 1'b0; e <= '0; st <= FIN;
          end else begin
            ok <= 1'b1;
            e  <= 32'(32'(16'((ryy[0] <<< sh_c) >>> 16)) << 15);
            i  <= 4'd1; j <= 4'd1;
            acc <= '0;
            st <= ACC;
          end
        end
        ACC: begin
          if (j == i) begin
            acc <= acc + (48'(rn[i]) <<< 12);
            st  <= DIV;
          end else begin
            acc <= acc + 48'(prod);
            j   <= j + 1'b1;
          end
        end
        DIV: begin
          kk <= 16'(kq);
          for (int n = 0; n <= ORDER; n++) a_old[n] <= a[n];
          j  <= 4'd1;
          st <= UPD;
        end
        UPD: begin
          if (j == i) begin
            a[i] <= kk >>> 2;
            st   <= ERR;
          end else begin
            a[j] <= a_sat;
            j    <= j + 1'b1;
          end
        end
        ERR: begin
          e <= 32'((64'(e) * 64'(m_temp)) >> 28);
          if (i == 4'(ORDER)) st <= FIN;
          else begin
            i <= i + 1'b1; j <= 4'd1; acc <= '0; st <= ACC;
          end
        end
        FIN: begin
          e_out <= e;
          done  <= 1'b1;
          st    <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
