// glottal_pulse -- glottal pulse codebook and pitch modulator.
//
// The codebook holds one prototype period w(0..L-1) of a decolourised
// glottal excitation with its main pulse at the start. To produce a pitch
// period of N samples the prototype is stretched or shrunk by overlap-add
// with triangular windows:
//   L >= N: v(i) = ((N-1-i) w(i) + i w(L-N+i)) / (N-1)
//   L <  N: v(i) = w1(i) + w2(i),
//           w1(i) = w(i) (L-1-i)/(L-1)          for i < L, else 0
//           w2(i) = w(i-N+L) (i-N+L)/(L-1)      for i >= N-L, else 0
// so the period starts with the head of the prototype under a falling
// window and ends with its tail under a rising one. One output sample is
// produced per adv strobe; the period N is taken from `period` at the start
// of every period (pitch-synchronous update), or at once on restart.
// The overlap-add rule follows the original coder design (the shifted copy in w2 is
// read as w(i-N+L), the prototype moved to the end of the period). The
// prototype's length (L = 64) and contents, which come from a recording in
// the original, are this design's stand-ins generated by a formula.
// v is combinational from the current index; period_start marks i = 0.
module glottal_pulse #(
  parameter int unsigned L = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adv,
  input  logic               restart,
  input  logic [7:0]         period,        // N, 21..147
  output logic signed [15:0] v,
  output logic               period_start
);
  // prototype: a sharp main excitation followed by a low-level ripple
  function automatic logic signed [15:0] proto(input int unsigned i);
    int r;
    case (i)
      0: return -16'sd40;
      1: return 16'sd120;
      2: return 16'sd60;
      3: return -16'sd110;
      4: return 16'sd85;
      5: return -16'sd15;
      default: begin
        r = int'((i * 29) % 13) - 6;
        return 16'(3 * r - ((i > L - 6) ? 8 * int'(i - (L - 6)) : 0));
      end
    endcase
  endfunction

  logic signed [15:0] rom [L];
  always_comb for (int unsigned n = 0; n < L; n++) rom[n] = proto(n);

  logic [7:0] idx, n_cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; n_cur <= 8'd64;
    end else if (restart) begin
      idx <= '0; n_cur <= period;
    end else if (adv) begin
      if (idx >= n_cur - 8'd1) begin idx <= '0; n_cur <= period; end
      else idx <= idx + 1'b1;
    end
  end
  assign period_start = (idx == 0);

  always_comb begin
    int i, nn, j, num;
    i  = int'(idx);
    nn = int'(n_cur);
    j  = 0;
    num = 0;
    if (nn >= 2 && int'(L) >= nn) begin
      j   = int'(L) - nn + i;
      num = (nn - 1 - i) * int'(rom[i]) + i * int'(rom[j]);
      v   = 16'(num / (nn - 1));
    end else if (nn >= 2) begin
      num = 0;
      if (i < int'(L))          num += int'(rom[i]) * (int'(L) - 1 - i);
      if (i >= nn - int'(L))    num += int'(rom[i - nn + int'(L)]) * (i - nn + int'(L));
      v   = 16'(num / (int'(L) - 1));
    end else begin
      v = '0;
    end
  end
endmodule
