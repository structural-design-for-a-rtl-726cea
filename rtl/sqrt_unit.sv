// sqrt_unit -- non-restoring integer square root.
//
// Computes q = floor(sqrt(d)) for a W-bit unsigned operand in W/2 clock
// cycles, one result bit per cycle, using only shifts, additions and
// subtractions (the non-restoring scheme: the partial remainder may go
// negative and is corrected by adding instead of subtracting on the next
// step). The first step is taken in the start cycle itself, so the W/2
// steps take W/2 cycles, as the original coder design states; the start/done
// handshake is this design's. done is high in the (W/2)th cycle after the
// start cycle; q holds until the next start.
module sqrt_unit #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   d,
  output logic [W/2-1:0] q,
  output logic           busy,
  output logic           done
);
  localparam int unsigned N = W / 2;

  logic [W-1:0]        dd;      // operand, consumed two bits per step
  logic signed [N+2:0] r;       // partial remainder
  logic [$clog2(N+1)-1:0] step;

  // one step of the recurrence; the start cycle works on the new operand
  logic signed [N+2:0] r_next, r_cur;
  logic [W-1:0]        d_cur;
  logic [N-1:0]        q_cur;
  always_comb begin
    logic signed [N+2:0] r_sh;
    r_cur = start ? '0 : r;
    d_cur = start ? d  : dd;
    q_cur = start ? '0 : q;
    r_sh = (r_cur <<< 2) | (N+3)'(d_cur[W-1 -: 2]);
    if (r_cur >= 0) r_next = r_sh - (N+3)'({q_cur, 2'b01});
    else            r_next = r_sh + (N+3)'({q_cur, 2'b11});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dd <= '0; r <= '0; q <= '0; step <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start || busy) begin
        r    <= r_next;
        q    <= {q_cur[N-2:0], ~r_next[N+2]};
        dd   <= d_cur << 2;
        step <= start ? $bits(step)'(1) : step + 1'b1;
        busy <= 1'b1;
        if (!start && step == $bits(step)'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
