// autocorr -- autocorrelation of one analysis frame with ten parallel MACs.
//
// On start an 8-bit counter walks the frame (sample 0..FRAME-1) through the
// buffer's read port. Each sample x(n) enters a ten-deep window of recent
// samples, and MAC k adds x(n)*x(n-k) to its accumulator, so after one pass
//   rss[k] = sum_n s(n) s(n-k),   k = 0..9,
// the same sums as the frame-wide products ss[i]*ss[i+k] of the parallel
// structure. Samples before the frame count as zero. Ten MACs, the 8-bit
// counter and 8-bit samples follow the original coder design; accumulating raw sums
// (not divided by the frame length) and the window register are this
// design's choices. The samples read are also forwarded on x/x_valid so that
// the pitch detector sees the same frame without a second pass.
// Timing: done pulses FRAME+2 cycles after start.
module autocorr #(
  parameter int unsigned FRAME = 256,
  parameter int unsigned NLAG  = 10,
  parameter int unsigned AW    = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic [$clog2(FRAME)-1:0] rd_addr,
  input  logic signed [7:0]    rd_data,
  output logic                 x_valid,     // rd_data is a frame sample
  output logic                 x_last,
  output logic signed [AW-1:0] rss [NLAG],
  output logic                 done
);
  localparam int unsigned CW = $clog2(FRAME);

  logic [CW-1:0] cnt;
  logic          running, rd_pend, rd_last;
  logic signed [7:0] win [NLAG];   // win[k] = x(n-1-k)

  assign rd_addr = cnt;
  assign x_valid = rd_pend;
  assign x_last  = rd_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; running <= 1'b0; rd_pend <= 1'b0; rd_last <= 1'b0; done <= 1'b0;
      for (int k = 0; k < NLAG; k++) begin rss[k] <= '0; win[k] <= '0; end
    end else begin
      done <= 1'b0;
      if (start) begin
        cnt <= '0; running <= 1'b1;
        for (int k = 0; k < NLAG; k++) begin rss[k] <= '0; win[k] <= '0; end
      end else if (running) begin
        cnt <= cnt + 1'b1;
        if (cnt == CW'(FRAME - 1)) running <= 1'b0;
      end
      rd_pend <= running && !start;
      rd_last <= running && !start && (cnt == CW'(FRAME - 1));
      if (rd_pend) begin
        rss[0] <= rss[0] + AW'(rd_data * rd_data);
        for (int k = 1; k < NLAG; k++) rss[k] <= rss[k] + AW'(rd_data * win[k-1]);
        win[0] <= rd_data;
        for (int k = 1; k < NLAG; k++) win[k] <= win[k-1];
        if (rd_last) done <= 1'b1;
      end
    end
  end
endmodule
