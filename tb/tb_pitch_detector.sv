// Testbench for pitch_detector. Frames are streamed in as the autocorrelation
// pass would forward them. A reference written here recomputes the filtered
// sign sequence, m_c(k), the (1 + 0.002k) scaling (floating point) and the
// arg max; the block's pitch and score must match it (score within 0.6 %).
// The voicing decision is checked against criteria (i)-(iii) evaluated here
// with the Rss values supplied. Frames: periodic pulse trains of several
// periods (voiced), a pitch jump with weak correlation (criterion iii), low
// energy (i) and noise with negative Rss(1) (ii). The search time
// (127 lags) is checked too.
module tb_pitch_detector;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic x_valid = 0, x_last = 0;
  logic signed [7:0] x = 0;
  logic signed [31:0] rss0 = 0, rss1 = 0;
  logic [7:0] pitch;
  logic voiced, done;
  logic [15:0] score;
  pitch_detector dut (.*);

  logic signed [7:0] fr [256];
  int p_prev = 0;
  int n_voiced = 0, n_unvoiced = 0;

  task automatic run_frame(input int r0, input int r1);
    int sgn [256];
    real best, m;
    int bk, cyc;
    int mc;
    bit uv;
    // reference
    for (int n = 0; n < 256; n++) begin
      int s;
      s = fr[n];
      if (n >= 1) s += fr[n-1];
      if (n >= 2) s += fr[n-2];
      if (n >= 3) s += fr[n-3];
      sgn[n] = (s >= 0);
    end
    best = -1; bk = 21;
    for (int k = 21; k <= 147; k++) begin
      mc = 0;
      for (int n = 0; n + k < 256; n++) mc += (sgn[n] == sgn[n+k]);
      m = (1.0 + 0.002 * k) * mc;
      if (m > best + 0.3) begin best = m; bk = k; end
    end
    // drive
    rss0 = r0; rss1 = r1;
    for (int n = 0; n < 256; n++) begin
      @(negedge clk); x_valid = 1; x = fr[n]; x_last = (n == 255);
    end
    @(negedge clk); x_valid = 0; x_last = 0;
    cyc = 1;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 129) begin failures++; $display("search time %0d", cyc); end
    checks++;
    if (int'(pitch) != bk) begin failures++; $display("pitch got %0d exp %0d", pitch, bk); end
    checks++;
    if (real'(score) / 256.0 > best * 1.006 || real'(score) / 256.0 < best * 0.994) begin
      failures++; $display("score got %f exp %f", real'(score) / 256.0, best);
    end
    uv = (r0 < 240 * 256) ||
         ((real'(r1) < 0.3 * real'(r0)) && (real'(score) / 256.0 < 185.0)) ||
         (((pitch > p_prev ? pitch - p_prev : p_prev - pitch) > 0.15 * p_prev) && (real'(score) / 256.0 < 160.0));
    checks++;
    if (voiced != !uv) begin failures++; $display("voiced got %0d exp %0d", voiced, !uv); end
    if (voiced) n_voiced++; else n_unvoiced++;
    p_prev = int'(pitch);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // voiced pulse trains
    for (int t = 0; t < 6; t++) begin
      int per;
      per = (t < 3) ? 40 + t : 100 + 7 * t;
      for (int n = 0; n < 256; n++) fr[n] = 8'((n % per < per / 2) ? 60 : -50) + 8'($urandom_range(0, 6));
      run_frame(2000000, 1500000);
    end
    // weakly periodic noise: correlation score low, pitch jumps
    for (int t = 0; t < 3; t++) begin
      for (int n = 0; n < 256; n++) fr[n] = 8'($urandom_range(0, 200)) - 8'sd100;
      run_frame(2000000, 1500000);
    end
    // low energy
    for (int n = 0; n < 256; n++) fr[n] = (n % 50 < 25) ? 8'sd1 : -8'sd1;
    run_frame(1000, 900);
    // strongly periodic frames on both sides of the energy threshold
    for (int n = 0; n < 256; n++) fr[n] = 8'((n % 50 < 25) ? 60 : -50);
    run_frame(240 * 256 - 500, 240 * 256 - 600);
    run_frame(240 * 256 + 500, 240 * 256);
    // noise with negative lag-1 correlation
    for (int n = 0; n < 256; n++) fr[n] = 8'($urandom_range(0, 200)) - 8'sd100;
    run_frame(2000000, -300000);
    checks++;
    if (n_voiced == 0 || n_unvoiced == 0) begin failures++; $display("decisions not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
