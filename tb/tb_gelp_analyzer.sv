// Testbench for gelp_analyzer. Synthetic speech: four hops of a voiced sound
// (pulse train of period 60 through a two-pole resonator), two hops of
// high-pass noise, two hops of silence, one sample every 8 clocks. For every
// frame an independent floating-point model written here computes the
// autocorrelation, the 0.925 pre-emphasis, Levinson-Durbin, the gain and the
// LSP cosines (by a fine sign-change search on the two quartics), and
// quantises them with the shared level tables. Checks: one packet per hop,
// each within 1200 clocks of the hop's last sample; pitch 60 +-1 and voiced
// for the fully voiced frames; unvoiced for the noise and silence frames;
// gain index and every LSP index within one step of the model.
module tb_gelp_analyzer;
  import gelp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic signed [7:0] in_sample = 0;
  packet_t packet;
  logic packet_valid;
  logic [15:0] gain_q4;
  logic [7:0] overruns;
  gelp_analyzer dut (.*);

  localparam int NHOP = 8;
  logic signed [7:0] sig [NHOP*200];

  // ---------------- floating-point reference --------------------------
  function automatic real quart(input real x, input real q [5]);
    // symmetric polynomial in x: x^4 + r3 x^3 + (r2-4) x^2 + (r1-3r3) x + r0-2r2+2
    return (((x + q[3]) * x + (q[2] - 4.0)) * x + (q[1] - 3.0 * q[3])) * x + q[0] - 2.0 * q[2] + 2.0;
  endfunction

  task automatic reference(input int m, output int g_idx, output int l_idx [8]);
    real s [256], r [10], ry [9], ar [9], tmp [9], err, kf, acc, g;
    real pq [2][5], roots [2][4];
    int nr [2];
    for (int n = 0; n < 256; n++) begin
      int src;
      src = 200 * (m + 1) - 256 + n;
      s[n] = (src < 0) ? 0.0 : real'(sig[src]);
    end
    for (int k = 0; k < 10; k++) begin
      r[k] = 0;
      for (int n = k; n < 256; n++) r[k] += s[n] * s[n-k];
    end
    for (int k = 0; k <= 8; k++) ry[k] = 1.855625 * r[k] - 0.925 * (r[k+1] + r[(k == 0) ? 1 : k-1]);
    for (int k = 0; k <= 8; k++) ar[k] = 0;
    ar[0] = 1; err = ry[0];
    if (err > 0) begin
      for (int i = 1; i <= 8; i++) begin
        acc = ry[i];
        for (int j = 1; j < i; j++) acc += ar[j] * ry[i-j];
        kf = -acc / err;
        for (int j = 0; j <= 8; j++) tmp[j] = ar[j];
        for (int j = 1; j < i; j++) ar[j] = tmp[j] + kf * tmp[i-j];
        ar[i] = kf;
        err = err * (1 - kf * kf);
      end
    end else err = 0;
    g = $sqrt(err / 256.0) * 16.0;   // Q4
    g_idx = 0;
    for (int i = 1; i < 32; i++)
      if ((real'(gain_level(i)) - g) * (real'(gain_level(i)) - g) <
          (real'(gain_level(g_idx)) - g) * (real'(gain_level(g_idx)) - g)) g_idx = i;
    // P', Q' coefficients
    begin
      real ak [10], pp, qp, ppv [5], qpv [5];
      ak[0] = 1; ak[9] = 0;
      for (int n = 1; n <= 8; n++) ak[n] = ar[n];
      ppv[0] = 1; qpv[0] = 1;
      for (int n = 1; n <= 4; n++) begin
        ppv[n] = ak[n] + ak[9-n] - ppv[n-1];
        qpv[n] = ak[n] - ak[9-n] + qpv[n-1];
      end
      // q[i] = r_i with r4 = 1: r3 = p'1, r2 = p'2, r1 = p'3, r0 = p'4
      pq[0][3] = ppv[1]; pq[0][2] = ppv[2]; pq[0][1] = ppv[3]; pq[0][0] = ppv[4]; pq[0][4] = 1;
      pq[1][3] = qpv[1]; pq[1][2] = qpv[2]; pq[1][1] = qpv[3]; pq[1][0] = qpv[4]; pq[1][4] = 1;
    end
    for (int b = 0; b < 2; b++) begin
      real prev, cur, x;
      nr[b] = 0;
      prev = quart(2.0, pq[b]);
      for (int t = 1; t <= 4000; t++) begin
        x = 2.0 - 4.0 * t / 4000.0;
        cur = quart(x, pq[b]);
        if ((prev > 0) != (cur > 0) && nr[b] < 4) begin roots[b][nr[b]] = x + 0.0005; nr[b]++; end
        prev = cur;
      end
      for (int n = nr[b]; n < 4; n++) roots[b][n] = 0;
    end
    for (int i = 0; i < 8; i++) begin
      real x;
      int best;
      x = roots[i % 2][i / 2];
      if (x > 1.9) x = 1.9;
      if (x < -1.9) x = -1.9;
      x = x * 4096.0;
      best = 0;
      for (int j = 1; j < (1 << lsp_nbits(i)); j++)
        if ((real'(lsp_level(i, j)) - x) ** 2 < (real'(lsp_level(i, best)) - x) ** 2) best = j;
      l_idx[i] = best;
    end
  endtask

  // ---------------- stimulus -------------------------------------------
  int hop_end_cycle [NHOP];
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    real y1, y2, y;
    y1 = 0; y2 = 0;
    for (int n = 0; n < NHOP * 200; n++) begin
      int v;
      if (n < 800) begin
        y = ((n % 60 == 0) ? 400.0 : 0.0) + 1.3 * y1 - 0.7 * y2;
        y2 = y1; y1 = y;
        v = $rtoi(y / 4.0);
      end else if (n < 1200) begin
        v = int'($urandom_range(0, 80)) - 40;
        v = v - int'(sig[n-1]) / 2;
      end else v = 0;
      if (v > 127) v = 127;
      if (v < -128) v = -128;
      sig[n] = 8'(v);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NHOP * 200; n++) begin
      @(negedge clk); in_valid = 1; in_sample = sig[n];
      @(negedge clk); in_valid = 0;
      repeat (6) @(negedge clk);
      if (n % 200 == 199) hop_end_cycle[n / 200] = cycle;
    end
    repeat (1500) @(negedge clk);
  end

  int npk = 0;
  always @(posedge clk) if (packet_valid) begin
    int g_idx, l_idx [8], pit;
    reference(npk, g_idx, l_idx);
    pit = (packet.vp == 0) ? 0 : int'(packet.vp) + 20;
    checks++;
    if (cycle - hop_end_cycle[npk] > 1200) begin failures++; $display("frame %0d late: %0d", npk, cycle - hop_end_cycle[npk]); end
    if (npk >= 1 && npk <= 3) begin
      checks++;
      if (pit < 59 || pit > 61) begin failures++; $display("frame %0d pitch %0d", npk, pit); end
    end
    if (npk == 5 || npk == 7) begin
      checks++;
      if (pit != 0) begin failures++; $display("frame %0d should be unvoiced (pitch %0d)", npk, pit); end
    end
    checks++;
    if (int'(packet.gain) - g_idx > 1 || g_idx - int'(packet.gain) > 1) begin
      failures++; $display("frame %0d gain idx %0d exp %0d", npk, packet.gain, g_idx);
    end
    if (npk != 7) for (int i = 0; i < 8; i++) begin
      int got;
      got = int'((packet.lsp >> lsp_lsb(i)) & ((1 << lsp_nbits(i)) - 1));
      checks++;
      if (got - l_idx[i] > 1 || l_idx[i] - got > 1) begin
        failures++; $display("frame %0d lsp %0d idx %0d exp %0d", npk, i, got, l_idx[i]);
      end
    end
    npk++;
  end

  initial begin
    wait (rst_n);
    wait (npk == NHOP);
    repeat (10) @(posedge clk);
    checks++;
    if (overruns != 0) begin failures++; $display("overruns %0d", overruns); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NHOP * 200 * 8 + 5000) @(posedge clk);
    failures++;
    $display("packets %0d", npk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
