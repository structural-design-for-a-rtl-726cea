// Testbench for lsp_synth_filter: from eight LSP cosines (Q12) the direct
// form predictor A(z) = (P(z) + Q(z))/2 is built here in floating point, and
// the all-pole filter s(n) = e(n) - sum a_k s(n-k) is run alongside the
// block on random excitation. Outputs must agree within 1 % of the signal's
// peak + 3 LSB; valid must follow each en by one cycle.
module tb_lsp_synth_filter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 0, valid;
  logic signed [15:0] c [8];
  logic signed [23:0] e = 0;
  logic signed [15:0] s;
  lsp_synth_filter dut (.*);

  function automatic void mul2(ref real p [11], input real cc);
    real t [11];
    for (int n = 0; n < 11; n++) t[n] = p[n];
    for (int n = 0; n < 11; n++) begin
      p[n] = t[n];
      if (n >= 1) p[n] -= cc * t[n-1];
      if (n >= 2) p[n] += t[n-2];
    end
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    for (int t = 0; t < 6; t++) begin
      real w [8], pp [11], qq [11], ar [11], hist [8], peak;
      real ref_s [300];
      int  got_s [300];
      rst_n = 0; @(negedge clk); rst_n = 1;
      w[0] = 0.3 + 0.2 * ($urandom_range(0, 100) / 100.0);
      for (int n = 1; n < 8; n++) w[n] = w[n-1] + 0.2 + 0.12 * ($urandom_range(0, 100) / 100.0);
      for (int n = 0; n < 8; n++) c[n] = 16'($rtoi(2.0 * $cos(w[n]) * 4096.0));
      for (int n = 0; n < 11; n++) begin pp[n] = 0; qq[n] = 0; end
      pp[0] = 1; pp[1] = 1; qq[0] = 1; qq[1] = -1;
      for (int n = 0; n < 4; n++) begin
        mul2(pp, real'(c[2*n]) / 4096.0); mul2(qq, real'(c[2*n+1]) / 4096.0);
      end
      for (int n = 0; n < 11; n++) ar[n] = 0.5 * (pp[n] + qq[n]);
      for (int n = 0; n < 8; n++) hist[n] = 0;
      peak = 0;
      for (int n = 0; n < 300; n++) begin
        real y;
        e = 24'(int'($urandom_range(0, 400)) - 200);
        y = real'(e);
        for (int k = 1; k <= 8; k++) y -= ar[k] * hist[k-1];
        for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = y;
        ref_s[n] = y;
        if (y > peak) peak = y;
        if (-y > peak) peak = -y;
        @(negedge clk); en = 1; @(negedge clk); en = 0;
        checks++;
        if (!valid) begin failures++; $display("valid missing"); end
        got_s[n] = int'(s);
      end
      checks++;
      if (peak > 30000) begin failures++; $display("test signal too large %f", peak); end
      for (int n = 0; n < 300; n++) begin
        checks++;
        if (real'(got_s[n]) - ref_s[n] > 0.01 * peak + 3 || ref_s[n] - real'(got_s[n]) > 0.01 * peak + 3) begin
          failures++;
          if (failures < 10) $display("t=%0d n=%0d got %0d exp %f", t, n, got_s[n], ref_s[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
