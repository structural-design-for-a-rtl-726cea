// Testbench for lpc_to_lsp: eight line spectral frequencies are chosen, the
// matching A(z) = (P(z) + Q(z))/2 is built here in floating point from the
// products of second-order factors, rounded to Q12 and converted by the
// block (frequencies spread over 0.42..2.7 rad so that every a_k fits the
// Q12 range of +-8). Its eight outputs must equal 2cos(w_i), in order, within 0.02.
module tb_lpc_to_lsp;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, done;
  logic signed [15:0] a [9];
  logic signed [15:0] clsp [8];
  lpc_to_lsp dut (.*);

  // multiply polynomial p (degree <= 9) by (1 - c z^-1 + z^-2)
  function automatic void mul2(ref real p [11], input real c);
    real t [11];
    for (int n = 0; n < 11; n++) t[n] = p[n];
    for (int n = 0; n < 11; n++) begin
      p[n] = t[n];
      if (n >= 1) p[n] -= c * t[n-1];
      if (n >= 2) p[n] += t[n-2];
    end
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      real w [8], cs [8], pp [11], qq [11], ar [11];
      int cyc;
      w[0] = 0.42 + 0.18 * ($urandom_range(0, 100) / 100.0);
      for (int n = 1; n < 8; n++) w[n] = w[n-1] + 0.2 + 0.1 * ($urandom_range(0, 100) / 100.0);
      for (int n = 0; n < 8; n++) cs[n] = 2.0 * $cos(w[n]);
      for (int n = 0; n < 11; n++) begin pp[n] = 0; qq[n] = 0; end
      pp[0] = 1; pp[1] = 1;      // 1 + z^-1
      qq[0] = 1; qq[1] = -1;     // 1 - z^-1
      for (int n = 0; n < 4; n++) begin mul2(pp, cs[2*n]); mul2(qq, cs[2*n+1]); end
      for (int n = 0; n < 11; n++) ar[n] = 0.5 * (pp[n] + qq[n]);
      a[0] = 16'sd4096;
      for (int n = 1; n <= 8; n++) a[n] = 16'($rtoi(ar[n] * 4096.0 + (ar[n] > 0 ? 0.5 : -0.5)));
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
      checks++;
      if (!done) begin failures++; $display("no done"); end
      for (int n = 0; n < 8; n++) begin
        real got;
        got = real'(clsp[n]) / 4096.0;
        checks++;
        if (got - cs[n] > 0.02 || cs[n] - got > 0.02) begin
          failures++; $display("t=%0d clsp[%0d] got %f exp %f", t, n, got, cs[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
