// Testbench for quartic_solver: picks four distinct real roots in
// (-1.85, 1.85), forms x^4 + a x^3 + b x^2 + c x + d from them in floating
// point and rounds the coefficients to Q12. The exact roots of the rounded
// quartic are then found here by Newton polishing of the chosen roots, and
// the block must return them in decreasing order within 0.01.
module tb_quartic_solver;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, done;
  logic signed [31:0] ca, cb, cc, cd;
  logic signed [15:0] root [4];
  quartic_solver dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      real x [4], s, a, b, c, d;
      int cyc;
      // four roots, sorted decreasing, at least 0.15 apart
      x[0] = 1.85 - 0.5 * ($urandom_range(0, 1000) / 1000.0);
      for (int n = 1; n < 4; n++) x[n] = x[n-1] - 0.15 - 0.6 * ($urandom_range(0, 1000) / 1000.0);
      if (x[3] < -1.85) begin
        s = (x[3] + 1.85);
        for (int n = 0; n < 4; n++) x[n] -= s;
        if (x[0] > 1.85) begin  // compress
          for (int n = 0; n < 4; n++) x[n] = x[n] * 0.9;
        end
      end
      // fixed cases: a pair straddling zero in each quadratic factor
      if (t == 0) x = '{1.2, -0.22, -1.31, -1.8};
      if (t == 1) x = '{0.3, -0.4, -0.9, -1.6};
      a = -(x[0] + x[1] + x[2] + x[3]);
      b = x[0]*x[1] + x[0]*x[2] + x[0]*x[3] + x[1]*x[2] + x[1]*x[3] + x[2]*x[3];
      c = -(x[0]*x[1]*x[2] + x[0]*x[1]*x[3] + x[0]*x[2]*x[3] + x[1]*x[2]*x[3]);
      d = x[0]*x[1]*x[2]*x[3];
      ca = $rtoi(a * 4096.0 + (a > 0 ? 0.5 : -0.5));
      cb = $rtoi(b * 4096.0 + (b > 0 ? 0.5 : -0.5));
      cc = $rtoi(c * 4096.0 + (c > 0 ? 0.5 : -0.5));
      cd = $rtoi(d * 4096.0 + (d > 0 ? 0.5 : -0.5));
      // polish the roots against the rounded coefficients
      begin
        real ra, rb, rc, rd, f, fp;
        ra = real'(ca) / 4096.0; rb = real'(cb) / 4096.0;
        rc = real'(cc) / 4096.0; rd = real'(cd) / 4096.0;
        for (int n = 0; n < 4; n++)
          for (int it = 0; it < 30; it++) begin
            f  = (((x[n] + ra) * x[n] + rb) * x[n] + rc) * x[n] + rd;
            fp = ((4.0 * x[n] + 3.0 * ra) * x[n] + 2.0 * rb) * x[n] + rc;
            if (fp != 0.0) x[n] = x[n] - f / fp;
          end
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc > 200) begin failures++; $display("cycles %0d", cyc); end
      for (int n = 0; n < 4; n++) begin
        real got;
        got = real'(root[n]) / 4096.0;
        checks++;
        if (got - x[n] > 0.01 || x[n] - got > 0.01) begin
          failures++;
          $display("t=%0d root%0d got %f exp %f", t, n, got, x[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
