// Testbench for levinson_durbin: autocorrelations of random AR(2)-coloured
// frames are run through the block and through a floating-point
// Levinson-Durbin recursion written here. The Q12 coefficients must agree
// within 0.02 and the error energy (rescaled with the reported shift) within
// 3 %. A zero-energy frame must report ok = 0.
module tb_levinson_durbin;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, ok, done;
  logic signed [31:0] ryy [9];
  logic signed [15:0] a [9];
  logic [31:0] e_out;
  logic [4:0]  shift;
  levinson_durbin dut (.*);

  task automatic run_ld(output int cyc);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      real x [256];
      real r [9], ar [9], tmp [9], err, kf, acc, e_dut;
      real c1, c2;
      int cyc;
      c1 = 1.6 * ($urandom_range(0, 100) / 100.0) - 0.3;
      c2 = -0.2 - 0.6 * ($urandom_range(0, 100) / 100.0);
      x[0] = 0; x[1] = 0;
      for (int n = 2; n < 256; n++) x[n] = c1 * x[n-1] + c2 * x[n-2] + (real'(int'($urandom_range(0, 60))) - 30.0);
      for (int n = 0; n < 256; n++) x[n] = real'(int'(x[n] / 2.0));
      for (int k = 0; k <= 8; k++) begin
        r[k] = 0;
        for (int n = k; n < 256; n++) r[k] += x[n] * x[n-k];
        ryy[k] = 32'(longint'(r[k]));
        r[k] = real'(ryy[k]);
      end
      // reference recursion, A(z) = 1 + sum a_k z^-k
      for (int k = 0; k <= 8; k++) ar[k] = 0;
      ar[0] = 1; err = r[0];
      for (int i = 1; i <= 8; i++) begin
        acc = r[i];
        for (int j = 1; j < i; j++) acc += ar[j] * r[i-j];
        kf = -acc / err;
        for (int j = 0; j <= 8; j++) tmp[j] = ar[j];
        for (int j = 1; j < i; j++) ar[j] = tmp[j] + kf * tmp[i-j];
        ar[i] = kf;
        err = err * (1 - kf * kf);
      end
      run_ld(cyc);
      checks++;
      if (!ok || cyc > 120) begin failures++; $display("ok=%0d cycles=%0d", ok, cyc); end
      for (int k = 1; k <= 8; k++) begin
        real got;
        got = real'(a[k]) / 4096.0;
        checks++;
        if (got - ar[k] > 0.02 || ar[k] - got > 0.02) begin
          failures++; $display("t=%0d a[%0d] got %f exp %f", t, k, got, ar[k]);
        end
      end
      e_dut = real'(e_out) * 2.0;
      for (int n = 0; n < int'(shift); n++) e_dut = e_dut / 2.0;
      checks++;
      if (e_dut > err * 1.03 + 50 || e_dut < err * 0.97 - 50) begin
        failures++; $display("t=%0d E got %f exp %f", t, e_dut, err);
      end
    end
    for (int k = 0; k <= 8; k++) ryy[k] = 0;
    begin
      int cyc;
      run_ld(cyc);
      checks++;
      if (ok || e_out != 0) begin failures++; $display("zero frame not flagged"); end
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
