// Testbench for acf_emphasis: random autocorrelation sums in, Ryy(k) out,
// compared with (1+0.925^2) Rss(k) - 0.925 (Rss(k+1) + Rss(k-1)) evaluated in
// floating point (Rss(-1) = Rss(1)); tolerance 0.05 % of Rss(0) + 2.
module tb_acf_emphasis;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, valid;
  logic signed [31:0] rss [10];
  logic signed [31:0] ryy [9];
  acf_emphasis dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      rss[0] = 32'($urandom_range(4000000, 1000));
      for (int k = 1; k < 10; k++) rss[k] = 32'(int'($urandom_range(0, 2 * rss[0])) - rss[0]);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      checks++;
      if (!valid) begin failures++; $display("valid missing"); end
      for (int k = 0; k <= 8; k++) begin
        real e, tol;
        e = 1.855625 * real'(rss[k]) - 0.925 * (real'(rss[k+1]) + real'(rss[(k == 0) ? 1 : k-1]));
        tol = 0.0005 * real'(rss[0]) + 2.0;
        checks++;
        if ((real'(ryy[k]) - e > tol) || (e - real'(ryy[k]) > tol)) begin
          failures++; $display("k=%0d got %0d exp %f", k, ryy[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
