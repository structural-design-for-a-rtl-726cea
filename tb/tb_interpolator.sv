// Testbench for interpolator (N = 3 lanes): for each subframe k the output
// must equal ((7-2k) prev + (2k+1) cur) / 8 within 4 LSB (the shift-based
// eighths truncate: below 2 LSB for each of the two terms), for random signed inputs.
module tb_interpolator;
  int checks = 0, failures = 0;
  logic [1:0] k;
  logic signed [15:0] prev [3], cur [3], theta [3];
  interpolator #(.N(3), .W(16)) dut (.*);
  initial begin
    for (int t = 0; t < 400; t++) begin
      k = 2'(t % 4);
      for (int n = 0; n < 3; n++) begin
        prev[n] = 16'(int'($urandom_range(0, 30000)) - 15000);
        cur[n]  = 16'(int'($urandom_range(0, 30000)) - 15000);
      end
      #1;
      for (int n = 0; n < 3; n++) begin
        real e;
        e = (real'(7 - 2 * int'(k)) * real'(prev[n]) + real'(2 * int'(k) + 1) * real'(cur[n])) / 8.0;
        checks++;
        if (real'(theta[n]) - e > 4.0 || e - real'(theta[n]) > 4.0) begin
          failures++; $display("k=%0d prev=%0d cur=%0d got %0d exp %f", k, prev[n], cur[n], theta[n], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
