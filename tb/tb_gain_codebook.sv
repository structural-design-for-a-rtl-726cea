// Testbench for gain_codebook: every word must lie within 1 % (or one Q4
// step) of 0.5 * 2^(i/4) and the table must be strictly increasing.
module tb_gain_codebook;
  int checks = 0, failures = 0;
  logic [4:0]  idx;
  logic [11:0] gain;
  gain_codebook dut (.*);
  initial begin
    logic [11:0] last;
    last = 0;
    for (int i = 0; i < 32; i++) begin
      real e;
      idx = 5'(i);
      #1;
      e = 8.0 * (2.0 ** (real'(i) / 4.0));
      checks++;
      if (real'(gain) > e * 1.01 + 1.0 || real'(gain) < e * 0.99 - 1.0) begin
        failures++; $display("g[%0d] = %0d exp %f", i, gain, e);
      end
      checks++;
      if (i > 0 && gain <= last) begin failures++; $display("not increasing at %0d", i); end
      last = gain;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
