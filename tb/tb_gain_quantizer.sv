// Testbench for gain_quantizer: for G = 0..2000 (Q4) the returned index
// must name a codebook word (read through gain_codebook) no farther from G
// than any other word, found here by exhaustive search.
module tb_gain_quantizer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, valid;
  logic [15:0] g;
  logic [4:0]  idx;
  gain_quantizer dut (.*);

  logic [4:0]  cb_idx;
  logic [11:0] cb_val;
  gain_codebook cb (.idx(cb_idx), .gain(cb_val));
  int tab [32];

  initial begin
    for (int i = 0; i < 32; i++) begin cb_idx = 5'(i); #1; tab[i] = int'(cb_val); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v <= 2000; v += 3) begin
      int best;
      g = 16'(v);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      best = 1 << 30;
      for (int i = 0; i < 32; i++) if ((tab[i] > v ? tab[i] - v : v - tab[i]) < best) best = (tab[i] > v ? tab[i] - v : v - tab[i]);
      checks++;
      if (!valid || (tab[idx] > v ? tab[idx] - v : v - tab[idx]) != best) begin
        failures++; $display("G=%0d idx=%0d (%0d) best dist %0d", v, idx, tab[idx], best);
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
