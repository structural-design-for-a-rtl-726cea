// Testbench for lsp_quantizer: random cosine sets are quantised, the code is
// decoded by lsp_decoder, and every decoded value must be as near to the
// input as the best level found here by exhaustive search; the bit budget
// {4,3,4,3,4,3,4,3} is checked through the number of distinct levels used.
module tb_lsp_quantizer;
  import gelp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, valid;
  logic signed [15:0] clsp [8];
  logic [27:0] code;
  lsp_quantizer dut (.*);
  logic signed [15:0] dec [8];
  lsp_decoder u_dec (.code(code), .clsp(dec));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 8; i++) clsp[i] = 16'(int'($urandom_range(0, 16000)) - 8000);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      checks++;
      if (!valid) begin failures++; $display("no valid"); end
      for (int i = 0; i < 8; i++) begin
        int best, d;
        best = 1 << 30;
        for (int j = 0; j < ((i % 2 == 0) ? 16 : 8); j++) begin
          d = int'(clsp[i]) - int'(lsp_level(i, j));
          if (d < 0) d = -d;
          if (d < best) best = d;
        end
        d = int'(clsp[i]) - int'(dec[i]);
        if (d < 0) d = -d;
        checks++;
        if (d != best) begin failures++; $display("param %0d in %0d got %0d", i, clsp[i], dec[i]); end
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
