// Testbench for lsp_decoder: random 28-bit codes; each parameter's index is
// cut out here at the fixed positions 27:24, 23:21, 20:17, 16:14, 13:10,
// 9:7, 6:3, 2:0 and its level looked up in the shared level table.
module tb_lsp_decoder;
  import gelp_pkg::*;
  int checks = 0, failures = 0;
  logic [27:0] code;
  logic signed [15:0] clsp [8];
  lsp_decoder dut (.*);
  initial begin
    int hi [8] = '{27, 23, 20, 16, 13, 9, 6, 2};
    int nb [8] = '{4, 3, 4, 3, 4, 3, 4, 3};
    for (int t = 0; t < 200; t++) begin
      code = 28'($urandom);
      #1;
      for (int i = 0; i < 8; i++) begin
        int j;
        j = int'((code >> (hi[i] - nb[i] + 1)) & ((1 << nb[i]) - 1));
        checks++;
        if (clsp[i] !== lsp_level(i, j)) begin
          failures++; $display("code %h param %0d got %0d exp %0d", code, i, clsp[i], lsp_level(i, j));
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
