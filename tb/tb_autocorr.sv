// Testbench for autocorr: a 256-sample frame memory with one cycle of read
// latency feeds the block; the ten lag sums are compared with sums computed
// here, the forwarded sample stream is counted and the start-to-done time
// (FRAME+2 cycles) is checked. Three random frames, one at full scale.
module tb_autocorr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0;
  logic [7:0] rd_addr;
  logic signed [7:0] rd_data;
  logic x_valid, x_last, done;
  logic signed [31:0] rss [10];
  autocorr dut (.*);

  logic signed [7:0] frame [256];
  always_ff @(posedge clk) rd_data <= frame[rd_addr];

  int nx = 0;
  always @(posedge clk) if (x_valid) nx++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      longint exp_r [10];
      int cyc;
      for (int n = 0; n < 256; n++)
        frame[n] = (t == 2) ? ((n % 2) ? -8'sd128 : 8'sd127) : 8'($urandom);
      for (int k = 0; k < 10; k++) begin
        exp_r[k] = 0;
        for (int n = k; n < 256; n++) exp_r[k] += longint'(frame[n]) * longint'(frame[n-k]);
      end
      nx = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 258) begin failures++; $display("latency %0d", cyc); end
      checks++;
      if (nx != 256) begin failures++; $display("samples forwarded %0d", nx); end
      for (int k = 0; k < 10; k++) begin
        checks++;
        if (longint'(rss[k]) != exp_r[k]) begin
          failures++; $display("t=%0d k=%0d got %0d exp %0d", t, k, rss[k], exp_r[k]);
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
