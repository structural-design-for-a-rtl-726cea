// Testbench for noise_gen: compares 1000 outputs with a software model of
// the x^16 + x^14 + x^13 + x^11 + 1 shift register, checks that the state
// only moves on adv, that the sequence repeats after exactly 65535 steps,
// and that the samples are roughly zero-mean.
module tb_noise_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic adv = 0;
  logic signed [7:0] noise;
  noise_gen dut (.*);

  initial begin
    logic [15:0] m;
    logic signed [7:0] first;
    longint sum;
    m = 16'hACE1; sum = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    first = noise;
    for (int t = 0; t < 1000; t++) begin
      checks++;
      if (noise !== m[15:8]) begin failures++; $display("step %0d got %0d exp %0d", t, noise, m[15:8]); end
      sum += noise;
      adv = (t % 3 != 2);
      @(negedge clk);
      if (adv) m = {m[14:0], m[15] ^ m[13] ^ m[12] ^ m[10]};
      adv = 0;
    end
    checks++;
    if (sum > 12000 || sum < -12000) begin failures++; $display("mean %0d", sum); end
    // period
    begin
      int steps;
      logic [15:0] s0;
      s0 = dut.lfsr;
      steps = 0;
      adv = 1;
      do begin @(negedge clk); steps++; end while (dut.lfsr != s0 && steps < 70000);
      adv = 0;
      checks++;
      if (steps != 65535) begin failures++; $display("period %0d", steps); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
