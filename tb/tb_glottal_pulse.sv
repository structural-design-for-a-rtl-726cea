// Testbench for glottal_pulse: for periods shorter and longer than the
// prototype (L = 64) it checks every output sample against the overlap-add
// formulas evaluated here on the prototype (read from the block's ROM),
// checks that a period lasts exactly N samples, and that a new period value
// takes effect only at the next period start.
module tb_glottal_pulse;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic adv = 0, restart = 0, period_start;
  logic [7:0] period = 40;
  logic signed [15:0] v;
  glottal_pulse dut (.*);

  function automatic int expv(input int i, input int nn);
    int L, w1, w2;
    real r;
    L = 64;
    if (L >= nn) begin
      r = (real'(nn - 1 - i) * dut.rom[i] + real'(i) * dut.rom[L - nn + i]) / real'(nn - 1);
    end else begin
      r = 0;
      if (i < L) r += real'(dut.rom[i]) * real'(L - 1 - i) / real'(L - 1);
      if (i >= nn - L) r += real'(dut.rom[i - nn + L]) * real'(i - nn + L) / real'(L - 1);
    end
    return $rtoi(r);
  endfunction

  task automatic one_period(input int nn);
    for (int i = 0; i < nn; i++) begin
      int e;
      e = expv(i, nn);
      checks++;
      if ((int'(v) - e > 1) || (e - int'(v) > 1)) begin
        failures++; $display("N=%0d i=%0d got %0d exp %0d", nn, i, v, e);
      end
      checks++;
      if (period_start != (i == 0)) begin failures++; $display("period_start wrong N=%0d i=%0d", nn, i); end
      @(negedge clk); adv = 1; @(negedge clk); adv = 0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); period = 40; restart = 1; @(negedge clk); restart = 0;
    one_period(40);
    period = 21;  one_period(40);  // new value only used from the next period
    period = 147; one_period(21);
    period = 64;  one_period(147);
    period = 100; one_period(64);
    one_period(100);
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
