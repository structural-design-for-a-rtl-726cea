// Testbench for sqrt_unit (W = 32): random and edge-case operands; checks
// q^2 <= d < (q+1)^2 in 64-bit integers and that done comes W/2 = 16 cycles
// after start.
module tb_sqrt_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done;
  logic [31:0] d;
  logic [15:0] q;
  sqrt_unit #(.W(32)) dut (.*);

  task automatic run(input logic [31:0] v);
    int cyc;
    longint qq;
    d = v;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    qq = longint'(q);
    checks++;
    if (!(qq * qq <= longint'(v) && (qq + 1) * (qq + 1) > longint'(v))) begin
      failures++; $display("sqrt(%0d) got %0d", v, q);
    end
    checks++;
    if (cyc != 16) begin failures++; $display("latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0); run(1); run(2); run(3); run(4); run(32'hFFFFFFFF); run(32'hFFFE0001); run(32'hFFFE0000);
    for (int t = 0; t < 300; t++) run($urandom >> ($urandom % 32));
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
