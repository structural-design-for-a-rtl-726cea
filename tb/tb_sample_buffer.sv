// Testbench for sample_buffer: writes 700 samples and, at every frame_ready,
// reads the whole 256-sample frame and compares it with the 256 most recent
// samples (zeros before the first sample), also checking that frames come
// exactly every 200 samples.
module tb_sample_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic signed [7:0] in_sample = 0;
  logic frame_ready;
  logic [7:0] rd_addr = 0;
  logic signed [7:0] rd_data;
  sample_buffer dut (.*);

  function automatic logic signed [7:0] smp(input int n);
    return 8'((n * 37 + 11) ^ (n >> 3));
  endfunction

  int written = 0, frames = 0, last_frame_at = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 700; n++) begin
      @(negedge clk); in_valid = 1; in_sample = smp(n);
      @(negedge clk); in_valid = 0; written = n + 1;
      if (frame_ready) begin
        frames++;
        checks++;
        if (written - last_frame_at != 200) begin
          failures++; $display("frame spacing %0d", written - last_frame_at);
        end
        last_frame_at = written;
        for (int j = 0; j < 256; j++) begin
          int src;
          logic signed [7:0] exp_v;
          rd_addr = 8'(j);
          @(negedge clk);
          src   = written - 256 + j;
          exp_v = (src < 0) ? 8'sd0 : smp(src);
          checks++;
          if (rd_data !== exp_v) begin
            failures++;
            if (failures < 10) $display("frame %0d j=%0d got %0d exp %0d", frames, j, rd_data, exp_v);
          end
        end
      end
    end
    checks++; if (frames != 3) begin failures++; $display("frames=%0d", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
