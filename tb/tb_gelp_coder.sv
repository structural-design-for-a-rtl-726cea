// End-to-end testbench for gelp_coder (default parameters, loop-back). Ten
// 25 ms hops of synthetic speech -- three of a voiced sound with pitch 60,
// three with pitch 45, two of high-pass noise, two of silence -- enter at one
// sample per 8 clocks; every packet produced is passed through a small
// channel FIFO to the decoder, whose 8 kHz tick runs at the same rate.
// Checks: one packet per hop, pitch and voicing of the clean frames, zero
// gain index for silent frames, 200 output samples per packet, audible
// output for speech frames, and analysis of a frame finishing within one
// hop. Each mechanism is counted and must occur:
// frames closed in buffer half A and in half B, the zero-filled first frame,
// voiced and unvoiced decisions, the low-energy and the correlation-based
// unvoiced criteria, a zero-energy frame in the recursion, all four
// interpolation subframes, pitch interpolation between two voiced frames,
// glottal and noise excitation, and a voiced onset restart.
module tb_gelp_coder;
  import gelp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, dac_tick = 0;
  logic signed [7:0] in_sample = 0;
  packet_t packet_out, packet_in;
  logic packet_out_valid, packet_in_valid, packet_in_ready;
  logic [7:0] overruns;
  logic signed [15:0] speech_out;
  logic speech_valid, frame_start, voiced_now;
  gelp_coder dut (.*);

  localparam int NHOP = 10;
  logic signed [7:0] sig [NHOP*200];
  int exp_pitch [NHOP] = '{0, 60, 60, 0, 45, 45, 0, 0, 0, 0};  // 0: not checked
  int exp_uv    [NHOP] = '{0, 0, 0, 0, 0, 0, 0, 1, 0, 1};

  // ---- stimulus ------------------------------------------------------
  initial begin
    real y1, y2, y;
    y1 = 0; y2 = 0;
    for (int n = 0; n < NHOP * 200; n++) begin
      int v, per;
      per = (n < 600) ? 60 : 45;
      if (n < 1200) begin
        y = ((n % per == 0) ? 400.0 : 0.0) + 1.3 * y1 - 0.7 * y2;
        y2 = y1; y1 = y;
        v = $rtoi(y / 4.0);
      end else if (n < 1600) begin
        v = int'($urandom_range(0, 80)) - 40;
        v = v - int'(sig[n-1]) / 2;
      end else v = 0;
      if (v > 127) v = 127;
      if (v < -128) v = -128;
      sig[n] = 8'(v);
    end
  end

  always begin
    repeat (7) @(posedge clk);
    dac_tick <= 1; @(posedge clk); dac_tick <= 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NHOP * 200; n++) begin
      @(negedge clk); in_valid = 1; in_sample = sig[n];
      @(negedge clk); in_valid = 0;
      repeat (6) @(negedge clk);
    end
  end

  // ---- channel FIFO ----------------------------------------------------
  packet_t fifo [$];
  int npk = 0;
  always @(posedge clk) begin
    if (packet_out_valid) begin
      int pit;
      pit = (packet_out.vp == 0) ? 0 : int'(packet_out.vp) + 20;
      if (npk < NHOP) begin
        if (exp_pitch[npk] != 0) begin
          checks++;
          if (pit < exp_pitch[npk] - 1 || pit > exp_pitch[npk] + 1) begin
            failures++; $display("hop %0d pitch %0d exp %0d", npk, pit, exp_pitch[npk]);
          end
        end
        if (exp_uv[npk]) begin
          checks++;
          if (pit != 0) begin failures++; $display("hop %0d should be unvoiced", npk); end
        end
        if (npk == 9) begin
          checks++;
          if (packet_out.gain != 0) begin failures++; $display("silent hop gain %0d", packet_out.gain); end
        end
      end
      fifo.push_back(packet_out);
      npk++;
    end
  end
  assign packet_in_valid = (fifo.size() > 0);
  assign packet_in = (fifo.size() > 0) ? fifo[0] : '0;
  always @(posedge clk) if (packet_in_valid && packet_in_ready) void'(fifo.pop_front());

  // ---- mechanism counters --------------------------------------------
  int c_half_a = 0, c_half_b = 0, c_first = 0, c_voiced = 0, c_unvoiced = 0;
  int c_uv_energy = 0, c_uv_corr = 0, c_ld_zero = 0, c_pitch_interp = 0;
  int c_glottal = 0, c_noise = 0, c_onset = 0;
  int c_sub [4] = '{0, 0, 0, 0};
  int frames_out = -1, nsamp = 0, total = 0;
  int t_frame = 0, lat_max = 0;   // analysis latency, frame_ready -> packet
  real energy [NHOP + 2];

  always @(posedge clk) if (rst_n) begin
    if (dut.u_enc.u_buf.frame_ready) begin
      if (dut.u_enc.u_buf.wp == 0) c_half_b++; else c_half_a++;
      if (dut.u_enc.u_buf.first_frame) c_first++;
      t_frame = 0;
    end else t_frame++;
    if (packet_out_valid && t_frame > lat_max) lat_max = t_frame;
    if (dut.u_enc.u_pitch.decide) begin
      if (dut.u_enc.u_pitch.uv1) c_uv_energy++;
      else if (dut.u_enc.u_pitch.uv2 || dut.u_enc.u_pitch.uv3) c_uv_corr++;
    end
    if (dut.u_enc.u_pitch.done) begin
      if (dut.u_enc.u_pitch.voiced) c_voiced++; else c_unvoiced++;
    end
    if (dut.u_enc.u_ld.done && !dut.u_enc.u_ld.ok) c_ld_zero++;
    if (dut.u_dec.adv) begin
      c_sub[dut.u_dec.k]++;
      if (voiced_now) c_glottal++; else c_noise++;
      if (dut.u_dec.voiced_p && dut.u_dec.voiced_c && dut.u_dec.pit_p[0] != dut.u_dec.pit_c[0]) c_pitch_interp++;
    end
    if (dut.u_dec.onset) c_onset++;
    if (speech_valid) begin
      nsamp++; total++;
      if (frames_out >= 0 && frames_out < NHOP) energy[frames_out] += real'(speech_out) * real'(speech_out);
    end
    if (frame_start) begin
      if (frames_out >= 0) begin
        checks++;
        if (nsamp != 200) begin failures++; $display("output frame %0d: %0d samples", frames_out, nsamp); end
      end
      frames_out++; nsamp = 0;
      if (frames_out < NHOP) energy[frames_out] = 0;
    end
  end

  task automatic need(input string what, input int cnt);
    checks++;
    if (cnt == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, cnt);
  endtask

  initial begin
    wait (rst_n);
    repeat (NHOP * 200 * 8 + 2 * 200 * 8 + 2000) @(posedge clk);
    checks++;
    if (npk != NHOP) begin failures++; $display("packets %0d", npk); end
    checks++;
    if (total != 200 * npk) begin failures++; $display("output samples %0d for %0d packets", total, npk); end
    checks++;
    if (overruns != 0) begin failures++; $display("overruns %0d", overruns); end
    // the analysis of a frame must end before the next hop is complete
    checks++;
    $display("  analysis latency            %0d clocks (hop = %0d clocks)", lat_max, 200 * 8);
    if (lat_max == 0 || lat_max >= 200 * 8) begin failures++; $display("analysis latency %0d", lat_max); end
    for (int f = 1; f < 7; f++) begin
      checks++;
      if (energy[f] == 0) begin failures++; $display("frame %0d silent at the output", f); end
    end
    need("frame closed in half A", c_half_a);
    need("frame closed in half B", c_half_b);
    need("zero-filled first frame", c_first);
    need("voiced decision", c_voiced);
    need("unvoiced decision", c_unvoiced);
    need("unvoiced: low energy", c_uv_energy);
    need("unvoiced: correlation", c_uv_corr);
    need("zero-energy recursion", c_ld_zero);
    need("subframe 0", c_sub[0]);
    need("subframe 1", c_sub[1]);
    need("subframe 2", c_sub[2]);
    need("subframe 3", c_sub[3]);
    need("pitch interpolation", c_pitch_interp);
    need("glottal excitation", c_glottal);
    need("noise excitation", c_noise);
    need("voiced onset restart", c_onset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NHOP * 200 * 8 + 2 * 200 * 8 + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
