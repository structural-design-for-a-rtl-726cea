// Testbench for gelp_synthesizer. Five packets (voiced 50, voiced 60,
// unvoiced, voiced 40, voiced 40 with the lowest gain) are offered through
// the valid/ready handshake while an 8 kHz tick runs every 4 clocks.
// Checks: exactly 200 samples per packet and none after the last; the
// excitation source follows each packet's voicing for the whole frame; the
// interpolated gain in each 50-sample subframe equals
// ((7-2k) g_prev + (2k+1) g_cur)/8 of the codebook values (1 % + 2 LSB,
// codebook taken as 0.5*2^(i/4)); voiced pulse spacing lies between the
// previous and the current pitch; a frame of lowest gain is quieter than
// one of high gain.
module tb_gelp_synthesizer;
  import gelp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  packet_t pkt;
  logic pkt_valid = 0, pkt_ready, tick = 0, s_valid, frame_start, voiced_now;
  logic signed [15:0] s_out;
  gelp_synthesizer dut (.*);

  localparam int NP = 5;
  int vp_tab [NP]  = '{30, 40, 0, 20, 20};
  int gi_tab [NP]  = '{24, 26, 18, 22, 0};
  packet_t pk [NP];

  // tick generator
  always begin
    repeat (3) @(posedge clk);
    tick <= 1; @(posedge clk); tick <= 0;
  end

  // packet source
  initial begin
    for (int i = 0; i < NP; i++) begin
      pk[i].vp = 7'(vp_tab[i]); pk[i].gain = 5'(gi_tab[i]); pk[i].lsp = 28'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NP; i++) begin
      @(negedge clk); pkt = pk[i]; pkt_valid = 1;
      do @(posedge clk); while (!pkt_ready);
      @(negedge clk); pkt_valid = 0;
    end
  end

  // monitor
  int frame = -1, nsamp = 0, total = 0, last_ps = -1, sidx = 0;
  real energy [NP];
  always @(posedge clk) if (rst_n) begin
    // s_valid and frame_start both come one clock after the tick/load
    if (s_valid) begin
      nsamp++; total++;
      if (frame < NP) energy[frame] += real'(s_out) * real'(s_out);
    end
    if (frame_start) begin
      if (frame >= 0) begin
        checks++;
        if (nsamp != 200) begin failures++; $display("frame %0d had %0d samples", frame, nsamp); end
      end
      frame++; nsamp = 0; sidx = 0; last_ps = -1;
      if (frame < NP) energy[frame] = 0;
    end
    if (tick && dut.playing) begin
      // checks on the sample being produced
      real gp, gc, ge;
      int k;
      k = sidx / 50;
      gp = (frame == 0) ? 0.0 : 8.0 * (2.0 ** (real'(gi_tab[frame-1]) / 4.0));
      gc = 8.0 * (2.0 ** (real'(gi_tab[frame]) / 4.0));
      ge = (real'(7 - 2 * k) * gp + real'(2 * k + 1) * gc) / 8.0;
      checks++;
      if (real'(dut.gain_i[0]) > ge * 1.01 + 2 || real'(dut.gain_i[0]) < ge * 0.99 - 2) begin
        failures++; $display("frame %0d k %0d gain %0d exp %f", frame, k, dut.gain_i[0], ge);
      end
      checks++;
      if (voiced_now != (vp_tab[frame] != 0)) begin failures++; $display("frame %0d wrong source", frame); end
      if (voiced_now && dut.u_glot.period_start) begin
        if (last_ps >= 0) begin
          int lo, hi, per;
          per = sidx - last_ps;
          lo = vp_tab[frame] + 20; hi = lo;
          if (frame > 0 && vp_tab[frame-1] != 0) begin
            if (vp_tab[frame-1] + 20 < lo) lo = vp_tab[frame-1] + 20;
            if (vp_tab[frame-1] + 20 > hi) hi = vp_tab[frame-1] + 20;
          end
          checks++;
          if (per < lo || per > hi) begin failures++; $display("frame %0d pulse spacing %0d", frame, per); end
        end
        last_ps = sidx;
      end
      sidx++;
    end
  end

  initial begin
    wait (rst_n);
    repeat (4 * 200 * (NP + 2)) @(posedge clk);
    checks++;
    if (nsamp != 200) begin failures++; $display("last frame had %0d samples", nsamp); end
    checks++;
    if (total != 200 * NP) begin failures++; $display("total samples %0d", total); end
    checks++;
    if (!(energy[4] < energy[3])) begin failures++; $display("low gain frame not quieter %f %f", energy[4], energy[3]); end
    checks++;
    if (energy[1] == 0 || energy[2] == 0) begin failures++; $display("silent output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (4 * 200 * (NP + 4)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
