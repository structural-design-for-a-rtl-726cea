// gelp_synthesizer -- speech synthesis (decoder) of the GELP coder.
//
// Each 40-bit packet becomes 200 output samples (25 ms at 8 kHz). The
// packet is unpacked into voicing/pitch, gain index and spectrum code; the
// gain goes through the 32-word codebook, the spectrum through the LSF
// parameter decoder. Each frame is played in four 50-sample subframes and
// the pitch, the gain and the eight LSP cosines are interpolated between
// the previous and the current frame (7/8-1/8 ... 1/8-7/8). The excitation
// is the glottal pulse train (voiced) or LFSR noise (unvoiced), chosen by a
// multiplexer on the voicing decision, multiplied by the interpolated gain
// A_g and fed to the LSP synthesis filter, which gives S(n).
// Interface: pkt/pkt_valid load a packet into a one-deep holding register
// (pkt_ready is low while it is full). tick is the 8 kHz sample strobe:
// each tick while a frame is playing produces one sample, s_valid follows
// one clock later. A new frame starts right after the 200th sample if a
// packet is waiting; otherwise output stops until one arrives.
// The block structure (interpolators on pitch, gain and
// spectrum, MUX, multiplier, filter) follows the original coder design. Packet
// field order, vp = 0 meaning unvoiced, interpolating the pitch only
// between two voiced frames, restarting the pulse train at voiced onsets
// and the excitation scaling e = exc * A_g / 2^10 are this design's
// choices.
module gelp_synthesizer
  import gelp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  packet_t            pkt,
  input  logic               pkt_valid,
  output logic               pkt_ready,
  input  logic               tick,
  output logic signed [15:0] s_out,
  output logic               s_valid,
  output logic               frame_start,    // pulses when a frame is loaded
  output logic               voiced_now      // excitation source of this sample
);
  packet_t     hold;
  logic        have;
  logic        playing;
  logic [7:0]  n;                 // sample index in the frame
  logic [1:0]  k;                 // subframe

  // decoded parameters of the previous [0] and current [1] frame
  logic signed [15:0] clsp_p [LP_ORDER], clsp_c [LP_ORDER];
  logic signed [15:0] gain_p [1], gain_c [1], pit_p [1], pit_c [1];
  logic               voiced_p, voiced_c;

  // decoders for the waiting packet
  logic signed [15:0] dec_clsp [LP_ORDER];
  logic [11:0]        dec_gain;
  lsp_decoder   u_lspdec (.code(hold.lsp), .clsp(dec_clsp));
  gain_codebook u_gaincb (.idx(hold.gain), .gain(dec_gain));

  // interpolators
  logic signed [15:0] clsp_i [LP_ORDER], gain_i [1], pit_i [1];
  interpolator #(.N(LP_ORDER), .W(16)) u_int_lsp  (.k, .prev(clsp_p), .cur(clsp_c), .theta(clsp_i));
  interpolator #(.N(1), .W(16))        u_int_gain (.k, .prev(gain_p), .cur(gain_c), .theta(gain_i));
  interpolator #(.N(1), .W(16))        u_int_pit  (.k, .prev(pit_p),  .cur(pit_c),  .theta(pit_i));

  logic [7:0] period;
  assign period = (voiced_p && voiced_c) ? 8'(pit_i[0]) : 8'(pit_c[0]);

  // excitation sources
  logic adv, onset, load;
  logic [7:0] g_period;
  logic signed [15:0] v_glot;
  logic signed [7:0]  v_noise;
  assign adv = tick && playing;
  // a voiced frame after an unvoiced one starts with a fresh pulse
  assign onset    = load && (hold.vp != 0) && !voiced_c;
  assign g_period = onset ? 8'(hold.vp) + 8'd20 : period;
  glottal_pulse u_glot (.clk, .rst_n, .adv(adv && voiced_c), .restart(onset),
                        .period(g_period), .v(v_glot), .period_start());
  noise_gen     u_noise (.clk, .rst_n, .adv(adv && !voiced_c), .noise(v_noise));

  logic signed [15:0] exc;
  logic signed [31:0] eg;
  assign exc = voiced_c ? v_glot : 16'(v_noise);           // MUX
  assign eg  = (32'(exc) * 32'(gain_i[0])) >>> 10;         // x A_g
  assign voiced_now = voiced_c;

  lsp_synth_filter #(.ORDER(LP_ORDER)) u_filt (.clk, .rst_n, .en(adv), .c(clsp_i),
                                               .e(24'(eg)), .s(s_out), .valid(s_valid));

  assign pkt_ready = !have;
  assign k = (n < 8'(SUBFR_LEN)) ? 2'd0 : (n < 8'(2*SUBFR_LEN)) ? 2'd1 :
             (n < 8'(3*SUBFR_LEN)) ? 2'd2 : 2'd3;

  assign load = have && (!playing || (adv && n == 8'(HOP_LEN - 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold <= '0; have <= 1'b0; playing <= 1'b0; n <= '0;
      frame_start <= 1'b0;
      voiced_p <= 1'b0; voiced_c <= 1'b0;
      gain_p[0] <= '0; gain_c[0] <= '0; pit_p[0] <= '0; pit_c[0] <= '0;
      for (int i = 0; i < LP_ORDER; i++) begin
        clsp_p[i] <= lsp_level(i, (1 << lsp_nbits(i)) / 2);
        clsp_c[i] <= lsp_level(i, (1 << lsp_nbits(i)) / 2);
      end
    end else begin
      frame_start <= 1'b0;
      if (adv) n <= n + 1'b1;
      if (adv && n == 8'(HOP_LEN - 1) && !have) playing <= 1'b0;
      if (load) begin
        have        <= 1'b0;
        playing     <= 1'b1;
        n           <= '0;
        frame_start <= 1'b1;
        clsp_p <= clsp_c; gain_p <= gain_c; pit_p <= pit_c; voiced_p <= voiced_c;
        clsp_c <= dec_clsp;
        gain_c[0] <= 16'(dec_gain);
        pit_c[0]  <= (hold.vp == 0) ? pit_c[0] : 16'(hold.vp) + 16'd20;
        voiced_c  <= (hold.vp != 0);
      end else if (pkt_valid && !have) begin
        hold <= pkt; have <= 1'b1;
      end
    end
  end
endmodule
