// gelp_analyzer -- speech analysis (encoder) of the GELP coder.
//
// Turns an 8 kHz stream of 8-bit samples into one 40-bit packet per 200
// samples (1.6 kbit/s). Data path per frame:
//   sample_buffer   400-byte double buffer, 256-sample frame every 200
//   autocorr        ten MACs, Rss(0..9); the same pass feeds
//   pitch_detector  sign-bit correlation, lags 21..147, voicing decision
//   acf_emphasis    Ryy(k) of the 0.925 pre-emphasised signal from Rss
//   levinson_durbin 8th-order LP coefficients and error energy E
//   sqrt_unit       gain G = sqrt(E)  ->  gain_quantizer (5 bits)
//   lpc_to_lsp      eight LSP cosines ->  lsp_quantizer (28 bits)
// A small sequencer starts each unit when its inputs are ready and emits
// the packet {vp, gain, lsp} (vp = pitch-20 if voiced, 0 if unvoiced) with
// a one-cycle packet_valid once the gain, spectrum and pitch are all coded.
// The whole analysis takes about 800 clock cycles, so any clock of a few
// MHz keeps up with 200 samples per 25 ms; a frame that arrives while the
// previous one is still being analysed is dropped and counted in overruns.
// The module set and their order follow the original coder design; the sequencer,
// the packet layout and the gain scaling (G in Q4 from E and the
// normalisation shift) are this design's choices.
module gelp_analyzer
  import gelp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic signed [7:0] in_sample,
  output packet_t           packet,
  output logic              packet_valid,
  output logic [15:0]       gain_q4,       // measured G, for observation
  output logic [7:0]        overruns
);
  // ---- buffer and autocorrelation --------------------------------------
  logic frame_ready;
  logic [7:0] rd_addr;
  logic signed [7:0] rd_data;
  sample_buffer #(.HOP(HOP_LEN), .FRAME(FRAME_LEN)) u_buf (
    .clk, .rst_n, .in_valid, .in_sample, .frame_ready, .rd_addr, .rd_data);

  logic busy, ac_start, ac_done, x_valid, x_last;
  logic signed [31:0] rss [N_LAGS];
  assign ac_start = frame_ready && !busy;
  autocorr #(.FRAME(FRAME_LEN), .NLAG(N_LAGS)) u_ac (
    .clk, .rst_n, .start(ac_start), .rd_addr, .rd_data, .x_valid, .x_last,
    .rss, .done(ac_done));

  // ---- pitch ------------------------------------------------------------
  logic [7:0]  pitch;
  logic        voiced, p_done;
  pitch_detector #(.FRAME(FRAME_LEN), .PITCH_MIN(PITCH_MIN), .PITCH_MAX(PITCH_MAX)) u_pitch (
    .clk, .rst_n, .x_valid, .x_last, .x(rd_data), .rss0(rss[0]), .rss1(rss[1]),
    .pitch, .voiced, .score(), .done(p_done));

  // ---- LP analysis ------------------------------------------------------
  logic signed [31:0] ryy [LP_ORDER+1];
  logic em_valid;
  acf_emphasis #(.ORDER(LP_ORDER)) u_emph (.clk, .rst_n, .start(ac_done), .rss,
                                           .ryy, .valid(em_valid));

  logic signed [15:0] a [LP_ORDER+1];
  logic [31:0] e_out;
  logic [4:0]  shift;
  logic        ld_done;
  levinson_durbin #(.ORDER(LP_ORDER)) u_ld (.clk, .rst_n, .start(em_valid), .ryy,
    .a, .e_out, .shift, .ok(), .done(ld_done));

  // ---- gain -------------------------------------------------------------
  // G^2 per sample = E * 2^(1-shift) / FRAME_LEN; in Q4, G_q4^2 = E * 2^(1-shift)
  logic [32:0] e_scaled;
  logic [31:0] sq_in;
  logic [15:0] g;
  logic        sq_done;
  assign e_scaled = ({e_out, 1'b0}) >> shift;
  assign sq_in    = (e_scaled[32]) ? 32'hFFFFFFFF : e_scaled[31:0];
  sqrt_unit #(.W(32)) u_sqrt (.clk, .rst_n, .start(ld_done), .d(sq_in), .q(g),
                              .busy(), .done(sq_done));

  logic [GAIN_BITS-1:0] gidx;
  logic gq_valid;
  gain_quantizer u_gq (.clk, .rst_n, .start(sq_done), .g, .idx(gidx), .valid(gq_valid));

  // ---- spectrum ---------------------------------------------------------
  logic signed [15:0] clsp [LP_ORDER];
  logic l2l_done, lq_valid;
  logic [LSP_BITS-1:0] lcode;
  lpc_to_lsp #(.ORDER(LP_ORDER)) u_l2l (.clk, .rst_n, .start(ld_done), .a, .clsp, .done(l2l_done));
  lsp_quantizer u_lq (.clk, .rst_n, .start(l2l_done), .clsp, .code(lcode), .valid(lq_valid));

  // ---- sequencer / packer ----------------------------------------------
  logic got_g, got_l, got_p;
  packet_t pk;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; got_g <= 1'b0; got_l <= 1'b0; got_p <= 1'b0;
      pk <= '0; packet <= '0; packet_valid <= 1'b0; overruns <= '0; gain_q4 <= '0;
    end else begin
      packet_valid <= 1'b0;
      if (ac_start) begin
        busy <= 1'b1; got_g <= 1'b0; got_l <= 1'b0; got_p <= 1'b0;
      end
      if (frame_ready && busy && overruns != 8'hFF) overruns <= overruns + 1'b1;
      if (gq_valid) begin pk.gain <= gidx; got_g <= 1'b1; gain_q4 <= g; end
      if (lq_valid) begin pk.lsp  <= lcode; got_l <= 1'b1; end
      if (p_done) begin
        pk.vp <= voiced ? VP_BITS'(pitch - 8'd20) : '0;
        got_p <= 1'b1;
      end
      if (busy && got_g && got_l && got_p) begin
        packet       <= pk;
        packet_valid <= 1'b1;
        busy         <= 1'b0;
        got_g <= 1'b0; got_l <= 1'b0; got_p <= 1'b0;
      end
    end
  end
endmodule
