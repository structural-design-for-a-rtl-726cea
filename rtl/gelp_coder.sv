// gelp_coder -- 1.6 kbit/s glottal-excited linear prediction speech coder.
//
// Top level: the analyzer (encoder) and the synthesizer (decoder) side by
// side. The encoder takes 8-bit samples at 8 kHz from the AD converter and
// produces one 40-bit packet per 25 ms frame; the decoder takes packets
// from the channel and produces 16-bit synthetic speech samples for the DA
// converter on each 8 kHz tick. The channel between them is outside this
// block: connect packet_out to packet_in for a loop-back codec. Both halves
// run from one clock; in_valid and dac_tick are sample-rate strobes.
module gelp_coder
  import gelp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // AD converter side
  input  logic               in_valid,
  input  logic signed [7:0]  in_sample,
  // encoder output
  output packet_t            packet_out,
  output logic               packet_out_valid,
  output logic [7:0]         overruns,
  // decoder input
  input  packet_t            packet_in,
  input  logic               packet_in_valid,
  output logic               packet_in_ready,
  // DA converter side
  input  logic               dac_tick,
  output logic signed [15:0] speech_out,
  output logic               speech_valid,
  output logic               frame_start,
  output logic               voiced_now
);

  gelp_analyzer u_enc (.clk, .rst_n, .in_valid, .in_sample,
                       .packet(packet_out), .packet_valid(packet_out_valid),
                       .gain_q4(), .overruns);

  gelp_synthesizer u_dec (.clk, .rst_n, .pkt(packet_in), .pkt_valid(packet_in_valid),
                          .pkt_ready(packet_in_ready), .tick(dac_tick),
                          .s_out(speech_out), .s_valid(speech_valid),
                          .frame_start, .voiced_now);
endmodule
