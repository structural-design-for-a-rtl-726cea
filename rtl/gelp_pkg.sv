// gelp_pkg -- constants, types and codebook formulas shared by the GELP
// speech coder.
//
// Frame geometry (8 kHz, 8-bit samples, 200-sample / 25 ms hop, 256-sample
// analysis window with 56 samples of overlap), LP order 8, pitch lags 21..147
// and the 40-bit packet split (7 voicing/pitch, 5 gain, 28 spectrum, spectrum
// bits {4,3,4,3,4,3,4,3}) follow the original coder design. The codebook
// contents (gain and LSP levels) are trained tables that are not published;
// here they are generated by the closed-form formulas below, which are this
// design's own choice. Number formats used throughout:
//   LSP cosines x = 2cos(w) : signed 16-bit Q12 (1.0 = 4096)
//   LP coefficients a_k      : signed 16-bit Q12
//   reflection coefficients  : signed 16-bit Q14
//   gain                     : unsigned 12-bit Q4 (RMS in 8-bit sample units)
package gelp_pkg;

  localparam int unsigned FRAME_LEN  = 256;  // analysis window
  localparam int unsigned HOP_LEN    = 200;  // new samples per frame
  localparam int unsigned OVERLAP    = 56;   // samples kept from the previous hop
  localparam int unsigned LP_ORDER   = 8;
  localparam int unsigned N_LAGS     = 10;   // Rss(0..9): one extra lag for the emphasis
  localparam int unsigned PITCH_MIN  = 21;
  localparam int unsigned PITCH_MAX  = 147;
  localparam int unsigned N_SUBFR    = 4;
  localparam int unsigned SUBFR_LEN  = 50;
  localparam int unsigned GAIN_BITS  = 5;
  localparam int unsigned LSP_BITS   = 28;
  localparam int unsigned VP_BITS    = 7;

  // 40-bit packet, most significant field first.
  typedef struct packed {
    logic [VP_BITS-1:0]   vp;    // 0 = unvoiced, else pitch period - 20
    logic [GAIN_BITS-1:0] gain;  // gain codebook index
    logic [LSP_BITS-1:0]  lsp;   // eight LSP indices, parameter 0 in the top bits
  } packet_t;

  // Bits per LSP parameter: {4,3,4,3,4,3,4,3}.
  function automatic int unsigned lsp_nbits(input int unsigned i);
    return (i % 2 == 0) ? 4 : 3;
  endfunction

  // Bit offset of parameter i's index inside the 28-bit field (parameter 0
  // occupies bits 27:24).
  function automatic int unsigned lsp_lsb(input int unsigned i);
    int unsigned used = 0;
    for (int unsigned j = 0; j <= i; j++) used += lsp_nbits(j);
    return LSP_BITS - used;
  endfunction

  // LSP scalar quantizer levels. Parameter i has 2^bits levels spaced
  // evenly over a span around a centre value; x = 2cos(w) decreases with i.
  // Centres and spans are hand-chosen typical values (Q12), this design's
  // stand-in for the trained nonuniform levels.
  function automatic logic signed [15:0] lsp_level(input int unsigned i,
                                                   input int unsigned j);
    int centre [8] = '{7800, 6400, 4300, 1800, -800, -3300, -5500, -7300};
    int span   [8] = '{1500, 2400, 2600, 2600, 2600, 2500, 2200, 1500};
    int n, lvl;
    n   = 1 << lsp_nbits(i);
    lvl = centre[i] + ((2 * int'(j) - (n - 1)) * span[i]) / (2 * n);
    return 16'(lvl);
  endfunction

  // Gain codebook: 32 levels, 1.5 dB apart, g(i) = 0.5 * 2^(i/4), Q4.
  function automatic logic [11:0] gain_level(input int unsigned i);
    int unsigned frac [4] = '{256, 304, 362, 431};  // 2^(m/4) in Q8
    return 12'(((1 << (i / 4)) * frac[i % 4]) >> 5);
  endfunction

endpackage
