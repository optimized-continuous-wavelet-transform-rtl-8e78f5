// Shared sizes, the scale table and the Morlet generator of the CWT processor.
//
// The processor computes the continuous wavelet transform of an N-point real
// signal in the frequency domain, but only for the 25 scales 26..50 and only
// on the FFT bins where the Morlet band-pass of each scale is non-zero. This
// package holds those numbers: signal length N = 4096, 20-bit signal and FFT
// samples, 8-bit wavelet samples, 28-bit products, the first and last
// non-zero bin of every kept scale, and the packing of all kept wavelet
// samples into one 6144-word memory.
//
// Bin ranges and centre frequencies are those of the scale table of the
// design (scales 26..50). All kept samples sum to 6220 words; the memory has
// 6144, so the last 76 bins of scale 50 are dropped (bins 40..59 of that scale
// stay). That keeps the lowest used bin at 40 and the highest at 709, which
// gives the 670-word FFT capture memories.
//
// The wavelet values are computed here rather than read from a file: the
// frequency-domain Morlet psi(w) = 2 exp(-(s w - 6)^2 / 2), w > 0, of each
// scale, with s chosen so that the band-pass peaks in the middle of the
// scale's non-zero bin range. Values are unsigned 8-bit with 7 fraction bits
// (2.0 saturates to 255); with this choice the first and last bin of every
// range are exactly where the 8-bit value falls to 1. The 8-bit width is the
// document's; the fraction format and deriving s from the bin range (rather
// than from the listed centre frequencies) are this design's choices.
package cwt_pkg;

  localparam int N           = 4096;   // signal length (samples)
  localparam int LOG2N       = 12;
  localparam int DW          = 20;     // input and FFT sample width
  localparam int WW          = 8;      // wavelet sample width
  localparam int PW          = DW + WW; // product width (28)
  localparam int NSCALE      = 25;     // kept scales
  localparam int FIRST_SCALE = 26;     // number of the first kept scale
  localparam int BIN_LO      = 40;     // lowest bin any kept scale uses
  localparam int BIN_HI      = 709;    // highest bin any kept scale uses
  localparam int BIN_DEPTH   = BIN_HI - BIN_LO + 1;  // 670 words in RAM1/RAM2
  localparam int PROD_DEPTH  = 6144;   // words in RAM3/RAM4
  localparam int MULT_START_BIN = 204; // first bin of scale 26: products may start once it is captured

  localparam int BIN_AW  = $clog2(BIN_DEPTH);   // 10
  localparam int PROD_AW = $clog2(PROD_DEPTH);  // 13
  localparam int SCALE_W = $clog2(NSCALE);      // 5

  // Sampling frequency of the slow-time signal, Hz.
  localparam real FS_HZ = 325.5208;

  // First non-zero bin of scales 26..50.
  localparam int SCALE_START [NSCALE] = '{
    204, 191, 178, 166, 155, 145, 135, 126, 118, 110, 103, 96, 90,
    84, 78, 73, 68, 64, 60, 56, 52, 49, 46, 43, 40};

  // Number of kept bins of scales 26..50 (scale 50 cut from 96 to 20).
  localparam int SCALE_LEN [NSCALE] = '{
    506, 472, 440, 411, 384, 358, 334, 312, 291, 271, 253, 236, 220,
    205, 192, 179, 167, 156, 145, 135, 127, 118, 110, 102, 20};

  // Last non-zero bin of scales 26..50 in the scale table (before the cut
  // of scale 50); with SCALE_START it fixes where each band-pass peaks.
  localparam int SCALE_END [NSCALE] = '{
    709, 662, 617, 576, 538, 502, 468, 437, 408, 380, 355, 331, 309,
    288, 269, 251, 234, 219, 204, 190, 178, 166, 155, 144, 135};

  // Word offset of each scale in the packed wavelet/product memory.
  function automatic int scale_offset(int j);
    int o = 0;
    for (int i = 0; i < j; i++) o += SCALE_LEN[i];
    return o;
  endfunction

  typedef int scale_tab_t [NSCALE];

  function automatic scale_tab_t scale_offsets();
    scale_tab_t t;
    for (int j = 0; j < NSCALE; j++) t[j] = scale_offset(j);
    return t;
  endfunction

  localparam scale_tab_t SCALE_OFF = scale_offsets();

  // Control states of the processor.
  typedef enum logic [2:0] {
    ST_IDLE,   // waiting for start; RAM4 may be reloaded
    ST_LOAD,   // streaming the N input samples into the FFT
    ST_MULT,   // capturing FFT bins 40..709 and, from bin 204 on, multiplying
    ST_FEED,   // feeding the 25 zero-padded product spectra to the IFFT
    ST_OUT     // waiting for the last CWT coefficient
  } ctrl_state_t;

  // Unsigned Q1.7 Morlet sample of kept scale j (0..24) at FFT bin k. The
  // band-pass peaks (s w = 6) at bin c = (SCALE_START + SCALE_END) / 2, so
  // s w - 6 = 6 (k / c - 1); at the first and last kept bin the value has
  // fallen to one LSB.
  function automatic logic [WW-1:0] morlet_sample(int j, int k);
    real c, u, v;
    c = real'(SCALE_START[j] + SCALE_END[j]) / 2.0;
    u = 6.0 * (real'(k) / c - 1.0);
    v = 2.0 * $exp(-(u * u) / 2.0) * 128.0;
    if (v > 255.0) v = 255.0;
    return WW'($rtoi($floor(v + 0.5)));
  endfunction

  // Bit-reversal of the low nbits bits of x.
  function automatic int bitrev(int x, int nbits);
    int r = 0;
    for (int b = 0; b < nbits; b++) r |= ((x >> b) & 1) << (nbits - 1 - b);
    return r;
  endfunction

endpackage
