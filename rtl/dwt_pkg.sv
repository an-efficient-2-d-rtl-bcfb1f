// dwt_pkg: constants and helper functions shared by the 2-D DWT datapath.
//
// The filter pair is the (13,7) integer wavelet filter bank, built here from
// the lifting form   d[n] = x[2n+1] - (-x[2n-2] + 9x[2n] + 9x[2n+2] - x[2n+4])/16
//                    s[n] = x[2n]   + (-d[n-2] + 9d[n-1] + 9d[n] - d[n+1])/32
// and expanded into plain FIR taps in units of 1/512 (FRAC = 9 fraction bits).
// The exact tap values are this design's choice: only the filter name and its
// 13/7 tap lengths are given for the architecture.
//
// Every filter operation works on a 13-sample window w[0..12] that holds the
// samples at positions 2i-6 .. 2i+6 of a row (or column), boundaries folded by
// whole-sample symmetric extension. The low-pass output is centred on sample
// 2i, the high-pass output on sample 2i+1. Polyphase split of the window:
//   low-pass  even phase : w[0],w[2],...,w[12]   (7 taps)
//   low-pass  odd  phase : w[1],w[3],...,w[11]   (6 taps)
//   high-pass even phase : w[4],w[6],w[8],w[10]  (4 taps)
//   high-pass odd  phase : w[7]                  (1 tap)
//
// Word lengths grow by GROW = 2 bits per filtering operation: octave k
// (0-based) feeds the row filters IN_W + 4k bit samples and the column
// filters IN_W + 4k + 2 bit samples.
package dwt_pkg;

  localparam int unsigned WIN   = 13;  // samples in one filter window
  localparam int unsigned FRAC  = 9;   // fraction bits of the tap values
  localparam int unsigned GROW  = 2;   // word-length growth per filtering
  localparam int unsigned TAP_W = 12;  // signed width of one tap value

  localparam int unsigned LE_TAPS = 7;
  localparam int unsigned LO_TAPS = 6;
  localparam int unsigned HE_TAPS = 4;
  localparam int unsigned HO_TAPS = 1;

  typedef logic signed [TAP_W-1:0] tap_t;

  // Low-pass taps at window offsets -6..+6 (index 0..12), units of 1/512.
  localparam tap_t LPF_TAPS [WIN] = '{
    -12'sd1, 12'sd0, 12'sd18, -12'sd16, -12'sd63, 12'sd144, 12'sd348,
    12'sd144, -12'sd63, -12'sd16, 12'sd18, 12'sd0, -12'sd1};
  // High-pass taps at window offsets -6..+6, centred on offset +1.
  localparam tap_t HPF_TAPS [WIN] = '{
    12'sd0, 12'sd0, 12'sd0, 12'sd0, 12'sd32, 12'sd0, -12'sd288,
    12'sd512, -12'sd288, 12'sd0, 12'sd32, 12'sd0, 12'sd0};

  // Whole-sample symmetric extension of index i into 0..len-1.
  function automatic int mirror(int i, int len);
    int p, r;
    if (len <= 1) return 0;
    p = 2 * (len - 1);
    r = i % p;
    if (r < 0) r += p;
    if (r >= len) r = p - r;
    return r;
  endfunction

  // The same fold written for hardware: at most three reflections, enough for
  // any index within 6 of 0..len-1 when len >= 4.
  function automatic int fold_index(int i, int len);
    int r;
    r = i;
    for (int n = 0; n < 3; n++) begin
      if (r < 0) r = -r;
      if (r > len - 1) r = 2 * (len - 1) - r;
    end
    return r;
  endfunction

  // Active sample width of the row and column filters in octave k (0-based).
  function automatic int unsigned row_width(int unsigned in_w, int unsigned k);
    return in_w + 2 * GROW * k;
  endfunction
  function automatic int unsigned col_width(int unsigned in_w, int unsigned k);
    return in_w + 2 * GROW * k + GROW;
  endfunction

  // Look-up table addresses of one bit slice: bit t of each field is bit k of
  // the t-th sample of that polyphase branch (see the window layout above).
  typedef struct packed {
    logic [LE_TAPS-1:0] le;   // low-pass even phase:  w[0],w[2],...,w[12]
    logic [LO_TAPS-1:0] lo;   // low-pass odd phase:   w[1],w[3],...,w[11]
    logic [HE_TAPS-1:0] he;   // high-pass even phase: w[4],w[6],w[8],w[10]
    logic [HO_TAPS-1:0] ho;   // high-pass odd phase:  w[7]
  } pda_addr_t;

  // Sub-band tag of a column-filter output pair.
  typedef enum logic [0:0] {
    BAND_L = 1'b0,  // column taken from the row low-pass output:  LL / LH
    BAND_H = 1'b1   // column taken from the row high-pass output: HL / HH
  } col_band_e;

endpackage
