// fir_pkg: types, widths and coefficient tables shared by the FIR filters.
//
// Every data word in these filters is sign-magnitude: the MSB is the sign
// (1 = negative) and the remaining bits are the magnitude. A 4-bit input
// sample is a proper fraction with the binary point after the sign bit
// (value = +/- magnitude/8). Coefficients are the integers of the three
// windowed designs (low-pass, band-pass, high-pass); they are stored as the
// first half of each symmetric impulse response, h(0) .. h((N-1)/2), and
// mirrored by coef(): h(k) = h(N-1-k). The sign-magnitude format, the 4-bit
// sample, the 28-bit coefficient and the 32-bit result follow the source
// design; the storage of half-tables is this package's own choice.
package fir_pkg;

  // Default word widths.
  localparam int unsigned DEF_IN_W   = 4;   // filter_in(3:0)
  localparam int unsigned DEF_COEF_W = 28;  // coefficient word (4x28-bit multiplier)
  localparam int unsigned DEF_OUT_W  = 32;  // filter_out(31:0), product of 4 x 28 bits

  // Which of the three filters a generic FIR instance realises.
  typedef enum logic [1:0] {
    FILT_LPF = 2'd0,   // 53 taps, passband edge 1.5 kHz at fs = 8 kHz
    FILT_BPF = 2'd1,   // 73 taps, passband 150-250 Hz at fs = 1 kHz
    FILT_HPF = 2'd2    // 53 taps, passband edge 10 kHz at fs = 48 kHz
  } filter_kind_e;

  // Fully parallel (one multiplier per tap) or fully serial (one shared MAC).
  typedef enum logic {
    ARCH_PARALLEL = 1'b0,
    ARCH_SERIAL   = 1'b1
  } arch_e;

  localparam int LPF_TAPS = 53;
  localparam int BPF_TAPS = 73;
  localparam int HPF_TAPS = 53;

  // Scaling: the low-pass taps sum to 65542, i.e. the integers are the real
  // coefficients times 2^16. With the 3-bit input fraction the output word is
  // y(n) * 2^19.
  //
  // h(0) .. h(26) of the low-pass filter (Hamming window).
  localparam int LPF_HALF [27] = '{
      -45,   -64,     0,    92,    89,   -61,  -204,   -99,   229,   370,
        0,  -553,  -511,   332,  1037,   473, -1039, -1617,     0,  2330,
     2178, -1468, -4948, -2586,  7289, 19239, 24616 };

  // h(0) .. h(36) of the band-pass filter (Kaiser window).
  localparam int BPF_HALF [37] = '{
     -650, -2283,  -693,  1595,  1199,  -249,     0,   268, -1386, -1983,
      927,  3289,  1009, -2351, -1789,   377,     0,  -418,  2203,  3216,
    -1537, -5586, -1761,  4230,  3333,  -731,     0,   895, -5019, -7900,
     4141, 16917,  6217,-18468,-20131,  8086, 26604 };

  // h(0) .. h(26) of the high-pass filter. h(22) is +2139: with that sign the
  // response is about -62 dB at DC, as a high-pass with a 60 dB stopband needs.
  localparam int HPF_HALF [27] = '{
      -16,   -34,     0,    48,    31,   -57,   -88,    33,   161,    52,
     -213,  -211,   180,   418,     0,  -595,  -367,   618,   905,  -326,
    -1537,  -496,  2139,  2385, -2572,-10040, 19112 };

  function automatic int num_taps(filter_kind_e kind);
    case (kind)
      FILT_BPF: return BPF_TAPS;
      FILT_HPF: return HPF_TAPS;
      default:  return LPF_TAPS;
    endcase
  endfunction

  // Coefficient h(k) of filter `kind` as a signed integer (symmetric response).
  function automatic int coef(filter_kind_e kind, int k);
    int n, j;
    n = num_taps(kind);
    j = (k > (n - 1) / 2) ? (n - 1 - k) : k;
    case (kind)
      FILT_BPF: return BPF_HALF[j];
      FILT_HPF: return HPF_HALF[j];
      default:  return LPF_HALF[j];
    endcase
  endfunction

  // Signed integer -> 32-bit sign-magnitude word; callers keep the low bits
  // they need (magnitudes of the tables are below 2^15).
  function automatic logic [31:0] to_sm(int v);
    logic [30:0] mag;
    mag = (v < 0) ? 31'(-v) : 31'(v);
    return {logic'(v < 0), mag};
  endfunction

endpackage
