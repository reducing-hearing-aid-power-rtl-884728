// ha_pkg -- shared constants, coefficient tables and design-time functions of the
// five-channel truncated-multiplier hearing-aid filter bank.
//
// The filter bank splits a 16-bit, 16 kHz audio stream into five octave-like bands
// (0-250, 250-500, 500-1000, 1000-2000 and 2000-4000 Hz) with 63-tap linear-phase FIR
// filters. Each coefficient is the Hamming-windowed band-pass (band 1: low-pass)
// prototype, normalised to unit gain at the band centre, multiplied by 2^16 and
// rounded to a 16-bit signed integer. All prototypes stay inside [-0.5, 0.5), so the
// scaling by 2^16 (not 2^15) never overflows and keeps the bands' relative gains.
// Band 3 (500-1000 Hz) is the published reference filter; the other four bands are
// designed the same way by this implementation (window method, same length and window).
//
// Coefficient shifting is done here, at elaboration time, not in hardware: each
// coefficient is moved left by S, the number of bits right of the sign bit that
// repeat the sign, so that the truncated multiplier loses as little as possible.
// A zero coefficient gets S = 15. The hardware undoes the shift with a right shift
// of the product by S.
package ha_pkg;

  localparam int N     = 16;  // sample and coefficient width
  localparam int TAPS  = 63;  // FIR length
  localparam int NCH   = 5;   // number of frequency channels
  localparam int SW    = 4;   // width of a shift amount (0..15)

  typedef logic signed [N-1:0] sample_t;
  typedef logic [SW-1:0]       shamt_t;

  // round(h * 2^16) of each channel's 63-tap filter, channel 1 first.
  localparam logic [0:NCH-1][0:TAPS-1][N-1:0] COEF = '{
    '{16'sd6, 16'sd13, 16'sd23, 16'sd35, 16'sd51, 16'sd74, 16'sd104, 16'sd141, 16'sd189, 16'sd246, 16'sd313, 16'sd392, 16'sd482, 16'sd582, 16'sd692, 16'sd812, 16'sd940,
      16'sd1074, 16'sd1213, 16'sd1355, 16'sd1497, 16'sd1638, 16'sd1774, 16'sd1905, 16'sd2026, 16'sd2136, 16'sd2234, 16'sd2316, 16'sd2382, 16'sd2430,
      16'sd2459, 16'sd2469, 16'sd2459, 16'sd2430, 16'sd2382, 16'sd2316, 16'sd2234, 16'sd2136, 16'sd2026, 16'sd1905, 16'sd1774, 16'sd1638, 16'sd1497,
      16'sd1355, 16'sd1213, 16'sd1074, 16'sd940, 16'sd812, 16'sd692, 16'sd582, 16'sd482, 16'sd392, 16'sd313, 16'sd246, 16'sd189, 16'sd141, 16'sd104, 16'sd74, 16'sd51,
      16'sd35, 16'sd23, 16'sd13, 16'sd6},
    '{-16'sd32, -16'sd67, -16'sd111, -16'sd167, -16'sd240, -16'sd333, -16'sd445, -16'sd576, -16'sd722, -16'sd875, -16'sd1027, -16'sd1168, -16'sd1285,
      -16'sd1365, -16'sd1397, -16'sd1370, -16'sd1275, -16'sd1105, -16'sd859, -16'sd536, -16'sd145, 16'sd307, 16'sd805, 16'sd1331, 16'sd1867, 16'sd2390,
      16'sd2879, 16'sd3314, 16'sd3673, 16'sd3943, 16'sd4110, 16'sd4166, 16'sd4110, 16'sd3943, 16'sd3673, 16'sd3314, 16'sd2879, 16'sd2390, 16'sd1867,
      16'sd1331, 16'sd805, 16'sd307, -16'sd145, -16'sd536, -16'sd859, -16'sd1105, -16'sd1275, -16'sd1370, -16'sd1397, -16'sd1365, -16'sd1285,
      -16'sd1168, -16'sd1027, -16'sd875, -16'sd722, -16'sd576, -16'sd445, -16'sd333, -16'sd240, -16'sd167, -16'sd111, -16'sd67, -16'sd32},
    '{-16'sd12, -16'sd22, -16'sd29, -16'sd27, -16'sd10, 16'sd29, 16'sd98, 16'sd200, 16'sd333, 16'sd482, 16'sd624, 16'sd724, 16'sd745, 16'sd647, 16'sd402, 16'sd0,
      -16'sd546, -16'sd1194, -16'sd1876, -16'sd2504, -16'sd2981, -16'sd3214, -16'sd3131, -16'sd2694, -16'sd1911, -16'sd834, 16'sd438, 16'sd1773,
      16'sd3023, 16'sd4042, 16'sd4708, 16'sd4939, 16'sd4708, 16'sd4042, 16'sd3023, 16'sd1773, 16'sd438, -16'sd834, -16'sd1911, -16'sd2694, -16'sd3131,
      -16'sd3214, -16'sd2981, -16'sd2504, -16'sd1876, -16'sd1194, -16'sd546, 16'sd0, 16'sd402, 16'sd647, 16'sd745, 16'sd724, 16'sd624, 16'sd482, 16'sd333,
      16'sd200, 16'sd98, 16'sd29, -16'sd10, -16'sd27, -16'sd29, -16'sd22, -16'sd12},
    '{-16'sd17, -16'sd17, 16'sd14, 16'sd75, 16'sd147, 16'sd188, 16'sd147, 16'sd0, -16'sd220, -16'sd417, -16'sd479, -16'sd351, -16'sd90, 16'sd144, 16'sd187, 16'sd0,
      -16'sd253, -16'sd265, 16'sd227, 16'sd1212, 16'sd2288, 16'sd2779, 16'sd2067, 16'sd0, -16'sd2876, -16'sd5425, -16'sd6387, -16'sd5002, -16'sd1470,
      16'sd3015, 16'sd6726, 16'sd8161, 16'sd6726, 16'sd3015, -16'sd1470, -16'sd5002, -16'sd6387, -16'sd5425, -16'sd2876, 16'sd0, 16'sd2067, 16'sd2779,
      16'sd2288, 16'sd1212, 16'sd227, -16'sd265, -16'sd253, 16'sd0, 16'sd187, 16'sd144, -16'sd90, -16'sd351, -16'sd479, -16'sd417, -16'sd220, 16'sd0, 16'sd147,
      16'sd188, 16'sd147, 16'sd75, 16'sd14, -16'sd17, -16'sd17},
    '{-16'sd16, 16'sd57, 16'sd110, 16'sd0, -16'sd155, -16'sd111, 16'sd40, 16'sd0, -16'sd59, 16'sd246, 16'sd504, 16'sd0, -16'sd714, -16'sd493, 16'sd169, 16'sd0, -16'sd230,
      16'sd911, 16'sd1799, 16'sd0, -16'sd2410, -16'sd1638, 16'sd559, 16'sd0, -16'sd778, 16'sd3198, 16'sd6727, 16'sd0, -16'sd11649, -16'sd10358, 16'sd6111,
      16'sd16424, 16'sd6111, -16'sd10358, -16'sd11649, 16'sd0, 16'sd6727, 16'sd3198, -16'sd778, 16'sd0, 16'sd559, -16'sd1638, -16'sd2410, 16'sd0, 16'sd1799,
      16'sd911, -16'sd230, 16'sd0, 16'sd169, -16'sd493, -16'sd714, 16'sd0, 16'sd504, 16'sd246, -16'sd59, 16'sd0, 16'sd40, -16'sd111, -16'sd155, 16'sd0, 16'sd110, 16'sd57,
      -16'sd16}
  };

  // Relative channel gains as right shifts after filtering: channel 5 (3 kHz, gain 64)
  // is the reference; channel 4 (gain 4) is divided by 16, channel 3 (gain 2) by 32,
  // channels 1 and 2 (gain 1) by 64.
  localparam int GAIN_SHR [NCH] = '{6, 6, 5, 4, 0};

  // Left-shift amount S of a 16-bit coefficient: the number of bits immediately right
  // of the sign bit that equal the sign bit (15 for zero and for -1).
  function automatic int coef_shift(input logic [N-1:0] b);
    int s;
    s = 0;
    for (int i = N - 2; i >= 0; i--) begin
      if (b[i] != b[N-1]) break;
      s++;
    end
    return s;
  endfunction

  // The coefficient as stored in hardware: h * 2^S, still a 16-bit signed number.
  function automatic logic [N-1:0] shifted_coef(input logic [N-1:0] h);
    return h << coef_shift(h);
  endfunction

  // Correction constant C of a truncated-matrix multiplier with r unformed columns and
  // k further truncated columns:
  //   C = round(2^-r * (2^(r+k-1) - 2^(r-1) + E)) * 2^r,
  // where E = sum over the unformed columns q of (q+1) * 2^q / 4 = ((r-1)*2^r + 1)/4 is
  // the expected value of the partial products that are not formed (each bit a_i*b_j
  // is 1 with probability 1/4), 2^(r+k-1) rounds the product to column r+k and
  // -2^(r-1) removes the mean of the truncated k columns. Worked in units of 1/4 so
  // that every term is an integer; the final rounding is half-up.
  function automatic longint corr_const(input int r, input int k);
    longint four_c;
    longint q;
    four_c = (longint'(1) << (r + k + 1)) - (longint'(1) << (r + 1))
           + (longint'(r) - 1) * (longint'(1) << r) + 1;
    q = (four_c + (longint'(1) << (r + 1))) >>> (r + 2);
    return q << r;
  endfunction

endpackage
