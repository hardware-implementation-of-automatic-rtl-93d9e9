// agc_pkg: widths, fixed-point constants and table formulas shared by the
// stereo automatic gain controller (AGC) for active hearing protectors.
//
// Number formats
//   * Audio samples are 16-bit two's complement integers.
//   * The high-pass filter coefficients are scaled by 2^15. The equaliser
//     coefficients are scaled by 2^8 so that every constant fits the 16-bit
//     operand of the shared 32x16 multiplier. Both scalings and all the
//     coefficient values are those of the source design.
//   * The attack and release constants alpha and beta are scaled by 2^15.
//     The source design gives only their targets (attack below 1 ms,
//     release around 300 ms), so the values below are this design's choice
//     for a 48 kHz sample rate: alpha = 2^15/48 (time constant 48 samples,
//     1 ms), beta = 2 (time constant 16384 samples, about 340 ms).
//   * Gains are unsigned 16-bit numbers where 2^15 (0x8000) means 1.0.
//
// The decibel thresholds and the gain table are computed here from their
// formulas at elaboration time (real arithmetic in constant functions), so
// no table file is needed:
//   threshold(d) = round(10^((d - 0.5)/10))          power above which the
//                                                    level is at least d dB
//   gain(d)      = 10^(g(d)/20), an amplitude gain, with the power gain
//   g(d) in dB   = 0                                  d <= T - W/2
//                = -(d - T + W/2)^2 / (2 W)           soft knee, |d - T| < W/2
//                = T - d                              d >= T + W/2
// with T = 46 dB (the uncalibrated level found to match 82 dB(A)) and a
// knee width W = 10 dB. Above the knee the output power is held at T: the
// power ratio 10^((T - d)/10) is applied to the sample as its square root,
// because the gain multiplies the sample amplitude. The knee shape is this
// design's choice; the source only says that a polynomial replaces the ideal
// curve near the threshold.
package agc_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned SAMPLE_W = 16;   // audio sample
  localparam int unsigned MSRC1_W  = 32;   // wide multiplier operand
  localparam int unsigned MSRC2_W  = 16;   // narrow multiplier operand
  localparam int unsigned PROD_W   = MSRC1_W + MSRC2_W;  // 48-bit product
  localparam int unsigned ACC_W    = 48;   // adder operands and sum
  localparam int unsigned POWER_W  = 32;   // power values (non-negative)
  localparam int unsigned DB_W     = 7;    // decibel level 0..127
  localparam int unsigned GAIN_W   = 16;   // unsigned gain, 0x8000 = 1.0

  localparam int unsigned DB_MAX   = 93;   // highest level a 31-bit power reaches
  localparam int unsigned DB_MIN   = 3;    // lowest level the comparator chain resolves

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic        [DB_W-1:0]     db_t;
  typedef logic        [GAIN_W-1:0]   gain_t;
  typedef logic        [POWER_W-1:0]  power_t;

  // ------------------------------------------- high-pass filter, Q15 (eq. 3.2)
  // y(n) = b0 x(n) + b1 x(n-1) - a1 y(n-1)
  localparam int HP_SHIFT = 15;
  localparam logic signed [MSRC2_W-1:0] HP_B0  =  16'sd32250;
  localparam logic signed [MSRC2_W-1:0] HP_B1  = -16'sd32250;
  localparam logic signed [MSRC2_W-1:0] HP_NA1 =  16'sd31736;  // -a1

  // ------------------------------------------- equaliser filter, Q8 (eq. 3.4)
  // y(n) = b0 x(n) + b1 x(n-1) + b2 x(n-2) - a1 y(n-1) - a2 y(n-2)
  localparam int EQ_SHIFT  = 8;
  localparam int EQ_DAMP   = 7;            // extra divide by 128 after the filter
  localparam logic signed [MSRC2_W-1:0] EQ_B0  =  16'sd27742;
  localparam logic signed [MSRC2_W-1:0] EQ_B1  = -16'sd156;
  localparam logic signed [MSRC2_W-1:0] EQ_B2  = -16'sd27561;
  localparam logic signed [MSRC2_W-1:0] EQ_NA1 =  16'sd156;    // -a1
  localparam logic signed [MSRC2_W-1:0] EQ_NA2 =  16'sd75;     // -a2

  // ------------------------------------------- power weighting, Q15
  localparam int W_SHIFT = 15;
  localparam int unsigned ALPHA_DEFAULT = 683;   // attack
  localparam int unsigned BETA_DEFAULT  = 2;     // release

  // ------------------------------------------- gain table
  localparam int unsigned GAIN_ONE       = 32768;
  localparam int unsigned GAIN_SHIFT     = 15;
  localparam int unsigned THRESH_DB      = 46;
  localparam int unsigned KNEE_DB        = 10;
  localparam int unsigned LUT_DEPTH      = 1 << DB_W;

  typedef power_t thresh_tab_t [DB_MAX+1];
  typedef gain_t  gain_tab_t   [LUT_DEPTH];

  // round(10^((d - 0.5)/10)); entries below DB_MIN are unused
  function automatic thresh_tab_t make_thresholds();
    thresh_tab_t t;
    for (int d = 0; d <= DB_MAX; d++) begin
      real v;
      v = $pow(10.0, (real'(d) - 0.5) / 10.0);
      t[d] = power_t'(longint'(v));   // real to integer rounds
    end
    return t;
  endfunction

  // gain in Q15 for each dB level, see the header
  function automatic gain_tab_t make_gains(int unsigned thresh_db, int unsigned knee_db);
    gain_tab_t g;
    real lo, hi, gdb, v;
    lo = real'(thresh_db) - real'(knee_db) / 2.0;
    hi = real'(thresh_db) + real'(knee_db) / 2.0;
    for (int d = 0; d < LUT_DEPTH; d++) begin
      if (real'(d) <= lo)
        gdb = 0.0;
      else if (real'(d) < hi)
        gdb = -((real'(d) - lo) * (real'(d) - lo)) / (2.0 * real'(knee_db));
      else
        gdb = real'(thresh_db) - real'(d);
      v = real'(GAIN_ONE) * $pow(10.0, gdb / 20.0);
      g[d] = gain_t'(longint'(v));
    end
    return g;
  endfunction

endpackage
