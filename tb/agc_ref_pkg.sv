// agc_ref_pkg: bit-exact reference model of the AGC algorithm for the
// testbenches. It is written as straight-line integer arithmetic, one call
// per sample, with no knowledge of the hardware schedule:
//   high-pass (Q15 coefficients, >>15), equaliser (Q8 coefficients, >>8,
//   or, for the parallel datapath, Q15 coefficients, >>15; then >>7 and
//   limit to +-32767), power |x|^2, attack smoothing with
//   alpha, max with the previous weighted power, release decay with beta
//   when the fast power did not grow, dB by threshold search, gain from
//   the table formula, output = x * gain >> 15.
// The dB thresholds and gains are computed here from their formulas with
// real arithmetic, separately from the design's package.
package agc_ref_pkg;

  localparam int    THRESH = 46;
  localparam int    KNEE   = 10;

  function automatic longint unsigned ref_threshold(int d);
    return longint'($pow(10.0, (real'(d) - 0.5) / 10.0));  // rounds to nearest
  endfunction

  // highest d in [3, 93] with p > threshold(d), else 0
  function automatic int ref_db(longint p);
    for (int d = 93; d >= 3; d--)
      if (p > longint'(ref_threshold(d))) return d;
    return 0;
  endfunction

  function automatic int ref_gain(int d);
    real knee_lo, knee_hi, gdb;
    knee_lo = real'(THRESH) - KNEE / 2.0;
    knee_hi = real'(THRESH) + KNEE / 2.0;
    if (d <= knee_lo)      gdb = 0.0;
    else if (d >= knee_hi) gdb = real'(THRESH - d);
    else                   gdb = -((d - knee_lo) ** 2) / (2.0 * KNEE);
    return int'(longint'(32768.0 * $pow(10.0, gdb / 20.0)));
  endfunction

  class agc_ref_channel;
    int     alpha, beta;
    longint hp_xp, hp_yp;
    longint eq_xp, eq_xpp, eq_yp, eq_ypp;
    longint pwf_prev, pw_prev;
    // results of the last front_end() call
    longint x_eq, pwf, pw;
    int     db;
    bit     rose;       // P_w_fast exceeded the previous weighted power
    bit     decayed;    // release decay applied
    bit     eq_q15;     // equaliser with the 2^15-scaled coefficients

    function new(int alpha_c = 683, int beta_c = 2, bit eq_q15_c = 0);
      alpha = alpha_c;
      beta  = beta_c;
      eq_q15 = eq_q15_c;
      hp_xp = 0; hp_yp = 0;
      eq_xp = 0; eq_xpp = 0; eq_yp = 0; eq_ypp = 0;
      pwf_prev = 0; pw_prev = 0;
    endfunction

    // filters and level estimate for one input sample
    function void front_end(int x);
      longint acc, y_hp, y_eq, d, m;
      acc  = 32250 * longint'(x) - 32250 * hp_xp + 31736 * hp_yp;
      y_hp = acc >>> 15;
      hp_xp = x;
      hp_yp = y_hp;

      if (eq_q15) begin
        acc  = 3551068 * y_hp - 20015 * eq_xp - 3527803 * eq_xpp + 20015 * eq_yp + 9657 * eq_ypp;
        y_eq = acc >>> 15;
      end else begin
        acc  = 27742 * y_hp - 156 * eq_xp - 27561 * eq_xpp + 156 * eq_yp + 75 * eq_ypp;
        y_eq = acc >>> 8;
      end
      eq_xpp = eq_xp;  eq_xp = y_hp;
      eq_ypp = eq_yp;  eq_yp = y_eq;
      d = y_eq >>> 7;
      if (d > 32767) d = 32767;
      if (d < -32767) d = -32767;
      x_eq = d;

      pwf  = ((32768 - alpha) * pwf_prev + alpha * (x_eq * x_eq)) >>> 15;
      rose = pwf > pw_prev;
      m    = rose ? pwf : pw_prev;
      decayed = pwf_prev >= pwf;
      pw   = decayed ? ((m * (32768 - beta)) >>> 15) : m;
      db   = ref_db(pw);
    endfunction

    // output with the gain the table returned; closes the sample
    function int back_end(int gain);
      longint y;
      y = (x_eq * gain) >>> 15;
      pwf_prev = pwf;
      pw_prev  = pw;
      return int'(y);
    endfunction
  endclass

endpackage
