// db_convert: nearest whole decibel level of a power value, 10*log10(P).
//
// There is no cheap logarithm in hardware, so the level comes from a chain of
// comparators. The power is compared with the thresholds 10^((d - 0.5)/10)
// for d = DB_MAX down to DB_MIN. The highest d whose threshold P exceeds is
// the result, which rounds the level to the nearest dB. A power at or below
// the DB_MIN threshold gives 0: the gain is 1 far above that level, so lower
// levels need no resolution. DB_MAX = 93 is the level of the largest 31-bit
// power, 2^31 - 1. The comparator-chain method, the rounding and the range
// follow the source design. The thresholds are computed in agc_pkg.
//
// Interface: purely combinational, power in, level out. The AGC channel
// registers the result in its P_dB state.
module db_convert
  import agc_pkg::*;
#(
  parameter int unsigned MIN_DB = DB_MIN
) (
  input  power_t i_power,
  output db_t    o_db
);

  localparam thresh_tab_t THRESH = make_thresholds();

  // Thresholds grow with d, so the last match going upwards is the highest.
  always_comb begin
    o_db = '0;
    for (int unsigned d = MIN_DB; d <= DB_MAX; d++) begin
      if (i_power > THRESH[d]) o_db = db_t'(d);
    end
  end

endmodule
