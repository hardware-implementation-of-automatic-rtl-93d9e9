// tb_db_convert: self-checking test of the decibel comparator chain.
//
// Every threshold is probed at, just above and just below its value, and
// 20000 random powers spread evenly over the dB scale are checked. The
// expected level comes from the threshold search in agc_ref_pkg. For powers
// from 1000 (30 dB) up to the 31-bit limit it is also checked against 10*log10(P)
// computed with real arithmetic: the result must lie within half a dB
// (plus 0.002 dB for the rounding of the thresholds to integers).
`timescale 1ns/1ps
module tb_db_convert;
  import agc_pkg::*;
  import agc_ref_pkg::*;

  power_t p;
  db_t    db;
  int     checks = 0, failures = 0;

  db_convert dut (.i_power(p), .o_db(db));

  task automatic check(longint unsigned pv);
    int exp_db;
    real l;
    p = power_t'(pv);
    #1;
    exp_db = ref_db(longint'(pv));
    checks++;
    if (int'(db) != exp_db) begin
      failures++;
      if (failures < 10) $display("P=%0d got %0d dB, expected %0d dB", pv, db, exp_db);
    end
    if (pv > 1000 && pv < 64'h8000_0000) begin
      l = 10.0 * $log10(real'(pv));
      checks++;
      if (l - real'(db) > 0.502 || real'(db) - l > 0.502) begin
        failures++;
        if (failures < 10) $display("P=%0d: %0d dB is not within 0.5 dB of %f", pv, db, l);
      end
    end
  endtask

  initial begin
    check(0);
    check(1);
    check(64'h7FFF_FFFF);
    check(64'hFFFF_FFFF);
    for (int d = 3; d <= 93; d++) begin
      check(ref_threshold(d));
      check(ref_threshold(d) + 1);
      if (ref_threshold(d) > 0) check(ref_threshold(d) - 1);
    end
    for (int i = 0; i < 20000; i++) begin
      real e;
      e = 93.3 * real'($urandom_range(1000000)) / 1000000.0;
      check(longint'($pow(10.0, e / 10.0)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
