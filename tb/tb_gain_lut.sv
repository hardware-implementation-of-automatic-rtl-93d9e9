// tb_gain_lut: self-checking test of the shared stereo gain table.
//
// For random pairs of left/right levels and random enables, the test checks
//   * that both outputs carry the gain of the larger level when either
//     enable was raised two cycles earlier, and not before;
//   * that the gain holds while no enable is raised, even if the level
//     inputs change;
//   * every table entry against the gain formula in agc_ref_pkg, reached
//     once from each side.
`timescale 1ns/1ps
module tb_gain_lut;
  import agc_pkg::*;
  import agc_ref_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  l_en = 0, r_en = 0;
  db_t   l_db = '0, r_db = '0;
  gain_t l_gain, r_gain;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  gain_lut dut (
    .clk, .rst_n,
    .i_l_enable(l_en), .i_r_enable(r_en),
    .i_l_db(l_db), .i_r_db(r_db),
    .o_l_gain(l_gain), .o_r_gain(r_gain)
  );

  int exp_gain = 32768;
  int n_left_wins = 0, n_right_wins = 0, n_hold = 0;

  task automatic expect_gain(int g, string what);
    checks++;
    if (int'(l_gain) != g || int'(r_gain) != g) begin
      failures++;
      if (failures < 10) $display("%s: got L=%0d R=%0d expected %0d", what, l_gain, r_gain, g);
    end
  endtask

  // one fetch: enable(s) in cycle k, gain checked in cycles k+1 and k+2
  task automatic fetch(int ld, int rd, bit le, bit re);
    int mx;
    @(negedge clk);
    l_en = le; r_en = re; l_db = db_t'(ld); r_db = db_t'(rd);
    mx = (ld > rd) ? ld : rd;
    if (le || re) begin
      if (ld > rd) n_left_wins++; else if (rd > ld) n_right_wins++;
    end
    @(negedge clk);
    l_en = 0; r_en = 0;
    l_db = db_t'($urandom); r_db = db_t'($urandom);    // must not matter now
    expect_gain(exp_gain, "one cycle after the enable (old gain)");
    @(negedge clk);
    if (le || re) exp_gain = ref_gain(mx); else n_hold++;
    expect_gain(exp_gain, "two cycles after the enable");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_gain(32768, "after reset");
    for (int d = 0; d < 128; d++) fetch(d, 0, 1'b1, 1'b0);
    for (int d = 0; d < 128; d++) fetch(0, d, 1'b0, 1'b1);
    for (int i = 0; i < 3000; i++)
      fetch(int'($urandom_range(127)), int'($urandom_range(127)),
            1'($urandom_range(1)), 1'($urandom_range(1)));
    checks++; if (n_left_wins == 0 || n_right_wins == 0 || n_hold == 0) begin
      failures++; $display("a case was never exercised");
    end
    $display("left wins=%0d right wins=%0d holds=%0d", n_left_wins, n_right_wins, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
