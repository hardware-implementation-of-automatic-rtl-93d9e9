// gain_lut: gain table shared by the left and right AGC channels.
//
// Both ears get the same gain, chosen by the louder side. This keeps the
// difference in level between the ears natural and avoids the swaying effect
// of two independent AGCs. The block has two parts that run in parallel:
//   * Level select. In any cycle where either channel raises its enable, the
//     two dB inputs are compared and the larger is stored in db_max. On a tie
//     the right input is taken, which gives the same value.
//   * Lookup. Every cycle, the ROM entry for db_max is registered and driven
//     to both gain outputs.
// Timing: an enable in cycle k updates db_max at the end of k. The matching
// gain is on o_l_gain/o_r_gain from cycle k+2 on, so a channel that raises
// its enable waits one cycle and reads the gain in the cycle after that.
// This is the one-cycle read delay the channels allow for. The gain holds
// until the next enable.
//
// Table contents (computed in agc_pkg): gain 1.0 (0x8000) up to the knee,
// and above it the amplitude gain 10^((T - d)/20) that brings a level of d dB
// down to T = THRESH dB. Between the two is an assumed quadratic soft knee,
// KNEE dB wide.
// The two-part structure and the compare-and-share rule follow the source.
// The register on the ROM output and the knee shape are this design's choices.
module gain_lut
  import agc_pkg::*;
#(
  parameter int unsigned THRESH = THRESH_DB,
  parameter int unsigned KNEE   = KNEE_DB
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  i_l_enable,
  input  logic  i_r_enable,
  input  db_t   i_l_db,
  input  db_t   i_r_db,
  output gain_t o_l_gain,
  output gain_t o_r_gain
);

  localparam gain_tab_t ROM = make_gains(THRESH, KNEE);

  db_t   db_max;
  gain_t gain;

  // Level select: keep the louder channel's level.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      db_max <= '0;
    else if (i_l_enable || i_r_enable)
      db_max <= (i_l_db > i_r_db) ? i_l_db : i_r_db;
  end

  // Lookup: synchronous ROM read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      gain <= gain_t'(GAIN_ONE);
    else
      gain <= ROM[db_max];
  end

  assign o_l_gain = gain;
  assign o_r_gain = gain;

endmodule
