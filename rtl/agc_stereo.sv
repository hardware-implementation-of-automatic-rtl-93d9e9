// agc_stereo: stereo automatic gain controller for active hearing protectors,
// as a chip core with serial audio pads.
//
// Each ear has its own agc_channel. The channel filters the microphone
// samples and estimates their level in dB. Both channels send that level to
// one shared gain_lut. The table picks the louder side and returns the same
// gain to both channels. Sounds below the threshold pass unchanged (gain 1).
// Louder sounds are cut so that the level at the ear stays harmless, and
// both ears are cut by the same amount, so the direction of a sound can
// still be heard.
//
// Pads (besides supply, ground, clock and active-low reset): per channel a
// start input, a serial data input, a serial data output and a done output,
// eight signal pads in all, as in the source design. Samples are 16-bit
// two's complement, sent MSB first, one bit per clock, starting the cycle
// after the start pulse. The processed sample leaves MSB first, with done
// high during its LSB, 58 cycles after the first input bit. At a
// 48 kHz sample rate the clock must therefore be at least 58 x 48 kHz,
// about 2.8 MHz.
// Give the two channels their start pulses in the same cycle. The table
// compares the levels at the moment either channel fetches its gain, so
// channels that are out of step compare against the other side's previous
// level.
module agc_stereo
  import agc_pkg::*;
#(
  parameter int unsigned ALPHA  = ALPHA_DEFAULT,
  parameter int unsigned BETA   = BETA_DEFAULT,
  parameter int unsigned THRESH = THRESH_DB,
  parameter int unsigned KNEE   = KNEE_DB
) (
  input  logic clk,
  input  logic rst_n,
  // left channel pads
  input  logic i_l_start,
  input  logic i_l_serial,
  output logic o_l_serial,
  output logic o_l_done,
  // right channel pads
  input  logic i_r_start,
  input  logic i_r_serial,
  output logic o_r_serial,
  output logic o_r_done
);

  logic  l_fetch, r_fetch;
  db_t   l_db, r_db;
  gain_t l_gain, r_gain;

  agc_channel #(.ALPHA(ALPHA), .BETA(BETA)) u_left (
    .clk          (clk),
    .rst_n        (rst_n),
    .i_start      (i_l_start),
    .i_serial     (i_l_serial),
    .o_serial     (o_l_serial),
    .o_done       (o_l_done),
    .o_gain_fetch (l_fetch),
    .o_db         (l_db),
    .i_gain       (l_gain)
  );

  agc_channel #(.ALPHA(ALPHA), .BETA(BETA)) u_right (
    .clk          (clk),
    .rst_n        (rst_n),
    .i_start      (i_r_start),
    .i_serial     (i_r_serial),
    .o_serial     (o_r_serial),
    .o_done       (o_r_done),
    .o_gain_fetch (r_fetch),
    .o_db         (r_db),
    .i_gain       (r_gain)
  );

  gain_lut #(.THRESH(THRESH), .KNEE(KNEE)) u_lut (
    .clk        (clk),
    .rst_n      (rst_n),
    .i_l_enable (l_fetch),
    .i_r_enable (r_fetch),
    .i_l_db     (l_db),
    .i_r_db     (r_db),
    .o_l_gain   (l_gain),
    .o_r_gain   (r_gain)
  );

endmodule
