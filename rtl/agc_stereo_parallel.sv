// agc_stereo_parallel: the stereo AGC built as a chain of separate blocks
// with parallel arithmetic, before any resource sharing. It computes the
// same algorithm as agc_stereo in far fewer cycles, at the cost of many
// more multipliers and adders.
//
// Per ear: hp_filter -> eq_filter -> agc_gain_stage. Each block waits in
// its HOLD state for a start pulse, and each block's o_done starts the
// next. The two gain stages share one gain_lut, which returns the gain of
// the louder ear to both, as in agc_stereo.
//
// Interface: per ear a start pulse with a 16-bit two's complement sample in
// the same cycle, and a done pulse with the processed 16-bit sample. Done
// is high 16 cycles after the start cycle (3 + 3 + 10). Give both ears
// their start pulses in the same cycle, at least 10 cycles apart.
//
// What follows the source design: the block chain, the start/done
// handshake, the shared table, and the equaliser coefficients scaled by
// 2^15 (the shared datapath in agc_stereo scales them by 2^8). So the two
// cores do not give bit-identical outputs. The word-parallel sample ports
// are this design's choice. The source counts 15 cycles per sample; this
// chain takes 16, because the table read stalls the gain stage for one
// cycle.
module agc_stereo_parallel
  import agc_pkg::*;
#(
  parameter int unsigned ALPHA  = ALPHA_DEFAULT,
  parameter int unsigned BETA   = BETA_DEFAULT,
  parameter int unsigned THRESH = THRESH_DB,
  parameter int unsigned KNEE   = KNEE_DB
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    i_l_start,
  input  sample_t i_l_sample,
  output logic    o_l_done,
  output sample_t o_l_sample,
  input  logic    i_r_start,
  input  sample_t i_r_sample,
  output logic    o_r_done,
  output sample_t o_r_sample
);

  localparam int unsigned HP_W = 20;

  logic                   l_hp_done, r_hp_done, l_eq_done, r_eq_done;
  logic signed [HP_W-1:0] l_hp, r_hp;
  sample_t                l_eq, r_eq;
  logic                   l_fetch, r_fetch;
  db_t                    l_db, r_db;
  gain_t                  l_gain, r_gain;

  hp_filter #(.OUT_W(HP_W)) u_l_hp (
    .clk, .rst_n, .i_start(i_l_start), .i_sample(i_l_sample),
    .o_done(l_hp_done), .o_sample(l_hp)
  );
  hp_filter #(.OUT_W(HP_W)) u_r_hp (
    .clk, .rst_n, .i_start(i_r_start), .i_sample(i_r_sample),
    .o_done(r_hp_done), .o_sample(r_hp)
  );

  eq_filter #(.IN_W(HP_W)) u_l_eq (
    .clk, .rst_n, .i_start(l_hp_done), .i_sample(l_hp),
    .o_done(l_eq_done), .o_sample(l_eq)
  );
  eq_filter #(.IN_W(HP_W)) u_r_eq (
    .clk, .rst_n, .i_start(r_hp_done), .i_sample(r_hp),
    .o_done(r_eq_done), .o_sample(r_eq)
  );

  agc_gain_stage #(.ALPHA(ALPHA), .BETA(BETA)) u_l_agc (
    .clk, .rst_n, .i_start(l_eq_done), .i_sample(l_eq),
    .o_done(o_l_done), .o_sample(o_l_sample),
    .o_gain_fetch(l_fetch), .o_db(l_db), .i_gain(l_gain)
  );
  agc_gain_stage #(.ALPHA(ALPHA), .BETA(BETA)) u_r_agc (
    .clk, .rst_n, .i_start(r_eq_done), .i_sample(r_eq),
    .o_done(o_r_done), .o_sample(o_r_sample),
    .o_gain_fetch(r_fetch), .o_db(r_db), .i_gain(r_gain)
  );

  gain_lut #(.THRESH(THRESH), .KNEE(KNEE)) u_lut (
    .clk, .rst_n,
    .i_l_enable(l_fetch), .i_r_enable(r_fetch),
    .i_l_db(l_db), .i_r_db(r_db),
    .o_l_gain(l_gain), .o_r_gain(r_gain)
  );

endmodule
