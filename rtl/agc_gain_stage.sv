// agc_gain_stage: level estimate and gain of the parallel (unshared) AGC
// datapath, one per ear. It takes the equalised sample and sends out the
// sample times the gain from the shared gain_lut.
//
// How it works. The states follow the order of the algorithm, one step
// each, with its own multiplier and adder wherever one is needed:
//   HOLD   wait for i_start, latch the sample
//   P_CURR power P_in = |x|^2
//   P_W1   attack: P_w_fast = ((2^15 - alpha) P_w_fast_prev + alpha P_in) >> 15
//   P_W2   P_weighted = max(P_w_fast, P_weighted_prev)
//   P_W3   release: if P_w_fast did not grow, P_weighted = P_weighted
//          (2^15 - beta) >> 15
//   P_DB   P_weighted to dB with the db_convert comparator chain
//   FETCH  the level is on o_db and o_gain_fetch is high
//   WAIT   one-cycle stall while the table reads
//   GAIN   multiply the sample by i_gain
//   SEND   shift right by 15, o_sample valid and o_done high for one cycle
// P_w_fast and P_weighted are kept for the next sample.
//
// Timing: o_done is high 10 cycles after the i_start cycle, with o_sample
// valid. i_gain must be valid two cycles after the cycle o_gain_fetch is
// high, which gain_lut provides. Leave at least 10 cycles between start
// pulses.
//
// What follows the source design: the state order and names, the Q15
// alpha/beta weighting, the max with the previous weighted power, the
// release only while the power is falling, the comparator-chain dB
// conversion, and the one-cycle stall for the table read. The values of
// alpha and beta are this design's choice (see agc_pkg), as is the rule
// that "falling" means P_w_fast no greater than its previous value.
module agc_gain_stage
  import agc_pkg::*;
#(
  parameter int unsigned ALPHA = ALPHA_DEFAULT,
  parameter int unsigned BETA  = BETA_DEFAULT
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    i_start,
  input  sample_t i_sample,
  output logic    o_done,
  output sample_t o_sample,
  // gain table
  output logic    o_gain_fetch,
  output db_t     o_db,
  input  gain_t   i_gain
);

  localparam int unsigned WW = 48;   // weighting products
  localparam logic [15:0] ONE_MINUS_ALPHA = 16'(GAIN_ONE - ALPHA);
  localparam logic [15:0] ONE_MINUS_BETA  = 16'(GAIN_ONE - BETA);

  typedef enum logic [3:0] {
    HOLD, P_CURR, P_W1, P_W2, P_W3, P_DB, FETCH, WAIT, GAIN, SEND
  } agc_state_t;
  agc_state_t state;

  sample_t      x;
  power_t       p_in, pwf, pwf_prev, pw, pw_prev;
  logic         falling;
  db_t          db_now;
  logic signed [SAMPLE_W+GAIN_W:0] prod;
  logic [15:0]  abs_x;

  assign abs_x = x[SAMPLE_W-1] ? 16'(-x) : 16'(x);

  db_convert u_db (.i_power(pw), .o_db(db_now));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= HOLD;
      x            <= '0;
      p_in         <= '0;
      pwf          <= '0;
      pwf_prev     <= '0;
      pw           <= '0;
      pw_prev      <= '0;
      falling      <= 1'b0;
      prod         <= '0;
      o_db         <= '0;
      o_gain_fetch <= 1'b0;
      o_sample     <= '0;
      o_done       <= 1'b0;
    end else begin
      o_done       <= 1'b0;
      o_gain_fetch <= 1'b0;
      unique case (state)
        HOLD: if (i_start) begin
          x     <= i_sample;
          state <= P_CURR;
        end
        P_CURR: begin
          p_in  <= POWER_W'(abs_x * abs_x);
          state <= P_W1;
        end
        P_W1: begin
          pwf   <= POWER_W'((WW'(ONE_MINUS_ALPHA) * WW'(pwf_prev) + WW'(ALPHA) * WW'(p_in)) >> W_SHIFT);
          state <= P_W2;
        end
        P_W2: begin
          pw      <= (pwf > pw_prev) ? pwf : pw_prev;
          falling <= (pwf_prev >= pwf);
          state   <= P_W3;
        end
        P_W3: begin
          if (falling) pw <= POWER_W'((WW'(ONE_MINUS_BETA) * WW'(pw)) >> W_SHIFT);
          state <= P_DB;
        end
        P_DB: begin
          o_db         <= db_now;
          o_gain_fetch <= 1'b1;     // high, with o_db, during FETCH
          state        <= FETCH;
        end
        FETCH: state <= WAIT;
        WAIT: state <= GAIN;
        GAIN: begin
          prod  <= x * $signed({1'b0, i_gain});
          state <= SEND;
        end
        SEND: begin
          o_sample <= SAMPLE_W'(prod >>> GAIN_SHIFT);
          o_done   <= 1'b1;
          pwf_prev <= pwf;
          pw_prev  <= pw;
          state    <= HOLD;
        end
        default: state <= HOLD;
      endcase
    end
  end

endmodule
