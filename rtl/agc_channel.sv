// agc_channel: one audio channel of the hearing-protector AGC, built around
// a single shared multiplier and a single shared adder.
//
// Per sample, the channel
//   1. reads a 16-bit sample serially, MSB first (state L_IN);
//   2. runs a first-order high-pass IIR that removes wind rumble (HP*);
//   3. runs a second-order equaliser IIR that limits the band to about
//      4 kHz, then divides by 128 to undo most of its gain (EQ*, F_CALC);
//   4. estimates the power: |x|^2 is smoothed with the attack constant
//      alpha into P_w_fast. P_weighted follows P_w_fast at once when it is
//      larger. When P_w_fast did not grow, P_weighted is instead decayed by
//      (1 - beta), the slow release (P_CURR, P_W*, P_INCR/P_DCR*);
//   5. converts P_weighted to dB with a comparator chain (P_dB);
//   6. sends the level to the shared gain table and waits for the gain
//      (F_GAIN);
//   7. multiplies the sample by the gain (GAIN) and writes the result out
//      serially, MSB first, raising o_done with the LSB (L_OUT).
//
// Resource sharing. One 32x16 signed multiplier and one 48-bit adder do all
// the arithmetic, each step in its own FSM state. The multiplier has
// registered operands (mult_src1, mult_src2) and a registered product
// (mult_out), so a product is ready two states after its operands are
// loaded. The adder has multiplexed operands and a registered sum (add_out)
// and accumulates one product per state. The "_D" states are the one-cycle
// waits that this pipeline needs. P_ALIGN is a wait on the branch that
// skips the release decay (P_DCR2). With it, both branches take the same
// number of cycles, so two channels started together fetch their gain in
// the same cycle and the shared table compares the current levels of both.
//
// Interface and timing. i_start is a one-cycle pulse. The 16 sample bits
// follow on i_serial in the next 16 cycles, MSB first. o_serial carries
// the output bits MSB first in the 16 cycles of L_OUT, and o_done is high
// in the cycle of the LSB. From the first input bit to the last output bit
// a sample always takes 58 cycles; the source design's schedule took 70.
// o_gain_fetch is high for one cycle with the level on o_db, and the gain
// must be on i_gain two cycles later. A new i_start is allowed once o_done
// has been high; an assertion flags one that comes earlier. Lint reports
// rst_n as used both synchronously and asynchronously: the flops use it
// only as an asynchronous reset, and the assertion's disable condition is
// the synchronous use.
//
// Taken from the source: the algorithm, its coefficients and shifts, the
// state names and their order, the two-step branch between P_W4 and P_dB,
// the serial ports, the in/out counter (counting up on input, down on
// output) and the one-cycle waits for the table and the final product.
// This design's own choices: the exact pipeline and so the cycle count;
// the P_ALIGN wait that makes the cycle count fixed;
// the saturation of the equaliser output to +-32767 so that |x| fits the
// 16-bit operand; the values of alpha and beta; and an asynchronous
// active-low reset that clears all filter and power history.
module agc_channel
  import agc_pkg::*;
#(
  parameter int unsigned ALPHA = ALPHA_DEFAULT,   // attack constant, Q15
  parameter int unsigned BETA  = BETA_DEFAULT     // release constant, Q15
) (
  input  logic  clk,
  input  logic  rst_n,
  // serial sample interface (one pad each)
  input  logic  i_start,
  input  logic  i_serial,
  output logic  o_serial,
  output logic  o_done,
  // gain table interface
  output logic  o_gain_fetch,
  output db_t   o_db,
  input  gain_t i_gain
);

  typedef enum logic [4:0] {
    S_HOLD, S_L_IN,
    S_HP1, S_HP_D, S_HP2, S_HP3, S_HP4,
    S_EQ1, S_EQ_D, S_EQ2, S_EQ3, S_EQ4, S_EQ5, S_EQ6, S_F_CALC,
    S_P_CURR, S_P_D, S_P_W1, S_P_W2, S_P_W3, S_P_W4,
    S_P_INCR, S_P_DCR1, S_P_DCR2, S_P_ALIGN, S_P_DB,
    S_F_GAIN, S_F_GAIN_D, S_GAIN, S_GAIN_D, S_L_OUT
  } state_t;

  localparam logic signed [MSRC2_W-1:0] ALPHA_C    = MSRC2_W'(ALPHA);
  localparam logic signed [MSRC2_W-1:0] ONE_M_ALPHA = MSRC2_W'(GAIN_ONE - ALPHA);
  localparam logic signed [MSRC2_W-1:0] ONE_M_BETA  = MSRC2_W'(GAIN_ONE - BETA);

  state_t state, state_next;
  logic [3:0] inout_cnt;

  // shared arithmetic
  logic signed [MSRC1_W-1:0] mult_src1;
  logic signed [MSRC2_W-1:0] mult_src2;
  logic signed [PROD_W-1:0]  mult_out;
  logic signed [ACC_W-1:0]   add_out;
  logic signed [ACC_W-1:0]   add_src1, add_src2;

  // sample and filter history
  logic signed [SAMPLE_W-1:0] x_in;                    // input sample
  logic signed [MSRC1_W-1:0]  hp_xp, hp_yp;            // high-pass x(n-1), y(n-1)
  logic signed [MSRC1_W-1:0]  eq_x, eq_xp, eq_xpp;     // equaliser x(n), x(n-1), x(n-2)
  logic signed [MSRC1_W-1:0]  eq_yp, eq_ypp;           // equaliser y(n-1), y(n-2)
  sample_t                    x_eq;                    // filtered, damped sample

  // power estimation
  power_t p_w_fast, p_w_fast_prev;
  power_t p_weighted, p_weighted_prev;
  db_t    p_db;
  db_t    db_now;

  // values taken from the registered sum and product
  logic signed [MSRC1_W-1:0] hp_y;       // high-pass output
  logic signed [MSRC1_W-1:0] eq_y;       // equaliser output before damping
  logic signed [MSRC1_W-1:0] eq_damped;
  power_t                    p_w_fast_new;
  power_t                    p_decayed;
  sample_t                   y_out;
  logic signed [SAMPLE_W:0]  x_abs;
  logic                      fast_is_larger;

  assign hp_y         = MSRC1_W'(add_out >>> HP_SHIFT);
  assign eq_y         = MSRC1_W'(add_out >>> EQ_SHIFT);
  assign eq_damped    = eq_y >>> EQ_DAMP;
  assign p_w_fast_new = power_t'(add_out >>> W_SHIFT);
  assign p_decayed    = power_t'(mult_out >>> W_SHIFT);
  assign y_out        = sample_t'(mult_out >>> GAIN_SHIFT);
  assign x_abs        = x_eq[SAMPLE_W-1] ? -(SAMPLE_W+1)'(x_eq) : (SAMPLE_W+1)'(x_eq);
  assign fast_is_larger = p_w_fast_new > p_weighted_prev;

  db_convert u_db (
    .i_power (p_weighted),
    .o_db    (db_now)
  );

  // Equaliser output limited to the 16-bit range, symmetric so that
  // |x| never needs a 17th bit.
  function automatic sample_t saturate(logic signed [MSRC1_W-1:0] v);
    if (v > 32767)       return sample_t'(32767);
    else if (v < -32767) return sample_t'(-32767);
    else                 return sample_t'(v);
  endfunction

  // ---------------------------------------------------------------- FSM
  always_comb begin
    state_next = state;
    unique case (state)
      S_HOLD:     if (i_start) state_next = S_L_IN;
      S_L_IN:     if (inout_cnt == 4'd15) state_next = S_HP1;
      S_HP1:      state_next = S_HP_D;
      S_HP_D:     state_next = S_HP2;
      S_HP2:      state_next = S_HP3;
      S_HP3:      state_next = S_HP4;
      S_HP4:      state_next = S_EQ1;
      S_EQ1:      state_next = S_EQ_D;
      S_EQ_D:     state_next = S_EQ2;
      S_EQ2:      state_next = S_EQ3;
      S_EQ3:      state_next = S_EQ4;
      S_EQ4:      state_next = S_EQ5;
      S_EQ5:      state_next = S_EQ6;
      S_EQ6:      state_next = S_F_CALC;
      S_F_CALC:   state_next = S_P_CURR;
      S_P_CURR:   state_next = S_P_D;
      S_P_D:      state_next = S_P_W1;
      S_P_W1:     state_next = S_P_W2;
      S_P_W2:     state_next = S_P_W3;
      S_P_W3:     state_next = S_P_W4;
      S_P_W4:     state_next = fast_is_larger ? S_P_INCR : S_P_DCR1;
      S_P_INCR,
      S_P_DCR1:   state_next = (p_w_fast_prev >= p_w_fast) ? S_P_DCR2 : S_P_ALIGN;
      S_P_DCR2,
      S_P_ALIGN:  state_next = S_P_DB;
      S_P_DB:     state_next = S_F_GAIN;
      S_F_GAIN:   state_next = S_F_GAIN_D;
      S_F_GAIN_D: state_next = S_GAIN;
      S_GAIN:     state_next = S_GAIN_D;
      S_GAIN_D:   state_next = S_L_OUT;
      S_L_OUT:    if (inout_cnt == 4'd0) state_next = S_HOLD;
      default:    state_next = S_HOLD;
    endcase
  end

  // Adder operand routing: start a sum (mult_out + 0) or accumulate.
  always_comb begin
    add_src1 = add_out;
    add_src2 = '0;
    unique case (state)
      S_HP2, S_EQ2, S_P_W2: begin
        add_src1 = ACC_W'(mult_out);
        add_src2 = '0;
      end
      S_HP3, S_HP4, S_EQ3, S_EQ4, S_EQ5, S_EQ6, S_P_W3: begin
        add_src1 = add_out;
        add_src2 = ACC_W'(mult_out);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_HOLD;
      inout_cnt       <= '0;
      mult_src1       <= '0;
      mult_src2       <= '0;
      mult_out        <= '0;
      add_out         <= '0;
      x_in            <= '0;
      hp_xp           <= '0;
      hp_yp           <= '0;
      eq_x            <= '0;
      eq_xp           <= '0;
      eq_xpp          <= '0;
      eq_yp           <= '0;
      eq_ypp          <= '0;
      x_eq            <= '0;
      p_w_fast        <= '0;
      p_w_fast_prev   <= '0;
      p_weighted      <= '0;
      p_weighted_prev <= '0;
      p_db            <= '0;
    end else begin
      state    <= state_next;
      // the multiplier and the adder run every cycle
      mult_out <= mult_src1 * mult_src2;
      add_out  <= add_src1 + add_src2;

      unique case (state)
        S_HOLD: ;
        S_L_IN: begin
          x_in <= {x_in[SAMPLE_W-2:0], i_serial};
          if (inout_cnt != 4'd15) inout_cnt <= inout_cnt + 4'd1;
        end
        // ---------------- high-pass: b0*x + b1*x(n-1) + (-a1)*y(n-1)
        S_HP1: begin
          mult_src1 <= MSRC1_W'(x_in);
          mult_src2 <= HP_B0;
        end
        S_HP_D: begin
          mult_src1 <= hp_xp;
          mult_src2 <= HP_B1;
        end
        S_HP2: begin
          mult_src1 <= hp_yp;
          mult_src2 <= HP_NA1;
          hp_xp     <= MSRC1_W'(x_in);
        end
        S_HP3, S_HP4: ;
        // ---------------- equaliser: five products on the high-pass output
        S_EQ1: begin
          hp_yp     <= hp_y;
          eq_x      <= hp_y;
          mult_src1 <= hp_y;
          mult_src2 <= EQ_B0;
        end
        S_EQ_D: begin
          mult_src1 <= eq_xp;
          mult_src2 <= EQ_B1;
        end
        S_EQ2: begin
          mult_src1 <= eq_xpp;
          mult_src2 <= EQ_B2;
        end
        S_EQ3: begin
          mult_src1 <= eq_yp;
          mult_src2 <= EQ_NA1;
        end
        S_EQ4: begin
          mult_src1 <= eq_ypp;
          mult_src2 <= EQ_NA2;
        end
        S_EQ5, S_EQ6: ;
        S_F_CALC: begin
          eq_ypp <= eq_yp;
          eq_yp  <= eq_y;
          eq_xpp <= eq_xp;
          eq_xp  <= eq_x;
          x_eq   <= saturate(eq_damped);
        end
        // ---------------- power: alpha*|x|^2 + (1-alpha)*P_w_fast(n-1)
        S_P_CURR: begin
          mult_src1 <= MSRC1_W'(x_abs);
          mult_src2 <= MSRC2_W'(x_abs);
        end
        S_P_D: begin
          mult_src1 <= MSRC1_W'(p_w_fast_prev);
          mult_src2 <= ONE_M_ALPHA;
        end
        S_P_W1: begin
          mult_src1 <= MSRC1_W'(mult_out);   // |x|^2
          mult_src2 <= ALPHA_C;
        end
        S_P_W2, S_P_W3: ;
        S_P_W4: begin
          // The release product is started on the larger value now, while
          // the multiplier is free; it is used only if P_DCR2 follows.
          p_w_fast  <= p_w_fast_new;
          mult_src1 <= fast_is_larger ? MSRC1_W'(p_w_fast_new) : MSRC1_W'(p_weighted_prev);
          mult_src2 <= ONE_M_BETA;
        end
        S_P_INCR: p_weighted <= p_w_fast;
        S_P_DCR1: p_weighted <= p_weighted_prev;
        S_P_DCR2: p_weighted <= p_decayed;
        S_P_ALIGN: ;
        S_P_DB:   p_db       <= db_now;
        S_F_GAIN, S_F_GAIN_D: ;
        // ---------------- apply the gain
        S_GAIN: begin
          mult_src1 <= MSRC1_W'(i_gain);     // unsigned, zero-extended
          mult_src2 <= x_eq;
        end
        S_GAIN_D: ;
        S_L_OUT: begin
          if (inout_cnt == 4'd15) begin
            p_weighted_prev <= p_weighted;
            p_w_fast_prev   <= p_w_fast;
          end
          if (inout_cnt != 4'd0) inout_cnt <= inout_cnt - 4'd1;
        end
        default: ;
      endcase
    end
  end

  // Output bit taken straight from the held product. The counter only
  // counts down here, so the index never passes through a subtraction.
  assign o_serial     = (state == S_L_OUT) ? y_out[inout_cnt] : 1'b0;
  assign o_done       = (state == S_L_OUT) && (inout_cnt == 4'd0);
  assign o_gain_fetch = (state == S_F_GAIN);
  assign o_db         = p_db;

  // The sample must be fully shifted out before the next one starts.
  property p_no_start_while_busy;
    @(posedge clk) disable iff (!rst_n) (state != S_HOLD) |-> !i_start;
  endproperty
  a_no_start_while_busy: assert property (p_no_start_while_busy);

endmodule
