// hp_filter: first-order high-pass IIR filter of the parallel (unshared)
// AGC datapath. It removes low-frequency noise such as wind.
//
//   y(n) = (b0 x(n) + b1 x(n-1) - a1 y(n-1)) >>> 15
// with the Q15 coefficients of agc_pkg (b0 = 32250, b1 = -32250,
// -a1 = 31736), in Direct-Form I: three multipliers and two adders work in
// the same cycle.
//
// Timing: a three-state FSM (HOLD, CALC, SEND). The cycle i_start is high,
// i_sample is latched. CALC forms the sum. SEND shifts it right by 15,
// puts it on o_sample and stores it as y(n-1). o_done is high for one
// cycle with o_sample valid, three cycles after the i_start cycle. Leave
// at least three cycles between start pulses.
//
// What follows the source design: Direct-Form I, the coefficients and
// shift, and the HOLD/CALC/SEND FSM. The output is wider than a sample,
// because a full-scale step nearly doubles at the output of this filter.
// That width is this design's choice; it keeps the filter free of clipping.
module hp_filter
  import agc_pkg::*;
#(
  parameter int unsigned OUT_W = 20
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    i_start,
  input  sample_t                 i_sample,
  output logic                    o_done,
  output logic signed [OUT_W-1:0] o_sample
);

  typedef enum logic [1:0] {HOLD, CALC, SEND} hp_state_t;
  hp_state_t state;

  sample_t                 x, x_prev;
  logic signed [OUT_W-1:0] y_prev;
  logic signed [ACC_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= HOLD;
      x        <= '0;
      x_prev   <= '0;
      y_prev   <= '0;
      acc      <= '0;
      o_sample <= '0;
      o_done   <= 1'b0;
    end else begin
      o_done <= 1'b0;
      unique case (state)
        HOLD: if (i_start) begin
          x     <= i_sample;
          state <= CALC;
        end
        CALC: begin
          acc <= ACC_W'(HP_B0 * x) + ACC_W'(HP_B1 * x_prev) + ACC_W'(HP_NA1 * y_prev);
          x_prev <= x;
          state  <= SEND;
        end
        SEND: begin
          o_sample <= OUT_W'(acc >>> HP_SHIFT);
          y_prev   <= OUT_W'(acc >>> HP_SHIFT);
          o_done   <= 1'b1;
          state    <= HOLD;
        end
        default: state <= HOLD;
      endcase
    end
  end

endmodule
