// eq_filter: second-order equaliser IIR filter of the parallel (unshared)
// AGC datapath. It weights the band the AGC listens to, up to about 4 kHz.
//
//   y(n) = (b0 x(n) + b1 x(n-1) + b2 x(n-2) - a1 y(n-1) - a2 y(n-2)) >>> 15
//   out  = y(n) >>> 7, limited to +-32767
// with coefficients scaled by 2^15 (b0 = 3551068, b1 = -20015,
// b2 = -3527803, -a1 = 20015, -a2 = 9657), in Direct-Form I: five
// multipliers and four adders work in the same cycle. The filter gains up to
// about 100 in its pass band, so the result is divided by 2^7 before it is
// used as the AGC's sample.
//
// Timing: a three-state FSM (HOLD, CALC, SEND), as in hp_filter. o_done is
// high for one cycle with o_sample valid, three cycles after the i_start cycle.
//
// What follows the source design: Direct-Form I, the 2^15 coefficient
// scaling with its values, the division by 2^7 and the FSM. The limit to
// +-32767 is this design's choice. It keeps the sample within 16 bits for
// the AGC, as the shared datapath does.
module eq_filter
  import agc_pkg::*;
#(
  parameter int unsigned IN_W = 20,
  parameter int unsigned Y_W  = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   i_start,
  input  logic signed [IN_W-1:0] i_sample,
  output logic                   o_done,
  output sample_t                o_sample
);

  localparam int unsigned W = 64;     // products reach 23 + 32 bits
  localparam logic signed [23:0] B0  =  24'sd3551068;
  localparam logic signed [23:0] B1  = -24'sd20015;
  localparam logic signed [23:0] B2  = -24'sd3527803;
  localparam logic signed [23:0] NA1 =  24'sd20015;
  localparam logic signed [23:0] NA2 =  24'sd9657;
  localparam int unsigned SHIFT = 15;

  typedef enum logic [1:0] {HOLD, CALC, SEND} eq_state_t;
  eq_state_t state;

  logic signed [IN_W-1:0] x, x1, x2;
  logic signed [Y_W-1:0]  y1, y2, y;
  logic signed [W-1:0]    acc;
  logic signed [Y_W-1:0]  damped;

  assign y      = Y_W'(acc >>> SHIFT);
  assign damped = y >>> EQ_DAMP;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= HOLD;
      x        <= '0;
      x1       <= '0;
      x2       <= '0;
      y1       <= '0;
      y2       <= '0;
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
          acc <= W'(B0 * x) + W'(B1 * x1) + W'(B2 * x2) + W'(NA1 * y1) + W'(NA2 * y2);
          x2    <= x1;
          x1    <= x;
          state <= SEND;
        end
        SEND: begin
          y2 <= y1;
          y1 <= y;
          if (damped > Y_W'(32767))       o_sample <= 16'sd32767;
          else if (damped < -Y_W'(32767)) o_sample <= -16'sd32767;
          else                            o_sample <= SAMPLE_W'(damped);
          o_done <= 1'b1;
          state  <= HOLD;
        end
        default: state <= HOLD;
      endcase
    end
  end

endmodule
