// ad1981b_model: behavioural model of the codec's side of an AC'97 link,
// used by the testbenches of the FPGA platform. It is not synthesizable and
// models none of the codec's analogue parts.
//
// The model makes the 12.288 MHz bit clock. Each time it sees SYNC rise
// (sampled on a falling edge of the bit clock), it starts a 256-bit frame
// on the next rising edge. In that frame it sends, on sdata_in: a tag with
// codec ready and slots 3 and 4 valid, and the words i_adc_l/i_adc_r as
// 16-bit samples at the top of slots 3 and 4. The ADC words are read when
// SYNC is seen, and o_frame_idx counts the frames started since reset. So
// frame f carries the ADC words that stood at the inputs while o_frame_idx
// was f. At the same time it collects the controller's 256 bits from
// sdata_out, sampled on falling edges. When a frame ends it presents the
// tag, slots 1 to 4 and the frame number on the o_rx_* outputs, and
// toggles o_frame_done. It also checks that SYNC stayed high for exactly
// 16 bit clocks; each frame where it did not counts in o_sync_errors.
// While i_reset_n is low the clock keeps running, but no frame starts and
// sdata_in stays low.
`timescale 1ns/1ps
module ad1981b_model (
  output logic        o_bit_clk,
  output logic        o_sdata_in,
  input  logic        i_sync,
  input  logic        i_sdata_out,
  input  logic        i_reset_n,
  input  logic        i_ready,
  input  logic [15:0] i_adc_l,
  input  logic [15:0] i_adc_r,
  output int          o_frame_idx,
  output logic        o_frame_done,
  output int          o_rx_frame,
  output logic [15:0] o_rx_tag,
  output logic [19:0] o_rx_slot1,
  output logic [19:0] o_rx_slot2,
  output logic [19:0] o_rx_slot3,
  output logic [19:0] o_rx_slot4,
  output int          o_sync_errors
);

  localparam realtime HALF_PERIOD = 40.690ns;   // 12.288 MHz

  logic [255:0] tx, rx;
  logic         sync_prev = 1'b0;
  logic         start_pending = 1'b0;
  logic         in_frame = 1'b0;
  int           pos = 0;
  int           sync_len = 0;

  initial begin
    o_bit_clk     = 1'b0;
    o_sdata_in    = 1'b0;
    o_frame_done  = 1'b0;
    o_rx_frame    = -1;
    o_sync_errors = 0;
    tx            = '0;
    rx            = '0;
    forever #(HALF_PERIOD) o_bit_clk = ~o_bit_clk;
  end

  // falling edge: sample SYNC and the controller's data
  always @(negedge o_bit_clk) begin
    if (!i_reset_n) begin
      sync_prev     <= 1'b0;
      start_pending <= 1'b0;
      sync_len      <= 0;
    end else begin
      sync_prev     <= i_sync;
      start_pending <= i_sync && !sync_prev;
      if (i_sync) sync_len <= sync_len + 1;
      if (i_sync && !sync_prev) begin
        if (in_frame && pos != 255) o_sync_errors <= o_sync_errors + 1;
        sync_len <= 1;
        tx <= {i_ready, 2'b00, 2'b11, 8'b0, 3'b000,  // ready, slots 3 and 4 valid
               20'b0, 20'b0,
               i_adc_l, 4'b0, i_adc_r, 4'b0,
               160'b0};
      end
      if (!i_sync && sync_prev && sync_len != 16) o_sync_errors <= o_sync_errors + 1;
      if (in_frame) begin
        rx[255 - pos] <= i_sdata_out;
        if (pos == 255) begin
          o_rx_frame   <= o_frame_idx - 1;
          o_rx_tag     <= rx[255:240];
          o_rx_slot1   <= rx[239:220];
          o_rx_slot2   <= rx[219:200];
          o_rx_slot3   <= rx[199:180];
          o_rx_slot4   <= rx[179:160];
          o_frame_done <= ~o_frame_done;
        end
      end
    end
  end

  // rising edge: start frames and drive sdata_in
  always @(posedge o_bit_clk) begin
    if (!i_reset_n) begin
      o_sdata_in  <= 1'b0;
      in_frame    <= 1'b0;
      pos         <= 0;
      o_frame_idx <= 0;
    end else if (start_pending) begin
      in_frame    <= 1'b1;
      pos         <= 0;
      o_frame_idx <= o_frame_idx + 1;
      o_sdata_in  <= tx[255];
    end else if (in_frame) begin
      if (pos == 255) begin
        in_frame   <= 1'b0;
        o_sdata_in <= 1'b0;
      end else begin
        pos        <= pos + 1;
        o_sdata_in <= tx[254 - pos];
      end
    end
  end

endmodule
