// ac97_controller: AC'97 link master for the FPGA test platform. It moves
// the stereo microphone samples from the codec to the AGC and the AGC's
// output back to the codec, and sends one control-register write per frame.
//
// The link runs on the codec's 12.288 MHz bit clock, in frames of 256 bits:
// a 16-bit tag slot (slot 0) and twelve 20-bit slots. This controller uses
// slot 1 (register address), slot 2 (register data), slot 3 (left PCM) and
// slot 4 (right PCM), and sends zeros in the other slots. Both directions
// carry a frame at the same time. One frame per 256 bit clocks gives the
// 48 kHz sample rate.
//
// How it works. A free-running 8-bit counter, clocked on the rising edge of
// the bit clock, numbers the bit positions of the frame. Output bits are
// driven on the rising edge. Input bits are sampled on the rising edge of
// the inverted bit clock (i_bit_clk_n), the falling edge of the bit clock.
// Every flop triggers on a rising edge, of one clock or the other.
//   - At bit 253 o_cmd_next asks for the next register command. At the end
//     of bit 254 the command (i_cmd_addr, i_cmd_data) and the PCM words
//     (i_pcm_l, i_pcm_r) are latched for the coming frame, in time for its
//     first bit to be driven from them. After reset the counter starts at
//     bit 254, so the first frame follows at once with the first command.
//   - SYNC is high for 16 bit clocks. It rises one bit clock before the
//     first tag bit, because the codec samples SYNC on the falling edge and
//     starts the frame on the next rising edge.
//   - Slot layout, MSB first: tag = {valid frame, slot 1..12 valid, 3'b0};
//     slot 1 = {read/write = 0 (write), address[6:0], 12'b0}; slot 2 =
//     {data, 4'b0}; slots 3/4 = {sample, 4'b0}, a 16-bit sample in the top
//     of the 20-bit slot.
//   - The incoming tag and the incoming slots 3 and 4 are captured as they
//     arrive. At bit 97, with both slots complete, they are handed to the
//     bit-clock domain and o_pcm_valid pulses for one cycle, provided the
//     codec has set its ready bit and marked slots 3 and 4 valid.
// The codec's reset wire is driven by the top level, not from here: a codec
// may stop the bit clock while it is held in reset.
//
// What follows the source design: the five-wire link, the 12.288 Mbit/s
// rate, the 256-bit frame of one 16-bit and twelve 20-bit slots, the slot
// use, one register write per frame requested just before the frame, send
// on the rising edge and read on the falling edge, and the inverted bit
// clock used in place of falling-edge flops. The source design took an
// existing controller as its starting point and does not describe its
// insides. So the bit order, tag bits, SYNC timing, slot 1/2 field layout
// and the bit positions of o_cmd_next and o_pcm_valid are taken from the
// AC'97 link protocol and chosen here.
module ac97_controller (
  input  logic        i_bit_clk,      // 12.288 MHz from the codec
  input  logic        i_bit_clk_n,    // the same clock, inverted
  input  logic        rst_n,
  // link to the codec
  output logic        o_sync,
  output logic        o_sdata_out,
  input  logic        i_sdata_in,
  // register command, one per frame
  output logic        o_cmd_next,
  input  logic [6:0]  i_cmd_addr,
  input  logic [15:0] i_cmd_data,
  // samples to the DAC (slots 3 and 4)
  input  logic [15:0] i_pcm_l,
  input  logic [15:0] i_pcm_r,
  // samples from the ADC (slots 3 and 4)
  output logic [15:0] o_pcm_l,
  output logic [15:0] o_pcm_r,
  output logic        o_pcm_valid
);

  localparam int FRAME_BITS = 256;
  localparam int SLOT0_BITS = 16;
  localparam int SLOT_BITS  = 20;
  // last bit position of slots 0, 3 and 4
  localparam logic [7:0] TAG_END   = 8'(SLOT0_BITS - 1);
  localparam logic [7:0] SLOT3_END = 8'(SLOT0_BITS + 3 * SLOT_BITS - 1);
  localparam logic [7:0] SLOT4_END = 8'(SLOT0_BITS + 4 * SLOT_BITS - 1);
  localparam logic [7:0] HANDOFF   = SLOT4_END + 8'd2;

  logic [7:0]  bit_cnt;      // position of the bit now on o_sdata_out
  logic [7:0]  next_cnt;
  logic [15:0] tag_out;
  logic [19:0] slot1_out, slot2_out, slot3_out, slot4_out;
  logic        next_bit;

  assign next_cnt = bit_cnt + 8'd1;   // wraps 255 -> 0

  // frame contents, latched at the end of bit 254 for the next frame
  always_ff @(posedge i_bit_clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_out   <= '0;
      slot1_out <= '0;
      slot2_out <= '0;
      slot3_out <= '0;
      slot4_out <= '0;
    end else if (bit_cnt == 8'(FRAME_BITS - 2)) begin
      tag_out   <= {1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 8'b0, 3'b000};
      slot1_out <= {1'b0, i_cmd_addr, 12'b0};
      slot2_out <= {i_cmd_data, 4'b0};
      slot3_out <= {i_pcm_l, 4'b0};
      slot4_out <= {i_pcm_r, 4'b0};
    end
  end

  // the bit the frame carries at position next_cnt
  always_comb begin
    next_bit = 1'b0;
    if (next_cnt < 8'(SLOT0_BITS))
      next_bit = tag_out[4'(SLOT0_BITS - 1 - int'(next_cnt))];
    else if (next_cnt < 8'(SLOT0_BITS + SLOT_BITS))
      next_bit = slot1_out[5'(SLOT0_BITS + SLOT_BITS - 1 - int'(next_cnt))];
    else if (next_cnt < 8'(SLOT0_BITS + 2 * SLOT_BITS))
      next_bit = slot2_out[5'(SLOT0_BITS + 2 * SLOT_BITS - 1 - int'(next_cnt))];
    else if (next_cnt < 8'(SLOT0_BITS + 3 * SLOT_BITS))
      next_bit = slot3_out[5'(SLOT0_BITS + 3 * SLOT_BITS - 1 - int'(next_cnt))];
    else if (next_cnt < 8'(SLOT0_BITS + 4 * SLOT_BITS))
      next_bit = slot4_out[5'(SLOT0_BITS + 4 * SLOT_BITS - 1 - int'(next_cnt))];
  end

  // transmit side, rising edge of the bit clock
  always_ff @(posedge i_bit_clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt     <= 8'(FRAME_BITS - 2);
      o_sdata_out <= 1'b0;
      o_sync      <= 1'b0;
      o_cmd_next  <= 1'b0;
    end else begin
      bit_cnt     <= next_cnt;
      o_sdata_out <= next_bit;
      // high from bit 255 to bit 14: 16 bit clocks, one ahead of the tag
      o_sync      <= (next_cnt == 8'(FRAME_BITS - 1)) || (next_cnt < TAG_END);
      o_cmd_next  <= (next_cnt == 8'(FRAME_BITS - 3));
    end
  end

  // receive side, rising edge of the inverted clock (falling bit-clock edge)
  logic [18:0] in_shift;     // the last 19 bits received
  logic        codec_ready, l_valid_in, r_valid_in;
  logic [15:0] slot3_in, slot4_in;
  always_ff @(posedge i_bit_clk_n or negedge rst_n) begin
    if (!rst_n) begin
      in_shift <= '0;
      codec_ready <= 1'b0;
      l_valid_in  <= 1'b0;
      r_valid_in  <= 1'b0;
      slot3_in <= '0;
      slot4_in <= '0;
    end else begin
      in_shift <= {in_shift[17:0], i_sdata_in};
      if (bit_cnt == TAG_END) begin   // tag bits 15, 12 and 11
        codec_ready <= in_shift[14];
        l_valid_in  <= in_shift[11];
        r_valid_in  <= in_shift[10];
      end
      if (bit_cnt == SLOT3_END) slot3_in <= in_shift[18:3];
      if (bit_cnt == SLOT4_END) slot4_in <= in_shift[18:3];
    end
  end

  // hand the received samples to the bit-clock domain
  always_ff @(posedge i_bit_clk or negedge rst_n) begin
    if (!rst_n) begin
      o_pcm_l     <= '0;
      o_pcm_r     <= '0;
      o_pcm_valid <= 1'b0;
    end else begin
      o_pcm_valid <= 1'b0;
      if (bit_cnt == HANDOFF) begin
        o_pcm_l     <= slot3_in;
        o_pcm_r     <= slot4_in;
        // codec ready, slot 3 valid, slot 4 valid
        o_pcm_valid <= codec_ready && l_valid_in && r_valid_in;
      end
    end
  end

endmodule
