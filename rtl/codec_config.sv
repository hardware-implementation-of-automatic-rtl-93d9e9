// codec_config: keeps the AD1981B AC'97 codec set up for the AGC.
//
// After reset the codec mutes everything, so seven of its control registers
// must be written. The codec link carries one register write per audio
// frame. This FSM steps through the seven registers in a fixed ring,
// HP_VOL -> MIC_VOL -> OUT_VOL -> REC_GAIN -> DAC_RATE -> ADC_RATE -> MISC
// -> HP_VOL, and moves on each time the link controller asks for the next
// command (i_next, once per frame, just before a frame starts). Because the
// ring never stops, the switch settings keep being re-written. The volume
// and the AGC bypass can therefore change at any time without a codec
// reset.
//
// Register values (address: AGC in the path / AGC bypassed):
//   0x04 headphone volume  {3'b0, vol, 3'b0, vol}, vol = 5-bit attenuation
//                          from the switches, same for both ears, unmuted
//   0x0E microphone volume 0x8000 (mic muted to the mixers) / 0x0000
//   0x18 PCM-out volume    0x0808 (DAC unmuted, 0 dB)       / 0x8808 (muted)
//   0x1C record gain       0x0000 (ADC input unmuted, 0 dB) / 0x8000 (muted)
//   0x2C DAC sample rate   SAMPLE_RATE
//   0x32 ADC sample rate   SAMPLE_RATE
//   0x76 misc. control     0x0A40 (DAC to the output, dual mic) / 0x0240
//                          (mixer to the output, dual mic)
// The state ring, the addresses and the values follow the source design.
// In bypass the microphone reaches the headphones through the codec's
// analogue mixer, and the ADC and DAC paths are muted.
//
// Interface: i_next is a one-cycle pulse in the clk domain. o_addr/o_data
// always show the current state's command; the controller latches them
// when the frame starts. The switch inputs are asynchronous and pass
// through a two-flop synchronizer.
module codec_config #(
  parameter logic [15:0] SAMPLE_RATE = 16'hBB80    // 48000 Hz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        i_next,
  input  logic        i_bypass,      // switch: 1 = AGC bypassed
  input  logic [4:0]  i_volume,      // switches: headphone attenuation
  output logic [6:0]  o_addr,
  output logic [15:0] o_data
);

  typedef enum logic [2:0] {
    HP_VOL, MIC_VOL, OUT_VOL, REC_GAIN, DAC_RATE, ADC_RATE, MISC
  } cfg_state_t;

  cfg_state_t state;
  logic [1:0] bypass_sync;
  logic [4:0] vol_meta, vol_sync;
  logic       bypass;

  always_ff @(posedge clk) begin
    bypass_sync <= {bypass_sync[0], i_bypass};
    vol_meta    <= i_volume;
    vol_sync    <= vol_meta;
  end
  assign bypass = bypass_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= HP_VOL;
    else if (i_next)
      state <= (state == MISC) ? HP_VOL : cfg_state_t'(state + 3'd1);
  end

  always_comb begin
    unique case (state)
      HP_VOL:   begin o_addr = 7'h04; o_data = {3'b000, vol_sync, 3'b000, vol_sync}; end
      MIC_VOL:  begin o_addr = 7'h0E; o_data = bypass ? 16'h0000 : 16'h8000; end
      OUT_VOL:  begin o_addr = 7'h18; o_data = bypass ? 16'h8808 : 16'h0808; end
      REC_GAIN: begin o_addr = 7'h1C; o_data = bypass ? 16'h8000 : 16'h0000; end
      DAC_RATE: begin o_addr = 7'h2C; o_data = SAMPLE_RATE; end
      ADC_RATE: begin o_addr = 7'h32; o_data = SAMPLE_RATE; end
      MISC:     begin o_addr = 7'h76; o_data = bypass ? 16'h0240 : 16'h0A40; end
      default:  begin o_addr = 7'h04; o_data = 16'h8000; end
    endcase
  end

endmodule
