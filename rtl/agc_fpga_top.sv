// agc_fpga_top: the FPGA test platform of the hearing-protector AGC. A
// stereo microphone feeds an AC'97 codec. The codec's ADC samples pass
// through the stereo AGC, and the result goes back to the codec's DAC and
// on to the headphones.
//
// Blocks: ac97_controller (the codec link), codec_config (the register
// writes that set the codec up, one per frame), agc_serial_bridge (words
// to and from the core's serial pads) and agc_stereo (the AGC core: two
// filter and level chains sharing one gain table). Everything runs on the
// codec's 12.288 MHz bit clock. The controller also gets the inverted
// clock, made here, for its receive flops. The AGC needs 59 of the 256 bit
// clocks of a frame. A sample read from the codec in one frame goes back
// to it in the slots of the next frame.
//
// Switches: i_sw_reset resets the codec (directly) and the logic (through
// a two-flop synchronizer that asserts at once and releases on the bit
// clock). i_sw_bypass routes the microphone around the ADC, AGC and DAC
// inside the codec. i_sw_volume sets the headphone attenuation. Bypass and
// volume take effect at the next pass of the register ring, without a
// reset.
// Lint reports rst_sync as flopped both synchronously and asynchronously.
// That is what a reset synchronizer is: its last stage is the asynchronous
// reset of the rest of the logic.
// The block structure, the clock inversion and the switch functions follow
// the source design. The reset synchronizer and the bridge are this
// design's own.
module agc_fpga_top (
  input  logic       i_bit_clk,
  input  logic       i_sdata_in,
  output logic       o_sync,
  output logic       o_sdata_out,
  output logic       o_codec_reset_n,
  input  logic       i_sw_reset,
  input  logic       i_sw_bypass,
  input  logic [4:0] i_sw_volume
);

  logic        bit_clk_n;
  logic [1:0]  rst_sync;
  logic        rst_n;
  logic        cmd_next;
  logic [6:0]  cmd_addr;
  logic [15:0] cmd_data;
  logic [15:0] adc_l, adc_r, dac_l, dac_r;
  logic        adc_valid;
  logic        agc_start, l_in, r_in, l_out, r_out, l_done, r_done;

  assign bit_clk_n       = ~i_bit_clk;
  assign o_codec_reset_n = ~i_sw_reset;

  always_ff @(posedge i_bit_clk or posedge i_sw_reset) begin
    if (i_sw_reset) rst_sync <= 2'b00;
    else            rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_n = rst_sync[1];

  ac97_controller u_link (
    .i_bit_clk   (i_bit_clk),
    .i_bit_clk_n (bit_clk_n),
    .rst_n       (rst_n),
    .o_sync      (o_sync),
    .o_sdata_out (o_sdata_out),
    .i_sdata_in  (i_sdata_in),
    .o_cmd_next  (cmd_next),
    .i_cmd_addr  (cmd_addr),
    .i_cmd_data  (cmd_data),
    .i_pcm_l     (dac_l),
    .i_pcm_r     (dac_r),
    .o_pcm_l     (adc_l),
    .o_pcm_r     (adc_r),
    .o_pcm_valid (adc_valid)
  );

  codec_config u_cfg (
    .clk      (i_bit_clk),
    .rst_n    (rst_n),
    .i_next   (cmd_next),
    .i_bypass (i_sw_bypass),
    .i_volume (i_sw_volume),
    .o_addr   (cmd_addr),
    .o_data   (cmd_data)
  );

  agc_serial_bridge u_bridge (
    .clk        (i_bit_clk),
    .rst_n      (rst_n),
    .i_valid    (adc_valid),
    .i_pcm_l    (adc_l),
    .i_pcm_r    (adc_r),
    .o_pcm_l    (dac_l),
    .o_pcm_r    (dac_r),
    .o_start    (agc_start),
    .o_l_serial (l_in),
    .o_r_serial (r_in),
    .i_l_serial (l_out),
    .i_r_serial (r_out),
    .i_l_done   (l_done),
    .i_r_done   (r_done)
  );

  agc_stereo u_agc (
    .clk        (i_bit_clk),
    .rst_n      (rst_n),
    .i_l_start  (agc_start),
    .i_l_serial (l_in),
    .o_l_serial (l_out),
    .o_l_done   (l_done),
    .i_r_start  (agc_start),
    .i_r_serial (r_in),
    .o_r_serial (r_out),
    .o_r_done   (r_done)
  );

endmodule
