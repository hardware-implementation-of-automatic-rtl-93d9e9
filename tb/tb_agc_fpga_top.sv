// tb_agc_fpga_top: end-to-end test of the FPGA platform at its default
// parameters: codec link, codec register ring, bridge and the stereo AGC.
//
// A behavioural codec (ad1981b_model) runs the link. In every frame it
// sends the next stereo microphone sample. The test checks each frame the
// codec receives:
//   - the tag marks the frame and slots 1 to 4 valid;
//   - slots 1 and 2 carry the next write of the register ring, in the
//     order HP_VOL, MIC_VOL, OUT_VOL, REC_GAIN, DAC_RATE, ADC_RATE, MISC,
//     with the values the switch settings call for;
//   - slots 3 and 4 carry, in the top 16 bits, the AGC output for the
//     sample the codec sent in the previous frame, as computed by the
//     reference channels in agc_ref_pkg (both sides sharing the gain of
//     the louder one). The first frame after a reset carries zeros.
//   - SYNC is high for exactly 16 bit clocks in every frame.
// The switches change during the run. A switch change shows in the
// commands of the second frame after it, because the frame contents are
// latched at the end of the frame before. The run also includes a reset
// through the reset switch, after which the register ring restarts at
// HP_VOL and the AGC starts again from silence. Each mechanism is counted,
// and one that never happened counts as a failure: each of the seven
// register writes, bypass on and off, a volume change, unity gain,
// attenuation, the gain set by each side, and the reset.
`timescale 1ns/1ps
module tb_agc_fpga_top;
  import agc_ref_pkg::*;

  localparam int N_FRAMES   = 3000;   // per run, two runs
  localparam int RESET_AT   = 1500;

  logic       bit_clk, sdata_in, sync, sdata_out, codec_reset_n;
  logic       sw_reset = 1'b1, sw_bypass = 1'b0;
  logic [4:0] sw_volume = 5'd0;
  logic [15:0] adc_l, adc_r;
  int          frame_idx, rx_frame, sync_errors;
  logic        frame_done;
  logic [15:0] rx_tag;
  logic [19:0] rx_s1, rx_s2, rx_s3, rx_s4;

  int checks = 0, failures = 0;

  agc_fpga_top dut (
    .i_bit_clk(bit_clk), .i_sdata_in(sdata_in), .o_sync(sync),
    .o_sdata_out(sdata_out), .o_codec_reset_n(codec_reset_n),
    .i_sw_reset(sw_reset), .i_sw_bypass(sw_bypass), .i_sw_volume(sw_volume)
  );

  ad1981b_model codec (
    .o_bit_clk(bit_clk), .o_sdata_in(sdata_in), .i_sync(sync),
    .i_sdata_out(sdata_out), .i_reset_n(codec_reset_n), .i_ready(1'b1),
    .i_adc_l(adc_l), .i_adc_r(adc_r), .o_frame_idx(frame_idx),
    .o_frame_done(frame_done), .o_rx_frame(rx_frame), .o_rx_tag(rx_tag),
    .o_rx_slot1(rx_s1), .o_rx_slot2(rx_s2), .o_rx_slot3(rx_s3),
    .o_rx_slot4(rx_s4), .o_sync_errors(sync_errors)
  );

  // microphone signals, a function of the frame number only
  function automatic int tone(int n, real amp, real f);
    return int'(amp * $sin(2.0 * 3.14159265 * f * n / 48000.0));
  endfunction
  function automatic int stim_l(int n);
    if (n < 300)       return tone(n, 80.0, 440.0);
    else if (n < 900)  return tone(n, 15000.0, 1000.0);
    else               return tone(n, 3000.0, 1000.0);
  endfunction
  function automatic int stim_r(int n);
    if (n < 500)       return tone(n, 50.0, 300.0);
    else if (n < 700)  return tone(n, 6000.0, 2500.0);
    else if (n < 1100) return tone(n, 32000.0, 700.0);
    else               return tone(n, 400.0, 700.0);
  endfunction
  assign adc_l = 16'(stim_l(frame_idx));
  assign adc_r = 16'(stim_r(frame_idx));

  // expected register command for ring position k
  task automatic expected_cmd(int k, bit byp, logic [4:0] vol,
                              output logic [6:0] a, output logic [15:0] d);
    case (k % 7)
      0: begin a = 7'h04; d = {3'b0, vol, 3'b0, vol}; end
      1: begin a = 7'h0E; d = byp ? 16'h0000 : 16'h8000; end
      2: begin a = 7'h18; d = byp ? 16'h8808 : 16'h0808; end
      3: begin a = 7'h1C; d = byp ? 16'h8000 : 16'h0000; end
      4: begin a = 7'h2C; d = 16'hBB80; end
      5: begin a = 7'h32; d = 16'hBB80; end
      default: begin a = 7'h76; d = byp ? 16'h0240 : 16'h0A40; end
    endcase
  endtask

  agc_ref_channel ml, mr;
  int  y_l_prev, y_r_prev;
  int  n_reg[7];
  int  n_bypass_on = 0, n_bypass_off = 0, n_vol_change = 0;
  int  n_unity = 0, n_atten = 0, n_left = 0, n_right = 0, n_reset = 0;
  int  frames_seen = 0;
  // switch settings in force while each of the last two frames ended
  bit         byp_hist[2];
  logic [4:0] vol_hist[2];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("frame %0d: %s", rx_frame, what);
    end
  endtask

  // one received frame
  task automatic on_frame();
    logic [6:0]  ea;
    logic [15:0] ed;
    int          g;
    check(rx_tag == 16'hF800, $sformatf("tag %h", rx_tag));
    // register command: the settings that stood when the frame before
    // this one ended
    expected_cmd(rx_frame, byp_hist[1], vol_hist[1], ea, ed);
    check(rx_s1 == {1'b0, ea, 12'b0} && rx_s2 == {ed, 4'b0},
          $sformatf("command %h/%h expected %h/%h", rx_s1[18:12], rx_s2[19:4], ea, ed));
    n_reg[rx_frame % 7]++;
    if (rx_frame % 7 == 1) begin
      if (byp_hist[1]) n_bypass_on++; else n_bypass_off++;
    end
    // AGC output for the previous frame's sample
    check(rx_s3 == {16'(y_l_prev), 4'b0} && rx_s4 == {16'(y_r_prev), 4'b0},
          $sformatf("pcm %0d/%0d expected %0d/%0d", $signed(rx_s3[19:4]),
                    $signed(rx_s4[19:4]), y_l_prev, y_r_prev));
    // reference for this frame's sample
    ml.front_end(stim_l(rx_frame));
    mr.front_end(stim_r(rx_frame));
    g = ref_gain((ml.db > mr.db) ? ml.db : mr.db);
    y_l_prev = ml.back_end(g);
    y_r_prev = mr.back_end(g);
    if (g == 32768) n_unity++; else n_atten++;
    if (g < 32768 && ml.db > mr.db) n_left++;
    if (g < 32768 && mr.db > ml.db) n_right++;
    frames_seen++;
  endtask

  task automatic start_run();
    ml = new(683, 2);
    mr = new(683, 2);
    y_l_prev = 0;
    y_r_prev = 0;
    byp_hist[0] = sw_bypass; byp_hist[1] = sw_bypass;
    vol_hist[0] = sw_volume; vol_hist[1] = sw_volume;
  endtask

  task automatic run_frames(int n);
    for (int i = 0; i < n; i++) begin
      @(frame_done);
      on_frame();
      byp_hist[1] = byp_hist[0];
      vol_hist[1] = vol_hist[0];
      // switch changes, right after a frame ends
      if (rx_frame == 200) sw_bypass = 1'b1;
      if (rx_frame == 260) sw_bypass = 1'b0;
      if (rx_frame == 400) sw_volume = 5'd7;
      if (rx_frame == 600) begin sw_volume = 5'd21; n_vol_change++; end
      byp_hist[0] = sw_bypass;
      vol_hist[0] = sw_volume;
    end
  endtask

  initial begin
    foreach (n_reg[i]) n_reg[i] = 0;
    start_run();
    #1000 sw_reset = 1'b0;
    run_frames(RESET_AT);
    // reset through the switch, in the middle of a frame
    #3000 sw_reset = 1'b1;
    #2000 sw_reset = 1'b0;
    n_reset++;
    start_run();
    run_frames(N_FRAMES - RESET_AT);
    check(sync_errors == 0, $sformatf("%0d SYNC errors", sync_errors));
    foreach (n_reg[i]) check(n_reg[i] > 0, $sformatf("register write %0d never sent", i));
    check(n_bypass_on  > 0, "bypass never on");
    check(n_bypass_off > 0, "bypass never off");
    check(n_vol_change > 0, "volume never changed");
    check(n_unity > 0, "unity gain never applied");
    check(n_atten > 0, "attenuation never applied");
    check(n_left  > 0, "left side never set the gain");
    check(n_right > 0, "right side never set the gain");
    check(n_reset > 0, "reset never applied");
    $display("frames=%0d regs=%0d/%0d/%0d/%0d/%0d/%0d/%0d bypass_on=%0d bypass_off=%0d",
             frames_seen, n_reg[0], n_reg[1], n_reg[2], n_reg[3], n_reg[4], n_reg[5],
             n_reg[6], n_bypass_on, n_bypass_off);
    $display("unity=%0d atten=%0d left=%0d right=%0d resets=%0d",
             n_unity, n_atten, n_left, n_right, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((N_FRAMES + 20) * 256 * 82);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
