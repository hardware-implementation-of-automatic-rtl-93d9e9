// tb_ac97_controller: self-checking test of the AC'97 link controller
// against the behavioural codec model.
//
// The test acts as the register FSM and the audio source. Each time the
// controller raises o_cmd_next, the test puts a fresh random register
// command and random DAC words on the inputs and queues them. The codec
// model must then receive exactly those in the next frame: tag 0xF800,
// slot 1 = {write, address, 12'b0}, slot 2 = {data, 4'b0}, slots 3/4 =
// {word, 4'b0}. The codec model sends a known word per frame in slots 3/4,
// and the controller must deliver it on o_pcm_l/o_pcm_r with o_pcm_valid.
// Cycle counts, from the link description (256-bit frames, a 16-bit
// slot 0): SYNC rises every 256 bit clocks and stays high for 16 (the
// model counts errors). o_cmd_next comes once per frame, 2 bit clocks
// before SYNC rises. o_pcm_valid comes once per frame, 99 bit clocks after
// SYNC rises. For a stretch of frames the codec clears its ready bit, and
// no samples may then be delivered. Counted mechanisms: commands, received
// samples, frames without codec ready; one that never happened fails.
`timescale 1ns/1ps
module tb_ac97_controller;

  localparam int N_FRAMES = 400;

  logic        bit_clk, sdata_in, sync, sdata_out, ready;
  logic        rst_n = 1'b0;
  logic        cmd_next, pcm_valid;
  logic [6:0]  cmd_addr = '0;
  logic [15:0] cmd_data = '0, pcm_l_in = '0, pcm_r_in = '0, pcm_l, pcm_r;
  logic [15:0] adc_l, adc_r;
  int          frame_idx, rx_frame, sync_errors;
  logic        frame_done;
  logic [15:0] rx_tag;
  logic [19:0] rx_s1, rx_s2, rx_s3, rx_s4;
  int checks = 0, failures = 0;

  ac97_controller dut (
    .i_bit_clk(bit_clk), .i_bit_clk_n(~bit_clk), .rst_n,
    .o_sync(sync), .o_sdata_out(sdata_out), .i_sdata_in(sdata_in),
    .o_cmd_next(cmd_next), .i_cmd_addr(cmd_addr), .i_cmd_data(cmd_data),
    .i_pcm_l(pcm_l_in), .i_pcm_r(pcm_r_in),
    .o_pcm_l(pcm_l), .o_pcm_r(pcm_r), .o_pcm_valid(pcm_valid)
  );

  ad1981b_model codec (
    .o_bit_clk(bit_clk), .o_sdata_in(sdata_in), .i_sync(sync),
    .i_sdata_out(sdata_out), .i_reset_n(rst_n), .i_ready(ready),
    .i_adc_l(adc_l), .i_adc_r(adc_r), .o_frame_idx(frame_idx),
    .o_frame_done(frame_done), .o_rx_frame(rx_frame), .o_rx_tag(rx_tag),
    .o_rx_slot1(rx_s1), .o_rx_slot2(rx_s2), .o_rx_slot3(rx_s3),
    .o_rx_slot4(rx_s4), .o_sync_errors(sync_errors)
  );

  // ADC words: a fixed scramble of the frame number
  function automatic logic [15:0] adc_word(int n, int side);
    logic [31:0] h;
    h = 32'(n) * 32'h9E3779B1 + 32'(side) * 32'h7F4A7C15;
    return h[31:16] ^ h[15:0];
  endfunction
  // the codec is not ready during frames 100..119
  function automatic bit not_ready_frame(int n);
    return n >= 100 && n < 120;
  endfunction
  assign ready = !not_ready_frame(frame_idx);
  assign adc_l = adc_word(frame_idx, 0);
  assign adc_r = adc_word(frame_idx, 1);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("%0t: %s", $time, what);
    end
  endtask

  typedef struct { logic [6:0] a; logic [15:0] d, l, r; } frame_t;
  frame_t q[$];
  longint cyc = 0;
  longint last_sync_rise = -1;
  logic   sync_q = 0;
  int     n_cmd = 0, n_pcm = 0, n_not_ready = 0, n_dropped = 0;

  always @(posedge bit_clk) cyc <= cyc + 1;

  // register-FSM and audio-source stand-in
  always @(posedge bit_clk) begin
    if (cmd_next) begin
      frame_t f;
      f.a = 7'($urandom); f.d = 16'($urandom);
      f.l = 16'($urandom); f.r = 16'($urandom);
      cmd_addr <= f.a; cmd_data <= f.d; pcm_l_in <= f.l; pcm_r_in <= f.r;
      q.push_back(f);
      n_cmd++;
    end
  end

  // timing of SYNC, o_cmd_next and o_pcm_valid
  longint last_cmd = -1;
  always @(posedge bit_clk) begin
    sync_q <= sync;
    if (sync && !sync_q && rst_n) begin
      if (last_sync_rise >= 0)
        check(cyc - last_sync_rise == 256, $sformatf("frame length %0d", cyc - last_sync_rise));
      if (last_cmd >= 0)
        check(cyc - last_cmd == 2, $sformatf("command request %0d cycles before SYNC", cyc - last_cmd));
      last_sync_rise = cyc;
    end
    if (cmd_next) last_cmd = cyc;
    if (pcm_valid) begin
      check(cyc - last_sync_rise == 99, $sformatf("samples %0d cycles after SYNC", cyc - last_sync_rise));
      check(!not_ready_frame(frame_idx - 1), "samples delivered while codec not ready");
      check(pcm_l == adc_word(frame_idx - 1, 0) && pcm_r == adc_word(frame_idx - 1, 1),
            $sformatf("ADC words %h/%h expected %h/%h", pcm_l, pcm_r,
                      adc_word(frame_idx - 1, 0), adc_word(frame_idx - 1, 1)));
      n_pcm++;
    end
  end

  initial begin
    frame_t f0;
    f0.a = 7'h55; f0.d = 16'hA5C3; f0.l = 16'h1234; f0.r = 16'hFEDC;
    cmd_addr = f0.a; cmd_data = f0.d; pcm_l_in = f0.l; pcm_r_in = f0.r;
    q.push_back(f0);
    #500 rst_n = 1'b1;
    for (int i = 0; i < N_FRAMES; i++) begin
      frame_t e;
      @(frame_done);
      if (not_ready_frame(rx_frame)) n_not_ready++;
      check(q.size() > 0, "frame without a queued command");
      if (q.size() > 0) begin
        e = q.pop_front();
        check(rx_tag == 16'hF800, $sformatf("tag %h", rx_tag));
        check(rx_s1 == {1'b0, e.a, 12'b0}, $sformatf("slot1 %h expected addr %h", rx_s1, e.a));
        check(rx_s2 == {e.d, 4'b0}, $sformatf("slot2 %h expected %h", rx_s2, e.d));
        check(rx_s3 == {e.l, 4'b0} && rx_s4 == {e.r, 4'b0},
              $sformatf("slots 3/4 %h/%h expected %h/%h", rx_s3, rx_s4, e.l, e.r));
      end
    end
    n_dropped = N_FRAMES - n_pcm;
    check(sync_errors == 0, $sformatf("%0d SYNC errors", sync_errors));
    check(n_cmd >= N_FRAMES - 1, "too few command requests");
    check(n_pcm > 0, "no samples delivered");
    check(n_not_ready > 0 && n_dropped >= n_not_ready, "codec-not-ready frames not seen");
    $display("frames=%0d commands=%0d samples=%0d not_ready=%0d dropped=%0d",
             N_FRAMES, n_cmd, n_pcm, n_not_ready, n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((N_FRAMES + 10) * 256 * 82);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
