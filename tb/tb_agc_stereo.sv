// tb_agc_stereo: end-to-end test of the stereo AGC core at its default
// parameters.
//
// Both channels receive their samples in step (start pulses in the same
// cycle). Each output word is compared with two reference channels from
// agc_ref_pkg. Those share one gain: the gain of the larger of the two
// levels. The latency of every sample is checked too (58 cycles). The stimulus takes the design through each mechanism
// it has, and each is counted:
//   quiet sound passed at gain 1; attenuation; the left side setting the
//   common gain; the right side setting it; the attack path (fast power
//   above the held power); the hold path; the release decay; the equaliser
//   output limit; and the return to gain 1 at the end of the release.
// A mechanism that never happened counts as a failure.
`timescale 1ns/1ps
module tb_agc_stereo;
  import agc_ref_pkg::*;

  localparam int N_SAMPLES = 240000;

  logic clk = 0, rst_n = 0;
  logic l_start = 0, l_in = 0, r_start = 0, r_in = 0;
  logic l_out, l_done, r_out, r_done;
  int   checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  agc_stereo dut (
    .clk, .rst_n,
    .i_l_start(l_start), .i_l_serial(l_in), .o_l_serial(l_out), .o_l_done(l_done),
    .i_r_start(r_start), .i_r_serial(r_in), .o_r_serial(r_out), .o_r_done(r_done)
  );

  logic [15:0] l_shift, r_shift;
  always @(posedge clk) begin
    l_shift <= {l_shift[14:0], l_out};
    r_shift <= {r_shift[14:0], r_out};
  end

  agc_ref_channel ml, mr;
  int n_unity = 0, n_atten = 0, n_left = 0, n_right = 0;
  int n_attack = 0, n_hold = 0, n_decay = 0, n_sat = 0, n_recovered = 0;
  int last_g = 32768;

  function automatic int tone(int n, real amp, real f);
    return int'(amp * $sin(2.0 * 3.14159265 * f * n / 48000.0));
  endfunction

  // left: quiet, loud 1 kHz, quiet; right: quiet, full-scale 700 Hz
  // square (heavier than the left tone), quiet. The release lowers the
  // held level by 4.3 dB per time constant (341 ms), so falling the ~50 dB
  // from the loud square back to the knee takes about 4 s (190k samples at
  // 48 kHz). The decay only runs while the fast power is not rising, so
  // the tail is a short quiet tone (about 32 dB) and then silence, long
  // enough for the whole release.
  function automatic int stim_l(int n);
    if (n < 150)       return int'($urandom_range(200)) - 100;
    else if (n < 600)  return tone(n, 12000.0, 1000.0);
    else if (n < 1500) return tone(n, 60.0, 1000.0);
    else               return 0;
  endfunction
  function automatic int stim_r(int n);
    if (n < 800)       return int'($urandom_range(200)) - 100;
    else if (n < 1200) return (tone(n, 1.0e6, 700.0) >= 0) ? 32767 : -32768;
    else if (n < 1500) return tone(n, 60.0, 500.0);
    else               return 0;
  endfunction

  task automatic check_word(string side, logic [15:0] got, int exp, int lat, int lat_exp);
    checks++;
    if ($signed(got) !== 16'(exp)) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", side, $signed(got), exp);
    end
    checks++;
    if (lat != lat_exp) begin
      failures++;
      if (failures < 10) $display("%s: latency %0d expected %0d", side, lat, lat_exp);
    end
  endtask

  task automatic run_pair(int xl, int xr);
    logic [15:0] bl, br;
    longint t0;
    int lat_l, lat_r, g, yl, yr;
    logic [15:0] wl, wr;
    bit got_l = 0, got_r = 0;
    bl = 16'(xl); br = 16'(xr);
    ml.front_end(xl);
    mr.front_end(xr);
    @(negedge clk) begin l_start = 1; r_start = 1; end
    @(negedge clk) begin
      l_start = 0; r_start = 0; t0 = cycle;
      l_in = bl[15]; r_in = br[15];
    end
    for (int i = 14; i >= 0; i--) @(negedge clk) begin l_in = bl[i]; r_in = br[i]; end
    while (!(got_l && got_r)) begin
      @(negedge clk);
      if (l_done && !got_l) begin got_l = 1; wl = {l_shift[14:0], l_out}; lat_l = int'(cycle - t0 + 1); end
      if (r_done && !got_r) begin got_r = 1; wr = {r_shift[14:0], r_out}; lat_r = int'(cycle - t0 + 1); end
    end
    g  = ref_gain((ml.db > mr.db) ? ml.db : mr.db);
    yl = ml.back_end(g);
    yr = mr.back_end(g);
    check_word("left",  wl, yl, lat_l, 58);
    check_word("right", wr, yr, lat_r, 58);
    if (g == 32768) n_unity++; else n_atten++;
    if (g == 32768 && last_g < 32768) n_recovered++;
    last_g = g;
    if (ml.db > mr.db && g < 32768) n_left++;
    if (mr.db > ml.db && g < 32768) n_right++;
    if (ml.rose) n_attack++; else n_hold++;
    if (ml.decayed || mr.decayed) n_decay++;
    if (mr.x_eq == 32767 || mr.x_eq == -32767) n_sat++;
    @(negedge clk);
  endtask

  initial begin
    ml = new(683, 2);
    mr = new(683, 2);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < N_SAMPLES; n++) run_pair(stim_l(n), stim_r(n));
    checks++; if (n_unity  == 0) begin failures++; $display("unity gain never applied"); end
    checks++; if (n_atten  == 0) begin failures++; $display("attenuation never applied"); end
    checks++; if (n_left   == 0) begin failures++; $display("left side never set the gain"); end
    checks++; if (n_right  == 0) begin failures++; $display("right side never set the gain"); end
    checks++; if (n_attack == 0) begin failures++; $display("attack never taken"); end
    checks++; if (n_hold   == 0) begin failures++; $display("hold never taken"); end
    checks++; if (n_decay  == 0) begin failures++; $display("release decay never taken"); end
    checks++; if (n_sat    == 0) begin failures++; $display("equaliser limit never reached"); end
    checks++; if (n_recovered == 0) begin failures++; $display("gain never returned to 1"); end
    $display("final levels L=%0d R=%0d dB", ml.db, mr.db);
    $display("unity=%0d atten=%0d left=%0d right=%0d attack=%0d hold=%0d decay=%0d sat=%0d recovered=%0d",
             n_unity, n_atten, n_left, n_right, n_attack, n_hold, n_decay, n_sat, n_recovered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(N_SAMPLES * 80 * 10 + 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
