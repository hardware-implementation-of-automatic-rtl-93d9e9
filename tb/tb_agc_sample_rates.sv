// tb_agc_sample_rates: runs the stereo AGC core at the two sample spacings
// that set its clock requirement, with default parameters.
//
//   * 70 clocks per sample: the budget the clock-rate sizing is based on
//     (for example a 560 kHz clock at 8 kHz, or 3.36 MHz at 48 kHz);
//   * 59 clocks per sample: the fastest the core accepts, a start pulse in
//     the cycle right after the previous o_done.
// The start pulses of sample k fall exactly k x spacing cycles after the
// first one; the serial bits follow in the next 16 cycles. Each output
// word must equal the reference model (two channels sharing the gain of
// the louder one), and its o_done must come 58 cycles after its first
// input bit, before the next start. The input alternates between quiet
// noise and loud bursts on either side, so that both unity gain and
// attenuation occur at each spacing; each is counted and must happen. The
// core is reset between the two runs, because the release from the last
// burst of the first run would last well into the second.
`timescale 1ns/1ps
module tb_agc_sample_rates;
  import agc_ref_pkg::*;

  localparam int N_PER_RATE = 12000;

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

  function automatic int stim(int n, int side);
    int seg;
    seg = (n / 1500) % 4;
    // bursts: left loud in segment 1, right loud in segment 3
    if ((seg == 1 && side == 0) || (seg == 3 && side == 1))
      return int'(14000.0 * $sin(2.0 * 3.14159265 * (side ? 900.0 : 1300.0) * n / 48000.0));
    return int'($urandom_range(300)) - 150;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  // one sample at the given spacing; returns with the clock at the start
  // cycle of the next sample
  task automatic run_sample(int spacing, int n, inout int n_unity, inout int n_atten);
    int xl, xr, g, yl, yr, done_l_at, done_r_at;
    logic [15:0] bl, br, wl, wr;
    xl = stim(n, 0); xr = stim(n, 1);
    bl = 16'(xl); br = 16'(xr);
    ml.front_end(xl); mr.front_end(xr);
    g  = ref_gain((ml.db > mr.db) ? ml.db : mr.db);
    yl = ml.back_end(g);
    yr = mr.back_end(g);
    if (g == 32768) n_unity++; else n_atten++;
    done_l_at = -1; done_r_at = -1;
    // cycle offset 0 is the start pulse; bits at 1..16
    for (int t = 0; t < spacing; t++) begin
      l_start = (t == 0); r_start = (t == 0);
      if (t >= 1 && t <= 16) begin l_in = bl[16 - t]; r_in = br[16 - t]; end
      @(negedge clk);
      // now in cycle t + 1: look at its o_done
      if (l_done) begin done_l_at = t + 1; wl = {l_shift[14:0], l_out}; end
      if (r_done) begin done_r_at = t + 1; wr = {r_shift[14:0], r_out}; end
    end
    // the LSB cycle is offset 58 (58 cycles counted from the first bit)
    check(done_l_at == 58 && done_r_at == 58,
          $sformatf("done at %0d/%0d, expected 58", done_l_at, done_r_at));
    check($signed(wl) == 16'(yl) && $signed(wr) == 16'(yr),
          $sformatf("sample %0d: got %0d/%0d expected %0d/%0d", n, $signed(wl), $signed(wr), yl, yr));
  endtask

  initial begin
    int u70 = 0, a70 = 0, u59 = 0, a59 = 0;
    ml = new(683, 2);
    mr = new(683, 2);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < N_PER_RATE; n++) run_sample(70, n, u70, a70);
    // reset between the two runs, so the second also starts from unity gain
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    ml = new(683, 2);
    mr = new(683, 2);
    for (int n = 0; n < N_PER_RATE; n++) run_sample(59, n, u59, a59);
    check(u70 > 0 && a70 > 0, "70-cycle spacing: unity or attenuation missing");
    check(u59 > 0 && a59 > 0, "59-cycle spacing: unity or attenuation missing");
    $display("spacing 70: unity=%0d atten=%0d  spacing 59: unity=%0d atten=%0d", u70, a70, u59, a59);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(N_PER_RATE) * 140 * 10 + 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
