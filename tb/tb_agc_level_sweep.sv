// tb_agc_level_sweep: the input-output level curve of the stereo AGC core
// at its default parameters, measured with white noise.
//
// The same uniform white noise goes to both ears. Its level is raised in
// steps of about 5 dB, from near silence to full scale, as in an acoustic
// attenuation test. At each level the core runs 0.1 s (4800 samples at
// 48 kHz) to settle and 0.1 s more to measure. Two mean powers are
// measured over the second part, in dB of the core's own scale (1 LSB^2 =
// 0 dB): the filtered, damped sample before the gain, taken from the
// reference model, and the core's actual output.
// Every output word is also checked bit-exact against the reference model.
// The curve must show:
//   * below the knee (input under 36 dB), output = input within 0.2 dB;
//   * above it (input over 60 dB), the output held at or below the
//     threshold (46 dB) + 0.5 dB and above the threshold - 8 dB;
//   * an output level that never falls by more than 1 dB from one step
//     to the next.
// Each region must be reached.
`timescale 1ns/1ps
module tb_agc_level_sweep;
  import agc_ref_pkg::*;

  localparam int SETTLE  = 4800;
  localparam int MEASURE = 4800;
  localparam int N_STEPS = 19;

  logic clk = 0, rst_n = 0;
  logic start = 0, l_in = 0, r_in = 0;
  logic l_out, l_done, r_out, r_done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  agc_stereo dut (
    .clk, .rst_n,
    .i_l_start(start), .i_l_serial(l_in), .o_l_serial(l_out), .o_l_done(l_done),
    .i_r_start(start), .i_r_serial(r_in), .o_r_serial(r_out), .o_r_done(r_done)
  );

  logic [15:0] l_shift, r_shift;
  always @(posedge clk) begin
    l_shift <= {l_shift[14:0], l_out};
    r_shift <= {r_shift[14:0], r_out};
  end

  agc_ref_channel ml, mr;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%s", what);
    end
  endtask

  // one sample through both channels; returns the pre-gain sample and
  // the core's output for the left ear
  task automatic run_sample(int x, output int pre, output int got);
    logic [15:0] b, wl, wr;
    int g, yl, yr;
    b = 16'(x);
    ml.front_end(x);
    mr.front_end(x);
    pre = ml.x_eq;
    g  = ref_gain((ml.db > mr.db) ? ml.db : mr.db);
    yl = ml.back_end(g);
    yr = mr.back_end(g);
    @(negedge clk) start = 1;
    @(negedge clk) begin start = 0; l_in = b[15]; r_in = b[15]; end
    for (int i = 14; i >= 0; i--) @(negedge clk) begin l_in = b[i]; r_in = b[i]; end
    while (!l_done) @(negedge clk);
    wl = {l_shift[14:0], l_out};
    wr = {r_shift[14:0], r_out};
    check($signed(wl) == 16'(yl) && $signed(wr) == 16'(yr),
          $sformatf("output %0d/%0d expected %0d/%0d", $signed(wl), $signed(wr), yl, yr));
    got = int'($signed(wl));
    @(negedge clk);
  endtask

  function automatic real to_db(real p);
    return (p < 1.0e-3) ? -30.0 : 10.0 * $log10(p);
  endfunction

  initial begin
    real amp, p_in, p_out, db_in, db_out, last_out;
    int  pre, got, n_below = 0, n_above = 0;
    ml = new(683, 2);
    mr = new(683, 2);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    last_out = -100.0;
    amp = 2.0;
    $display("  input dB  output dB");
    for (int s = 0; s < N_STEPS; s++) begin
      for (int n = 0; n < SETTLE; n++)
        run_sample(int'(amp * (2.0 * $urandom_range(65535) / 65535.0 - 1.0)), pre, got);
      p_in = 0.0; p_out = 0.0;
      for (int n = 0; n < MEASURE; n++) begin
        run_sample(int'(amp * (2.0 * $urandom_range(65535) / 65535.0 - 1.0)), pre, got);
        p_in  += real'(pre) * real'(pre);
        p_out += real'(got) * real'(got);
      end
      db_in  = to_db(p_in / MEASURE);
      db_out = to_db(p_out / MEASURE);
      $display("  %8.2f  %8.2f", db_in, db_out);
      if (db_in < 36.0) begin
        n_below++;
        check(db_out > db_in - 0.2 && db_out < db_in + 0.2,
              $sformatf("below knee: in %.2f dB out %.2f dB", db_in, db_out));
      end
      if (db_in > 60.0) begin
        n_above++;
        check(db_out <= 46.5 && db_out > 38.0,
              $sformatf("above knee: in %.2f dB out %.2f dB", db_in, db_out));
      end
      check(db_out > last_out - 1.0,
            $sformatf("output fell from %.2f to %.2f dB", last_out, db_out));
      last_out = db_out;
      amp = (amp * 1.778 > 32767.0) ? 32767.0 : amp * 1.778;
    end
    check(n_below > 0, "no level below the knee");
    check(n_above > 0, "no level above the knee");
    $display("levels below knee=%0d above knee=%0d", n_below, n_above);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(N_STEPS) * (SETTLE + MEASURE) * 70 * 10 + 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
