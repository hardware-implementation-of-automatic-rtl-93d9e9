// tb_agc_channel: self-checking test of one AGC channel.
//
// Samples are sent serially: a start pulse, then 16 bits MSB first. Each
// output word is collected from o_serial up to the o_done bit and compared
// with the reference model in agc_ref_pkg. The gain table is modelled here.
// It registers o_db on o_gain_fetch and presents the gain from the formula
// one cycle later. It then corrupts the gain again one cycle after that,
// so a channel that reads the gain at the wrong time fails. The latency
// from the first input bit to the o_done bit is checked too: 58 cycles
// whichever branch the release takes. The stimulus is quiet noise, a loud
// tone burst (attack and attenuation), a quieter stretch (release) and
// full-scale steps. The release constant is raised to BETA = 1024 (a time
// constant of 32 samples) so that the decay visibly changes the gain within
// the short run; the default BETA is covered by the stereo test.
`timescale 1ns/1ps
module tb_agc_channel;
  import agc_pkg::*;
  import agc_ref_pkg::*;

  localparam int N_SAMPLES = 1200;

  logic  clk = 0;
  logic  rst_n = 0;
  logic  i_start = 0, i_serial = 0;
  logic  o_serial, o_done, o_gain_fetch;
  db_t   o_db;
  gain_t i_gain;

  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int ALPHA = 683;
  localparam int BETA  = 1024;

  agc_channel #(.ALPHA(ALPHA), .BETA(BETA)) dut (
    .clk, .rst_n, .i_start, .i_serial, .o_serial, .o_done,
    .o_gain_fetch, .o_db, .i_gain
  );

  // gain table model with the one-cycle read delay
  int  db_q;
  bit  gain_valid;
  always @(posedge clk) begin
    if (o_gain_fetch) begin
      db_q       <= int'(o_db);
      gain_valid <= 1'b1;
    end else gain_valid <= 1'b0;
    if (gain_valid) i_gain <= gain_t'(ref_gain(db_q));
    else            i_gain <= gain_t'($urandom);
  end

  // output collector
  logic [15:0] out_shift;
  always @(posedge clk) out_shift <= {out_shift[14:0], o_serial};

  agc_ref_channel model;
  int n_rose = 0, n_hold = 0, n_decay = 0, n_atten = 0, n_unity = 0, n_sat = 0;

  function automatic int stimulus(int n);
    real ph;
    ph = 2.0 * 3.14159265 * 1000.0 * n / 48000.0;
    if (n < 200)       return int'($urandom_range(400)) - 200;          // quiet
    else if (n < 600)  return int'(20000.0 * $sin(ph));                 // loud tone
    else if (n < 1000) return int'(600.0 * $sin(ph));                   // quiet again
    else if (n < 1100) return (n % 40 < 20) ? 32767 : -32768;           // full-scale steps
    else               return int'($urandom_range(2000)) - 1000;
  endfunction

  task automatic run_sample(int x);
    int    y_exp, lat_exp;
    longint t_first;
    logic [15:0] xb;
    xb = 16'(x);
    model.front_end(x);
    @(negedge clk) i_start = 1;
    @(negedge clk) begin
      i_start = 0;
      t_first = cycle;
      i_serial = xb[15];
    end
    for (int i = 14; i >= 0; i--) @(negedge clk) i_serial = xb[i];
    // wait for done
    while (!o_done) @(negedge clk);
    // o_done is high in this cycle: the LSB is on o_serial now
    y_exp   = model.back_end(ref_gain(model.db));
    lat_exp = 58;
    checks++;
    if ($signed({out_shift[14:0], o_serial}) !== 16'(y_exp)) begin
      failures++;
      if (failures < 10)
        $display("sample mismatch: x=%0d got=%0d exp=%0d db=%0d", x,
                 $signed({out_shift[14:0], o_serial}), y_exp, model.db);
    end
    checks++;
    if (cycle - t_first + 1 != lat_exp) begin
      failures++;
      if (failures < 10)
        $display("latency mismatch: got=%0d exp=%0d", cycle - t_first + 1, lat_exp);
    end
    if (model.rose) n_rose++; else n_hold++;
    if (model.decayed) n_decay++;
    if (ref_gain(model.db) < 32768) n_atten++; else n_unity++;
    if (model.x_eq == 32767 || model.x_eq == -32767) n_sat++;
    @(negedge clk);
  endtask

  initial begin
    model = new(ALPHA, BETA);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < N_SAMPLES; n++) run_sample(stimulus(n));
    // every mechanism must have been exercised
    checks++; if (n_rose  == 0) begin failures++; $display("attack never taken"); end
    checks++; if (n_hold  == 0) begin failures++; $display("hold never taken"); end
    checks++; if (n_decay == 0) begin failures++; $display("release decay never taken"); end
    checks++; if (n_atten == 0) begin failures++; $display("attenuation never applied"); end
    checks++; if (n_unity == 0) begin failures++; $display("unity gain never applied"); end
    checks++; if (n_sat   == 0) begin failures++; $display("equaliser limit never reached"); end
    $display("attack=%0d hold=%0d decay=%0d atten=%0d unity=%0d sat=%0d",
             n_rose, n_hold, n_decay, n_atten, n_unity, n_sat);
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
