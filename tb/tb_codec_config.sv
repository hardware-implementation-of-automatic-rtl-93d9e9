// tb_codec_config: self-checking test of the codec register ring.
//
// The test plays the link controller: it pulses i_next at random intervals
// and reads o_addr/o_data between the pulses. Expected values come from a
// table written out here from the register descriptions: the ring order,
// each address, and each value for bypass on and off and for the volume
// switches. Checked: exactly one step per i_next and none without it (the
// command stays put over idle cycles), the wrap from MISC to HP_VOL, the
// restart at HP_VOL after a reset, and that switch changes show two cycles
// later (the synchronizer) without a reset. Each of the seven registers,
// bypass on and off, several volume settings and the reset are counted,
// and one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_codec_config;

  logic        clk = 0, rst_n = 0;
  logic        i_next = 0, i_bypass = 0;
  logic [4:0]  i_volume = 0;
  logic [6:0]  o_addr;
  logic [15:0] o_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  codec_config dut (.clk, .rst_n, .i_next, .i_bypass, .i_volume, .o_addr, .o_data);

  int  ring = 0;             // expected ring position
  int  n_reg[7];
  int  n_byp_on = 0, n_byp_off = 0, n_resets = 0, n_vol_seen = 0;
  bit  vol_seen[32];

  function automatic logic [22:0] expected(int k, bit byp, logic [4:0] vol);
    case (k)
      0: return {7'h04, 3'b0, vol, 3'b0, vol};
      1: return {7'h0E, byp ? 16'h0000 : 16'h8000};
      2: return {7'h18, byp ? 16'h8808 : 16'h0808};
      3: return {7'h1C, byp ? 16'h8000 : 16'h0000};
      4: return {7'h2C, 16'hBB80};
      5: return {7'h32, 16'hBB80};
      default: return {7'h76, byp ? 16'h0240 : 16'h0A40};
    endcase
  endfunction

  task automatic check_now(string when);
    logic [22:0] e;
    e = expected(ring, i_bypass, i_volume);
    checks++;
    if ({o_addr, o_data} !== e) begin
      failures++;
      if (failures < 10)
        $display("%s: ring %0d got %h/%h expected %h/%h", when, ring, o_addr, o_data, e[22:16], e[15:0]);
    end
  endtask

  initial begin
    foreach (n_reg[i]) n_reg[i] = 0;
    foreach (vol_seen[i]) vol_seen[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int step = 0; step < 400; step++) begin
      // sometimes change the switches; allow the synchronizer its two cycles
      if ($urandom_range(5) == 0) begin
        i_bypass = $urandom_range(1);
        i_volume = 5'($urandom);
        repeat (3) @(negedge clk);
      end
      // idle cycles: the command must not move
      repeat ($urandom_range(3)) begin
        check_now("idle");
        @(negedge clk);
      end
      check_now("before step");
      n_reg[ring]++;
      if (ring == 1) begin if (i_bypass) n_byp_on++; else n_byp_off++; end
      if (ring == 0 && !vol_seen[i_volume]) begin vol_seen[i_volume] = 1; n_vol_seen++; end
      // one step
      i_next = 1;
      @(negedge clk);
      i_next = 0;
      ring = (ring + 1) % 7;
      check_now("after step");
      // a reset now and then returns the ring to HP_VOL
      if (step == 150 || step == 301) begin
        rst_n = 0;
        @(negedge clk);
        rst_n = 1;
        ring = 0;
        n_resets++;
        @(negedge clk);
        check_now("after reset");
      end
    end
    foreach (n_reg[i]) begin
      checks++;
      if (n_reg[i] == 0) begin failures++; $display("register %0d never written", i); end
    end
    checks++; if (n_byp_on  == 0) begin failures++; $display("bypass never on"); end
    checks++; if (n_byp_off == 0) begin failures++; $display("bypass never off"); end
    checks++; if (n_vol_seen < 3) begin failures++; $display("too few volume settings"); end
    checks++; if (n_resets  == 0) begin failures++; $display("reset never applied"); end
    $display("regs=%0d/%0d/%0d/%0d/%0d/%0d/%0d bypass_on=%0d bypass_off=%0d volumes=%0d resets=%0d",
             n_reg[0], n_reg[1], n_reg[2], n_reg[3], n_reg[4], n_reg[5], n_reg[6],
             n_byp_on, n_byp_off, n_vol_seen, n_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
