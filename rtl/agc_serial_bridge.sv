// agc_serial_bridge: connects the parallel sample words of the AC'97
// controller to the serial pads of the stereo AGC core.
//
// The AGC core has the pad interface of the chip: per channel a start
// pulse, 16 data bits MSB first on one wire, and an output word that comes
// back MSB first with a done flag on its last bit. On the FPGA platform the
// codec link delivers both microphone samples as 16-bit words, once per
// 48 kHz frame. This bridge does the conversion in both directions.
//   - When i_valid pulses, both words are loaded into shift registers.
//     o_start is high in the next cycle, and the 16 bits follow MSB first,
//     one per cycle, on o_l_serial/o_r_serial. Both channels run in step,
//     which the shared gain table needs.
//   - The returning bits are shifted in every cycle. On the cycle the core
//     flags done, the complete word goes to o_pcm_l/o_pcm_r and is held
//     until the next one.
// A new i_valid must not come before the core has finished the previous
// sample: 1 + 58 cycles. At one sample per 256-bit frame this always holds.
// The source design links the codec controller directly to the filters;
// this bridge exists because the core here keeps the chip's serial pads.
module agc_serial_bridge (
  input  logic        clk,
  input  logic        rst_n,
  // parallel side
  input  logic        i_valid,
  input  logic [15:0] i_pcm_l,
  input  logic [15:0] i_pcm_r,
  output logic [15:0] o_pcm_l,
  output logic [15:0] o_pcm_r,
  // serial side, to and from the AGC core
  output logic        o_start,
  output logic        o_l_serial,
  output logic        o_r_serial,
  input  logic        i_l_serial,
  input  logic        i_r_serial,
  input  logic        i_l_done,
  input  logic        i_r_done
);

  logic [15:0] tx_l, tx_r;
  logic [14:0] rx_l, rx_r;       // the last 15 bits from the core
  logic [4:0]  tx_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_l       <= '0;
      tx_r       <= '0;
      tx_cnt     <= '0;
      o_start    <= 1'b0;
      o_l_serial <= 1'b0;
      o_r_serial <= 1'b0;
    end else begin
      o_start <= 1'b0;
      if (i_valid) begin
        tx_l    <= i_pcm_l;
        tx_r    <= i_pcm_r;
        tx_cnt  <= 5'd16;
        o_start <= 1'b1;
      end else if (tx_cnt != 5'd0) begin
        o_l_serial <= tx_l[15];
        o_r_serial <= tx_r[15];
        tx_l       <= {tx_l[14:0], 1'b0};
        tx_r       <= {tx_r[14:0], 1'b0};
        tx_cnt     <= tx_cnt - 5'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_l    <= '0;
      rx_r    <= '0;
      o_pcm_l <= '0;
      o_pcm_r <= '0;
    end else begin
      rx_l <= {rx_l[13:0], i_l_serial};
      rx_r <= {rx_r[13:0], i_r_serial};
      if (i_l_done) o_pcm_l <= {rx_l, i_l_serial};
      if (i_r_done) o_pcm_r <= {rx_r, i_r_serial};
    end
  end

endmodule
