// i2s_controller: drives an I2S audio DAC (MCLK, SCLK, LRCK, SDIN) from PCM
// samples handed over on a two-channel ready/valid port.
//
// Clocks. All three clocks are derived from the system clock by counters that
// start together at reset:
//   MCLK  toggles every MCLK_HALF system cycles,
//   SCLK  = MCLK / MCLK_PER_SCLK (bit clock),
//   LRCK  = SCLK / (2 * SLOT_BITS) (frame clock, one slot per channel).
// With the defaults (125 MHz, MCLK_HALF 5, 4, 32) MCLK is 12.5 MHz, SCLK
// 3.125 MHz and LRCK 48.83 kHz, i.e. MCLK = 256 fs and SCLK = 64 fs.
//
// Frame. LRCK low is the left slot, high the right slot. LRCK and SDIN change
// on SCLK falling edges, so the DAC samples them on rising edges. As I2S
// requires, the MSB of a slot's sample goes out in the second SCLK period after
// the LRCK transition, followed by the rest MSB first; the remaining
// SLOT_BITS - 1 - BIT_DEPTH bit periods of the slot carry 0.
//
// Handshake. pcm_data_valid[c] / pcm_data_ready[c] are channel c's pair
// (0 = left, 1 = right); pcm_data is shared. A channel's holding register
// accepts one sample per frame: ready[c] is high during the other channel's
// slot until one transfer happens, so a source holding valid high hands over
// exactly one sample per channel per frame. If no sample arrives, the last
// one received is sent again.
//
// From the lab: the MCLK/SCLK/LRCK/SDIN pins, one sample per channel per frame,
// the 2-bit ready and valid, the MSB in the second bit period, repeating the
// last sample, and the 20-bit sample width. The clock ratios, the divider
// values (no exact 44.1/48 kHz rate divides 125 MHz) and the
// ready window are this design's own choices.
module i2s_controller #(
  parameter int unsigned BIT_DEPTH     = 20,
  parameter int unsigned MCLK_HALF     = 5,
  parameter int unsigned MCLK_PER_SCLK = 4,
  parameter int unsigned SLOT_BITS     = 32
) (
  input  logic                 clk,
  input  logic                 rst,

  input  logic [BIT_DEPTH-1:0] pcm_data,
  input  logic [1:0]           pcm_data_valid,
  output logic [1:0]           pcm_data_ready,

  output logic                 mclk,
  output logic                 sclk,
  output logic                 lrck,
  output logic                 sdin
);

  localparam int unsigned SCLK_HALF = MCLK_HALF * MCLK_PER_SCLK;
  localparam int unsigned FRAME     = 2 * SLOT_BITS;
  localparam int unsigned MW        = (MCLK_HALF > 1) ? $clog2(MCLK_HALF) : 1;
  localparam int unsigned SW        = (SCLK_HALF > 1) ? $clog2(SCLK_HALF) : 1;
  localparam int unsigned BW        = $clog2(FRAME);
  localparam int unsigned PW        = $clog2(SLOT_BITS);

  logic [MW-1:0]        mclk_cnt;
  logic [SW-1:0]        sclk_cnt;
  logic [BW-1:0]        bit_cnt;     // bit period within the frame
  logic [BIT_DEPTH-1:0] hold [2];    // last sample received per channel
  logic [1:0]           taken;       // channel already took its sample this frame
  logic                 sclk_fall;

  logic [BW-1:0]        nxt_bit;
  logic                 nxt_ch;
  logic [PW-1:0]        nxt_pos;
  logic                 nxt_sdin;

  assign sclk_fall = sclk && (sclk_cnt == SW'(SCLK_HALF - 1));

  always_comb begin
    nxt_bit  = (bit_cnt == BW'(FRAME - 1)) ? '0 : bit_cnt + 1'b1;
    nxt_ch   = (nxt_bit >= BW'(SLOT_BITS));
    nxt_pos  = PW'(nxt_bit);
    nxt_sdin = 1'b0;
    if (nxt_pos >= PW'(1) && nxt_pos <= PW'(BIT_DEPTH))
      nxt_sdin = hold[nxt_ch][PW'(BIT_DEPTH) - nxt_pos];
  end

  // Channel c may take a sample while the other channel's slot is on the wire.
  assign pcm_data_ready[0] =  lrck && !taken[0];
  assign pcm_data_ready[1] = !lrck && !taken[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      mclk_cnt <= '0;
      sclk_cnt <= '0;
      mclk     <= 1'b0;
      sclk     <= 1'b0;
      lrck     <= 1'b1;
      sdin     <= 1'b0;
      bit_cnt  <= BW'(FRAME - 1);
      taken    <= 2'b00;
      hold[0]  <= '0;
      hold[1]  <= '0;
    end else begin
      if (mclk_cnt == MW'(MCLK_HALF - 1)) begin
        mclk_cnt <= '0;
        mclk     <= !mclk;
      end else begin
        mclk_cnt <= mclk_cnt + 1'b1;
      end

      if (sclk_cnt == SW'(SCLK_HALF - 1)) begin
        sclk_cnt <= '0;
        sclk     <= !sclk;
      end else begin
        sclk_cnt <= sclk_cnt + 1'b1;
      end

      for (int c = 0; c < 2; c++) begin
        if (pcm_data_valid[c] && pcm_data_ready[c]) begin
          hold[c]  <= pcm_data;
          taken[c] <= 1'b1;
        end
      end

      if (sclk_fall) begin
        bit_cnt <= nxt_bit;
        lrck    <= nxt_ch;
        sdin    <= nxt_sdin;
        // A channel's slot starting opens its next frame's handshake.
        if (nxt_ch != lrck) taken[nxt_ch] <= 1'b0;
      end
    end
  end

endmodule
