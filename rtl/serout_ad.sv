// serout_ad: serial audio transmitter for the ADC result (bus master).
//
// Sends the latest left/right ADC samples as a standard serial audio frame of 64 bit
// clocks (two 32-bit slots) per sample period. The transmitter generates the bus
// clocks itself: bclk = clk / (2*BCLK_HALF) (64fs from the 512fs master clock with
// BCLK_HALF = 4) and lrclk = fs. lrclk and sdata change right after the falling edge
// of bclk, so a receiver samples them on the rising edge. The word sent is the top W
// bits of the 32-bit sample, W = 16, 20 or 24 (wlen), MSB first, placed in the slot
// according to fmt:
//   I2S - lrclk low for left; MSB in the second bit of the slot,
//   LJ  - lrclk high for left; MSB in the first bit of the slot,
//   RJ  - lrclk high for left; LSB in the last bit of the slot.
// Unused bit positions carry 0. in_valid loads a new sample pair; the pair is taken
// into the shift frame at the start of the next frame, so a new frame always carries
// the pair that was complete when it began. fmt and wlen are sampled at the frame
// start too.
// Formats and word lengths follow the design description; the slot size, clock ratio
// and bit placement follow the common definitions of these formats, not the document.
module serout_ad
  import sdm_pkg::*;
#(
  parameter int unsigned BCLK_HALF = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  audio_fmt_e         fmt,
  input  wlen_e              wlen,
  input  logic               in_valid,
  input  logic signed [31:0] din_l,
  input  logic signed [31:0] din_r,
  output logic               bclk,
  output logic               lrclk,
  output logic               sdata
);

  localparam int unsigned HW = (BCLK_HALF > 1) ? $clog2(BCLK_HALF) : 1;

  logic [HW-1:0]      half_cnt;
  logic [5:0]         bitpos;          // bit of the frame being sent, 0..63
  logic signed [31:0] pend_l, pend_r;  // latest pair from the ADC
  logic signed [31:0] cur_l, cur_r;    // pair of the current frame
  audio_fmt_e         cur_fmt;
  wlen_e              cur_wlen;

  // Next bit position and its data.
  logic [5:0]  nxt_pos;
  logic        nxt_lr, nxt_data;
  audio_fmt_e  f;
  wlen_e       w;
  logic [31:0] word, word_raw;
  int          b, wb, idx;

  always_comb begin
    nxt_pos = bitpos + 6'd1;
    f    = (nxt_pos == 6'd0) ? fmt : cur_fmt;
    w    = (nxt_pos == 6'd0) ? wlen : cur_wlen;
    if (nxt_pos == 6'd0) word_raw = pend_l;
    else word_raw = nxt_pos[5] ? cur_r : cur_l;
    // clip to +/-2^30 and move bit 30 to the MSB
    if (word_raw[31] != word_raw[30]) word = word_raw[31] ? 32'h8000_0000 : 32'h7fff_ffff;
    else                              word = {word_raw[30:0], 1'b0};
    b    = int'(nxt_pos[4:0]);
    wb   = int'(wlen_bits(w));
    nxt_lr = nxt_pos[5] ? (f == FMT_I2S) : (f != FMT_I2S);
    case (f)
      FMT_I2S: idx = wb - b;               // MSB at b = 1
      FMT_RJ:  idx = SLOT_BITS - 1 - b;    // LSB at b = 31
      default: idx = wb - 1 - b;           // LJ: MSB at b = 0
    endcase
    // bit idx of the W-bit word, counted from its LSB; word = din[31 -: W]
    if (idx >= 0 && idx < wb) nxt_data = word[32 - wb + idx];
    else                      nxt_data = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_cnt <= '0;
      bclk     <= 1'b0;
      bitpos   <= 6'd63;
      lrclk    <= 1'b1;
      sdata    <= 1'b0;
      pend_l   <= '0;
      pend_r   <= '0;
      cur_l    <= '0;
      cur_r    <= '0;
      cur_fmt  <= FMT_I2S;
      cur_wlen <= WLEN_24;
    end else begin
      if (in_valid) begin
        pend_l <= din_l;
        pend_r <= din_r;
      end
      if (half_cnt == HW'(BCLK_HALF - 1)) begin
        half_cnt <= '0;
        bclk     <= ~bclk;
        if (bclk) begin
          // falling edge of bclk: advance to the next bit
          bitpos <= nxt_pos;
          lrclk  <= nxt_lr;
          sdata  <= nxt_data;
          if (nxt_pos == 6'd0) begin
            cur_l    <= pend_l;
            cur_r    <= pend_r;
            cur_fmt  <= fmt;
            cur_wlen <= wlen;
          end
        end
      end else begin
        half_cnt <= half_cnt + 1'b1;
      end
    end
  end

endmodule
