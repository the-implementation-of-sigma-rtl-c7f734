// interface_in: serial audio receiver of the DAC (bus slave).
//
// Receives bclk / lrclk / sdata in I2S, left-justified or right-justified format with
// 16-, 20- or 24-bit words (see serout_ad for the bit placement of each format) and
// delivers one left/right sample pair per frame, i.e. at fs = 48 kHz.
//
// The three bus lines are brought into the clk domain by two-flop synchronizers; a
// rising edge of the synchronized bclk samples lrclk and sdata. A change of lrclk
// starts a new slot (bit count 0). Every sampled bit enters a shift register; the
// word is taken W bits after the MSB position (I2S: slot bit W, LJ: slot bit W-1) or,
// for RJ, from the last W bits of the slot when the next slot starts. A pair is
// delivered with a one-clock out_valid pulse once the right word is complete. After
// reset nothing is taken until the first lrclk edge, so a partial slot is ignored.
//
// Output format: the W-bit word, sign-extended and shifted so that its MSB lands on
// bit 30 of a 32-bit word (full scale is 2^30, one bit of headroom for the
// interpolation filters' overshoot). The DSM uses the 24 MSBs of this word, so a
// full-scale serial input drives the modulator to half its full scale.
// Requires bclk low and high phases of at least two clk periods each.
// Formats, word lengths, 48 kHz output and 32-bit output word follow the design
// description; synchronizers, bit alignment and headroom are this design's choice.
module interface_in
  import sdm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  audio_fmt_e         fmt,
  input  wlen_e              wlen,
  input  logic               bclk,
  input  logic               lrclk,
  input  logic               sdata,
  output logic               out_valid,
  output logic signed [31:0] dout_l,
  output logic signed [31:0] dout_r
);

  logic [2:0]  bclk_s;             // two sync stages + previous value
  logic [1:0]  lr_s, sd_s;
  logic        lr_prev;
  logic        synced;             // an lrclk edge has been seen since reset
  logic [5:0]  bitcnt;             // bit index within the slot
  logic [31:0] shreg;
  logic signed [31:0] word_l;

  logic        rise;
  logic [31:0] sh_next;
  logic        new_slot;
  logic        is_left_now, is_left_prev;
  int unsigned wb;

  assign rise         = bclk_s[1] & ~bclk_s[2];
  assign sh_next      = {shreg[30:0], sd_s[1]};
  assign new_slot     = (lr_s[1] != lr_prev);
  assign is_left_now  = (fmt == FMT_I2S) ? ~lr_s[1] : lr_s[1];
  assign is_left_prev = (fmt == FMT_I2S) ? ~lr_prev : lr_prev;
  assign wb           = wlen_bits(wlen);

  // Sign-extend the low wb bits of a shift register image, MSB to bit 30.
  function automatic logic signed [31:0] align(logic [31:0] raw, int unsigned w);
    return signed'(raw << (32 - w)) >>> 1;  // MSB to bit 31, then to bit 30
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bclk_s    <= '0;
      lr_s      <= '0;
      sd_s      <= '0;
      lr_prev   <= 1'b0;
      synced    <= 1'b0;
      bitcnt    <= '0;
      shreg     <= '0;
      word_l    <= '0;
      out_valid <= 1'b0;
      dout_l    <= '0;
      dout_r    <= '0;
    end else begin
      out_valid <= 1'b0;
      bclk_s    <= {bclk_s[1:0], bclk};
      lr_s      <= {lr_s[0], lrclk};
      sd_s      <= {sd_s[0], sdata};
      if (rise) begin
        lr_prev <= lr_s[1];
        shreg   <= sh_next;
        if (new_slot) synced <= 1'b1;
        bitcnt  <= new_slot ? 6'd1 : ((bitcnt == 6'd63) ? bitcnt : bitcnt + 6'd1);
        if (fmt == FMT_RJ) begin
          // the word that just ended is the last wb bits before this edge
          if (new_slot && synced) begin
            if (is_left_prev) word_l <= align(shreg, wb);
            else begin
              dout_l    <= word_l;
              dout_r    <= align(shreg, wb);
              out_valid <= 1'b1;
            end
          end
        end else begin
          // index of the bit sampled now within its slot
          if ((new_slot || synced) &&
              (new_slot ? 6'd0 : bitcnt) == 6'(wb - ((fmt == FMT_LJ) ? 1 : 0))) begin
            if (is_left_now) word_l <= align(sh_next, wb);
            else begin
              dout_l    <= word_l;
              dout_r    <= align(sh_next, wb);
              out_valid <= 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
