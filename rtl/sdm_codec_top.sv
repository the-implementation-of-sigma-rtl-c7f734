// sdm_codec_top: two-channel sigma-delta ADC/DAC digital block.
//
// ADC path (per channel, left and right in parallel, half-band stages shared):
//   1-bit modulator stream at 128fs (6.144 MHz)
//   -> comb4_dec4   ((1-z^-4)/(1-z^-1))^4, /4        -> 32fs, 10 bit
//   -> noaccum_dec2 (1+z^-1)^5, /2                   -> 16fs, 15 bit
//   -> noaccum_dec2 (1+z^-1)^7, /2                   ->  8fs, 22 bit
//   -> hbf_dec HBF_1 (12 taps, 22x16), /2            ->  4fs, 32 bit
//   -> hbf_dec HBF_2 (22 taps, 32x16), /2            ->  2fs
//   -> hbf_dec HBF_3 (116 taps, 32x24), /2           ->  fs = 48 kHz
//   -> serout_ad (I2S / LJ / RJ, 16/20/24 bit)       -> adc_bclk, adc_lrclk, adc_sdata
// DAC path:
//   mux_sel (ADC loopback or external serial input)
//   -> interface_in                                  -> 48 kHz, 32 bit
//   -> re-timed to the local fs tick
//   -> dac_interp: hbf_int x3 (116, 22, 12 taps), x2 each,
//      on one shared 32x24 multiplier               -> 384 kHz
//   -> hold16 (16x zero-order hold)                  -> 128fs
//   -> dsm5_cifb, left and right                     -> 1-bit and 4-bit outputs
//
// Clocking: everything runs on one master clock clk = 512fs (24.576 MHz at 48 kHz).
// The 128fs modulator rate is a clock enable every CE_DIV = 4 clocks; every later
// ADC stage is driven by the valid pulse of the stage before it; the DAC chain starts
// from a local fs tick every 512 clocks. The ADC's full scale
// (modulator density 100 %) is 2^30 in the 32-bit result adc_l / adc_r, which are
// brought out together with adc_valid beside the serial output.
// The block structure, rates, filter orders and tap counts follow the design
// description; the master clock, the DAC filter lengths, the coefficients and all
// number formats are this design's own choices (see each module).
module sdm_codec_top
  import sdm_pkg::*;
#(
  parameter int unsigned CE_DIV = 4   // master clocks per 128fs tick
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  audio_fmt_e         fmt,
  input  wlen_e              wlen,
  input  logic               dac_src_sel,   // 0: ADC loopback, 1: external input
  input  logic               multibit,      // DSM quantizer: 0 = 1 bit, 1 = 4 bit
  // ADC modulator bits (from the analog modulators)
  input  logic               adc_bit_l,
  input  logic               adc_bit_r,
  // ADC serial output
  output logic               adc_bclk,
  output logic               adc_lrclk,
  output logic               adc_sdata,
  // ADC parallel result
  output logic               adc_valid,
  output logic signed [31:0] adc_l,
  output logic signed [31:0] adc_r,
  // external DAC serial input
  input  logic               ext_bclk,
  input  logic               ext_lrclk,
  input  logic               ext_sdata,
  // DAC modulator outputs (to the analog reconstruction stage)
  output logic               dac_bit_l,
  output logic               dac_bit_r,
  output logic [3:0]         dac_code_l,
  output logic [3:0]         dac_code_r
);

  // ---------------- 128fs clock enable ----------------
  localparam int unsigned CW_DIV = (CE_DIV > 1) ? $clog2(CE_DIV) : 1;
  localparam int unsigned FRAME  = 128 * CE_DIV;      // master clocks per fs period
  logic [CW_DIV-1:0]          ce_cnt;
  logic                       ce128;
  logic [$clog2(FRAME)-1:0]   frame_cnt;
  logic                       fs_tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ce_cnt    <= '0;
      frame_cnt <= '0;
    end else begin
      ce_cnt    <= (ce_cnt == CW_DIV'(CE_DIV - 1)) ? '0 : ce_cnt + 1'b1;
      frame_cnt <= (frame_cnt == $bits(frame_cnt)'(FRAME - 1)) ? '0 : frame_cnt + 1'b1;
    end
  end
  assign ce128   = (ce_cnt == '0);
  assign fs_tick = (frame_cnt == '0);

  // ---------------- ADC ----------------
  logic                c_v_l, c_v_r;
  logic signed [9:0]   c_l, c_r;
  logic                n5_v_l, n5_v_r;
  logic signed [14:0]  n5_l, n5_r;
  logic                n7_v_l, n7_v_r;
  logic signed [21:0]  n7_l, n7_r;
  logic                h1_v, h2_v;
  logic signed [31:0]  h1_l, h1_r, h2_l, h2_r;

  comb4_dec4 u_comb_l (.clk, .rst_n, .in_valid(ce128), .din(adc_bit_l),
                       .out_valid(c_v_l), .dout(c_l));
  comb4_dec4 u_comb_r (.clk, .rst_n, .in_valid(ce128), .din(adc_bit_r),
                       .out_valid(c_v_r), .dout(c_r));

  noaccum_dec2 #(.ORDER(5), .IW(10)) u_na5_l (.clk, .rst_n, .in_valid(c_v_l), .din(c_l),
                                             .out_valid(n5_v_l), .dout(n5_l));
  noaccum_dec2 #(.ORDER(5), .IW(10)) u_na5_r (.clk, .rst_n, .in_valid(c_v_r), .din(c_r),
                                             .out_valid(n5_v_r), .dout(n5_r));
  noaccum_dec2 #(.ORDER(7), .IW(15)) u_na7_l (.clk, .rst_n, .in_valid(n5_v_l), .din(n5_l),
                                             .out_valid(n7_v_l), .dout(n7_l));
  noaccum_dec2 #(.ORDER(7), .IW(15)) u_na7_r (.clk, .rst_n, .in_valid(n5_v_r), .din(n5_r),
                                             .out_valid(n7_v_r), .dout(n7_r));

  // Both channels advance in lock step, so their valid pulses coincide.
  hbf_dec #(.NTAPS(12), .DW(22), .CW(16), .SHIFT(5)) u_hbf1 (
    .clk, .rst_n, .in_valid(n7_v_l && n7_v_r), .din_l(n7_l), .din_r(n7_r),
    .out_valid(h1_v), .dout_l(h1_l), .dout_r(h1_r));
  hbf_dec #(.NTAPS(22), .DW(32), .CW(16), .SHIFT(15)) u_hbf2 (
    .clk, .rst_n, .in_valid(h1_v), .din_l(h1_l), .din_r(h1_r),
    .out_valid(h2_v), .dout_l(h2_l), .dout_r(h2_r));
  hbf_dec #(.NTAPS(116), .DW(32), .CW(24), .SHIFT(23)) u_hbf3 (
    .clk, .rst_n, .in_valid(h2_v), .din_l(h2_l), .din_r(h2_r),
    .out_valid(adc_valid), .dout_l(adc_l), .dout_r(adc_r));

  serout_ad #(.BCLK_HALF(CE_DIV)) u_serout (
    .clk, .rst_n, .fmt, .wlen, .in_valid(adc_valid), .din_l(adc_l), .din_r(adc_r),
    .bclk(adc_bclk), .lrclk(adc_lrclk), .sdata(adc_sdata));

  // ---------------- DAC ----------------
  logic               s_bclk, s_lrclk, s_sdata;
  logic               if_v, i3_v, hx_v;
  logic signed [31:0] if_l, if_r, i3_l, i3_r, hx_l, hx_r;
  logic signed [31:0] fs_l, fs_r;

  // The receiver delivers a pair whenever a frame completes, at a point that depends
  // on the format. The interpolation chain needs exactly periodic inputs, so the
  // latest pair is re-timed to the local fs tick (the serial source must run at the
  // same fs as the master clock; otherwise samples are repeated or dropped).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs_l <= '0;
      fs_r <= '0;
    end else if (if_v) begin
      fs_l <= if_l;
      fs_r <= if_r;
    end
  end

  mux_sel u_mux (.sel(dac_src_sel),
                 .adc_bclk, .adc_lrclk, .adc_sdata,
                 .ext_bclk, .ext_lrclk, .ext_sdata,
                 .bclk(s_bclk), .lrclk(s_lrclk), .sdata(s_sdata));

  interface_in u_if (.clk, .rst_n, .fmt, .wlen, .bclk(s_bclk), .lrclk(s_lrclk),
                     .sdata(s_sdata), .out_valid(if_v), .dout_l(if_l), .dout_r(if_r));

  dac_interp #(.IN_PERIOD(128 * CE_DIV)) u_interp (
    .clk, .rst_n, .in_valid(fs_tick), .din_l(fs_l), .din_r(fs_r),
    .out_valid(i3_v), .dout_l(i3_l), .dout_r(i3_r));

  hold16 #(.REPEAT(16), .CE_DIV(CE_DIV)) u_hold (
    .clk, .rst_n, .in_valid(i3_v), .din_l(i3_l), .din_r(i3_r),
    .x_valid(hx_v), .x_l(hx_l), .x_r(hx_r));

  dsm5_cifb u_dsm_l (.clk, .rst_n, .multibit, .x_valid(hx_v), .xn(hx_l),
                     .y_bit(dac_bit_l), .y_code(dac_code_l));
  dsm5_cifb u_dsm_r (.clk, .rst_n, .multibit, .x_valid(hx_v), .xn(hx_r),
                     .y_bit(dac_bit_r), .y_code(dac_code_r));

endmodule
