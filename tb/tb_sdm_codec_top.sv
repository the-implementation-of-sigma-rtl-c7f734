// tb_sdm_codec_top: end-to-end test of the two-channel sigma-delta ADC/DAC block at its
// default parameters (512fs master clock, 116/22/12-tap half-band filters).
//
// The analog ADC modulators are replaced by a behavioural second-order single-bit
// modulator per channel (real arithmetic, one bit per 128fs tick) fed with DC levels.
// Four phases exercise the modes:
//   A  DAC from ADC loopback, I2S, 24 bit, single-bit DSM
//   B  DAC from ADC loopback, left-justified, 20 bit, 4-bit DSM
//   C  DAC from ADC loopback, right-justified, 16 bit, single-bit DSM, new ADC levels
//   D  DAC from the external serial input (LJ, 24 bit) driven by the testbench, 4-bit DSM
// Checks:
//   - adc_valid comes every 512 clocks (48 kHz) and the settled ADC result equals the
//     modulator's DC level times 2^30 within 0.3 % of full scale;
//   - every pair the DAC receiver delivers in loopback is one of the last three ADC
//     results cut to the word length (MSB of the word on bit 30), and in phase D the
//     externally sent words;
//   - the settled DSM output density (1-bit: +/-1, 4-bit: (2k-15)/16) equals the DAC
//     input level within 1 % of full scale.
// Each mode (three formats, three word lengths, both sources, both quantizers) is
// counted and must have been checked at least once, and so must the sharing of the
// DAC interpolator's multiplier (clocks in which two stages ask for it at once).
module tb_sdm_codec_top;
  import sdm_pkg::*;
  logic clk = 0, rst_n = 0;
  audio_fmt_e fmt = FMT_I2S;
  wlen_e      wlen = WLEN_24;
  logic dac_src_sel = 0, multibit = 0;
  logic adc_bit_l = 0, adc_bit_r = 0;
  logic adc_bclk, adc_lrclk, adc_sdata, adc_valid;
  logic signed [31:0] adc_l, adc_r;
  logic ext_bclk = 0, ext_lrclk = 0, ext_sdata = 0;
  logic dac_bit_l, dac_bit_r;
  logic [3:0] dac_code_l, dac_code_r;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sdm_codec_top dut (.*);

  // ---------------- behavioural analog modulators ----------------
  real lvl_l = 0.25, lvl_r = -0.4;
  real i1l = 0, i2l = 0, i1r = 0, i2r = 0;
  int  tick = 0;
  always @(posedge clk) begin
    tick <= (tick == 3) ? 0 : tick + 1;
    if (tick == 3) begin
      real yl, yr;
      yl = adc_bit_l ? 1.0 : -1.0;
      yr = adc_bit_r ? 1.0 : -1.0;
      i1l = i1l + 0.5 * (lvl_l - yl);  i2l = i2l + 0.5 * (i1l - yl);
      i1r = i1r + 0.5 * (lvl_r - yr);  i2r = i2r + 0.5 * (i1r - yr);
      adc_bit_l <= (i2l >= 0.0);
      adc_bit_r <= (i2r >= 0.0);
    end
  end

  // ---------------- ADC result checks ----------------
  longint cyc = 0, t_adc = 0;
  logic signed [31:0] hist_l [$], hist_r [$];
  bit check_adc = 0;
  int n_adc = 0;
  always @(posedge clk) begin
    cyc++;
    if (adc_valid && rst_n) begin
      if (t_adc != 0) begin
        checks++;
        if (cyc - t_adc != 512) begin failures++; $display("adc period %0d", cyc - t_adc); end
      end
      t_adc = cyc;
      hist_l.push_back(adc_l); hist_r.push_back(adc_r);
      if (hist_l.size() > 3) begin void'(hist_l.pop_front()); void'(hist_r.pop_front()); end
      if (check_adc) begin
        real el, er;
        el = real'(adc_l) / 1073741824.0;
        er = real'(adc_r) / 1073741824.0;
        n_adc++;
        checks += 2;
        if (el - lvl_l > 0.003 || lvl_l - el > 0.003) begin failures++; $display("ADC L %f want %f", el, lvl_l); end
        if (er - lvl_r > 0.003 || lvl_r - er > 0.003) begin failures++; $display("ADC R %f want %f", er, lvl_r); end
      end
    end
  end

  // ---------------- DAC receiver checks ----------------
  int n_fmt [3], n_wlen [3], n_src [2], n_mb [2];
  int n_share = 0;
  always @(posedge clk) if (rst_n && $countones(dut.u_interp.req) > 1) n_share++;
  logic signed [31:0] ext_l = 0, ext_r = 0;   // 32-bit images of the external words
  bit check_rx = 0;
  int n_rx = 0;

  function automatic logic signed [31:0] cut(logic signed [31:0] v, int w);
    logic [31:0] c;
    if (v[31] != v[30]) c = v[31] ? 32'h8000_0000 : 32'h7fff_ffff;
    else c = {v[30:0], 1'b0};
    c = c & ~((32'h1 << (32 - w)) - 1);            // keep the W sent bits
    return signed'(c) >>> 1;                       // MSB back on bit 30
  endfunction

  always @(posedge clk) begin
    if (dut.if_v && check_rx) begin
      int w;
      bit ok_l, ok_r;
      w = (wlen == WLEN_16) ? 16 : (wlen == WLEN_20) ? 20 : 24;
      ok_l = 0; ok_r = 0;
      if (dac_src_sel) begin
        // the external words are sent as plain 32-bit serial words, MSB first
        ok_l = (dut.if_l == (signed'(ext_l & ~((32'h1 << (32 - w)) - 1)) >>> 1));
        ok_r = (dut.if_r == (signed'(ext_r & ~((32'h1 << (32 - w)) - 1)) >>> 1));
      end else
        for (int i = 0; i < hist_l.size(); i++) begin
          if (dut.if_l == cut(hist_l[i], w)) ok_l = 1;
          if (dut.if_r == cut(hist_r[i], w)) ok_r = 1;
        end
      checks += 2; n_rx++;
      if (!ok_l || !ok_r) begin
        failures++;
        $display("receiver fmt %0d w %0d src %0d: %h %h", fmt, w, dac_src_sel, dut.if_l, dut.if_r);
      end
    end
  end

  // ---------------- external serial source (LJ) ----------------
  bit ext_run = 0;
  initial begin
    forever begin
      if (!ext_run) @(negedge clk);
      else
        for (int b = 0; b < 64; b++) begin
          logic [31:0] wd;
          wd = (b < 32) ? ext_l : ext_r;
          ext_bclk = 0;
          ext_lrclk = (b < 32);
          ext_sdata = wd[31 - (b % 32)];
          repeat (4) @(negedge clk);
          ext_bclk = 1;
          repeat (4) @(negedge clk);
        end
    end
  end

  // ---------------- DSM density measurement ----------------
  task automatic measure_dac(real want_l, real want_r, int n);
    real sl, sr;
    sl = 0; sr = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk iff dut.hx_v);
      @(negedge clk);
      if (multibit) begin
        sl += (2.0 * dac_code_l - 15.0) / 16.0;
        sr += (2.0 * dac_code_r - 15.0) / 16.0;
      end else begin
        sl += dac_bit_l ? 1.0 : -1.0;
        sr += dac_bit_r ? 1.0 : -1.0;
      end
    end
    sl /= n; sr /= n;
    checks += 2;
    if (sl - want_l > 0.01 || want_l - sl > 0.01) begin failures++; $display("DAC L %f want %f", sl, want_l); end
    if (sr - want_r > 0.01 || want_r - sr > 0.01) begin failures++; $display("DAC R %f want %f", sr, want_r); end
    n_fmt[int'(fmt)]++; n_wlen[int'(wlen)]++; n_src[dac_src_sel]++; n_mb[multibit]++;
  endtask

  task automatic frames(int n);
    repeat (n * 512) @(negedge clk);
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    // A: ADC settles (modulator, comb chain and 116-tap filter), loopback I2S 24
    frames(150);
    check_adc = 1; check_rx = 1;
    frames(10);
    measure_dac(lvl_l / 2.0, lvl_r / 2.0, 8192);
    // B: LJ 20 bit, 4-bit quantizer
    check_rx = 0;
    fmt = FMT_LJ; wlen = WLEN_20; multibit = 1;
    frames(2);
    check_rx = 1;
    frames(130);
    measure_dac(lvl_l / 2.0, lvl_r / 2.0, 8192);
    // C: RJ 16 bit, single bit, new analog levels
    check_rx = 0; check_adc = 0;
    fmt = FMT_RJ; wlen = WLEN_16; multibit = 0;
    lvl_l = -0.5; lvl_r = 0.1;
    frames(150);
    check_rx = 1; check_adc = 1;
    frames(10);
    measure_dac(lvl_l / 2.0, lvl_r / 2.0, 8192);
    // D: external LJ 24-bit source, 4-bit quantizer
    check_rx = 0;
    ext_l = 32'sh4ccc_cccc;   //  0.6 of serial full scale
    ext_r = 32'shd999_999a;   // -0.3
    ext_run = 1;
    fmt = FMT_LJ; wlen = WLEN_24; multibit = 1; dac_src_sel = 1;
    frames(3);
    check_rx = 1;
    frames(130);
    measure_dac(0.3, -0.15, 8192);
    check_rx = 0;

    checks++;
    if (n_adc < 20 || n_rx < 200) begin
      failures++; $display("too few results: adc %0d rx %0d", n_adc, n_rx);
    end
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (n_fmt[i] == 0)  begin failures++; $display("format %0d never used", i); end
      if (n_wlen[i] == 0) begin failures++; $display("word length %0d never used", i); end
    end
    for (int i = 0; i < 2; i++) begin
      checks += 2;
      if (n_src[i] == 0) begin failures++; $display("source %0d never used", i); end
      if (n_mb[i] == 0)  begin failures++; $display("quantizer %0d never used", i); end
    end
    checks++;
    if (n_share == 0) begin failures++; $display("DAC multiplier never contended"); end
    $display("modes: fmt %0d/%0d/%0d wlen %0d/%0d/%0d src %0d/%0d mb %0d/%0d; adc %0d rx %0d",
             n_fmt[0], n_fmt[1], n_fmt[2], n_wlen[0], n_wlen[1], n_wlen[2],
             n_src[0], n_src[1], n_mb[0], n_mb[1], n_adc, n_rx);
    $display("DAC multiplier contention: %0d clocks", n_share);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000000;
    failures++;
    $display("top: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
