// tb_adc_response: frequency response of the complete ADC decimation chain.
//
// Runs the whole design at its default parameters and replaces each analog modulator
// by a behavioural second-order single-bit modulator (real arithmetic, one bit per
// 128fs tick) driven with a sine of 0.5 of full scale. Tones are coherent with a record
// of N = 1024 output samples at fs: tone k lies at k*fs/1024. Two runs, left and right
// at once:
//   run 1  left  k = 21   (984 Hz, passband)       right k = 427 (20.0 kHz, band edge)
//   run 2  left  k = 600  (28.1 kHz, aliases to 19.9 kHz)
//          right k = 1003 (47.0 kHz, aliases to 984 Hz)
// After 128 settling samples the testbench takes a 1024-point DFT of adc_l / adc_r at
// the output bin of the tone, giving the tone's amplitude after decimation.
// The expected amplitude is computed independently from the filter formulas: the comb
// |sin(2w)/(4 sin(w/2))|^4 at 128fs, |cos(w/2)|^5 at 32fs and |cos(w/2)|^7 at 16fs,
// and the three half-band filters' responses from coefficients recomputed by
// tb_ref_pkg, each normalised to a DC gain of 1 (the chain's DC level is checked
// elsewhere). Checks: in the passband the measured amplitude is within 0.05 dB of the
// prediction; for the two aliasing tones (about -60 and -100 dB) it is within 0.5 dB,
// where the modulator noise starts to matter. Also checks one ADC output every 512
// clocks.
module tb_adc_response;
  import sdm_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int  N      = 1024;
  localparam int  SETTLE = 128;
  localparam real PI2    = 6.283185307179586;

  logic adc_bit_l = 0, adc_bit_r = 0;
  logic adc_bclk, adc_lrclk, adc_sdata, adc_valid;
  logic signed [31:0] adc_l, adc_r;
  logic dac_bit_l, dac_bit_r;
  logic [3:0] dac_code_l, dac_code_r;

  sdm_codec_top dut (.clk, .rst_n, .fmt(FMT_I2S), .wlen(WLEN_24), .dac_src_sel(1'b0),
                     .multibit(1'b0), .adc_bit_l, .adc_bit_r,
                     .adc_bclk, .adc_lrclk, .adc_sdata, .adc_valid, .adc_l, .adc_r,
                     .ext_bclk(1'b0), .ext_lrclk(1'b0), .ext_sdata(1'b0),
                     .dac_bit_l, .dac_bit_r, .dac_code_l, .dac_code_r);

  // ---------------- behavioural modulators with sine inputs ----------------
  int     kl = 21, kr = 427;
  longint mt = 0;                       // 128fs tick count
  real    i1l = 0, i2l = 0, i1r = 0, i2r = 0;
  int     tick = 0;
  always @(posedge clk) if (rst_n) begin
    tick <= (tick == 3) ? 0 : tick + 1;
    if (tick == 3) begin
      real yl, yr, xl, xr, ph;
      ph = PI2 * real'(mt % (longint'(N) * 128)) / (real'(N) * 128.0);
      xl = 0.5 * $sin(ph * real'(kl));
      xr = 0.5 * $sin(ph * real'(kr));
      yl = adc_bit_l ? 1.0 : -1.0;
      yr = adc_bit_r ? 1.0 : -1.0;
      i1l = i1l + 0.5 * (xl - yl);  i2l = i2l + 0.5 * (i1l - yl);
      i1r = i1r + 0.5 * (xr - yr);  i2r = i2r + 0.5 * (i1r - yr);
      adc_bit_l <= (i2l >= 0.0);
      adc_bit_r <= (i2r >= 0.0);
      mt++;
    end
  end

  // ---------------- output record ----------------
  real    rec_l [N], rec_r [N];
  int     nrec = -1;                    // < 0: not recording
  longint cyc = 0, t_adc = 0;
  always @(posedge clk) begin
    cyc++;
    if (adc_valid && rst_n) begin
      if (t_adc != 0) begin
        checks++;
        if (cyc - t_adc != 512) begin failures++; $display("adc period %0d", cyc - t_adc); end
      end
      t_adc = cyc;
      if (nrec >= 0 && nrec < N) begin
        rec_l[nrec] = real'(adc_l) / 1073741824.0;
        rec_r[nrec] = real'(adc_r) / 1073741824.0;
        nrec++;
      end
    end
  end

  // ---------------- reference response ----------------
  function automatic real fir_mag(int nt, int cw, real w);
    real re = 0, im = 0;
    for (int k = 0; k < nt; k++) begin
      re += real'(ref_hb_coef(nt, k, cw)) * $cos(w * real'(k));
      im -= real'(ref_hb_coef(nt, k, cw)) * $sin(w * real'(k));
    end
    return $sqrt(re * re + im * im);
  endfunction

  // f in units of fs
  function automatic real chain_mag(real f);
    real w, c, g;
    w = PI2 * f / 128.0;
    c = (w == 0.0) ? 1.0 : $sin(2.0 * w) / (4.0 * $sin(w / 2.0));
    g = c * c * c * c;
    g = g * $pow($cos(PI2 * f / 32.0 / 2.0), 5.0);
    g = g * $pow($cos(PI2 * f / 16.0 / 2.0), 7.0);
    g = g < 0.0 ? -g : g;
    g = g * fir_mag(12, 16, PI2 * f / 8.0) / fir_mag(12, 16, 0.0);
    g = g * fir_mag(22, 16, PI2 * f / 4.0) / fir_mag(22, 16, 0.0);
    g = g * fir_mag(116, 24, PI2 * f / 2.0) / fir_mag(116, 24, 0.0);
    return g;
  endfunction

  function automatic real bin_amp(int ch, int b);
    real re = 0, im = 0, v;
    for (int n = 0; n < N; n++) begin
      v = (ch != 0) ? rec_r[n] : rec_l[n];
      re += v * $cos(PI2 * real'(b * n % N) / real'(N));
      im -= v * $sin(PI2 * real'(b * n % N) / real'(N));
    end
    return 2.0 * $sqrt(re * re + im * im) / real'(N);
  endfunction

  task automatic check_tone(int ch, int k);
    int  b;
    real want, got, dbw, dbg, tol;
    b    = k % N;
    if (b > N / 2) b = N - b;
    want = 0.5 * chain_mag(real'(k) / real'(N));
    got  = bin_amp(ch, b);
    dbw  = 20.0 * $log10(want / 0.5);
    dbg  = 20.0 * $log10(got / 0.5);
    tol  = (dbw > -3.0) ? 0.05 : 0.5;
    $display("tone %0d/1024 fs (%0d Hz) -> bin %0d: measured %0.3f dB, predicted %0.3f dB",
             k, k * 48000 / N, b, dbg, dbw);
    checks++;
    if (dbg - dbw > tol || dbw - dbg > tol) begin
      failures++; $display("  outside %0.2f dB", tol);
    end
  endtask

  task automatic record_run();
    repeat (SETTLE) @(posedge clk iff adc_valid);
    nrec = 0;
    wait (nrec == N);
    nrec = -1;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (SETTLE) @(posedge clk iff adc_valid);
    record_run();
    check_tone(0, 21);
    check_tone(1, 427);
    kl = 600; kr = 1003;
    record_run();
    check_tone(0, 600);
    check_tone(1, 1003);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    failures++;
    $display("adc_response: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
