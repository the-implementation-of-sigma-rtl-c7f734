// tb_dsm5_snr: in-band signal-to-noise measurement of the fifth-order CIFB modulator.
//
// Two dsm5_cifb instances, one single-bit and one 4-bit, get the same sine of 0.5 of
// full scale (-6 dBFS), one sample per x_valid, with exactly 19 periods in the
// measured record of N = 16384 outputs. The testbench windows each output record with
// a Hann window and computes its DFT directly over the audio band, bins 1 to
// N/(2*128) = 64 (oversampling ratio 128). Signal power is taken from bins 17..21,
// noise from the remaining in-band bins. The first 2048 outputs are discarded as
// settling time.
// Checks for both quantizers: the in-band SNR is at least 130 dB (a floating-point model
// of the same loop and the same measurement gives 139.8 dB single-bit), and the
// recovered sine amplitude is 0.5 within 1 % (unity signal transfer). A watchdog ends
// the run if outputs stop.
module tb_dsm5_snr;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int N      = 16384;
  localparam int SETTLE = 2048;
  localparam int KSIG   = 19;
  localparam int NB     = N / (2 * 128);
  localparam real AMP   = 0.5;
  localparam real TWO_PI = 6.283185307179586;

  logic               xv = 0;
  logic signed [31:0] xn = 0;
  logic               b1, b4;
  logic [3:0]         c1, c4;

  dsm5_cifb dut1 (.clk, .rst_n, .multibit(1'b0), .x_valid(xv), .xn(xn),
                  .y_bit(b1), .y_code(c1));
  dsm5_cifb dut4 (.clk, .rst_n, .multibit(1'b1), .x_valid(xv), .xn(xn),
                  .y_bit(b4), .y_code(c4));

  real y1 [N], y4 [N], cs [N], sn [N];

  // power spectrum over the audio band and the resulting figures
  task automatic measure(input int sel, output real snr_db, output real amp);
    real re, im, w, v, p, sig, noise;
    int  idx;
    sig = 0; noise = 0;
    for (int k = 1; k < NB; k++) begin
      re = 0; im = 0;
      for (int n = 0; n < N; n++) begin
        w   = 0.5 - 0.5 * cs[n];
        v   = (sel == 0) ? y1[n] : y4[n];
        idx = (k * n) % N;
        re += w * v * cs[idx];
        im -= w * v * sn[idx];
      end
      p = re * re + im * im;
      if (k >= KSIG - 2 && k <= KSIG + 2) sig += p;
      else noise += p;
    end
    snr_db = 10.0 * $log10(sig / noise);
    // Hann window: the sine's power spreads as 1, 1/4, 1/4 over three bins
    amp = $sqrt(sig * 16.0 / (1.5 * real'(N) * real'(N)));
  endtask

  initial begin
    real s1, a1, s4, a4;
    for (int n = 0; n < N; n++) begin
      cs[n] = $cos(TWO_PI * real'(n) / real'(N));
      sn[n] = $sin(TWO_PI * real'(n) / real'(N));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < SETTLE + N; t++) begin
      @(negedge clk);
      // input: 0.5 * sin, full scale 2^31 (the modulator reads the 24 MSBs)
      xn = 32'($rtoi(AMP * cs[(KSIG * t + 3 * N / 4) % N] * 2147483648.0));
      xv = 1;
      @(negedge clk);
      xv = 0;
      if (t >= SETTLE) begin
        y1[t - SETTLE] = b1 ? 1.0 : -1.0;
        y4[t - SETTLE] = (2.0 * real'(c4) - 15.0) / 16.0;
      end
    end
    measure(0, s1, a1);
    measure(1, s4, a4);
    $display("single-bit: SNR %0.1f dB, amplitude %0.4f", s1, a1);
    $display("4-bit:      SNR %0.1f dB, amplitude %0.4f", s4, a4);
    checks += 4;
    if (s1 < 130.0) begin failures++; $display("single-bit SNR too low"); end
    if (s4 < 130.0) begin failures++; $display("4-bit SNR too low"); end
    if (a1 < 0.495 || a1 > 0.505) begin failures++; $display("single-bit gain off"); end
    if (a4 < 0.495 || a4 > 0.505) begin failures++; $display("4-bit gain off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("dsm5_snr: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
