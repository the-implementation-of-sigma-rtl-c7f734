// tb_dac_interp: self-checking test of the DAC's three-stage interpolator that shares
// one multiplier among its stages.
//
// Drives 64 random stereo input pairs, one every 512 clocks (the 512fs master clock at
// 48 kHz), at mixed amplitudes including full-scale words that make the first stage
// saturate. The expected 8x output is computed here, before the run, by three
// independent zero-stuffed convolutions
//   y[2m+p] = round(2 * sum_j c_{2j+p} x[m-j]), saturated to 32 bits,
// with coefficients recomputed by tb_ref_pkg. The test checks every output pair, that
// output n appears exactly 427 + 64 n clocks after the first input (fixed slots of
// 248, 120 and 56 clocks plus one register per stage), that stages asked for the
// multiplier at the same time (contention) and that stage 1 was held off, and that
// over the run each stage was granted exactly 2 NTAPS products per input (two
// phases of NTAPS/2 taps for each of two channels).
module tb_dac_interp;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int NIN = 64;

  logic               iv = 0, ov;
  logic signed [31:0] xl = 0, xr = 0, yl, yr;

  dac_interp dut (.clk, .rst_n, .in_valid(iv), .din_l(xl), .din_r(xr),
                  .out_valid(ov), .dout_l(yl), .dout_r(yr));

  longint s0l [$], s0r [$], s1l [$], s1r [$], s2l [$], s2r [$], s3l [$], s3r [$];
  longint c1 [], c2 [], c3 [];
  longint cyc = 0, t0 = 0;
  int     nout = 0, contention = 0, held1 = 0, sat_seen = 0;
  int     ngnt [3] = '{0, 0, 0};
  int     nin_st [3] = '{0, 0, 0};

  always @(posedge clk) cyc++;

  // one interpolation stage of the reference: sel 0..2 picks source and destination
  task automatic ref_stage(int sel, int nt);
    longint a, n;
    int     len;
    len = (sel == 0) ? s0l.size() : (sel == 1) ? s1l.size() : s2l.size();
    for (int m = 0; m < len; m++)
      for (int p = 0; p < 2; p++)
        for (int ch = 0; ch < 2; ch++) begin
          a = 0;
          for (int j = 0; j < nt / 2; j++)
            if (m - j >= 0) begin
              case (sel)
                0: n = (ch != 0) ? s0r[m - j] : s0l[m - j];
                1: n = (ch != 0) ? s1r[m - j] : s1l[m - j];
                default: n = (ch != 0) ? s2r[m - j] : s2l[m - j];
              endcase
              case (sel)
                0: a += c1[2 * j + p] * n;
                1: a += c2[2 * j + p] * n;
                default: a += c3[2 * j + p] * n;
              endcase
            end
          a = ref_round_sat(a, 22, 32);
          if (sel == 0 && (a == 64'sd2147483647 || a == -64'sd2147483648)) sat_seen++;
          case (sel)
            0: if (ch != 0) s1r.push_back(a); else s1l.push_back(a);
            1: if (ch != 0) s2r.push_back(a); else s2l.push_back(a);
            default: if (ch != 0) s3r.push_back(a); else s3l.push_back(a);
          endcase
        end
  endtask

  always @(posedge clk) if (rst_n) begin
    if ($countones(dut.req) > 1) contention++;
    if (dut.req[0] && !dut.gnt[0]) held1++;
    for (int k = 0; k < 3; k++) if (dut.gnt[k]) ngnt[k]++;
    if (dut.u_st1.in_valid) nin_st[0]++;
    if (dut.u_st2.in_valid) nin_st[1]++;
    if (dut.u_st3.in_valid) nin_st[2]++;
  end

  always @(posedge clk) if (ov && rst_n) begin
    checks += 3;
    if (nout < s3l.size()) begin
      if (longint'(yl) != s3l[nout]) begin
        failures++; $display("out %0d L %0d vs %0d", nout, yl, s3l[nout]);
      end
      if (longint'(yr) != s3r[nout]) begin
        failures++; $display("out %0d R %0d vs %0d", nout, yr, s3r[nout]);
      end
    end else failures++;
    if (cyc - t0 != 427 + 64 * longint'(nout)) begin
      failures++; $display("out %0d at %0d", nout, cyc - t0);
    end
    nout++;
  end

  initial begin
    c1 = new[116]; c2 = new[22]; c3 = new[12];
    for (int k = 0; k < 116; k++) c1[k] = ref_hb_coef(116, k, 24);
    for (int k = 0; k < 22; k++)  c2[k] = ref_hb_coef(22, k, 24);
    for (int k = 0; k < 12; k++)  c3[k] = ref_hb_coef(12, k, 24);
    for (int i = 0; i < NIN; i++) begin
      logic signed [31:0] l, r;
      if (i >= 20 && i < 28) begin
        l = (i % 2 != 0) ? 32'sh7fffffff : 32'sh80000000;
        r = -32'sh20000000;
      end else begin
        l = $urandom;
        r = 32'(int'($urandom) >>> (i % 8));
      end
      s0l.push_back(longint'(l)); s0r.push_back(longint'(r));
    end
    ref_stage(0, 116);
    ref_stage(1, 22);
    ref_stage(2, 12);

    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < NIN; i++) begin
      iv = 1; xl = 32'(s0l[i]); xr = 32'(s0r[i]);
      if (i == 0) t0 = cyc + 1;
      @(negedge clk);
      iv = 0;
      repeat (511) @(negedge clk);
    end
    repeat (600) @(negedge clk);
    checks += 7;
    if (nout != 8 * NIN) begin failures++; $display("outputs %0d", nout); end
    if (sat_seen == 0) begin failures++; $display("saturation not exercised"); end
    if (contention == 0) begin failures++; $display("no contention"); end
    if (held1 == 0) begin failures++; $display("stage 1 never held off"); end
    if (ngnt[0] != 232 * nin_st[0]) begin failures++; $display("stage 1 grants %0d", ngnt[0]); end
    if (ngnt[1] != 44 * nin_st[1]) begin failures++; $display("stage 2 grants %0d", ngnt[1]); end
    if (ngnt[2] != 24 * nin_st[2]) begin failures++; $display("stage 3 grants %0d", ngnt[2]); end
    $display("contention cycles %0d, stage-1 stalls %0d", contention, held1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("dac_interp: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
