// tb_hbf_int: self-checking test of the two-channel interpolating half-band FIR.
// Runs the first DAC stage (116 taps, input every 512 clocks) and the last one
// (12 taps, input every 128 clocks) on random 32-bit data with a full-scale burst.
// Expected outputs are the zero-stuffed convolution
//   y[2m+p] = 2 * sum_j c_{2j+p} x[m-j]
// with coefficients recomputed by tb_ref_pkg, rounded and saturated to 32 bits.
// The multiplier the stage borrows is modelled here: stage A is granted it in a
// random 60 % of the clocks it asks, stage B in 75 %, so the accumulation stalls
// often. The test checks that results and output times do not change with the
// stalls: two outputs per input, phase 0 exactly OUT_DELAY+1 clocks after the input
// (as seen at the clock edge after out_valid is set) and phase 1 IN_PERIOD/2 later.
// It also checks that a grant only comes with a request.
module tb_hbf_int;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic               a_iv = 0, a_ov, b_iv = 0, b_ov;
  logic signed [31:0] a_l = 0, a_r = 0, a_yl, a_yr, b_l = 0, b_r = 0, b_yl, b_yr;

  logic               a_req, a_gnt, b_req, b_gnt;
  logic signed [31:0] a_ma, b_ma;
  logic signed [23:0] a_mb, b_mb;
  logic signed [55:0] a_mp, b_mp;
  logic               a_coin = 0, b_coin = 0;
  int                 a_stalls = 0, b_stalls = 0;

  hbf_int #(.NTAPS(116), .IN_PERIOD(512)) dut_a (
    .clk, .rst_n, .in_valid(a_iv), .din_l(a_l), .din_r(a_r),
    .out_valid(a_ov), .dout_l(a_yl), .dout_r(a_yr),
    .mul_req(a_req), .mul_gnt(a_gnt), .mul_a(a_ma), .mul_b(a_mb), .mul_p(a_mp));
  hbf_int #(.NTAPS(12), .IN_PERIOD(128)) dut_b (
    .clk, .rst_n, .in_valid(b_iv), .din_l(b_l), .din_r(b_r),
    .out_valid(b_ov), .dout_l(b_yl), .dout_r(b_yr),
    .mul_req(b_req), .mul_gnt(b_gnt), .mul_a(b_ma), .mul_b(b_mb), .mul_p(b_mp));

  // the borrowed multiplier, granted at random
  assign a_gnt = a_req && a_coin;
  assign b_gnt = b_req && b_coin;
  assign a_mp  = 56'(a_ma) * 56'(a_mb);
  assign b_mp  = 56'(b_ma) * 56'(b_mb);
  always @(negedge clk) begin
    a_coin = ($urandom_range(99) < 60);
    b_coin = ($urandom_range(99) < 75);
  end
  always @(posedge clk) if (rst_n) begin
    if (a_req && !a_coin) a_stalls++;
    if (b_req && !b_coin) b_stalls++;
  end

  longint ca [], cb [];
  longint xal [$], xar [$], xbl [$], xbr [$];
  longint cyc = 0, ta = 0, tb_t = 0;
  int     pa = 0, pb = 0, na = 0, nb = 0, sat_seen = 0;

  always @(posedge clk) cyc++;

  // sel: 0/1 = 116-tap left/right, 2/3 = 12-tap left/right
  function automatic longint ref_out(int sel, int p);
    longint acc = 0;
    int nt, n;
    nt = (sel < 2) ? 116 : 12;
    n  = (sel == 0) ? xal.size() - 1 : (sel == 1) ? xar.size() - 1 :
         (sel == 2) ? xbl.size() - 1 : xbr.size() - 1;
    for (int j = 0; j < nt / 2; j++)
      if (n - j >= 0)
        case (sel)
          0: acc += ca[2 * j + p] * xal[n - j];
          1: acc += ca[2 * j + p] * xar[n - j];
          2: acc += cb[2 * j + p] * xbl[n - j];
          default: acc += cb[2 * j + p] * xbr[n - j];
        endcase
    return ref_round_sat(acc, 22, 32);    // gain 2 with 23 fraction bits
  endfunction

  always @(posedge clk) begin
    if (a_ov && rst_n) begin
      longint el, er, lat;
      el = ref_out(0, pa); er = ref_out(1, pa);
      lat = (pa == 0) ? 249 : 249 + 256;
      if (el == 64'sd2147483647 || el == -64'sd2147483648) sat_seen++;
      checks += 3; na++;
      if (longint'(a_yl) != el) begin failures++; $display("A L p%0d %0d vs %0d", pa, a_yl, el); end
      if (longint'(a_yr) != er) begin failures++; $display("A R p%0d %0d vs %0d", pa, a_yr, er); end
      if (cyc - ta != lat) begin failures++; $display("A timing %0d", cyc - ta); end
      pa ^= 1;
    end
    if (b_ov && rst_n) begin
      longint el, er, lat;
      el = ref_out(2, pb); er = ref_out(3, pb);
      lat = (pb == 0) ? 57 : 57 + 64;
      checks += 3; nb++;
      if (longint'(b_yl) != el) begin failures++; $display("B L p%0d %0d vs %0d", pb, b_yl, el); end
      if (longint'(b_yr) != er) begin failures++; $display("B R p%0d %0d vs %0d", pb, b_yr, er); end
      if (cyc - tb_t != lat) begin failures++; $display("B timing %0d", cyc - tb_t); end
      pb ^= 1;
    end
  end

  initial begin
    ca = new[116]; cb = new[12];
    for (int k = 0; k < 116; k++) ca[k] = ref_hb_coef(116, k, 24);
    for (int k = 0; k < 12; k++)  cb[k] = ref_hb_coef(12, k, 24);
  end

  initial begin : drive_b
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      b_iv = 1; b_l = $urandom; b_r = 32'(int'($urandom) >>> 2);
      xbl.push_back(longint'(b_l)); xbr.push_back(longint'(b_r));
      tb_t = cyc + 1;
      @(negedge clk);
      b_iv = 0;
      repeat (126) @(negedge clk);
    end
  end

  initial begin : drive_a
    repeat (3) @(negedge clk);
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      a_iv = 1;
      if (i >= 30 && i < 70) begin
        a_l = (i % 2 != 0) ? 32'sh7fffffff : 32'sh80000000;   // overshoot saturates
        a_r = 32'sh3fffffff;
      end else begin
        a_l = $urandom; a_r = 32'(int'($urandom) >>> 1);
      end
      xal.push_back(longint'(a_l)); xar.push_back(longint'(a_r));
      ta = cyc + 1;
      @(negedge clk);
      a_iv = 0;
      repeat (510) @(negedge clk);
    end
    repeat (600) @(negedge clk);
    checks += 3;
    if (na != 200) begin failures++; $display("A outputs %0d", na); end
    if (nb != 800) begin failures++; $display("B outputs %0d", nb); end
    if (sat_seen == 0) begin failures++; $display("saturation not exercised"); end
    checks += 2;
    if (a_stalls < 1000) begin failures++; $display("A stalls %0d", a_stalls); end
    if (b_stalls < 1000) begin failures++; $display("B stalls %0d", b_stalls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("hbf_int: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
