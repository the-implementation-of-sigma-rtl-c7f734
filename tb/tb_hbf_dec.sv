// tb_hbf_dec: self-checking test of the two-channel decimating half-band FIR.
// Runs the HBF_1 configuration (12 taps, 22-bit data, 16-bit coefficients, >>5) and
// the HBF_3 configuration (116 taps, 32-bit data, 24-bit coefficients, >>23) on
// random data with inputs every 64 (HBF_1) and 256 (HBF_3) clocks, as in the design.
// A full-scale burst drives the saturation. Expected outputs come from a direct
// convolution with coefficients recomputed by tb_ref_pkg. Also checks one output per
// two inputs and the latency of 2*NTAPS+1 clocks from the second input.
module tb_hbf_dec;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // ---- HBF_1 configuration ----
  logic               a_iv = 0, a_ov;
  logic signed [21:0] a_l = 0, a_r = 0;
  logic signed [31:0] a_yl, a_yr;
  hbf_dec #(.NTAPS(12), .DW(22), .CW(16), .OW(32), .SHIFT(5)) dut_a (
    .clk, .rst_n, .in_valid(a_iv), .din_l(a_l), .din_r(a_r),
    .out_valid(a_ov), .dout_l(a_yl), .dout_r(a_yr));

  // ---- HBF_3 configuration ----
  logic               b_iv = 0, b_ov;
  logic signed [31:0] b_l = 0, b_r = 0;
  logic signed [31:0] b_yl, b_yr;
  hbf_dec #(.NTAPS(116), .DW(32), .CW(24), .OW(32), .SHIFT(23)) dut_b (
    .clk, .rst_n, .in_valid(b_iv), .din_l(b_l), .din_r(b_r),
    .out_valid(b_ov), .dout_l(b_yl), .dout_r(b_yr));

  longint xal [$], xar [$], xbl [$], xbr [$];
  int na_out = 0, nb_out = 0, sat_seen = 0;
  longint ta, tb_t, cyc = 0;

  always @(posedge clk) cyc++;

  // sel: 0 = HBF_1 left, 1 = HBF_1 right, 2 = HBF_3 left, 3 = HBF_3 right
  function automatic longint fir(int sel);
    longint acc = 0;
    int nt, n;
    nt = (sel < 2) ? 12 : 116;
    n  = (sel == 0) ? xal.size() - 1 : (sel == 1) ? xar.size() - 1 :
         (sel == 2) ? xbl.size() - 1 : xbr.size() - 1;
    for (int k = 0; k < nt; k++)
      if (n - k >= 0)
        case (sel)
          0: acc += cad[k] * xal[n - k];
          1: acc += cad[k] * xar[n - k];
          2: acc += cbd[k] * xbl[n - k];
          default: acc += cbd[k] * xbr[n - k];
        endcase
    return (sel < 2) ? ref_round_sat(acc, 5, 32) : ref_round_sat(acc, 23, 32);
  endfunction

  longint cad [], cbd [];

  always @(posedge clk) begin
    if (a_ov && rst_n) begin
      longint el, er;
      el = fir(0);
      er = fir(1);
      na_out++; checks += 3;
      if (longint'(a_yl) != el) begin failures++; $display("A L %0d vs %0d", a_yl, el); end
      if (longint'(a_yr) != er) begin failures++; $display("A R %0d vs %0d", a_yr, er); end
      if (cyc - ta != 2 * 12 + 1) begin failures++; $display("A latency %0d", cyc - ta); end
    end
    if (b_ov && rst_n) begin
      longint el, er;
      el = fir(2);
      er = fir(3);
      if (el == 64'sd2147483647 || el == -64'sd2147483648) sat_seen++;
      nb_out++; checks += 3;
      if (longint'(b_yl) != el) begin failures++; $display("B L %0d vs %0d", b_yl, el); end
      if (longint'(b_yr) != er) begin failures++; $display("B R %0d vs %0d", b_yr, er); end
      if (cyc - tb_t != 2 * 116 + 1) begin failures++; $display("B latency %0d", cyc - tb_t); end
    end
  end

  initial begin
    cad = new[12]; cbd = new[116];
    for (int k = 0; k < 12; k++) cad[k] = ref_hb_coef(12, k, 16);
    for (int k = 0; k < 116; k++) cbd[k] = ref_hb_coef(116, k, 24);
  end

  initial begin : drive_a
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      a_iv = 1;
      a_l = 22'($urandom_range(0, 2 * 1048576) - 1048576);
      a_r = 22'($urandom_range(0, 2 * 1048576) - 1048576);
      xal.push_back(longint'(a_l)); xar.push_back(longint'(a_r));
      ta = cyc + 1;
      @(negedge clk);
      a_iv = 0;
      repeat (62) @(negedge clk);
    end
  end

  initial begin : drive_b
    repeat (3) @(negedge clk);
    for (int i = 0; i < 160; i++) begin
      @(negedge clk);
      b_iv = 1;
      if (i >= 60 && i < 120) begin
        // alternating full-scale input: the filter's overshoot saturates
        b_l = (i % 6 < 3) ? 32'sh7fffffff : 32'sh80000000;
        b_r = 32'sh40000000;
      end else begin
        b_l = $urandom; b_r = 32'(int'($urandom) >>> 1);
      end
      xbl.push_back(longint'(b_l)); xbr.push_back(longint'(b_r));
      tb_t = cyc + 1;
      @(negedge clk);
      b_iv = 0;
      repeat (254) @(negedge clk);
    end
    repeat (300) @(negedge clk);
    checks += 3;
    if (na_out != 100) begin failures++; $display("A outputs %0d", na_out); end
    if (nb_out != 80)  begin failures++; $display("B outputs %0d", nb_out); end
    if (sat_seen == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("hbf_dec: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
