// tb_serout_ad: self-checking test of the serial audio transmitter.
// For each of the nine format / word-length combinations a random sample pair is
// loaded (left: any 32-bit value, so clipping happens; right: within +/-2^30) and
// the bus is decoded here from the bclk rising edges: a slot starts where
// lrclk changes, and the word is read from the slot according to the format's own
// definition (I2S: bits 1..W, LJ: bits 0..W-1, RJ: bits 32-W..31, lrclk low = left for
// I2S, high for the others). Checks both words, that all other slot bits are 0, the
// 32-bit slot length and the bclk period of 8 master clocks.
module tb_serout_ad;
  import sdm_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  audio_fmt_e fmt = FMT_I2S;
  wlen_e      wlen = WLEN_24;
  logic signed [31:0] din_l = 0, din_r = 0;
  logic bclk, lrclk, sdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  serout_ad dut (.*);

  logic        bits [64];
  int          nbits = 0;
  logic        lr_prev = 0, bclk_d = 0;
  logic        slot_lr;
  longint      cyc = 0, t_rise = 0;
  int          words_checked = 0;
  bit          armed = 0;
  logic [31:0] exp_l, exp_r;

  function automatic int W();
    return (wlen == WLEN_16) ? 16 : (wlen == WLEN_20) ? 20 : 24;
  endfunction

  // the transmitted part: bits [30 -: W] after clipping to +/-2^30
  function automatic logic [31:0] clip(logic [31:0] v);
    if (v[31] != v[30]) return v[31] ? 32'h8000_0000 : 32'h7fff_ffff;
    return {v[30:0], 1'b0};
  endfunction

  task automatic check_slot(logic lr, int n);
    logic [31:0] got, want;
    logic        is_left;
    int          first, w;
    w = W();
    is_left = (fmt == FMT_I2S) ? !lr : lr;
    first = (fmt == FMT_I2S) ? 1 : (fmt == FMT_LJ) ? 0 : 32 - w;
    got = 0;
    for (int i = 0; i < w; i++) got = {got[30:0], bits[first + i]};
    want = clip(is_left ? exp_l : exp_r) >> (32 - w);
    checks += 3;
    if (got != want) begin
      failures++;
      $display("fmt %0d w %0d %s: got %h want %h", fmt, w, is_left ? "L" : "R", got, want);
    end
    if (n != 32) begin failures++; $display("slot of %0d bits", n); end
    for (int i = 0; i < 32; i++)
      if ((i < first || i >= first + w) && bits[i] !== 1'b0) begin
        failures++; $display("stray bit %0d", i); break;
      end
    words_checked++;
  endtask

  always @(posedge clk) begin
    cyc++;
    bclk_d <= bclk;
    if (bclk && !bclk_d && rst_n) begin
      if (t_rise != 0 && armed) begin
        checks++;
        if (cyc - t_rise != 8) begin failures++; $display("bclk period %0d", cyc - t_rise); end
      end
      t_rise = cyc;
      if (lrclk != lr_prev) begin
        if (armed) check_slot(lr_prev, nbits);
        nbits = 0;
      end
      if (nbits < 64) bits[nbits] = sdata;
      nbits++;
      lr_prev = lrclk;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++)
      for (int w = 0; w < 3; w++) begin
        @(negedge clk);
        armed = 0;
        fmt = audio_fmt_e'(f); wlen = wlen_e'(w);
        in_valid = 1; din_l = $urandom; din_r = 32'(int'($urandom) >>> 1);
        exp_l = din_l; exp_r = din_r;
        @(negedge clk);
        in_valid = 0;
        repeat (1100) @(negedge clk);   // let two frames pass with the new setting
        armed = 1;
        repeat (1024) @(negedge clk);
      end
    checks++;
    if (words_checked < 30) begin failures++; $display("only %0d words", words_checked); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
