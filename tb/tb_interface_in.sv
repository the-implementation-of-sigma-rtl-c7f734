// tb_interface_in: self-checking test of the serial audio receiver.
// The testbench generates the serial bus itself (64 bit clocks per frame, data and
// lrclk changing on the falling bclk edge) for all nine format / word-length
// combinations, with bclk periods of 8 and 14 master clocks, and random words. Each
// delivered pair must equal the sent words, sign-extended with the MSB on bit 30.
// Also checks one out_valid per frame.
module tb_interface_in;
  import sdm_pkg::*;
  logic clk = 0, rst_n = 0;
  audio_fmt_e fmt = FMT_I2S;
  wlen_e      wlen = WLEN_24;
  logic bclk = 0, lrclk = 0, sdata = 0;
  logic out_valid;
  logic signed [31:0] dout_l, dout_r;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  interface_in dut (.*);

  logic [23:0] q_l [$], q_r [$];
  int nframes_sent = 0, nout = 0;
  bit armed = 0;

  function automatic logic signed [31:0] expect_word(logic [23:0] w, int n);
    longint v;
    v = longint'(w) & ((64'sd1 <<< n) - 1);
    if (v >= (64'sd1 <<< (n - 1))) v -= (64'sd1 <<< n);   // sign of the n-bit word
    return 32'(v * (64'sd1 <<< (31 - n)));
  endfunction

  always @(posedge clk) begin
    if (out_valid && armed) begin
      logic [23:0] wl, wr;
      int n;
      n = (wlen == WLEN_16) ? 16 : (wlen == WLEN_20) ? 20 : 24;
      nout++;
      checks += 2;
      if (q_l.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        wl = q_l.pop_front(); wr = q_r.pop_front();
        if (dout_l !== expect_word(wl, n)) begin
          failures++; $display("fmt %0d n %0d L: %h vs %h", fmt, n, dout_l, expect_word(wl, n));
        end
        if (dout_r !== expect_word(wr, n)) begin
          failures++; $display("fmt %0d n %0d R: %h vs %h", fmt, n, dout_r, expect_word(wr, n));
        end
      end
    end
  end

  // One bit period: falling edge with new lrclk / data, then rising edge.
  task automatic send_bit(logic lr, logic d, int half);
    bclk = 0; lrclk = lr; sdata = d;
    repeat (half) @(negedge clk);
    bclk = 1;
    repeat (half) @(negedge clk);
  endtask

  task automatic send_frame(logic [23:0] wl, logic [23:0] wr, int half, bit record);
    int n, first;
    logic left_lr;
    n = (wlen == WLEN_16) ? 16 : (wlen == WLEN_20) ? 20 : 24;
    first = (fmt == FMT_I2S) ? 1 : (fmt == FMT_LJ) ? 0 : 32 - n;
    left_lr = (fmt == FMT_I2S) ? 1'b0 : 1'b1;
    if (record) begin q_l.push_back(wl); q_r.push_back(wr); end
    for (int ch = 0; ch < 2; ch++)
      for (int b = 0; b < 32; b++) begin
        logic d;
        int idx;
        idx = n - 1 - (b - first);
        d = (b >= first && b < first + n) ? (ch == 0 ? wl[idx] : wr[idx]) : 1'b0;
        send_bit(ch == 0 ? left_lr : ~left_lr, d, half);
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++)
      for (int w = 0; w < 3; w++)
        for (int h = 4; h <= 7; h += 3) begin
          fmt = audio_fmt_e'(f); wlen = wlen_e'(w);
          q_l.delete(); q_r.delete();
          rst_n = 0;                             // start each setting from reset
          repeat (2) @(negedge clk);
          rst_n = 1;
          armed = 1;
          // the last bit of a preceding right slot, as on a running bus
          send_bit((fmt == FMT_I2S) ? 1'b1 : 1'b0, 1'b0, h);
          for (int i = 0; i < 6; i++) begin
            logic [23:0] a, b;
            a = 24'($urandom); b = 24'($urandom);
            if (i == 0) begin a = 24'h800000 >> (24 - ((w == 0) ? 16 : (w == 1) ? 20 : 24)); b = 24'h7fffff; end
            send_frame(a, b, h, 1);
            nframes_sent++;
          end
          // one bit of the next frame: the lrclk edge that completes an RJ word
          send_bit((fmt == FMT_I2S) ? 1'b0 : 1'b1, 1'b0, h);
          bclk = 0;
          repeat (4) @(negedge clk);
          checks++;
          if (q_l.size() != 0) begin failures++; $display("%0d pairs never delivered", q_l.size()); end
        end
    checks++;
    if (nout != nframes_sent) begin failures++; $display("%0d outputs for %0d frames", nout, nframes_sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
