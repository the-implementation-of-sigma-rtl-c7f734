// tb_comb4_dec4: self-checking test of the 4th-order comb decimator.
// Random +/-1 bits (plus all-ones and all-zeros runs for the full-scale ends) are
// fed one per 4 clocks; each output is compared with the direct convolution of the
// inputs with the impulse response of ((1-z^-4)/(1-z^-1))^4, computed here by
// convolving four length-4 boxcars, taken at every fourth input. Also checks the
// decimation ratio (one output per four inputs) and the one-clock latency.
module tb_comb4_dec4;
  logic clk = 0, rst_n = 0, in_valid = 0, din = 0;
  logic out_valid;
  logic signed [9:0] dout;
  int checks = 0, failures = 0;

  comb4_dec4 dut (.*);
  always #5 clk = ~clk;

  int h [13];
  int xs [$];
  int n_in = 0, n_out = 0;

  initial begin
    int tmp [13];
    for (int i = 0; i < 13; i++) h[i] = (i < 4) ? 1 : 0;
    repeat (3) begin
      for (int i = 0; i < 13; i++) begin
        tmp[i] = 0;
        for (int j = 0; j < 4; j++) if (i - j >= 0) tmp[i] += h[i - j];
      end
      h = tmp;
    end
  end

  // expected output for the input sample with index n
  function automatic int expect_at(int n);
    int y = 0;
    for (int k = 0; k < 13; k++) if (n - k >= 0) y += h[k] * xs[n - k];
    return y;
  endfunction

  always @(posedge clk) begin
    if (out_valid && rst_n) begin
      int e;
      n_out++;
      e = expect_at(n_in - 1);
      checks++;
      if (dout !== 10'(e) || (n_in % 4) != 0) begin
        failures++;
        $display("comb4 mismatch: n=%0d got %0d expected %0d", n_in, dout, e);
      end
    end
  end

  task automatic send(logic b);
    @(negedge clk);
    in_valid = 1; din = b;
    xs.push_back(b ? 1 : -1);
    @(negedge clk);
    in_valid = 0;
    n_in++;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) send(1'($urandom));
    for (int i = 0; i < 40; i++) send(1'b1);
    for (int i = 0; i < 40; i++) send(1'b0);
    for (int i = 0; i < 400; i++) send(($urandom % 4) != 0);
    repeat (8) @(negedge clk);
    checks++;
    if (n_out != n_in / 4) begin
      failures++;
      $display("comb4: %0d outputs for %0d inputs", n_out, n_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("comb4: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
