// tb_noaccum_dec2: self-checking test of the (1+z^-1)^ORDER decimate-by-2 sections.
// Two instances as used in the ADC (ORDER 5 on 10-bit input, ORDER 7 on 15-bit input)
// get random full-range inputs. Each output is compared with the convolution of the
// inputs with the binomial coefficients C(ORDER, k), at every second input. Also
// checks the decimation ratio.
module tb_noaccum_dec2;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [9:0]  din5 = 0;
  logic signed [14:0] din7 = 0;
  logic               v5, v7;
  logic signed [14:0] y5;
  logic signed [21:0] y7;
  int checks = 0, failures = 0;

  noaccum_dec2 #(.ORDER(5), .IW(10)) dut5 (.clk, .rst_n, .in_valid, .din(din5),
                                          .out_valid(v5), .dout(y5));
  noaccum_dec2 #(.ORDER(7), .IW(15)) dut7 (.clk, .rst_n, .in_valid, .din(din7),
                                          .out_valid(v7), .dout(y7));
  always #5 clk = ~clk;

  longint x5 [$], x7 [$];
  int n_in = 0, n5 = 0, n7 = 0;

  function automatic longint binom(int n, int k);
    longint r = 1;
    for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return r;
  endfunction

  function automatic longint conv(int order, int n);
    longint y = 0;
    for (int k = 0; k <= order; k++)
      if (n - k >= 0) y += binom(order, k) * ((order == 5) ? x5[n - k] : x7[n - k]);
    return y;
  endfunction

  always @(posedge clk) begin
    if (v5 && rst_n) begin
      n5++; checks++;
      if (longint'(y5) != conv(5, n_in - 1) || (n_in % 2) != 0) begin
        failures++; $display("order5 mismatch at %0d: %0d vs %0d", n_in, y5, conv(5, n_in - 1));
      end
    end
    if (v7 && rst_n) begin
      n7++; checks++;
      if (longint'(y7) != conv(7, n_in - 1)) begin
        failures++; $display("order7 mismatch at %0d: %0d vs %0d", n_in, y7, conv(7, n_in - 1));
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      in_valid = 1;
      if (i >= 200 && i < 240) begin
        din5 = 10'sd256; din7 = 15'sd8192;          // full-scale run
      end else begin
        din5 = 10'($urandom_range(0, 512) - 256);
        din7 = 15'($urandom_range(0, 16384) - 8192);
      end
      x5.push_back(longint'(din5));
      x7.push_back(longint'(din7));
      @(negedge clk);
      in_valid = 0;
      n_in++;
    end
    repeat (4) @(negedge clk);
    checks++;
    if (n5 != 300 || n7 != 300) begin
      failures++; $display("output counts %0d %0d", n5, n7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
