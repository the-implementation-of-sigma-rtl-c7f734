// tb_hold16: self-checking test of the 16x zero-order hold.
// New random sample pairs arrive every 64 clocks; the test checks that exactly 16
// x_valid pulses, 4 clocks apart, carry each pair, the first one clock after in_valid.
module tb_hold16;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [31:0] din_l = 0, din_r = 0, x_l, x_r;
  logic x_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hold16 dut (.*);

  logic signed [31:0] cur_l, cur_r;
  longint cyc = 0, t_in = 0, t_last = 0;
  int pulses = 0, samples = 0;

  always @(posedge clk) begin
    cyc++;
    if (x_valid && rst_n) begin
      checks++;
      if (x_l !== cur_l || x_r !== cur_r) begin
        failures++; $display("hold value wrong at pulse %0d", pulses);
      end
      if (pulses == 0 ? (cyc - t_in != 1) : (cyc - t_last != 4)) begin
        failures++; $display("hold pulse spacing wrong: %0d", pulses);
      end
      t_last = cyc;
      pulses++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 100; i++) begin
      in_valid = 1; din_l = $urandom; din_r = $urandom;
      cur_l = din_l; cur_r = din_r;
      @(negedge clk);
      t_in = cyc;
      pulses = 0;
      in_valid = 0;
      repeat (63) @(negedge clk);
      checks++;
      if (pulses != 16) begin failures++; $display("sample %0d: %0d pulses", i, pulses); end
      samples++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
