// tb_dsm5_cifb: self-checking test of the 5th-order CIFB modulator.
// A cycle-accurate reference model, written here in 64-bit integer arithmetic from
// the difference equations, runs beside the DUT; every output bit / code is compared.
// Stimuli: a sine at 0.5 of full scale in single-bit mode, the same in 4-bit mode, and
// DC levels whose output averages over 4096 samples must match the input to within
// 1 % of full scale (the basic property of a stable modulator). A final overload at
// full scale drives the states into saturation, which the model mirrors.
module tb_dsm5_cifb;
  logic clk = 0, rst_n = 0, multibit = 0, x_valid = 0;
  logic signed [31:0] xn = 0;
  logic y_bit;
  logic [3:0] y_code;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dsm5_cifb dut (.*);

  // ---- reference model ----
  localparam longint SMAXR = (64'sd1 <<< 47) - 1;
  localparam longint SMINR = -(64'sd1 <<< 47);
  longint st [5];
  int     sat_hits = 0;

  function automatic longint sat(longint v);
    if (v > SMAXR) begin sat_hits++; return SMAXR; end
    if (v < SMINR) begin sat_hits++; return SMINR; end
    return v;
  endfunction

  // One step; returns the expected code (single bit: 15 or 0).
  function automatic int model_step(longint x32, bit mb);
    longint a [5] = '{22, 333, 2420, 10346, 26456};
    longint x, v, y, e, n1, n2, n3, n4, n5;
    int k;
    x = x32 >>> 8;                              // 24 MSBs, 2^23 = 1.0
    v = sat(st[4] + (x <<< 15));
    k = int'((v >>> 35) + 8);        // floor(v * 8) + 8 with v at 2^38 per 1.0
    if (k < 0) k = 0;
    if (k > 15) k = 15;
    if (mb) y = longint'(2 * k - 15) * 524288;
    else    y = (v >= 0) ? 8388608 : -8388608;
    e  = x - y;
    n1 = sat(st[0] + a[0] * e);
    n2 = sat(sat(st[1] + st[0]) + sat(a[1] * e - ((st[2] * 6) >>> 15)));
    n3 = sat(sat(st[2] + st[1]) + a[2] * e);
    n4 = sat(sat(st[3] + st[2]) + sat(a[3] * e - ((st[4] * 16) >>> 15)));
    n5 = sat(sat(st[4] + st[3]) + a[4] * e);
    st[0] = n1; st[1] = n2; st[2] = n3; st[3] = n4; st[4] = n5;
    return mb ? k : ((v >= 0) ? 15 : 0);
  endfunction

  real acc_y;
  int  nsamp;

  task automatic step(longint x32, bit mb);
    int exp_code;
    @(negedge clk);
    multibit = mb; xn = 32'(x32); x_valid = 1;
    exp_code = model_step(x32, mb);
    @(negedge clk);
    x_valid = 0;
    checks++;
    if (y_code !== 4'(exp_code) || y_bit !== (mb ? exp_code[3] : (exp_code != 0))) begin
      failures++;
      if (failures < 10) $display("dsm mismatch: code %0d expected %0d mb %0d n %0d x %0d", y_code, exp_code, mb, nsamp, x32);
    end
    acc_y += mb ? (2.0 * y_code - 15.0) / 16.0 : (y_bit ? 1.0 : -1.0);
    nsamp++;
    repeat (2) @(negedge clk);
  endtask

  task automatic dc_test(real level, bit mb);
    for (int i = 0; i < 5; i++) st[i] = 0;
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < 512; i++) step(longint'(level * 2147483648.0), mb);
    acc_y = 0; nsamp = 0;
    for (int i = 0; i < 4096; i++) step(longint'(level * 2147483648.0), mb);
    checks++;
    if (acc_y / nsamp - level > 0.01 || level - acc_y / nsamp > 0.01) begin
      failures++;
      $display("dc %f mode %0d: mean %f", level, mb, acc_y / nsamp);
    end
  endtask

  initial begin
    for (int i = 0; i < 5; i++) st[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++)
      step(longint'(0.5 * 2147483648.0 * $sin(2.0 * 3.141592653589793 * i / 300.0)), 1'b0);
    for (int i = 0; i < 3000; i++)
      step(longint'(0.8 * 2147483648.0 * $sin(2.0 * 3.141592653589793 * i / 300.0)), 1'b1);
    dc_test(0.3, 1'b0);
    dc_test(-0.45, 1'b0);
    dc_test(0.7, 1'b1);
    // overload: full-scale DC drives the single-bit loop unstable, states saturate
    for (int i = 0; i < 3000; i++) step(64'sd2147483647, 1'b0);
    checks++;
    if (sat_hits == 0) begin failures++; $display("saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("dsm: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
