// dsm5_cifb: 5th-order digital sigma-delta modulator, CIFB structure, one channel.
//
// The loop is a chain of five delaying integrators 1/(z-1). The input Xn reaches every
// integrator input through b1..b5 and the quantizer input through b6; the quantized
// output Yn is fed back to every integrator input through -a1..-a5. Two local
// feedback paths form resonators that move noise-transfer zeros into the band:
// -g1 from the output of integrator 3 into integrator 2, and -g2 from the output of
// integrator 5 into integrator 4. One update per x_valid (128fs):
//   s1 += b1*x - a1*y
//   s2 += s1 + b2*x - a2*y - g1*s3
//   s3 += s2 + b3*x - a3*y
//   s4 += s3 + b4*x - a4*y - g2*s5
//   s5 += s4 + b5*x - a5*y
//   v   = s5 + b6*x,   y = Q(v)      (right-hand sides use the old states)
// With b_i = a_i (i <= 5) and b6 = 1 the signal transfer function is 1, so each
// integrator input becomes a_i*(x - y): adding a_i or -a_i scaled by the input is all
// the feedback costs in single-bit mode.
//
// Number format: Xn is 32 bits; its 24 MSBs are used, with 2^23 meaning full scale 1.0.
// Coefficients are 16-bit signed with 15 fraction bits. The states keep the full
// products (scale 2^38 per 1.0) in SW = 48 bits and saturate, so an overloaded loop
// cannot wrap around. The default coefficients realise a noise transfer function with
// maximum gain 1.5, zeros at DC and at 0.54 and 0.91 of the 24 kHz band edge
// (OSR 128); the single-bit loop is stable for inputs up to about 0.6 of full scale.
//
// Quantizer: multibit = 0 gives one bit, y = +1 (y_bit = 1) or -1. multibit = 1 gives
// 16 levels y = (2k-15)/16, k = 0..15 on y_code; y_bit is then the MSB of k. In single-bit
// mode y_code is 15 or 0.
// Outputs change on the clock after x_valid.
// The structure, the 24-bit use of Xn, the 16-bit b coefficients and the single- and
// 4-bit outputs follow the design description; coefficient values, state widths,
// saturation and the 4-bit quantizer levels are this design's own.
module dsm5_cifb #(
  parameter int signed A1 = 22,
  parameter int signed A2 = 333,
  parameter int signed A3 = 2420,
  parameter int signed A4 = 10346,
  parameter int signed A5 = 26456,
  parameter int signed G1 = 6,
  parameter int signed G2 = 16,
  parameter int unsigned SW = 48
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               multibit,
  input  logic               x_valid,
  input  logic signed [31:0] xn,
  output logic               y_bit,
  output logic [3:0]         y_code
);

  localparam int unsigned CF = 15;  // coefficient fraction bits

  logic signed [SW-1:0] s [5];
  logic signed [SW-1:0] s_next [5];
  logic signed [SW-1:0] v;
  logic signed [24:0]   x24;        // 24-bit input, one guard bit
  logic signed [24:0]   yv;         // quantized value, 2^23 = 1.0
  logic signed [25:0]   e;          // x - y
  logic signed [SW-1:0] fb [5];     // a_i * (x - y)
  logic signed [SW-1:0] r1, r2;     // g1*s3, g2*s5
  logic                 q_bit;
  logic [3:0]           q_code;

  localparam logic signed [SW-1:0] SMAX = {1'b0, {(SW-1){1'b1}}};
  localparam logic signed [SW-1:0] SMIN = {1'b1, {(SW-1){1'b0}}};

  function automatic logic signed [SW-1:0] sat_add(logic signed [SW-1:0] a,
                                                   logic signed [SW-1:0] b);
    logic signed [SW:0] sum;
    sum = {a[SW-1], a} + {b[SW-1], b};
    if (sum[SW] != sum[SW-1]) return sum[SW] ? SMIN : SMAX;
    return sum[SW-1:0];
  endfunction

  assign x24 = 25'(signed'(xn[31:8]));

  // Quantizer on v = s5 + x (b6 = 1), x brought to the state scale.
  always_comb begin
    logic signed [SW-1:0] lvl;
    v = sat_add(s[4], SW'(x24) <<< CF);
    q_bit = ~v[SW-1];
    // 16 uniform levels: k = floor(v*8 + 8) clamped to 0..15
    lvl = (v >>> (23 + CF - 3)) + SW'(8);
    if (lvl < 0)           q_code = 4'd0;
    else if (lvl > 15)     q_code = 4'd15;
    else                   q_code = lvl[3:0];
    if (multibit) yv = (25'(signed'({1'b0, q_code})) * 2 - 25'sd15) <<< 19;
    else          yv = q_bit ? 25'sd8388608 : -25'sd8388608;
  end

  always_comb begin
    e     = 26'(x24) - 26'(yv);
    fb[0] = SW'(e) * SW'(A1);
    fb[1] = SW'(e) * SW'(A2);
    fb[2] = SW'(e) * SW'(A3);
    fb[3] = SW'(e) * SW'(A4);
    fb[4] = SW'(e) * SW'(A5);
    r1    = (s[2] * SW'(G1)) >>> CF;
    r2    = (s[4] * SW'(G2)) >>> CF;
    s_next[0] = sat_add(s[0], fb[0]);
    s_next[1] = sat_add(sat_add(s[1], s[0]), sat_add(fb[1], -r1));
    s_next[2] = sat_add(sat_add(s[2], s[1]), fb[2]);
    s_next[3] = sat_add(sat_add(s[3], s[2]), sat_add(fb[3], -r2));
    s_next[4] = sat_add(sat_add(s[4], s[3]), fb[4]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) s[i] <= '0;
      y_bit  <= 1'b0;
      y_code <= '0;
    end else if (x_valid) begin
      for (int i = 0; i < 5; i++) s[i] <= s_next[i];
      if (multibit) begin
        y_bit  <= q_code[3];
        y_code <= q_code;
      end else begin
        y_bit  <= q_bit;
        y_code <= q_bit ? 4'd15 : 4'd0;
      end
    end
  end

endmodule
