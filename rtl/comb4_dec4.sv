// comb4_dec4: 4th-order comb (CIC) decimator, rate 128fs in, 32fs out, one channel.
//
// Implements the first factor of the ADC decimation filter,
//   H1(z) = ((1 - z^-4) / (1 - z^-1))^4,
// followed by decimation by 4. The input is the 1-bit output of the analog modulator,
// read as +1 (bit = 1) or -1 (bit = 0). It is built in the usual recursive form: four
// integrators at the input rate, a decimate-by-4 sampler, and four combs
// (differential delay 1) at the output rate. Arithmetic is two's complement and wraps,
// which is exact for a CIC as long as the register width covers the output range:
// the DC gain is 4^4 = 256, so the output lies in [-256, 256] and needs OW = 10 bits.
//
// Interface: in_valid marks a new input bit (one per 128fs tick). out_valid pulses on
// the clock after every fourth input, with the new output in dout. Latency from the
// fourth input bit to out_valid is one clock.
// The transfer function, the order, the factor 4 and the rates follow the design
// description; the recursive structure and the widths are this design's choice.
module comb4_dec4 #(
  parameter int unsigned ORDER = 4,
  parameter int unsigned R     = 4,
  parameter int unsigned OW    = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 din,
  output logic                 out_valid,
  output logic signed [OW-1:0] dout
);

  logic signed [OW-1:0] integ [ORDER];
  logic signed [OW-1:0] comb_d [ORDER];
  logic signed [OW-1:0] comb_v [ORDER+1];
  logic [$clog2(R)-1:0] phase;
  logic signed [OW-1:0] x;
  logic signed [OW-1:0] integ_next [ORDER];

  assign x = din ? OW'(1) : -OW'(1);

  always_comb begin
    integ_next[0] = integ[0] + x;
    for (int i = 1; i < ORDER; i++) integ_next[i] = integ[i] + integ_next[i-1];
  end

  // Comb section evaluated on the decimated sample.
  always_comb begin
    comb_v[0] = integ_next[ORDER-1];
    for (int i = 0; i < ORDER; i++) comb_v[i+1] = comb_v[i] - comb_d[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ORDER; i++) begin
        integ[i]  <= '0;
        comb_d[i] <= '0;
      end
      phase     <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int i = 0; i < ORDER; i++) integ[i] <= integ_next[i];
        phase <= (phase == $clog2(R)'(R - 1)) ? '0 : phase + 1'b1;
        if (phase == $clog2(R)'(R - 1)) begin
          for (int i = 0; i < ORDER; i++) comb_d[i] <= comb_v[i];
          dout      <= comb_v[ORDER];
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
