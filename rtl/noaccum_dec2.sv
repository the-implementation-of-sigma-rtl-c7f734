// noaccum_dec2: cascade of ORDER non-recursive (1 + z^-1) sections, then decimation
// by 2, one channel.
//
// The ADC decimation filter factors ((1 - z^-8)/(1 - z^-4))^5 and
// ((1 - z^-16)/(1 - z^-8))^7 become, at the rate where they are applied,
// (1 + z^-1)^5 at 32fs and (1 + z^-1)^7 at 16fs. Each section needs only one delay
// register and one adder (no accumulator, hence the name). The instance with ORDER = 5
// takes 32fs samples and gives 16fs; the one with ORDER = 7 takes 16fs and gives 8fs.
// The DC gain is 2^ORDER, so the output is ORDER bits wider than the input.
//
// Interface: in_valid marks a new input sample. All sections advance on every input;
// every second input is passed on: out_valid pulses on the next clock with dout.
// Order, structure and decimation factor follow the design description; the choice of
// which of the two input phases is kept and the register widths are this design's own.
module noaccum_dec2 #(
  parameter int unsigned ORDER = 5,
  parameter int unsigned IW    = 10,
  parameter int unsigned OW    = IW + ORDER
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] din,
  output logic                 out_valid,
  output logic signed [OW-1:0] dout
);

  // stage_in[i] is the input of section i, stage_in[ORDER] the cascade output.
  logic signed [OW-1:0] stage_in [ORDER+1];
  logic signed [OW-1:0] dly [ORDER];
  logic                 phase;

  always_comb begin
    stage_in[0] = OW'(din);
    for (int i = 0; i < ORDER; i++) stage_in[i+1] = stage_in[i] + dly[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ORDER; i++) dly[i] <= '0;
      phase     <= 1'b0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int i = 0; i < ORDER; i++) dly[i] <= stage_in[i];
        phase <= ~phase;
        if (phase) begin
          dout      <= stage_in[ORDER];
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
