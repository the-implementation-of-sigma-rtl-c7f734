// mux_sel: source select for the DAC serial input.
//
// The DAC can play either the ADC's own serial output (loopback) or an external
// serial audio stream. sel = 0 routes the ADC transmitter's bclk / lrclk / sdata to
// the DAC receiver, sel = 1 routes the external pins. Purely combinational. The
// choice of sources follows the design description; the encoding of sel is this
// design's own. Switching sel mid-frame gives the receiver one broken frame.
module mux_sel (
  input  logic sel,
  input  logic adc_bclk,
  input  logic adc_lrclk,
  input  logic adc_sdata,
  input  logic ext_bclk,
  input  logic ext_lrclk,
  input  logic ext_sdata,
  output logic bclk,
  output logic lrclk,
  output logic sdata
);

  always_comb begin
    if (sel) begin
      bclk  = ext_bclk;
      lrclk = ext_lrclk;
      sdata = ext_sdata;
    end else begin
      bclk  = adc_bclk;
      lrclk = adc_lrclk;
      sdata = adc_sdata;
    end
  end

endmodule
