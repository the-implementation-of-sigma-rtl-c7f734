// tb_mux_sel: exhaustive test of the DAC source select (all 128 input combinations).
module tb_mux_sel;
  logic sel, adc_bclk, adc_lrclk, adc_sdata, ext_bclk, ext_lrclk, ext_sdata;
  logic bclk, lrclk, sdata;
  int checks = 0, failures = 0;

  mux_sel dut (.*);

  initial begin
    for (int i = 0; i < 128; i++) begin
      {sel, adc_bclk, adc_lrclk, adc_sdata, ext_bclk, ext_lrclk, ext_sdata} = 7'(i);
      #1;
      checks++;
      if ({bclk, lrclk, sdata} !== (sel ? 3'(i) : 3'(i >> 3))) begin
        failures++; $display("mux wrong for %b", 7'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
