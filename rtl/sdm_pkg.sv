// sdm_pkg: types, constants and the half-band coefficient generator shared by the
// two-channel sigma-delta ADC/DAC digital block.
//
// Serial audio formats (I2S, left-justified, right-justified) and word lengths
// (16/20/24 bit) are the modes the design supports for both the ADC serial output and
// the DAC serial input. Their binary encodings are this design's own choice.
//
// hb_coef_table() computes the FIR coefficients of the half-band filters at
// elaboration time. Only the tap counts (12, 22, 116) and coefficient widths (16, 16,
// 24 bit) come from the design description; the values are this design's own: a
// windowed-sinc low-pass with its cutoff at a quarter of the filter's input rate
// (the half-band point), Hamming window, scaled to a DC gain of exactly 1.0 before
// rounding:
//   t_k = k - (N-1)/2,  h_k = sin(pi*t_k/2)/(pi*t_k) * (0.54 - 0.46*cos(2*pi*k/(N-1)))
//   c_k = round(h_k / sum(h) * 2^(CW-1))
package sdm_pkg;

  // Serial audio interface format.
  typedef enum logic [1:0] {
    FMT_I2S = 2'd0,   // lrclk low = left, MSB one bclk after the lrclk edge
    FMT_LJ  = 2'd1,   // lrclk high = left, MSB on the first bclk of the slot
    FMT_RJ  = 2'd2    // lrclk high = left, LSB on the last bclk of the slot
  } audio_fmt_e;

  // Serial word length.
  typedef enum logic [1:0] {
    WLEN_16 = 2'd0,
    WLEN_20 = 2'd1,
    WLEN_24 = 2'd2
  } wlen_e;

  // Bits per channel slot on the serial bus (bclk = 64 fs).
  localparam int unsigned SLOT_BITS = 32;

  // Word length in bits for a wlen_e code (24 for the reserved code).
  function automatic int unsigned wlen_bits(wlen_e w);
    case (w)
      WLEN_16: return 16;
      WLEN_20: return 20;
      default: return 24;
    endcase
  endfunction

  // Largest supported tap count, bounds the coefficient table type.
  localparam int unsigned MAX_TAPS = 128;
  typedef int coef_table_t [MAX_TAPS];

  localparam real PI = 3.14159265358979323846;

  // Coefficients c_0..c_{ntaps-1} of an ntaps-tap half-band low-pass, signed
  // integers with cw-1 fractional bits (DC gain 1.0). Entries past ntaps are 0.
  function automatic coef_table_t hb_coef_table(int ntaps, int cw);
    coef_table_t c;
    real h [MAX_TAPS];
    real sum, tk, win, scaled;
    sum = 0.0;
    for (int k = 0; k < MAX_TAPS; k++) begin
      h[k] = 0.0;
      c[k] = 0;
    end
    for (int k = 0; k < ntaps; k++) begin
      tk  = k - (ntaps - 1) / 2.0;
      win = 0.54 - 0.46 * $cos(2.0 * PI * k / (ntaps - 1));
      h[k] = (tk == 0.0) ? 0.5 * win : $sin(PI * tk / 2.0) / (PI * tk) * win;
      sum += h[k];
    end
    for (int k = 0; k < ntaps; k++) begin
      scaled = h[k] / sum * (2.0 ** (cw - 1));
      c[k] = $rtoi(scaled >= 0.0 ? scaled + 0.5 : scaled - 0.5);
    end
    return c;
  endfunction

endpackage
