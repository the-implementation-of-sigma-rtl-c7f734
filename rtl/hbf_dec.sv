// hbf_dec: two-channel decimate-by-2 half-band FIR with one multiplier (ADC side).
//
// One instance is one of the ADC half-band stages HBF_1, HBF_2, HBF_3; it holds the
// three parts the block diagram names for each stage:
//   front - a circular sample buffer per channel and the tap sequencer,
//   mul   - one DW x CW multiplier shared by both channels and all taps,
//   accum - the accumulator, rounding and saturation to OW bits.
// Every input pair (left, right) is written into the buffer. After every second input
// pair the engine computes
//   y[ch] = sum_{k=0}^{NTAPS-1} c_k * x[ch][n-k]
// with one multiply-accumulate per clock, first for the left channel, then for the
// right, so one output pair takes 2*NTAPS clocks. The result is
// (acc + 2^(SHIFT-1)) >>> SHIFT, saturated to OW bits, and both channels are
// presented together with a one-clock out_valid pulse.
//
// Timing: the input period must be longer than 2*NTAPS clocks, because the next
// input overwrites the oldest sample while the engine still reads it; an assertion
// checks this. With the 512fs master clock the stages get inputs every 64 (HBF_1),
// 128 (HBF_2) and 256 (HBF_3) clocks against 24, 44 and 232 clocks of work.
// Tap counts, data and coefficient widths follow the design description; the
// coefficient values (sdm_pkg::hb_coef_table), the rounding, the saturation, the
// serial one-multiplier schedule and the buffer organisation are this design's own.
module hbf_dec
  import sdm_pkg::*;
#(
  parameter int unsigned NTAPS = 12,
  parameter int unsigned DW    = 22,   // input data width
  parameter int unsigned CW    = 16,   // coefficient width (CW-1 fraction bits)
  parameter int unsigned OW    = 32,   // output width
  parameter int unsigned SHIFT = 5     // right shift of the accumulator
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] din_l,
  input  logic signed [DW-1:0] din_r,
  output logic                 out_valid,
  output logic signed [OW-1:0] dout_l,
  output logic signed [OW-1:0] dout_r
);

  localparam int unsigned AW  = DW + CW + $clog2(NTAPS) + 1;  // accumulator width
  localparam int unsigned PW  = $clog2(NTAPS);
  localparam coef_table_t COEF = hb_coef_table(NTAPS, CW);

  // ---- front: sample buffer and sequencer ----
  logic signed [DW-1:0] buf_l [NTAPS];
  logic signed [DW-1:0] buf_r [NTAPS];
  logic [PW-1:0]        wp;          // next write position
  logic [PW-1:0]        newest;      // position of x[n] for the running computation
  logic                 phase;       // decimation phase
  logic                 busy;
  logic                 ch;          // 0 = left, 1 = right
  logic [PW-1:0]        tap;         // k

  logic [PW-1:0]        rd_pos;
  logic signed [DW-1:0] sample;
  logic signed [CW-1:0] coef;

  always_comb begin
    // position of x[n-k] in the circular buffer
    rd_pos = (newest >= tap) ? newest - tap : PW'(NTAPS) - tap + newest;
    sample = ch ? buf_r[rd_pos] : buf_l[rd_pos];
    coef   = CW'(COEF[int'(tap)]);
  end

  // ---- mul ----
  logic signed [DW+CW-1:0] product;
  assign product = sample * coef;

  // ---- accum ----
  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] acc_next;
  logic signed [AW-1:0] rounded;
  logic signed [OW-1:0] result;

  localparam logic signed [AW-1:0] OMAX = AW'((64'sd1 <<< (OW - 1)) - 1);
  localparam logic signed [AW-1:0] OMIN = -AW'(64'sd1 <<< (OW - 1));

  always_comb begin
    acc_next = acc + AW'(product);
    rounded  = (acc_next + (AW'(1) <<< (SHIFT - 1))) >>> SHIFT;
    if (rounded > OMAX)      result = OMAX[OW-1:0];
    else if (rounded < OMIN) result = OMIN[OW-1:0];
    else                     result = rounded[OW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS; i++) begin
        buf_l[i] <= '0;
        buf_r[i] <= '0;
      end
      wp        <= '0;
      newest    <= '0;
      phase     <= 1'b0;
      busy      <= 1'b0;
      ch        <= 1'b0;
      tap       <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      dout_l    <= '0;
      dout_r    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        buf_l[wp] <= din_l;
        buf_r[wp] <= din_r;
        wp        <= (wp == PW'(NTAPS - 1)) ? '0 : wp + 1'b1;
        phase     <= ~phase;
        if (phase) begin
          newest <= wp;
          busy   <= 1'b1;
          ch     <= 1'b0;
          tap    <= '0;
          acc    <= '0;
        end
      end
      if (busy) begin
        if (tap == PW'(NTAPS - 1)) begin
          tap <= '0;
          acc <= '0;
          if (!ch) begin
            dout_l <= result;
            ch     <= 1'b1;
          end else begin
            dout_r    <= result;
            busy      <= 1'b0;
            out_valid <= 1'b1;
          end
        end else begin
          tap <= tap + 1'b1;
          acc <= acc_next;
        end
      end
    end
  end

  // The next input must not arrive before the running computation is done.
  a_no_overrun : assert property (@(posedge clk) disable iff (!rst_n) busy |-> !in_valid)
    else $error("hbf_dec: input arrived while the MAC engine was busy");

endmodule
