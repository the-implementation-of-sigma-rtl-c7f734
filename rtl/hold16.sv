// hold16: zero-order hold that raises the DAC sample rate 16 times, 8fs to 128fs.
//
// Each 32-bit sample pair that arrives (in_valid, every 64 clocks at the 512fs master
// clock) is stored and then offered REPEAT times to the modulator: x_valid pulses
// every CE_DIV clocks with the held value on x_l / x_r, the first pulse on the
// clock after in_valid; no pulse is given before the first sample. The hold keeps repeating the last sample if no new one comes,
// and restarts its count when one does; `reps` counts the pulses given for the
// current sample, and an assertion checks that a new sample arrives only once
// all REPEAT pulses of the previous one are out.
// The 16x repeat follows the design description; the pulse spacing comes from the
// 512fs master clock, which is this design's choice.
module hold16 #(
  parameter int unsigned REPEAT = 16,
  parameter int unsigned CE_DIV = 4,
  parameter int unsigned DW     = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] din_l,
  input  logic signed [DW-1:0] din_r,
  output logic                 x_valid,
  output logic signed [DW-1:0] x_l,
  output logic signed [DW-1:0] x_r
);

  localparam int unsigned DWID = (CE_DIV > 1) ? $clog2(CE_DIV) : 1;
  logic [DWID-1:0]             div;
  logic [$clog2(REPEAT+1)-1:0] reps;
  logic                        started;   // a first sample has arrived

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div     <= '0;
      reps    <= '0;
      started <= 1'b0;
      x_valid <= 1'b0;
      x_l     <= '0;
      x_r     <= '0;
    end else begin
      x_valid <= 1'b0;
      if (in_valid) begin
        x_l     <= din_l;
        x_r     <= din_r;
        div     <= DWID'(1);
        reps    <= $bits(reps)'(1);
        started <= 1'b1;
        x_valid <= 1'b1;
      end else if (started) begin
        div <= (div == DWID'(CE_DIV - 1)) ? '0 : div + 1'b1;
        if (div == '0) begin
          x_valid <= 1'b1;
          if (reps != $bits(reps)'(REPEAT)) reps <= reps + 1'b1;
          else reps <= $bits(reps)'(1);
        end
      end
    end
  end

  a_full_hold : assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid |-> !started || reps == $bits(reps)'(REPEAT))
    else $error("hold16: new sample before %0d repeats of the previous one", REPEAT);

endmodule
