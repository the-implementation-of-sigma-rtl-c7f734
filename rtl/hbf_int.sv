// hbf_int: one two-channel interpolate-by-2 half-band FIR stage of the DAC.
//
// The DAC raises the 48 kHz input to 8fs with three of these stages in cascade
// (48k -> 96k -> 192k -> 384k). Each doubles the rate by zero stuffing and low-pass
// filtering, computed in polyphase form so that the stuffed zeros cost nothing:
//   y[2m+p][ch] = 2 * sum_{j=0}^{NTAPS/2-1} c_{2j+p} * x[ch][m-j],   p = 0, 1.
// The factor 2 restores the gain lost to zero stuffing. The stage owns its sample
// buffers, coefficient table and accumulator but not the multiplier: it raises mul_req
// while it has a product to form, drives the operands on mul_a / mul_b, and
// accumulates mul_p in every clock in which mul_gnt is high. This lets the three DAC
// stages share one 32 x 24 multiplier (dac_interp). On every input pair it computes
// phase 0 for left then right, then phase 1 for left then right (NTAPS granted clocks
// in all).
//
// Timing: inputs must come every IN_PERIOD clocks. The outputs do not depend on how
// often the multiplier was granted: phase 0 is presented with an out_valid pulse
// exactly OUT_DELAY clocks after the input was taken, phase 1 exactly IN_PERIOD/2
// clocks later, so the outputs are evenly spaced at twice the input rate. Assertions
// check that each result is ready by its slot (the grant was sufficient) and that no
// input arrives while a computation is pending.
// The 32-bit data, 24-bit coefficients, 2x interpolation per stage and the shared
// multiplier follow the design description; the tap counts, coefficient values
// (sdm_pkg::hb_coef_table), fixed output slots, rounding and saturation are this
// design's own choices.
module hbf_int
  import sdm_pkg::*;
#(
  parameter int unsigned NTAPS     = 116,  // even
  parameter int unsigned IN_PERIOD = 512,  // clocks between input pairs
  parameter int unsigned OUT_DELAY = IN_PERIOD / 2 - 8,  // input to phase-0 output
  parameter int unsigned DW        = 32,
  parameter int unsigned CW        = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] din_l,
  input  logic signed [DW-1:0] din_r,
  output logic                 out_valid,
  output logic signed [DW-1:0] dout_l,
  output logic signed [DW-1:0] dout_r,
  // shared multiplier
  output logic                 mul_req,
  input  logic                 mul_gnt,
  output logic signed [DW-1:0] mul_a,
  output logic signed [CW-1:0] mul_b,
  input  logic signed [DW+CW-1:0] mul_p
);

  localparam int unsigned M     = NTAPS / 2;           // taps per polyphase branch
  localparam int unsigned PW    = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned AW    = DW + CW + $clog2(M) + 2;
  localparam int unsigned SHIFT = CW - 2;              // gain of 2
  localparam int unsigned HALF  = IN_PERIOD / 2;
  localparam int unsigned TW    = $clog2(IN_PERIOD) + 1;
  localparam int unsigned SLOT1 = OUT_DELAY + HALF;
  localparam coef_table_t COEF  = hb_coef_table(NTAPS, CW);

  typedef enum logic [1:0] {IDLE, MAC0, MAC1} state_e;
  state_e state;

  logic signed [DW-1:0] buf_l [M];
  logic signed [DW-1:0] buf_r [M];
  logic [PW-1:0]        wp, newest, j;
  logic                 ch;
  logic [TW-1:0]        timer;       // clocks since the input was taken
  logic                 running;     // output slots still to come
  logic signed [DW-1:0] p0_l, p0_r;  // results waiting for their output slot
  logic signed [DW-1:0] p1_l, p1_r;

  logic [PW-1:0]        rd_pos;
  logic signed [DW-1:0] sample;
  logic signed [CW-1:0] coef;
  logic                 ph;

  assign ph = (state == MAC1);

  always_comb begin
    rd_pos = (newest >= j) ? newest - j : PW'(M) - j + newest;
    sample = ch ? buf_r[rd_pos] : buf_l[rd_pos];
    coef   = CW'(COEF[2 * int'(j) + int'(ph)]);
  end

  logic signed [DW+CW-1:0] product;
  assign mul_req = (state != IDLE) && !in_valid;
  assign mul_a   = sample;
  assign mul_b   = coef;
  assign product = mul_p;

  logic signed [AW-1:0] acc, acc_next, rounded;
  logic signed [DW-1:0] result;
  localparam logic signed [AW-1:0] OMAX = AW'((64'sd1 <<< (DW - 1)) - 1);
  localparam logic signed [AW-1:0] OMIN = -AW'(64'sd1 <<< (DW - 1));

  always_comb begin
    acc_next = acc + AW'(product);
    rounded  = (acc_next + (AW'(1) <<< (SHIFT - 1))) >>> SHIFT;
    if (rounded > OMAX)      result = OMAX[DW-1:0];
    else if (rounded < OMIN) result = OMIN[DW-1:0];
    else                     result = rounded[DW-1:0];
  end

  logic last_tap;
  assign last_tap = (j == PW'(M - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) begin
        buf_l[i] <= '0;
        buf_r[i] <= '0;
      end
      state     <= IDLE;
      wp        <= '0;
      newest    <= '0;
      j         <= '0;
      ch        <= 1'b0;
      timer     <= '0;
      running   <= 1'b0;
      acc       <= '0;
      p0_l      <= '0;
      p0_r      <= '0;
      p1_l      <= '0;
      p1_r      <= '0;
      out_valid <= 1'b0;
      dout_l    <= '0;
      dout_r    <= '0;
    end else begin
      out_valid <= 1'b0;
      // output slots, fixed relative to the input
      if (running) begin
        timer <= timer + 1'b1;
        if (timer == TW'(OUT_DELAY)) begin
          dout_l    <= p0_l;
          dout_r    <= p0_r;
          out_valid <= 1'b1;
        end
        if (timer == TW'(SLOT1)) begin
          dout_l    <= p1_l;
          dout_r    <= p1_r;
          out_valid <= 1'b1;
          running   <= 1'b0;
        end
      end
      if (in_valid) begin
        buf_l[wp] <= din_l;
        buf_r[wp] <= din_r;
        wp        <= (wp == PW'(M - 1)) ? '0 : wp + 1'b1;
        newest    <= wp;
        state     <= MAC0;
        ch        <= 1'b0;
        j         <= '0;
        acc       <= '0;
        timer     <= TW'(1);
        running   <= 1'b1;
      end else if (mul_gnt && state != IDLE) begin
        if (last_tap) begin
          j   <= '0;
          acc <= '0;
          ch  <= ~ch;
          if (state == MAC0) begin
            if (!ch) p0_l <= result;
            else begin
              p0_r  <= result;
              state <= MAC1;
            end
          end else begin
            if (!ch) p1_l <= result;
            else begin
              p1_r  <= result;
              state <= IDLE;
            end
          end
        end else begin
          j   <= j + 1'b1;
          acc <= acc_next;
        end
      end
    end
  end

  a_no_overrun : assert property (@(posedge clk) disable iff (!rst_n)
                                  in_valid |-> state == IDLE && !running)
    else $error("hbf_int: input arrived before the previous one was fully processed");
  a_phase0_ready : assert property (@(posedge clk) disable iff (!rst_n)
                                    running && timer == TW'(OUT_DELAY) |-> state != MAC0)
    else $error("hbf_int: phase 0 not finished by its output slot");
  a_phase1_ready : assert property (@(posedge clk) disable iff (!rst_n)
                                    running && timer == TW'(SLOT1) |-> state == IDLE)
    else $error("hbf_int: phase 1 not finished by its output slot");
  a_grant : assert property (@(posedge clk) disable iff (!rst_n) mul_gnt |-> mul_req)
    else $error("hbf_int: multiplier granted without a request");

endmodule
