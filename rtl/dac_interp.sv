// dac_interp: the DAC's 8x interpolator, three half-band stages on one multiplier.
//
// Raises the two-channel 48 kHz input to 8fs (384 kHz) with three hbf_int stages in
// cascade (NTAPS1 = 116, NTAPS2 = 22, NTAPS3 = 12 taps, each 2x). All three share a
// single 32 x 24 signed multiplier. Each stage requests it while it has products to
// form; a fixed-priority arbiter grants it to one stage per clock, the stage with the
// shortest input period first (stage 3, then 2, then 1), and routes that stage's
// operands to the multiplier. The product goes back to all stages; only the granted
// one accumulates it. Per 48 kHz frame and channel the stages need
// 116 + 2*22 + 4*12 = 208 products, so the two channels take 416 of the 512 clocks
// and the multiplier is busy about 80 % of the time.
//
// Interface and timing: in_valid with din_l / din_r every IN_PERIOD clocks (one
// 48 kHz frame of the 512fs master clock). out_valid pulses every IN_PERIOD/8
// clocks with the interpolated pair on dout_l / dout_r, at fixed times: every stage
// presents its results in fixed output slots, whatever the arbitration did, so the
// output is strictly periodic. Each stage's slots lie 8 clocks before the middle
// and the end of its own input period; the stage assertions check that the grants
// always leave each result ready in time (the schedule is the same in every frame).
// The three stages, the 32 x 24 multiplier and its sharing follow the design
// description; the tap counts of the individual stages, the arbitration order and
// the output slots are this design's own choices. Each stage keeps its own
// accumulator and sample buffer.
module dac_interp #(
  parameter int unsigned IN_PERIOD = 512,  // clocks per input sample pair
  parameter int unsigned NTAPS1    = 116,
  parameter int unsigned NTAPS2    = 22,
  parameter int unsigned NTAPS3    = 12,
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
  output logic signed [DW-1:0] dout_r
);

  localparam int unsigned NST = 3;

  logic [NST-1:0]             req, gnt;
  logic signed [DW-1:0]       op_a [NST];
  logic signed [CW-1:0]       op_b [NST];
  logic signed [DW+CW-1:0]    prod;
  logic signed [DW-1:0]       mul_a;
  logic signed [CW-1:0]       mul_b;

  logic                 v1, v2;
  logic signed [DW-1:0] l1, r1, l2, r2;

  hbf_int #(.NTAPS(NTAPS1), .IN_PERIOD(IN_PERIOD), .DW(DW), .CW(CW)) u_st1 (
    .clk, .rst_n, .in_valid, .din_l, .din_r,
    .out_valid(v1), .dout_l(l1), .dout_r(r1),
    .mul_req(req[0]), .mul_gnt(gnt[0]), .mul_a(op_a[0]), .mul_b(op_b[0]), .mul_p(prod));
  hbf_int #(.NTAPS(NTAPS2), .IN_PERIOD(IN_PERIOD / 2), .DW(DW), .CW(CW)) u_st2 (
    .clk, .rst_n, .in_valid(v1), .din_l(l1), .din_r(r1),
    .out_valid(v2), .dout_l(l2), .dout_r(r2),
    .mul_req(req[1]), .mul_gnt(gnt[1]), .mul_a(op_a[1]), .mul_b(op_b[1]), .mul_p(prod));
  hbf_int #(.NTAPS(NTAPS3), .IN_PERIOD(IN_PERIOD / 4), .DW(DW), .CW(CW)) u_st3 (
    .clk, .rst_n, .in_valid(v2), .din_l(l2), .din_r(r2),
    .out_valid, .dout_l, .dout_r,
    .mul_req(req[2]), .mul_gnt(gnt[2]), .mul_a(op_a[2]), .mul_b(op_b[2]), .mul_p(prod));

  // fixed priority: the fastest stage first
  always_comb begin
    gnt   = '0;
    mul_a = op_a[0];
    mul_b = op_b[0];
    if (req[2]) begin
      gnt[2] = 1'b1;
      mul_a  = op_a[2];
      mul_b  = op_b[2];
    end else if (req[1]) begin
      gnt[1] = 1'b1;
      mul_a  = op_a[1];
      mul_b  = op_b[1];
    end else if (req[0]) begin
      gnt[0] = 1'b1;
    end
  end

  assign prod = mul_a * mul_b;

  a_one_grant : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt))
    else $error("dac_interp: more than one stage granted the multiplier");

endmodule
