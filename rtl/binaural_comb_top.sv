// binaural_comb_top: the comb-filter pair of a binaural hearing aid.
//
// Spectral splitting for dichotic presentation: the left-ear signal goes through
// a comb filter that passes alternate auditory critical bands, and the right-ear
// signal through the complementary filter, so that spectral components that
// would mask each other reach different ears. Each filter is a 513-tap
// linear-phase FIR filter realised with sequential multiply-accumulate
// operations (comb_filter_seq): one multiplier and one adder per ear, N register
// loads per sample.
//
// Both filters run from the system clock and start a sampling interval on each
// rising edge of the sampling clock clk_s (10 kHz). The codec (ADC/DAC), its
// serial audio interface, its I2C configuration logic and the analog stages
// around it are outside this module: its sample ports are where they connect.
//
// Output stage (own choice): the b-bit filter result holds
// 2**COEF_FRAC * (filtered sample) in the pass band, so the 16-bit DAC sample is
// y >>> OUT_SHIFT, saturated to the a-bit range. A saturating sample raises the
// ear's clip flag for one cycle. Output samples change after the first
// processing cycle of each interval, with the 6th rising clk edge after the
// clk_s rising edge, and are held until the next interval.
//
// Interface: clk (system clock), rst (synchronous, active high), clk_s;
// left_in/right_in (signed a bits, sampled at the start of an interval);
// left_out/right_out (signed a bits), out_valid (one-cycle strobe when they
// change), left_clip/right_clip, busy, overrun (a clk_s edge came while an
// interval was still running and was dropped).
module binaural_comb_top #(
  parameter int unsigned N         = comb_pkg::N_TAPS,
  parameter int unsigned A_W       = comb_pkg::A_W,
  parameter int unsigned B_W       = comb_pkg::B_W,
  parameter int unsigned FS_HZ     = comb_pkg::FS_HZ,
  parameter int unsigned COEF_FRAC = comb_pkg::COEF_FRAC,
  parameter int unsigned OUT_SHIFT = comb_pkg::COEF_FRAC
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  clk_s,
  input  logic signed [A_W-1:0] left_in,
  input  logic signed [A_W-1:0] right_in,
  output logic signed [A_W-1:0] left_out,
  output logic signed [A_W-1:0] right_out,
  output logic                  out_valid,
  output logic                  left_clip,
  output logic                  right_clip,
  output logic                  busy,
  output logic                  overrun
);

  logic signed [B_W-1:0] y_l, y_r;
  logic                  valid_l, valid_r;
  logic                  busy_l, busy_r;
  logic                  overrun_l, overrun_r;

  comb_filter_seq #(
    .N(N), .A_W(A_W), .B_W(B_W), .FS_HZ(FS_HZ), .COEF_FRAC(COEF_FRAC),
    .EAR(comb_pkg::EAR_LEFT)
  ) u_left (
    .clk, .rst, .clk_s, .x_in(left_in),
    .y(y_l), .y_valid(valid_l), .busy(busy_l), .overrun(overrun_l)
  );

  comb_filter_seq #(
    .N(N), .A_W(A_W), .B_W(B_W), .FS_HZ(FS_HZ), .COEF_FRAC(COEF_FRAC),
    .EAR(comb_pkg::EAR_RIGHT)
  ) u_right (
    .clk, .rst, .clk_s, .x_in(right_in),
    .y(y_r), .y_valid(valid_r), .busy(busy_r), .overrun(overrun_r)
  );

  localparam logic signed [B_W-1:0] OUT_MAX = B_W'((64'sd1 <<< (A_W - 1)) - 1);
  localparam logic signed [B_W-1:0] OUT_MIN = -B_W'(64'sd1 <<< (A_W - 1));

  function automatic logic signed [A_W-1:0] scale_sat(logic signed [B_W-1:0] y,
                                                      output logic clip);
    logic signed [B_W-1:0] s;
    s = y >>> OUT_SHIFT;
    clip = 1'b1;
    if (s > OUT_MAX)      return OUT_MAX[A_W-1:0];
    else if (s < OUT_MIN) return OUT_MIN[A_W-1:0];
    clip = 1'b0;
    return s[A_W-1:0];
  endfunction

  logic signed [A_W-1:0] out_l_next, out_r_next;
  logic                  clip_l_next, clip_r_next;

  always_comb begin
    out_l_next = scale_sat(y_l, clip_l_next);
    out_r_next = scale_sat(y_r, clip_r_next);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      left_out   <= '0;
      right_out  <= '0;
      out_valid  <= 1'b0;
      left_clip  <= 1'b0;
      right_clip <= 1'b0;
    end else begin
      out_valid  <= valid_l;
      left_clip  <= 1'b0;
      right_clip <= 1'b0;
      if (valid_l) begin
        left_out  <= out_l_next;
        left_clip <= clip_l_next;
      end
      if (valid_r) begin
        right_out  <= out_r_next;
        right_clip <= clip_r_next;
      end
    end
  end

  assign busy    = busy_l | busy_r;
  assign overrun = overrun_l | overrun_r;

  // Both filters share clk_s and rst, so they run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (rst) valid_l == valid_r);

endmodule
