// tb_comb_response: magnitude-response measurement of the comb filter pair in
// both published sizes, tone by tone: the default 513-tap pair and a 257-tap
// pair run side by side on the same tones.
//
// For each test frequency a sine of amplitude 16000 is fed to all four inputs
// for 913 samples; the first 513 let the filters settle and the peak output
// over the last 400 is taken as the gain. Tested frequencies are the centres of the
// 19 critical bands from 0 to 5 kHz and the 18 cross-over points between them.
// The weights are designed on the frequency grid k * fs / N, with the half-gain
// sample at the grid point nearest to each band edge, so the cross-over point is
// that grid frequency, within fs / 2N (9.7 Hz for 513 taps) of the nominal edge.
// Limits: at a band centre the passing ear is within 2 dB of unity and the
// other ear is at least 25 dB down (18 dB for 257 taps); at a cross-over both
// ears are between -8 dB and -4 dB. Gains are printed for every tone.
module tb_comb_response;
  localparam int    N       = 513;
  localparam int    N2      = 257;
  localparam int    PERIOD  = 1225;
  localparam int    SETTLE  = 513;
  localparam int    MEASURE = 400;
  localparam real   AMP     = 16000.0;
  localparam real   FS      = 10000.0;
  localparam real   PI      = 3.14159265358979323846;
  localparam real   PASS_MIN = 0.794;   // -2 dB
  localparam real   PASS_MAX = 1.259;   // +2 dB
  localparam real   STOP_MAX = 0.0562;  // -25 dB
  localparam real   STOP2_MAX = 0.126;  // -18 dB
  localparam real   XO_MIN   = 0.398;   // -8 dB
  localparam real   XO_MAX   = 0.631;   // -4 dB

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic clk_s = 1'b0;
  logic signed [15:0] left_in = '0, right_in = '0;
  logic signed [15:0] left_out, right_out;
  logic out_valid, left_clip, right_clip, busy, overrun;

  binaural_comb_top dut (.*);

  logic signed [15:0] left_out2, right_out2;
  logic out_valid2, left_clip2, right_clip2, busy2, overrun2;

  binaural_comb_top #(.N(N2)) dut2 (
    .clk, .rst, .clk_s, .left_in, .right_in,
    .left_out(left_out2), .right_out(right_out2), .out_valid(out_valid2),
    .left_clip(left_clip2), .right_clip(right_clip2), .busy(busy2), .overrun(overrun2));

  int checks = 0;
  int failures = 0;
  int n_tones = 0;
  real edges [20] = '{0, 100, 200, 300, 400, 510, 630, 770, 920, 1080, 1270, 1480,
                      1720, 2000, 2320, 2700, 3150, 3700, 4400, 5000};

  always #5 clk = ~clk;

  function automatic real db(real g);
    return 20.0 * $log10(g + 1e-6);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int absv(logic signed [15:0] v);
    return (v < 0) ? -int'(v) : int'(v);
  endfunction

  // Runs one tone and returns the peak output of each ear of both pairs,
  // relative to AMP.
  task automatic tone(input real f, output real gl, output real gr,
                      output real gl2, output real gr2);
    int pl = 0, pr = 0, pl2 = 0, pr2 = 0;
    for (int n = 0; n < SETTLE + MEASURE; n++) begin
      logic signed [15:0] x;
      x = 16'($rtoi(AMP * $sin(2.0 * PI * f * real'(n) / FS + 0.3) + 0.5));
      @(posedge clk);
      left_in  = x;
      right_in = x;
      clk_s = 1'b1;
      repeat (PERIOD / 2) @(posedge clk);
      clk_s = 1'b0;
      repeat (PERIOD - PERIOD / 2 - 1) @(posedge clk);
      if (n >= SETTLE) begin
        if (absv(left_out) > pl)   pl  = absv(left_out);
        if (absv(right_out) > pr)  pr  = absv(right_out);
        if (absv(left_out2) > pl2) pl2 = absv(left_out2);
        if (absv(right_out2) > pr2) pr2 = absv(right_out2);
      end
      check(!left_clip && !right_clip && !overrun, "no saturation or overrun, 513 taps");
      check(!left_clip2 && !right_clip2 && !overrun2, "no saturation or overrun, 257 taps");
    end
    gl  = real'(pl) / AMP;
    gr  = real'(pr) / AMP;
    gl2 = real'(pl2) / AMP;
    gr2 = real'(pr2) / AMP;
    n_tones++;
  endtask

  initial begin : stim
    real gl, gr, gl2, gr2, fc;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int b = 0; b < 19; b++) begin
      fc = (edges[b] + edges[b + 1]) / 2.0;
      tone(fc, gl, gr, gl2, gr2);
      $display("centre %6.1f Hz: N=513 left %6.2f dB right %6.2f dB | N=257 left %6.2f dB right %6.2f dB",
               fc, db(gl), db(gr), db(gl2), db(gr2));
      if (b % 2 == 0) begin
        check(gl > PASS_MIN && gl < PASS_MAX && gr < STOP_MAX, $sformatf("band %0d left, 513", b));
        check(gl2 > PASS_MIN && gl2 < PASS_MAX && gr2 < STOP2_MAX, $sformatf("band %0d left, 257", b));
      end else begin
        check(gr > PASS_MIN && gr < PASS_MAX && gl < STOP_MAX, $sformatf("band %0d right, 513", b));
        check(gr2 > PASS_MIN && gr2 < PASS_MAX && gl2 < STOP2_MAX, $sformatf("band %0d right, 257", b));
      end
    end
    for (int e = 1; e < 19; e++) begin
      real fx;
      fx = $floor(edges[e] * real'(N) / FS + 0.5) * FS / real'(N);
      tone(fx, gl, gr, gl2, gr2);
      $display("cross-over %7.1f Hz (edge %6.1f Hz), N=513: left %6.2f dB  right %6.2f dB",
               fx, edges[e], db(gl), db(gr));
      check(gl > XO_MIN && gl < XO_MAX && gr > XO_MIN && gr < XO_MAX,
            $sformatf("cross-over at %0.1f Hz, 513", fx));
      fx = $floor(edges[e] * real'(N2) / FS + 0.5) * FS / real'(N2);
      tone(fx, gl, gr, gl2, gr2);
      $display("cross-over %7.1f Hz (edge %6.1f Hz), N=257: left %6.2f dB  right %6.2f dB",
               fx, edges[e], db(gl2), db(gr2));
      check(gl2 > XO_MIN && gl2 < XO_MAX && gr2 > XO_MIN && gr2 < XO_MAX,
            $sformatf("cross-over at %0.1f Hz, 257", fx));
    end
    check(n_tones == 55, "all tones measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (56 * (SETTLE + MEASURE) * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
