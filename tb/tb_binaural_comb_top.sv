// tb_binaural_comb_top: end-to-end test of the binaural comb-filter pair at its
// full size (N = 513 taps, a = 16, b = 32, default parameters).
//
// The sampling clock runs at 10 kHz against a 12.25 MHz system clock (1225 system
// clocks per sample, a 6.125 MHz processing rate). The testbench keeps its own
// history of both inputs and computes each 16-bit output as
// saturate((sum_k h_k x(n-k)) >>> 14), with the weights read from its own
// coeff_rom instances, and compares it on every out_valid.
// Phases: (1) the same random signal into both ears, where left + right must
// reconstruct the input delayed by 256 samples (to within the rounding of the
// output shift); (2) independent random signals; (3) a worst-case sign pattern
// into each ear that drives the output into saturation. One extra Clk_S pulse in
// the middle of an interval checks that it is dropped and flagged. Each
// mechanism (sampling interval, complementary split, left clip, right clip,
// overrun) is counted, and one that never happened is a failure.
module tb_binaural_comb_top;
  localparam int N      = 513;
  localparam int SEL_W  = $clog2(N);
  localparam int M      = (N - 1) / 2;
  localparam int PERIOD = 1225;
  localparam int N_SAME = 560;
  localparam int N_IND  = 40;
  localparam int N_WC   = N;
  localparam int NSAMP  = N_SAME + N_IND + N_WC + 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic clk_s = 1'b0;
  logic signed [15:0] left_in = '0, right_in = '0;
  logic signed [15:0] left_out, right_out;
  logic out_valid, left_clip, right_clip, busy, overrun;

  binaural_comb_top dut (.*);

  logic [SEL_W-1:0]   sel = '0;
  logic signed [15:0] wl, wr;
  coeff_rom #(.N(N), .EAR(comb_pkg::EAR_LEFT))  ref_l (.sel, .h(wl));
  coeff_rom #(.N(N), .EAR(comb_pkg::EAR_RIGHT)) ref_r (.sel, .h(wr));

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int edge_cycle = 0;
  longint hl [N];
  longint hr [N];
  longint xl [NSAMP];
  longint xr [NSAMP];
  longint abs_l = 0, abs_r = 0, amp_l, amp_r;
  int n_out = 0;
  int cnt_interval = 0, cnt_split = 0, cnt_clip_l = 0, cnt_clip_r = 0, cnt_overrun = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  function automatic longint fir(input longint h [N], input longint x [NSAMP], int n);
    longint acc = 0;
    for (int k = 0; k < N && k <= n; k++) acc += h[k] * x[n - k];
    // The design's b = 32-bit adder and registers wrap modulo 2**32.
    return longint'(signed'(acc[31:0]));
  endfunction

  function automatic longint sat16(longint y, output bit clip);
    longint s = y >>> 14;
    clip = 1'b1;
    if (s > 32767)  return 32767;
    if (s < -32768) return -32768;
    clip = 1'b0;
    return s;
  endfunction

  always @(negedge clk) begin
    if (overrun) cnt_overrun++;
    if (out_valid) begin
      longint el, er;
      bit cl, cr;
      el = sat16(fir(hl, xl, n_out), cl);
      er = sat16(fir(hr, xr, n_out), cr);
      check(cycle - edge_cycle == 6, $sformatf("output latency %0d", cycle - edge_cycle));
      check(longint'(left_out) == el, $sformatf("left out(%0d)=%0d expected %0d", n_out, left_out, el));
      check(longint'(right_out) == er, $sformatf("right out(%0d)=%0d expected %0d", n_out, right_out, er));
      check(left_clip == cl && right_clip == cr, $sformatf("clip flags at %0d", n_out));
      if (left_clip) cnt_clip_l++;
      if (right_clip) cnt_clip_r++;
      if (n_out < N_SAME) begin
        // Floors of two shifted values add to the shifted sum minus 0 or 1.
        longint d;
        d = longint'(left_out) + longint'(right_out) - ((n_out >= M) ? xl[n_out - M] : 0);
        check(d == 0 || d == -1, $sformatf("left + right = delayed input at %0d (diff %0d)", n_out, d));
        cnt_split++;
      end
      n_out++;
      cnt_interval++;
    end
  end

  initial begin : stim
    for (int i = 0; i < N; i++) begin
      sel = SEL_W'(i);
      #1;
      hl[i] = longint'(wl);
      hr[i] = longint'(wr);
      abs_l += (hl[i] < 0) ? -hl[i] : hl[i];
      abs_r += (hr[i] < 0) ? -hr[i] : hr[i];
    end
    amp_l = (longint'(1) << 31) / abs_l * 3 / 4;
    amp_r = (longint'(1) << 31) / abs_r * 3 / 4;
    if (amp_l > 32767) amp_l = 32767;
    if (amp_r > 32767) amp_r = 32767;
    $display("sum of |h|: left %0d right %0d; worst-case amplitudes %0d %0d",
             abs_l, abs_r, amp_l, amp_r);
    for (int n = 0; n < NSAMP; n++) begin
      if (n < N_SAME) begin
        xl[n] = longint'($signed(16'($urandom))) / 2;
        xr[n] = xl[n];
      end else if (n < N_SAME + N_IND) begin
        xl[n] = longint'($signed(16'($urandom)));
        xr[n] = longint'($signed(16'($urandom)));
      end else if (n < N_SAME + N_IND + N_WC) begin
        // Sign pattern matched to the weights so that the sum peaks at the end,
        // with an amplitude that drives the 16-bit output into saturation while
        // keeping the 32-bit sum from wrapping.
        int k;
        k = N_SAME + N_IND + N_WC - 1 - n;
        xl[n] = (hl[k] < 0) ? -amp_l : amp_l;
        xr[n] = (hr[k] < 0) ? -amp_r : amp_r;
      end else begin
        xl[n] = 0;
        xr[n] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int n = 0; n < NSAMP; n++) begin
      @(posedge clk);
      left_in  = 16'(xl[n]);
      right_in = 16'(xr[n]);
      clk_s = 1'b1;
      edge_cycle = cycle;
      if (n == 7) begin
        // A Clk_S glitch inside the interval: must be dropped and flagged.
        repeat (100) @(posedge clk);
        clk_s = 1'b0;
        repeat (100) @(posedge clk);
        clk_s = 1'b1;
        repeat (PERIOD / 2 - 200) @(posedge clk);
      end else begin
        repeat (PERIOD / 2) @(posedge clk);
      end
      clk_s = 1'b0;
      repeat (PERIOD - PERIOD / 2 - 1) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    check(n_out == NSAMP, $sformatf("%0d outputs for %0d samples", n_out, NSAMP));
    $display("mechanisms: intervals=%0d complementary_split=%0d left_clip=%0d right_clip=%0d overrun=%0d",
             cnt_interval, cnt_split, cnt_clip_l, cnt_clip_r, cnt_overrun);
    check(cnt_interval > 0, "sampling intervals happened");
    check(cnt_split > 0, "complementary split checked");
    check(cnt_clip_l > 0, "left saturation happened");
    check(cnt_clip_r > 0, "right saturation happened");
    check(cnt_overrun == 1, "overrun happened once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NSAMP * PERIOD + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
