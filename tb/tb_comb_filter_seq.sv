// tb_comb_filter_seq: self-checking test of the sequential-MAC comb filter.
//
// A 17-tap left filter and a 17-tap right filter get the same input. Their
// weights are read from separate coeff_rom instances in the testbench. For every
// sample the testbench computes the FIR output sum_k h_k x(n-k) directly and
// compares it with y when y_valid pulses; after each interval it also checks the
// whole register file against the operation table of the architecture:
// Reg m = sum_{k=m}^{N-1} h_k x(n+m-k). The inputs are an impulse (which must
// reproduce the weights), full-scale extremes and random samples. It checks
// the latency of y_valid (5 clock edges after Clk_S rises), the length of an
// interval (2N clocks of busy) and that left + right outputs add up to a pure
// delay of (N-1)/2 samples scaled by 2**14.
module tb_comb_filter_seq;
  localparam int unsigned N      = 17;
  localparam int unsigned SEL_W  = $clog2(N);
  localparam int unsigned M      = (N - 1) / 2;
  localparam int unsigned PERIOD = 2 * N + 20;
  localparam int          NSAMP  = 120;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic clk_s = 1'b0;
  logic signed [15:0] x_in = '0;
  logic signed [31:0] y_l, y_r;
  logic valid_l, valid_r, busy_l, busy_r, ovr_l, ovr_r;

  comb_filter_seq #(.N(N), .EAR(comb_pkg::EAR_LEFT)) dut_l (
    .clk, .rst, .clk_s, .x_in, .y(y_l), .y_valid(valid_l), .busy(busy_l), .overrun(ovr_l));
  comb_filter_seq #(.N(N), .EAR(comb_pkg::EAR_RIGHT)) dut_r (
    .clk, .rst, .clk_s, .x_in, .y(y_r), .y_valid(valid_r), .busy(busy_r), .overrun(ovr_r));

  logic [SEL_W-1:0]   sel = '0;
  logic signed [15:0] wl, wr;
  coeff_rom #(.N(N), .EAR(comb_pkg::EAR_LEFT))  ref_l (.sel, .h(wl));
  coeff_rom #(.N(N), .EAR(comb_pkg::EAR_RIGHT)) ref_r (.sel, .h(wr));

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int edge_cycle = 0;
  int busy_cycles = 0;
  longint hl [N];
  longint hr [N];
  longint xs [NSAMP];
  int n_out = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  function automatic longint xhist(int n);
    return (n < 0) ? 0 : xs[n];
  endfunction

  function automatic logic signed [31:0] fir(input longint h [N], int n, int from_tap);
    longint acc = 0;
    for (int k = from_tap; k < int'(N); k++) acc += h[k] * xhist(n + from_tap - k);
    return acc[31:0];
  endfunction

  always @(negedge clk) begin
    if (busy_l) busy_cycles++;
    if (valid_l) begin
      check(valid_r, "both filters valid together");
      check(cycle - edge_cycle == 5, $sformatf("y_valid latency %0d", cycle - edge_cycle));
      check(y_l == fir(hl, n_out, 0), $sformatf("left y(%0d)=%0d expected %0d", n_out, y_l, fir(hl, n_out, 0)));
      check(y_r == fir(hr, n_out, 0), $sformatf("right y(%0d)=%0d expected %0d", n_out, y_r, fir(hr, n_out, 0)));
      check(longint'(y_l) + longint'(y_r) == 16384 * xhist(n_out - int'(M)), "complementary sum");
      n_out++;
    end
  end

  initial begin : stim
    for (int i = 0; i < int'(N); i++) begin
      sel = SEL_W'(i);
      #1;
      hl[i] = longint'(wl);
      hr[i] = longint'(wr);
    end
    for (int n = 0; n < NSAMP; n++) begin
      if (n == 0)       xs[n] = 1;                        // impulse
      else if (n < 30)  xs[n] = 0;
      else if (n < 50)  xs[n] = (n % 2 == 0) ? 32767 : -32768;
      else              xs[n] = longint'($signed(16'($urandom)));
    end
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int n = 0; n < NSAMP; n++) begin
      @(posedge clk);
      x_in = 16'(xs[n]);
      clk_s = 1'b1;
      edge_cycle = cycle;
      busy_cycles = 0;
      repeat (PERIOD / 2) @(posedge clk);
      clk_s = 1'b0;
      repeat (PERIOD / 2 - 1) @(posedge clk);
      check(busy_cycles == 2 * int'(N), $sformatf("interval of %0d clocks", busy_cycles));
      for (int m = 0; m < int'(N); m++) begin
        check(dut_l.regs[m] == fir(hl, n, m), $sformatf("left Reg %0d after sample %0d", m, n));
        check(dut_r.regs[m] == fir(hr, n, m), $sformatf("right Reg %0d after sample %0d", m, n));
      end
    end
    check(n_out == NSAMP, "one output per sample");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NSAMP * PERIOD + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
