// tb_coeff_rom: self-checking test of the left and right tap-weight tables.
//
// Reads all 513 weights of both tables through the select port and checks:
// every weight fits a 15-bit signed integer; both impulse responses are
// symmetric (linear phase); the two tables add up to a pure delay of (N-1)/2
// samples with gain 2**14 (complementary responses); and, evaluating the
// zero-phase amplitude response from the weights, each critical band is passed
// (within 2 dB of unity) by one filter and stopped (below -20 dB) by the other,
// alternating from the left filter at 0 Hz. The band centres are worked out here
// from the critical-band edge list, not taken from the design.
module tb_coeff_rom;
  localparam int unsigned N     = 513;
  localparam int unsigned SEL_W = $clog2(N);
  localparam int unsigned M     = (N - 1) / 2;
  localparam real         FS    = 10000.0;
  localparam real         SCALE = 16384.0;
  localparam real         PI    = 3.14159265358979323846;

  logic [SEL_W-1:0]  sel;
  logic signed [15:0] h_l, h_r;
  int checks = 0;
  int failures = 0;
  int hl [N];
  int hr [N];

  coeff_rom #(.N(N), .EAR(comb_pkg::EAR_LEFT))  dut_l (.sel, .h(h_l));
  coeff_rom #(.N(N), .EAR(comb_pkg::EAR_RIGHT)) dut_r (.sel, .h(h_r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real amp(input int h [N], input real f);
    real a = 0.0;
    for (int i = 0; i < int'(N); i++)
      a += real'(h[i]) * $cos(2.0 * PI * f * real'(i - int'(M)) / FS);
    return a / SCALE;
  endfunction

  // Critical-band edges in Hz, 0 Hz to fs/2.
  real edges [20] = '{0, 100, 200, 300, 400, 510, 630, 770, 920, 1080, 1270, 1480,
                      1720, 2000, 2320, 2700, 3150, 3700, 4400, 5000};

  initial begin
    for (int i = 0; i < int'(N); i++) begin
      sel = SEL_W'(i);
      #1;
      hl[i] = int'(h_l);
      hr[i] = int'(h_r);
    end
    for (int i = 0; i < int'(N); i++) begin
      check(hl[i] >= -16384 && hl[i] <= 16383 && hr[i] >= -16384 && hr[i] <= 16383,
            $sformatf("weight %0d fits 15 bits", i));
      check(hl[i] == hl[N - 1 - i] && hr[i] == hr[N - 1 - i], $sformatf("symmetry at %0d", i));
      check(hl[i] + hr[i] == ((i == int'(M)) ? 16384 : 0), $sformatf("complement at %0d", i));
    end
    for (int b = 0; b < 19; b++) begin
      real fc, al, ar;
      fc = (edges[b] + edges[b + 1]) / 2.0;
      al = amp(hl, fc);
      ar = amp(hr, fc);
      $display("band %2d centre %6.1f Hz: left %7.4f right %7.4f", b, fc, al, ar);
      if (b % 2 == 0) begin
        check(al > 0.794 && al < 1.259 && ar < 0.1 && ar > -0.1,
              $sformatf("band %0d passed left, stopped right", b));
      end else begin
        check(ar > 0.794 && ar < 1.259 && al < 0.1 && al > -0.1,
              $sformatf("band %0d passed right, stopped left", b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
