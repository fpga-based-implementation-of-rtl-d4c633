// coeff_rom: the constant tap weights of one comb filter and the tap-weight
// multiplexer (MUX-H) that picks one of them per processing cycle.
//
// The N weights h_0..h_{N-1} are constants, as in the published design where they
// are held in logic cells rather than in a memory. Here they are computed at
// elaboration time by a linear-phase (type I, odd N) frequency-sampling design:
//
//   hL[i] = (1/N) * ( A(0) + 2 * sum_{k=1}^{M} A(k) * cos(2*pi*k*(i-M)/N) ),  M = (N-1)/2
//   h[i]  = round(hL[i] * 2**COEF_FRAC)                        for the left ear
//   h[i]  = (i == M ? 2**COEF_FRAC : 0) - round(hL[i] * 2**COEF_FRAC)  for the right ear
//
// where A(k) is comb_pkg::left_gain. Deriving the right filter from the rounded left
// one makes the pair exactly complementary: hL + hR is a pure delay of M samples
// with gain 2**COEF_FRAC. The design method and band plan are this
// implementation's own; the published coefficients are not reproduced.
//
// Interface: sel (Mux_sel, 0..N-1) in, h (signed a-bit weight) out.
// Timing: purely combinational; the weight is captured by Reg B in the datapath.
module coeff_rom #(
  parameter int unsigned N         = comb_pkg::N_TAPS,
  parameter int unsigned A_W       = comb_pkg::A_W,
  parameter int unsigned FS_HZ     = comb_pkg::FS_HZ,
  parameter int unsigned COEF_FRAC = comb_pkg::COEF_FRAC,
  parameter comb_pkg::ear_e EAR     = comb_pkg::EAR_LEFT,
  localparam int unsigned SEL_W    = (N > 1) ? $clog2(N) : 1
) (
  input  logic [SEL_W-1:0]      sel,
  output logic signed [A_W-1:0] h
);

  typedef logic signed [A_W-1:0] tab_t [N];

  function automatic tab_t build_table();
    tab_t        tab;
    real         gain [N];
    real         acc;
    int          q;
    int unsigned m;
    m = (N - 1) / 2;
    for (int unsigned k = 0; k <= m; k++) gain[k] = comb_pkg::left_gain(k, N, FS_HZ);
    // Only the first half is computed: the impulse response is symmetric.
    for (int unsigned i = 0; i <= m; i++) begin
      acc = gain[0];
      for (int unsigned k = 1; k <= m; k++)
        acc += 2.0 * gain[k] * $cos(2.0 * 3.14159265358979323846 * real'(k) *
                                   (real'(i) - real'(m)) / real'(N));
      q = int'(acc / real'(N) * real'(1 << COEF_FRAC));
      if (EAR == comb_pkg::EAR_RIGHT) q = ((i == m) ? (1 << COEF_FRAC) : 0) - q;
      tab[i]         = A_W'(q);
      tab[N - 1 - i] = A_W'(q);
    end
    return tab;
  endfunction

  localparam tab_t TABLE = build_table();

  always_comb begin
    if (32'(sel) < N) h = TABLE[sel];
    else              h = '0;
  end

endmodule
