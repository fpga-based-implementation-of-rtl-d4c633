// comb_pkg: constants, types and the band plan shared by the binaural comb filter.
//
// The comb filters split the 0..fs/2 range into auditory critical bands and pass
// alternate bands to the two ears, so that the left and right magnitude responses
// are complementary. Sample and coefficient width a = 16, accumulator width b = 32,
// N = 513 taps and fs = 10 kHz follow the published design. The actual band edges
// and the coefficient values of the published filters are not available, so the
// band edges below are the classic critical-band edges (Zwicker) and the
// coefficient design in coeff_rom is a single-pass frequency-sampling design:
// both are this implementation's own choices.
package comb_pkg;

  // Word widths: a (samples and tap weights) and b (products, sums, registers).
  parameter int unsigned A_W = 16;
  parameter int unsigned B_W = 32;

  // Filter length and sampling rate of the main configuration.
  parameter int unsigned N_TAPS = 513;
  parameter int unsigned FS_HZ  = 10_000;

  // Tap weights are 15-bit signed integers: the real-valued impulse response is
  // scaled by 2**COEF_FRAC and rounded, so that a unity pass-band gain
  // corresponds to an output 2**COEF_FRAC times the input.
  parameter int unsigned COEF_FRAC = 14;

  // Which ear a filter serves. The left filter passes the band that starts at
  // 0 Hz and every second band after it; the right filter passes the others.
  typedef enum logic {EAR_LEFT = 1'b0, EAR_RIGHT = 1'b1} ear_e;

  // Critical-band edges in Hz (the last one lies above fs/2 = 5 kHz).
  localparam int unsigned N_EDGES = 20;
  localparam int unsigned BAND_EDGE_HZ [N_EDGES] = '{
      0,  100,  200,  300,  400,  510,  630,  770,  920, 1080,
   1270, 1480, 1720, 2000, 2320, 2700, 3150, 3700, 4400, 5300};

  // Index of the critical band that holds frequency f_hz.
  function automatic int unsigned band_of(real f_hz);
    int unsigned b = 0;
    for (int unsigned i = 1; i < N_EDGES; i++)
      if (f_hz >= real'(BAND_EDGE_HZ[i])) b = i;
    return b;
  endfunction

  // Desired magnitude of the left filter at the k-th frequency sample
  // f_k = k * fs / n_taps: 0.5 at the sample nearest to each band edge (the
  // cross-over), otherwise 1 in even-numbered bands and 0 in odd-numbered ones.
  // The right filter's desired magnitude is 1 minus this value.
  function automatic real left_gain(int unsigned k, int unsigned n_taps, int unsigned fs_hz);
    real f_k;
    real half_bin;
    f_k      = real'(k) * real'(fs_hz) / real'(n_taps);
    half_bin = 0.5 * real'(fs_hz) / real'(n_taps);
    for (int unsigned i = 1; i < N_EDGES; i++)
      if (f_k - real'(BAND_EDGE_HZ[i]) < half_bin && real'(BAND_EDGE_HZ[i]) - f_k <= half_bin)
        return 0.5;
    return (band_of(f_k) % 2 == 0) ? 1.0 : 0.0;
  endfunction

endpackage
