// qam_tx_pkg: shared types, fixed-point formats and constant tables of the
// parallel frequency-domain QAM transmitter.
//
// Every datapath word between blocks is a 16-bit two's complement sample;
// a bus of N lanes packs lane i into bits [16*i +: 16], lane 0 in the least
// significant position. The three coefficient tables the transmitter needs
// (DFT twiddles, the filter's frequency response and the carrier samples) and
// the QAM amplitudes are computed here by constant functions at elaboration,
// so they follow the parameter N and need no generated source files.
//
// Number formats (this design's choice where the source gives only the
// rescaling shifts):
//   twiddles   Q1.15, cos(2*pi*m/N) and sin(2*pi*m/N) scaled by 32767
//   filter     Q2.14, real zero-phase response H[k] scaled by 16384
//   carriers   Q1.15, cos/sin(2*pi*CYCLES*n/N) scaled by 32767
//   QAM        the outermost level of each axis equals the filter's centre
//              tap c5 in Q1.15 (17726), as in the source ("3d = c5")
// The products are rescaled by 2^17 (DFT, IDFT), 2^16 (filter) and 2^16
// (modulator), as the source gives them.
package qam_tx_pkg;

  localparam int unsigned SAMPLE_W = 16;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  localparam int unsigned DFT_SHIFT    = 17;
  localparam int unsigned FILTER_SHIFT = 16;
  localparam int unsigned MOD_SHIFT    = 16;

  // Fixed-point scales: Q1.15 for twiddles, carriers and QAM levels, Q2.14
  // for the filter response.
  function automatic real q15_scale();
    return 32767.0;
  endfunction

  function automatic real q14_scale();
    return 16384.0;
  endfunction

  function automatic real two_pi();
    return 6.28318530717958647692;
  endfunction

  // Square-root raised cosine taps c0..c10 (order 10, symmetric about c5).
  localparam int unsigned SRRC_TAPS = 11;

  function automatic real srrc_tap(int unsigned i);
    case (i)
      0, 10:   return 0.022507907903927645;
      1, 9:    return 0.028298439380057477;
      2, 8:    return -0.076801948979409798;
      3, 7:    return -0.037500771921555154;
      4, 6:    return 0.3076724792547561;
      5:       return 0.54098593171027443;
      default: return 0.0;
    endcase
  endfunction

  // Round to nearest (half away from zero) and clamp to a 16-bit word.
  function automatic sample_t to_fixed(real x, real scale);
    real y;
    y = x * scale;
    y = (y >= 0.0) ? y + 0.5 : y - 0.5;
    if (y > 32767.0)  y = 32767.0;
    if (y < -32768.0) y = -32768.0;
    return sample_t'($rtoi(y));
  endfunction

  // Twiddle factor W_N^m = cos(2*pi*m/N) - j*sin(2*pi*m/N): the DFT uses
  // (cos, -sin), the IDFT its conjugate (cos, +sin).
  function automatic sample_t twiddle_cos(int unsigned n_pts, int unsigned m);
    return to_fixed($cos(two_pi() * real'(m % n_pts) / real'(n_pts)), q15_scale());
  endfunction

  function automatic sample_t twiddle_sin(int unsigned n_pts, int unsigned m);
    return to_fixed($sin(two_pi() * real'(m % n_pts) / real'(n_pts)), q15_scale());
  endfunction

  // Real, zero-phase frequency response of the SRRC filter at bin k of an
  // N-point DFT: the taps centred on c5, so the odd (sine) parts cancel.
  function automatic sample_t filter_coeff(int unsigned n_pts, int unsigned k);
    real h;
    int  centre;
    centre = (SRRC_TAPS - 1) / 2;
    h = 0.0;
    for (int m = 0; m < SRRC_TAPS; m++)
      h += srrc_tap(m) * $cos(two_pi() * real'(k) * real'(m - centre) / real'(n_pts));
    return to_fixed(h, q14_scale());
  endfunction

  // Carrier samples of lane n for a carrier of `cycles` periods per frame.
  function automatic sample_t carrier_cos(int unsigned n_pts, int unsigned cycles, int unsigned n);
    return to_fixed($cos(two_pi() * real'((cycles * n) % n_pts) / real'(n_pts)), q15_scale());
  endfunction

  function automatic sample_t carrier_sin(int unsigned n_pts, int unsigned cycles, int unsigned n);
    return to_fixed($sin(two_pi() * real'((cycles * n) % n_pts) / real'(n_pts)), q15_scale());
  endfunction

  // Amplitude of the odd level (2*idx+1) of an axis carrying axis_bits bits:
  // levels +-1, +-3, ... +-(2^axis_bits - 1) times d, the outermost equal to c5.
  function automatic sample_t qam_level(int unsigned axis_bits, int unsigned idx);
    real top;
    top = real'((1 << axis_bits) - 1);
    return to_fixed(srrc_tap(5) * real'(2 * idx + 1) / top, q15_scale());
  endfunction

  // Pipeline latency of one N-point (I)DFT: product register, log2(N)
  // adder-tree registers, rescale register.
  function automatic int unsigned dft_latency(int unsigned n_pts);
    return $clog2(n_pts) + 2;
  endfunction

  localparam int unsigned FILTER_LATENCY    = 2;
  localparam int unsigned MODULATOR_LATENCY = 2;
  localparam int unsigned INPUT_LATENCY     = 1;

  // Input register + DFT + filter + IDFT + modulator; 17 for N = 16.
  function automatic int unsigned tx_latency(int unsigned n_pts);
    return INPUT_LATENCY + 2 * dft_latency(n_pts) + FILTER_LATENCY + MODULATOR_LATENCY;
  endfunction

endpackage
