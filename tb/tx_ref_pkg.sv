// tx_ref_pkg: bit-accurate reference model of the transmitter datapath for the
// testbenches, written independently of the RTL (its own tables, computed in
// floating point, and plain integer arithmetic on longint).
//
// Formats it reproduces: QAM levels (2i+1)*c5/(2^bits-1) in Q1.15; twiddles
// and carriers round(32767*cos/sin); filter response round(16384*H[k]) with
// H[k] = sum_m c_m cos(2*pi*k*(m-5)/N); (I)DFT sums shifted right by 17 and
// clamped to 16 bits; filter products shifted by 16; modulator difference
// shifted by 16. Arrays hold up to MAXN lanes.
package tx_ref_pkg;

  localparam int MAXN = 64;
  typedef longint vec_t [MAXN];

  localparam real M_PI = 3.141592653589793;
  localparam real C_TAPS [11] = '{0.022507907903927645, 0.028298439380057477,
                                  -0.076801948979409798, -0.037500771921555154,
                                  0.3076724792547561, 0.54098593171027443,
                                  0.3076724792547561, -0.037500771921555154,
                                  -0.076801948979409798, 0.028298439380057477,
                                  0.022507907903927645};

  function automatic longint rnd(real x);
    real y;
    y = (x < 0.0) ? -x : x;
    y = $floor(y + 0.5);
    if (x < 0.0) y = -y;
    if (y > 32767.0) y = 32767.0;
    if (y < -32768.0) y = -32768.0;
    return longint'(y);
  endfunction

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // Level of one axis: Gray-coded magnitude below a sign bit.
  function automatic longint axis_level(int bits, int field);
    int sgn, g, lvl;
    sgn = (field >> (bits - 1)) & 1;
    g = field & ((1 << (bits - 1)) - 1);
    case (bits)
      1: lvl = 1;
      2: lvl = (g == 0) ? 1 : 3;
      3: case (g) 0: lvl = 1; 1: lvl = 3; 3: lvl = 5; default: lvl = 7; endcase
      default: lvl = 0;
    endcase
    return (sgn != 0 ? -1 : 1) * rnd(real'(lvl) * C_TAPS[5] * 32767.0 / real'((1 << bits) - 1));
  endfunction

  function automatic void qam_map(int format, int sym, output longint i_v, output longint q_v);
    int ib, qb;
    ib = (format + 1) / 2;
    qb = format / 2;
    i_v = axis_level(ib, sym >> qb);
    q_v = axis_level(qb, sym & ((1 << qb) - 1));
  endfunction

  // Forward (inverse = 0) or inverse DFT with the 2^17 rescale and clamping;
  // also returns how many outputs had to be clamped.
  function automatic int dft(int n_pts, bit inverse, input vec_t xr, input vec_t xi,
                             output vec_t yr, output vec_t yi);
    longint sr, si, c, s;
    int nsat = 0;
    for (int k = 0; k < n_pts; k++) begin
      sr = 0; si = 0;
      for (int n = 0; n < n_pts; n++) begin
        c = rnd(32767.0 * $cos(2.0 * M_PI * real'((k * n) % n_pts) / real'(n_pts)));
        s = rnd(32767.0 * $sin(2.0 * M_PI * real'((k * n) % n_pts) / real'(n_pts)));
        if (inverse) s = -s;
        sr += xr[n] * c + xi[n] * s;
        si += xi[n] * c - xr[n] * s;
      end
      sr = sr >>> 17;
      si = si >>> 17;
      if (sat16(sr) != sr) nsat++;
      if (sat16(si) != si) nsat++;
      yr[k] = sat16(sr);
      yi[k] = sat16(si);
    end
    return nsat;
  endfunction

  function automatic longint filter_h(int n_pts, int k);
    real h = 0.0;
    for (int m = 0; m < 11; m++)
      h += C_TAPS[m] * $cos(2.0 * M_PI * real'(k) * real'(m - 5) / real'(n_pts));
    return rnd(16384.0 * h);
  endfunction

  function automatic void filter(int n_pts, input vec_t xr, input vec_t xi,
                                 output vec_t yr, output vec_t yi);
    for (int k = 0; k < n_pts; k++) begin
      yr[k] = (xr[k] * filter_h(n_pts, k)) >>> 16;
      yi[k] = (xi[k] * filter_h(n_pts, k)) >>> 16;
    end
  endfunction

  function automatic void modulate(int n_pts, int cycles, input vec_t sr, input vec_t si,
                                   output vec_t o);
    longint c, s;
    for (int n = 0; n < n_pts; n++) begin
      c = rnd(32767.0 * $cos(2.0 * M_PI * real'((cycles * n) % n_pts) / real'(n_pts)));
      s = rnd(32767.0 * $sin(2.0 * M_PI * real'((cycles * n) % n_pts) / real'(n_pts)));
      o[n] = (sr[n] * c - si[n] * s) >>> 16;
    end
  endfunction

  // Whole chain for one frame of symbols; returns the number of clamped
  // (I)DFT outputs.
  function automatic int transmit(int n_pts, int format, input vec_t syms, output vec_t o);
    vec_t i_v, q_v, xr, xi, fr, fi, sr, si;
    int nsat;
    for (int n = 0; n < n_pts; n++) qam_map(format, int'(syms[n]), i_v[n], q_v[n]);
    nsat = dft(n_pts, 1'b0, i_v, q_v, xr, xi);
    filter(n_pts, xr, xi, fr, fi);
    nsat += dft(n_pts, 1'b1, fr, fi, sr, si);
    modulate(n_pts, 1, sr, si, o);
    return nsat;
  endfunction

endpackage
