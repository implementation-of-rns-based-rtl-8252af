// rns_dwt_pkg: constants and elaboration-time helpers shared by the RNS
// distributed-arithmetic (RNS-DA) wavelet filter banks.
//
// The default moduli are the 5-bit set {32,31,29,27,25,23} (about 28.7 bits
// of dynamic range), so every residue channel is n_j = 5 bits wide.  The
// default filters are the 8-tap Daubechies-4 orthogonal pair quantised to
// 12-bit signed integers (scale 2^11); the filter choice is this design's own,
// the 8-tap length and 12-bit coefficient precision follow the reference
// configuration.  Synthesis filters are the time-reversed analysis filters.
// The functions below only run at elaboration to fill constant tables.
package rns_dwt_pkg;

  localparam int NTAPS = 8;
  localparam int NMOD  = 6;

  localparam int unsigned MODULI_DEF [NMOD] = '{32, 31, 29, 27, 25, 23};

  // analysis low-pass g_k and high-pass h_k, k = 0..7
  localparam int G_DEF  [NTAPS] = '{ -22,   67,    63, -383,  -57, 1292, 1464,  472};
  localparam int H_DEF  [NTAPS] = '{-472, 1464, -1292,  -57,  383,   63,  -67,  -22};
  // synthesis low-pass gbar_k and high-pass hbar_k (time reversed)
  localparam int GB_DEF [NTAPS] = '{ 472, 1464,  1292,  -57, -383,   63,   67,  -22};
  localparam int HB_DEF [NTAPS] = '{ -22,  -67,    63,  383,  -57,-1292, 1464, -472};

  // analysis/synthesis architecture of a complete filter bank
  typedef enum logic [1:0] {
    ARCH_SERIAL   = 2'd0,  // bit-serial, 2^N LUTs, two accumulators (Figs. 5, 9)
    ARCH_POLY     = 2'd1,  // bit-serial polyphase, 2^(N/2) LUTs      (Figs. 6, 7)
    ARCH_PARALLEL = 2'd2   // one LUT per bit plane, adder trees      (Figs. 10, 11)
  } arch_e;

  // non-negative remainder of v modulo m
  function automatic longint mod_pos(longint v, longint m);
    longint r;
    r = v % m;
    if (r < 0) r = r + m;
    return r;
  endfunction

  // |2^e|_m
  function automatic longint pow2_mod(int e, longint m);
    longint r;
    r = 1 % m;
    for (int i = 0; i < e; i++) r = (2 * r) % m;
    return r;
  endfunction

  // multiplicative inverse of a modulo m (a, m coprime), by search
  function automatic longint mod_inv(longint a, longint m);
    longint ar;
    ar = mod_pos(a, m);
    for (longint i = 1; i < m; i++)
      if ((ar * i) % m == 1) return i;
    return 0;
  endfunction

  // greatest common divisor; the moduli of one set must give 1 pairwise
  function automatic longint gcd(longint a, longint b);
    longint t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

endpackage
