// qrns_pkg: constants and elaboration-time functions shared by the QRNS
// polyphase filter bank.
//
// The filter bank works in the Quadratic Residue Number System. Every modulus
// m of the set below is a prime with m = 1 (mod 4), so q^2 + 1 = 0 has a root
// q in Z_m and a complex number x_R + j x_I maps to the pair
// X = <x_R + q x_I>_m, X^ = <x_R - q x_I>_m. A complex product then becomes two
// independent modular products. The moduli set {13,17,29,37,41,53,61} and the
// use of index (discrete logarithm) arithmetic for the tap products follow the
// source design; the choice of q (smallest root), of the primitive root used
// for the indices and the 10-bit IDFT twiddle format are this design's own.
//
// All functions here are meant for elaboration time only: they build
// constant tables (residue -> index, index -> residue, constant multipliers,
// CRT weights). Nothing in this package is clocked.
package qrns_pkg;

  localparam int unsigned RES_W = 6;        // bits of one residue (largest modulus 61)
  localparam int unsigned NMOD  = 7;        // moduli of the error-free filter bank
  localparam int unsigned NCH   = 8;        // channels = polyphase branches = IDFT points
  localparam int unsigned NTAPS = 367;      // prototype filter length
  localparam int unsigned TAPS_PER_BRANCH = (NTAPS + NCH - 1) / NCH;  // 46
  localparam int unsigned IN_W  = 12;       // input port width per component
  localparam int TW_SCALE = 256;            // IDFT twiddles: 10-bit signed, 8 fraction bits
  localparam int TW_DIAG  = 181;            // round(256 / sqrt(2))

  typedef int unsigned mod_list_t [NMOD];
  localparam mod_list_t MODULI = '{13, 17, 29, 37, 41, 53, 61};

  typedef logic [RES_W-1:0] res_t;

  // <a>_m for any signed integer a
  function automatic int unsigned mod_of(longint a, int unsigned m);
    longint r;
    r = a % longint'(m);
    if (r < 0) r += longint'(m);
    return unsigned'(32'(r));
  endfunction

  // smallest q with q*q = -1 (mod m)
  function automatic int unsigned qroot(int unsigned m);
    for (int unsigned q = 1; q < m; q++)
      if ((q * q) % m == m - 1) return q;
    return 0;
  endfunction

  // multiplicative inverse of a modulo m (m prime)
  function automatic int unsigned inv_mod(int unsigned a, int unsigned m);
    for (int unsigned x = 1; x < m; x++)
      if ((longint'(a) * longint'(x)) % longint'(m) == 1) return x;
    return 0;
  endfunction

  function automatic int unsigned pow_mod(int unsigned g, int unsigned e, int unsigned m);
    int unsigned r = 1;
    for (int unsigned i = 0; i < e; i++) r = (r * g) % m;
    return r;
  endfunction

  // smallest primitive root of the prime m
  function automatic int unsigned prim_root(int unsigned m);
    for (int unsigned g = 2; g < m; g++) begin
      int unsigned r = 1;
      int unsigned ord = 0;
      for (int unsigned i = 1; i < m; i++) begin
        r = (r * g) % m;
        if (r == 1) begin ord = i; break; end
      end
      if (ord == m - 1) return g;
    end
    return 0;
  endfunction

  // discrete logarithm of a (1 <= a < m) to the base prim_root(m)
  function automatic int unsigned log_mod(int unsigned a, int unsigned m);
    int unsigned g = prim_root(m);
    int unsigned r = 1;
    for (int unsigned e = 0; e < m - 1; e++) begin
      if (r == a) return e;
      r = (r * g) % m;
    end
    return 0;
  endfunction

  // QRNS image of the complex constant cr + j ci in structure qs (+1: X, -1: X^)
  function automatic int unsigned qrns_const(int cr, int ci, int qs, int unsigned m);
    return mod_of(longint'(cr) + longint'(qs) * longint'(qroot(m)) * longint'(ci), m);
  endfunction

  // IDFT first-stage twiddle w^n = e^{+j 2 pi n / 8}, n = 0..3, scaled by 256
  function automatic int tw_re(int n);
    case (n)
      0: return TW_SCALE;
      1: return TW_DIAG;
      2: return 0;
      default: return -TW_DIAG;
    endcase
  endfunction
  function automatic int tw_im(int n);
    case (n)
      0: return 0;
      2: return TW_SCALE;
      default: return TW_DIAG;
    endcase
  endfunction

endpackage
