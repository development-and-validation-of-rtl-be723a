// rs_pkg: field and code constants of the RS(15,11) syndrome block, and the
// Galois-field helper functions shared by its modules.
//
// The code is the DVB-T shortened-form example RS(15,11,2): 4-bit symbols over
// GF(2^4) built from the primitive polynomial 1 + X + X^4, n = 15, k = 11,
// t = 2, generator g(x) = (x+a^0)(x+a^1)(x+a^2)(x+a^3), so the four syndromes
// are S_j = R(a^j), j = 0..3. The parallelism of three symbols per clock is the
// proposed architecture's. These numbers all come from the code definition;
// the function forms below (bit-serial shift-and-add, used only at elaboration
// time or inside constant multipliers) are this design's own.
//
// The functions take the field width and polynomial as arguments so that any
// of the primitive polynomials for m = 3..12 can be used; symbols are carried
// in GF_MAXW-bit containers and the caller keeps the low m bits.
package rs_pkg;

  // Widest field the helper functions support.
  localparam int unsigned GF_MAXW = 16;

  // Default code: RS(15,11) over GF(2^4).
  localparam int unsigned SYM_W     = 4;       // m, bits per symbol
  localparam int unsigned CODE_N    = 15;      // n, symbols per codeword
  localparam int unsigned CODE_K    = 11;      // k, message symbols
  localparam int unsigned NUM_SYN   = CODE_N - CODE_K;  // 2t = 4 syndromes
  localparam int unsigned PAR       = 3;       // symbols entered per clock
  localparam int unsigned FIRST_ROOT = 0;      // g(x) roots start at a^0
  // 1 + X + X^4, bit i is the coefficient of X^i (X^m term included).
  localparam logic [GF_MAXW:0] PRIM_POLY = 17'h00013;

  typedef logic [GF_MAXW-1:0] gf_word_t;

  // Product of two field elements of width m, reduced by poly.
  function automatic gf_word_t gf_mul(input gf_word_t a, input gf_word_t b,
                                      input int unsigned m,
                                      input logic [GF_MAXW:0] poly);
    logic [GF_MAXW:0] acc;
    logic [GF_MAXW:0] sh;
    acc = '0;
    sh  = {1'b0, a};
    for (int i = 0; i < GF_MAXW; i++) begin
      if (i < m) begin
        if (b[i]) acc ^= sh;
        sh = sh << 1;
        if (sh[m]) sh ^= poly;
      end
    end
    return acc[GF_MAXW-1:0];
  endfunction

  // alpha^e with alpha = X (the element 2).
  function automatic gf_word_t gf_alpha_pow(input int unsigned e,
                                            input int unsigned m,
                                            input logic [GF_MAXW:0] poly);
    gf_word_t r;
    r = gf_word_t'(1);
    for (int unsigned i = 0; i < e; i++) r = gf_mul(r, gf_word_t'(2), m, poly);
    return r;
  endfunction

endpackage
