// Shared constants, types and Galois-field helpers of the Lazy-ECC STT-MRAM
// memory.
//
// The code is a binary BCH code over GF(2^7), shortened to protect a 64-bit
// data word. A t-error-correcting code needs 7*t parity bits, so the
// codeword is 64 + 7*t bits wide (92 bits for the main t = 4 setting).
// Codeword bit i is the coefficient of x^i: bits [P-1:0] hold the parity and
// bits [P+63:P] hold the data word, so the data can be taken straight out of
// an unchecked codeword.
//
// The field uses the primitive polynomial x^7 + x^3 + 1; the document does
// not name one. The functions below are used both in elaboration-time
// constants (power tables, generator polynomial) and, for gf_mul, in logic.
package lazy_ecc_pkg;

  // Field and code geometry.
  localparam int unsigned GF_M     = 7;                  // symbol width
  localparam int unsigned GF_ORDER = (1 << GF_M) - 1;    // 127 non-zero elements
  localparam logic [GF_M:0] GF_POLY = 8'h89;             // x^7 + x^3 + 1
  localparam int unsigned DATA_W   = 64;                 // protected word
  localparam int unsigned MAX_T    = 4;                  // largest t supported
  localparam int unsigned MAX_P    = GF_M * MAX_T;       // 28 parity bits

  typedef logic [GF_M-1:0] gf_t;

  // ECC handling of reads: Lazy (speculative delivery, detection in one
  // cycle) or conventional (deliver only after full decoding).
  typedef enum logic {
    MODE_LAZY = 1'b0,
    MODE_CONV = 1'b1
  } ecc_mode_e;

  // Multiply two field elements (shift-and-add, reduced by GF_POLY).
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    logic [GF_M-1:0] acc;
    logic [GF_M-1:0] sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < GF_M; i++) begin
      if (b[i]) acc ^= sh;
      sh = sh[GF_M-1] ? ((sh << 1) ^ GF_POLY[GF_M-1:0]) : (sh << 1);
    end
    return acc;
  endfunction

  // alpha^e for any e >= 0 (elaboration-time use).
  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t r;
    r = 7'd1;
    for (int unsigned i = 0; i < (e % GF_ORDER); i++)
      r = gf_mul(r, 7'd2);
    return r;
  endfunction

  // Table of alpha^0 .. alpha^126, entry k in bits [7k+6:7k].
  function automatic logic [GF_ORDER*GF_M-1:0] gf_alpha_table();
    logic [GF_ORDER*GF_M-1:0] tab;
    gf_t r;
    r = 7'd1;
    for (int k = 0; k < GF_ORDER; k++) begin
      tab[k*GF_M +: GF_M] = r;
      r = gf_mul(r, 7'd2);
    end
    return tab;
  endfunction

  // Generator polynomial of the t-error-correcting code: the product of the
  // minimal polynomials of alpha^1, alpha^3, ..., alpha^(2t-1). For t <= 4
  // these four conjugacy classes are distinct and each has 7 members, so the
  // degree is 7*t. Bit k of the result is the coefficient of x^k.
  function automatic logic [MAX_P:0] bch_gen_poly(int unsigned t);
    logic [MAX_P:0] g;
    logic [MAX_P:0] gn;
    gf_t            m   [GF_M+1];   // minimal polynomial, field coefficients
    gf_t            mn  [GF_M+1];
    int unsigned    e;
    g = '0;
    g[0] = 1'b1;
    for (int unsigned j = 1; j < 2 * t; j += 2) begin
      // m(x) = prod over the conjugates alpha^(j*2^c) of (x + alpha^(j*2^c))
      for (int k = 0; k <= GF_M; k++) m[k] = '0;
      m[0] = 7'd1;
      e    = j;
      for (int c = 0; c < GF_M; c++) begin
        for (int k = 0; k <= GF_M; k++) mn[k] = '0;
        for (int k = 0; k <= GF_M; k++) begin
          if (k + 1 <= GF_M) mn[k+1] ^= m[k];
          mn[k] ^= gf_mul(m[k], gf_alpha_pow(e));
        end
        for (int k = 0; k <= GF_M; k++) m[k] = mn[k];
        e = (e * 2) % GF_ORDER;
      end
      // The coefficients of m(x) are 0 or 1; multiply g(x) by it over GF(2).
      gn = '0;
      for (int k = 0; k <= GF_M; k++)
        if (m[k][0]) gn ^= (g << k);
      g = gn;
    end
    return g;
  endfunction

endpackage
