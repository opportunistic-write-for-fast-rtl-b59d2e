// Reference model for the testbenches: BCH encoding by bit-serial long
// division with the generator polynomials written out as constants, and
// GF(2^7) arithmetic through exponent/log tables. It shares no code with
// the design, so it checks the design's elaboration-time tables as well.
package tb_ref_pkg;

  // g(x) for t = 1..4 over GF(2^7) with field polynomial x^7 + x^3 + 1:
  // products of the minimal polynomials of alpha, alpha^3, alpha^5, alpha^7.
  function automatic logic [28:0] ref_gen(int t);
    case (t)
      1:       return 29'h89;
      2:       return 29'h4377;
      3:       return 29'h26d9e3;
      default: return 29'h1c9c26b9;
    endcase
  endfunction

  // parity of a 64-bit word: d(x) * x^P mod g(x), P = 7t, by long division
  function automatic logic [27:0] ref_parity(int t, logic [63:0] d);
    logic [28:0] g;
    logic [91:0] r;
    int p;
    p = 7 * t;
    g = ref_gen(t);
    r = '0;
    for (int k = 0; k < 64; k++) r[p + k] = d[k];
    for (int k = 63 + p; k >= p; k--)
      if (r[k]) for (int b = 0; b <= p; b++) r[k - p + b] ^= g[b];
    return r[27:0];
  endfunction

  // full codeword {data, parity} of width 64 + 7t, zero-extended to 92
  function automatic logic [91:0] ref_encode(int t, logic [63:0] d);
    logic [91:0] cw;
    logic [27:0] par;
    int p;
    p = 7 * t;
    par = ref_parity(t, d);
    cw = '0;
    for (int b = 0; b < p; b++) cw[b] = par[b];
    for (int k = 0; k < 64; k++) cw[p + k] = d[k];
    return cw;
  endfunction

  // alpha^e through repeated multiplication by x
  function automatic logic [6:0] ref_exp(int e);
    logic [6:0] r;
    r = 7'd1;
    for (int i = 0; i < (e % 127); i++)
      r = r[6] ? ((r << 1) ^ 7'h09) : (r << 1);
    return r;
  endfunction

  // syndrome S_j of an n-bit codeword (bits above n ignored)
  function automatic logic [6:0] ref_syndrome(logic [91:0] cw, int n, int j);
    logic [6:0] s;
    s = '0;
    for (int i = 0; i < n; i++) if (cw[i]) s ^= ref_exp(i * j);
    return s;
  endfunction

endpackage
