// Systematic BCH encoder for one 64-bit data word.
//
// The codeword polynomial is c(x) = d(x) * x^P + r(x), where r(x) is the
// remainder of d(x) * x^P divided by the generator polynomial g(x) of the
// t-error-correcting BCH code (see lazy_ecc_pkg). Because r(x) is linear in
// the data, the encoder is a single XOR network: for every data bit k the
// remainder of x^(P+k) is precomputed at elaboration time and the remainders
// of the set data bits are XORed together.
//
// Interface: data_i (64 bits) in, codeword_o (64 + 7*T bits) out, with the
// parity in the low P bits and the data above it.
// Timing: purely combinational. The document budgets one encoding step of
// 0.40-0.55 ns ahead of every write; this block sits in front of the array's
// write port and its delay is part of the write cycles counted there.
// Following the document: a t-error-correcting BCH code for a 64-bit word,
// with t = 4 (its strongest setting) as the default. This design's choice:
// the field polynomial and the bit layout of the codeword.
module bch_encoder
  import lazy_ecc_pkg::*;
#(
  parameter int unsigned T = 4,
  localparam int unsigned P = GF_M * T,
  localparam int unsigned N = DATA_W + P
) (
  input  logic [DATA_W-1:0] data_i,
  output logic [N-1:0]      codeword_o
);

  // Remainder of x^(P+k) mod g(x) for k = 0 .. DATA_W-1, entry k in bits
  // [P*k +: P], built by stepping an LFSR that multiplies by x.
  function automatic logic [DATA_W*P-1:0] rem_table();
    logic [DATA_W*P-1:0] tab;
    logic [MAX_P:0]      g;
    logic [P-1:0]        r;
    logic                fb;
    g = bch_gen_poly(T);
    // x^P mod g = g(x) - x^P, i.e. the low P coefficients of g
    r = g[P-1:0];
    for (int k = 0; k < DATA_W; k++) begin
      tab[k*P +: P] = r;
      fb = r[P-1];
      r  = r << 1;
      if (fb) r ^= g[P-1:0];
    end
    return tab;
  endfunction

  localparam logic [DATA_W*P-1:0] REM = rem_table();

  logic [P-1:0] parity;

  always_comb begin
    parity = '0;
    for (int k = 0; k < DATA_W; k++)
      if (data_i[k]) parity ^= REM[k*P +: P];
  end

  assign codeword_o = {data_i, parity};

  initial begin
    assert (T >= 1 && T <= MAX_T)
      else $error("bch_encoder: T must be between 1 and %0d", MAX_T);
  end

endmodule
