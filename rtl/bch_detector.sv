// First decoder stage: syndrome generation and evaluation (error detection).
//
// For a read codeword c(x) the odd syndromes S_j = c(alpha^j), j = 1, 3, ...,
// 2T-1, are computed as XORs of constant field elements (bit i of the
// codeword contributes alpha^(i*j)). For a binary code S_2j = S_j^2, so the
// even syndromes follow by squaring. The word is flagged erroneous when any
// odd syndrome is non-zero; this is the fast check the Lazy-ECC scheme relies
// on, far shorter than locating the errors.
//
// Interface: valid_i/codeword_i in; one cycle later chk_valid_o with
// chk_err_o, the codeword and all 2T syndromes (S_1 in entry 0), which feed
// the correction stage.
// Timing: one register stage, so the verdict arrives exactly one clock after
// the codeword. The document reports detection below 0.5 ns, i.e. within one
// cycle of its 2 GHz processor, and splits the BCH decoder into this stage
// and a separate correction stage; the register placement is this design's
// choice.
module bch_detector
  import lazy_ecc_pkg::*;
#(
  parameter int unsigned T = 4,
  localparam int unsigned P = GF_M * T,
  localparam int unsigned N = DATA_W + P
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_i,
  input  logic [N-1:0]  codeword_i,
  output logic          chk_valid_o,
  output logic          chk_err_o,
  output logic [N-1:0]  codeword_o,
  output gf_t           syn_o [2*T]
);

  localparam logic [GF_ORDER*GF_M-1:0] ALPHA = gf_alpha_table();

  gf_t syn   [2*T];
  logic err;

  always_comb begin
    for (int j = 0; j < 2 * T; j++) syn[j] = '0;
    // odd syndromes S_1, S_3, ... (array index j-1)
    for (int j = 1; j < 2 * T; j += 2)
      for (int i = 0; i < N; i++)
        if (codeword_i[i]) syn[j-1] ^= ALPHA[((i * j) % GF_ORDER) * GF_M +: GF_M];
    // even syndromes S_2j = S_j^2
    for (int j = 2; j <= 2 * T; j += 2)
      syn[j-1] = gf_mul(syn[j/2-1], syn[j/2-1]);
    err = 1'b0;
    for (int j = 1; j < 2 * T; j += 2)
      err |= (syn[j-1] != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chk_valid_o <= 1'b0;
      chk_err_o   <= 1'b0;
    end else begin
      chk_valid_o <= valid_i;
      chk_err_o   <= valid_i & err;
    end
  end

  always_ff @(posedge clk) begin
    if (valid_i) begin
      codeword_o <= codeword_i;
      for (int j = 0; j < 2 * T; j++) syn_o[j] <= syn[j];
    end
  end

endmodule
