// Second decoder stage: error location and correction.
//
// Takes the syndromes and codeword captured by bch_detector and
//   1. runs the inversionless Berlekamp-Massey algorithm, one iteration per
//      clock for 2T clocks, to find the error-locator polynomial Lambda(x);
//   2. performs a fully parallel Chien search: Lambda(alpha^-i) is evaluated
//      for every codeword position i at once and the bits where it vanishes
//      are flipped.
// If the number of roots found in the (shortened) codeword differs from the
// degree of Lambda, more than T bits were wrong and fail_o is raised; the
// codeword is then returned unchanged.
//
// Interface: start_i with codeword_i/syn_i (syndromes S_1..S_2T, S_1 in entry
// 0) starts a correction while busy_o is low. In the cycle CORR_CYCLES
// clocks after start_i, done_o is high for one cycle and codeword_o, data_o,
// nerr_o and fail_o hold the result (valid only in that cycle).
// Timing: the work takes 2T + 1 cycles; the rest of CORR_CYCLES is spent
// waiting so that the latency matches the correction time the design is
// budgeted for. The default of 9 cycles plus the one-cycle detection stage
// gives the 10 cycles (4.71 ns at 2 GHz) the document gives for decoding
// with four-error correction. Berlekamp-Massey with a parallel Chien search
// is this design's choice: the document only names the two steps
// (error-locator polynomial, then error location numbers and correction).
module bch_corrector
  import lazy_ecc_pkg::*;
#(
  parameter int unsigned T           = 4,
  parameter int unsigned CORR_CYCLES = 9,
  localparam int unsigned P = GF_M * T,
  localparam int unsigned N = DATA_W + P
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [N-1:0]      codeword_i,
  input  gf_t               syn_i [2*T],
  output logic              busy_o,
  output logic              done_o,
  output logic [N-1:0]      codeword_o,
  output logic [DATA_W-1:0] data_o,
  output logic [7:0]        nerr_o,
  output logic              fail_o
);

  localparam logic [GF_ORDER*GF_M-1:0] ALPHA = gf_alpha_table();

  logic [N-1:0] cw_q;
  gf_t          syn_q   [2*T];
  gf_t          lam_q   [T+1];
  gf_t          b_q     [T+1];
  gf_t          gamma_q;
  logic [7:0]   len_q;           // current LFSR length L
  logic [7:0]   cnt_q;           // cycles since start

  // ---- one Berlekamp-Massey iteration (r = cnt_q) ----
  gf_t  delta;
  gf_t  lam_n [T+1];
  gf_t  b_n   [T+1];
  logic take_lam;

  always_comb begin
    delta = '0;
    for (int i = 0; i <= T; i++)
      if (int'(cnt_q) - i >= 0 && int'(cnt_q) - i < 2 * int'(T))
        delta ^= gf_mul(lam_q[i], syn_q[int'(cnt_q) - i]);
    for (int i = 0; i <= T; i++)
      lam_n[i] = gf_mul(gamma_q, lam_q[i]) ^ ((i > 0) ? gf_mul(delta, b_q[i-1]) : '0);
    take_lam = (delta != '0) && ({len_q, 1'b0} <= {1'b0, cnt_q});
    for (int i = 0; i <= T; i++)
      b_n[i] = take_lam ? lam_q[i] : ((i > 0) ? b_q[i-1] : '0);
  end

  // ---- parallel Chien search on the final Lambda ----
  logic [N-1:0] err_mask;
  logic [7:0]   nroots;

  always_comb begin
    gf_t s;
    nroots = '0;
    for (int i = 0; i < N; i++) begin
      s = '0;
      for (int j = 0; j <= T; j++)
        s ^= gf_mul(lam_q[j],
                    ALPHA[(((GF_ORDER - ((i * j) % GF_ORDER)) % GF_ORDER)) * GF_M +: GF_M]);
      err_mask[i] = (s == '0);
      nroots += {7'd0, err_mask[i]};
    end
  end

  logic uncorrectable;
  assign uncorrectable = (nroots != len_q) || (len_q > 8'(T));

  // ---- control ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_o <= 1'b0;
      cnt_q  <= '0;
    end else if (!busy_o) begin
      if (start_i) begin
        busy_o <= 1'b1;
        cnt_q  <= '0;
      end
    end else begin
      cnt_q <= cnt_q + 8'd1;
      if (cnt_q == 8'(CORR_CYCLES - 1)) busy_o <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!busy_o && start_i) begin
      cw_q    <= codeword_i;
      for (int j = 0; j < 2 * T; j++) syn_q[j] <= syn_i[j];
      for (int i = 0; i <= T; i++) begin
        lam_q[i] <= (i == 0) ? 7'd1 : '0;
        b_q[i]   <= (i == 0) ? 7'd1 : '0;
      end
      gamma_q <= 7'd1;
      len_q   <= '0;
    end else if (busy_o && cnt_q < 8'(2 * T)) begin
      for (int i = 0; i <= T; i++) begin
        lam_q[i] <= lam_n[i];
        b_q[i]   <= b_n[i];
      end
      if (take_lam) begin
        gamma_q <= delta;
        len_q   <= cnt_q + 8'd1 - len_q;
      end
    end
  end

  assign done_o     = busy_o && (cnt_q == 8'(CORR_CYCLES - 1));
  assign fail_o     = uncorrectable;
  assign nerr_o     = uncorrectable ? 8'd0 : nroots;
  assign codeword_o = uncorrectable ? cw_q : (cw_q ^ err_mask);
  assign data_o     = codeword_o[N-1 -: DATA_W];

  initial begin
    assert (CORR_CYCLES >= 2 * T + 1)
      else $error("bch_corrector: CORR_CYCLES must be at least 2T+1");
  end

endmodule
