// Helper for tb_bch_codes: runs encoder -> error injection -> detector ->
// corrector for one code strength T with the shortest corrector latency
// (2T+1 cycles), on its own clock. For each of ROUNDS random words with
// 0..T random bit errors it checks the verdict, the corrected word, the error
// count and the latency, then raises done_o and reports its counts.
module tb_bch_code_check
  import lazy_ecc_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int unsigned T      = 1,
  parameter int unsigned ROUNDS = 300
) (
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  localparam int unsigned N  = 64 + 7 * T;
  localparam int unsigned CC = 2 * T + 1;

  logic         clk = 0;
  logic         rst_n = 0;
  logic [63:0]  data = '0;
  logic [N-1:0] enc_cw, cw = '0;
  logic         valid = 0, chk_valid, chk_err, busy, done, fail;
  logic [N-1:0] det_cw, cor_cw;
  logic [63:0]  cor_data;
  logic [7:0]   nerr;
  gf_t          syn [2*T];

  bch_encoder   #(.T(T)) u_enc (.data_i(data), .codeword_o(enc_cw));
  bch_detector  #(.T(T)) u_det (
    .clk(clk), .rst_n(rst_n), .valid_i(valid), .codeword_i(cw),
    .chk_valid_o(chk_valid), .chk_err_o(chk_err), .codeword_o(det_cw), .syn_o(syn));
  bch_corrector #(.T(T), .CORR_CYCLES(CC)) u_cor (
    .clk(clk), .rst_n(rst_n), .start_i(chk_valid && chk_err), .codeword_i(det_cw), .syn_i(syn),
    .busy_o(busy), .done_o(done), .codeword_o(cor_cw), .data_o(cor_data),
    .nerr_o(nerr), .fail_o(fail));

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks_o++;
    if (!cond) begin
      failures_o++;
      $display("FAIL T=%0d %s", T, what);
    end
  endtask

  initial begin
    logic [N-1:0] m;
    int nb, cyc;
    done_o = 0; checks_o = 0; failures_o = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROUNDS; r++) begin
      data = {$urandom, $urandom};
      #1;
      check("encoder matches reference", 92'(enc_cw) === ref_encode(T, data));
      nb = r % (T + 1);
      m = '0;
      while ($countones(m) < nb) m[$urandom_range(N - 1)] = 1'b1;
      @(negedge clk);
      cw = enc_cw ^ m;
      valid = 1;
      @(negedge clk);
      valid = 0;
      check("verdict", chk_valid && (chk_err == (nb != 0)));
      if (nb != 0) begin
        cyc = 0;
        do begin
          @(negedge clk);
          cyc++;
        end while (!done && cyc < 30);
        check($sformatf("latency %0d (expect %0d)", cyc, CC), cyc == CC);
        check($sformatf("%0d errors corrected", nb),
              cor_cw === enc_cw && cor_data === data && nerr == 8'(nb) && !fail);
      end
    end
    done_o = 1;
  end
endmodule
