// Testbench of bch_corrector (t = 4) fed by bch_detector: codewords with
// 0..4 random bit errors must come back exactly corrected with the right
// error count; with 5 or 6 errors the corrector must report failure (or, in
// the rare case the word lands within 4 bits of another codeword, return a
// valid codeword). done_o must rise exactly CORR_CYCLES (9) clocks after
// start, giving 10 cycles of decoding with the detection stage.
module tb_bch_corrector;
  import lazy_ecc_pkg::*;
  import tb_ref_pkg::*;

  localparam int T  = 4;
  localparam int N  = 64 + 7 * T;
  localparam int CC = 9;

  int checks = 0;
  int failures = 0;
  int fails_seen = 0;
  int many_err_words = 0;

  logic         clk = 0;
  logic         rst_n = 0;
  logic         valid = 0;
  logic [N-1:0] cw = '0;
  logic         chk_valid, chk_err;
  logic [N-1:0] det_cw;
  gf_t          syn [2*T];
  logic         busy, done, fail;
  logic [N-1:0] cor_cw;
  logic [63:0]  cor_data;
  logic [7:0]   nerr;

  bch_detector u_det (
    .clk(clk), .rst_n(rst_n), .valid_i(valid), .codeword_i(cw),
    .chk_valid_o(chk_valid), .chk_err_o(chk_err), .codeword_o(det_cw), .syn_o(syn)
  );

  bch_corrector dut (
    .clk(clk), .rst_n(rst_n), .start_i(chk_valid), .codeword_i(det_cw), .syn_i(syn),
    .busy_o(busy), .done_o(done), .codeword_o(cor_cw), .data_o(cor_data),
    .nerr_o(nerr), .fail_o(fail)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(logic [63:0] d, int nbits);
    logic [N-1:0] good, m;
    int pos, cyc;
    good = N'(ref_encode(T, d));
    m = '0;
    while ($countones(m) < nbits) begin
      pos = $urandom_range(N - 1);
      m[pos] = 1'b1;
    end
    @(negedge clk);
    cw = good ^ m;
    valid = 1;
    @(negedge clk);
    valid = 0;          // chk_valid (= start) is high in this cycle
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
    end while (!done && cyc < 50);
    check($sformatf("done after %0d cycles, expected %0d", cyc, CC), cyc == CC);
    if (nbits <= T) begin
      check($sformatf("corrected word, %0d errors", nbits), cor_cw === good);
      check("corrected data", cor_data === d);
      check($sformatf("error count %0d vs %0d", nerr, nbits), nerr == 8'(nbits));
      check("no failure flag", fail === 1'b0);
    end else begin
      many_err_words++;
      if (fail) fails_seen++;
      else begin
        int bad;
        bad = 0;
        for (int j = 1; j < 2 * T; j += 2)
          if (ref_syndrome(92'(cor_cw), N, j) != 0) bad++;
        check("miscorrection still yields a codeword", bad == 0);
      end
    end
    @(negedge clk);
    check("corrector idle after done", busy === 1'b0);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) run({$urandom, $urandom}, n % 7);
    // errors in the first and last bit positions
    for (int n = 0; n < 4; n++) begin
      logic [N-1:0] good;
      good = N'(ref_encode(T, {$urandom, $urandom}));
      @(negedge clk);
      cw = good ^ ({1'b1, {(N-2){1'b0}}, 1'b1});
      valid = 1;
      @(negedge clk);
      valid = 0;
      repeat (CC) @(negedge clk);
      check("done on time (edge positions)", done === 1'b1);
      check("edge positions corrected", cor_cw === good && nerr == 2);
      @(negedge clk);
    end
    check($sformatf("more than t errors flagged in %0d of %0d words", fails_seen, many_err_words),
          fails_seen * 10 >= many_err_words * 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
