// Testbench of bch_detector (t = 4): clean codewords must pass, codewords
// with 1..6 flipped bits must be flagged, every syndrome must match a
// reference computed with exponent tables, and the verdict must come
// exactly one clock after the codeword.
module tb_bch_detector;
  import lazy_ecc_pkg::*;
  import tb_ref_pkg::*;

  localparam int T = 4;
  localparam int N = 64 + 7 * T;

  int checks = 0;
  int failures = 0;

  logic         clk = 0;
  logic         rst_n = 0;
  logic         valid = 0;
  logic [N-1:0] cw = '0;
  logic         chk_valid, chk_err;
  logic [N-1:0] cw_out;
  gf_t          syn [2*T];

  bch_detector dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid), .codeword_i(cw),
    .chk_valid_o(chk_valid), .chk_err_o(chk_err), .codeword_o(cw_out), .syn_o(syn)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic apply(logic [N-1:0] word, logic exp_err);
    @(negedge clk);
    cw = word;
    valid = 1;
    @(negedge clk);
    valid = 0;
    // one clock after the codeword was presented
    check("chk_valid one cycle later", chk_valid === 1'b1);
    check("error flag", chk_err === exp_err);
    check("codeword passed on", cw_out === word);
    for (int j = 1; j <= 2 * T; j++)
      check($sformatf("S_%0d", j), syn[j-1] === ref_syndrome(92'(word), N, j));
    @(negedge clk);
    check("chk_valid is a pulse", chk_valid === 1'b0);
  endtask

  function automatic logic [N-1:0] flip(logic [N-1:0] w, int nbits);
    int pos;
    logic [N-1:0] m;
    m = '0;
    while ($countones(m) < nbits) begin
      pos = $urandom_range(N - 1);
      m[pos] = 1'b1;
    end
    return w ^ m;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] good;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 150; n++) begin
      good = N'(ref_encode(T, {$urandom, $urandom}));
      apply(good, 1'b0);
      apply(flip(good, 1 + (n % 6)), 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
