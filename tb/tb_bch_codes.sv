// The weaker code strengths of the design: T = 1, 2 and 3 (the document's
// ECC1..ECC3 settings, with T = 1 a Hamming code), each run through encoder,
// detector and corrector by tb_bch_code_check at the shortest corrector
// latency. The default T = 4 is covered by the blocks' own testbenches.
module tb_bch_codes;
  logic d1, d2, d3;
  int   c1, c2, c3, f1, f2, f3;

  tb_bch_code_check #(.T(1)) u_t1 (.done_o(d1), .checks_o(c1), .failures_o(f1));
  tb_bch_code_check #(.T(2)) u_t2 (.done_o(d2), .checks_o(c2), .failures_o(f2));
  tb_bch_code_check #(.T(3)) u_t3 (.done_o(d3), .checks_o(c3), .failures_o(f3));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3, f1 + f2 + f3 + 1);
    $finish;
  end

  initial begin
    wait (d1 && d2 && d3);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3, f1 + f2 + f3);
    $finish;
  end
endmodule
