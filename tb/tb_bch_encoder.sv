// Testbench of bch_encoder: random and corner-case data words are encoded
// for every supported t (1..4), and each codeword is compared with a
// long-division reference. Every codeword must also have zero syndromes
// S_1, S_3, ..., S_2t-1, the defining property of the BCH code.
module tb_bch_encoder;
  import tb_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [63:0] data;
  logic [63+7:0]  cw1;
  logic [63+14:0] cw2;
  logic [63+21:0] cw3;
  logic [63+28:0] cw4;

  bch_encoder #(.T(1)) u_t1 (.data_i(data), .codeword_o(cw1));
  bch_encoder #(.T(2)) u_t2 (.data_i(data), .codeword_o(cw2));
  bch_encoder #(.T(3)) u_t3 (.data_i(data), .codeword_o(cw3));
  bch_encoder         u_t4 (.data_i(data), .codeword_o(cw4));   // default t = 4

  task automatic check_word(logic [63:0] d);
    logic [91:0] got [1:4];
    logic [91:0] exp;
    data = d;
    #1;
    got[1] = 92'(cw1); got[2] = 92'(cw2); got[3] = 92'(cw3); got[4] = 92'(cw4);
    for (int t = 1; t <= 4; t++) begin
      exp = ref_encode(t, d);
      checks++;
      if (got[t] !== exp) begin
        failures++;
        $display("FAIL t=%0d data=%h got=%h exp=%h", t, d, got[t], exp);
      end
      for (int j = 1; j < 2 * t; j += 2) begin
        checks++;
        if (ref_syndrome(got[t], 64 + 7 * t, j) != 0) begin
          failures++;
          $display("FAIL t=%0d data=%h non-zero S_%0d", t, d, j);
        end
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_word('0);
    check_word('1);
    for (int k = 0; k < 64; k++) check_word(64'd1 << k);
    for (int n = 0; n < 200; n++) check_word({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
