// Testbench of fetch_revert_stage: a scoreboard drives unchecked words,
// clean and failing verdicts one cycle later, and checked words, and checks
// that exactly the words judged clean (or delivered checked) reach stage 2,
// two cycles after delivery, in order, that reverted words never do, and
// that every other stage-2 slot holds the NOP word.
module tb_fetch_revert_stage;
  localparam logic [63:0] NOP = {2{32'h47FF_041F}};

  int checks = 0;
  int failures = 0;
  int squashes = 0;
  int nops = 0;

  logic        clk = 0;
  logic        rst_n = 0;
  logic        rsp_valid = 0, rsp_spec = 0, chk_valid = 0, revert = 0;
  logic [63:0] rsp_data = '0;
  logic        s2_valid, squash;
  logic [63:0] s2_data;

  fetch_revert_stage dut (
    .clk(clk), .rst_n(rst_n), .rsp_valid_i(rsp_valid), .rsp_data_i(rsp_data),
    .rsp_spec_i(rsp_spec), .chk_valid_i(chk_valid), .revert_i(revert),
    .s2_valid_o(s2_valid), .s2_data_o(s2_data), .squash_o(squash)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // expected stage-2 content per cycle (valid, data), filled by the driver
  logic        exp_v [int];
  logic [63:0] exp_d [int];
  int          cyc = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      if (exp_v.exists(cyc)) begin
        check($sformatf("stage-2 valid at cycle %0d", cyc), s2_valid === exp_v[cyc]);
        check($sformatf("stage-2 word at cycle %0d", cyc), s2_data === exp_d[cyc]);
      end else begin
        check($sformatf("NOP at cycle %0d", cyc), s2_valid === 1'b0 && s2_data === NOP);
        nops++;
      end
      if (squash) squashes++;
    end
    cyc++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kind, gap, reverted;
    logic [63:0] w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    reverted = 0;
    for (int n = 0; n < 400; n++) begin
      kind = $urandom_range(2);       // 0 clean spec, 1 bad spec, 2 checked
      w = {$urandom, $urandom};
      // drive in the cycle starting after this negedge
      rsp_valid = 1; rsp_data = w; rsp_spec = (kind != 2);
      if (kind != 1) begin
        exp_v[cyc + 2] = 1'b1;
        exp_d[cyc + 2] = w;
      end
      @(negedge clk);
      rsp_valid = 0;
      if (kind != 2) begin
        chk_valid = 1; revert = (kind == 1);
        reverted += (kind == 1);
      end
      gap = $urandom_range(2);
      @(negedge clk);
      chk_valid = 0; revert = 0;
      repeat (gap) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    check($sformatf("squash count %0d vs %0d", squashes, reverted), squashes == reverted);
    check("NOPs were inserted", nops > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
