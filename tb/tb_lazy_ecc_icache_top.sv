// End-to-end testbench of lazy_ecc_icache_top at its default parameters
// (t = 4, 2048 words, read 2 / write 9 / correction 9 cycles, 80 C).
//
// A program of random 64-bit instruction words is written into the cache,
// a quarter of the writes leaving 1..3 cells unfinished. The testbench then
// acts as the processor's fetch unit: it fetches the words in order while
// the temperature moves from 25 C to 95 C and back, and random retention
// flips hit stored words. Every word reaching pipeline stage 2 must be the
// right one, in order, after 4 cycles (clean Lazy read), 25 cycles (Lazy
// read with error: revert, correct, write back, refetch) or 14 cycles
// (conventional read), with NOPs in every other stage-2 slot. A word with
// more than four errors must be reported as uncorrectable.
//
// Each mechanism is counted and must occur at least once: opportunistic
// writes with unfinished cells, retention flips, clean speculative reads,
// reverts (squashes), corrections, write-backs, refetches, NOP insertion,
// recovery stall, conventional reads, switches to conventional mode and
// back, and an uncorrectable word.
module tb_lazy_ecc_icache_top;
  import lazy_ecc_pkg::*;
  import tb_ref_pkg::*;

  localparam int T  = 4;
  localparam int N  = 64 + 7 * T;
  localparam int AW = 11;
  localparam int PROG_WORDS = 512;
  localparam logic [63:0] NOP = {2{32'h47FF_041F}};

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_unfinished_wr = 0, n_retention = 0, n_clean_spec = 0, n_revert = 0;
  int n_correct = 0, n_writeback = 0, n_refetch = 0, n_nop = 0, n_stall = 0;
  int n_conv = 0, n_to_conv = 0, n_to_lazy = 0, n_uncorr = 0;

  logic              clk = 0;
  logic              rst_n = 0;
  logic signed [7:0] temp = 8'sd25;
  ecc_mode_e         mode;
  logic              req_valid = 0, req_we = 0;
  logic [AW-1:0]     req_addr = '0;
  logic [63:0]       req_wdata = '0;
  logic              req_ready, wr_ack, rsp_valid, rsp_spec, rsp_fail, revert, stall;
  logic              cor_done, s2_valid, squash;
  logic [7:0]        cor_nerr;
  logic [63:0]       rsp_data, s2_data;
  logic [N-1:0]      fmask = '0;
  logic              ret_en = 0;
  logic [AW-1:0]     ret_addr = '0;
  logic [N-1:0]      ret_mask = '0;

  lazy_ecc_icache_top dut (
    .clk(clk), .rst_n(rst_n), .temp_i(temp), .mode_o(mode),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_we_i(req_we),
    .req_addr_i(req_addr), .req_wdata_i(req_wdata), .wr_ack_o(wr_ack),
    .rsp_valid_o(rsp_valid), .rsp_data_o(rsp_data), .rsp_spec_o(rsp_spec),
    .rsp_fail_o(rsp_fail), .revert_o(revert), .stall_o(stall),
    .cor_done_o(cor_done), .cor_nerr_o(cor_nerr),
    .s2_valid_o(s2_valid), .s2_data_o(s2_data), .squash_o(squash),
    .wr_fail_mask_i(fmask), .ret_en_i(ret_en), .ret_addr_i(ret_addr), .ret_mask_i(ret_mask)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [63:0] prog [PROG_WORDS];
  ecc_mode_e   prev_mode = MODE_LAZY;

  // event counting, sampled before each rising edge
  always @(negedge clk) if (rst_n) begin
    if (squash) n_revert++;
    if (stall) n_stall++;
    if (cor_done && mode_q_is_lazy() && cor_nerr != 0) n_writeback++;
    if (cor_done) n_correct++;
    if (mode != prev_mode) begin
      if (mode == MODE_CONV) n_to_conv++; else n_to_lazy++;
    end
    prev_mode = mode;
  end

  // a Lazy-mode correction that succeeds is followed by a write-back
  function automatic bit mode_q_is_lazy();
    return dut.u_ctrl.mode_q == MODE_LAZY;
  endfunction

  // nbits distinct positions, none already in error in word a
  function automatic logic [N-1:0] rand_mask(int nbits, int a = -1);
    logic [N-1:0] m, bad;
    int p;
    bad = (a < 0) ? '0 : (dut.u_array.mem[a] ^ N'(ref_encode(T, prog[a])));
    m = '0;
    while ($countones(m) < nbits) begin
      p = $urandom_range(N - 1);
      if (!bad[p]) m[p] = 1'b1;
    end
    return m;
  endfunction

  task automatic write_word(int a, logic [63:0] d, logic [N-1:0] m);
    int cyc;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = 1; req_addr = AW'(a); req_wdata = d; fmask = m;
    cyc = 0;
    do begin
      @(negedge clk);
      req_valid = 0; req_we = 0; fmask = '0;
      cyc++;
    end while (!wr_ack && cyc < 50);
    check($sformatf("write ack after %0d cycles (expect 9)", cyc), cyc == 9);
  endtask

  // fetch one word and follow it to stage 2
  task automatic fetch(int a, int exp_cycles, bit exp_fail = 0);
    int cyc, nrsp;
    bit got;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = 0; req_addr = AW'(a);
    cyc = 0; nrsp = 0; got = 0;
    while (!got && cyc < 60) begin
      @(negedge clk);
      req_valid = 0;
      cyc++;
      if (rsp_valid) begin
        nrsp++;
        if (rsp_fail) begin
          n_uncorr++;
          check($sformatf("uncorrectable word reported after %0d cycles (expect 12)", cyc),
                exp_fail && cyc == 12);
        end
      end
      if (s2_valid) begin
        got = 1;
        if (!exp_fail)
          check($sformatf("stage-2 word for address %0d", a), s2_data === prog[a]);
        check($sformatf("address %0d reached stage 2 after %0d cycles (expect %0d)",
                        a, cyc, exp_cycles), cyc == exp_cycles);
      end else if (!got) begin
        check("NOP in empty stage-2 slot", s2_data === NOP);
        n_nop++;
      end
    end
    check($sformatf("fetch of %0d completed", a), got);
    if (mode == MODE_LAZY && exp_cycles == 4)  n_clean_spec++;
    if (exp_cycles == 25) n_refetch++;
    if (exp_cycles == 14 && !exp_fail) n_conv++;
    // let the verdict of a speculative word pass before the next request
    @(negedge clk);
  endtask

  // number of stored bits that differ from the clean encoding
  function automatic int stored_errors(int a);
    return $countones(dut.u_array.mem[a] ^ N'(ref_encode(T, prog[a])));
  endfunction

  function automatic bit stored_bad(int a);
    return stored_errors(a) != 0;
  endfunction

  task automatic retention_hit(int a, int nbits);
    @(negedge clk);
    ret_en = 1; ret_addr = AW'(a); ret_mask = rand_mask(nbits, a);
    @(negedge clk);
    ret_en = 0;
    n_retention++;
  endtask

  task automatic set_temp(int t);
    @(negedge clk);
    temp = 8'(t);
    repeat (2) @(negedge clk);
    check($sformatf("mode at %0d C", t), mode == ((t >= 80) ? MODE_CONV : MODE_LAZY));
  endtask

  task automatic run_fetches(int from, int count);
    for (int a = from; a < from + count; a++) begin
      int exp;
      // retention flips, keeping the word within the code's four errors
      if ($urandom_range(7) == 0 && stored_errors(a) < 4)
        retention_hit(a, 1 + $urandom_range(3 - stored_errors(a)));
      if (mode == MODE_CONV) exp = 14;
      else exp = stored_bad(a) ? 25 : 4;
      fetch(a, exp);
      if (exp == 25)
        check($sformatf("address %0d repaired in the array", a), !stored_bad(a));
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check("Lazy mode after reset at 25 C", mode == MODE_LAZY);

    // load the program, a quarter of the writes with unfinished cells
    for (int a = 0; a < PROG_WORDS; a++) begin
      logic [N-1:0] m;
      prog[a] = {$urandom, $urandom};
      m = '0;
      if (a % 4 == 1) begin
        m = rand_mask(1 + $urandom_range(2));
        n_unfinished_wr++;
      end
      write_word(a, prog[a], m);
    end

    // cool: Lazy-ECC
    run_fetches(0, 256);
    // hot: conventional ECC
    set_temp(95);
    run_fetches(256, 128);
    // cool again
    set_temp(40);
    run_fetches(384, 128);
    // refetch the first half once more, all stored words now clean or repaired
    run_fetches(0, 128);

    // a word with more than four errors
    retention_hit(3, 6);
    fetch(3, 14, 1);
    check("uncorrectable word reported", n_uncorr == 1);

    $display("mechanisms: unfinished_writes=%0d retention_flips=%0d clean_spec_reads=%0d",
             n_unfinished_wr, n_retention, n_clean_spec);
    $display("            reverts=%0d corrections=%0d write_backs=%0d refetches=%0d",
             n_revert, n_correct, n_writeback, n_refetch);
    $display("            nop_slots=%0d stall_cycles=%0d conv_reads=%0d to_conv=%0d to_lazy=%0d uncorrectable=%0d",
             n_nop, n_stall, n_conv, n_to_conv, n_to_lazy, n_uncorr);
    check("unfinished writes happened", n_unfinished_wr > 0);
    check("retention flips happened", n_retention > 0);
    check("clean speculative reads happened", n_clean_spec > 0);
    check("reverts happened", n_revert > 0);
    check("corrections happened", n_correct > 0);
    check("write-backs happened", n_writeback > 0);
    check("refetches happened", n_refetch > 0);
    check("revert count equals refetch count plus the uncorrectable word",
          n_revert == n_refetch + n_uncorr);
    check("NOPs inserted", n_nop > 0);
    check("recovery stall seen", n_stall > 0);
    check("conventional reads happened", n_conv > 0);
    check("switched to conventional ECC", n_to_conv > 0);
    check("switched back to Lazy-ECC", n_to_lazy > 0);
    check("uncorrectable word seen", n_uncorr > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
