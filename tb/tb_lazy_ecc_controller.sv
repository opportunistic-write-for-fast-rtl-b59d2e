// Testbench of lazy_ecc_controller driving the STT-MRAM array (default
// sizes, t = 4). It checks, cycle by cycle against the expected latencies:
//   Lazy read without error   speculative data at 2, clean verdict at 3
//   Lazy read with 1..4 bit errors (retention flips or unfinished write
//     cells): revert at 3, correction done at 12, refetched correct data at
//     23 (t_R + t_D + t_E + t_W + t_R), clean verdict at 24, and the stored
//     word repaired
//   conventional read         corrected, checked data at 12, no write-back
//   more than 4 errors        failure reported with the data at 12
//   write                     acknowledged after 9 cycles
module tb_lazy_ecc_controller;
  import lazy_ecc_pkg::*;
  import tb_ref_pkg::*;

  localparam int T  = 4;
  localparam int N  = 64 + 7 * T;
  localparam int AW = 11;

  int checks = 0;
  int failures = 0;

  logic          clk = 0;
  logic          rst_n = 0;
  ecc_mode_e     mode = MODE_LAZY;
  logic          req_valid = 0, req_we = 0;
  logic [AW-1:0] req_addr = '0;
  logic [63:0]   req_wdata = '0;
  logic          req_ready, wr_ack, rsp_valid, rsp_spec, rsp_fail, chk_valid, chk_ok;
  logic          revert, stall, cor_done;
  logic [7:0]    cor_nerr;
  logic [63:0]   rsp_data;
  logic          mem_rd_en, mem_wr_en, mem_busy, mem_rd_valid, mem_wr_done;
  logic [AW-1:0] mem_addr;
  logic [N-1:0]  mem_wdata, mem_rd_data;
  logic [N-1:0]  fmask = '0;
  logic          ret_en = 0;
  logic [AW-1:0] ret_addr = '0;
  logic [N-1:0]  ret_mask = '0;

  lazy_ecc_controller dut (
    .clk(clk), .rst_n(rst_n), .mode_i(mode),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_we_i(req_we),
    .req_addr_i(req_addr), .req_wdata_i(req_wdata), .wr_ack_o(wr_ack),
    .rsp_valid_o(rsp_valid), .rsp_data_o(rsp_data), .rsp_spec_o(rsp_spec),
    .rsp_fail_o(rsp_fail), .chk_valid_o(chk_valid), .chk_ok_o(chk_ok),
    .revert_o(revert), .stall_o(stall), .cor_done_o(cor_done), .cor_nerr_o(cor_nerr),
    .mem_rd_en_o(mem_rd_en), .mem_wr_en_o(mem_wr_en), .mem_addr_o(mem_addr),
    .mem_wdata_o(mem_wdata), .mem_busy_i(mem_busy), .mem_rd_valid_i(mem_rd_valid),
    .mem_rd_data_i(mem_rd_data), .mem_wr_done_i(mem_wr_done)
  );

  stt_mram_array u_mem (
    .clk(clk), .rst_n(rst_n), .rd_en_i(mem_rd_en), .wr_en_i(mem_wr_en), .addr_i(mem_addr),
    .wdata_i(mem_wdata), .wr_fail_mask_i(fmask), .busy_o(mem_busy),
    .rd_valid_o(mem_rd_valid), .rd_data_o(mem_rd_data), .wr_done_o(mem_wr_done),
    .ret_en_i(ret_en), .ret_addr_i(ret_addr), .ret_mask_i(ret_mask)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [63:0] golden [2048];

  function automatic logic [N-1:0] rand_mask(int nbits);
    logic [N-1:0] m;
    m = '0;
    while ($countones(m) < nbits) m[$urandom_range(N - 1)] = 1'b1;
    return m;
  endfunction

  // present a request at a negedge; it is taken in the following cycle (0)
  task automatic issue(logic we, logic [AW-1:0] a, logic [63:0] d);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = d;
    @(negedge clk);
    req_valid = 0; req_we = 0;
  endtask

  task automatic do_write(logic [AW-1:0] a, logic [63:0] d, logic [N-1:0] m);
    int cyc;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = 1; req_addr = a; req_wdata = d; fmask = m;
    cyc = 0;
    do begin
      @(negedge clk);
      req_valid = 0; req_we = 0; fmask = '0;
      cyc++;
    end while (!wr_ack && cyc < 50);
    check($sformatf("write acknowledged after %0d cycles", cyc), cyc == 9);
    golden[a] = d;
  endtask

  // One read; records the cycle (0 = cycle the request is taken) of each event.
  int t_rsp [$];
  int t_chk, t_rev, t_cor;
  logic [63:0] d_rsp [$];
  logic spec_rsp [$];
  logic fail_rsp [$];
  logic ok_chk;
  logic saw_stall;

  task automatic do_read(logic [AW-1:0] a, int max_cycles = 40);
    int cyc;
    t_rsp.delete(); d_rsp.delete(); spec_rsp.delete(); fail_rsp.delete();
    t_chk = -1; t_rev = -1; t_cor = -1; ok_chk = 0; saw_stall = 0;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = 0; req_addr = a;
    cyc = 0;
    // sample each cycle before the clock edge that ends it
    while (cyc < max_cycles) begin
      if (rsp_valid) begin
        t_rsp.push_back(cyc); d_rsp.push_back(rsp_data);
        spec_rsp.push_back(rsp_spec); fail_rsp.push_back(rsp_fail);
      end
      if (chk_valid) begin t_chk = cyc; ok_chk = chk_ok; end
      if (revert && t_rev < 0) t_rev = cyc;
      if (cor_done && t_cor < 0) t_cor = cyc;
      if (stall) saw_stall = 1;
      @(negedge clk);
      req_valid = 0;
      cyc++;
    end
  endtask

  task automatic flip_stored(logic [AW-1:0] a, logic [N-1:0] m);
    @(negedge clk);
    ret_en = 1; ret_addr = a; ret_mask = m;
    @(negedge clk);
    ret_en = 0;
  endtask

  task automatic expect_clean_lazy(logic [AW-1:0] a, string tag);
    do_read(a, 8);
    check({tag, ": one response"}, t_rsp.size() == 1);
    if (t_rsp.size() == 1) begin
      check($sformatf("%s: speculative data at %0d (expect 2)", tag, t_rsp[0]), t_rsp[0] == 2);
      check({tag, ": data"}, d_rsp[0] === golden[a]);
      check({tag, ": marked unchecked"}, spec_rsp[0] === 1'b1);
    end
    check($sformatf("%s: verdict at %0d (expect 3)", tag, t_chk), t_chk == 3 && ok_chk);
    check({tag, ": no revert"}, t_rev < 0);
  endtask

  task automatic expect_recovery(logic [AW-1:0] a, string tag);
    do_read(a, 40);
    check($sformatf("%s: revert at %0d (expect 3)", tag, t_rev), t_rev == 3);
    check($sformatf("%s: correction done at %0d (expect 12)", tag, t_cor), t_cor == 12);
    check($sformatf("%s: two responses (%0d)", tag, t_rsp.size()), t_rsp.size() == 2);
    if (t_rsp.size() == 2) begin
      check({tag, ": first response speculative at 2"}, t_rsp[0] == 2 && spec_rsp[0]);
      check($sformatf("%s: refetched data at %0d (expect 23)", tag, t_rsp[1]), t_rsp[1] == 23);
      check({tag, ": refetched data correct"}, d_rsp[1] === golden[a]);
    end
    check($sformatf("%s: final verdict clean at %0d (expect 24)", tag, t_chk), t_chk == 24 && ok_chk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] a;
    int nb;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 32; k++) do_write(AW'(k), {$urandom, $urandom}, '0);
    check("stored codeword matches encoding", u_mem.mem[5] === N'(ref_encode(T, golden[5])));

    // ---- Lazy mode ----
    mode = MODE_LAZY;
    for (int k = 0; k < 32; k++) expect_clean_lazy(AW'(k), "clean lazy");
    for (int k = 0; k < 24; k++) begin
      a  = AW'(k);
      nb = 1 + k % 4;
      flip_stored(a, rand_mask(nb));
      expect_recovery(a, $sformatf("retention %0d bits", nb));
      check("stall raised during recovery", saw_stall);
      expect_clean_lazy(a, "after write-back");
    end
    // opportunistic write leaving unfinished cells
    for (int k = 0; k < 8; k++) begin
      logic [63:0] d;
      logic [N-1:0] m;
      a = AW'(100 + k);
      do_write(a, '0, '0);
      d = {$urandom, $urandom};
      m = '0;
      // mark cells that must switch (0 -> 1) as unfinished
      while ($countones(m) < 1 + k % 4) begin
        int p;
        p = $urandom_range(N - 1);
        if (ref_encode(T, d)[p]) m[p] = 1'b1;
      end
      do_write(a, d, m);
      expect_recovery(a, "unfinished write");
      expect_clean_lazy(a, "after write-back");
    end
    // more than t errors
    a = AW'(7);
    flip_stored(a, rand_mask(7));
    do_read(a, 30);
    check("uncorrectable: revert at 3", t_rev == 3);
    check("uncorrectable: reported at 12",
          t_rsp.size() == 2 && t_rsp[1] == 12 && fail_rsp[1] && !spec_rsp[1]);
    do_write(a, golden[a], '0);

    // ---- conventional mode ----
    mode = MODE_CONV;
    for (int k = 0; k < 16; k++) begin
      a = AW'(k);
      if (k % 2 == 1) flip_stored(a, rand_mask(1 + k % 4));
      do_read(a, 20);
      check("conv: one response", t_rsp.size() == 1);
      if (t_rsp.size() == 1) begin
        check($sformatf("conv: data at %0d (expect 12)", t_rsp[0]), t_rsp[0] == 12);
        check("conv: corrected data", d_rsp[0] === golden[a]);
        check("conv: checked", !spec_rsp[0] && !fail_rsp[0]);
      end
      check("conv: no speculative verdict", t_chk < 0 && t_rev < 0);
    end
    // conventional mode does not write back: the error is still stored
    mode = MODE_LAZY;
    expect_recovery(AW'(1), "lazy after conv");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stall must be high from the revert until the refetched word's verdict
  always @(negedge clk)
    if (rst_n && dut.state_q inside {dut.S_CORRECT, dut.S_WRBACK} && mode == MODE_LAZY && !dut.mode_q)
      if (!stall) begin
        failures++;
        $display("FAIL stall low during recovery");
      end
endmodule
