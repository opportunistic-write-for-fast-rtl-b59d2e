// Fault-injection campaign on the instruction cache at default parameters:
// 3000 randomly placed errors of 1 to 4 bits (retention flips at random
// addresses over the whole 2048-word array, or unfinished cells of a
// rewrite) are each followed by a fetch of the hit word in Lazy mode. Every
// fetch must deliver the right word to pipeline stage 2 after the full
// recovery (25 cycles instead of 4) and leave the word repaired in the
// array. The testbench reports the average extra fetch latency per error,
// which must equal t_D + t_E + t_W + t_R = 21 cycles.
module tb_fault_campaign;
  import lazy_ecc_pkg::*;
  import tb_ref_pkg::*;

  localparam int T  = 4;
  localparam int N  = 64 + 7 * T;
  localparam int AW = 11;
  localparam int WORDS = 2048;
  localparam int ERRORS = 3000;

  int checks = 0;
  int failures = 0;

  logic              clk = 0;
  logic              rst_n = 0;
  logic signed [7:0] temp = 8'sd45;
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
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic [63:0] golden [WORDS];

  function automatic logic [N-1:0] rand_mask(int nbits);
    logic [N-1:0] m;
    m = '0;
    while ($countones(m) < nbits) m[$urandom_range(N - 1)] = 1'b1;
    return m;
  endfunction

  task automatic write_word(int a, logic [63:0] d, logic [N-1:0] m);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = 1; req_addr = AW'(a); req_wdata = d; fmask = m;
    @(negedge clk);
    req_valid = 0; req_we = 0; fmask = '0;
    while (!wr_ack) @(negedge clk);
  endtask

  // returns the cycles until the word reaches stage 2
  task automatic fetch(int a, output int cyc);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = 0; req_addr = AW'(a);
    cyc = 0;
    do begin
      @(negedge clk);
      req_valid = 0;
      cyc++;
    end while (!s2_valid && cyc < 60);
    check($sformatf("word %0d reaches stage 2", a), s2_valid && s2_data === golden[a]);
    @(negedge clk);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, nb, cyc, clean_cyc;
    longint extra;
    int by_bits [1:4];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < WORDS; w++) begin
      golden[w] = {$urandom, $urandom};
      write_word(w, golden[w], '0);
    end
    fetch(0, clean_cyc);
    check($sformatf("clean fetch in %0d cycles (expect 4)", clean_cyc), clean_cyc == 4);
    extra = 0;
    for (int k = 1; k <= 4; k++) by_bits[k] = 0;
    for (int e = 0; e < ERRORS; e++) begin
      a  = $urandom_range(WORDS - 1);
      nb = 1 + $urandom_range(3);
      if (e % 5 == 0) begin
        // rewrite with unfinished cells: only cells that must change count
        logic [63:0] d;
        logic [N-1:0] diff, m;
        d = {$urandom, $urandom};
        diff = N'(ref_encode(T, d)) ^ dut.u_array.mem[a];
        m = '0;
        while ($countones(m) < nb && $countones(m) < $countones(diff)) begin
          int p;
          p = $urandom_range(N - 1);
          if (diff[p]) m[p] = 1'b1;
        end
        nb = $countones(m);
        write_word(a, d, m);
        golden[a] = d;
      end else begin
        @(negedge clk);
        ret_en = 1; ret_addr = AW'(a); ret_mask = rand_mask(nb);
        @(negedge clk);
        ret_en = 0;
      end
      fetch(a, cyc);
      if (nb > 0) begin
        by_bits[nb]++;
        check($sformatf("recovered fetch in %0d cycles (expect 25)", cyc), cyc == 25);
        extra += cyc - clean_cyc;
        check("word repaired", dut.u_array.mem[a] === N'(ref_encode(T, golden[a])));
      end
    end
    $display("errors injected: 1-bit %0d, 2-bit %0d, 3-bit %0d, 4-bit %0d",
             by_bits[1], by_bits[2], by_bits[3], by_bits[4]);
    $display("average extra fetch latency per error: %0d.%02d cycles",
             extra / (by_bits[1] + by_bits[2] + by_bits[3] + by_bits[4]),
             (extra * 100 / (by_bits[1] + by_bits[2] + by_bits[3] + by_bits[4])) % 100);
    check("average extra latency is t_D + t_E + t_W + t_R = 21",
          extra == 21 * (by_bits[1] + by_bits[2] + by_bits[3] + by_bits[4]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
