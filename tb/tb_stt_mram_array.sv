// Testbench of stt_mram_array at its default size (2048 x 92 bits, read 2
// cycles, write 9 cycles). A shadow copy of the memory predicts every read.
// Checks: read and write latencies, that cells marked unfinished keep their
// old value after an opportunistic write, retention flips, back-to-back
// operations (a read issued in the cycle a write ends sees the new word) and
// the busy handshake.
module tb_stt_mram_array;
  localparam int WORDS = 2048;
  localparam int W  = 92;
  localparam int RC = 2;
  localparam int WC = 9;
  localparam int AW = 11;

  int checks = 0;
  int failures = 0;

  logic          clk = 0;
  logic          rst_n = 0;
  logic          rd_en = 0, wr_en = 0;
  logic [AW-1:0] addr = '0;
  logic [W-1:0]  wdata = '0, fmask = '0;
  logic          busy, rd_valid, wr_done;
  logic [W-1:0]  rd_data;
  logic          ret_en = 0;
  logic [AW-1:0] ret_addr = '0;
  logic [W-1:0]  ret_mask = '0;

  logic [W-1:0]  shadow [WORDS];

  stt_mram_array dut (
    .clk(clk), .rst_n(rst_n), .rd_en_i(rd_en), .wr_en_i(wr_en), .addr_i(addr),
    .wdata_i(wdata), .wr_fail_mask_i(fmask), .busy_o(busy), .rd_valid_o(rd_valid),
    .rd_data_o(rd_data), .wr_done_o(wr_done), .ret_en_i(ret_en), .ret_addr_i(ret_addr),
    .ret_mask_i(ret_mask)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom};
  endfunction

  // write; returns with the clock at the negedge of the wr_done cycle
  task automatic do_write(logic [AW-1:0] a, logic [W-1:0] d, logic [W-1:0] m);
    int cyc;
    @(negedge clk);
    while (busy) @(negedge clk);
    wr_en = 1; addr = a; wdata = d; fmask = m;
    cyc = 0;
    do begin
      @(negedge clk);
      wr_en = 0; fmask = '0;
      cyc++;
    end while (!wr_done && cyc < 40);
    check($sformatf("write latency %0d", cyc), cyc == WC);
    shadow[a] = (shadow[a] & m) | (d & ~m);
  endtask

  task automatic do_read(logic [AW-1:0] a, bit wait_idle = 1);
    int cyc;
    if (wait_idle) begin
      @(negedge clk);
      while (busy) @(negedge clk);
    end
    rd_en = 1; addr = a;
    cyc = 0;
    do begin
      @(negedge clk);
      rd_en = 0;
      cyc++;
    end while (!rd_valid && cyc < 40);
    check($sformatf("read latency %0d", cyc), cyc == RC);
    check($sformatf("read data @%0d", a), rd_data === shadow[a]);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] d, m;
    logic [AW-1:0] a;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill a set of words cleanly (first and last included)
    for (int k = 0; k < 64; k++) do_write(AW'(k * 32), rnd(), '0);
    do_write(AW'(WORDS - 1), rnd(), '0);
    for (int k = 0; k < 64; k++) do_read(AW'(k * 32));
    do_read(AW'(WORDS - 1));
    // opportunistic writes with unfinished cells
    for (int k = 0; k < 64; k++) begin
      a = AW'(k * 32);
      d = rnd();
      m = '0;
      for (int b = 0; b < 1 + k % 4; b++) m[$urandom_range(W - 1)] = 1'b1;
      do_write(a, d, m);
      do_read(a);
    end
    // a word whose every cell fails keeps its old content
    a = AW'(5 * 32);
    d = shadow[a];
    do_write(a, ~d, '1);
    do_read(a);
    check("all-unfinished write leaves word unchanged", shadow[a] === d);
    // retention flips
    for (int k = 0; k < 16; k++) begin
      a = AW'(k * 32);
      m = rnd() & rnd() & rnd();
      @(negedge clk);
      ret_en = 1; ret_addr = a; ret_mask = m;
      @(negedge clk);
      ret_en = 0;
      shadow[a] ^= m;
      do_read(a);
    end
    // read issued in the same cycle the write ends
    for (int k = 0; k < 16; k++) begin
      a = AW'(k * 32 + 7);
      d = rnd();
      do_write(a, d, '0);
      // we are at the negedge after wr_done; replay the corner directly:
      @(negedge clk);
      wr_en = 1; addr = a; wdata = ~d; fmask = '0;
      @(negedge clk);
      wr_en = 0;
      repeat (WC - 2) @(negedge clk);
      check("busy during write", busy === 1'b1);
      @(negedge clk);
      check("wr_done on time", wr_done === 1'b1 && busy === 1'b0);
      shadow[a] = ~d;
      do_read(a, 0);   // issued in the wr_done cycle
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
