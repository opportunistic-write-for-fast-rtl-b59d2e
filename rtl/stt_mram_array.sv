// STT-MRAM data array of the cache, seen from its digital interface.
//
// WORDS codewords of W bits. A read returns the stored word READ_CYCLES
// clocks after it is issued. A write is an opportunistic write: the write
// current is switched off after a fixed WRITE_CYCLES, shorter than the worst
// case of the stochastic MTJ switching, so some cells may not have switched
// yet. Those cells keep their old value. Which cells are left unfinished is
// a property of the physical cells, so it is supplied from outside on
// wr_fail_mask_i (a 1 marks a cell whose switching did not complete; it only
// matters where the new bit differs from the old one). In the same way a
// thermally induced retention failure is applied with ret_en_i: the cells set
// in ret_mask_i of word ret_addr_i flip. With both masks at zero the array is
// an ordinary memory.
//
// Interface: one operation at a time. rd_en_i or wr_en_i (with addr_i,
// wdata_i, wr_fail_mask_i) is taken in a cycle where busy_o is low; that
// includes the last cycle of the previous operation, so back-to-back
// operations leave no idle cycle. A read taken in the cycle a write ends
// already sees the new word.
// Timing: rd_valid_o/rd_data_o appear READ_CYCLES clocks after a read is
// taken; wr_done_o is high WRITE_CYCLES clocks after a write is taken, and the
// word is updated at the end of that cycle. busy_o is high from the cycle
// after an operation is taken up to, not including, the cycle of rd_valid_o
// or wr_done_o.
// From the document: 16 KB of 64-bit words (2048 words, here with the BCH
// parity added), 0.90 ns read and 4.17 ns encode-and-write time for the
// four-error-correcting code, i.e. 2 and 9 cycles at 2 GHz. The handshake and
// the fault-injection ports are this design's own.
module stt_mram_array #(
  parameter int unsigned WORDS        = 2048,
  parameter int unsigned W            = 92,
  parameter int unsigned READ_CYCLES  = 2,
  parameter int unsigned WRITE_CYCLES = 9,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // access port
  input  logic          rd_en_i,
  input  logic          wr_en_i,
  input  logic [AW-1:0] addr_i,
  input  logic [W-1:0]  wdata_i,
  input  logic [W-1:0]  wr_fail_mask_i,
  output logic          busy_o,
  output logic          rd_valid_o,
  output logic [W-1:0]  rd_data_o,
  output logic          wr_done_o,
  // retention-failure injection
  input  logic          ret_en_i,
  input  logic [AW-1:0] ret_addr_i,
  input  logic [W-1:0]  ret_mask_i
);

  logic [W-1:0] mem [WORDS];

  logic          active_q;
  logic          is_wr_q;
  logic [AW-1:0] addr_q;
  logic [W-1:0]  wdata_q;
  logic [W-1:0]  fail_q;
  logic [7:0]    cnt_q;          // cycles since the operation was taken

  logic start;
  logic rd_last;                 // last cycle before read data is shown
  logic wr_last;                 // cycle in which the write pulse ends

  logic finishing;               // cycle of rd_valid_o or wr_done_o

  assign finishing = active_q && (rd_valid_o || wr_last);
  assign start     = (!active_q || finishing) && (rd_en_i || wr_en_i);
  assign rd_last = active_q && !is_wr_q && (cnt_q == 8'(READ_CYCLES - 1));
  assign wr_last = active_q &&  is_wr_q && (cnt_q == 8'(WRITE_CYCLES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q   <= 1'b0;
      is_wr_q    <= 1'b0;
      cnt_q      <= '0;
      rd_valid_o <= 1'b0;
    end else begin
      rd_valid_o <= rd_last;
      if (start) begin
        active_q <= 1'b1;
        is_wr_q  <= wr_en_i;
        cnt_q    <= 8'd1;
      end else if (active_q) begin
        cnt_q <= cnt_q + 8'd1;
        if (finishing) active_q <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      addr_q  <= addr_i;
      wdata_q <= wdata_i;
      fail_q  <= wr_fail_mask_i;
    end
    if (rd_last) rd_data_o <= mem[addr_q];
  end

  // Array update: write pulse end (unfinished cells keep the old value) and
  // retention flips. A write to the same word in the same cycle wins.
  always_ff @(posedge clk) begin
    if (ret_en_i && !(wr_last && ret_addr_i == addr_q))
      mem[ret_addr_i] <= mem[ret_addr_i] ^ ret_mask_i;
    if (wr_last)
      mem[addr_q] <= (mem[addr_q] & fail_q) | (wdata_q & ~fail_q);
  end

  assign busy_o    = active_q && !finishing;
  assign wr_done_o = wr_last;

  initial begin
    assert (READ_CYCLES >= 2 && WRITE_CYCLES >= 1)
      else $error("stt_mram_array: READ_CYCLES must be >= 2, WRITE_CYCLES >= 1");
  end

endmodule
