// First pipeline stage of the processor front end, with Lazy-ECC revert.
//
// A fetched word enters the stage-1 register as soon as the cache delivers
// it, possibly unchecked. It is passed on to stage 2 only once it is known
// to be good: either it came already checked, or the cache's detector
// reports it clean one cycle later. If the detector reports an error
// (revert_i) the word is squashed in stage 1, before it can reach stage 2.
// Whenever no verified word is ready, a NOP is passed to stage 2 instead,
// so during a cache error recovery the pipeline is fed NOPs until the
// corrected word is refetched.
//
// Interface: rsp_valid_i/rsp_data_i/rsp_spec_i from the cache; chk_valid_i
// with revert_i is the verdict on the last unchecked word. s2_valid_o marks
// a real instruction word in the stage-2 register s2_data_o (NOP_WORD
// otherwise); squash_o pulses when a word is reverted.
// Timing: a word delivered in cycle c sits in stage 1 in cycle c+1, when its
// verdict arrives, and reaches stage 2 in cycle c+2; a checked word too.
// From the document: speculative entry into the first stage, revert before
// the next stage, NOP insertion during correction. This design's choice: the
// fetch word is the cache's 64-bit word, and the NOP is two Alpha no-op
// instructions (BIS R31,R31,R31), the processor used in the document.
module fetch_revert_stage
  import lazy_ecc_pkg::*;
#(
  parameter logic [DATA_W-1:0] NOP_WORD = {2{32'h47FF_041F}}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rsp_valid_i,
  input  logic [DATA_W-1:0] rsp_data_i,
  input  logic              rsp_spec_i,
  input  logic              chk_valid_i,
  input  logic              revert_i,
  output logic              s2_valid_o,
  output logic [DATA_W-1:0] s2_data_o,
  output logic              squash_o
);

  logic              s1_valid_q;
  logic              s1_checked_q;
  logic [DATA_W-1:0] s1_data_q;

  logic advance;      // stage-1 word is verified and moves on
  logic squash;       // stage-1 word is reverted

  assign squash  = s1_valid_q && !s1_checked_q && chk_valid_i && revert_i;
  assign advance = s1_valid_q && (s1_checked_q || (chk_valid_i && !revert_i));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid_q   <= 1'b0;
      s1_checked_q <= 1'b0;
      s2_valid_o   <= 1'b0;
      s2_data_o    <= NOP_WORD;
    end else begin
      // stage 2: verified word or a NOP bubble
      s2_valid_o <= advance;
      s2_data_o  <= advance ? s1_data_q : NOP_WORD;
      // stage 1
      if (rsp_valid_i) begin
        s1_valid_q   <= 1'b1;
        s1_checked_q <= !rsp_spec_i;
      end else if (advance || squash) begin
        s1_valid_q <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rsp_valid_i) s1_data_q <= rsp_data_i;
  end

  assign squash_o = squash;

  // a new word never overwrites an unverified one
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid_i |-> (!s1_valid_q || advance || squash));

endmodule
