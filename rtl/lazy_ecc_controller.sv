// Lazy-ECC read/write sequencer of the STT-MRAM cache data array.
//
// Writes: the 64-bit word is BCH-encoded and written with the array's short
// (opportunistic) write pulse; wr_ack_o marks the end of the pulse. Cells
// that did not finish switching become bit errors that the code absorbs.
//
// Reads, Lazy mode: the data bits of the raw codeword are handed to the
// requester in the cycle the array returns them (rsp_valid_o with
// rsp_spec_o = 1), while the same codeword enters the one-cycle detector.
// One cycle later chk_valid_o gives the verdict. If it is clean nothing else
// happens. If it is not, revert_o tells the requester to drop the word, and
// the controller runs the corrector, re-encodes the corrected data, writes
// it back to the array and reads it again; the refetched word is delivered
// and checked like any other read. This costs
//   t_R + t_D + (t_E + t_W) + t_R = 2 + 10 + 9 + 2 = 23 cycles
// until the refetched word, against t_R = 2 cycles for a clean read.
//
// Reads, conventional mode: every read goes through detection and
// correction before it is delivered (rsp_spec_o = 0), t_R + t_D = 12 cycles,
// whatever the error count; nothing is written back.
//
// A word with more than T errors cannot be corrected: it is delivered as
// read, with rsp_spec_o = 0 and rsp_fail_o = 1, and not written back.
//
// Interface: req_valid_i/req_ready_o handshake, one access at a time; the
// mode is sampled when a request is taken. stall_o is high while a Lazy
// error recovery is under way (the requester issues NOPs meanwhile).
// cor_done_o/cor_nerr_o report each finished correction.
// From the document: the speculative delivery, the revert, the
// correct/encode/write-back/refetch sequence and its cost (Eq. 6), and the
// conventional serial read. This design's choice: the handshake, the
// re-read being issued by this controller rather than by the processor, and
// the handling of uncorrectable words, which the document does not cover.
module lazy_ecc_controller
  import lazy_ecc_pkg::*;
#(
  parameter int unsigned T           = 4,
  parameter int unsigned WORDS       = 2048,
  parameter int unsigned CORR_CYCLES = 9,
  localparam int unsigned P  = GF_M * T,
  localparam int unsigned N  = DATA_W + P,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ecc_mode_e         mode_i,
  // requester side
  input  logic              req_valid_i,
  output logic              req_ready_o,
  input  logic              req_we_i,
  input  logic [AW-1:0]     req_addr_i,
  input  logic [DATA_W-1:0] req_wdata_i,
  output logic              wr_ack_o,
  output logic              rsp_valid_o,
  output logic [DATA_W-1:0] rsp_data_o,
  output logic              rsp_spec_o,
  output logic              rsp_fail_o,
  output logic              chk_valid_o,
  output logic              chk_ok_o,
  output logic              revert_o,
  output logic              stall_o,
  output logic              cor_done_o,   // corrector finished this cycle
  output logic [7:0]        cor_nerr_o,   // bits it corrected (0 if it failed)
  // array side
  output logic              mem_rd_en_o,
  output logic              mem_wr_en_o,
  output logic [AW-1:0]     mem_addr_o,
  output logic [N-1:0]      mem_wdata_o,
  input  logic              mem_busy_i,
  input  logic              mem_rd_valid_i,
  input  logic [N-1:0]      mem_rd_data_i,
  input  logic              mem_wr_done_i
);

  typedef enum logic [2:0] {
    S_IDLE,      // waiting for a request
    S_WRITE,     // write pulse of a requested write
    S_READ,      // waiting for array data
    S_CHECK,     // detector verdict visible
    S_CORRECT,   // corrector running
    S_WRBACK     // write-back of the corrected word
  } state_e;

  state_e        state_q, state_d;
  ecc_mode_e     mode_q;
  logic [AW-1:0] addr_q;
  logic          recover_q;      // Lazy error recovery in progress

  // ---- ECC datapath ----
  logic [DATA_W-1:0] enc_data;
  logic [N-1:0]      enc_cw;
  logic              det_valid, det_err;
  logic [N-1:0]      det_cw;
  gf_t               det_syn [2*T];
  logic              cor_start, cor_busy, cor_done, cor_fail;
  logic [N-1:0]      cor_cw;
  logic [DATA_W-1:0] cor_data;
  logic [7:0]        cor_nerr;

  bch_encoder #(.T(T)) u_enc (
    .data_i     (enc_data),
    .codeword_o (enc_cw)
  );

  bch_detector #(.T(T)) u_det (
    .clk         (clk),
    .rst_n       (rst_n),
    .valid_i     (mem_rd_valid_i),
    .codeword_i  (mem_rd_data_i),
    .chk_valid_o (det_valid),
    .chk_err_o   (det_err),
    .codeword_o  (det_cw),
    .syn_o       (det_syn)
  );

  bch_corrector #(.T(T), .CORR_CYCLES(CORR_CYCLES)) u_cor (
    .clk        (clk),
    .rst_n      (rst_n),
    .start_i    (cor_start),
    .codeword_i (det_cw),
    .syn_i      (det_syn),
    .busy_o     (cor_busy),
    .done_o     (cor_done),
    .codeword_o (cor_cw),
    .data_o     (cor_data),
    .nerr_o     (cor_nerr),
    .fail_o     (cor_fail)
  );

  // Encoder input: the requested data, or the corrected data on write-back.
  assign enc_data = (state_q == S_CORRECT) ? cor_data : req_wdata_i;

  // ---- sequencing ----
  always_comb begin
    state_d     = state_q;
    req_ready_o = 1'b0;
    mem_rd_en_o = 1'b0;
    mem_wr_en_o = 1'b0;
    mem_addr_o  = addr_q;
    mem_wdata_o = enc_cw;
    cor_start   = 1'b0;
    wr_ack_o    = 1'b0;
    rsp_valid_o = 1'b0;
    rsp_data_o  = mem_rd_data_i[N-1 -: DATA_W];
    rsp_spec_o  = 1'b0;
    rsp_fail_o  = 1'b0;
    chk_valid_o = 1'b0;
    chk_ok_o    = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        req_ready_o = !mem_busy_i;
        mem_addr_o  = req_addr_i;
        if (req_valid_i && !mem_busy_i) begin
          mem_wr_en_o = req_we_i;
          mem_rd_en_o = !req_we_i;
          state_d     = req_we_i ? S_WRITE : S_READ;
        end
      end
      S_WRITE: begin
        if (mem_wr_done_i) begin
          wr_ack_o = 1'b1;
          state_d  = S_IDLE;
        end
      end
      S_READ: begin
        if (mem_rd_valid_i) begin
          // Lazy: unchecked data goes out at once
          rsp_valid_o = (mode_q == MODE_LAZY);
          rsp_spec_o  = (mode_q == MODE_LAZY);
          state_d     = S_CHECK;
        end
      end
      S_CHECK: begin
        chk_valid_o = (mode_q == MODE_LAZY);
        chk_ok_o    = (mode_q == MODE_LAZY) && !det_err;
        if (det_err || mode_q == MODE_CONV) begin
          cor_start = 1'b1;
          state_d   = S_CORRECT;
        end else begin
          state_d = S_IDLE;
        end
      end
      S_CORRECT: begin
        if (cor_done) begin
          if (mode_q == MODE_CONV || cor_fail) begin
            rsp_valid_o = 1'b1;
            rsp_data_o  = cor_data;
            rsp_fail_o  = cor_fail;
            state_d     = S_IDLE;
          end else begin
            // re-encode the corrected word and write it back
            mem_wr_en_o = 1'b1;
            state_d     = S_WRBACK;
          end
        end
      end
      S_WRBACK: begin
        if (mem_wr_done_i) begin
          // refetch the repaired word
          mem_rd_en_o = 1'b1;
          state_d     = S_READ;
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  assign revert_o = chk_valid_o && !chk_ok_o;
  assign stall_o  = recover_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      mode_q    <= MODE_LAZY;
      addr_q    <= '0;
      recover_q <= 1'b0;
    end else begin
      state_q <= state_d;
      if (state_q == S_IDLE && req_valid_i && !mem_busy_i) begin
        mode_q <= mode_i;
        addr_q <= req_addr_i;
      end
      if (revert_o)
        recover_q <= 1'b1;
      else if (recover_q && ((state_q == S_CHECK) || (state_q == S_CORRECT && cor_done && cor_fail)))
        recover_q <= 1'b0;
    end
  end

  // ---- protocol rules ----
  // the detector verdict arrives exactly one cycle after the array data
  a_check_follows_read: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_CHECK) |-> det_valid);
  // the corrector is only started when it is free
  a_corrector_free: assert property (@(posedge clk) disable iff (!rst_n)
    cor_start |-> !cor_busy);
  // the array is only given work when it can take it
  a_array_free: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_rd_en_o || mem_wr_en_o) |-> !mem_busy_i);

  assign cor_done_o = cor_done;
  assign cor_nerr_o = cor_nerr;

endmodule
