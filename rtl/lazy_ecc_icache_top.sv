// STT-MRAM L1 instruction-cache data memory with opportunistic write,
// Lazy-ECC reads and temperature-adaptive ECC mode.
//
// Structure:
//   ecc_mode_selector   thermal sensor reading -> Lazy or conventional mode
//   lazy_ecc_controller BCH encoder, one-cycle detector, multi-cycle
//                       corrector and the read/write/recovery sequencing
//   stt_mram_array      2048 x (64 + 7T)-bit STT-MRAM array, short write pulse
//   fetch_revert_stage  the processor's first fetch stage: takes unchecked
//                       words, squashes them on revert, feeds NOPs meanwhile
// The processor core and the thermal sensor are outside: the fetch request
// port, the stage-2 output and temp_i are brought out. The two fault inputs
// stand for the physics of the cells: wr_fail_mask_i marks the cells that
// do not finish switching in the write under way, ret_* flips stored cells.
//
// Timing at the default parameters (one cycle = 0.5 ns at 2 GHz):
//   Lazy read, no error     data after 2 cycles, verdict after 3
//   Lazy read, error        revert after 3, refetched data after 23
//   conventional read       corrected data after 12
//   write                   wr_ack after 9
// The structure, the mode switch and the latencies follow the document; the
// handshakes, the port formats and the fault inputs are this design's own.
module lazy_ecc_icache_top
  import lazy_ecc_pkg::*;
#(
  parameter int unsigned T            = 4,
  parameter int unsigned WORDS        = 2048,
  parameter int unsigned READ_CYCLES  = 2,
  parameter int unsigned WRITE_CYCLES = 9,
  parameter int unsigned CORR_CYCLES  = 9,
  parameter int          TEMP_TH      = 80,
  localparam int unsigned P  = GF_M * T,
  localparam int unsigned N  = DATA_W + P,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // thermal sensor
  input  logic signed [7:0] temp_i,
  output ecc_mode_e         mode_o,
  // fetch / fill port of the processor
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
  output logic              revert_o,
  output logic              stall_o,
  output logic              cor_done_o,
  output logic [7:0]        cor_nerr_o,
  // first pipeline stage output (stage-2 register)
  output logic              s2_valid_o,
  output logic [DATA_W-1:0] s2_data_o,
  output logic              squash_o,
  // cell behaviour
  input  logic [N-1:0]      wr_fail_mask_i,
  input  logic              ret_en_i,
  input  logic [AW-1:0]     ret_addr_i,
  input  logic [N-1:0]      ret_mask_i
);

  ecc_mode_e     mode;
  logic          chk_valid;
  logic          mem_rd_en, mem_wr_en, mem_busy, mem_rd_valid, mem_wr_done;
  logic [AW-1:0] mem_addr;
  logic [N-1:0]  mem_wdata, mem_rd_data;

  ecc_mode_selector #(.TEMP_TH(TEMP_TH)) u_mode (
    .clk    (clk),
    .rst_n  (rst_n),
    .temp_i (temp_i),
    .mode_o (mode)
  );

  lazy_ecc_controller #(
    .T           (T),
    .WORDS       (WORDS),
    .CORR_CYCLES (CORR_CYCLES)
  ) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .mode_i         (mode),
    .req_valid_i    (req_valid_i),
    .req_ready_o    (req_ready_o),
    .req_we_i       (req_we_i),
    .req_addr_i     (req_addr_i),
    .req_wdata_i    (req_wdata_i),
    .wr_ack_o       (wr_ack_o),
    .rsp_valid_o    (rsp_valid_o),
    .rsp_data_o     (rsp_data_o),
    .rsp_spec_o     (rsp_spec_o),
    .rsp_fail_o     (rsp_fail_o),
    .chk_valid_o    (chk_valid),
    .chk_ok_o       (),
    .revert_o       (revert_o),
    .stall_o        (stall_o),
    .cor_done_o     (cor_done_o),
    .cor_nerr_o     (cor_nerr_o),
    .mem_rd_en_o    (mem_rd_en),
    .mem_wr_en_o    (mem_wr_en),
    .mem_addr_o     (mem_addr),
    .mem_wdata_o    (mem_wdata),
    .mem_busy_i     (mem_busy),
    .mem_rd_valid_i (mem_rd_valid),
    .mem_rd_data_i  (mem_rd_data),
    .mem_wr_done_i  (mem_wr_done)
  );

  stt_mram_array #(
    .WORDS        (WORDS),
    .W            (N),
    .READ_CYCLES  (READ_CYCLES),
    .WRITE_CYCLES (WRITE_CYCLES)
  ) u_array (
    .clk            (clk),
    .rst_n          (rst_n),
    .rd_en_i        (mem_rd_en),
    .wr_en_i        (mem_wr_en),
    .addr_i         (mem_addr),
    .wdata_i        (mem_wdata),
    .wr_fail_mask_i (wr_fail_mask_i),
    .busy_o         (mem_busy),
    .rd_valid_o     (mem_rd_valid),
    .rd_data_o      (mem_rd_data),
    .wr_done_o      (mem_wr_done),
    .ret_en_i       (ret_en_i),
    .ret_addr_i     (ret_addr_i),
    .ret_mask_i     (ret_mask_i)
  );

  fetch_revert_stage u_fetch (
    .clk         (clk),
    .rst_n       (rst_n),
    .rsp_valid_i (rsp_valid_o),
    .rsp_data_i  (rsp_data_o),
    .rsp_spec_i  (rsp_spec_o),
    .chk_valid_i (chk_valid),
    .revert_i    (revert_o),
    .s2_valid_o  (s2_valid_o),
    .s2_data_o   (s2_data_o),
    .squash_o    (squash_o)
  );

  assign mode_o = mode;

endmodule
