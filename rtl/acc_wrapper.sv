// Microcode wrapper: the block between the SoC and the radar command
// interface.
//
// With HAS_DMA = 1 (the DMA architectures) it holds the APB register bank,
// the chunk FIFO of chunk start addresses, the microcode DMA (a TCDM master
// that reads the chunks from memory) and the decompression module. The CPU
// writes chunk addresses into the FIFO and sets the enable bit; the DMA then
// streams the chunks out on its own. With HAS_DMA = 0 (the architectures in
// which the processor pushes microcode itself) only the register bank and
// the decompression module remain, and the words come in on cpu_cmd_i.
//
// Radar interface: cmd_o (32-bit microcode word), dec_cmd_o (48-bit
// decompressed word) and cmd_valid_o (one word per cycle it is high) go out;
// cmd_req_i tells the source that the radar wants more words. The
// decompression stage adds one cycle, so a word reaches cmd_o one cycle
// after the DMA (or the processor) produced it. The structure is the
// design's; HAS_DMA is this implementation's way of building both variants
// from one module.
module acc_wrapper
  import ctrl_seq_pkg::*;
#(
  parameter bit HAS_DMA = 1'b1
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  // APB completer
  input  logic             psel_i,
  input  logic             penable_i,
  input  logic             pwrite_i,
  input  logic [31:0]      paddr_i,
  input  logic [31:0]      pwdata_i,
  output logic [31:0]      prdata_o,
  output logic             pready_o,
  // TCDM master (DMA), idle when HAS_DMA = 0
  output tcdm_req_t        tcdm_req_o,
  input  logic             tcdm_gnt_i,
  input  logic             tcdm_rvalid_i,
  input  logic [31:0]      tcdm_rdata_i,
  // words pushed by the processor, used when HAS_DMA = 0
  input  logic [31:0]      cpu_cmd_i,
  input  logic             cpu_cmd_valid_i,
  // radar interface
  input  logic             cmd_req_i,
  output logic [31:0]      cmd_o,
  output logic [DEC_W-1:0] dec_cmd_o,
  output logic             cmd_valid_o,
  output logic             dma_busy_o
);
  logic        dma_en, fifo_push, fifo_full, fifo_empty, fifo_pop;
  logic [31:0] fifo_wdata, fifo_rdata;
  logic        lut_we;
  logic [7:0]  lut_idx;
  logic [31:0] lut_wdata, lut_rdata;
  logic [31:0] raw_cmd;
  logic        raw_valid;

  wrapper_apb_regs u_regs (
    .clk_i, .rst_ni,
    .psel_i, .penable_i, .pwrite_i, .paddr_i, .pwdata_i, .prdata_o, .pready_o,
    .dma_en_o     (dma_en),
    .fifo_push_o  (fifo_push),
    .fifo_wdata_o (fifo_wdata),
    .fifo_full_i  (fifo_full),
    .fifo_empty_i (fifo_empty),
    .lut_we_o     (lut_we),
    .lut_idx_o    (lut_idx),
    .lut_wdata_o  (lut_wdata),
    .lut_rdata_i  (lut_rdata)
  );

  if (HAS_DMA) begin : g_dma
    chunk_fifo #(.DEPTH(4), .WIDTH(32)) u_fifo (
      .clk_i, .rst_ni,
      .push_i  (fifo_push),
      .wdata_i (fifo_wdata),
      .pop_i   (fifo_pop),
      .rdata_o (fifo_rdata),
      .full_o  (fifo_full),
      .empty_o (fifo_empty)
    );
    ucode_dma #(.BURST_LEN(8)) u_dma (
      .clk_i, .rst_ni,
      .enable_i     (dma_en),
      .fifo_empty_i (fifo_empty),
      .fifo_addr_i  (fifo_rdata),
      .fifo_pop_o   (fifo_pop),
      .tcdm_req_o,
      .tcdm_gnt_i,
      .tcdm_rvalid_i,
      .tcdm_rdata_i,
      .cmd_req_i,
      .cmd_o        (raw_cmd),
      .cmd_valid_o  (raw_valid),
      .busy_o       (dma_busy_o)
    );
  end else begin : g_cpu
    assign fifo_full  = 1'b0;
    assign fifo_empty = 1'b1;
    assign fifo_pop   = 1'b0;
    assign fifo_rdata = '0;
    assign tcdm_req_o = '0;
    assign raw_cmd    = cpu_cmd_i;
    assign raw_valid  = cpu_cmd_valid_i;
    assign dma_busy_o = 1'b0;
  end

  decomp_lut u_decomp (
    .clk_i, .rst_ni,
    .lut_we_i    (lut_we),
    .lut_idx_i   (lut_idx),
    .lut_wdata_i (lut_wdata),
    .lut_rdata_o (lut_rdata),
    .cmd_i       (raw_cmd),
    .cmd_valid_i (raw_valid),
    .cmd_o,
    .dec_cmd_o,
    .cmd_valid_o
  );
endmodule
