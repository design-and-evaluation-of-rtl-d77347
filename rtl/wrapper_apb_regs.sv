// APB register bank of the microcode wrapper.
//
// Decodes the simplified APB completer interface (PSEL, PENABLE, PWRITE,
// PADDR, PWDATA, PRDATA, PREADY) into the wrapper's memory map, at offsets
// from the wrapper base 0x1A10C000:
//   0x000          control, bit 0 enables (starts) the DMA      read/write
//   0x00C          status,  bit 0 chunk FIFO full, bit 1 empty  read only
//   0x100..0x3FC   decompression tables (192 words)            read/write
//   0x400          chunk FIFO input (push a chunk address)      write only
// The map is the design's. Own choices: the bank never waits (PREADY is
// tied high, so every transfer is Setup + one Access cycle); a write acts in
// the Access cycle; only address bits 11:0 are decoded; unmapped reads
// return zero and unmapped writes are dropped.
module wrapper_apb_regs
  import ctrl_seq_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  // APB completer
  input  logic        psel_i,
  input  logic        penable_i,
  input  logic        pwrite_i,
  input  logic [31:0] paddr_i,
  input  logic [31:0] pwdata_i,
  output logic [31:0] prdata_o,
  output logic        pready_o,
  // to the wrapper
  output logic        dma_en_o,
  output logic        fifo_push_o,
  output logic [31:0] fifo_wdata_o,
  input  logic        fifo_full_i,
  input  logic        fifo_empty_i,
  output logic        lut_we_o,
  output logic [7:0]  lut_idx_o,
  output logic [31:0] lut_wdata_o,
  input  logic [31:0] lut_rdata_i
);
  logic [11:0] off;
  logic        access, wr, in_lut;

  assign off      = paddr_i[11:0];
  assign access   = psel_i && penable_i;
  assign wr       = access && pwrite_i;
  assign in_lut   = (off >= REG_LUT_FIRST) && (off <= REG_LUT_LAST);
  assign pready_o = 1'b1;

  logic ctrl_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                       ctrl_q <= 1'b0;
    else if (wr && off == REG_CTRL)    ctrl_q <= pwdata_i[0];
  end
  assign dma_en_o = ctrl_q;

  assign fifo_push_o  = wr && (off == REG_FIFO_IN);
  assign fifo_wdata_o = pwdata_i;

  logic [11:0] lut_off;
  assign lut_off     = off - REG_LUT_FIRST;
  assign lut_idx_o   = lut_off[9:2];
  assign lut_we_o    = wr && in_lut;
  assign lut_wdata_o = pwdata_i;

  always_comb begin
    prdata_o = '0;
    if (off == REG_CTRL)        prdata_o = {31'b0, ctrl_q};
    else if (off == REG_STATUS) prdata_o = {30'b0, fifo_empty_i, fifo_full_i};
    else if (in_lut)            prdata_o = lut_rdata_i;
  end

  // APB: PENABLE only in the second cycle of a selected transfer.
  a_penable_after_psel: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (psel_i && !penable_i) |=> (psel_i && penable_i));
endmodule
