// Decompression module: expands each 32-bit microcode word into the 48-bit
// dec_cmd word that the radar modules use.
//
// The design describes this module only by its function ("expands the
// content of the control word", fields A and B "used for decompression") and
// by its APB window of 192 words (0x100..0x3FC). This implementation fills
// that window with two lookup tables: 64 entries indexed by field A (bits
// 7:2) and 32 entries indexed by field B (bits 12:8), each entry 48 bits held
// as two 32-bit words (low word at the even index, bits 47:32 in the low half
// of the odd index). 64 + 32 entries of two words fill the 192-word window
// exactly. A type-A word (bit 0 = 0) is expanded through the field-A table,
// a type-B word through the field-B table.
//
// Timing: one register stage. The word presented with cmd_valid_i appears on
// cmd_o together with its dec_cmd_o and cmd_valid_o one cycle later. Table
// writes (lut_we_i, word index lut_idx_i 0..191) take effect the next cycle;
// lut_rdata_o reads the addressed word combinationally. Reset clears the
// tables and the output stage.
module decomp_lut
  import ctrl_seq_pkg::*;
(
  input  logic             clk_i,
  input  logic             rst_ni,
  // table access (word index within the 192-word window)
  input  logic             lut_we_i,
  input  logic [7:0]       lut_idx_i,
  input  logic [31:0]      lut_wdata_i,
  output logic [31:0]      lut_rdata_o,
  // microcode stream in
  input  logic [31:0]      cmd_i,
  input  logic             cmd_valid_i,
  // radar interface out
  output logic [31:0]      cmd_o,
  output logic [DEC_W-1:0] dec_cmd_o,
  output logic             cmd_valid_o
);
  localparam int unsigned HI_W = DEC_W - 32;

  logic [31:0]     lo_q [LUT_N];
  logic [HI_W-1:0] hi_q [LUT_N];

  logic [6:0] wentry;
  assign wentry = lut_idx_i[7:1];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < LUT_N; i++) begin
        lo_q[i] <= '0;
        hi_q[i] <= '0;
      end
    end else if (lut_we_i && (wentry < 7'(LUT_N))) begin
      if (lut_idx_i[0]) hi_q[wentry] <= lut_wdata_i[HI_W-1:0];
      else              lo_q[wentry] <= lut_wdata_i;
    end
  end

  always_comb begin
    lut_rdata_o = '0;
    if (wentry < 7'(LUT_N))
      lut_rdata_o = lut_idx_i[0] ? 32'(hi_q[wentry]) : lo_q[wentry];
  end

  // Lookup of the incoming word.
  ucode_t     w;
  logic [6:0] rentry;
  assign w      = ucode_t'(cmd_i);
  assign rentry = w.wtype ? 7'(LUTA_N) + 7'(w.field_b) : 7'(w.field_a);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cmd_o       <= '0;
      dec_cmd_o   <= '0;
      cmd_valid_o <= 1'b0;
    end else begin
      cmd_valid_o <= cmd_valid_i;
      if (cmd_valid_i) begin
        cmd_o     <= cmd_i;
        dec_cmd_o <= {hi_q[rentry], lo_q[rentry]};
      end
    end
  end
endmodule
