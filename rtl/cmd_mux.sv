// CMD mux: rebuilds a 32-bit microcode word from a push instruction.
//
// The four push instructions carry the microcode fields in their 25-bit
// immediate (bits 31:7); the opcode (bits 6:0) gives the word type:
//   ppA 0x0B, ppB 0x2B  ("pp" format, used for chunks C2..C7)
//   pcA 0x5B, pcB 0x7B  ("pc" format, used for chunks C1 and C8)
// Bit positions of the fields inside the immediate:
//   pp: [31] c_end, [30:29] field 5, [28:24] field B, [23:22] field 4,
//       [21:16] field 1, [15] field 2, [14:13] field 3, [12:7] field A
//   pc: [22:18] field B, [17] c_end, [16] field 2, [15] field 7 (low bit),
//       [14:13] field 3, [12:7] field A; bits 31:23 unused
// Fields an instruction does not carry are zero in the word. The opcodes, the
// field widths and the pc layout follow the design; the positions of c_end
// and field 5 in the pp format are this implementation's reading of it.
// Purely combinational; is_cmd_o is high for any of the four opcodes.
module cmd_mux
  import ctrl_seq_pkg::*;
(
  input  logic [31:0] instr_i,
  output logic        is_cmd_o,
  output logic        c_end_o,
  output logic [31:0] cmd_o
);
  logic [6:0] opc;
  ucode_t     w;

  assign opc = instr_i[6:0];

  always_comb begin
    w        = '0;
    is_cmd_o = 1'b1;
    unique case (opc)
      OPC_PPA, OPC_PPB: begin
        w.c_end   = instr_i[31];
        w.field5  = instr_i[30:29];
        w.field_b = instr_i[28:24];
        w.field4  = instr_i[23:22];
        w.field1  = instr_i[21:16];
        w.field2  = instr_i[15];
        w.field3  = instr_i[14:13];
        w.field_a = instr_i[12:7];
      end
      OPC_PCA, OPC_PCB: begin
        w.field_b = instr_i[22:18];
        w.c_end   = instr_i[17];
        w.field2  = instr_i[16];
        w.field7  = {1'b0, instr_i[15]};
        w.field3  = instr_i[14:13];
        w.field_a = instr_i[12:7];
      end
      default: is_cmd_o = 1'b0;
    endcase
    w.wtype = (opc == OPC_PPB) || (opc == OPC_PCB);
    if (!is_cmd_o) w = '0;
  end

  assign cmd_o   = w;
  assign c_end_o = w.c_end;
endmodule
