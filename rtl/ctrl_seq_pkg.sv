// Shared types and constants of the microcode control system.
//
// A microcode word is 32 bits. Only its low thirteen bits matter to the
// control hardware: bit 0 is the word type (A = 0, B = 1), bit 1 (c_end)
// marks the last word of a chunk, bits 7:2 (field A) and 12:8 (field B)
// index the decompression tables. The upper fields are carried along
// unchanged. The field layout, the custom instruction opcodes and the wrapper
// register offsets follow the design description; the TCDM request
// struct is this implementation's packing of the bus signals it lists.
package ctrl_seq_pkg;

  // ---------------------------------------------------------------- microcode
  typedef struct packed {
    logic [2:0] field8;   // [31:29]
    logic [1:0] field7;   // [28:27]
    logic       field6;   // [26]
    logic [1:0] field5;   // [25:24]
    logic [1:0] field4;   // [23:22]
    logic [1:0] field3;   // [21:20]
    logic       field2;   // [19]
    logic [5:0] field1;   // [18:13]
    logic [4:0] field_b;  // [12:8]
    logic [5:0] field_a;  // [7:2]
    logic       c_end;    // [1]
    logic       wtype;    // [0]  0 = type A, 1 = type B
  } ucode_t;

  localparam int unsigned DEC_W = 48;  // width of the decompressed word

  // Decompression tables: 64 entries for field A, 32 for field B, each
  // 48 bits stored as two 32-bit APB words (low word first).
  localparam int unsigned LUTA_N = 64;
  localparam int unsigned LUTB_N = 32;
  localparam int unsigned LUT_N  = LUTA_N + LUTB_N;

  // ------------------------------------------------- wrapper register offsets
  // Offsets from the wrapper base address 0x1A10C000.
  localparam logic [11:0] REG_CTRL      = 12'h000;  // bit 0: DMA enable
  localparam logic [11:0] REG_STATUS    = 12'h00C;  // bit 0 full, bit 1 empty
  localparam logic [11:0] REG_LUT_FIRST = 12'h100;  // decompression tables
  localparam logic [11:0] REG_LUT_LAST  = 12'h3FC;
  localparam logic [11:0] REG_FIFO_IN   = 12'h400;  // chunk FIFO input

  // ------------------------------------------------------- TCDM bus bundles
  // Request side only. The response (gnt, rvalid, rdata) is kept as separate
  // signals: gnt depends combinationally on the request, rvalid and rdata do
  // not, and a single response struct would tie them together.
  typedef struct packed {
    logic        req;
    logic [31:0] addr;
    logic        wen;    // 1 = write
    logic [31:0] wdata;
    logic [3:0]  be;
  } tcdm_req_t;


  // ------------------------------------------- custom instruction encoding
  localparam logic [6:0] OPC_PPA   = 7'h0B;
  localparam logic [6:0] OPC_PPB   = 7'h2B;
  localparam logic [6:0] OPC_PCA   = 7'h5B;
  localparam logic [6:0] OPC_PCB   = 7'h7B;
  localparam logic [6:0] OPC_PIPE  = 7'h1B;  // start_p (funct3 0), synch_p (funct3 1)
  localparam logic [6:0] OPC_JALR  = 7'h67;  // jalr (funct3 0), fjr (funct3 7)
  localparam logic [2:0] F3_JALR   = 3'h0;
  localparam logic [2:0] F3_FJR    = 3'h7;
  localparam logic [2:0] F3_STARTP = 3'h0;
  localparam logic [2:0] F3_SYNCHP = 3'h1;
  localparam logic [31:0] INSTR_WFI = 32'h1050_0073;
  localparam logic [11:0] CSR_CMDP  = 12'h800;     // command pipeline status / stall

  // Register-file numbers used by the chunk sequence accelerator.
  localparam logic [4:0] RF_ASR0   = 5'd16;  // registers 16..20: chunk entries
  localparam logic [4:0] RF_START  = 5'd27;  // command program start address
  localparam logic [4:0] RF_RET    = 5'd28;  // loop return address
  localparam logic [4:0] RF_SRC    = 5'd29;  // shift ring counters (read only)
  localparam logic [4:0] RF_COPY   = 5'd30;  // copy of register 16 (read only)
  localparam logic [4:0] RF_OUTER  = 5'd31;  // address high half / outer count

  // Command pipeline controller.
  typedef enum logic [2:0] {
    CP_IDLE, CP_DUMP1, CP_DUMP2, CP_AUTO, CP_JUMP, CP_STALL
  } cp_state_e;

  typedef enum logic [1:0] {
    PC_HOLD = 2'd0,  // re-fetch the same instruction
    PC_INCR = 2'd1,  // next instruction
    PC_JUMP = 2'd2,  // register 27 when idle, else the latched jump target
    PC_RET  = 2'd3   // register 28, loop return address
  } pc_sel_e;

endpackage
