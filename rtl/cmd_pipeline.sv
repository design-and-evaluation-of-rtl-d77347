// Command pipeline: a second, two-stage (IF, ID) instruction pipeline next
// to the main processor pipeline, which runs the microcode program from its
// own instruction memory and pushes one microcode word per push instruction.
//
// Instructions it executes (everything else is treated as a no-operation):
//   ppA/ppB/pcA/pcB  push the word rebuilt by the CMD mux; with c_end set and
//                    the sequence accelerator not empty, also jump to the
//                    next chunk it gives
//   fjr  (opcode 0x67, funct3 7)  save PC + 4 in register 28 and jump to the
//                    accelerator's chunk address (skipped if it is empty)
//   jalr (opcode 0x67, funct3 0)  jump to register 28
//   wfi              return to Idle
//   synch_p (opcode 0x1B, funct3 1)  report to the synchronization module
// start_i (start_p decoded by the main pipeline) starts it at the address in
// register 27; csr_stall_i (bit 1 of the pipeline CSR) and lock_i (from the
// synchronization module) hold it.
//
// IF: the PC mux (hold, PC + 4, jump target, register 28) chooses the next
// address, which is sent to the memory in the same cycle; the memory answers
// one cycle later, so pc_q is always the address of the instruction that the
// decoder sees. Holding the PC fetches the same instruction again, which is
// how the pipeline waits. ID: the decoder, the CMD mux, the controller
// (cmdp_controller) and the chunk sequence accelerator (chunk_seq_acc, which
// also holds registers 27 and 28). The main pipeline writes and reads the
// accelerator registers through rf_*.
//
// An instruction in decode completes ("retires") unless it is invalidated by
// the controller, was not fetched (grant missing), the pipeline is held, or
// it is a push while the radar does not request words (cmd_req_i low); in
// each of these cases the PC holds. A retired push drives cmd_o/cmd_valid_o
// in that cycle. Sustained rate: one word per cycle within a chunk; a chunk
// change by jump costs three cycles. The instruction set, the PC mux, the
// stall causes and the use of registers 27/28 follow the design (which in
// one place swaps the roles of 27 and 28; the majority reading is used); the
// cycle timing is this implementation's.
module cmd_pipeline
  import ctrl_seq_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  // from / to the main pipeline
  input  logic        start_i,
  input  logic        csr_stall_i,
  output logic        pipe_idle_o,
  input  logic        rf_we_i,
  input  logic [4:0]  rf_waddr_i,
  input  logic [31:0] rf_wdata_i,
  input  logic [4:0]  rf_raddr_i,
  output logic [31:0] rf_rdata_o,
  // synchronization module
  input  logic        lock_i,
  output logic        sync_issued_o,
  output logic [4:0]  sync_id_o,
  // instruction memory (TCDM master, read only; a request that is not
  // granted returns no rvalid, so gnt is not needed here)
  output tcdm_req_t   imem_req_o,
  input  logic        imem_rvalid_i,
  input  logic [31:0] imem_rdata_i,
  // microcode out
  input  logic        cmd_req_i,
  output logic [31:0] cmd_o,
  output logic        cmd_valid_o,
  // observation
  output logic        jump_o,
  output cp_state_e   state_o
);
  logic [31:0] pc_q, pc_next, tgt_q, instr;
  logic        pipe_idle, dmp_instr, id_stall;
  pc_sel_e     pc_sel, pc_sel_eff;

  // ---------------------------------------------------------------- decode
  logic        id_valid, hold, retire;
  logic        is_cmd, c_end, is_fjr, is_jalr, is_wfi, is_sync;
  logic [31:0] cmd_word;
  logic [6:0]  opc;
  logic [2:0]  f3;

  assign instr    = imem_rdata_i;
  assign opc      = instr[6:0];
  assign f3       = instr[14:12];
  assign id_valid = imem_rvalid_i && !dmp_instr;

  cmd_mux u_cmd_mux (
    .instr_i  (instr),
    .is_cmd_o (is_cmd),
    .c_end_o  (c_end),
    .cmd_o    (cmd_word)
  );

  assign is_fjr  = (opc == OPC_JALR) && (f3 == F3_FJR);
  assign is_jalr = (opc == OPC_JALR) && (f3 == F3_JALR);
  assign is_wfi  = (instr == INSTR_WFI);
  assign is_sync = (opc == OPC_PIPE) && (f3 == F3_SYNCHP);

  assign hold   = csr_stall_i || lock_i || (is_cmd && !cmd_req_i);
  assign retire = id_valid && !hold;

  // --------------------------------------------------- sequence accelerator
  logic        acc_active, acc_jump, ret_we;
  logic [31:0] acc_target, start_addr, ret_addr;
  logic        take_jump;

  assign acc_jump  = retire && acc_active && ((is_cmd && c_end) || is_fjr);
  assign ret_we    = retire && acc_active && is_fjr;
  assign take_jump = acc_jump || (retire && is_jalr);

  chunk_seq_acc #(.N_ENTRIES(5)) u_acc (
    .clk_i, .rst_ni,
    .we_i         (rf_we_i),
    .waddr_i      (rf_waddr_i),
    .wdata_i      (rf_wdata_i),
    .ret_we_i     (ret_we),
    .ret_wdata_i  (pc_q + 32'd4),
    .raddr_i      (rf_raddr_i),
    .rdata_o      (rf_rdata_o),
    .jump_i       (acc_jump),
    .active_o     (acc_active),
    .target_o     (acc_target),
    .start_addr_o (start_addr),
    .ret_addr_o   (ret_addr)
  );

  // ------------------------------------------------------------ controller
  cmdp_controller u_ctrl (
    .clk_i, .rst_ni,
    .start_i,
    .stall_i     (csr_stall_i || lock_i),
    .wfi_i       (retire && is_wfi),
    .jmp_i       (take_jump),
    .jmp_ret_i   (is_jalr),
    .pipe_idle_o (pipe_idle),
    .dmp_instr_o (dmp_instr),
    .id_stall_o  (id_stall),
    .pc_sel_o    (pc_sel),
    .state_o
  );

  // ------------------------------------------------------------- IF stage
  // In Auto, an instruction that cannot retire (or was not fetched) is
  // fetched again.
  assign pc_sel_eff = (pc_sel == PC_INCR && !retire) ? PC_HOLD : pc_sel;

  always_comb begin
    unique case (pc_sel_eff)
      PC_HOLD: pc_next = pc_q;
      PC_INCR: pc_next = pc_q + 32'd4;
      PC_JUMP: pc_next = pipe_idle ? start_addr : tgt_q;
      PC_RET:  pc_next = ret_addr;
      default: pc_next = pc_q;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      pc_q  <= '0;
      tgt_q <= '0;
    end else begin
      // An ungranted fetch returns no rvalid, so the instruction cannot
      // retire and the same address is requested again.
      pc_q <= pc_next;
      if (acc_jump) tgt_q <= acc_target;
    end
  end

  always_comb begin
    imem_req_o      = '0;
    imem_req_o.req  = !id_stall;
    imem_req_o.addr = pc_next;
    imem_req_o.be   = 4'hF;
  end

  // --------------------------------------------------------------- outputs
  assign cmd_o         = (retire && is_cmd) ? cmd_word : '0;
  assign cmd_valid_o   = retire && is_cmd;
  assign sync_issued_o = retire && is_sync;
  assign sync_id_o     = instr[11:7];
  assign pipe_idle_o   = pipe_idle;
  assign jump_o        = take_jump;

  // A word is only pushed while the radar asks for one.
  a_push_on_req: assert property (@(posedge clk_i) disable iff (!rst_ni) cmd_valid_o |-> cmd_req_i);
endmodule
