// Controller of the command pipeline: a Moore machine with the six states
// of the design, Idle, Dump-s1, Dump-s2, Auto, Jump and Stall.
//
//   Idle   PC mux selects the program start address (register 27); nothing
//          is fetched; the decoded instruction is invalid. start_i -> Dump-s1.
//   Dump-s1, Dump-s2
//          the PC holds while the first instruction is fetched; the two
//          instructions seen by the decoder are invalidated. -> Auto.
//   Auto   instructions are fetched one after the other (PC + 4). wfi_i or a
//          new start_i -> Idle; stall_i -> Stall; jmp_i -> Jump.
//   Jump   the PC mux loads the jump target: the chunk address from the
//          sequence accelerator, or register 28 for a jalr (jmp_ret_i,
//          remembered when the jump was taken). -> Dump-s1.
//   Stall  the same instruction is fetched again until stall_i falls. -> Auto.
// Outputs depend on the state only (plus the remembered jump kind):
// pipe_idle_o (status bit 0 of the pipeline's CSR), dmp_instr_o
// (invalidate the decoded instruction), id_stall_o (no fetch) and pc_sel_o.
// In Auto the pipeline itself may still turn PC + 4 into "hold" for one
// cycle when the instruction in decode cannot finish (see cmd_pipeline).
// The states and their order are the design's; which cycles fetch is this
// implementation's timing for a memory that answers one cycle after the
// request: a jump costs three idle cycles, start-up three. The throughput
// reported for the original design (0.947 words per cycle on 36-word chunks,
// i.e. 36/38) points to two lost cycles per chunk change; this version loses
// one more and reaches 36/39.
module cmdp_controller
  import ctrl_seq_pkg::*;
(
  input  logic    clk_i,
  input  logic    rst_ni,
  input  logic    start_i,
  input  logic    stall_i,
  input  logic    wfi_i,
  input  logic    jmp_i,
  input  logic    jmp_ret_i,
  output logic    pipe_idle_o,
  output logic    dmp_instr_o,
  output logic    id_stall_o,
  output pc_sel_e pc_sel_o,
  output cp_state_e state_o
);
  cp_state_e state_q, state_d;
  logic      ret_q;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      CP_IDLE:  if (start_i) state_d = CP_DUMP1;
      CP_DUMP1: state_d = CP_DUMP2;
      CP_DUMP2: state_d = CP_AUTO;
      CP_AUTO: begin
        if (wfi_i || start_i) state_d = CP_IDLE;
        else if (stall_i)     state_d = CP_STALL;
        else if (jmp_i)       state_d = CP_JUMP;
      end
      CP_JUMP:  state_d = CP_DUMP1;
      CP_STALL: if (!stall_i) state_d = CP_AUTO;
      default:  state_d = CP_IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= CP_IDLE;
      ret_q   <= 1'b0;
    end else begin
      state_q <= state_d;
      if (state_q == CP_AUTO && jmp_i) ret_q <= jmp_ret_i;
    end
  end

  always_comb begin
    pipe_idle_o = 1'b0;
    dmp_instr_o = 1'b1;
    id_stall_o  = 1'b0;
    pc_sel_o    = PC_HOLD;
    unique case (state_q)
      CP_IDLE:  begin pipe_idle_o = 1'b1; id_stall_o = 1'b1; pc_sel_o = PC_JUMP; end
      CP_DUMP1: ;
      CP_DUMP2: ;
      CP_AUTO:  begin dmp_instr_o = 1'b0; pc_sel_o = PC_INCR; end
      CP_JUMP:  begin id_stall_o = 1'b1; pc_sel_o = ret_q ? PC_RET : PC_JUMP; end
      CP_STALL: ;
      default:  ;
    endcase
  end

  assign state_o = state_q;
endmodule
