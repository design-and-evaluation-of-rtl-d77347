// Testbench for cmdp_controller: walks the state machine through every
// transition (start, the two dump states, Auto, Jump with both target kinds,
// Stall and its release, wfi and a second start back to Idle) and checks the
// state and the Moore outputs (pipe_idle, dmp_instr, id_stall, pc_sel) in
// each state against a table written from the state description.
module tb_cmdp_controller;
  import ctrl_seq_pkg::*;
  logic      clk = 1'b0, rst_n = 1'b0;
  logic      start, stall, wfi, jmp, jmp_ret;
  logic      pipe_idle, dmp, id_stall;
  pc_sel_e   pc_sel;
  cp_state_e st;
  int checks = 0, failures = 0;

  cmdp_controller dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .stall_i(stall), .wfi_i(wfi),
    .jmp_i(jmp), .jmp_ret_i(jmp_ret), .pipe_idle_o(pipe_idle), .dmp_instr_o(dmp),
    .id_stall_o(id_stall), .pc_sel_o(pc_sel), .state_o(st));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t (state %0d)", what, $time, st); end
  endtask

  // Expected outputs per state.
  task automatic expect_state(input cp_state_e s, input bit ret);
    check(st == s, "state");
    case (s)
      CP_IDLE:  check(pipe_idle && dmp && id_stall && pc_sel == PC_JUMP, "Idle outputs");
      CP_DUMP1, CP_DUMP2, CP_STALL:
                check(!pipe_idle && dmp && !id_stall && pc_sel == PC_HOLD, "hold outputs");
      CP_AUTO:  check(!pipe_idle && !dmp && !id_stall && pc_sel == PC_INCR, "Auto outputs");
      CP_JUMP:  check(!pipe_idle && dmp && id_stall && pc_sel == (ret ? PC_RET : PC_JUMP), "Jump outputs");
      default:  check(0, "illegal state");
    endcase
  endtask

  task automatic cyc(input bit s, input bit sl, input bit w, input bit j, input bit r);
    @(negedge clk); start = s; stall = sl; wfi = w; jmp = j; jmp_ret = r;
    @(negedge clk); start = 0; stall = 0; wfi = 0; jmp = 0; jmp_ret = 0;
  endtask

  initial begin
    start = 0; stall = 0; wfi = 0; jmp = 0; jmp_ret = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_state(CP_IDLE, 0);
    @(negedge clk); expect_state(CP_IDLE, 0);          // stays without start
    start = 1; @(negedge clk); start = 0;
    expect_state(CP_DUMP1, 0);
    @(negedge clk); expect_state(CP_DUMP2, 0);
    @(negedge clk); expect_state(CP_AUTO, 0);
    @(negedge clk); expect_state(CP_AUTO, 0);          // stays in Auto
    // jump to a chunk
    jmp = 1; @(negedge clk); jmp = 0;
    expect_state(CP_JUMP, 0);
    @(negedge clk); expect_state(CP_DUMP1, 0);
    @(negedge clk); expect_state(CP_DUMP2, 0);
    @(negedge clk); expect_state(CP_AUTO, 0);
    // jalr return
    jmp = 1; jmp_ret = 1; @(negedge clk); jmp = 0; jmp_ret = 0;
    expect_state(CP_JUMP, 1);
    @(negedge clk); expect_state(CP_DUMP1, 0);
    @(negedge clk); @(negedge clk); expect_state(CP_AUTO, 0);
    // stall has priority over jump
    stall = 1; jmp = 1; @(negedge clk); jmp = 0;
    expect_state(CP_STALL, 0);
    @(negedge clk); expect_state(CP_STALL, 0);
    @(negedge clk); expect_state(CP_STALL, 0);
    stall = 0; @(negedge clk);
    expect_state(CP_AUTO, 0);
    // wfi back to Idle
    wfi = 1; @(negedge clk); wfi = 0;
    expect_state(CP_IDLE, 0);
    // start again, then a second start from Auto restarts
    start = 1; @(negedge clk); start = 0;
    @(negedge clk); @(negedge clk); expect_state(CP_AUTO, 0);
    start = 1; @(negedge clk); start = 0;
    expect_state(CP_IDLE, 0);
    // random inputs: outputs always consistent with the state
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      start = ($urandom_range(0, 15) == 0); stall = ($urandom_range(0, 5) == 0);
      wfi = ($urandom_range(0, 20) == 0); jmp = ($urandom_range(0, 4) == 0);
      jmp_ret = 1'($urandom());
      #1;
      if (st != CP_JUMP) expect_state(st, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
