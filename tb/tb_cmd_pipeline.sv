// Testbench for cmd_pipeline: a small command program in an instruction
// memory model is run twice.
//
// Program: at 0x000 (register 27) "fjr; synch_p 5; wfi". Three chunk
// functions at 0x100 (pc format), 0x200 and 0x300 (pp format, type A and B
// mixed), each a run of push instructions whose last word has c_end set,
// followed by jalr. The sequence accelerator is loaded with
// C0 x2, C1 x1, C2 x3 and one extra outer pass, so the chunk runs are
// C0 C0 C1 C2 C2 C2 C0 C0 C1 C2 C2 C2; the last c_end finds the ring empty,
// the jalr returns to 0x004, synch_p reports id 5 and wfi goes back to Idle.
//
// Run 1: cmd_req always high and every fetch answered; checks one word per
// cycle inside a chunk and the three-cycle bubble of an accelerator jump.
// Run 2: cmd_req, the CSR stall, the lock input and fetch answers are random.
// Both runs compare the pushed words against the microcode words the program
// was built from, and check that nothing is pushed while stalled.
module tb_cmd_pipeline;
  import ctrl_seq_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start, csr_stall, pipe_idle, rf_we, lock, sync_issued;
  logic [4:0]  rf_waddr, rf_raddr, sync_id;
  logic [31:0] rf_wdata, rf_rdata, imem_rdata, cmd;
  logic        imem_rvalid, cmd_req, cmd_valid, jump;
  tcdm_req_t   imem_req;
  cp_state_e   st;
  int checks = 0, failures = 0;

  cmd_pipeline dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .csr_stall_i(csr_stall),
    .pipe_idle_o(pipe_idle), .rf_we_i(rf_we), .rf_waddr_i(rf_waddr),
    .rf_wdata_i(rf_wdata), .rf_raddr_i(rf_raddr), .rf_rdata_o(rf_rdata),
    .lock_i(lock), .sync_issued_o(sync_issued), .sync_id_o(sync_id),
    .imem_req_o(imem_req), .imem_rvalid_i(imem_rvalid), .imem_rdata_i(imem_rdata),
    .cmd_req_i(cmd_req), .cmd_o(cmd), .cmd_valid_o(cmd_valid), .jump_o(jump),
    .state_o(st));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------ instruction memory model
  logic [31:0] imem [1024];
  bit          rand_fetch;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      imem_rvalid <= 1'b0;
      imem_rdata  <= '0;
    end else begin
      imem_rvalid <= imem_req.req && (!rand_fetch || $urandom_range(0, 3) != 0);
      imem_rdata  <= imem[imem_req.addr[11:2]];
    end
  end

  // ------------------------------------------------------- program builder
  localparam logic [31:0] NOP = 32'h0000_0013;
  function automatic logic [31:0] enc_pp(input ucode_t w);
    return {w.c_end, w.field5, w.field_b, w.field4, w.field1, w.field2, w.field3,
            w.field_a, (w.wtype ? OPC_PPB : OPC_PPA)};
  endfunction
  function automatic logic [31:0] enc_pc(input ucode_t w);
    return {9'd0, w.field_b, w.c_end, w.field2, w.field7[0], w.field3, w.field_a,
            (w.wtype ? OPC_PCB : OPC_PCA)};
  endfunction
  function automatic ucode_t rnd_word(input bit pc_fmt, input bit last);
    ucode_t w = ucode_t'($urandom());
    w.field8 = '0; w.field6 = '0;
    if (pc_fmt) begin w.field7[1] = 1'b0; w.field5 = '0; w.field4 = '0; w.field1 = '0; end
    else w.field7 = '0;
    w.c_end = last;
    return w;
  endfunction

  localparam int NCH = 3;
  int          ch_len  [NCH] = '{3, 5, 4};
  logic [31:0] ch_addr [NCH] = '{32'h100, 32'h200, 32'h300};
  int          ch_rep  [NCH] = '{2, 1, 3};
  logic [31:0] ch_word [NCH][$];
  logic [31:0] exp_q [$];
  int          ch_first_idx [$];  // index in exp_q of each chunk run's first word

  task automatic build_program();
    foreach (imem[i]) imem[i] = NOP;
    imem[0] = {17'd0, F3_FJR, 5'd0, OPC_JALR};
    imem[1] = {17'd0, F3_SYNCHP, 5'd5, OPC_PIPE};
    imem[2] = INSTR_WFI;
    for (int c = 0; c < NCH; c++) begin
      for (int k = 0; k < ch_len[c]; k++) begin
        ucode_t w = rnd_word(c == 0, k == ch_len[c] - 1);
        if (c == 2) w.wtype = k[0];
        ch_word[c].push_back(w);
        imem[ch_addr[c][11:2] + k] = (c == 0) ? enc_pc(w) : enc_pp(w);
      end
      imem[ch_addr[c][11:2] + ch_len[c]] = {12'd0, RF_RET, F3_JALR, 5'd0, OPC_JALR};
    end
    for (int pass = 0; pass < 2; pass++)
      for (int c = 0; c < NCH; c++)
        for (int r = 0; r < ch_rep[c]; r++) begin
          ch_first_idx.push_back(exp_q.size());
          foreach (ch_word[c][k]) exp_q.push_back(ch_word[c][k]);
        end
  endtask

  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); rf_we = 1; rf_waddr = a; rf_wdata = d;
    @(negedge clk); rf_we = 0;
  endtask

  task automatic load_acc();
    wr(RF_START, 32'h0);
    wr(RF_OUTER, 32'h0000_0001);
    for (int c = 0; c < NCH; c++)
      wr(5'(RF_ASR0 + c), {16'(ch_rep[c] - 1), ch_addr[c][15:0]});
  endtask

  // ------------------------------------------------------------- monitor
  int          got, syncs, last_push_cyc, cyc;
  bit          run_fast;
  always_ff @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (cmd_valid) begin
      check(cmd_req, "push only on cmd_req");
      check(!csr_stall && !lock, "no push while stalled");
      if (got < exp_q.size()) check(cmd == exp_q[got], $sformatf("word %0d", got));
      else check(0, "extra word");
      if (run_fast && got > 0) begin
        if (ch_first_idx.size() > 0 && got inside {ch_first_idx})
          check(cyc - last_push_cyc == 4, $sformatf("jump gap %0d", cyc - last_push_cyc));
        else
          check(cyc - last_push_cyc == 1, $sformatf("in-chunk gap %0d", cyc - last_push_cyc));
      end
      last_push_cyc <= cyc;
      got <= got + 1;
    end
    if (sync_issued) begin
      syncs <= syncs + 1;
      check(sync_id == 5'd5, "synch_p id");
    end
  end

  task automatic run(input bit fast);
    got = 0; syncs = 0; run_fast = fast; rand_fetch = !fast;
    load_acc();
    check(pipe_idle && st == CP_IDLE, "idle before start");
    rf_raddr = RF_SRC;
    #1 check(rf_rdata[4:0] == 5'b00111 && rf_rdata[20:16] == 5'b00111, "ring holds three entries");
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!(pipe_idle && got > 0)) begin
      @(negedge clk);
      if (!fast) begin
        cmd_req   = ($urandom_range(0, 3) != 0);
        csr_stall = ($urandom_range(0, 15) == 0);
        lock      = ($urandom_range(0, 20) == 0);
      end
    end
    cmd_req = 1; csr_stall = 0; lock = 0;
    repeat (3) @(negedge clk);
    check(got == exp_q.size(), $sformatf("word count %0d of %0d", got, exp_q.size()));
    check(syncs == 1, "one synch_p");
    check(st == CP_IDLE, "back in Idle after wfi");
    rf_raddr = RF_RET;
    #1 check(rf_rdata == 32'h4, "fjr saved return address");
    rf_raddr = RF_SRC;
    #1 check(rf_rdata == 0, "ring empty at the end");
  endtask

  initial begin
    start = 0; csr_stall = 0; lock = 0; rf_we = 0; rf_waddr = 0; rf_wdata = 0;
    rf_raddr = 0; cmd_req = 1; cyc = 0; got = 0; syncs = 0; rand_fetch = 0;
    build_program();
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
