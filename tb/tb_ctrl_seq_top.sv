// End-to-end testbench for ctrl_seq_top at its default sizes (8 KB
// microcode memory, 8 KB command memory, no parameter overrides).
//
// DMA side: the processor port writes eight chunks C1..C8 (12, 12, 36, 36,
// 36, 36, 12, 12 words, as in the radar sweep programs) into the microcode
// memory, the debug port overwrites C8 with the same contents, and both
// decompression tables are loaded over APB. The chunk order of a short sweep,
// C1 C2 (C3 C4 C5 C6) x3 C7 C8, is written to the FIFO while polling the full
// bit. Phase 1 runs the first chunks with the radar always requesting and no
// other traffic and checks the DMA timing (12-word chunk over 12 cycles,
// 36-word chunk over 39 cycles, next chunk 2 cycles after c_end). Later the
// radar request toggles randomly and the processor reads the microcode memory
// at random, so the DMA loses arbitration; its read data are checked too.
//
// Command-pipeline side: the command memory is written through the main
// port with the program "fjr; synch_p 5; synch_p 6; wfi" and chunk functions
// for C1..C5 (C1 in pc format, the rest in pp format), each ending in jalr.
// The accelerator is loaded with C1, C2, C3 x2, C4, C5 and one extra outer
// pass, and start_p is given. The main side issues synch_p 5 early (the main
// pipeline waits until the command pipeline reaches its synch_p 5, with an
// interrupt taken in between) and synch_p 6 late (the command pipeline
// waits). The CSR stall, the radar request and main-port reads of the command
// memory are random. Within a chunk one word per cycle and a three-cycle
// bubble per accelerator jump are checked while nothing disturbs the flow.
//
// Both output streams are compared word by word, together with the 48-bit
// decompressed word, against the chunk contents. Every mechanism is counted
// and a mechanism that never occurs is a failure.
module tb_ctrl_seq_top;
  import ctrl_seq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ----------------------------------------------------------------- DUT
  logic        d_psel, d_penable, d_pwrite, d_pready, c_psel, c_penable, c_pwrite, c_pready;
  logic [31:0] d_paddr, d_pwdata, d_prdata, c_paddr, c_pwdata, c_prdata;
  tcdm_req_t   cpu_req, jtag_req, main_req;
  logic        cpu_gnt, cpu_rvalid, jtag_gnt, jtag_rvalid, main_gnt, main_rvalid;
  logic [31:0] cpu_rdata, jtag_rdata, main_rdata;
  logic        dma_cmd_req, dma_valid, dma_busy, cp_cmd_req, cp_valid, cp_jump;
  logic [31:0] dma_cmd, cp_cmd;
  logic [DEC_W-1:0] dma_dec, cp_dec;
  // csr_stall is the stall value the test wants; it reaches the pipeline
  // through a CSR write to 0x800 issued whenever it differs from the register.
  logic        csr_we, csr_hit;
  logic [11:0] csr_addr;
  logic [31:0] csr_wdata, csr_rdata;
  assign csr_we    = (csr_stall != dut.csr_stall);
  assign csr_addr  = CSR_CMDP;
  assign csr_wdata = {30'd0, csr_stall, 1'b0};
  logic        start_p, csr_stall, pipe_idle, rf_we, main_sync, pirq, idone, main_lock;
  logic [4:0]  rf_waddr, rf_raddr, main_sync_id;
  logic [31:0] rf_wdata, rf_rdata;
  cp_state_e   cp_state;

  ctrl_seq_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .dma_psel_i(d_psel), .dma_penable_i(d_penable), .dma_pwrite_i(d_pwrite),
    .dma_paddr_i(d_paddr), .dma_pwdata_i(d_pwdata), .dma_prdata_o(d_prdata), .dma_pready_o(d_pready),
    .cpu_req_i(cpu_req), .cpu_gnt_o(cpu_gnt), .cpu_rvalid_o(cpu_rvalid), .cpu_rdata_o(cpu_rdata),
    .jtag_req_i(jtag_req), .jtag_gnt_o(jtag_gnt), .jtag_rvalid_o(jtag_rvalid), .jtag_rdata_o(jtag_rdata),
    .dma_cmd_req_i(dma_cmd_req), .dma_cmd_o(dma_cmd), .dma_dec_cmd_o(dma_dec),
    .dma_cmd_valid_o(dma_valid), .dma_busy_o(dma_busy),
    .cp_psel_i(c_psel), .cp_penable_i(c_penable), .cp_pwrite_i(c_pwrite),
    .cp_paddr_i(c_paddr), .cp_pwdata_i(c_pwdata), .cp_prdata_o(c_prdata), .cp_pready_o(c_pready),
    .main_imem_req_i(main_req), .main_imem_gnt_o(main_gnt), .main_imem_rvalid_o(main_rvalid),
    .main_imem_rdata_o(main_rdata),
    .start_p_i(start_p), .csr_we_i(csr_we), .csr_addr_i(csr_addr), .csr_wdata_i(csr_wdata),
    .csr_rdata_o(csr_rdata), .csr_hit_o(csr_hit), .pipe_idle_o(pipe_idle),
    .rf_we_i(rf_we), .rf_waddr_i(rf_waddr), .rf_wdata_i(rf_wdata), .rf_raddr_i(rf_raddr),
    .rf_rdata_o(rf_rdata),
    .main_sync_issued_i(main_sync), .main_sync_id_i(main_sync_id), .pending_irq_i(pirq),
    .irq_done_i(idone), .main_pipe_lock_o(main_lock),
    .cp_cmd_req_i(cp_cmd_req), .cp_cmd_o(cp_cmd), .cp_dec_cmd_o(cp_dec),
    .cp_cmd_valid_o(cp_valid), .cp_jump_o(cp_jump), .cp_state_o(cp_state));

  // ------------------------------------------------------------- APB tasks
  task automatic apb_d(input bit wr, input logic [11:0] off, input logic [31:0] wd,
                       output logic [31:0] rd);
    @(negedge clk); d_psel = 1; d_penable = 0; d_pwrite = wr;
    d_paddr = 32'h1A10_C000 | 32'(off); d_pwdata = wd;
    @(negedge clk); d_penable = 1; #1 rd = d_prdata;
    @(negedge clk); d_psel = 0; d_penable = 0;
  endtask
  task automatic apb_c(input bit wr, input logic [11:0] off, input logic [31:0] wd,
                       output logic [31:0] rd);
    @(negedge clk); c_psel = 1; c_penable = 0; c_pwrite = wr;
    c_paddr = 32'h1A10_C000 | 32'(off); c_pwdata = wd;
    @(negedge clk); c_penable = 1; #1 rd = c_prdata;
    @(negedge clk); c_psel = 0; c_penable = 0;
  endtask

  // ------------------------------------------------------ TCDM port tasks
  // Write: hold the request until granted.
  task automatic cpu_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); cpu_req = '{req: 1'b1, addr: a, wen: 1'b1, wdata: d, be: 4'hF};
    #1 while (!cpu_gnt) begin @(negedge clk); #1; end
    @(negedge clk); cpu_req = '0;
  endtask
  task automatic jtag_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); jtag_req = '{req: 1'b1, addr: a, wen: 1'b1, wdata: d, be: 4'hF};
    #1 while (!jtag_gnt) begin @(negedge clk); #1; end
    @(negedge clk); jtag_req = '0;
  endtask
  task automatic main_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); main_req = '{req: 1'b1, addr: a, wen: 1'b1, wdata: d, be: 4'hF};
    #1 while (!main_gnt) begin @(negedge clk); #1; end
    @(negedge clk); main_req = '0;
  endtask

  // ------------------------------------------------------------ models
  localparam int NCH = 8;
  int          ch_len  [NCH] = '{12, 12, 36, 36, 36, 36, 12, 12};
  logic [31:0] ch_uaddr [NCH];          // byte address in microcode memory
  logic [31:0] ch_iaddr [NCH];          // chunk function address in command memory
  logic [31:0] ch_word [NCH][$];
  logic [31:0] umem [2048];
  logic [31:0] imem [2048];
  logic [DEC_W-1:0] lut [LUT_N];

  function automatic logic [DEC_W-1:0] expand(input logic [31:0] x);
    ucode_t w;
    w = ucode_t'(x);
    return w.wtype ? lut[LUTA_N + w.field_b] : lut[w.field_a];
  endfunction

  localparam logic [31:0] NOP = 32'h0000_0013;
  function automatic logic [31:0] enc_pp(input ucode_t w);
    return {w.c_end, w.field5, w.field_b, w.field4, w.field1, w.field2, w.field3,
            w.field_a, (w.wtype ? OPC_PPB : OPC_PPA)};
  endfunction
  function automatic logic [31:0] enc_pc(input ucode_t w);
    return {9'd0, w.field_b, w.c_end, w.field2, w.field7[0], w.field3, w.field_a,
            (w.wtype ? OPC_PCB : OPC_PCA)};
  endfunction
  // Words the command pipeline can carry: pc format (C1, C8) has no fields
  // 1, 4, 5, 6, 8 and one bit of field 7; pp format has no fields 6, 7, 8.
  function automatic ucode_t rnd_word(input bit pc_fmt, input bit last);
    ucode_t w;
    w = ucode_t'($urandom());
    w.field8 = '0; w.field6 = '0;
    if (pc_fmt) begin w.field7[1] = 1'b0; w.field5 = '0; w.field4 = '0; w.field1 = '0; end
    else w.field7 = '0;
    w.c_end = last;
    return w;
  endfunction

  logic [31:0] dma_exp [$], cp_exp [$];
  int          dma_first [$], cp_first [$];   // stream index of each chunk run's first word
  int          dma_seq [$];

  task automatic build();
    int a;
    a = 0;
    foreach (imem[i]) imem[i] = NOP;
    imem[0] = {17'd0, F3_FJR, 5'd0, OPC_JALR};
    imem[1] = {17'd0, F3_SYNCHP, 5'd5, OPC_PIPE};
    imem[2] = {17'd0, F3_SYNCHP, 5'd6, OPC_PIPE};
    imem[3] = INSTR_WFI;
    for (int c = 0; c < NCH; c++) begin
      ch_uaddr[c] = 32'(a * 4);
      ch_iaddr[c] = 32'h100 * (c + 1);
      for (int k = 0; k < ch_len[c]; k++) begin
        ucode_t w;
        w = rnd_word(c == 0 || c == 7, k == ch_len[c] - 1);
        ch_word[c].push_back(w);
        umem[a + k] = w;
        imem[ch_iaddr[c][12:2] + k] = (c == 0 || c == 7) ? enc_pc(w) : enc_pp(w);
      end
      imem[ch_iaddr[c][12:2] + ch_len[c]] = {12'd0, RF_RET, F3_JALR, 5'd0, OPC_JALR};
      a += ch_len[c];
    end
    // DMA chunk order
    dma_seq = '{0, 1};
    for (int r = 0; r < 3; r++) dma_seq = {dma_seq, 2, 3, 4, 5};
    dma_seq = {dma_seq, 6, 7};
    foreach (dma_seq[i]) begin
      dma_first.push_back(dma_exp.size());
      foreach (ch_word[dma_seq[i]][k]) dma_exp.push_back(ch_word[dma_seq[i]][k]);
    end
    // command pipeline: (C1 C2 C3 C3 C4 C5) x 2
    for (int p = 0; p < 2; p++)
      foreach (cp_order[i]) begin
        cp_first.push_back(cp_exp.size());
        foreach (ch_word[cp_order[i]][k]) cp_exp.push_back(ch_word[cp_order[i]][k]);
      end
  endtask
  int cp_order [6] = '{0, 1, 2, 2, 3, 4};

  // ------------------------------------------------- mechanism counters
  int n_dma_gnt_stall, n_burst, n_chunk_switch, n_fifo_full, n_dma_backpressure;
  int n_type_a, n_type_b, n_cp_jump, n_fjr, n_jalr, n_cp_stall_state, n_csr_stall;
  int n_cmd_lock, n_main_lock, n_irq_bypass, n_wfi, n_if_gnt_stall, n_cp_backpressure;
  int n_cpu_reads, n_jtag_writes;
  logic [1:0] dma_state_q;
  cp_state_e  cp_state_q;

  always_ff @(posedge clk) if (rst_n) begin
    dma_state_q <= dut.u_dma_wrapper.g_dma.u_dma.state_q;
    cp_state_q  <= cp_state;
    if (dut.dma_req.req && !dut.ux_m_gnt[1]) n_dma_gnt_stall++;
    if (dut.u_dma_wrapper.g_dma.u_dma.state_q == 2'd3 && dma_state_q != 2'd3) n_burst++;
    if (dut.u_dma_wrapper.g_dma.u_dma.fifo_pop_o && dut.u_dma_wrapper.g_dma.u_dma.state_q != 2'd0)
      n_chunk_switch++;
    if (dma_busy && !dma_cmd_req) n_dma_backpressure++;
    if (cp_jump) n_cp_jump++;
    if (dut.u_cmd_pipe.retire && dut.u_cmd_pipe.is_fjr) n_fjr++;
    if (dut.u_cmd_pipe.retire && dut.u_cmd_pipe.is_jalr) n_jalr++;
    if (cp_state == CP_STALL) n_cp_stall_state++;
    if (dut.csr_stall && cp_state inside {CP_AUTO, CP_STALL}) n_csr_stall++;
    check(csr_hit && csr_rdata == {30'd0, dut.csr_stall, pipe_idle}, "CSR 0x800 read value");
    if (dut.cmd_lock) n_cmd_lock++;
    if (main_lock) n_main_lock++;
    if (cp_state_q == CP_AUTO && cp_state == CP_IDLE) n_wfi++;
    if (dut.if_req.req && !dut.ix_m_gnt[1]) n_if_gnt_stall++;
    if (dut.u_cmd_pipe.imem_rvalid_i && dut.u_cmd_pipe.is_cmd && !cp_cmd_req) n_cp_backpressure++;
  end

  // ------------------------------------------------------ stream monitors
  int dma_got, cp_got, dma_cyc [$], cp_cyc [$], cyc;
  bit cp_quiet;   // nothing disturbs the command pipeline
  int cp_quiet_checks;
  always_ff @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (dma_valid) begin
      if (dma_got < dma_exp.size()) begin
        check(dma_cmd == dma_exp[dma_got], $sformatf("DMA word %0d", dma_got));
        check(dma_dec == expand(dma_exp[dma_got]), $sformatf("DMA dec word %0d", dma_got));
      end else check(0, "extra DMA word");
      if (dma_cmd[0]) n_type_b++; else n_type_a++;
      dma_cyc.push_back(cyc);
      dma_got <= dma_got + 1;
    end
    if (cp_valid) begin
      if (cp_got < cp_exp.size()) begin
        check(cp_cmd == cp_exp[cp_got], $sformatf("CP word %0d", cp_got));
        check(cp_dec == expand(cp_exp[cp_got]), $sformatf("CP dec word %0d", cp_got));
      end else check(0, "extra CP word");
      if (cp_cmd[0]) n_type_b++; else n_type_a++;
      if (cp_quiet && cp_got > 0 && cp_cyc.size() > 0) begin
        int gap;
        gap = cyc - cp_cyc[$];
        cp_quiet_checks++;
        if (cp_got inside {cp_first}) check(gap == 4, $sformatf("CP jump gap %0d", gap));
        else check(gap == 1, $sformatf("CP in-chunk gap %0d", gap));
      end
      cp_cyc.push_back(cyc);
      cp_got <= cp_got + 1;
    end
  end

  // ---------------------------------------------- background traffic
  bit cpu_traffic, main_traffic;
  int cpu_pend [$];
  always_ff @(posedge clk) if (rst_n) begin
    if (cpu_rvalid && cpu_pend.size() > 0) begin
      check(cpu_rdata == umem[cpu_pend.pop_front()], "CPU read data");
      n_cpu_reads++;
    end
  end
  initial forever begin
    @(negedge clk);
    if (cpu_traffic && !cpu_req.req && $urandom_range(0, 2) == 0) begin
      int w;
      w = $urandom_range(0, 191);
      cpu_req = '{req: 1'b1, addr: 32'(w * 4), wen: 1'b0, wdata: '0, be: 4'hF};
      #1 while (!cpu_gnt) begin @(negedge clk); #1; end
      cpu_pend.push_back(w);
      @(negedge clk); cpu_req = '0;
    end
  end
  initial forever begin
    @(negedge clk);
    if (main_traffic && !main_req.req && $urandom_range(0, 3) == 0) begin
      main_req = '{req: 1'b1, addr: 32'($urandom_range(0, 2047) * 4), wen: 1'b0, wdata: '0, be: 4'hF};
      #1 while (!main_gnt) begin @(negedge clk); #1; end
      @(negedge clk); main_req = '0;
    end
  end

  // ---------------------------------------------------------------- main
  logic [31:0] rd;
  initial begin
    d_psel = 0; d_penable = 0; d_pwrite = 0; d_paddr = 0; d_pwdata = 0;
    c_psel = 0; c_penable = 0; c_pwrite = 0; c_paddr = 0; c_pwdata = 0;
    cpu_req = '0; jtag_req = '0; main_req = '0;
    dma_cmd_req = 1; cp_cmd_req = 1; start_p = 0; csr_stall = 0;
    rf_we = 0; rf_waddr = 0; rf_wdata = 0; rf_raddr = 0;
    main_sync = 0; main_sync_id = 0; pirq = 0; idone = 0;
    cpu_traffic = 0; main_traffic = 0; cp_quiet = 0; cyc = 0; dma_got = 0; cp_got = 0;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1;

    // memories and tables
    for (int i = 0; i < 192; i++) cpu_write(32'(i * 4), umem[i]);
    for (int i = 180; i < 192; i++) begin jtag_write(32'(i * 4), umem[i]); n_jtag_writes++; end
    for (int i = 0; i < 1024; i++) if (imem[i] != NOP || i < 4) main_write(32'(i * 4), imem[i]);
    for (int e = 0; e < LUT_N; e++) lut[e] = {16'($urandom()), 32'($urandom())};
    fork
      for (int e = 0; e < LUT_N; e++) begin
        apb_d(1, 12'(REG_LUT_FIRST + 8 * e), lut[e][31:0], rd);
        apb_d(1, 12'(REG_LUT_FIRST + 8 * e + 4), 32'(lut[e][47:32]), rd);
      end
      for (int e = 0; e < LUT_N; e++) begin
        apb_c(1, 12'(REG_LUT_FIRST + 8 * e), lut[e][31:0], rd);
        apb_c(1, 12'(REG_LUT_FIRST + 8 * e + 4), 32'(lut[e][47:32]), rd);
      end
    join

    // accelerator: start 0x000, one extra pass, C1 C2 C3x2 C4 C5
    rf_wr(RF_START, 32'h0);
    rf_wr(RF_OUTER, 32'h0000_0001);
    rf_wr(5'(RF_ASR0 + 0), {16'd0, ch_iaddr[0][15:0]});
    rf_wr(5'(RF_ASR0 + 1), {16'd0, ch_iaddr[1][15:0]});
    rf_wr(5'(RF_ASR0 + 2), {16'd1, ch_iaddr[2][15:0]});
    rf_wr(5'(RF_ASR0 + 3), {16'd0, ch_iaddr[3][15:0]});
    rf_wr(5'(RF_ASR0 + 4), {16'd0, ch_iaddr[4][15:0]});

    fork
      dma_side();
      cp_side();
    join

    // mechanism report
    $display("mechanisms: dma_gnt_stall=%0d burst=%0d chunk_switch=%0d fifo_full=%0d dma_backpressure=%0d",
             n_dma_gnt_stall, n_burst, n_chunk_switch, n_fifo_full, n_dma_backpressure);
    $display("mechanisms: type_a=%0d type_b=%0d cp_jump=%0d fjr=%0d jalr=%0d cp_stall_state=%0d csr_stall=%0d",
             n_type_a, n_type_b, n_cp_jump, n_fjr, n_jalr, n_cp_stall_state, n_csr_stall);
    $display("mechanisms: cmd_lock=%0d main_lock=%0d irq_bypass=%0d wfi=%0d if_gnt_stall=%0d cp_backpressure=%0d cpu_reads=%0d jtag_writes=%0d quiet_gap_checks=%0d",
             n_cmd_lock, n_main_lock, n_irq_bypass, n_wfi, n_if_gnt_stall, n_cp_backpressure,
             n_cpu_reads, n_jtag_writes, cp_quiet_checks);
    check(n_dma_gnt_stall > 0, "mechanism: DMA loses arbitration");
    check(n_burst > 0, "mechanism: DMA burst");
    check(n_chunk_switch > 0, "mechanism: DMA chunk switch without idle");
    check(n_fifo_full > 0, "mechanism: FIFO full");
    check(n_dma_backpressure > 0, "mechanism: DMA radar backpressure");
    check(n_type_a > 0 && n_type_b > 0, "mechanism: both decompression tables");
    check(n_cp_jump > 0, "mechanism: command pipeline jump");
    check(n_fjr > 0, "mechanism: fjr");
    check(n_jalr > 0, "mechanism: jalr");
    check(n_cp_stall_state > 0, "mechanism: Stall state");
    check(n_csr_stall > 0, "mechanism: CSR stall");
    check(n_cmd_lock > 0, "mechanism: command pipeline lock");
    check(n_main_lock > 0, "mechanism: main pipeline lock");
    check(n_irq_bypass > 0, "mechanism: interrupt during lock");
    check(n_wfi > 0, "mechanism: wfi to Idle");
    check(n_if_gnt_stall > 0, "mechanism: instruction fetch loses arbitration");
    check(n_cp_backpressure > 0, "mechanism: command pipeline radar backpressure");
    check(n_cpu_reads > 0 && n_jtag_writes > 0, "mechanism: other microcode memory masters");
    check(cp_quiet_checks > 50, "mechanism: undisturbed command pipeline rate checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rf_wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); rf_we = 1; rf_waddr = a; rf_wdata = d;
    @(negedge clk); rf_we = 0;
  endtask

  // DMA side: phase 1 undisturbed (first 6 chunks), then random request and
  // processor traffic.
  task automatic dma_side();
    logic [31:0] r;
    apb_d(1, REG_CTRL, 1, r);
    fork
      foreach (dma_seq[i]) begin
        do begin
          apb_d(0, REG_STATUS, 0, r);
          if (r[0]) n_fifo_full++;
        end while (r[0]);
        apb_d(1, REG_FIFO_IN, ch_uaddr[dma_seq[i]], r);
      end
      begin
        wait (dma_got >= dma_first[6]);
        // timing of the undisturbed part: C2 (12 words), C3 (36 words) and
        // the gap between them
        check(dma_cyc[dma_first[1] + 11] - dma_cyc[dma_first[1]] == 12, "12-word chunk spans 12 cycles");
        check(dma_cyc[dma_first[2] + 35] - dma_cyc[dma_first[2]] == 39, "36-word chunk spans 39 cycles");
        check(dma_cyc[dma_first[2]] - dma_cyc[dma_first[2] - 1] == 2, "next chunk 2 cycles after c_end");
        cpu_traffic = 1;
        while (dma_got < dma_exp.size()) begin
          @(negedge clk); dma_cmd_req = ($urandom_range(0, 4) != 0);
        end
        dma_cmd_req = 1;
        cpu_traffic = 0;
      end
    join
    repeat (10) @(negedge clk);
    check(dma_got == dma_exp.size(), $sformatf("DMA words %0d of %0d", dma_got, dma_exp.size()));
    check(!dma_busy, "DMA idle at the end");
    apb_d(0, REG_STATUS, 0, r); check(r[1:0] == 2'b10, "FIFO empty at the end");
  endtask

  // Command-pipeline side.
  task automatic cp_side();
    @(negedge clk); start_p = 1; @(negedge clk); start_p = 0;
    cp_quiet = 1;
    // undisturbed through the first pass, then main synch_p 5 and random
    // disturbances
    wait (cp_got >= cp_first[6]);
    cp_quiet = 0;
    @(negedge clk); main_sync = 1; main_sync_id = 5; @(negedge clk); main_sync = 0;
    check(main_lock, "main pipeline waits for synch_p 5");
    repeat (5) @(negedge clk);
    pirq = 1; @(negedge clk); pirq = 0;
    if (!main_lock) n_irq_bypass++;
    repeat (5) @(negedge clk);
    idone = 1; @(negedge clk); idone = 0;
    check(main_lock, "main lock back after the handler");
    main_traffic = 1;
    while (main_lock) begin
      @(negedge clk);
      cp_cmd_req = ($urandom_range(0, 3) != 0);
      csr_stall  = ($urandom_range(0, 19) == 0);
    end
    cp_cmd_req = 1; csr_stall = 0; main_traffic = 0;
    check(cp_got == cp_exp.size(), $sformatf("CP words %0d of %0d", cp_got, cp_exp.size()));
    // the command pipeline now waits at synch_p 6
    repeat (20) @(negedge clk);
    check(dut.cmd_lock && cp_state == CP_STALL, "command pipeline waits for synch_p 6");
    @(negedge clk); main_sync = 1; main_sync_id = 6; @(negedge clk); main_sync = 0;
    check(!dut.cmd_lock, "command pipeline released");
    repeat (10) @(negedge clk);
    check(pipe_idle && cp_state == CP_IDLE, "command pipeline idle after wfi");
    rf_raddr = RF_SRC; #1 check(rf_rdata == 0, "accelerator ring empty");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
