// Workload testbench: complete radar sweeps through both paths of
// ctrl_seq_top at its default sizes.
//
// Two sweeps run one after the other:
//   linear       100 points, 3 averaged samples per point
//   exponential  10 points, samples per point 3 (points 0-2), i^4 (3-8),
//                8^4 (point 9)
// Each sweep pushes the chunk order C1 C2, then per point C3 C4xh C5xh C6
// (h = samples of that point), then C7 C8. C1, C2, C7, C8 hold 12 words,
// C3..C6 hold 36 words: 192 stored words.
//
// DMA path: the testbench acts as the processor's polling loop, writing
// each chunk address into the FIFO whenever the full bit is clear, and the
// radar always requests words.
// Command-pipeline path: the command program is
//   fjr ; synch_p 1 ; fjr ; synch_p 2 ; fjr ; ... ; wfi
// and the testbench acts as the main core: before each synch_p it loads the
// accelerator with the next part of the sequence (C1 C2; one point, or all
// points at once with the outer count when every point is alike; C7 C8) and
// then issues the matching synch_p to release the command pipeline.
//
// The exponential sweep runs a second time under periodic interrupts: one
// every 125 cycles (1 us at 125 MHz). The processor feeding the DMA path is
// away for 45 cycles of each period, the main core for 66, and the main core
// signals entry to and return from its handler to the synchronization module.
// Neither path may lose throughput by more than one percent.
//
// Both output streams are compared word by word (microcode and 48-bit
// decompressed word) against the chunk order, and the throughput in words
// per clock is measured: over the whole sweep for the DMA path, and over the
// cycles in which the command pipeline is neither idle nor locked for the
// command pipeline. Expected: 36/41 (about 0.88) per 36-word chunk for the
// DMA path, 36/39 (about 0.92) for the command pipeline.
module tb_sweep_workload;
  import ctrl_seq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ----------------------------------------------------------------- DUT
  logic        d_psel, d_penable, d_pwrite, d_pready, c_psel, c_penable, c_pwrite, c_pready;
  logic [31:0] d_paddr, d_pwdata, d_prdata, c_paddr, c_pwdata, c_prdata;
  tcdm_req_t   cpu_req, main_req;
  logic        cpu_gnt, cpu_rvalid, jtag_gnt, jtag_rvalid, main_gnt, main_rvalid;
  logic [31:0] cpu_rdata, jtag_rdata, main_rdata;
  logic        dma_valid, dma_busy, cp_valid, cp_jump;
  logic [31:0] dma_cmd, cp_cmd;
  logic [DEC_W-1:0] dma_dec, cp_dec;
  logic        start_p, pipe_idle, rf_we, main_sync, main_lock;
  logic [4:0]  rf_waddr, main_sync_id;
  logic [31:0] rf_wdata, rf_rdata;
  cp_state_e   cp_state;

  ctrl_seq_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .dma_psel_i(d_psel), .dma_penable_i(d_penable), .dma_pwrite_i(d_pwrite),
    .dma_paddr_i(d_paddr), .dma_pwdata_i(d_pwdata), .dma_prdata_o(d_prdata), .dma_pready_o(d_pready),
    .cpu_req_i(cpu_req), .cpu_gnt_o(cpu_gnt), .cpu_rvalid_o(cpu_rvalid), .cpu_rdata_o(cpu_rdata),
    .jtag_req_i('0), .jtag_gnt_o(jtag_gnt), .jtag_rvalid_o(jtag_rvalid), .jtag_rdata_o(jtag_rdata),
    .dma_cmd_req_i(1'b1), .dma_cmd_o(dma_cmd), .dma_dec_cmd_o(dma_dec),
    .dma_cmd_valid_o(dma_valid), .dma_busy_o(dma_busy),
    .cp_psel_i(c_psel), .cp_penable_i(c_penable), .cp_pwrite_i(c_pwrite),
    .cp_paddr_i(c_paddr), .cp_pwdata_i(c_pwdata), .cp_prdata_o(c_prdata), .cp_pready_o(c_pready),
    .main_imem_req_i(main_req), .main_imem_gnt_o(main_gnt), .main_imem_rvalid_o(main_rvalid),
    .main_imem_rdata_o(main_rdata),
    .start_p_i(start_p), .csr_we_i(1'b0), .csr_addr_i(12'd0), .csr_wdata_i(32'd0),
    .csr_rdata_o(), .csr_hit_o(), .pipe_idle_o(pipe_idle),
    .rf_we_i(rf_we), .rf_waddr_i(rf_waddr), .rf_wdata_i(rf_wdata), .rf_raddr_i(5'd0),
    .rf_rdata_o(rf_rdata),
    .main_sync_issued_i(main_sync), .main_sync_id_i(main_sync_id), .pending_irq_i(pirq),
    .irq_done_i(idone), .main_pipe_lock_o(main_lock),
    .cp_cmd_req_i(1'b1), .cp_cmd_o(cp_cmd), .cp_dec_cmd_o(cp_dec),
    .cp_cmd_valid_o(cp_valid), .cp_jump_o(cp_jump), .cp_state_o(cp_state));

  // ---------------------------------------------------------- interrupts
  localparam int IRQ_PERIOD = 125, IRQ_LEN_DMA = 45, IRQ_LEN_MAIN = 66;
  bit   irq_on;
  int   irq_cnt;
  logic in_irq_dma, in_irq_main, pirq, idone;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      irq_cnt <= 0;
    else if (!irq_on) irq_cnt <= 0;
    else             irq_cnt <= (irq_cnt == IRQ_PERIOD - 1) ? 0 : irq_cnt + 1;
  assign in_irq_dma  = irq_on && irq_cnt < IRQ_LEN_DMA;
  assign in_irq_main = irq_on && irq_cnt < IRQ_LEN_MAIN;
  assign pirq        = irq_on && irq_cnt == 0;
  assign idone       = irq_on && irq_cnt == IRQ_LEN_MAIN - 1;
  int n_irq;
  always_ff @(posedge clk) if (pirq) n_irq <= n_irq + 1;

  // ------------------------------------------------------------- helpers
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
  task automatic cpu_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); cpu_req = '{req: 1'b1, addr: a, wen: 1'b1, wdata: d, be: 4'hF};
    #1 while (!cpu_gnt) begin @(negedge clk); #1; end
    @(negedge clk); cpu_req = '0;
  endtask
  task automatic main_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); main_req = '{req: 1'b1, addr: a, wen: 1'b1, wdata: d, be: 4'hF};
    #1 while (!main_gnt) begin @(negedge clk); #1; end
    @(negedge clk); main_req = '0;
  endtask
  task automatic rf_wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk);
    while (in_irq_main) @(negedge clk); rf_we = 1; rf_waddr = a; rf_wdata = d;
    @(negedge clk); rf_we = 0;
  endtask
  task automatic msync(input logic [4:0] id);
    @(negedge clk);
    while (in_irq_main) @(negedge clk); main_sync = 1; main_sync_id = id; @(negedge clk); main_sync = 0;
  endtask

  // -------------------------------------------------------------- chunks
  localparam int NCH = 8;
  int          ch_len   [NCH] = '{12, 12, 36, 36, 36, 36, 12, 12};
  logic [31:0] ch_uaddr [NCH];
  logic [31:0] ch_iaddr [NCH];
  logic [31:0] ch_word  [NCH][$];
  logic [DEC_W-1:0] lut [LUT_N];

  function automatic logic [DEC_W-1:0] expand(input logic [31:0] x);
    ucode_t w;
    w = ucode_t'(x);
    return w.wtype ? lut[LUTA_N + w.field_b] : lut[w.field_a];
  endfunction
  function automatic logic [31:0] enc_pp(input ucode_t w);
    return {w.c_end, w.field5, w.field_b, w.field4, w.field1, w.field2, w.field3,
            w.field_a, (w.wtype ? OPC_PPB : OPC_PPA)};
  endfunction
  function automatic logic [31:0] enc_pc(input ucode_t w);
    return {9'd0, w.field_b, w.c_end, w.field2, w.field7[0], w.field3, w.field_a,
            (w.wtype ? OPC_PCB : OPC_PCA)};
  endfunction
  function automatic ucode_t rnd_word(input bit pc_fmt, input bit last);
    ucode_t w;
    w = ucode_t'($urandom());
    w.field8 = '0; w.field6 = '0;
    if (pc_fmt) begin w.field7[1] = 1'b0; w.field5 = '0; w.field4 = '0; w.field1 = '0; end
    else w.field7 = '0;
    w.c_end = last;
    return w;
  endfunction

  // ------------------------------------------------------------- sweeps
  int hw [$];          // samples per point of the current sweep
  int seq [$];         // chunk order of the current sweep
  int n_words;

  task automatic make_sweep(input bit expo);
    hw = {};
    if (!expo) for (int i = 0; i < 100; i++) hw.push_back(3);
    else for (int i = 0; i < 10; i++) hw.push_back(i < 3 ? 3 : (i <= 8 ? i * i * i * i : 4096));
    seq = '{0, 1};
    foreach (hw[p]) begin
      seq.push_back(2);
      for (int k = 0; k < hw[p]; k++) seq.push_back(3);
      for (int k = 0; k < hw[p]; k++) seq.push_back(4);
      seq.push_back(5);
    end
    seq.push_back(6); seq.push_back(7);
    n_words = 0;
    foreach (seq[i]) n_words += ch_len[seq[i]];
  endtask

  // Stream monitors walk the chunk order.
  int dma_ci, dma_wi, dma_got, cp_ci, cp_wi, cp_got;
  longint dma_first_cyc, dma_last_cyc, cp_first_cyc, cp_last_cyc, cp_busy_cyc, cyc;
  bit run_on;
  always_ff @(posedge clk) if (rst_n && run_on) begin
    cyc <= cyc + 1;
    if (dma_valid) begin
      logic [31:0] e;
      e = ch_word[seq[dma_ci]][dma_wi];
      check(dma_cmd == e && dma_dec == expand(e), $sformatf("DMA word %0d", dma_got));
      if (dma_got == 0) dma_first_cyc <= cyc;
      dma_last_cyc <= cyc;
      dma_got <= dma_got + 1;
      if (dma_wi == ch_len[seq[dma_ci]] - 1) begin dma_wi <= 0; dma_ci <= dma_ci + 1; end
      else dma_wi <= dma_wi + 1;
    end
    if (cp_valid) begin
      logic [31:0] e;
      e = ch_word[seq[cp_ci]][cp_wi];
      check(cp_cmd == e && cp_dec == expand(e), $sformatf("CP word %0d", cp_got));
      if (cp_got == 0) cp_first_cyc <= cyc;
      cp_last_cyc <= cyc;
      cp_got <= cp_got + 1;
      if (cp_wi == ch_len[seq[cp_ci]] - 1) begin cp_wi <= 0; cp_ci <= cp_ci + 1; end
      else cp_wi <= cp_wi + 1;
    end
    if (cp_state != CP_IDLE && !dut.cmd_lock && cp_got > 0 && cp_got < n_words) cp_busy_cyc <= cp_busy_cyc + 1;
  end

  // DMA side: the polling loop.
  task automatic dma_feed();
    logic [31:0] r;
    foreach (seq[i]) begin
      do begin
        while (in_irq_dma) @(negedge clk);
        apb_d(0, REG_STATUS, 0, r);
      end while (r[0]);
      while (in_irq_dma) @(negedge clk);
      apb_d(1, REG_FIFO_IN, ch_uaddr[seq[i]], r);
    end
    wait (dma_got == n_words);
  endtask

  // Command-pipeline side: the main core.
  task automatic load_seq(input int c [$], input int inner [$], input int outer);
    rf_wr(RF_OUTER, {16'd0, 16'(outer)});
    foreach (c[i]) rf_wr(5'(RF_ASR0 + i), {16'(inner[i]), ch_iaddr[c[i]][15:0]});
  endtask

  task automatic cp_run(input bit expo);
    int id;
    id = 1;
    load_seq('{0, 1}, '{0, 0}, 0);
    @(negedge clk); start_p = 1; @(negedge clk); start_p = 0;
    if (!expo) begin
      wait (dut.cmd_lock);
      load_seq('{2, 3, 4, 5}, '{0, hw[0] - 1, hw[0] - 1, 0}, hw.size() - 1);
      msync(5'(id)); id++;
    end else begin
      foreach (hw[p]) begin
        wait (dut.cmd_lock);
        load_seq('{2, 3, 4, 5}, '{0, hw[p] - 1, hw[p] - 1, 0}, 0);
        msync(5'(id)); id++;
      end
    end
    wait (dut.cmd_lock);
    load_seq('{6, 7}, '{0, 0}, 0);
    msync(5'(id));
    wait (pipe_idle);
  endtask

  task automatic write_program(input bit expo);
    int a, n_mid;
    n_mid = expo ? 10 : 1;
    a = 0;
    main_write(0, {17'd0, F3_FJR, 5'd0, OPC_JALR});
    for (int k = 1; k <= n_mid + 1; k++) begin
      main_write(32'(4 * (a + 1)), {17'd0, F3_SYNCHP, 5'(k), OPC_PIPE});
      main_write(32'(4 * (a + 2)), {17'd0, F3_FJR, 5'd0, OPC_JALR});
      a += 2;
    end
    main_write(32'(4 * (a + 1)), INSTR_WFI);
  endtask

  real ref_dma, ref_cp;   // whole-sweep throughput without interrupts
  task automatic run_sweep(input bit expo, input bit irq);
    logic [31:0] r;
    real tp_dma, tp_cp, tp_cp_all;
    make_sweep(expo);
    write_program(expo);
    dma_ci = 0; dma_wi = 0; dma_got = 0; cp_ci = 0; cp_wi = 0; cp_got = 0;
    cp_busy_cyc = 0; cyc = 0; n_irq = 0; run_on = 1; irq_on = irq;
    apb_d(1, REG_CTRL, 1, r);
    fork
      dma_feed();
      cp_run(expo);
    join
    repeat (5) @(negedge clk);
    run_on = 0; irq_on = 0;
    apb_d(1, REG_CTRL, 0, r);
    tp_dma = real'(n_words) / real'(dma_last_cyc - dma_first_cyc + 1);
    tp_cp  = real'(n_words) / real'(cp_busy_cyc + 1);
    tp_cp_all = real'(n_words) / real'(cp_last_cyc - cp_first_cyc + 1);
    $display("%s sweep: %0d words; DMA path %0d cycles, %f words/cycle; command pipeline %0d busy cycles, %f words/cycle",
             expo ? (irq ? "exponential (interrupts)" : "exponential") : "linear", n_words, dma_last_cyc - dma_first_cyc + 1, tp_dma, cp_busy_cyc + 1, tp_cp);
    check(dma_got == n_words, $sformatf("DMA words %0d of %0d", dma_got, n_words));
    check(cp_got == n_words, $sformatf("CP words %0d of %0d", cp_got, n_words));
    check(tp_dma > 0.86 && tp_dma < 0.89, "DMA throughput");
    check(tp_cp > 0.90 && tp_cp < 0.93, "command pipeline throughput");
    check(!dma_busy && pipe_idle, "both paths idle at the end");
    if (!irq) begin
      ref_dma = tp_dma; ref_cp = tp_cp_all;
    end else begin
      $display("  with %0d interrupts: DMA %f of %f, command pipeline over the sweep %f of %f",
               n_irq, tp_dma, ref_dma, tp_cp_all, ref_cp);
      check(n_irq > 1000, "interrupts happened");
      check(tp_dma > 0.99 * ref_dma, "DMA throughput kept under interrupts");
      check(tp_cp_all > 0.99 * ref_cp, "command pipeline throughput kept under interrupts");
    end
  endtask

  initial begin
    int a;
    logic [31:0] r;
    d_psel = 0; d_penable = 0; d_pwrite = 0; d_paddr = 0; d_pwdata = 0;
    c_psel = 0; c_penable = 0; c_pwrite = 0; c_paddr = 0; c_pwdata = 0;
    cpu_req = '0; main_req = '0; start_p = 0; rf_we = 0; rf_waddr = 0; rf_wdata = 0;
    main_sync = 0; main_sync_id = 0; run_on = 0; cyc = 0; irq_on = 0; n_irq = 0;
    dma_ci = 0; dma_wi = 0; dma_got = 0; cp_ci = 0; cp_wi = 0; cp_got = 0;
    // chunk contents, their place in both memories
    a = 0;
    for (int c = 0; c < NCH; c++) begin
      ch_uaddr[c] = 32'(a * 4);
      ch_iaddr[c] = 32'h400 + 32'h100 * c;
      for (int k = 0; k < ch_len[c]; k++) ch_word[c].push_back(rnd_word(c == 0 || c == 7, k == ch_len[c] - 1));
      a += ch_len[c];
    end
    for (int e = 0; e < LUT_N; e++) lut[e] = {16'($urandom()), 32'($urandom())};
    repeat (3) @(posedge clk);
    rst_n = 1;
    a = 0;
    for (int c = 0; c < NCH; c++) begin
      foreach (ch_word[c][k]) begin
        cpu_write(ch_uaddr[c] + 32'(4 * k), ch_word[c][k]);
        main_write(ch_iaddr[c] + 32'(4 * k), (c == 0 || c == 7) ? enc_pc(ch_word[c][k]) : enc_pp(ch_word[c][k]));
      end
      main_write(ch_iaddr[c] + 32'(4 * ch_len[c]), {12'd0, RF_RET, F3_JALR, 5'd0, OPC_JALR});
    end
    for (int e = 0; e < LUT_N; e++) begin
      apb_d(1, 12'(REG_LUT_FIRST + 8 * e), lut[e][31:0], r);
      apb_d(1, 12'(REG_LUT_FIRST + 8 * e + 4), 32'(lut[e][47:32]), r);
      apb_c(1, 12'(REG_LUT_FIRST + 8 * e), lut[e][31:0], r);
      apb_c(1, 12'(REG_LUT_FIRST + 8 * e + 4), 32'(lut[e][47:32]), r);
    end
    run_sweep(1'b0, 1'b0);
    run_sweep(1'b1, 1'b0);
    run_sweep(1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
