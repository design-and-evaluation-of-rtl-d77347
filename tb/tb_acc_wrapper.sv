// Testbench for acc_wrapper, both variants.
//
// DMA variant (HAS_DMA = 1): the decompression tables are written and read
// back over APB, six chunks of random microcode words (c_end on the last) are
// placed in a memory model with random grant stalls, their addresses are
// written to the FIFO input while polling the full bit, and the DMA is
// enabled. With cmd_req random, every word on cmd_o is compared against the
// chunk contents in order and dec_cmd_o against the table entry selected by
// the word type and field A / field B. At the end the status register must
// report the FIFO empty and the DMA idle.
// Processor variant (HAS_DMA = 0): random words on cpu_cmd_i must appear,
// expanded, one cycle later; the TCDM request must stay idle.
module tb_acc_wrapper;
  import ctrl_seq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------- shared APB
  logic        psel_d, psel_c, penable, pwrite;
  logic [31:0] paddr, pwdata, prdata_d, prdata_c;
  logic        pready_d, pready_c;

  task automatic apb(input bit dma_side, input bit wr, input logic [11:0] off,
                     input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    psel_d = dma_side; psel_c = !dma_side; penable = 0; pwrite = wr;
    paddr = 32'h1A10_C000 | 32'(off); pwdata = wd;
    @(negedge clk); penable = 1;
    #1 rd = dma_side ? prdata_d : prdata_c;
    check(dma_side ? pready_d : pready_c, "pready");
    @(negedge clk); psel_d = 0; psel_c = 0; penable = 0;
  endtask

  // ------------------------------------------------------ DMA variant
  tcdm_req_t   req_d, req_c;
  logic        gnt, rvalid, gnt_rand;
  logic [31:0] rdata;
  logic        cmd_req;
  logic [31:0] cmd_d, cmd_c, cpu_cmd;
  logic [DEC_W-1:0] dec_d, dec_c;
  logic        valid_d, valid_c, busy_d, busy_c, cpu_valid;

  acc_wrapper #(.HAS_DMA(1'b1)) dut_dma (
    .clk_i(clk), .rst_ni(rst_n), .psel_i(psel_d), .penable_i(penable), .pwrite_i(pwrite),
    .paddr_i(paddr), .pwdata_i(pwdata), .prdata_o(prdata_d), .pready_o(pready_d),
    .tcdm_req_o(req_d), .tcdm_gnt_i(gnt), .tcdm_rvalid_i(rvalid), .tcdm_rdata_i(rdata),
    .cpu_cmd_i('0), .cpu_cmd_valid_i(1'b0), .cmd_req_i(cmd_req),
    .cmd_o(cmd_d), .dec_cmd_o(dec_d), .cmd_valid_o(valid_d), .dma_busy_o(busy_d));

  acc_wrapper #(.HAS_DMA(1'b0)) dut_cpu (
    .clk_i(clk), .rst_ni(rst_n), .psel_i(psel_c), .penable_i(penable), .pwrite_i(pwrite),
    .paddr_i(paddr), .pwdata_i(pwdata), .prdata_o(prdata_c), .pready_o(pready_c),
    .tcdm_req_o(req_c), .tcdm_gnt_i(1'b0), .tcdm_rvalid_i(1'b0), .tcdm_rdata_i('0),
    .cpu_cmd_i(cpu_cmd), .cpu_cmd_valid_i(cpu_valid), .cmd_req_i(cmd_req),
    .cmd_o(cmd_c), .dec_cmd_o(dec_c), .cmd_valid_o(valid_c), .dma_busy_o(busy_c));

  // memory model with random grant stalls
  logic [31:0] mem [4096];
  int          n_stalls = 0;
  always_ff @(posedge clk) gnt_rand <= ($urandom_range(0, 9) < 7);
  assign gnt = req_d.req && gnt_rand;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      rvalid <= gnt;
      if (gnt) rdata <= mem[req_d.addr[13:2]];
      if (req_d.req && !gnt) n_stalls++;
    end
  end

  // table model
  logic [DEC_W-1:0] lut [LUT_N];
  function automatic logic [DEC_W-1:0] expand(input logic [31:0] x);
    ucode_t w = ucode_t'(x);
    return w.wtype ? lut[LUTA_N + w.field_b] : lut[w.field_a];
  endfunction

  logic [31:0] exp_d [$], exp_c [$];
  int          got_d = 0, got_c = 0, n_typea = 0, n_typeb = 0;
  always_ff @(posedge clk) begin
    if (valid_d && rst_n) begin
      if (got_d < exp_d.size()) begin
        check(cmd_d == exp_d[got_d], $sformatf("DMA word %0d got %h exp %h", got_d, cmd_d, exp_d[got_d]));
        check(dec_d == expand(exp_d[got_d]), $sformatf("DMA dec word %0d", got_d));
      end else check(0, "extra DMA word");
      if (cmd_d[0]) n_typeb++; else n_typea++;
      got_d <= got_d + 1;
    end
    if (valid_c && rst_n) begin
      if (got_c < exp_c.size()) begin
        check(cmd_c == exp_c[got_c], $sformatf("CPU word %0d", got_c));
        check(dec_c == expand(exp_c[got_c]), $sformatf("CPU dec word %0d", got_c));
      end else check(0, "extra CPU word");
      got_c <= got_c + 1;
    end
    if (rst_n) check(!req_c.req, "no TCDM request without DMA");
  end

  int lens [6] = '{12, 36, 12, 5, 1, 20};
  logic [31:0] rd;

  initial begin
    psel_d = 0; psel_c = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    cmd_req = 1; cpu_cmd = 0; cpu_valid = 0;
    foreach (mem[i]) mem[i] = $urandom();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // tables, same contents in both variants
    for (int e = 0; e < LUT_N; e++) begin
      lut[e] = {16'($urandom()), 32'($urandom())};
      for (int s = 0; s < 2; s++) begin
        apb(1, 1, 12'(REG_LUT_FIRST + 8 * e), lut[e][31:0], rd);
        apb(0, 1, 12'(REG_LUT_FIRST + 8 * e), lut[e][31:0], rd);
        apb(1, 1, 12'(REG_LUT_FIRST + 8 * e + 4), 32'(lut[e][47:32]) | 32'hFFFF_0000, rd);
        apb(0, 1, 12'(REG_LUT_FIRST + 8 * e + 4), 32'(lut[e][47:32]), rd);
      end
    end
    for (int e = 0; e < LUT_N; e += 7) begin
      apb(1, 0, 12'(REG_LUT_FIRST + 8 * e), 0, rd);     check(rd == lut[e][31:0], "table read low");
      apb(1, 0, 12'(REG_LUT_FIRST + 8 * e + 4), 0, rd); check(rd == 32'(lut[e][47:32]), "table read high");
    end
    apb(1, 0, REG_STATUS, 0, rd); check(rd[1:0] == 2'b10, "status empty after reset");
    // chunks
    for (int c = 0; c < 6; c++) begin
      int base;
      base = 256 * (c + 1);
      for (int k = 0; k < lens[c]; k++) begin
        ucode_t w;
        w = ucode_t'($urandom());
        w.c_end = (k == lens[c] - 1);
        mem[base + k] = w;
        exp_d.push_back(w);
      end
    end
    // enable first, then feed the FIFO while polling the full bit
    apb(1, 1, REG_CTRL, 1, rd);
    apb(1, 0, REG_CTRL, 0, rd); check(rd == 1, "enable reads back");
    fork
      for (int c = 0; c < 6; c++) begin
        do apb(1, 0, REG_STATUS, 0, rd); while (rd[0]);
        apb(1, 1, REG_FIFO_IN, 32'(1024 * (c + 1)), rd);
      end
      while (got_d < exp_d.size()) begin
        @(negedge clk); cmd_req = ($urandom_range(0, 3) != 0);
      end
    join
    cmd_req = 1;
    repeat (20) @(negedge clk);
    check(got_d == exp_d.size(), $sformatf("DMA words %0d of %0d", got_d, exp_d.size()));
    apb(1, 0, REG_STATUS, 0, rd); check(rd[1:0] == 2'b10, "FIFO empty at the end");
    check(!busy_d, "DMA idle at the end");
    check(n_stalls > 0 && n_typea > 0 && n_typeb > 0, "grant stalls and both word types seen");
    // processor variant
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      cpu_valid = 1'($urandom());
      cpu_cmd = $urandom();
      if (cpu_valid) exp_c.push_back(cpu_cmd);
    end
    @(negedge clk); cpu_valid = 0;
    repeat (3) @(negedge clk);
    check(got_c == exp_c.size(), "CPU words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
