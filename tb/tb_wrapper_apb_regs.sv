// Testbench for wrapper_apb_regs: APB setup/access transfers to every
// register of the map. Checks the control bit read-back, the status bits
// following the FIFO flags, the one-cycle FIFO push pulse with its data,
// the decompression-table word index and write strobe, table read-back,
// and that unmapped accesses neither write nor read anything.
module tb_wrapper_apb_regs;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        psel, penable, pwrite, pready;
  logic [31:0] paddr, pwdata, prdata;
  logic        dma_en, fifo_push, fifo_full, fifo_empty, lut_we;
  logic [31:0] fifo_wdata, lut_wdata, lut_rdata;
  logic [7:0]  lut_idx;
  int checks = 0, failures = 0;
  int n_push = 0, n_lut = 0;
  logic [31:0] last_push;
  logic [7:0]  last_idx;
  logic [31:0] last_lut;

  localparam logic [31:0] BASE = 32'h1A10_C000;

  wrapper_apb_regs dut (
    .clk_i(clk), .rst_ni(rst_n), .psel_i(psel), .penable_i(penable), .pwrite_i(pwrite),
    .paddr_i(paddr), .pwdata_i(pwdata), .prdata_o(prdata), .pready_o(pready),
    .dma_en_o(dma_en), .fifo_push_o(fifo_push), .fifo_wdata_o(fifo_wdata),
    .fifo_full_i(fifo_full), .fifo_empty_i(fifo_empty), .lut_we_o(lut_we),
    .lut_idx_o(lut_idx), .lut_wdata_o(lut_wdata), .lut_rdata_i(lut_rdata));

  always #5 clk = ~clk;

  // table read-back model: the index itself, tagged
  assign lut_rdata = {24'hABCDEF, lut_idx};

  always @(posedge clk) begin
    if (fifo_push) begin n_push++; last_push = fifo_wdata; end
    if (lut_we)    begin n_lut++;  last_idx = lut_idx; last_lut = lut_wdata; end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic apb_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    check(pready, "pready");
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1; #1 d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  initial begin
    logic [31:0] d;
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    fifo_full = 0; fifo_empty = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    apb_read(BASE, d);            check(d == 0 && !dma_en, "control resets to 0");
    apb_write(BASE, 32'h1);       check(dma_en, "enable set");
    apb_read(BASE, d);            check(d == 1, "control reads back");
    apb_read(BASE + 12, d);       check(d == 32'h2, "status: empty");
    fifo_full = 1; fifo_empty = 0;
    apb_read(BASE + 12, d);       check(d == 32'h1, "status: full");
    apb_write(BASE + 32'h400, 32'h1C04_0030);
    check(n_push == 1 && last_push == 32'h1C04_0030, "one FIFO push with the address");
    for (int k = 0; k < 20; k++) begin
      int i;
      logic [31:0] v;
      i = $urandom_range(0, 191);
      v = $urandom();
      apb_write(BASE + 32'h100 + 32'(4 * i), v);
      check(n_lut == k + 1 && last_idx == 8'(i) && last_lut == v, "table write index and data");
      apb_read(BASE + 32'h100 + 32'(4 * i), d);
      check(d == {24'hABCDEF, 8'(i)}, "table read-back");
    end
    apb_write(BASE + 32'h080, 32'hFFFF_FFFF);   // unmapped
    apb_read(BASE + 32'h080, d);
    check(d == 0 && n_push == 1 && n_lut == 20 && dma_en, "unmapped access has no effect");
    apb_write(BASE, 32'h0);       check(!dma_en, "enable cleared");
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
