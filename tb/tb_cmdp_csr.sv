// Testbench for cmdp_csr: reset value, writes of the stall bit (taking
// effect one cycle later), the read-only idle bit following its input,
// writes to other addresses ignored and not hitting, random accesses against
// a one-bit model.
module tb_cmdp_csr;
  import ctrl_seq_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        we, hit, idle, stall;
  logic [11:0] addr;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;

  cmdp_csr dut (.clk_i(clk), .rst_ni(rst_n), .csr_we_i(we), .csr_addr_i(addr),
                .csr_wdata_i(wdata), .csr_rdata_o(rdata), .csr_hit_o(hit),
                .pipe_idle_i(idle), .stall_o(stall));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  bit model;
  initial begin
    we = 0; addr = 12'h800; wdata = 0; idle = 1; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!stall && hit && rdata == 32'h1, "reset: idle, not stalled");
    we = 1; wdata = 32'h2; #1 check(!stall, "write not yet visible");
    @(negedge clk); we = 0;
    check(stall && rdata == 32'h3, "stall bit set");
    idle = 0; #1 check(rdata == 32'h2, "idle bit follows its input");
    addr = 12'h801; #1 check(!hit && rdata == 0, "0x801 does not hit");
    we = 1; wdata = 0; @(negedge clk); we = 0;
    check(stall, "write to another address ignored");
    addr = 12'h800; we = 1; wdata = 32'hFFFF_FFFD; @(negedge clk); we = 0;
    check(!stall && rdata == 0, "only bit 1 is written");
    model = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      check(stall == model, "stall matches model");
      check(rdata == (hit ? {30'd0, model, idle} : 32'd0), "read data");
      we = 1'($urandom()); addr = ($urandom_range(0, 3) == 0) ? 12'($urandom()) : 12'h800;
      wdata = $urandom(); idle = 1'($urandom());
      #1;
      if (we && addr == 12'h800) model = wdata[1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
