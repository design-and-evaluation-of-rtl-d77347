// Testbench for chunk_seq_acc. For random sequences (1..5 entries, inner
// counts 0..3, outer count 0..2, a random high address half) it loads the
// registers as the main pipeline would, then requests jumps until the
// accelerator reports empty, and compares the target addresses with a
// nested-loop reference: outer+1 passes, each entry n+1 times per pass.
// Also checks the register read port (entries, copy in register 30, ring
// counters in register 29, registers 27/28/31), the priority of the
// normal write port over the fjr write of register 28, and that a jump
// request while empty changes nothing.
module tb_chunk_seq_acc;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        we, ret_we, jump, active;
  logic [4:0]  waddr, raddr;
  logic [31:0] wdata, ret_wdata, rdata, target, start_addr, ret_addr;
  int checks = 0, failures = 0;

  chunk_seq_acc #(.N_ENTRIES(5)) dut (
    .clk_i(clk), .rst_ni(rst_n), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .ret_we_i(ret_we), .ret_wdata_i(ret_wdata), .raddr_i(raddr), .rdata_o(rdata),
    .jump_i(jump), .active_o(active), .target_o(target),
    .start_addr_o(start_addr), .ret_addr_o(ret_addr));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); we = 1; waddr = a; wdata = d;
    @(negedge clk); we = 0;
  endtask

  initial begin
    we = 0; ret_we = 0; jump = 0; waddr = 0; raddr = 0; wdata = 0; ret_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!active, "empty after reset");
    // plain registers and port priority
    wr(5'd27, 32'h1C01_0000);
    check(start_addr == 32'h1C01_0000, "register 27");
    @(negedge clk); we = 1; waddr = 5'd28; wdata = 32'h1111_0000; ret_we = 1; ret_wdata = 32'h2222_0000;
    @(negedge clk); we = 0; ret_we = 0;
    check(ret_addr == 32'h1111_0000, "normal write wins over fjr write");
    @(negedge clk); ret_we = 1; ret_wdata = 32'h3333_0004;
    @(negedge clk); ret_we = 0;
    raddr = 5'd28; #1 check(rdata == 32'h3333_0004, "fjr write of register 28");
    // jump while empty
    @(negedge clk); jump = 1; @(negedge clk); jump = 0;
    check(!active, "jump while empty ignored");

    for (int t = 0; t < 40; t++) begin
      int n, outer;
      int cnt [5];
      logic [15:0] lo [5];
      logic [15:0] hi;
      logic [31:0] expect_q[$];
      int jumps;
      n = $urandom_range(1, 5);
      outer = $urandom_range(0, 2);
      hi = 16'($urandom());
      for (int i = 0; i < n; i++) begin
        cnt[i] = $urandom_range(0, 3);
        lo[i]  = 16'($urandom_range(0, 16383) * 4);
      end
      wr(5'd31, {hi, 16'(outer)});
      for (int i = 0; i < n; i++) wr(5'(16 + i), {16'(cnt[i]), lo[i]});
      raddr = 5'd29; #1 check(rdata == {11'b0, 5'((1 << n) - 1), 11'b0, 5'((1 << n) - 1)}, "ring counters after loading");
      raddr = 5'd30; #1 check(rdata == {16'(cnt[0]), lo[0]}, "register 30 copies register 16");
      raddr = 5'(16 + n - 1); #1 check(rdata == {16'(cnt[n-1]), lo[n-1]}, "last entry reads back");
      raddr = 5'd31; #1 check(rdata == {hi, 16'(outer)}, "register 31 reads back");
      for (int p = 0; p <= outer; p++)
        for (int i = 0; i < n; i++)
          for (int r = 0; r <= cnt[i]; r++) expect_q.push_back({hi, lo[i]});
      jumps = 0;
      while (active && jumps < 200) begin
        if (expect_q.size() > 0) check(target == expect_q.pop_front(), "jump target");
        else check(0, "more jumps than expected");
        @(negedge clk); jump = 1;
        @(negedge clk); jump = 0;
        jumps++;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      check(expect_q.size() == 0, "sequence complete when empty");
      raddr = 5'd29; #1 check(rdata == 32'h0, "ring counters empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
