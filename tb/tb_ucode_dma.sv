// Testbench for ucode_dma. A memory model answers granted reads one cycle
// later; a queue stands for the chunk FIFO; a sink collects the pushed words.
// Phase 1 (memory always granting, radar always requesting) checks the burst
// timing: a 12-word chunk spans 12 cycles from first to last word (bursts of
// eight words take nine cycles), the next chunk's first word comes two
// cycles after the previous c_end, and a 36-word chunk spans 39 cycles.
// Phase 2 runs random chunk lengths with random grant stalls and random
// cmd_req, and compares the pushed stream with the chunks in memory.
module tb_ucode_dma;
  import ctrl_seq_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        enable, fifo_empty, fifo_pop, cmd_req, cmd_valid, busy;
  logic [31:0] fifo_addr, cmd;
  tcdm_req_t   req;
  logic        gnt, rvalid;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  logic [31:0] mem [4096];
  logic [31:0] fifo_q[$];
  logic [31:0] expect_q[$];
  bit          stall_mode = 0;
  int          cyc = 0;
  int          valid_cycles[$];
  int          n_stalls = 0;

  ucode_dma #(.BURST_LEN(8)) dut (
    .clk_i(clk), .rst_ni(rst_n), .enable_i(enable),
    .fifo_empty_i(fifo_empty), .fifo_addr_i(fifo_addr), .fifo_pop_o(fifo_pop),
    .tcdm_req_o(req), .tcdm_gnt_i(gnt), .tcdm_rvalid_i(rvalid), .tcdm_rdata_i(rdata),
    .cmd_req_i(cmd_req), .cmd_o(cmd), .cmd_valid_o(cmd_valid), .busy_o(busy));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // memory model
  logic gnt_rand;
  always_ff @(posedge clk) gnt_rand <= stall_mode ? ($urandom_range(0, 9) < 7) : 1'b1;
  assign gnt = req.req && gnt_rand;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      rvalid <= gnt;
      if (gnt) rdata <= mem[req.addr[13:2]];
      if (req.req && !gnt) n_stalls++;
    end
  end

  // FIFO model
  assign fifo_empty = (fifo_q.size() == 0);
  assign fifo_addr  = fifo_empty ? '0 : fifo_q[0];
  always @(posedge clk) if (fifo_pop) void'(fifo_q.pop_front());

  // sink
  always @(posedge clk) begin
    cyc++;
    if (rst_n && cmd_valid) begin
      valid_cycles.push_back(cyc);
      if (expect_q.size() == 0) check(0, "unexpected word");
      else check(cmd == expect_q.pop_front(), "word value");
    end
  end

  // Writes a chunk of n words at byte address a and queues its words.
  task automatic make_chunk(input int a, input int n);
    for (int i = 0; i < n; i++) begin
      ucode_t w;
      w = ucode_t'($urandom());
      w.c_end = (i == n - 1);
      mem[(a >> 2) + i] = w;
      expect_q.push_back(w);
    end
  endtask

  initial begin
    enable = 0; cmd_req = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // ---------------- phase 1: timing
    make_chunk(32'h100, 12);
    make_chunk(32'h400, 36);
    fifo_q.push_back(32'h100);
    fifo_q.push_back(32'h400);
    @(negedge clk);
    enable = 1; cmd_req = 1;
    wait (expect_q.size() == 0);
    repeat (4) @(posedge clk);
    check(valid_cycles.size() == 48, "48 words pushed");
    if (valid_cycles.size() == 48) begin
      check(valid_cycles[11] - valid_cycles[0] == 12, "12-word chunk spans 12 cycles");
      check(valid_cycles[12] - valid_cycles[11] == 2, "next chunk two cycles after c_end");
      check(valid_cycles[47] - valid_cycles[12] == 39, "36-word chunk spans 39 cycles");
      check(valid_cycles[8] - valid_cycles[7] == 2, "one idle cycle between bursts");
    end
    check(!busy, "idle when FIFO empty");
    // ---------------- phase 2: random
    stall_mode = 1;
    for (int c = 0; c < 30; c++) begin
      int a;
      a = 32'h1000 + c * 256;
      make_chunk(a, $urandom_range(1, 40));
      while (fifo_q.size() >= 4) @(negedge clk);
      fifo_q.push_back(a);
    end
    fork
      begin
        while (expect_q.size() != 0) begin
          @(negedge clk);
          cmd_req = ($urandom_range(0, 3) != 0);
        end
      end
    join
    cmd_req = 1;
    repeat (10) @(posedge clk);
    check(expect_q.size() == 0, "all words pushed");
    check(n_stalls > 0, "grant stalls happened");
    $display("stalls=%0d", n_stalls);
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
