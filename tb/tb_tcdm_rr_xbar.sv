// Testbench for tcdm_rr_xbar with three masters in front of a memory model.
// Each master issues random reads of addresses that encode its own index,
// holding each request until granted. Checks: one grant per cycle and only
// to a requester; read data returns to the granted master one cycle later
// and nowhere else; with all three requesting continuously the grants
// rotate 0, 1, 2 (round robin); every request is eventually served.
module tb_tcdm_rr_xbar;
  import ctrl_seq_pkg::*;
  localparam int N = 3;
  logic        clk = 1'b0, rst_n = 1'b0;
  tcdm_req_t   m_req [N];
  logic [N-1:0] m_gnt, m_rvalid;
  logic [31:0] m_rdata;
  tcdm_req_t   s_req;
  logic        s_gnt, s_rvalid;
  logic [31:0] s_rdata;
  int checks = 0, failures = 0;
  bit          all_busy = 0;
  int          served [N];
  int          exp_m = -1;
  logic [31:0] exp_d;
  int          last_g = -1, rotations = 0;

  tcdm_rr_xbar #(.N_MASTERS(N)) dut (
    .clk_i(clk), .rst_ni(rst_n), .m_req_i(m_req), .m_gnt_o(m_gnt),
    .m_rvalid_o(m_rvalid), .m_rdata_o(m_rdata), .s_req_o(s_req),
    .s_gnt_i(s_gnt), .s_rvalid_i(s_rvalid), .s_rdata_i(s_rdata));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // memory model: data = ~address
  assign s_gnt = s_req.req;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin s_rvalid <= 0; s_rdata <= 0; end
    else begin s_rvalid <= s_req.req; s_rdata <= ~s_req.addr; end
  end

  // masters
  for (genvar m = 0; m < N; m++) begin : g_m
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) m_req[m] <= '0;
      else if (!m_req[m].req || m_gnt[m]) begin
        m_req[m].req  <= all_busy || ($urandom_range(0, 2) == 0);
        m_req[m].addr <= {8'h1C, 8'(m), 16'($urandom_range(0, 4095) * 4)};
        m_req[m].be   <= 4'hF;
        m_req[m].wen  <= 1'b0;
      end
    end
  end

  // checker
  always @(posedge clk) if (rst_n) begin
    int g;
    g = -1;
    check($countones(m_gnt) <= 1, "at most one grant");
    for (int m = 0; m < N; m++) if (m_gnt[m]) begin
      g = m;
      check(m_req[m].req, "grant only to a requester");
    end
    // response from the previous cycle's grant
    if (exp_m >= 0) begin
      check(m_rvalid == N'(1 << exp_m), "rvalid to the granted master only");
      check(m_rdata == exp_d, "read data routed");
    end else begin
      check(m_rvalid == '0, "no stray rvalid");
    end
    if (g >= 0) begin served[g]++; exp_m = g; exp_d = ~m_req[g].addr; end
    else exp_m = -1;
    if (all_busy && g >= 0 && last_g >= 0) begin
      check(g == (last_g + 1) % N, "round robin order");
      rotations++;
    end
    last_g = g;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (400) @(posedge clk);
    @(negedge clk) all_busy = 1;
    repeat (3) @(posedge clk);
    last_g = -1;
    repeat (60) @(posedge clk);
    @(negedge clk) all_busy = 0;
    repeat (10) @(posedge clk);
    for (int m = 0; m < N; m++) check(served[m] > 20, "each master served");
    check(rotations > 50, "rotation observed");
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
