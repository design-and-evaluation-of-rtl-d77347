// Testbench for tcdm_sram: every request is granted at once; read data and
// rvalid come one cycle later; byte enables write only the selected bytes.
// Random traffic against a word-array model, at the full 2048-word size.
module tb_tcdm_sram;
  import ctrl_seq_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  tcdm_req_t   req;
  logic        gnt, rvalid;
  logic [31:0] rdata;
  int checks = 0, failures = 0;
  logic [31:0] model [2048];
  bit          known [2048];

  tcdm_sram #(.WORDS(2048)) dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req),
    .gnt_o(gnt), .rvalid_o(rvalid), .rdata_o(rdata));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!rvalid, "no rvalid after reset");
    // fill some words fully
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      req = '{req: 1'b1, addr: 32'(i * 4), wen: 1'b1, wdata: 32'(i * 32'h01010101), be: 4'hF};
      #1 check(gnt, "write granted at once");
      model[i] = 32'(i * 32'h01010101); known[i] = 1;
    end
    @(negedge clk); req = '0;
    for (int n = 0; n < 600; n++) begin
      int w;
      bit wr;
      logic [3:0] be;
      logic [31:0] d;
      w  = $urandom_range(0, 2047);
      wr = ($urandom_range(0, 1) == 1) || !known[w];
      be = wr ? 4'($urandom_range(1, 15)) : 4'hF;
      if (!known[w]) be = 4'hF;
      d  = $urandom();
      @(negedge clk);
      req = '{req: 1'b1, addr: 32'h1C04_0000 + 32'(w * 4), wen: wr, wdata: d, be: be};
      #1 check(gnt, "granted");
      @(negedge clk);
      req = '0;
      check(rvalid, "rvalid one cycle later");
      if (wr) begin
        for (int b = 0; b < 4; b++) if (be[b]) model[w][8*b +: 8] = d[8*b +: 8];
        known[w] = 1;
      end else begin
        check(rdata == model[w], "read data");
      end
      #1;
    end
    @(negedge clk);
    check(!rvalid, "no rvalid without request");
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
