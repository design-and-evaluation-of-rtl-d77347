// Testbench for decomp_lut: fills both tables with random 48-bit entries
// through the word-wide write port, reads a few back, then streams random
// type-A and type-B words and checks cmd_o/dec_cmd_o/cmd_valid_o one cycle
// later against an independent table model.
module tb_decomp_lut;
  import ctrl_seq_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        we, vin, vout;
  logic [7:0]  idx;
  logic [31:0] wdata, rdata, cin, cout;
  logic [47:0] dout;
  int checks = 0, failures = 0;
  logic [47:0] ta [64];
  logic [47:0] tbl [32];

  decomp_lut dut (
    .clk_i(clk), .rst_ni(rst_n), .lut_we_i(we), .lut_idx_i(idx), .lut_wdata_i(wdata),
    .lut_rdata_o(rdata), .cmd_i(cin), .cmd_valid_i(vin), .cmd_o(cout),
    .dec_cmd_o(dout), .cmd_valid_o(vout));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input int i, input logic [31:0] d);
    @(negedge clk); we = 1; idx = 8'(i); wdata = d;
    @(negedge clk); we = 0;
  endtask

  initial begin
    we = 0; idx = 0; wdata = 0; cin = 0; vin = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 96; e++) begin
      logic [47:0] v;
      v = {16'($urandom()), 32'($urandom())};
      if (e < 64) ta[e] = v; else tbl[e - 64] = v;
      wr(2 * e, v[31:0]);
      wr(2 * e + 1, {16'hFFFF, v[47:32]});      // upper bits of the odd word are unused
    end
    // read back
    @(negedge clk);
    idx = 8'd10; #1; check(rdata == ta[5][31:0], "read back low word");
    idx = 8'd131; #1; check(rdata == {16'b0, tbl[1][47:32]}, "read back high word");
    // stream
    for (int n = 0; n < 300; n++) begin
      ucode_t w;
      logic [47:0] exp_d;
      @(negedge clk);
      w = ucode_t'($urandom());
      vin = ($urandom_range(0, 3) != 0);
      cin = w;
      exp_d = w.wtype ? tbl[w.field_b] : ta[w.field_a];
      @(negedge clk);
      check(vout == vin, "valid delayed by one cycle");
      if (vin) begin
        check(cout == w, "cmd passes through");
        check(dout == exp_d, "decompressed word");
      end
      vin = 0;
    end
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
