// Testbench for chunk_fifo: random pushes and pops against a queue model,
// plus the directed corner cases of the four-entry buffer (fill to full,
// push while full is dropped, drain to empty, push and pop together).
module tb_chunk_fifo;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        push, pop, full, empty;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [31:0] model[$];

  chunk_fifo #(.DEPTH(4), .WIDTH(32)) dut (
    .clk_i(clk), .rst_ni(rst_n), .push_i(push), .wdata_i(wdata), .pop_i(pop),
    .rdata_o(rdata), .full_o(full), .empty_o(empty));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One cycle: drive, compare the flags and head with the model, clock.
  task automatic step(input bit p, input bit q, input logic [31:0] d);
    push = p; pop = q; wdata = d;
    #1;
    check(full == (model.size() == 4), "full flag");
    check(empty == (model.size() == 0), "empty flag");
    if (model.size() > 0) check(rdata == model[0], "head value");
    @(posedge clk);
    begin
      bit room;
      room = (model.size() < 4);               // a push into a full FIFO is dropped
      if (q && model.size() > 0) void'(model.pop_front());
      if (p && room) model.push_back(d);
    end
    #1;
  endtask

  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(empty && !full, "empty after reset");
    for (int i = 0; i < 4; i++) step(1, 0, 32'h1C04_0000 + 32'(i * 48));
    check(full, "full after four pushes");
    step(1, 0, 32'hDEAD_BEEF);                // dropped
    check(model.size() == 4, "model keeps four");
    step(1, 1, 32'h0000_1234);                // pop while full, push dropped
    for (int i = 0; i < 3; i++) step(0, 1, 0);
    check(empty, "empty after drain");
    for (int i = 0; i < 400; i++) begin
      logic p, q;
      p = ($urandom_range(0, 2) != 0);
      q = ($urandom_range(0, 2) != 0) && (model.size() > 0);
      step(p, q, $urandom());
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
