// Testbench for sync_lock: command pipeline first, main pipeline first,
// both in the same cycle, mismatched ids, and the machine-mode bypass of the
// main lock during an interrupt. Checks both lock outputs cycle by cycle.
// A second phase issues 5000 cycles of random synch_p ids (0..3) and
// interrupt entries/returns, and compares both locks every cycle with a
// model that keeps the id each pipeline is waiting on.
module tb_sync_lock;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       ci, mi, pirq, idone, cl, ml;
  logic [4:0] cid, mid;
  int checks = 0, failures = 0;

  sync_lock dut (
    .clk_i(clk), .rst_ni(rst_n), .cmd_lock_issued_i(ci), .cmd_lock_id_i(cid),
    .main_lock_issued_i(mi), .main_lock_id_i(mid), .pending_irq_i(pirq),
    .irq_done_i(idone), .cmd_pipe_lock_o(cl), .main_pipe_lock_o(ml));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic issue(input bit c, input logic [4:0] ic, input bit m, input logic [4:0] im);
    @(negedge clk); ci = c; cid = ic; mi = m; mid = im;
    @(negedge clk); ci = 0; mi = 0;
  endtask

  initial begin
    ci = 0; mi = 0; cid = 0; mid = 0; pirq = 0; idone = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); check(!cl && !ml, "unlocked after reset");
    // command pipeline first
    issue(1, 5'd3, 0, 0);      check(cl && !ml, "command pipeline waits");
    @(negedge clk);            check(cl, "still waiting");
    issue(0, 0, 1, 5'd3);      check(!cl && !ml, "released by main synch_p");
    // main first
    issue(0, 0, 1, 5'd7);      check(!cl && ml, "main pipeline waits");
    issue(1, 5'd7, 0, 0);      check(!cl && !ml, "released by command synch_p");
    // same cycle
    issue(1, 5'd9, 1, 5'd9);   check(!cl && !ml, "same cycle, same id: no lock");
    // mismatched ids
    issue(1, 5'd1, 0, 0);
    issue(0, 0, 1, 5'd2);      check(cl && ml, "different ids: both wait");
    // interrupt while main waits
    @(negedge clk); pirq = 1; @(negedge clk); pirq = 0;
    check(!ml && cl, "machine mode masks the main lock");
    @(negedge clk); idone = 1; @(negedge clk); idone = 0;
    check(ml, "main lock back after the handler");
    issue(1, 5'd2, 0, 0);      check(!ml, "main released by matching id");
    check(cl, "command lock with id 1 still held");
    issue(0, 0, 1, 5'd1);      check(!cl && !ml, "all released");
    // random traffic against a model that keeps the id each pipeline waits
    // on (-1: not waiting); a pipeline issues synch_p only while it runs
    begin
      int cw, mw, cw_n, mw_n;
      bit mm, c, m;
      logic [4:0] a, b;
      cw = -1; mw = -1; mm = 0;
      for (int n = 0; n < 5000; n++) begin
        @(negedge clk);
        c = (cw < 0) && ($urandom_range(0, 3) == 0);
        m = (mw < 0) && !mm && ($urandom_range(0, 3) == 0);
        a = 5'($urandom_range(0, 3));
        b = 5'($urandom_range(0, 3));
        ci = c; cid = a; mi = m; mid = b;
        pirq  = !mm && ($urandom_range(0, 30) == 0);
        idone = mm && ($urandom_range(0, 10) == 0);
        cw_n = cw; mw_n = mw;
        if (c && m && a == b) ;
        else begin
          if (c) begin if (mw == int'(a)) mw_n = -1; else cw_n = int'(a); end
          if (m) begin if (cw == int'(b)) cw_n = -1; else mw_n = int'(b); end
        end
        cw = cw_n; mw = mw_n;
        if (pirq) mm = 1; else if (idone) mm = 0;
        @(posedge clk); #1;
        check(cl == (cw >= 0), $sformatf("random step %0d: command lock", n));
        check(ml == (mw >= 0 && !mm), $sformatf("random step %0d: main lock", n));
      end
      @(negedge clk); ci = 0; mi = 0; pirq = 0; idone = 0;
    end
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
