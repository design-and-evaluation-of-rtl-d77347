// Testbench for cmd_mux: builds random pp- and pc-format push instructions
// from chosen field values with its own encoder and checks the rebuilt
// microcode word field by field; other opcodes must give is_cmd_o = 0.
module tb_cmd_mux;
  import ctrl_seq_pkg::*;
  logic [31:0] instr, cmd;
  logic        is_cmd, c_end;
  int checks = 0, failures = 0;

  cmd_mux dut (.instr_i(instr), .is_cmd_o(is_cmd), .c_end_o(c_end), .cmd_o(cmd));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s instr=%h cmd=%h", what, instr, cmd); end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [5:0] fa, f1;
      logic [4:0] fb;
      logic [1:0] f3, f4, f5;
      logic       f2, f7, ce;
      logic [6:0] opc;
      logic [31:0] exp_w;
      int k;
      fa = 6'($urandom()); f1 = 6'($urandom()); fb = 5'($urandom());
      f3 = 2'($urandom()); f4 = 2'($urandom()); f5 = 2'($urandom());
      f2 = 1'($urandom()); f7 = 1'($urandom()); ce = 1'($urandom());
      k = $urandom_range(0, 4);
      case (k)
        0: opc = 7'h0B; 1: opc = 7'h2B; 2: opc = 7'h5B; 3: opc = 7'h7B;
        default: opc = 7'h13;    // addi: not a push
      endcase
      if (k == 0 || k == 1) begin
        instr = {ce, f5, fb, f4, f1, f2, f3, fa, opc};
        exp_w = {3'b0, 2'b0, 1'b0, f5, f4, f3, f2, f1, fb, fa, ce, (k == 1)};
      end else begin
        instr = {9'($urandom()), fb, ce, f2, f7, f3, fa, opc};
        exp_w = {3'b0, 1'b0, f7, 1'b0, 2'b0, 2'b0, f3, f2, 6'b0, fb, fa, ce, (k == 3)};
      end
      #1;
      if (k == 4) begin
        check(!is_cmd && cmd == 0, "non-push opcode ignored");
      end else begin
        check(is_cmd, "push recognised");
        check(cmd == exp_w, "rebuilt word");
        check(c_end == ce, "c_end");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
