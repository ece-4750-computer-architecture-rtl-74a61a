// tinyrv1_apipe_alu_tb: random operands for every A-pipe operation; checks
// the result (sum, product, link address) and the bne outcome and target.
module tinyrv1_apipe_alu_tb;
  import tinyrv1_pkg::*;

  issue_t in;
  word_t  result, br_target;
  logic   br_taken;
  int checks = 0, failures = 0;

  tinyrv1_apipe_alu dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    longint unsigned prod;
    for (int t = 0; t < 3000; t++) begin
      in = '0;
      in.valid = 1'b1;
      in.pc  = $urandom & ~32'h3;
      in.op1 = $urandom;
      in.op2 = (t % 4 == 0) ? in.op1 : $urandom;
      in.imm = word_t'($urandom_range(0, 4095) - 2048);
      in.op = OP_ADD;  #1; chk(result == in.op1 + in.op2, "add");
      in.op = OP_ADDI; #1; chk(result == in.op1 + in.imm, "addi");
      prod = longint'(in.op1) * longint'(in.op2);
      in.op = OP_MUL;  #1; chk(result == prod[31:0], "mul");
      in.op = OP_JAL;  #1; chk(result == in.pc + 4, "jal link");
      in.op = OP_BNE;  #1;
      chk(br_taken == (in.op1 != in.op2), "bne taken");
      chk(br_target == in.pc + in.imm, "bne target");
      in.op = OP_ADD;  #1; chk(!br_taken, "no branch for add");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
