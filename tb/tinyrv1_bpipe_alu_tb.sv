// tinyrv1_bpipe_alu_tb: random operands for every B-pipe operation; checks
// the result, the lw/sw address, the store data and the memory strobes.
module tinyrv1_bpipe_alu_tb;
  import tinyrv1_pkg::*;

  issue_t in;
  word_t  result, store_data;
  logic   mem_read, mem_write;
  int checks = 0, failures = 0;

  tinyrv1_bpipe_alu dut (.*);

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
    for (int t = 0; t < 3000; t++) begin
      in = '0;
      in.valid = 1'b1;
      in.pc  = $urandom & ~32'h3;
      in.op1 = $urandom;
      in.op2 = $urandom;
      in.imm = word_t'($urandom_range(0, 4095) - 2048);
      in.op = OP_ADD;  #1; chk(result == in.op1 + in.op2 && !mem_read && !mem_write, "add");
      in.op = OP_ADDI; #1; chk(result == in.op1 + in.imm, "addi");
      in.op = OP_LW;   #1; chk(result == in.op1 + in.imm && mem_read && !mem_write, "lw");
      in.op = OP_SW;   #1;
      chk(result == in.op1 + in.imm && !mem_read && mem_write && store_data == in.op2, "sw");
      in.op = OP_JR;   #1; chk(result == in.pc + 4, "jr link");
      in.valid = 1'b0; #1; chk(!mem_read && !mem_write, "no strobe when invalid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
