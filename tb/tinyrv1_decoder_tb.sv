// tinyrv1_decoder_tb: checks the TinyRV1 decoder on random instances of
// every instruction (random registers and immediates) and on encodings
// outside TinyRV1. The expected fields come from the values the encoder
// was given, not from the instruction bits.
module tinyrv1_decoder_tb;
  import tinyrv1_pkg::*;
  import tinyrv1_asm_pkg::*;

  word_t  inst;
  dinst_t dec;
  int checks = 0, failures = 0;

  tinyrv1_decoder dut (.inst, .dec);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_dec(op_e op, int rs1, int rs2, int rd, bit u1, bit u2, bit wr,
                            word_t imm, bit chk_imm);
    #1;
    checks++;
    if (dec.op != op || dec.uses_rs1 != u1 || dec.uses_rs2 != u2 || dec.writes_rd != wr ||
        (u1 && dec.rs1 != 5'(rs1)) || (u2 && dec.rs2 != 5'(rs2)) || (wr && dec.rd != 5'(rd)) ||
        (chk_imm && dec.imm != imm)) begin
      failures++;
      $display("FAIL inst=%h: got op=%s rs1=%0d rs2=%0d rd=%0d u=%b%b w=%b imm=%h, expected %s",
               inst, dec.op.name(), dec.rs1, dec.rs2, dec.rd, dec.uses_rs1, dec.uses_rs2,
               dec.writes_rd, dec.imm, op.name());
    end
  endtask

  initial begin
    int rd, rs1, rs2, imm;
    for (int t = 0; t < 2000; t++) begin
      rd = $urandom_range(0, 31); rs1 = $urandom_range(0, 31); rs2 = $urandom_range(0, 31);
      imm = $urandom_range(0, 4095) - 2048;
      inst = i_add(rd, rs1, rs2);  expect_dec(OP_ADD,  rs1, rs2, rd, 1, 1, rd != 0, 0, 0);
      inst = i_mul(rd, rs1, rs2);  expect_dec(OP_MUL,  rs1, rs2, rd, 1, 1, rd != 0, 0, 0);
      inst = i_addi(rd, rs1, imm); expect_dec(OP_ADDI, rs1, 0, rd, 1, 0, rd != 0, word_t'(imm), 1);
      inst = i_lw(rd, rs1, imm);   expect_dec(OP_LW,   rs1, 0, rd, 1, 0, rd != 0, word_t'(imm), 1);
      inst = i_sw(rs2, rs1, imm);  expect_dec(OP_SW,   rs1, rs2, 0, 1, 1, 0, word_t'(imm), 1);
      inst = i_jr(rs1);            expect_dec(OP_JR,   rs1, 0, 0, 1, 0, 0, 0, 0);
      imm = 2 * ($urandom_range(0, 4095) - 2048);
      inst = i_bne(rs1, rs2, imm); expect_dec(OP_BNE,  rs1, rs2, 0, 1, 1, 0, word_t'(imm), 1);
      imm = 2 * ($urandom_range(0, 1048575) - 524288);
      inst = i_jal(rd, imm);       expect_dec(OP_JAL,  0, 0, rd, 0, 0, rd != 0, word_t'(imm), 1);
    end
    // outside TinyRV1: sub, lb, beq, lui
    inst = 32'h4020_80b3; expect_dec(OP_ILLEGAL, 0, 0, 0, 0, 0, 0, 0, 0);
    inst = 32'h0000_8083; expect_dec(OP_ILLEGAL, 0, 0, 0, 0, 0, 0, 0, 0);
    inst = 32'h0020_8463; expect_dec(OP_ILLEGAL, 0, 0, 0, 0, 0, 0, 0, 0);
    inst = 32'h0000_10b7; expect_dec(OP_ILLEGAL, 0, 0, 0, 0, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
