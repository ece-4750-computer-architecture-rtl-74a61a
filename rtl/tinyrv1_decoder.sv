// tinyrv1_decoder: decodes one 32-bit TinyRV1 instruction (one of the two
// decoders, Decode0 and Decode1, in the D stage of the dual-issue pipeline).
//
// Purely combinational. It recognises add, addi, mul, lw, sw, jal, jr and
// bne by their RISC-V opcode/funct3/funct7 fields, extracts the register
// specifiers, says which source registers are read and whether a register
// other than x0 is written, and builds the sign-extended I, S, B or J
// immediate. Anything else decodes to OP_ILLEGAL, which reads and writes
// nothing. The instruction set is the design's; the field layout is the
// standard RISC-V one; the illegal-instruction handling is this design's
// own choice.
module tinyrv1_decoder
  import tinyrv1_pkg::*;
(
  input  word_t  inst,
  output dinst_t dec
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [6:0] funct7;
  word_t imm_i, imm_s, imm_b, imm_j;

  assign opcode = inst[6:0];
  assign funct3 = inst[14:12];
  assign funct7 = inst[31:25];

  assign imm_i = {{20{inst[31]}}, inst[31:20]};
  assign imm_s = {{20{inst[31]}}, inst[31:25], inst[11:7]};
  assign imm_b = {{19{inst[31]}}, inst[31], inst[7], inst[30:25], inst[11:8], 1'b0};
  assign imm_j = {{11{inst[31]}}, inst[31], inst[19:12], inst[20], inst[30:21], 1'b0};

  always_comb begin
    dec          = '0;
    dec.op       = OP_ILLEGAL;
    dec.rs1      = inst[19:15];
    dec.rs2      = inst[24:20];
    dec.rd       = inst[11:7];
    unique case (opcode)
      OPC_OP: begin
        if (funct3 == 3'b000 && funct7 == 7'b0000000) dec.op = OP_ADD;
        else if (funct3 == 3'b000 && funct7 == 7'b0000001) dec.op = OP_MUL;
      end
      OPC_OP_IMM: if (funct3 == 3'b000) begin dec.op = OP_ADDI; dec.imm = imm_i; end
      OPC_LOAD:   if (funct3 == 3'b010) begin dec.op = OP_LW;   dec.imm = imm_i; end
      OPC_STORE:  if (funct3 == 3'b010) begin dec.op = OP_SW;   dec.imm = imm_s; end
      OPC_JAL:    begin dec.op = OP_JAL; dec.imm = imm_j; end
      OPC_JALR:   if (funct3 == 3'b000) begin dec.op = OP_JR;  dec.imm = imm_i; end
      OPC_BRANCH: if (funct3 == 3'b001) begin dec.op = OP_BNE; dec.imm = imm_b; end
      default: ;
    endcase
    dec.uses_rs1  = dec.op inside {OP_ADD, OP_ADDI, OP_MUL, OP_LW, OP_SW, OP_JR, OP_BNE};
    dec.uses_rs2  = dec.op inside {OP_ADD, OP_MUL, OP_SW, OP_BNE};
    dec.writes_rd = (dec.op inside {OP_ADD, OP_ADDI, OP_MUL, OP_LW, OP_JAL}) && (dec.rd != 5'd0);
    if (!dec.uses_rs1) dec.rs1 = '0;
    if (!dec.uses_rs2) dec.rs2 = '0;
    if (!dec.writes_rd) dec.rd = '0;
  end

endmodule
