// tinyrv1_apipe_alu: execute logic of the A pipe (stage A0).
//
// The A pipe runs integer operations and branches: add, addi, mul, the
// link value of jal/jr, and bne. Everything is combinational and finishes
// within A0; A1 only carries the result on to W. bne is resolved here:
// br_taken is set when the two operands differ and br_target is pc + imm.
// The multiplier is a single-cycle 32x32 -> low-32 multiply; the document
// places mul in the A pipe but does not say how it is built, so a
// combinational multiplier is this design's choice.
//
// Interface: `in` is the instruction as issued (bypassed operands
// included); `result` is the value to write to rd; `br_taken`/`br_target`
// are valid only when in.valid and in.op == OP_BNE.
module tinyrv1_apipe_alu
  import tinyrv1_pkg::*;
(
  input  issue_t in,
  output word_t  result,
  output logic   br_taken,
  output word_t  br_target
);

  always_comb begin
    unique case (in.op)
      OP_ADD:         result = in.op1 + in.op2;
      OP_ADDI:        result = in.op1 + in.imm;
      OP_MUL:         result = in.op1 * in.op2;
      OP_JAL, OP_JR:  result = in.pc + 32'd4;
      default:        result = '0;
    endcase
  end

  assign br_taken  = in.valid && (in.op == OP_BNE) && (in.op1 != in.op2);
  assign br_target = in.pc + in.imm;

endmodule
