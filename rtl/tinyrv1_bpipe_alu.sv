// tinyrv1_bpipe_alu: execute logic of the B pipe (stage B0).
//
// The B pipe runs integer operations and memory operations: add, addi,
// the link value of jal/jr, and address generation for lw and sw
// (R[rs1] + imm). The data memory is accessed in the following stage, B1,
// with `result` as the address and `store_data` (R[rs2]) as the data of a
// sw. Purely combinational; the B pipe has no multiplier and never resolves
// a branch, as the design's steering table says.
module tinyrv1_bpipe_alu
  import tinyrv1_pkg::*;
(
  input  issue_t in,
  output word_t  result,     // ALU result, or memory address for lw/sw
  output logic   mem_read,
  output logic   mem_write,
  output word_t  store_data
);

  always_comb begin
    unique case (in.op)
      OP_ADD:         result = in.op1 + in.op2;
      OP_ADDI,
      OP_LW,
      OP_SW:          result = in.op1 + in.imm;
      OP_JAL, OP_JR:  result = in.pc + 32'd4;
      default:        result = '0;
    endcase
  end

  assign mem_read   = in.valid && (in.op == OP_LW);
  assign mem_write  = in.valid && (in.op == OP_SW);
  assign store_data = in.op2;

endmodule
