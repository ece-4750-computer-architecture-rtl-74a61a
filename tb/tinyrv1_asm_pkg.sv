// tinyrv1_asm_pkg: instruction encoders used by the TinyRV1 testbenches.
// Each function returns the 32-bit RISC-V encoding of one TinyRV1
// instruction; branch and jump offsets are in bytes, relative to the
// instruction's own address.
package tinyrv1_asm_pkg;

  function automatic logic [31:0] i_add(int rd, int rs1, int rs2);
    return {7'b0000000, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), 7'b0110011};
  endfunction

  function automatic logic [31:0] i_mul(int rd, int rs1, int rs2);
    return {7'b0000001, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), 7'b0110011};
  endfunction

  function automatic logic [31:0] i_addi(int rd, int rs1, int imm);
    return {12'(imm), 5'(rs1), 3'b000, 5'(rd), 7'b0010011};
  endfunction

  function automatic logic [31:0] i_lw(int rd, int rs1, int imm);
    return {12'(imm), 5'(rs1), 3'b010, 5'(rd), 7'b0000011};
  endfunction

  function automatic logic [31:0] i_sw(int rs2, int rs1, int imm);
    logic [11:0] m;
    m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), 3'b010, m[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] i_jal(int rd, int off);
    logic [20:0] m;
    m = 21'(off);
    return {m[20], m[10:1], m[11], m[19:12], 5'(rd), 7'b1101111};
  endfunction

  function automatic logic [31:0] i_jr(int rs1);
    return {12'd0, 5'(rs1), 3'b000, 5'd0, 7'b1100111};
  endfunction

  function automatic logic [31:0] i_bne(int rs1, int rs2, int off);
    logic [12:0] m;
    m = 13'(off);
    return {m[12], m[10:5], 5'(rs2), 5'(rs1), 3'b001, m[4:1], m[11], 7'b1100011};
  endfunction

  localparam logic [31:0] NOP = 32'h0000_0013; // addi x0, x0, 0

endpackage
