// tinyrv1_fetch_unit: the F stage's program counter and next-PC logic.
//
// The pipeline fetches two instructions at once, as one fetch block.
// Fetch blocks are aligned: the instruction memory is always read at the
// 8-byte-aligned address fb_addr = {pc[31:3], 3'b000}. When the PC points
// at the second word of a block (pc[2] = 1, after a jump or branch to an
// odd word) the first instruction of the block is discarded: slot_mask
// marks which of the two fetched instructions are on the program path.
// Without a redirect the next PC is fb_addr + 8.
//
// Redirects take effect at the next rising edge: a taken bne resolved in
// A0 (redirect_x) has priority over a jal/jr resolved in D (redirect_d),
// because the branch is older. `stall` holds the PC while D cannot accept
// a new block; a redirect overrides it. Reset loads RESET_PC. The aligned
// fetch scheme follows the document; the reset value is this design's
// choice.
module tinyrv1_fetch_unit
  import tinyrv1_pkg::*;
#(
  parameter word_t RESET_PC = 32'h0000_0000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       stall,
  input  logic       redirect_d,
  input  word_t      target_d,
  input  logic       redirect_x,
  input  word_t      target_x,
  output word_t      pc,
  output word_t      fb_addr,
  output logic [1:0] slot_mask   // [0] lower word, [1] upper word
);

  word_t pc_q;

  assign pc        = pc_q;
  assign fb_addr   = {pc_q[31:3], 3'b000};
  assign slot_mask = {1'b1, ~pc_q[2]};

  always_ff @(posedge clk) begin
    if (rst)             pc_q <= RESET_PC;
    else if (redirect_x) pc_q <= target_x;
    else if (redirect_d) pc_q <= target_d;
    else if (!stall)     pc_q <= fb_addr + 32'd8;
  end

endmodule
