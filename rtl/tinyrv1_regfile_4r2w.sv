// tinyrv1_regfile_4r2w: the 32 x 32-bit integer register file of the
// dual-issue pipeline, with four read ports (two source operands for each
// of the two instructions decoded in D) and two write ports (one for the
// A pipe and one for the B pipe in W).
//
// Reads are combinational; writes happen at the rising clock edge. x0
// always reads as zero and is never written. A read in the same cycle as
// a write to that register returns the old value: the pipeline's bypass
// network forwards W-stage results, so no write-before-read is needed.
// The issue logic never lets two instructions that write the same register
// reach W together; an assertion checks that. The port counts are the
// design's; reset clears all registers (this design's choice).
module tinyrv1_regfile_4r2w
  import tinyrv1_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  reg_idx_t [3:0]   raddr,
  output word_t    [3:0]   rdata,
  input  logic     [1:0]   wen,
  input  reg_idx_t [1:0]   waddr,
  input  word_t    [1:0]   wdata
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int p = 0; p < 2; p++)
        if (wen[p] && waddr[p] != 5'd0) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb
    for (int r = 0; r < 4; r++)
      rdata[r] = (raddr[r] == 5'd0) ? '0 : regs[raddr[r]];

  // Both write ports never target the same architectural register.
  a_no_dual_write: assert property (@(posedge clk) disable iff (rst)
    !(wen[0] && wen[1] && waddr[0] == waddr[1] && waddr[0] != 5'd0));

endmodule
