// tinyrv1_fetch_unit_tb: drives random stalls and redirects into the fetch
// unit and checks the PC against a model: reset value, sequential aligned
// fetch blocks (next = block + 8), stall hold, branch-over-jump priority,
// the aligned fetch address and the slot mask for odd-word targets.
module tinyrv1_fetch_unit_tb;
  import tinyrv1_pkg::*;

  localparam word_t RESET_PC = 32'h0000_0200;
  logic clk = 1'b0, rst = 1'b1;
  logic stall, redirect_d, redirect_x;
  word_t target_d, target_x, pc, fb_addr;
  logic [1:0] slot_mask;
  word_t exp_pc;
  int checks = 0, failures = 0;

  tinyrv1_fetch_unit #(.RESET_PC(RESET_PC)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stall = 0; redirect_d = 0; redirect_x = 0; target_d = '0; target_x = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    exp_pc = RESET_PC;
    for (int t = 0; t < 5000; t++) begin
      checks++;
      if (pc != exp_pc || fb_addr != (exp_pc & ~32'h7) ||
          slot_mask != (exp_pc[2] ? 2'b10 : 2'b11)) begin
        failures++;
        $display("FAIL pc=%h fb=%h mask=%b expected pc %h", pc, fb_addr, slot_mask, exp_pc);
      end
      stall      = ($urandom_range(0, 3) == 0);
      redirect_d = ($urandom_range(0, 5) == 0);
      redirect_x = ($urandom_range(0, 7) == 0);
      target_d   = $urandom & 32'h0000_fffc;
      target_x   = $urandom & 32'h0000_fffc;
      if (redirect_x)      exp_pc = target_x;
      else if (redirect_d) exp_pc = target_d;
      else if (!stall)     exp_pc = (exp_pc & ~32'h7) + 32'd8;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
