// tinyrv1_regfile_4r2w_tb: random traffic on the four read and two write
// ports of the register file, checked against an array model: writes
// become visible after the clock edge, x0 stays zero, both write ports
// work in the same cycle (to different registers).
module tinyrv1_regfile_4r2w_tb;
  import tinyrv1_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  reg_idx_t [3:0] raddr;
  word_t    [3:0] rdata;
  logic     [1:0] wen;
  reg_idx_t [1:0] waddr;
  word_t    [1:0] wdata;
  word_t model [32];
  int checks = 0, failures = 0;

  tinyrv1_regfile_4r2w dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wen = '0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < 32; i++) model[i] = '0;
    @(negedge clk); rst = 1'b0;
    for (int t = 0; t < 5000; t++) begin
      for (int r = 0; r < 4; r++) raddr[r] = 5'($urandom_range(0, 31));
      wen      = 2'($urandom_range(0, 3));
      waddr[0] = 5'($urandom_range(0, 31));
      waddr[1] = 5'($urandom_range(0, 31));
      if (waddr[1] == waddr[0]) waddr[1] = waddr[0] + 5'd1;
      wdata[0] = $urandom;
      wdata[1] = $urandom;
      #1;
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (rdata[r] != model[raddr[r]]) begin
          failures++;
          $display("FAIL port %0d x%0d = %h expected %h", r, raddr[r], rdata[r], model[raddr[r]]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < 2; p++) if (wen[p] && waddr[p] != 0) model[waddr[p]] = wdata[p];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
