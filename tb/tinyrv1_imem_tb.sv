// tinyrv1_imem_tb: fills the instruction memory through its write port,
// then reads fetch blocks at every byte offset inside random blocks and
// checks that both words of the aligned block come back in order.
module tinyrv1_imem_tb;
  import tinyrv1_pkg::*;

  localparam int WORDS = 1024;
  logic clk = 1'b0;
  word_t fb_addr, waddr, wdata;
  word_t [1:0] fb_inst;
  logic wen;
  word_t model [WORDS];
  int checks = 0, failures = 0;

  tinyrv1_imem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int blk;
    wen = 1'b0; fb_addr = '0; waddr = '0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      wen = 1'b1; waddr = word_t'(4 * i); wdata = model[i];
      @(negedge clk);
    end
    wen = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      blk = $urandom_range(0, WORDS / 2 - 1);
      fb_addr = word_t'(8 * blk + $urandom_range(0, 7));
      #1;
      checks++;
      if (fb_inst[0] != model[2 * blk] || fb_inst[1] != model[2 * blk + 1]) begin
        failures++;
        $display("FAIL block at %h: %h %h", fb_addr, fb_inst[0], fb_inst[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
