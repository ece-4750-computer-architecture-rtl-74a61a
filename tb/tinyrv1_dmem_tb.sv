// tinyrv1_dmem_tb: random reads and writes on both ports of the data
// memory against an array model: combinational reads, writes at the clock
// edge, pipeline port winning over the debug port.
module tinyrv1_dmem_tb;
  import tinyrv1_pkg::*;

  localparam int WORDS = 64;
  logic clk = 1'b0;
  logic wen, dbg_wen;
  word_t addr, wdata, rdata, dbg_addr, dbg_wdata, dbg_rdata;
  word_t model [WORDS];
  int checks = 0, failures = 0;

  tinyrv1_dmem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wen = 1'b0; dbg_wen = 1'b0; addr = '0; wdata = '0; dbg_addr = '0; dbg_wdata = '0;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      dbg_wen = 1'b1; dbg_addr = word_t'(4 * i); dbg_wdata = model[i];
      @(negedge clk);
    end
    for (int t = 0; t < 3000; t++) begin
      wen = 1'($urandom_range(0, 1));
      dbg_wen = 1'($urandom_range(0, 1));
      addr = word_t'(4 * $urandom_range(0, WORDS - 1));
      dbg_addr = (t % 3 == 0) ? addr : word_t'(4 * $urandom_range(0, WORDS - 1));
      wdata = $urandom;
      dbg_wdata = $urandom;
      #1;
      checks += 2;
      if (rdata != model[addr[31:2]]) begin failures++; $display("FAIL read %h", addr); end
      if (dbg_rdata != model[dbg_addr[31:2]]) begin failures++; $display("FAIL dbg read"); end
      @(posedge clk);
      if (wen) model[addr[31:2]] = wdata;
      else if (dbg_wen) model[dbg_addr[31:2]] = dbg_wdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
