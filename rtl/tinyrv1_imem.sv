// tinyrv1_imem: combinational instruction memory (the I$ of the pipeline,
// modelled as a memory that answers in the same cycle, as the design
// assumes for both memories).
//
// A read returns one aligned fetch block: the two 32-bit instructions at
// byte addresses {fb_addr[31:3], 3'b000} and that + 4. Fetch blocks are
// always aligned to 8 bytes, so a block never straddles a 16-byte
// (four-instruction) cache line. A synchronous write port loads the
// program. Out-of-range addresses wrap. WORDS is this design's choice:
// 4096 words (16 KiB) hold the textbook example programs, which place
// code at 0x1000 and 0x2000.
module tinyrv1_imem
  import tinyrv1_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  word_t       fb_addr,     // byte address inside the fetch block
  output word_t [1:0] fb_inst,     // [0] = lower address, [1] = upper
  input  logic        wen,
  input  word_t       waddr,       // byte address of the word to write
  input  word_t       wdata
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  logic [AW-1:0] base;
  assign base = AW'({fb_addr[31:3], 1'b0});

  assign fb_inst[0] = mem[base];
  assign fb_inst[1] = mem[base | AW'(1)];

  always_ff @(posedge clk)
    if (wen) mem[AW'(waddr[31:2])] <= wdata;

endmodule
