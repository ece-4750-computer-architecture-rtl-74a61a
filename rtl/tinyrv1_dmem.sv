// tinyrv1_dmem: combinational data memory (the D$ of the B pipe, modelled
// as a memory that answers in the same cycle).
//
// The B pipe uses one port in stage B1: a lw reads the word at `addr`
// combinationally, a sw writes `wdata` at the rising clock edge. A second,
// debug port lets a test harness preload data and read results; the
// pipeline's write takes priority if both write in one cycle. Word
// accesses only (TinyRV1 has only lw/sw); the low two address bits are
// ignored and addresses wrap. WORDS is this design's choice.
module tinyrv1_dmem
  import tinyrv1_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic  clk,
  // B1 port
  input  logic  wen,
  input  word_t addr,
  input  word_t wdata,
  output word_t rdata,
  // debug port
  input  logic  dbg_wen,
  input  word_t dbg_addr,
  input  word_t dbg_wdata,
  output word_t dbg_rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  assign rdata     = mem[AW'(addr[31:2])];
  assign dbg_rdata = mem[AW'(dbg_addr[31:2])];

  always_ff @(posedge clk) begin
    if (wen)          mem[AW'(addr[31:2])]     <= wdata;
    else if (dbg_wen) mem[AW'(dbg_addr[31:2])] <= dbg_wdata;
  end

endmodule
