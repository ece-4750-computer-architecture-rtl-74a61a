// tinyrv1_dual_issue: in-order dual-issue superscalar TinyRV1 processor
// with its instruction and data memories.
//
// A scalar pipeline completes at most one instruction per cycle (CPI >= 1).
// This one fetches, decodes and issues two instructions per cycle when they
// are independent, so CPI can drop to 0.5. Stages:
//   F   the PC reads one aligned two-instruction fetch block from the
//       combinational instruction memory (tinyrv1_fetch_unit, tinyrv1_imem);
//   D   two decoders, a 4-read-port register file with full bypassing, and
//       the issue logic, which steers each instruction to the A or B pipe;
//       jal and jr redirect fetch here (one fetch block lost);
//   A0  A pipe: add, addi, mul, jal/jr link, bne (resolved here: a taken
//       bne squashes F, D and a younger instruction in B0);
//   A1  A pipe: carries the result;
//   B0  B pipe: add, addi, jal/jr link, lw/sw address;
//   B1  B pipe: combinational data memory access;
//   W   two register-file write ports, one per pipe.
// Branches are predicted not taken. A lw followed at once by a user of its
// value stalls D for one cycle; every other dependence is bypassed.
//
// Interface: program load through imem_*; a debug port into the data
// memory (use while the core is in reset, or for reading results); the
// W-stage write ports and commit flags; one event vector per cycle that
// shows which pipeline mechanism acted. Reset is synchronous and active
// high; the first fetch is at RESET_PC.
//
// The stage structure, pipe capabilities, aligned fetch, the places where
// jumps and branches resolve and the hazard cases are the document's. The
// reset PC, memory sizes, debug ports and event vector are this design's.
module tinyrv1_dual_issue
  import tinyrv1_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 4096,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter word_t       RESET_PC   = 32'h0000_0000
) (
  input  logic           clk,
  input  logic           rst,
  // program load
  input  logic           imem_wen,
  input  word_t          imem_waddr,
  input  word_t          imem_wdata,
  // data memory debug port
  input  logic           dmem_dbg_wen,
  input  word_t          dmem_dbg_addr,
  input  word_t          dmem_dbg_wdata,
  output word_t          dmem_dbg_rdata,
  // W stage: [0] A pipe, [1] B pipe
  output logic     [1:0] commit,
  output logic     [1:0] rf_wen,
  output reg_idx_t [1:0] rf_waddr,
  output word_t    [1:0] rf_wdata,
  output word_t          fetch_pc,
  output events_t        events
);

  // ---------------------------------------------------------------- F
  logic       f_stall, redirect_d, redirect_x;
  word_t      target_d, target_x, fb_addr;
  logic [1:0] f_mask;
  word_t [1:0] fb_inst;

  tinyrv1_fetch_unit #(.RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst, .stall(f_stall),
    .redirect_d, .target_d, .redirect_x, .target_x,
    .pc(fetch_pc), .fb_addr, .slot_mask(f_mask)
  );

  tinyrv1_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .fb_addr, .fb_inst,
    .wen(imem_wen), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  // ---------------------------------------------------------------- D
  logic  [1:0] d_valid;
  word_t       d_pc;          // address of the fetch block (slot 0)
  word_t [1:0] d_inst;
  dinst_t [1:0] d_dec;

  for (genvar i = 0; i < 2; i++) begin : g_dec
    tinyrv1_decoder u_dec (.inst(d_inst[i]), .dec(d_dec[i]));
  end

  reg_idx_t [3:0] rd_addr;
  word_t    [3:0] rf_rdata, opnd;
  logic     [3:0] opnd_ready, opnd_hit;

  assign rd_addr = {d_dec[1].rs2, d_dec[1].rs1, d_dec[0].rs2, d_dec[0].rs1};

  tinyrv1_regfile_4r2w u_rf (
    .clk, .rst, .raddr(rd_addr), .rdata(rf_rdata),
    .wen(rf_wen), .waddr(rf_waddr), .wdata(rf_wdata)
  );

  // in-flight results, youngest first
  issue_t  a0, b0;
  logic    b0_younger;
  result_t a1, b1, wa, wb;
  result_t [5:0] prod;
  word_t   a0_result, b0_result, b0_sdata, b1_value;
  logic    a0_taken, b0_mem_rd, b0_mem_wr;

  always_comb begin
    prod[0] = '{valid: a0.valid, writes_rd: a0.writes_rd, is_load: 1'b0, rd: a0.rd, value: a0_result};
    prod[1] = '{valid: b0.valid, writes_rd: b0.writes_rd, is_load: b0.op == OP_LW, rd: b0.rd, value: b0_result};
    prod[2] = a1;
    prod[3] = '{valid: b1.valid, writes_rd: b1.writes_rd, is_load: 1'b0, rd: b1.rd, value: b1_value};
    prod[4] = wa;
    prod[5] = wb;
  end

  tinyrv1_bypass_net #(.NPORTS(4), .NPROD(6)) u_bypass (
    .raddr(rd_addr), .rf_rdata, .prod,
    .value(opnd), .ready(opnd_ready), .hit(opnd_hit)
  );

  logic [1:0] slot_ready, issue;
  logic kill_second, d_advance, a_valid, a_slot, b_valid, b_slot, b_younger;
  logic split_struct, split_raw, split_waw, stall_load_use;

  assign slot_ready[0] = opnd_ready[0] && opnd_ready[1];
  assign slot_ready[1] = opnd_ready[2] && opnd_ready[3];

  tinyrv1_issue_logic u_issue (
    .slot_valid(d_valid), .dec(d_dec), .slot_ready,
    .issue, .kill_second, .advance(d_advance),
    .a_valid, .a_slot, .b_valid, .b_slot, .b_younger,
    .split_struct, .split_raw, .split_waw, .stall_load_use
  );

  function automatic issue_t make_issue(logic v, logic slot, dinst_t dec,
                                        word_t pc, word_t o1, word_t o2);
    issue_t r;
    r.valid     = v;
    r.op        = dec.op;
    r.rd        = dec.rd;
    r.writes_rd = dec.writes_rd;
    r.pc        = pc + (slot ? 32'd4 : 32'd0);
    r.op1       = o1;
    r.op2       = o2;
    r.imm       = dec.imm;
    return r;
  endfunction

  issue_t a_iss, b_iss;
  assign a_iss = make_issue(a_valid, a_slot, d_dec[a_slot], d_pc,
                            opnd[{a_slot, 1'b0}], opnd[{a_slot, 1'b1}]);
  assign b_iss = make_issue(b_valid, b_slot, d_dec[b_slot], d_pc,
                            opnd[{b_slot, 1'b0}], opnd[{b_slot, 1'b1}]);

  // jal/jr resolve in D. A jump in slot 0 drops slot 1, so at most one
  // jump in D takes effect per cycle.
  logic  jump_slot;
  always_comb begin
    redirect_d = 1'b0;
    jump_slot  = 1'b0;
    target_d   = '0;
    for (int i = 1; i >= 0; i--) begin
      if (issue[i] && d_dec[i].op inside {OP_JAL, OP_JR}) begin
        redirect_d = 1'b1;
        jump_slot  = i[0];
      end
    end
    if (d_dec[jump_slot].op == OP_JAL)
      target_d = d_pc + (jump_slot ? 32'd4 : 32'd0) + d_dec[jump_slot].imm;
    else
      target_d = opnd[{jump_slot, 1'b0}];
  end

  assign f_stall = !d_advance;

  always_ff @(posedge clk) begin
    if (rst) begin
      d_valid <= '0;
      d_pc    <= '0;
      d_inst  <= '0;
    end else if (redirect_x) begin
      d_valid <= '0;
    end else if (d_advance) begin
      d_valid <= redirect_d ? 2'b00 : f_mask;
      d_pc    <= fb_addr;
      d_inst  <= fb_inst;
    end else begin
      d_valid <= d_valid & ~issue;
    end
  end

  // ---------------------------------------------------------- A0 / B0
  tinyrv1_apipe_alu u_apipe (
    .in(a0), .result(a0_result), .br_taken(a0_taken), .br_target(target_x)
  );
  assign redirect_x = a0_taken;

  tinyrv1_bpipe_alu u_bpipe (
    .in(b0), .result(b0_result), .mem_read(b0_mem_rd), .mem_write(b0_mem_wr),
    .store_data(b0_sdata)
  );

  always_ff @(posedge clk) begin
    if (rst || redirect_x) begin
      a0 <= '0;
      b0 <= '0;
      b0_younger <= 1'b0;
    end else begin
      a0 <= a_iss;
      b0 <= b_iss;
      b0_younger <= b_younger;
    end
  end

  // ---------------------------------------------------------- A1 / B1
  logic  b1_mem_wr;
  word_t b1_sdata, dmem_rdata;
  logic  b1_is_load;

  tinyrv1_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .wen(b1.valid && b1_mem_wr), .addr(b1.value), .wdata(b1_sdata),
    .rdata(dmem_rdata),
    .dbg_wen(dmem_dbg_wen), .dbg_addr(dmem_dbg_addr),
    .dbg_wdata(dmem_dbg_wdata), .dbg_rdata(dmem_dbg_rdata)
  );

  assign b1_value = b1_is_load ? dmem_rdata : b1.value;

  logic b0_killed;
  assign b0_killed = redirect_x && b0_younger;

  always_ff @(posedge clk) begin
    if (rst) begin
      a1 <= '0;
      b1 <= '0;
      b1_mem_wr  <= 1'b0;
      b1_sdata   <= '0;
      b1_is_load <= 1'b0;
    end else begin
      a1 <= '{valid: a0.valid, writes_rd: a0.writes_rd, is_load: 1'b0, rd: a0.rd, value: a0_result};
      b1 <= '{valid: b0.valid && !b0_killed, writes_rd: b0.writes_rd, is_load: 1'b0,
              rd: b0.rd, value: b0_result};
      b1_mem_wr  <= b0_mem_wr && !b0_killed;
      b1_sdata   <= b0_sdata;
      b1_is_load <= b0_mem_rd;
    end
  end

  // ---------------------------------------------------------------- W
  always_ff @(posedge clk) begin
    if (rst) begin
      wa <= '0;
      wb <= '0;
    end else begin
      wa <= a1;
      wb <= '{valid: b1.valid, writes_rd: b1.writes_rd, is_load: 1'b0, rd: b1.rd, value: b1_value};
    end
  end

  assign commit   = {wb.valid, wa.valid};
  assign rf_wen   = {wb.valid && wb.writes_rd, wa.valid && wa.writes_rd};
  assign rf_waddr = {wb.rd, wa.rd};
  assign rf_wdata = {wb.value, wa.value};

  // ----------------------------------------------------------- events
  always_comb begin
    events                 = '0;
    events.dual_issue      = issue == 2'b11;
    events.single_issue    = issue == 2'b01 || issue == 2'b10;
    events.swizzle         = (a_valid && a_slot) || (b_valid && !b_slot);
    events.split_struct    = split_struct;
    events.split_raw       = split_raw;
    events.split_waw       = split_waw;
    events.load_use_stall  = stall_load_use;
    events.bypass          = |(opnd_hit & {issue[1], issue[1], issue[0], issue[0]});
    events.jump_redirect   = redirect_d && !redirect_x;
    events.branch_redirect = redirect_x;
    events.squash_b0       = b0_killed && b0.valid;
    events.align_discard   = d_advance && !redirect_d && !redirect_x && !f_mask[0];
    events.jump_drop       = kill_second && !redirect_x;
  end

  // A taken branch in A0 must not leave the stages behind it live.
  a_single_redirect_source: assert property (@(posedge clk) disable iff (rst)
    redirect_x |=> (d_valid == 2'b00 && !a0.valid && !b0.valid));

endmodule
