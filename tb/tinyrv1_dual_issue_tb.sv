// tinyrv1_dual_issue_tb: end-to-end test of the dual-issue TinyRV1
// processor at its default sizes.
//
// Each test loads a program into the instruction memory and data into the
// data memory, runs the same program on an instruction-level reference
// model written in this testbench, runs the processor until it has
// committed as many instructions as the reference model executed before
// reaching the final self-loop (jal x0, 0), and then compares all 32
// registers (rebuilt from the W-stage write ports) and the first 256 data
// words. The directed programs are the instruction sequences used to
// explain the pipeline: independent pairs, full bypassing, load-use,
// jump and branch resolution, unaligned targets, structural and name
// hazards, and a long independent stream that must sustain two
// instructions per cycle. For these the cycle in which each instruction reaches W is also
// checked against hand-worked pipeline diagrams of this design (F, D,
// A0/B0, A1/B1, W; the first instruction of the program reaches W in
// cycle 4 counting the first fetch as cycle 0), and for the unaligned-
// target program the pipe each instruction used. Random programs with
// forward branches and jumps follow. Every pipeline mechanism reported on
// the event vector must occur at least once.
module tinyrv1_dual_issue_tb;
  import tinyrv1_pkg::*;
  import tinyrv1_asm_pkg::*;

  localparam int IW = 4096;
  localparam int DW = 1024;
  localparam int CHECK_DW = 256;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic           imem_wen = 1'b0;
  word_t          imem_waddr = '0, imem_wdata = '0;
  logic           dmem_dbg_wen = 1'b0;
  word_t          dmem_dbg_addr = '0, dmem_dbg_wdata = '0, dmem_dbg_rdata;
  logic     [1:0] commit, rf_wen;
  reg_idx_t [1:0] rf_waddr;
  word_t    [1:0] rf_wdata;
  word_t          fetch_pc;
  events_t        events;

  tinyrv1_dual_issue dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ images
  word_t prog [IW];
  word_t data [DW];

  // ----------------------------------------------- reference model
  word_t iss_r [32];
  word_t iss_m [DW];
  int    iss_count;

  function automatic word_t sext(logic [31:0] v, int bits);
    return word_t'($signed(v << (32 - bits)) >>> (32 - bits));
  endfunction

  task automatic iss_run();
    word_t pc, inst, a, b, imm_i, imm_s, imm_b, imm_j, nxt;
    int rd, rs1, rs2;
    for (int i = 0; i < 32; i++) iss_r[i] = '0;
    for (int i = 0; i < DW; i++) iss_m[i] = data[i];
    pc = '0;
    iss_count = 0;
    forever begin
      inst = prog[(pc >> 2) % IW];
      if (inst == i_jal(0, 0)) break;
      rd  = int'(inst[11:7]);
      rs1 = int'(inst[19:15]);
      rs2 = int'(inst[24:20]);
      a = iss_r[rs1];
      b = iss_r[rs2];
      imm_i = sext({20'd0, inst[31:20]}, 12);
      imm_s = sext({20'd0, inst[31:25], inst[11:7]}, 12);
      imm_b = sext({19'd0, inst[31], inst[7], inst[30:25], inst[11:8], 1'b0}, 13);
      imm_j = sext({11'd0, inst[31], inst[19:12], inst[20], inst[30:21], 1'b0}, 21);
      nxt = pc + 4;
      case (inst[6:0])
        7'b0110011: iss_r[rd] = inst[25] ? a * b : a + b;
        7'b0010011: iss_r[rd] = a + imm_i;
        7'b0000011: iss_r[rd] = iss_m[(a + imm_i) >> 2 & (DW - 1)];
        7'b0100011: iss_m[(a + imm_s) >> 2 & (DW - 1)] = b;
        7'b1101111: begin iss_r[rd] = pc + 4; nxt = pc + imm_j; end
        7'b1100111: nxt = a;
        7'b1100011: if (a != b) nxt = pc + imm_b;
        default: ;
      endcase
      iss_r[0] = '0;
      pc = nxt;
      iss_count++;
      if (iss_count > 100000) break;
    end
  endtask

  // ----------------------------------------------- DUT-side state
  word_t dut_r [32];
  int    n_commit;
  int    commit_cycle [$];
  string commit_pipes;
  int    ev_count [string];
  string mechanisms [13] = '{"dual_issue", "single_issue", "swizzle", "split_struct",
                             "split_raw", "split_waw", "load_use_stall", "bypass",
                             "jump_redirect", "branch_redirect", "squash_b0",
                             "align_discard", "jump_drop"};

  always @(posedge clk) begin
    if (!rst) begin
      for (int p = 0; p < 2; p++) begin
        if (commit[p]) begin
          n_commit++;
          commit_cycle.push_back(cycles);
          commit_pipes = {commit_pipes, p == 0 ? "A" : "B"};
        end
        if (rf_wen[p]) dut_r[rf_waddr[p]] = rf_wdata[p];
      end
      if (events.dual_issue)      ev_count["dual_issue"]++;
      if (events.single_issue)    ev_count["single_issue"]++;
      if (events.swizzle)         ev_count["swizzle"]++;
      if (events.split_struct)    ev_count["split_struct"]++;
      if (events.split_raw)       ev_count["split_raw"]++;
      if (events.split_waw)       ev_count["split_waw"]++;
      if (events.load_use_stall)  ev_count["load_use_stall"]++;
      if (events.bypass)          ev_count["bypass"]++;
      if (events.jump_redirect)   ev_count["jump_redirect"]++;
      if (events.branch_redirect) ev_count["branch_redirect"]++;
      if (events.squash_b0)       ev_count["squash_b0"]++;
      if (events.align_discard)   ev_count["align_discard"]++;
      if (events.jump_drop)       ev_count["jump_drop"]++;
      cycles++;
    end
  end

  // Load images, run the program, compare against the reference model.
  task automatic run_test(string name, int exp_cycles[$] = {}, string exp_pipes = "");
    int start_commits;
    iss_run();
    rst = 1'b1;
    @(negedge clk);
    for (int i = 0; i < IW; i++) begin
      imem_wen = 1'b1; imem_waddr = word_t'(i * 4); imem_wdata = prog[i];
      dmem_dbg_wen = (i < DW); dmem_dbg_addr = word_t'(i * 4); dmem_dbg_wdata = data[i % DW];
      @(negedge clk);
    end
    imem_wen = 1'b0;
    dmem_dbg_wen = 1'b0;
    for (int i = 0; i < 32; i++) dut_r[i] = '0;
    n_commit = 0;
    commit_cycle.delete();
    commit_pipes = "";
    cycles = 0;
    rst = 1'b0;
    start_commits = 0;
    while (n_commit < iss_count && cycles < 20000) @(negedge clk);
    repeat (8) @(negedge clk);
    check(n_commit >= iss_count, $sformatf("%s: committed %0d of %0d", name, n_commit, iss_count));
    for (int i = 0; i < 32; i++)
      check(dut_r[i] == iss_r[i], $sformatf("%s: x%0d = %h, expected %h", name, i, dut_r[i], iss_r[i]));
    for (int i = 0; i < CHECK_DW; i++) begin
      dmem_dbg_addr = word_t'(i * 4);
      #1;
      check(dmem_dbg_rdata == iss_m[i], $sformatf("%s: mem[%0d] = %h, expected %h",
                                                  name, i, dmem_dbg_rdata, iss_m[i]));
    end
    for (int i = 0; i < exp_cycles.size(); i++)
      check(i < commit_cycle.size() && commit_cycle[i] == exp_cycles[i],
            $sformatf("%s: instruction %0d reached W in cycle %0d, expected %0d", name, i,
                      (i < commit_cycle.size()) ? commit_cycle[i] : -1, exp_cycles[i]));
    if (exp_pipes != "")
      check(commit_pipes.substr(0, exp_pipes.len() - 1) == exp_pipes,
            $sformatf("%s: pipes %s, expected %s", name, commit_pipes, exp_pipes));
    rst = 1'b1;
  endtask

  task automatic clear_images();
    for (int i = 0; i < IW; i++) prog[i] = i_jal(0, 0);
    for (int i = 0; i < DW; i++) data[i] = word_t'(i * 32'h0101_0101 + 32'h11);
  endtask

  // Random program with forward-only control flow, ending in a self-loop.
  task automatic random_program(int len);
    int op, rd, rs1, rs2, off;
    clear_images();
    for (int i = 0; i < len; i++) begin
      rd  = $urandom_range(0, 7);
      rs1 = $urandom_range(0, 7);
      rs2 = $urandom_range(0, 7);
      op  = $urandom_range(0, 99);
      off = 4 * $urandom_range(1, 6);
      if (i + off / 4 > len) off = 4 * (len - i);
      if      (op < 25) prog[i] = i_addi(rd, rs1, $urandom_range(0, 4095) - 2048);
      else if (op < 40) prog[i] = i_add(rd, rs1, rs2);
      else if (op < 50) prog[i] = i_mul(rd, rs1, rs2);
      else if (op < 65) prog[i] = i_lw(rd, 0, 4 * $urandom_range(0, 63));
      else if (op < 75) prog[i] = i_lw(rd, rs1, 4 * $urandom_range(0, 15));
      else if (op < 85) prog[i] = i_sw(rs2, 0, 4 * $urandom_range(0, 63));
      else if (op < 93) prog[i] = i_bne(rs1, rs2, off);
      else              prog[i] = i_jal(rd, off);
    end
    prog[len] = i_jal(0, 0);
  endtask

  initial begin
    // 1. six independent instructions: three dual-issue groups, the second
    //    needs a swizzle (addi -> B, mul -> A)
    clear_images();
    prog[0] = i_addi(1, 2, 1);    prog[1] = i_addi(3, 4, 1);
    prog[2] = i_addi(5, 6, 1);    prog[3] = i_mul(7, 8, 9);
    prog[4] = i_mul(10, 11, 12);  prog[5] = i_addi(13, 14, 1);
    prog[6] = i_jal(0, 0);
    run_test("independent", '{4, 4, 5, 5, 6, 6});

    // 2. full bypassing, RAW inside a fetch block splits it
    clear_images();
    prog[0] = i_addi(1, 2, 1);    prog[1] = i_addi(3, 4, 1);
    prog[2] = i_add(5, 1, 3);     prog[3] = i_addi(6, 5, 1);
    prog[4] = i_addi(7, 8, 1);    prog[5] = i_addi(9, 8, 1);
    prog[6] = i_jal(0, 0);
    run_test("bypass", '{4, 4, 5, 6, 7, 7});

    // 3. load-use stalls
    clear_images();
    data[0] = 32'h40; data[16] = 32'd7;
    prog[0] = i_addi(1, 2, 1);    prog[1] = i_lw(3, 4, 0);
    prog[2] = i_lw(5, 3, 0);      prog[3] = i_addi(6, 7, 1);
    prog[4] = i_addi(8, 5, 1);    prog[5] = i_addi(9, 8, 1);
    prog[6] = i_jal(0, 0);
    run_test("load_use", '{4, 4, 6, 6, 8, 9});

    // 4. jal resolved in D: one fetch block lost (code at 0x1000 and 0x2000,
    //    reached through a first jump at 0x000)
    clear_images();
    prog[0] = i_jal(0, 32'h1000);
    prog[32'h1000/4] = i_addi(1, 2, 1); prog[32'h1004/4] = i_jal(0, 32'h2000 - 32'h1004);
    prog[32'h1008/4] = i_addi(20, 0, 1); prog[32'h100c/4] = i_addi(21, 0, 1);
    prog[32'h2000/4] = i_addi(3, 4, 1); prog[32'h2004/4] = i_addi(5, 6, 1);
    prog[32'h2008/4] = i_jal(0, 0);
    run_test("jump", '{4, 6, 6, 8, 8});

    // 5. taken bne resolved in A0: kills the younger instruction in B0
    clear_images();
    prog[0] = i_addi(1, 0, 5);    prog[1] = i_addi(2, 0, 3);
    prog[2] = i_bne(1, 2, 32'h200 - 32'h8); prog[3] = i_addi(10, 0, 1);
    prog[4] = i_addi(11, 0, 1);   prog[5] = i_addi(12, 0, 1);
    prog[32'h200/4] = i_addi(3, 4, 1); prog[32'h204/4] = i_addi(5, 6, 1);
    prog[32'h208/4] = i_jal(0, 0);
    run_test("branch", '{4, 4, 5, 8, 8});

    // 6. jumps to unaligned targets: aligned fetch blocks, first slot dropped
    clear_images();
    prog[0] = i_addi(1, 0, 1);    prog[1] = i_addi(2, 0, 2);
    prog[2] = i_addi(3, 0, 3);    prog[3] = i_jal(0, 32'h100 - 32'h00c);
    prog[32'h100/4] = i_addi(4, 0, 4); prog[32'h104/4] = i_jal(0, 32'h204 - 32'h104);
    prog[32'h204/4] = i_addi(5, 0, 5); prog[32'h208/4] = i_jal(0, 32'h30c - 32'h208);
    prog[32'h20c/4] = i_addi(25, 0, 1);
    prog[32'h30c/4] = i_addi(6, 0, 6); prog[32'h310/4] = i_addi(7, 0, 7);
    prog[32'h314/4] = i_addi(8, 0, 8); prog[32'h318/4] = i_jal(0, 0);
    // pipes as in the aligned-fetch pipeline diagram; listed per W cycle,
    // A pipe before B pipe
    run_test("unaligned", '{4, 4, 5, 5, 7, 7, 9, 10, 12, 13, 13}, "ABABABAAAAB");

    // 7. structural hazards: two muls, then lw and sw
    clear_images();
    prog[0] = i_mul(1, 2, 3);     prog[1] = i_mul(4, 5, 6);
    prog[2] = i_lw(7, 8, 0);      prog[3] = i_sw(9, 10, 0);
    prog[4] = i_jal(0, 0);
    run_test("structural", '{4, 5, 6, 7});

    // 8. WAW and WAR inside a fetch block
    clear_images();
    prog[0] = i_addi(2, 0, 10);   prog[1] = i_addi(3, 0, 20);
    prog[2] = i_addi(1, 2, 1);    prog[3] = i_addi(1, 3, 1);
    prog[4] = i_addi(4, 2, 1);    prog[5] = i_addi(2, 3, 1);
    prog[6] = i_jal(0, 0);
    run_test("waw_war", '{4, 4, 5, 6, 7, 7});

    // 9. jal with link and jr through a bypassed register
    clear_images();
    prog[0] = i_addi(5, 0, 32'h40); prog[1] = i_jr(5);
    prog[2] = i_addi(20, 0, 1);
    prog[32'h40/4] = i_jal(1, 32'h80 - 32'h40); prog[32'h44/4] = i_addi(21, 0, 1);
    prog[32'h80/4] = i_addi(6, 1, 0); prog[32'h84/4] = i_jal(0, 0);
    run_test("jal_jr");

    // 10. throughput: 200 independent ALU instructions (no pair needs the
    //     same pipe or register) sustain two per cycle, CPI 0.5
    begin
      int exp[$];
      clear_images();
      for (int i = 0; i < 200; i++) begin
        if (i % 4 == 3) prog[i] = i_add(8 + i % 8, 1, 2);
        else            prog[i] = i_addi(8 + i % 8, 0, i);
        exp.push_back(4 + i / 2);
      end
      prog[200] = i_jal(0, 0);
      run_test("throughput", exp);
      check(commit_cycle.size() >= 200 && commit_cycle[199] - commit_cycle[0] == 99,
            "throughput: 200 instructions did not complete in 100 cycles");
    end

    // 11. random programs
    for (int t = 0; t < 40; t++) begin
      random_program(150);
      run_test($sformatf("random%0d", t));
    end

    foreach (ev_count[k]) $display("event %-16s %0d", k, ev_count[k]);
    foreach (mechanisms[i])
      check(ev_count.exists(mechanisms[i]) && ev_count[mechanisms[i]] > 0,
            $sformatf("mechanism %s never happened", mechanisms[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
