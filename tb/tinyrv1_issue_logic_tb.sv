// tinyrv1_issue_logic_tb: random pairs of decoded instructions, slot valid
// bits and operand readiness, checked against a reference written from the
// issue rules: in-order issue, the A/B capability table, structural, RAW
// and WAW splits, load-use stalls, dropping the instruction behind a jump,
// and the pipe steering (a pair in natural placement if possible, otherwise
// swizzled; a jump in slot 1 to A when its partner can use B; a lone instruction to A if it can go there).
module tinyrv1_issue_logic_tb;
  import tinyrv1_pkg::*;

  logic   [1:0] slot_valid, slot_ready, issue;
  dinst_t [1:0] dec;
  logic kill_second, advance, a_valid, a_slot, b_valid, b_slot, b_younger;
  logic split_struct, split_raw, split_waw, stall_load_use;
  int checks = 0, failures = 0;

  tinyrv1_issue_logic dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit in_a(op_e op);
    return op == OP_ADD || op == OP_ADDI || op == OP_MUL || op == OP_JAL || op == OP_JR || op == OP_BNE;
  endfunction
  function automatic bit in_b(op_e op);
    return op == OP_ADD || op == OP_ADDI || op == OP_LW || op == OP_SW || op == OP_JAL || op == OP_JR;
  endfunction

  function automatic dinst_t rand_inst();
    dinst_t d;
    op_e ops [8] = '{OP_ADD, OP_ADDI, OP_MUL, OP_LW, OP_SW, OP_JAL, OP_JR, OP_BNE};
    d = '0;
    d.op = ops[$urandom_range(0, 7)];
    d.uses_rs1 = d.op != OP_JAL;
    d.uses_rs2 = d.op inside {OP_ADD, OP_MUL, OP_SW, OP_BNE};
    d.rs1 = d.uses_rs1 ? 5'($urandom_range(0, 3)) : '0;
    d.rs2 = d.uses_rs2 ? 5'($urandom_range(0, 3)) : '0;
    d.rd  = (d.op inside {OP_ADD, OP_ADDI, OP_MUL, OP_LW, OP_JAL}) ? 5'($urandom_range(0, 3)) : '0;
    d.writes_rd = d.rd != 0;
    return d;
  endfunction

  initial begin
    bit e_iss0, e_iss1, e_kill, e_adv, e_av, e_bv, e_as, e_bs, e_by, e_st, e_raw, e_waw, e_lu;
    bit has_first, both, firstslot, fgo, jmp, nat, swz, raw, waw;
    for (int t = 0; t < 20000; t++) begin
      slot_valid = 2'($urandom_range(0, 3));
      slot_ready = 2'($urandom_range(0, 3)) | ($urandom_range(0, 1) ? 2'b11 : 2'b00);
      dec[0] = rand_inst();
      dec[1] = rand_inst();
      #1;
      // reference
      has_first = slot_valid != 0;
      both      = slot_valid == 2'b11;
      firstslot = slot_valid[0] ? 0 : 1;
      fgo       = has_first && slot_ready[firstslot];
      jmp       = dec[firstslot].op == OP_JAL || dec[firstslot].op == OP_JR;
      nat       = in_a(dec[0].op) && in_b(dec[1].op) &&
                  !((dec[1].op == OP_JAL || dec[1].op == OP_JR) && in_b(dec[0].op));
      swz       = in_b(dec[0].op) && in_a(dec[1].op);
      raw       = dec[0].writes_rd && ((dec[1].uses_rs1 && dec[1].rs1 == dec[0].rd) ||
                                       (dec[1].uses_rs2 && dec[1].rs2 == dec[0].rd));
      waw       = dec[0].writes_rd && dec[1].writes_rd && dec[0].rd == dec[1].rd;
      e_st  = both && fgo && !jmp && !(nat || swz);
      e_raw = both && fgo && !jmp && raw;
      e_waw = both && fgo && !jmp && waw;
      e_kill = both && fgo && jmp;
      e_iss0 = slot_valid[0] && fgo;
      e_iss1 = (!slot_valid[0] && fgo) ||
               (both && fgo && !jmp && (nat || swz) && !raw && !waw && slot_ready[1]);
      e_lu  = (has_first && !fgo) || (both && fgo && !jmp && (nat || swz) && !raw && !waw && !slot_ready[1]);
      e_adv = !has_first || (both ? (e_iss1 || e_kill) : fgo);
      e_av = 0; e_bv = 0; e_as = 0; e_bs = 1; e_by = 0;
      if (e_iss0 && e_iss1) begin
        e_av = 1; e_bv = 1; e_as = !nat; e_bs = nat; e_by = nat;
      end else if (e_iss0) begin
        if (in_a(dec[0].op)) begin e_av = 1; e_as = 0; end else begin e_bv = 1; e_bs = 0; end
      end else if (e_iss1) begin
        if (in_a(dec[1].op)) begin e_av = 1; e_as = 1; end else begin e_bv = 1; e_bs = 1; end
      end
      checks++;
      if (issue != {e_iss1, e_iss0} || kill_second != e_kill || advance != e_adv ||
          a_valid != e_av || b_valid != e_bv || (e_av && a_slot != e_as) ||
          (e_bv && b_slot != e_bs) || b_younger != e_by || split_struct != e_st ||
          split_raw != e_raw || split_waw != e_waw || stall_load_use != e_lu) begin
        failures++;
        $display("FAIL v=%b r=%b %s/%s: issue=%b exp %b a=%b%b exp %b%b b=%b%b exp %b%b",
                 slot_valid, slot_ready, dec[0].op.name(), dec[1].op.name(), issue,
                 {e_iss1, e_iss0}, a_valid, a_slot, e_av, e_as, b_valid, b_slot, e_bv, e_bs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
