// tinyrv1_issue_logic: decides which of the two instructions in D leave
// this cycle and steers ("swizzles") them to the A and B pipes.
//
// Slot 0 holds the older instruction of the fetch block, slot 1 the
// younger. Instructions issue in order: the oldest valid one ("first")
// issues when its operands are ready (no load-use hazard). The younger one
// ("second", only when both slots are valid) issues with it unless
//   - first is a jal/jr: second is off the program path and is dropped
//     (kill_second),
//   - both need the same pipe (structural hazard, e.g. two muls or a lw
//     and a sw),
//   - second reads the register first writes (RAW inside the block),
//   - both write the same register (WAW inside the block),
//   - second's own operands are not ready.
// A split pair leaves second in D to issue alone in a later cycle.
//
// Steering: a pair goes slot 0 -> A, slot 1 -> B when both can, else
// slot 0 -> B, slot 1 -> A; a jal/jr in slot 1 is steered to A whenever
// its partner can use B. An instruction issued alone goes to the A
// pipe if it can run there, else to the B pipe.
// b_younger marks a pair where B holds the younger instruction, so a taken
// branch in A0 knows to kill B0. WAR cannot occur: all reads happen in D,
// before any later write in W. The A/B capability table, the hazard cases
// and the name "swizzle" are the document's; the preference for A when an
// instruction issues alone follows the document's pipeline diagrams;
// splitting (rather than ordering writes) for WAW are this design's.
// Purely combinational.
module tinyrv1_issue_logic
  import tinyrv1_pkg::*;
(
  input  logic   [1:0] slot_valid,
  input  dinst_t [1:0] dec,
  input  logic   [1:0] slot_ready,   // operands of the slot available
  output logic   [1:0] issue,        // per slot: leaves D this cycle
  output logic         kill_second,  // slot 1 dropped behind an issued jump
  output logic         advance,      // D is empty after this cycle
  output logic         a_valid,
  output logic         a_slot,       // slot issued to the A pipe
  output logic         b_valid,
  output logic         b_slot,       // slot issued to the B pipe
  output logic         b_younger,
  output logic         split_struct,
  output logic         split_raw,
  output logic         split_waw,
  output logic         stall_load_use
);

  logic   pair, any, f_slot, f_ready, f_go, f_jump, pair_ok, natural, raw, waw, s_go;
  dinst_t f, s;

  always_comb begin
    pair    = slot_valid[0] && slot_valid[1];
    any     = slot_valid[0] || slot_valid[1];
    f_slot  = !slot_valid[0];
    f       = dec[f_slot];
    s       = dec[1];
    f_ready = slot_ready[f_slot];
    f_go    = any && f_ready;
    f_jump  = f.op inside {OP_JAL, OP_JR};

    natural = can_use_a(f.op) && can_use_b(s.op) &&
              !((s.op inside {OP_JAL, OP_JR}) && can_use_b(f.op));
    pair_ok = natural || (can_use_b(f.op) && can_use_a(s.op));
    raw     = f.writes_rd && ((s.uses_rs1 && s.rs1 == f.rd) || (s.uses_rs2 && s.rs2 == f.rd));
    waw     = f.writes_rd && s.writes_rd && (s.rd == f.rd);
    s_go    = pair && f_go && !f_jump && pair_ok && !raw && !waw && slot_ready[1];

    kill_second = pair && f_go && f_jump;

    issue = '0;
    if (f_go) issue[f_slot] = 1'b1;
    if (s_go) issue[1]      = 1'b1;

    advance = !any || (f_go && (!pair || s_go || kill_second));

    a_valid = 1'b0; a_slot = 1'b0;
    b_valid = 1'b0; b_slot = 1'b1;
    b_younger = 1'b0;
    if (s_go) begin
      a_valid = 1'b1; b_valid = 1'b1;
      a_slot  = natural ? 1'b0 : 1'b1;
      b_slot  = natural ? 1'b1 : 1'b0;
      b_younger = natural;
    end else if (f_go) begin
      if (can_use_a(f.op)) begin a_valid = 1'b1; a_slot = f_slot; end
      else                 begin b_valid = 1'b1; b_slot = f_slot; end
    end

    split_struct   = pair && f_go && !f_jump && !pair_ok;
    split_raw      = pair && f_go && !f_jump && raw;
    split_waw      = pair && f_go && !f_jump && waw;
    stall_load_use = (any && !f_ready) ||
                     (pair && f_go && !f_jump && pair_ok && !raw && !waw && !slot_ready[1]);
  end

endmodule
