// tb_r10k_core: end-to-end test of the renaming core at its default size (4 architectural
// registers, 8 ROB entries, 12 physical registers).
//
// Part 1 replays the walkthrough loop (ldf / mulf / stf / addi / ldf on f0, f1, f2, r1) and
// checks the renaming: T and Told of each instruction, the cycle of the load's issue, CDB
// broadcast, same-cycle wakeup of the multiply and retire, the map table, architectural map and
// free list after retire, and then a serial rollback of instructions 3-5 (one entry per
// cycle, youngest first), after which f1 maps back to PR#5 and r1 to PR#4 and the free list
// ends in PR#2, PR#8, PR#7. (The walkthrough numbers physical registers from PR#1; index k
// here is PR#(k+1).)
//
// Part 2 runs a long random program (all seven operations) with random serial rollbacks and
// checkpoint restores (about one instruction in four takes a checkpoint; a restore of an
// entry without one falls back to serial rollback). Discarded instructions are dispatched
// again. Loads from addresses that are 3 modulo 16 fault until the first exception for that
// address has been taken; the faulting load must reach the head in program order, raise the
// exception instead of retiring, and is then dispatched again with everything after it. Every retirement is checked
// against an in-order reference interpreter: destination register, value and, for stores,
// the data-cache write. Loads read a fixed pattern (the memory model returns a function of
// the address), so no load depends on a store. At the end the architectural map must point
// at the reference register values and the free list plus the architectural map must hold
// each physical register exactly once. Each mechanism of the design is counted and must occur.
module tb_r10k_core;
  import r10k_pkg::*;
  localparam int AR = 4, RD = 8, PR = AR + RD;
  localparam int AW = $clog2(AR), PW = $clog2(PR), RW = $clog2(RD);
  localparam int NPROG = 4000;

  logic clk = 0, rst_n = 0;
  logic disp_valid, disp_ready, rb_req, rb_busy, disp_ckpt, ck_req, ck_hit;
  logic dmem_fault, exc_valid, fault_en;
  logic [RW-1:0] exc_rob;
  bit handled [logic [XLEN-1:0]];   // faulting addresses the "handler" has already mapped
  op_e disp_op;
  logic [AW-1:0] disp_rd, disp_rs1, disp_rs2;
  logic [XLEN-1:0] disp_imm;
  logic [RW-1:0] disp_rob_idx, rb_idx, retire_rob_idx, ck_rob;
  logic dmem_re, dmem_we, retire_valid, retire_has_dest, cdb_valid;
  logic [XLEN-1:0] dmem_raddr, dmem_rdata, dmem_waddr, dmem_wdata, retire_value;
  logic [AW-1:0] retire_areg;
  logic [PW-1:0] retire_T, retire_Told, cdb_tag;
  logic [PW-1:0] arch_tag [AR];

  r10k_core dut (.*);

  always #5 clk = ~clk;

  // Loads from addresses that are 3 modulo 16 fault until the address has been "handled".
  function automatic logic faulting(logic [XLEN-1:0] a);
    return a[3:0] == 4'd3 && !handled.exists(a);
  endfunction

  function automatic logic [XLEN-1:0] mem_pattern(logic [XLEN-1:0] a);
    return (a * 32'h9e37_79b1) ^ 32'h1234_5678;
  endfunction
  assign dmem_rdata = mem_pattern(dmem_raddr);

  typedef struct { op_e op; int rd; int rs1; int rs2; logic [XLEN-1:0] imm; } insn_t;
  typedef struct { int pc; int rob; } inflight_t;
  insn_t     prog [NPROG];
  inflight_t infl [$];
  logic [XLEN-1:0] ref_r [AR];
  int pc = 0, ref_pc = 0, cyc = 0;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_stall_rs = 0, n_stall_rob = 0, n_stall_fl = 0, n_wake_issue = 0, n_cdb_conflict = 0;
  int n_undo = 0, n_squash_fu = 0, n_store = 0, n_load = 0, n_full_disp = 0, n_free_told = 0;
  int n_retire = 0, n_rollback = 0, n_ck_hit = 0, n_ck_fallback = 0, n_ck_full = 0, n_exc = 0;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d: %s got %0d exp %0d", cyc, what, got, exp);
    end
  endtask

  function automatic insn_t mk(op_e op, int rd, int rs1, int rs2, int imm);
    return '{op, rd, rs1, rs2, XLEN'(imm)};
  endfunction

  // Reference value of an instruction given the architectural registers.
  function automatic logic [XLEN-1:0] ref_value(insn_t i);
    logic [XLEN-1:0] a, b;
    a = ref_r[i.rs1]; b = ref_r[i.rs2];
    case (i.op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_ADDI: return a + i.imm;
      OP_MUL:  return a * b;
      OP_DIV:  return (b == 0) ? '1 : a / b;
      OP_LD:   return mem_pattern(b + i.imm);
      default: return '0;
    endcase
  endfunction

  // One clock cycle: apply inputs at the falling edge, check and count, then the rising edge.
  task automatic tick(logic want_disp, logic want_rb, int rb_k, logic want_ck = 0,
                      logic take_ck = 0);
    logic fired;
    int exc_pc;
    insn_t ins;
    inflight_t ck_target;
    @(negedge clk);
    cyc++;
    ins = prog[pc < NPROG ? pc : NPROG - 1];
    disp_valid = want_disp && !want_rb && !want_ck && pc < NPROG;
    disp_ckpt = take_ck;
    disp_op = ins.op; disp_rd = AW'(ins.rd); disp_rs1 = AW'(ins.rs1); disp_rs2 = AW'(ins.rs2);
    disp_imm = ins.imm;
    rb_req = want_rb;
    rb_idx = want_rb ? RW'(infl[rb_k].rob) : '0;
    ck_req = want_ck;
    if (want_ck) ck_target = infl[rb_k];
    ck_rob = want_ck ? RW'(ck_target.rob) : '0;
    dmem_fault = fault_en && faulting(dmem_raddr);
    #1;
    cycle_checks();
    // ---- retire check against the reference interpreter ----
    chk("store write only at store retire", dmem_we,
        retire_valid && infl.size() > 0 && prog[infl[0].pc].op == OP_ST);
    if (retire_valid) begin
      insn_t r;
      chk("retire has an in-flight instruction", infl.size() > 0, 1);
      r = prog[infl[0].pc];
      chk("retire order (pc)", infl[0].pc, ref_pc);
      chk("retire rob index", retire_rob_idx, infl[0].rob);
      chk("retire has_dest", retire_has_dest, r.op != OP_ST);
      if (r.op == OP_ST) begin
        chk("store address", dmem_waddr, ref_r[r.rs2] + r.imm);
        chk("store data", dmem_wdata, ref_r[r.rs1]);
        n_store++;
      end else begin
        if (r.op == OP_LD && faulting(ref_r[r.rs2] + r.imm))
          chk("a load from a faulting address retires only after its exception",
              handled.exists(ref_r[r.rs2] + r.imm), 1);
        chk("retire areg", retire_areg, r.rd);
        chk("retire value", retire_value, ref_value(r));
        ref_r[r.rd] = ref_value(r);
        n_free_told++;
      end
      void'(infl.pop_front());
      ref_pc++;
      n_retire++;
    end
    // ---- exception at retire ----
    if (exc_valid) begin
      insn_t r;
      logic [XLEN-1:0] a;
      chk("exception has an in-flight instruction", infl.size() > 0, 1);
      r = prog[infl[0].pc];
      a = ref_r[r.rs2] + r.imm;
      chk("exception in program order (pc)", infl[0].pc, ref_pc);
      chk("exception rob index", exc_rob, infl[0].rob);
      chk("exception only for a load", r.op == OP_LD, 1);
      chk("exception only for a faulting address", faulting(a), 1);
      handled[a] = 1;
      exc_pc = infl[0].pc;
      n_exc++;
    end
    // ---- mechanism counters ----
    if (disp_valid && !disp_ready && !rb_busy) begin
      if (dut.rs_busy[dut.d_fu]) n_stall_rs++;
      if (!dut.rob_ready) n_stall_rob++;
      if (dut.rob_ready && !dut.rs_busy[dut.d_fu] && dut.fl_empty) n_stall_fl++;
      if (disp_ckpt && dut.ck_full) n_ck_full++;
    end
    for (int i = 0; i < NUM_FU; i++)
      if (dut.iss_valid[i] && !(dut.u_rs.ent_q[i].r1 && dut.u_rs.ent_q[i].r2)) n_wake_issue++;
    if ($countones(dut.fu_req) > 1) n_cdb_conflict++;
    if (dut.u_rob.undo_valid) n_undo++;
    if (dut.g_fu[0].u_fu.squashed || dut.g_fu[1].u_fu.squashed || dut.g_fu[2].u_fu.squashed ||
        dut.g_fu[3].u_fu.squashed || dut.g_fu[4].u_fu.squashed) n_squash_fu++;
    if (dmem_re) n_load++;
    fired = disp_valid && disp_ready;
    if (fired && dut.u_rob.count == RW'(RD) + 0) n_full_disp++;
    if (fired) begin
      infl.push_back('{pc, int'(disp_rob_idx)});
      pc++;
    end
    if (want_rb) begin
      n_rollback++;
      pc = infl[rb_k].pc;
      while (infl.size() > rb_k) void'(infl.pop_back());
    end
    if (want_ck) begin
      // keep everything up to and including the checkpointed instruction
      if (ck_hit) n_ck_hit++;
      if (dut.ck_fallback) n_ck_fallback++;
      pc = ck_target.pc + 1;
      while (infl.size() > 0 && infl[infl.size() - 1].pc > ck_target.pc) void'(infl.pop_back());
    end
    if (exc_valid) begin
      // everything in flight is undone; the handler "maps the page" and the load restarts
      infl.delete();
      pc = exc_pc;
    end
    @(posedge clk);
    #1;
  endtask

  // Walkthrough expectations on what happens during a given cycle (combinational outputs).
  task automatic cycle_checks();
    case (cyc)
      2: chk("cycle 2: ldf issues", dut.iss_valid[FU_LD], 1);
      4: begin
        chk("cycle 4: CDB carries PR#5", {cdb_valid, cdb_tag}, {1'b1, PW'(4)});
        chk("cycle 4: mulf woken by CDB issues", dut.iss_valid[FU_FP1], 1);
      end
      5: begin
        chk("cycle 5: ldf retires", retire_valid && retire_rob_idx == 0, 1);
        chk("cycle 5: Told PR#2 returned", retire_Told, 1);
      end
      7, 8, 9: chk("serial undo, youngest first", {dut.u_rob.undo_valid, dut.u_rob.undo_idx},
                   {1'b1, RW'(4 - (cyc - 7))});
      default: ;
    endcase
  endtask

  initial begin
    int k;
    disp_valid = 0; rb_req = 0; rb_idx = '0; disp_op = OP_ADD;
    disp_ckpt = 0; ck_req = 0; ck_rob = '0; dmem_fault = 0; fault_en = 0;
    disp_rd = '0; disp_rs1 = '0; disp_rs2 = '0; disp_imm = '0;
    foreach (ref_r[i]) ref_r[i] = '0;
    // walkthrough loop body, twice; f0=0 f1=1 f2=2 r1=3; X=16, Z=64
    prog[0] = mk(OP_LD,   1, 0, 3, 16);   // ldf  X(r1), f1
    prog[1] = mk(OP_MUL,  2, 0, 1, 0);    // mulf f0, f1, f2
    prog[2] = mk(OP_ST,   0, 2, 3, 64);   // stf  f2, Z(r1)
    prog[3] = mk(OP_ADDI, 3, 3, 0, 4);    // addi r1, 4, r1
    prog[4] = mk(OP_LD,   1, 0, 3, 16);
    prog[5] = mk(OP_MUL,  2, 0, 1, 0);
    prog[6] = mk(OP_ST,   0, 2, 3, 64);
    for (int i = 7; i < NPROG; i++) begin
      int w;
      op_e op;
      w = $urandom_range(0, 99);
      op = (w < 25) ? OP_ADD : (w < 35) ? OP_SUB : (w < 55) ? OP_ADDI :
                (w < 67) ? OP_MUL : (w < 75) ? OP_DIV : (w < 90) ? OP_LD : OP_ST;
      prog[i] = mk(op, $urandom_range(0, AR - 1), $urandom_range(0, AR - 1),
                   $urandom_range(0, AR - 1), $urandom_range(0, 255));
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;

    // ---------------- part 1: the walkthrough ----------------
    tick(1, 0, 0);                                     // cycle 1: ldf
    chk("ldf T = PR#5", dut.u_rob.ent_q[0].T, 4);
    chk("ldf Told = PR#2", dut.u_rob.ent_q[0].Told, 1);
    chk("RS LD T2 = PR#4+", dut.u_rs.ent_q[FU_LD].T2, 3);
    chk("RS LD T2 ready", dut.u_rs.ent_q[FU_LD].r2, 1);
    tick(1, 0, 0);                                     // cycle 2: mulf
    chk("mulf T = PR#6", dut.u_rob.ent_q[1].T, 5);
    chk("mulf Told = PR#3", dut.u_rob.ent_q[1].Told, 2);
    chk("RS FP1 T1 = PR#1+", dut.u_rs.ent_q[FU_FP1].T1, 0);
    chk("RS FP1 T2 = PR#5 waiting", {dut.u_rs.ent_q[FU_FP1].T2, dut.u_rs.ent_q[FU_FP1].r2},
        {PW'(4), 1'b0});
    chk("LD station freed after issue", dut.rs_busy[FU_LD], 0);
    tick(1, 0, 0);                                     // cycle 3: stf
    chk("stf takes no preg (free list count)", dut.u_free.count, 6);
    chk("RS ST T1 = PR#6", dut.u_rs.ent_q[FU_ST].T1, 5);
    tick(1, 0, 0);                                     // cycle 4: addi
    chk("addi T = PR#7", dut.u_rob.ent_q[3].T, 6);
    chk("addi Told = PR#4", dut.u_rob.ent_q[3].Told, 3);
    chk("map f1 = PR#5+", {dut.u_map.map_tag[1], dut.u_map.map_rdy[1]}, {PW'(4), 1'b1});
    tick(1, 0, 0);                                     // cycle 5: second ldf
    chk("ldf#5 T = PR#8", dut.u_rob.ent_q[4].T, 7);
    chk("ldf#5 Told = PR#5", dut.u_rob.ent_q[4].Told, 4);
    chk("arch map f1 = PR#5", arch_tag[1], 4);
    chk("map f1 = PR#8", dut.u_map.map_tag[1], 7);
    chk("map f2 = PR#6", dut.u_map.map_tag[2], 5);
    chk("map r1 = PR#7", dut.u_map.map_tag[3], 6);
    chk("free list tail = PR#2", dut.u_free.entry[dut.u_free.count - 1], 1);
    // undo instructions 3..5 (infl[1] is instruction 3 now that instruction 1 retired)
    tick(0, 1, 1);                                     // cycle 6: rollback request
    repeat (3) tick(0, 0, 0);                          // cycles 7-9: undo 5, 4, 3
    chk("rollback finished", rb_busy, 0);
    chk("map f1 restored to PR#5+", {dut.u_map.map_tag[1], dut.u_map.map_rdy[1]},
        {PW'(4), 1'b1});
    chk("map r1 restored to PR#4+", {dut.u_map.map_tag[3], dut.u_map.map_rdy[3]},
        {PW'(3), 1'b1});
    chk("map f2 still PR#6", dut.u_map.map_tag[2], 5);
    chk("free list count", dut.u_free.count, 7);
    chk("free list ..., PR#2", dut.u_free.entry[4], 1);
    chk("free list ..., PR#8", dut.u_free.entry[5], 7);
    chk("free list ..., PR#7", dut.u_free.entry[6], 6);
    chk("ROB tail back at entry 3", dut.u_rob.tail, 2);

    // ---------------- part 2: random program with rollbacks ----------------
    fault_en = 1;
    while (pc < NPROG && cyc < 150000) begin
      logic rb, ck;
      rb = !rb_busy && infl.size() > 0 && ($urandom_range(0, 59) == 0);
      ck = !rb && !rb_busy && infl.size() > 0 && ($urandom_range(0, 29) == 0);
      k = (rb || ck) ? $urandom_range(0, infl.size() - 1) : 0;
      tick($urandom_range(0, 9) != 0, rb, k, ck, $urandom_range(0, 3) == 0);
    end
    while (infl.size() > 0 && cyc < 160000) tick(0, 0, 0);
    chk("program completed", ref_pc, NPROG);
    for (int i = 0; i < AR; i++)
      chk("architectural register value", dut.u_prf.regs_q[arch_tag[i]], ref_r[i]);
    begin
      int seen [PR];
      foreach (seen[i]) seen[i] = 0;
      for (int i = 0; i < AR; i++) seen[arch_tag[i]]++;
      for (int i = 0; i < dut.u_free.count; i++) seen[dut.u_free.entry[i]]++;
      chk("free list full again", dut.u_free.count, RD);
      for (int i = 0; i < PR; i++) chk("each preg owned once", seen[i], 1);
    end
    $display("mechanisms: rs_stall=%0d rob_stall=%0d freelist_stall=%0d wake_issue=%0d",
             n_stall_rs, n_stall_rob, n_stall_fl, n_wake_issue);
    $display("            cdb_conflict=%0d rollbacks=%0d undo_steps=%0d squashed_fu=%0d",
             n_cdb_conflict, n_rollback, n_undo, n_squash_fu);
    $display("            checkpoint restores=%0d fallbacks=%0d checkpoint-full stalls=%0d",
             n_ck_hit, n_ck_fallback, n_ck_full);
    $display("            exceptions=%0d", n_exc);
    $display("            loads=%0d stores=%0d told_freed=%0d full_rob_dispatch=%0d cycles=%0d",
             n_load, n_store, n_free_told, n_full_disp, cyc);
    chk("mechanism: RS busy stall", 32'(n_stall_rs > 0), 1);
    chk("mechanism: ROB full stall", 32'(n_stall_rob > 0), 1);
    chk("mechanism: free list empty stall", 32'(n_stall_fl > 0), 1);
    chk("mechanism: CDB wakeup and issue", 32'(n_wake_issue > 0), 1);
    chk("mechanism: CDB conflict", 32'(n_cdb_conflict > 0), 1);
    chk("mechanism: serial rollback", 32'(n_undo > 0), 1);
    chk("mechanism: squashed unit op", 32'(n_squash_fu > 0), 1);
    chk("mechanism: checkpoint restore", 32'(n_ck_hit > 0), 1);
    chk("mechanism: checkpoint miss falls back to rollback", 32'(n_ck_fallback > 0), 1);
    chk("mechanism: dispatch stalled on full checkpoint table", 32'(n_ck_full > 0), 1);
    chk("mechanism: exception at retire", 32'(n_exc > 0), 1);
    chk("mechanism: loads", 32'(n_load > 0), 1);
    chk("mechanism: retired stores", 32'(n_store > 0), 1);
    chk("mechanism: Told freed", 32'(n_free_told > 0), 1);
    chk("mechanism: dispatch into full ROB on retire", 32'(n_full_disp > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
