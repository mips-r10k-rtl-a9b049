// tb_rob: the reorder buffer against a queue model. Random dispatches, out-of-order
// completions (some marked as excepting), serial rollbacks and one-cycle checkpoint cuts;
// every cycle the retire port, the exception flag of the head, the dispatch handshake, the
// undo port, the squash mask and the pointers are compared with the model. An excepting head
// is answered, as the core does, with a rollback of the whole ROB. Also checks the rollback of the
// walkthrough: three entries undone youngest first, one per cycle.
module tb_rob;
  localparam int N = 8, AR = 4, PR = 12;
  localparam int RW = $clog2(N), AW = $clog2(AR), PW = $clog2(PR), CW = $clog2(N + 1);
  logic clk = 0, rst_n = 0;
  logic disp_valid, disp_has_dest, disp_is_store, disp_ready;
  logic [AW-1:0] disp_areg;
  logic [PW-1:0] disp_T, disp_Told;
  logic [RW-1:0] disp_idx;
  logic cpl_valid;
  logic [RW-1:0] cpl_idx;
  logic retire_valid, retire_has_dest, retire_is_store;
  logic [RW-1:0] retire_idx;
  logic [AW-1:0] retire_areg;
  logic [PW-1:0] retire_T, retire_Told;
  logic rb_req, rb_busy, undo_valid, undo_has_dest;
  logic [RW-1:0] rb_idx, undo_idx, head, tail;
  logic [AW-1:0] undo_areg;
  logic [PW-1:0] undo_T, undo_Told;
  logic [N-1:0] squash_mask;
  logic [CW-1:0] count;
  logic ck_restore, cpl_exc, head_exc;
  logic [RW-1:0] ck_idx;
  int ck_cuts = 0;

  typedef struct {
    int idx; logic has_dest; logic is_store; int areg; int T; int Told; logic done; logic exc;
  } ent_t;
  ent_t q [$];
  int m_head = 0, m_tail = 0, m_target = 0;
  logic m_active = 0;
  int exc_rollbacks = 0, rb_full_head = 0;
  int checks = 0, failures = 0, undos = 0, retires = 0, full_stalls = 0, full_and_retire = 0;

  rob #(.ROB_DEPTH(N), .ARCH_REGS(AR), .PHYS_REGS(PR)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Apply one cycle of inputs, compare outputs, advance the model.
  task automatic cycle(logic dv, logic rq, int ridx, logic cv, int cidx,
                       logic ck = 0, int ckpos = 0, logic cx = 0);
    logic exp_ret, exp_rdy, exp_exc, inq;
    int tpos;
    @(negedge clk);
    disp_valid = dv; disp_has_dest = ($urandom_range(0, 3) != 0);
    disp_is_store = !disp_has_dest;
    disp_areg = AW'($urandom_range(0, AR - 1));
    disp_T = PW'($urandom_range(0, PR - 1)); disp_Told = PW'($urandom_range(0, PR - 1));
    rb_req = rq; rb_idx = RW'(ridx); cpl_valid = cv; cpl_idx = RW'(cidx);
    cpl_exc = cx;
    ck_restore = ck; ck_idx = ck ? RW'(q[ckpos].idx) : '0;
    #1;
    exp_exc = !m_active && q.size() > 0 && q[0].done && q[0].exc;
    exp_ret = !m_active && !rq && !ck && q.size() > 0 && q[0].done && !q[0].exc;
    chk("head_exc", head_exc, exp_exc);
    exp_rdy = !m_active && !rq && !ck && (q.size() < N || exp_ret);
    chk("retire_valid", retire_valid, exp_ret);
    if (exp_ret) begin
      chk("retire_idx", retire_idx, q[0].idx);
      chk("retire_has_dest", retire_has_dest, q[0].has_dest);
      chk("retire_is_store", retire_is_store, q[0].is_store);
      chk("retire_areg", retire_areg, q[0].areg);
      chk("retire_T", retire_T, q[0].T);
      chk("retire_Told", retire_Told, q[0].Told);
    end
    chk("disp_ready", disp_ready, exp_rdy);
    chk("disp_idx", disp_idx, m_tail);
    chk("rb_busy", rb_busy, m_active);
    chk("undo_valid", undo_valid, m_active);
    chk("count", count, q.size());
    chk("head", head, m_head);
    chk("tail", tail, m_tail);
    if (m_active) begin
      chk("undo_idx", undo_idx, q[$].idx);
      chk("undo_has_dest", undo_has_dest, q[$].has_dest);
      chk("undo_areg", undo_areg, q[$].areg);
      chk("undo_T", undo_T, q[$].T);
      chk("undo_Told", undo_Told, q[$].Told);
    end
    tpos = q.size();
    foreach (q[k]) if (q[k].idx == m_target) tpos = k;
    for (int i = 0; i < N; i++) begin
      logic e = 0;
      foreach (q[k]) if (q[k].idx == i && ((m_active && k >= tpos) || (ck && k > ckpos))) e = 1;
      chk("squash_mask", squash_mask[i], e);
    end
    if (q.size() == N && dv && !m_active) full_stalls++;
    if (q.size() == N && dv && exp_ret) full_and_retire++;
    @(posedge clk);
    if (cv) foreach (q[k]) if (q[k].idx == cidx) begin q[k].done = 1; q[k].exc = cx; end
    if (exp_ret) begin void'(q.pop_front()); m_head = (m_head + 1) % N; retires++; end
    if (dv && exp_rdy) begin
      q.push_back('{m_tail, disp_has_dest, disp_is_store, int'(disp_areg), int'(disp_T),
                    int'(disp_Told), 1'b0, 1'b0});
      m_tail = (m_tail + 1) % N;
    end
    if (ck) begin
      m_tail = (q[ckpos].idx + 1) % N;
      while (q.size() > ckpos + 1) void'(q.pop_back());
      ck_cuts++;
    end else if (m_active) begin
      ent_t e = q.pop_back();
      m_tail = e.idx; undos++;
      if (e.idx == m_target) m_active = 0;
    end else begin
      inq = 0;
      foreach (q[k]) if (q[k].idx == ridx) inq = 1;
      if (rq && inq) begin
        m_active = 1; m_target = ridx;
        if (q.size() == N && ridx == m_head) rb_full_head++;
      end
    end
  endtask

  initial begin
    disp_valid = 0; rb_req = 0; cpl_valid = 0; cpl_exc = 0; ck_restore = 0; ck_idx = '0; rb_idx = '0; cpl_idx = '0;
    disp_has_dest = 0; disp_is_store = 0; disp_areg = '0; disp_T = '0; disp_Told = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // walkthrough: five instructions, complete the first, retire it, then undo 3..5
    repeat (5) cycle(1, 0, 0, 0, 0);
    cycle(0, 0, 0, 1, 0);
    cycle(0, 0, 0, 0, 0);          // entry 0 retires
    cycle(0, 1, 2, 0, 0);          // undo entries 2..4
    #1 chk("rollback started", rb_busy, 1);
    for (int s = 0; s < 3; s++) begin
      #1 chk("undo order", undo_idx, 4 - s);
      cycle(0, 0, 0, 0, 0);
    end
    #1 chk("rollback done", rb_busy, 0);
    chk("tail after rollback", tail, 2);
    // random traffic
    for (int cyc = 0; cyc < 6000; cyc++) begin
      logic rq, cv, ck, cx;
      int ridx, cidx, k, ckpos;
      rq = !m_active && q.size() > 0 && ($urandom_range(0, 24) == 0);
      ridx = rq ? q[$urandom_range(0, q.size() - 1)].idx : 0;
      if (!m_active && q.size() > 0 && q[0].done && q[0].exc) begin
        // exception at the head: undo everything, as the core does
        rq = 1; ridx = q[0].idx; exc_rollbacks++;
      end
      cv = 0; cidx = 0;
      if (q.size() > 0 && $urandom_range(0, 1) == 1) begin
        k = $urandom_range(0, q.size() - 1);
        if (!q[k].done) begin cv = 1; cidx = q[k].idx; end
      end
      cx = cv && ($urandom_range(0, 15) == 0);
      ck = !rq && !m_active && q.size() > 0 && ($urandom_range(0, 24) == 0);
      ckpos = ck ? $urandom_range(0, q.size() - 1) : 0;
      cycle($urandom_range(0, 3) != 0, rq, ridx, cv, cidx, ck, ckpos, cx);
    end
    chk("exception rollbacks happened", 32'(exc_rollbacks > 10), 1);
    chk("rollback from the head of a full ROB", 32'(rb_full_head > 0), 1);
    chk("undos happened", 32'(undos > 10), 1);
    chk("checkpoint cuts happened", 32'(ck_cuts > 10), 1);
    chk("full stalls happened", 32'(full_stalls > 0), 1);
    chk("dispatch into full ROB on retire", 32'(full_and_retire > 0), 1);
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
