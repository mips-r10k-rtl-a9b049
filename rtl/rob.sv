// rob: reorder buffer of the R10K-style core. It holds control and tags only, no values.
//
// Each entry records the instruction's logical destination, T (the physical register it
// writes) and Told (the physical register previously mapped to the same logical register),
// plus a complete bit. Dispatch writes the entry at the tail; complete sets the bit by ROB
// index; the head retires when complete, handing T to the architectural map and Told to the
// free list. Stores have no destination and hand nothing back.
//
// Serial rollback (the document's "Option I"): rb_req names the oldest entry to undo. From
// the next cycle on, one entry per cycle is undone from the tail backwards; undo_* presents
// it so that the caller returns T to the free list and restores the map table to Told.
// While the rollback runs, squash_mask flags every entry still to be undone so that the
// reservation stations and functional units drop them, and retire waits. That squash timing
// and the stall of retire are this design's choices.
//
// Checkpoint recovery (the document's "Option II") cuts the ROB back to just after the
// checkpointed entry in one cycle (ck_restore), squashing the younger entries in that cycle.
//
// Exceptions are taken at retire: completion can mark an entry as excepting (cpl_exc). When
// such an entry is at the head it does not retire; head_exc asks the core to undo it and
// everything younger with a serial rollback. Only faulting loads raise exceptions here.
//
// Timing: all outputs are combinational from the state; updates at the rising edge. A
// dispatch may enter a full ROB in the cycle the head retires.
module rob #(
  parameter int ROB_DEPTH = 8,
  parameter int ARCH_REGS = 4,
  parameter int PHYS_REGS = 12,
  localparam int RW = $clog2(ROB_DEPTH),
  localparam int AW = $clog2(ARCH_REGS),
  localparam int PW = $clog2(PHYS_REGS),
  localparam int CW = $clog2(ROB_DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // dispatch (D)
  input  logic          disp_valid,
  input  logic          disp_has_dest,
  input  logic          disp_is_store,
  input  logic [AW-1:0] disp_areg,
  input  logic [PW-1:0] disp_T,
  input  logic [PW-1:0] disp_Told,
  output logic          disp_ready,
  output logic [RW-1:0] disp_idx,
  // complete (C)
  input  logic          cpl_valid,
  input  logic [RW-1:0] cpl_idx,
  input  logic          cpl_exc,
  // retire (R)
  output logic          retire_valid,
  output logic [RW-1:0] retire_idx,
  output logic          retire_has_dest,
  output logic          retire_is_store,
  output logic [AW-1:0] retire_areg,
  output logic [PW-1:0] retire_T,
  output logic [PW-1:0] retire_Told,
  // the head is complete but raised an exception: it does not retire
  output logic          head_exc,
  // serial rollback
  input  logic          rb_req,
  input  logic [RW-1:0] rb_idx,
  output logic          rb_busy,
  output logic          undo_valid,
  output logic [RW-1:0] undo_idx,
  output logic          undo_has_dest,
  output logic [AW-1:0] undo_areg,
  output logic [PW-1:0] undo_T,
  output logic [PW-1:0] undo_Told,
  output logic [ROB_DEPTH-1:0] squash_mask,
  // checkpoint recovery: drop every entry younger than ck_idx in one cycle
  input  logic          ck_restore,
  input  logic [RW-1:0] ck_idx,
  // state
  output logic [RW-1:0] head,
  output logic [RW-1:0] tail,
  output logic [CW-1:0] count
);

  typedef struct packed {
    logic          has_dest;
    logic          is_store;
    logic [AW-1:0] areg;
    logic [PW-1:0] T;
    logic [PW-1:0] Told;
  } entry_t;

  entry_t                 ent_q [ROB_DEPTH];
  logic [ROB_DEPTH-1:0]   done_q, exc_q;
  logic [RW-1:0]          head_q, tail_q, target_q;
  logic [CW-1:0]          count_q;
  logic                   rb_active_q;

  function automatic logic [RW-1:0] inc(logic [RW-1:0] p);
    return (p == RW'(ROB_DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction
  function automatic logic [RW-1:0] dec(logic [RW-1:0] p);
    return (p == '0) ? RW'(ROB_DEPTH - 1) : p - 1'b1;
  endfunction
  // distance of an index from the head, in program order
  function automatic int age(logic [RW-1:0] p);
    return (int'(p) - int'(head_q) + ROB_DEPTH) % ROB_DEPTH;
  endfunction

  logic          retire_fire, disp_fire;
  logic [RW-1:0] last;

  always_comb begin
    head  = head_q;
    tail  = tail_q;
    count = count_q;
    last  = dec(tail_q);

    head_exc        = (count_q != '0) && done_q[head_q] && exc_q[head_q] && !rb_active_q;
    retire_fire     = (count_q != '0) && done_q[head_q] && !exc_q[head_q] && !rb_active_q &&
                      !rb_req && !ck_restore;
    retire_valid    = retire_fire;
    retire_idx      = head_q;
    retire_has_dest = ent_q[head_q].has_dest;
    retire_is_store = ent_q[head_q].is_store;
    retire_areg     = ent_q[head_q].areg;
    retire_T        = ent_q[head_q].T;
    retire_Told     = ent_q[head_q].Told;

    disp_ready = !rb_active_q && !rb_req && !ck_restore && ((count_q != CW'(ROB_DEPTH)) || retire_fire);
    disp_fire  = disp_valid && disp_ready;
    disp_idx   = tail_q;

    rb_busy       = rb_active_q;
    undo_valid    = rb_active_q;
    undo_idx      = last;
    undo_has_dest = ent_q[last].has_dest;
    undo_areg     = ent_q[last].areg;
    undo_T        = ent_q[last].T;
    undo_Told     = ent_q[last].Told;

    for (int i = 0; i < ROB_DEPTH; i++)
      squash_mask[i] = (age(RW'(i)) < int'(count_q)) &&
                       ((rb_active_q && age(RW'(i)) >= age(target_q)) ||
                        (ck_restore && age(RW'(i)) > age(ck_idx)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q      <= '0;
      tail_q      <= '0;
      target_q    <= '0;
      count_q     <= '0;
      rb_active_q <= 1'b0;
      done_q      <= '0;
      exc_q       <= '0;
      for (int i = 0; i < ROB_DEPTH; i++) ent_q[i] <= '0;
    end else begin
      if (cpl_valid) begin
        done_q[cpl_idx] <= 1'b1;
        exc_q[cpl_idx]  <= cpl_exc;
      end
      if (retire_fire) head_q <= inc(head_q);
      if (disp_fire) begin
        ent_q[tail_q]  <= '{has_dest: disp_has_dest, is_store: disp_is_store,
                            areg: disp_areg, T: disp_T, Told: disp_Told};
        done_q[tail_q] <= 1'b0;
        tail_q         <= inc(tail_q);
      end
      count_q <= count_q + CW'(disp_fire) - CW'(retire_fire) - CW'(rb_active_q);

      if (ck_restore) begin
        tail_q  <= inc(ck_idx);
        count_q <= CW'(age(ck_idx) + 1);
      end else if (rb_active_q) begin
        // undo the youngest entry
        tail_q <= last;
        if (last == target_q) rb_active_q <= 1'b0;
      end else if (rb_req && age(rb_idx) < int'(count_q)) begin
        rb_active_q <= 1'b1;
        target_q    <= rb_idx;
      end
    end
  end

  // A rollback must name an entry that is in the ROB.
  a_rb_in_rob: assert property (@(posedge clk) disable iff (!rst_n)
    (rb_req && !rb_active_q) |-> (age(rb_idx) < int'(count_q) || rb_idx == tail_q));
  a_ck_not_in_rollback: assert property (@(posedge clk) disable iff (!rst_n)
    ck_restore |-> !rb_active_q && !rb_req && age(ck_idx) < int'(count_q));
  a_cpl_in_rob: assert property (@(posedge clk) disable iff (!rst_n)
    cpl_valid |-> (age(cpl_idx) < int'(count_q)));

endmodule
