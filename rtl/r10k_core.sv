// r10k_core: out-of-order core back end with R10K-style register renaming.
//
// All values live in one physical register file (PRF); the map table, ROB, reservation
// stations and CDB carry only physical register tags. The pipeline stages handled here are:
//   D  dispatch: read the source tags (with ready bits) and the destination's current mapping
//      (Told) from the map table, take a new physical register T from the free list, and
//      write RS, ROB and map table. Stall when the unit's RS, the ROB or the free list
//      is exhausted.
//   S  issue: an RS entry with both inputs ready reads its operands from the PRF.
//   X  execute in the unit (ALU, LD, ST, FP1, FP2).
//   C  complete: one unit per cycle wins the CDB, writes its result to PRF[T], broadcasts T
//      (map table ready bit, RS wakeup) and marks its ROB entry complete.
//   R  retire: the completed ROB head hands Told back to the free list and records T in the
//      architectural map; a retiring store writes its address/data to the data cache port.
// Rollback (precise state) is serial: rb_req names the oldest ROB entry to undo; one entry per
// cycle is undone from the tail, returning T to the free list and restoring its map entry to
// Told, while squashed RS entries and in-flight unit operations are dropped.
// Checkpoint recovery is the fast path: an instruction dispatched with disp_ckpt saves the
// map table; ck_req/ck_rob later discards everything younger than it in one cycle (map table
// reloaded, free-list head moved back, ROB cut). Without a live checkpoint for ck_rob the same
// request runs as a serial rollback.
// Exceptions are handled at retire: a load whose data-cache read faults (dmem_fault) is marked
// in its ROB entry; when it reaches the head it does not retire, exc_valid/exc_rob report it,
// and it is undone together with everything younger by a serial rollback. The front end then
// restarts, at the handler or at the same load.
//
// The number of physical registers is ARCH_REGS + ROB_DEPTH, the document's rule. Instruction
// format, unit latencies, the ROB index carried with the CDB tag, the store buffer and the
// debug/retire ports are this design's own. The data cache is outside the core: loads read it
// through dmem_r*, retiring stores write it through dmem_w*.
//
// Interface timing: disp_* is accepted when disp_valid && disp_ready at a rising edge;
// retire_* and cdb_* are valid in the cycle they are asserted.
module r10k_core
  import r10k_pkg::*;
#(
  parameter int ARCH_REGS = 4,
  parameter int ROB_DEPTH = 8,
  parameter int LAT_ALU   = 1,
  parameter int LAT_LD    = 1,
  parameter int LAT_ST    = 1,
  parameter int LAT_FP1   = 3,
  parameter int LAT_FP2   = 4,
  parameter int NUM_CKPT  = 4,
  localparam int PHYS_REGS = ARCH_REGS + ROB_DEPTH,
  localparam int AW = $clog2(ARCH_REGS),
  localparam int PW = $clog2(PHYS_REGS),
  localparam int RW = $clog2(ROB_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  // dispatch (D)
  input  logic            disp_valid,
  input  op_e             disp_op,
  input  logic [AW-1:0]   disp_rd,
  input  logic [AW-1:0]   disp_rs1,
  input  logic [AW-1:0]   disp_rs2,
  input  logic [XLEN-1:0] disp_imm,
  input  logic            disp_ckpt,     // take a map-table checkpoint after this instruction
  output logic            disp_ready,
  output logic [RW-1:0]   disp_rob_idx,
  // rollback
  input  logic            rb_req,
  input  logic [RW-1:0]   rb_idx,
  output logic            rb_busy,
  // checkpoint recovery: discard everything younger than ROB entry ck_rob
  input  logic            ck_req,
  input  logic [RW-1:0]   ck_rob,
  output logic            ck_hit,        // restored from a checkpoint in this cycle
  // exception at retire: the excepting instruction and everything younger are undone
  output logic            exc_valid,
  output logic [RW-1:0]   exc_rob,
  // data cache: load read port (combinational), store write port (at retire)
  output logic            dmem_re,
  output logic [XLEN-1:0] dmem_raddr,
  input  logic [XLEN-1:0] dmem_rdata,
  input  logic            dmem_fault,    // the load read this cycle faults (e.g. page fault)
  output logic            dmem_we,
  output logic [XLEN-1:0] dmem_waddr,
  output logic [XLEN-1:0] dmem_wdata,
  // retire (R) and CDB observation
  output logic            retire_valid,
  output logic [RW-1:0]   retire_rob_idx,
  output logic            retire_has_dest,
  output logic [AW-1:0]   retire_areg,
  output logic [PW-1:0]   retire_T,
  output logic [PW-1:0]   retire_Told,
  output logic [XLEN-1:0] retire_value,
  output logic            cdb_valid,
  output logic [PW-1:0]   cdb_tag,
  output logic [PW-1:0]   arch_tag [ARCH_REGS]
);

  localparam int NREAD = 2 * NUM_FU + 1;
  localparam int LAT [NUM_FU] = '{LAT_ALU, LAT_LD, LAT_ST, LAT_FP1, LAT_FP2};

  // ---------------- dispatch ----------------
  fu_e           d_fu;
  logic          d_has_dest, d_fire;
  logic [PW-1:0] mt_src1_tag, mt_src2_tag, mt_told, fl_tag;
  logic          mt_src1_rdy, mt_src2_rdy, fl_empty, rob_ready;
  logic [NUM_FU-1:0] rs_busy;

  // ---------------- completion ----------------
  logic [NUM_FU-1:0] fu_req, fu_grant, fu_ready, iss_valid;
  logic              c_valid, c_has_dest, c_is_store;
  logic [PW-1:0]     c_T;
  logic [RW-1:0]     c_rob;
  logic [XLEN-1:0]   c_value, c_st_addr, c_st_data;

  // ---------------- retire / rollback ----------------
  logic          r_valid, r_has_dest, r_is_store;
  logic [AW-1:0] r_areg;
  logic [PW-1:0] r_T, r_Told;
  logic [RW-1:0] r_idx;
  logic          u_valid, u_has_dest;
  logic [AW-1:0] u_areg;
  logic [PW-1:0] u_T, u_Told;
  logic [ROB_DEPTH-1:0] squash;
  logic          ck_full, ck_fallback, rob_rb_req, exc_start, c_exc;
  logic [RW-1:0] rob_head, rob_tail, ck_next, rob_rb_idx;
  logic [PW-1:0] map_now  [ARCH_REGS];
  logic [PW-1:0] ck_map   [ARCH_REGS];
  logic [$clog2(ROB_DEPTH+1)-1:0] ck_allocs;

  // per-unit buses
  op_e             iss_op       [NUM_FU];
  logic            iss_has_dest [NUM_FU];
  logic [PW-1:0]   iss_T        [NUM_FU];
  logic [PW-1:0]   iss_T1       [NUM_FU];
  logic [PW-1:0]   iss_T2       [NUM_FU];
  logic [XLEN-1:0] iss_imm      [NUM_FU];
  logic [RW-1:0]   iss_rob      [NUM_FU];
  logic            o_has_dest [NUM_FU];
  logic            o_is_store [NUM_FU];
  logic [PW-1:0]   o_T        [NUM_FU];
  logic [RW-1:0]   o_rob      [NUM_FU];
  logic [XLEN-1:0] o_value    [NUM_FU];
  logic [XLEN-1:0] o_st_addr  [NUM_FU];
  logic [XLEN-1:0] o_st_data  [NUM_FU];
  logic            o_exc      [NUM_FU];
  logic            m_re       [NUM_FU];
  logic [XLEN-1:0] m_addr     [NUM_FU];
  logic [PW-1:0]   prf_raddr  [NREAD];
  logic [XLEN-1:0] prf_rdata  [NREAD];

  always_comb begin
    d_fu       = fu_of(disp_op);
    d_has_dest = op_has_dest(disp_op);
    disp_ready = !rs_busy[d_fu] && rob_ready && !(d_has_dest && fl_empty) &&
                 !(disp_ckpt && ck_full);
    d_fire     = disp_valid && disp_ready;
  end

  map_table #(.ARCH_REGS(ARCH_REGS), .PHYS_REGS(PHYS_REGS)) u_map (
    .clk, .rst_n,
    .src1_areg (disp_rs1),    .src2_areg (disp_rs2),   .dst_areg (disp_rd),
    .src1_tag  (mt_src1_tag), .src1_rdy  (mt_src1_rdy),
    .src2_tag  (mt_src2_tag), .src2_rdy  (mt_src2_rdy),
    .dst_told  (mt_told),
    .rename_we (d_fire && d_has_dest), .rename_areg (disp_rd), .rename_tag (fl_tag),
    .cdb_valid (cdb_valid),   .cdb_tag (cdb_tag),
    .restore_we (u_valid && u_has_dest), .restore_areg (u_areg), .restore_tag (u_Told),
    .load_all (ck_hit), .load_tags (ck_map),
    .map_tag (map_now), .map_rdy ()
  );

  free_list #(.ARCH_REGS(ARCH_REGS), .PHYS_REGS(PHYS_REGS)) u_free (
    .clk, .rst_n,
    .alloc     (d_fire && d_has_dest),
    .alloc_tag (fl_tag),
    .empty     (fl_empty),
    .push      ((r_valid && r_has_dest) || (u_valid && u_has_dest)),
    .push_tag  (u_valid ? u_T : r_Told),
    .rewind    (ck_hit),
    .rewind_n  (ck_allocs),
    .count (), .entry (), .head ()
  );

  arch_map #(.ARCH_REGS(ARCH_REGS), .PHYS_REGS(PHYS_REGS)) u_arch (
    .clk, .rst_n,
    .retire_we (r_valid && r_has_dest), .retire_areg (r_areg), .retire_tag (r_T),
    .rd_areg ('0), .rd_tag (), .arch_tag (arch_tag)
  );

  rob #(.ROB_DEPTH(ROB_DEPTH), .ARCH_REGS(ARCH_REGS), .PHYS_REGS(PHYS_REGS)) u_rob (
    .clk, .rst_n,
    .disp_valid (d_fire), .disp_has_dest (d_has_dest), .disp_is_store (disp_op == OP_ST),
    .disp_areg (disp_rd), .disp_T (fl_tag), .disp_Told (mt_told),
    .disp_ready (rob_ready), .disp_idx (disp_rob_idx),
    .cpl_valid (c_valid), .cpl_idx (c_rob), .cpl_exc (c_exc),
    .retire_valid (r_valid), .retire_idx (r_idx), .retire_has_dest (r_has_dest),
    .retire_is_store (r_is_store), .retire_areg (r_areg), .retire_T (r_T),
    .retire_Told (r_Told), .head_exc (exc_start),
    .rb_req (rob_rb_req), .rb_idx (rob_rb_idx), .rb_busy,
    .undo_valid (u_valid), .undo_idx (), .undo_has_dest (u_has_dest),
    .undo_areg (u_areg), .undo_T (u_T), .undo_Told (u_Told),
    .squash_mask (squash),
    .ck_restore (ck_hit), .ck_idx (ck_rob),
    .head (rob_head), .tail (rob_tail), .count ()
  );

  // A checkpoint restore that finds no checkpoint (dropped by an earlier serial rollback)
  // falls back to a serial rollback of everything after ck_rob. An exception at the head
  // overrides both requests: it undoes the whole ROB, which covers whatever they asked for.
  always_comb begin
    exc_valid   = exc_start;
    exc_rob     = rob_head;
    ck_next     = (ck_rob == RW'(ROB_DEPTH - 1)) ? '0 : ck_rob + 1'b1;
    ck_fallback = ck_req && !exc_start && !ck_hit && ck_next != rob_tail;
    rob_rb_req  = exc_start || rb_req || ck_fallback;
    rob_rb_idx  = exc_start ? rob_head : rb_req ? rb_idx : ck_next;
  end

  ckpt_table #(.NUM_CKPT(NUM_CKPT), .ARCH_REGS(ARCH_REGS), .ROB_DEPTH(ROB_DEPTH),
               .PHYS_REGS(PHYS_REGS)) u_ckpt (
    .clk, .rst_n,
    .take (d_fire && disp_ckpt), .take_rob (disp_rob_idx), .cur_map (map_now),
    .rename_we (d_fire && d_has_dest), .rename_areg (disp_rd), .rename_tag (fl_tag),
    .full (ck_full),
    .alloc (d_fire && d_has_dest),
    .retire_valid (r_valid), .retire_idx (r_idx), .rob_head (rob_head),
    .restore_req (ck_req && !exc_start), .restore_rob (ck_rob),
    .hit (ck_hit), .rd_map (ck_map), .rd_allocs (ck_allocs),
    .clear_all (rob_rb_req && !rb_busy)
  );

  rs #(.ROB_DEPTH(ROB_DEPTH), .PHYS_REGS(PHYS_REGS)) u_rs (
    .clk, .rst_n,
    .disp_valid (d_fire), .disp_fu (d_fu), .disp_op (disp_op), .disp_has_dest (d_has_dest),
    .disp_T (fl_tag),
    .disp_T1 (mt_src1_tag), .disp_r1 (!op_uses_src1(disp_op) || mt_src1_rdy),
    .disp_T2 (mt_src2_tag), .disp_r2 (!op_uses_src2(disp_op) || mt_src2_rdy),
    .disp_imm (disp_imm), .disp_rob (disp_rob_idx),
    .busy (rs_busy),
    .cdb_valid (cdb_valid), .cdb_tag (cdb_tag),
    .fu_ready (fu_ready), .issue_valid (iss_valid),
    .issue_op (iss_op), .issue_has_dest (iss_has_dest), .issue_T (iss_T),
    .issue_T1 (iss_T1), .issue_T2 (iss_T2), .issue_imm (iss_imm), .issue_rob (iss_rob),
    .squash_mask (squash)
  );

  always_comb begin
    for (int i = 0; i < NUM_FU; i++) begin
      prf_raddr[2*i]   = iss_T1[i];
      prf_raddr[2*i+1] = iss_T2[i];
    end
    prf_raddr[NREAD-1] = r_T;
  end

  prf #(.PHYS_REGS(PHYS_REGS), .NREAD(NREAD)) u_prf (
    .clk, .rst_n,
    .raddr (prf_raddr), .rdata (prf_rdata),
    .we (cdb_valid), .waddr (c_T), .wdata (c_value)
  );

  for (genvar i = 0; i < NUM_FU; i++) begin : g_fu
    fu #(.ROB_DEPTH(ROB_DEPTH), .PHYS_REGS(PHYS_REGS), .LATENCY(LAT[i])) u_fu (
      .clk, .rst_n,
      .ready (fu_ready[i]), .in_valid (iss_valid[i]), .in_op (iss_op[i]),
      .in_has_dest (iss_has_dest[i]), .in_T (iss_T[i]), .in_rob (iss_rob[i]),
      .in_a (prf_rdata[2*i]), .in_b (prf_rdata[2*i+1]), .in_imm (iss_imm[i]),
      .mem_re (m_re[i]), .mem_addr (m_addr[i]), .mem_rdata (dmem_rdata),
      .mem_fault (dmem_fault),
      .req (fu_req[i]), .grant (fu_grant[i]),
      .out_has_dest (o_has_dest[i]), .out_is_store (o_is_store[i]), .out_T (o_T[i]),
      .out_rob (o_rob[i]), .out_value (o_value[i]),
      .out_st_addr (o_st_addr[i]), .out_st_data (o_st_data[i]), .out_exc (o_exc[i]),
      .squash_mask (squash)
    );
  end

  cdb_arb #(.N(NUM_FU)) u_arb (.req (fu_req), .grant (fu_grant), .valid (c_valid));

  always_comb begin
    c_has_dest = 1'b0;
    c_is_store = 1'b0;
    c_T        = '0;
    c_rob      = '0;
    c_value    = '0;
    c_st_addr  = '0;
    c_st_data  = '0;
    c_exc      = 1'b0;
    for (int i = 0; i < NUM_FU; i++) begin
      if (fu_grant[i]) begin
        c_has_dest = o_has_dest[i];
        c_is_store = o_is_store[i];
        c_T        = o_T[i];
        c_rob      = o_rob[i];
        c_value    = o_value[i];
        c_st_addr  = o_st_addr[i];
        c_st_data  = o_st_data[i];
        c_exc      = o_exc[i];
      end
    end
    cdb_valid = c_valid && c_has_dest;
    cdb_tag   = c_T;
    // the load unit owns the data cache read port
    dmem_re    = m_re[FU_LD];
    dmem_raddr = m_addr[FU_LD];
  end

  store_buffer #(.ROB_DEPTH(ROB_DEPTH)) u_stb (
    .clk, .rst_n,
    .alloc_valid (d_fire), .alloc_idx (disp_rob_idx),
    .wr_valid (c_valid && c_is_store), .wr_idx (c_rob),
    .wr_addr (c_st_addr), .wr_data (c_st_data),
    .retire_valid (r_valid), .retire_idx (r_idx),
    .mem_we (dmem_we), .mem_waddr (dmem_waddr), .mem_wdata (dmem_wdata)
  );

  always_comb begin
    retire_valid    = r_valid;
    retire_rob_idx  = r_idx;
    retire_has_dest = r_has_dest;
    retire_areg     = r_areg;
    retire_T        = r_T;
    retire_Told     = r_Told;
    retire_value    = prf_rdata[NREAD-1];
  end

  a_one_recovery: assert property (@(posedge clk) disable iff (!rst_n)
    ck_req |-> !rb_req && !rb_busy);

  // Every retiring store reaches the data cache, and nothing else does.
  a_store_writes: assert property (@(posedge clk) disable iff (!rst_n)
    dmem_we == (r_valid && r_is_store));

endmodule
