// ckpt_table: map-table checkpoints for single-cycle recovery.
//
// When the front end marks an instruction as a checkpoint (for example a low-confidence
// branch), a free slot records the map table as it stands after that instruction's own
// rename, together with the instruction's ROB index. From then on the slot counts how many
// physical registers the free list hands out; those registers are exactly the ones allocated
// by younger instructions. A restore request names the checkpointed ROB entry; if a slot
// holds it, the table returns the saved map and that allocation count. The core then, in one
// cycle, reloads the map table, moves the free-list head back by the count, and cuts the ROB
// back to just after the checkpointed entry. Slots for younger instructions are dropped at the
// same time.
//
// A slot is freed when its instruction retires. A serial rollback clears every slot, because
// the registers it returns go to the free-list tail, which breaks the "allocated since"
// bookkeeping. A later restore of such an instruction then finds no slot, and the core falls
// back to serial rollback. The document describes checkpoints only as the fast alternative to
// serial rollback ("single-cycle restoration from some checkpoint"). The slot count, the
// head-rewind of the free list and this fallback are this design's choices.
//
// Timing: hit/rd_* are combinational; take, retire, restore and clear act at the rising edge.
module ckpt_table #(
  parameter int NUM_CKPT  = 4,
  parameter int ARCH_REGS = 4,
  parameter int ROB_DEPTH = 8,
  parameter int PHYS_REGS = 12,
  localparam int AW = $clog2(ARCH_REGS),
  localparam int PW = $clog2(PHYS_REGS),
  localparam int RW = $clog2(ROB_DEPTH),
  localparam int DEPTH = PHYS_REGS - ARCH_REGS,
  localparam int CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // take a checkpoint at dispatch
  input  logic          take,
  input  logic [RW-1:0] take_rob,
  input  logic [PW-1:0] cur_map [ARCH_REGS],   // map table before this cycle's rename
  input  logic          rename_we,              // this cycle's rename (same instruction)
  input  logic [AW-1:0] rename_areg,
  input  logic [PW-1:0] rename_tag,
  output logic          full,
  // free-list allocations (counted by every live slot)
  input  logic          alloc,
  // retire frees a slot
  input  logic          retire_valid,
  input  logic [RW-1:0] retire_idx,
  input  logic [RW-1:0] rob_head,
  // restore request and answer
  input  logic          restore_req,
  input  logic [RW-1:0] restore_rob,
  output logic          hit,
  output logic [PW-1:0] rd_map [ARCH_REGS],
  output logic [CW-1:0] rd_allocs,
  // serial rollback drops all checkpoints
  input  logic          clear_all
);

  localparam int SW = (NUM_CKPT > 1) ? $clog2(NUM_CKPT) : 1;

  logic [NUM_CKPT-1:0] valid_q;
  logic [RW-1:0]       rob_q    [NUM_CKPT];
  logic [CW-1:0]       allocs_q [NUM_CKPT];
  logic [PW-1:0]       map_q    [NUM_CKPT][ARCH_REGS];
  logic [SW-1:0]       free_slot, hit_slot;

  function automatic int age(logic [RW-1:0] p);
    return (int'(p) - int'(rob_head) + ROB_DEPTH) % ROB_DEPTH;
  endfunction

  always_comb begin
    full      = &valid_q;
    free_slot = '0;
    for (int s = NUM_CKPT - 1; s >= 0; s--) if (!valid_q[s]) free_slot = SW'(s);
    hit      = 1'b0;
    hit_slot = '0;
    for (int s = 0; s < NUM_CKPT; s++)
      if (valid_q[s] && rob_q[s] == restore_rob) begin
        hit      = restore_req;
        hit_slot = SW'(s);
      end
    rd_map    = map_q[hit_slot];
    rd_allocs = allocs_q[hit_slot];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int s = 0; s < NUM_CKPT; s++) begin
        rob_q[s]    <= '0;
        allocs_q[s] <= '0;
        for (int a = 0; a < ARCH_REGS; a++) map_q[s][a] <= '0;
      end
    end else if (clear_all) begin
      valid_q <= '0;
    end else if (hit) begin
      // the restored slot and every younger one are no longer needed
      for (int s = 0; s < NUM_CKPT; s++)
        if (valid_q[s] && age(rob_q[s]) >= age(restore_rob)) valid_q[s] <= 1'b0;
    end else begin
      for (int s = 0; s < NUM_CKPT; s++) begin
        if (alloc && valid_q[s]) allocs_q[s] <= allocs_q[s] + 1'b1;
        if (retire_valid && valid_q[s] && rob_q[s] == retire_idx) valid_q[s] <= 1'b0;
      end
      if (take) begin
        valid_q[free_slot]  <= 1'b1;
        rob_q[free_slot]    <= take_rob;
        allocs_q[free_slot] <= '0;
        for (int a = 0; a < ARCH_REGS; a++)
          map_q[free_slot][a] <= (rename_we && rename_areg == AW'(a)) ? rename_tag : cur_map[a];
      end
    end
  end

  a_take_needs_slot: assert property (@(posedge clk) disable iff (!rst_n) take |-> !full);

endmodule
