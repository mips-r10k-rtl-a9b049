// map_table: speculative architectural-to-physical register map with ready bits ("T+").
//
// Every architectural register always maps to a physical register (a mapping is never empty);
// after reset register i maps to physical register i. Dispatch reads the tags of the two
// sources and the current mapping of the destination (which becomes Told in the ROB), then
// overwrites the destination mapping with the newly allocated tag, whose ready bit clears.
// A tag broadcast on the CDB sets the ready bit. During serial rollback an entry is restored
// to its Told; on a checkpoint restore the whole table is reloaded at once.
//
// The ready bit is kept per physical register rather than per map entry, so that a mapping
// restored during rollback comes back with the right "+" (in the walkthrough f1 is restored to
// PR#5+). That bookkeeping choice, and the same-cycle CDB bypass on the read ports, are this
// design's own; the document only says the ready bit lives in the map table.
//
// Timing: reads are combinational, writes take effect at the next rising clock edge.
module map_table #(
  parameter int ARCH_REGS = 4,
  parameter int PHYS_REGS = 12,
  localparam int AW = $clog2(ARCH_REGS),
  localparam int PW = $clog2(PHYS_REGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // dispatch-time reads
  input  logic [AW-1:0] src1_areg,
  input  logic [AW-1:0] src2_areg,
  input  logic [AW-1:0] dst_areg,
  output logic [PW-1:0] src1_tag,
  output logic          src1_rdy,
  output logic [PW-1:0] src2_tag,
  output logic          src2_rdy,
  output logic [PW-1:0] dst_told,
  // dispatch-time rename of the destination
  input  logic          rename_we,
  input  logic [AW-1:0] rename_areg,
  input  logic [PW-1:0] rename_tag,
  // complete: CDB tag broadcast
  input  logic          cdb_valid,
  input  logic [PW-1:0] cdb_tag,
  // serial rollback: map[areg] <= Told
  input  logic          restore_we,
  input  logic [AW-1:0] restore_areg,
  input  logic [PW-1:0] restore_tag,
  // checkpoint recovery: reload the whole table in one cycle
  input  logic          load_all,
  input  logic [PW-1:0] load_tags [ARCH_REGS],
  // observation of the whole table
  output logic [PW-1:0] map_tag [ARCH_REGS],
  output logic          map_rdy [ARCH_REGS]
);

  logic [PW-1:0]        map_q  [ARCH_REGS];
  logic [PHYS_REGS-1:0] prdy_q;

  function automatic logic tag_ready(logic [PW-1:0] t);
    return prdy_q[t] || (cdb_valid && cdb_tag == t);
  endfunction

  always_comb begin
    src1_tag = map_q[src1_areg];
    src2_tag = map_q[src2_areg];
    dst_told = map_q[dst_areg];
    src1_rdy = tag_ready(src1_tag);
    src2_rdy = tag_ready(src2_tag);
    for (int i = 0; i < ARCH_REGS; i++) begin
      map_tag[i] = map_q[i];
      map_rdy[i] = prdy_q[map_q[i]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ARCH_REGS; i++) map_q[i] <= PW'(i);
      prdy_q <= '1;
    end else begin
      if (cdb_valid)  prdy_q[cdb_tag] <= 1'b1;
      if (rename_we) begin
        map_q[rename_areg] <= rename_tag;
        prdy_q[rename_tag] <= 1'b0;
      end
      if (restore_we) map_q[restore_areg] <= restore_tag;
      if (load_all) map_q <= load_tags;
    end
  end

  // Rename (dispatch), restore (serial rollback) and load (checkpoint) never overlap.
  a_no_rename_and_restore: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({rename_we, restore_we, load_all}));

endmodule
