// rs: reservation stations, one per functional unit (ALU, LD, ST, FP1, FP2).
//
// An entry holds control and tags only: the operation, the output tag T and the input tags
// T1 and T2 with their ready bits ("+"). Dispatch fills the entry of the instruction's unit
// with the tags read from the map table. Complete broadcasts a tag on the CDB and every
// matching input tag becomes ready. An entry whose inputs are both ready, or become ready by
// this cycle's CDB tag, issues (S) as soon as its unit can accept it, which reproduces
// "match PR#5 tag from CDB & issue" in the walkthrough; the entry is freed on issue.
// Entries flagged by the ROB's squash mask are dropped during rollback.
//
// One station per unit and the single CDB follow the document's tables; the immediate field
// and the ROB index carried in each entry are this design's additions.
// Timing: issue_* is combinational from the state and this cycle's CDB tag; dispatch writes
// at the next rising edge, into a station that is not busy.
module rs
  import r10k_pkg::*;
#(
  parameter int ROB_DEPTH = 8,
  parameter int PHYS_REGS = 12,
  localparam int RW = $clog2(ROB_DEPTH),
  localparam int PW = $clog2(PHYS_REGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // dispatch (D)
  input  logic            disp_valid,
  input  fu_e             disp_fu,
  input  op_e             disp_op,
  input  logic            disp_has_dest,
  input  logic [PW-1:0]   disp_T,
  input  logic [PW-1:0]   disp_T1,
  input  logic            disp_r1,
  input  logic [PW-1:0]   disp_T2,
  input  logic            disp_r2,
  input  logic [XLEN-1:0] disp_imm,
  input  logic [RW-1:0]   disp_rob,
  output logic [NUM_FU-1:0] busy,
  // complete (C): CDB tag
  input  logic            cdb_valid,
  input  logic [PW-1:0]   cdb_tag,
  // issue (S)
  input  logic [NUM_FU-1:0] fu_ready,
  output logic [NUM_FU-1:0] issue_valid,
  output op_e             issue_op       [NUM_FU],
  output logic            issue_has_dest [NUM_FU],
  output logic [PW-1:0]   issue_T        [NUM_FU],
  output logic [PW-1:0]   issue_T1       [NUM_FU],
  output logic [PW-1:0]   issue_T2       [NUM_FU],
  output logic [XLEN-1:0] issue_imm      [NUM_FU],
  output logic [RW-1:0]   issue_rob      [NUM_FU],
  // rollback
  input  logic [ROB_DEPTH-1:0] squash_mask
);

  typedef struct packed {
    op_e             op;
    logic            has_dest;
    logic [PW-1:0]   T;
    logic [PW-1:0]   T1;
    logic            r1;
    logic [PW-1:0]   T2;
    logic            r2;
    logic [XLEN-1:0] imm;
    logic [RW-1:0]   rob;
  } entry_t;

  entry_t              ent_q [NUM_FU];
  logic [NUM_FU-1:0]   busy_q;
  logic [NUM_FU-1:0]   rdy1, rdy2, squashed;

  always_comb begin
    busy = busy_q;
    for (int i = 0; i < NUM_FU; i++) begin
      rdy1[i]     = ent_q[i].r1 || (cdb_valid && cdb_tag == ent_q[i].T1);
      rdy2[i]     = ent_q[i].r2 || (cdb_valid && cdb_tag == ent_q[i].T2);
      squashed[i] = squash_mask[ent_q[i].rob];
      issue_valid[i]    = busy_q[i] && rdy1[i] && rdy2[i] && fu_ready[i] && !squashed[i];
      issue_op[i]       = ent_q[i].op;
      issue_has_dest[i] = ent_q[i].has_dest;
      issue_T[i]        = ent_q[i].T;
      issue_T1[i]       = ent_q[i].T1;
      issue_T2[i]       = ent_q[i].T2;
      issue_imm[i]      = ent_q[i].imm;
      issue_rob[i]      = ent_q[i].rob;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= '0;
      for (int i = 0; i < NUM_FU; i++) ent_q[i] <= '0;
    end else begin
      for (int i = 0; i < NUM_FU; i++) begin
        if (busy_q[i]) begin
          ent_q[i].r1 <= rdy1[i];
          ent_q[i].r2 <= rdy2[i];
          if (issue_valid[i] || squashed[i]) busy_q[i] <= 1'b0;
        end
      end
      if (disp_valid) begin
        busy_q[disp_fu] <= 1'b1;
        ent_q[disp_fu]  <= '{op: disp_op, has_dest: disp_has_dest, T: disp_T,
                             T1: disp_T1, r1: disp_r1, T2: disp_T2, r2: disp_r2,
                             imm: disp_imm, rob: disp_rob};
      end
    end
  end

  a_disp_free: assert property (@(posedge clk) disable iff (!rst_n)
    disp_valid |-> !busy_q[disp_fu]);

endmodule
