// fu: one functional unit (ALU, LD, ST, FP1 or FP2 in the core).
//
// Accepts an issued instruction with its operand values read from the physical register
// file (end of S), executes for LATENCY cycles (X) and then requests the CDB; the cycle the
// arbiter grants it is the instruction's complete (C) cycle. A unit holds one instruction at a
// time and can accept the next one in its grant cycle. With LATENCY = 1 an instruction issued
// in cycle n completes in cycle n+2 when the CDB is free, as the load does in the walkthrough
// (S c2, X c3, C c4).
//
// Loads read memory in their last X cycle at address T2 + imm; stores compute the same address
// and carry the T1 value as store data to be written at retire. A load that memory reports as
// faulting (mem_fault, sampled with the data) still completes, but with out_exc set, so that
// its ROB entry raises the exception when it reaches the head. The arithmetic of each unit,
// the latencies and the one-instruction-at-a-time occupancy are this design's choices; the
// document names the units without describing them. An instruction whose ROB entry is being
// rolled back (squash_mask) is dropped.
module fu
  import r10k_pkg::*;
#(
  parameter int ROB_DEPTH = 8,
  parameter int PHYS_REGS = 12,
  parameter int LATENCY   = 1,
  localparam int RW = $clog2(ROB_DEPTH),
  localparam int PW = $clog2(PHYS_REGS),
  localparam int LW = $clog2(LATENCY + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // issue (S)
  output logic            ready,
  input  logic            in_valid,
  input  op_e             in_op,
  input  logic            in_has_dest,
  input  logic [PW-1:0]   in_T,
  input  logic [RW-1:0]   in_rob,
  input  logic [XLEN-1:0] in_a,
  input  logic [XLEN-1:0] in_b,
  input  logic [XLEN-1:0] in_imm,
  // memory read (loads)
  output logic            mem_re,
  output logic [XLEN-1:0] mem_addr,
  input  logic [XLEN-1:0] mem_rdata,
  input  logic            mem_fault,
  // completion request towards the CDB
  output logic            req,
  input  logic            grant,
  output logic            out_has_dest,
  output logic            out_is_store,
  output logic [PW-1:0]   out_T,
  output logic [RW-1:0]   out_rob,
  output logic [XLEN-1:0] out_value,
  output logic [XLEN-1:0] out_st_addr,
  output logic [XLEN-1:0] out_st_data,
  output logic            out_exc,
  // rollback
  input  logic [ROB_DEPTH-1:0] squash_mask
);

  logic            busy_q, done_q;
  logic [LW-1:0]   cnt_q;
  op_e             op_q;
  logic            has_dest_q;
  logic [PW-1:0]   T_q;
  logic [RW-1:0]   rob_q;
  logic [XLEN-1:0] a_q, b_q, imm_q, value_q;
  logic            squashed, last_x, exc_q;

  always_comb begin
    squashed     = busy_q && squash_mask[rob_q];
    last_x       = busy_q && !done_q && cnt_q == LW'(1);
    mem_addr     = b_q + imm_q;
    mem_re       = last_x && op_q == OP_LD;
    req          = busy_q && done_q && !squashed;
    ready        = !busy_q || (done_q && grant);
    out_has_dest = has_dest_q;
    out_is_store = (op_q == OP_ST);
    out_T        = T_q;
    out_rob      = rob_q;
    out_value    = value_q;
    out_st_addr  = mem_addr;
    out_st_data  = a_q;
    out_exc      = exc_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q     <= 1'b0;
      done_q     <= 1'b0;
      cnt_q      <= '0;
      op_q       <= OP_ADD;
      has_dest_q <= 1'b0;
      T_q        <= '0;
      rob_q      <= '0;
      a_q        <= '0;
      b_q        <= '0;
      imm_q      <= '0;
      value_q    <= '0;
      exc_q      <= 1'b0;
    end else begin
      if (busy_q && !done_q) begin
        cnt_q <= cnt_q - 1'b1;
        if (last_x) begin
          done_q  <= 1'b1;
          value_q <= (op_q == OP_LD) ? mem_rdata : alu_result(op_q, a_q, b_q, imm_q);
          exc_q   <= (op_q == OP_LD) && mem_fault;
        end
      end
      if (squashed || (req && grant)) busy_q <= 1'b0;
      if (in_valid && ready) begin
        busy_q     <= 1'b1;
        done_q     <= 1'b0;
        cnt_q      <= LW'(LATENCY);
        op_q       <= in_op;
        has_dest_q <= in_has_dest;
        T_q        <= in_T;
        rob_q      <= in_rob;
        a_q        <= in_a;
        b_q        <= in_b;
        imm_q      <= in_imm;
      end
    end
  end

  a_grant_needs_req: assert property (@(posedge clk) disable iff (!rst_n) grant |-> req);

endmodule
