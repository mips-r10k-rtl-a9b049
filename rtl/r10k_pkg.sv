// r10k_pkg: opcodes, functional-unit classes and the operand conventions shared by the
// R10K-style renaming core.
//
// Five reservation stations, one per functional unit (ALU, LD, ST, FP1, FP2), as in the
// reservation-station table of the R10K walkthrough. Operand slots follow that walkthrough:
// "ldf X(r1),f1" holds its base in T2, "stf f2,Z(r1)" holds its data in T1 and its base in T2,
// "addi r1,4,r1" holds its source in T1. The instruction encoding and the operation of each
// functional unit are this design's own choices (integer arithmetic stands in for the FP units).
package r10k_pkg;

  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,   // rd = rs1 + rs2            (ALU)
    OP_SUB  = 3'd1,   // rd = rs1 - rs2            (ALU)
    OP_ADDI = 3'd2,   // rd = rs1 + imm            (ALU)
    OP_MUL  = 3'd3,   // rd = rs1 * rs2            (FP1)
    OP_DIV  = 3'd4,   // rd = rs1 / rs2, /0 -> all ones  (FP2)
    OP_LD   = 3'd5,   // rd = mem[rs2 + imm]       (LD)
    OP_ST   = 3'd6    // mem[rs2 + imm] = rs1      (ST), no destination
  } op_e;

  localparam int XLEN   = 32;
  localparam int NUM_FU = 5;
  localparam int FU_W   = 3;

  typedef enum logic [FU_W-1:0] {
    FU_ALU = 3'd0,
    FU_LD  = 3'd1,
    FU_ST  = 3'd2,
    FU_FP1 = 3'd3,
    FU_FP2 = 3'd4
  } fu_e;

  function automatic fu_e fu_of(op_e op);
    case (op)
      OP_MUL:  return FU_FP1;
      OP_DIV:  return FU_FP2;
      OP_LD:   return FU_LD;
      OP_ST:   return FU_ST;
      default: return FU_ALU;
    endcase
  endfunction

  // Stores are not allocated a physical register.
  function automatic logic op_has_dest(op_e op);
    return op != OP_ST;
  endfunction

  // Which source slots an operation reads (T1 <- rs1, T2 <- rs2).
  function automatic logic op_uses_src1(op_e op);
    return op != OP_LD;
  endfunction

  function automatic logic op_uses_src2(op_e op);
    return op != OP_ADDI;
  endfunction

  // Result of the arithmetic operations; loads and stores use the address path instead.
  function automatic logic [XLEN-1:0] alu_result(op_e op, logic [XLEN-1:0] a, logic [XLEN-1:0] b,
                                             logic [XLEN-1:0] imm);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_ADDI: return a + imm;
      OP_MUL:  return a * b;
      OP_DIV:  return (b == '0) ? '1 : a / b;
      default: return b + imm;
    endcase
  endfunction

endpackage
