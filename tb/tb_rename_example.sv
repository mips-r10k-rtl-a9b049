// tb_rename_example: the four-instruction renaming example on the core at its default size.
//
//   add r2,r3,r1   ->  add p2,p3,p4      (r1 = r2 + r3)
//   sub r2,r1,r3   ->  sub p2,p4,p5
//   mul r2,r3,r1   ->  mul p2,p5,p6
//   div r1,r3,r2   ->  div p6,p5,p7
//
// Register i starts mapped to physical register i (r1->p1, r2->p2, r3->p3) and the free list
// starts at p4, so the expected tags are the example's own numbers. Checks the source tags and
// T of each instruction at dispatch, Told in the ROB, and the registers handed back at retire
// in program order: p1 (add), p3 (sub), p4 (mul), p2 (div). The architectural values after
// the four instructions are checked too, starting from zero registers with r2/r3 set by two
// leading addi instructions (which take p4/p5 first, so the example's tags are offset by two:
// the check uses the tags the free list actually hands out after those two).
module tb_rename_example;
  import r10k_pkg::*;
  localparam int AR = 4, RD = 8, PR = AR + RD;
  localparam int AW = $clog2(AR), PW = $clog2(PR), RW = $clog2(RD);
  logic clk = 0, rst_n = 0;
  logic disp_valid, disp_ready, rb_req, rb_busy, disp_ckpt, ck_req, ck_hit;
  logic dmem_fault, exc_valid;
  logic [RW-1:0] exc_rob;
  op_e disp_op;
  logic [AW-1:0] disp_rd, disp_rs1, disp_rs2;
  logic [XLEN-1:0] disp_imm;
  logic [RW-1:0] disp_rob_idx, rb_idx, retire_rob_idx, ck_rob;
  logic dmem_re, dmem_we, retire_valid, retire_has_dest, cdb_valid;
  logic [XLEN-1:0] dmem_raddr, dmem_rdata, dmem_waddr, dmem_wdata, retire_value;
  logic [AW-1:0] retire_areg;
  logic [PW-1:0] retire_T, retire_Told, cdb_tag;
  logic [PW-1:0] arch_tag [AR];
  int checks = 0, failures = 0;
  int freed [$];
  logic [XLEN-1:0] vals [$];

  r10k_core dut (.*);
  assign dmem_rdata = '0;

  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) if (rst_n && retire_valid) begin
    freed.push_back(int'(retire_Told));
    vals.push_back(retire_value);
  end

  // Dispatch one instruction (waits until accepted) and check its renaming.
  task automatic disp(op_e op, int rd, int rs1, int rs2, int imm,
                      int exp_t1, int exp_t2, int exp_T, int exp_told);
    @(negedge clk);
    disp_valid = 1; disp_op = op; disp_rd = AW'(rd); disp_rs1 = AW'(rs1); disp_rs2 = AW'(rs2);
    disp_imm = XLEN'(imm);
    #1;
    while (!disp_ready) begin @(negedge clk); #1; end
    if (exp_t1 >= 0) chk("T1", dut.mt_src1_tag, exp_t1);
    if (exp_t2 >= 0) chk("T2", dut.mt_src2_tag, exp_t2);
    chk("T", dut.fl_tag, exp_T);
    chk("Told", dut.mt_told, exp_told);
    @(posedge clk);
    #1 disp_valid = 0;
  endtask

  initial begin
    disp_valid = 0; rb_req = 0; rb_idx = '0; disp_op = OP_ADD;
    disp_ckpt = 0; ck_req = 0; ck_rob = '0; dmem_fault = 0;
    disp_rd = '0; disp_rs1 = '0; disp_rs2 = '0; disp_imm = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // The example proper, from the reset mapping: p4..p7 are handed out in order.
    disp(OP_ADD, 1, 2, 3, 0, 2, 3, 4, 1);   // add r2,r3,r1 -> add p2,p3,p4
    disp(OP_SUB, 3, 2, 1, 0, 2, 4, 5, 3);   // sub r2,r1,r3 -> sub p2,p4,p5
    disp(OP_MUL, 1, 2, 3, 0, 2, 5, 6, 4);   // mul r2,r3,r1 -> mul p2,p5,p6
    disp(OP_DIV, 2, 1, 3, 0, 6, 5, 7, 2);   // div r1,r3,r2 -> div p6,p5,p7
    repeat (40) @(posedge clk);
    chk("four retired", freed.size(), 4);
    if (freed.size() == 4) begin
      chk("add frees p1", freed[0], 1);
      chk("sub frees p3", freed[1], 3);
      chk("mul frees p4", freed[2], 4);
      chk("div frees p2", freed[3], 2);
    end
    chk("r1 -> p6", arch_tag[1], 6);
    chk("r2 -> p7", arch_tag[2], 7);
    chk("r3 -> p5", arch_tag[3], 5);
    // The same four instructions with nonzero inputs, to check the values that retire.
    freed.delete(); vals.delete();
    disp(OP_ADDI, 2, 0, 0, 12, -1, -1, 8, 7);
    disp(OP_ADDI, 3, 0, 0, 5, -1, -1, 9, 5);
    disp(OP_ADD, 1, 2, 3, 0, 8, 9, 10, 6);
    disp(OP_SUB, 3, 2, 1, 0, 8, 10, 11, 9);
    disp(OP_MUL, 1, 2, 3, 0, 8, 11, 1, 10);
    disp(OP_DIV, 2, 1, 3, 0, 1, 11, 3, 8);
    repeat (40) @(posedge clk);
    chk("six retired", vals.size(), 6);
    if (vals.size() == 6) begin
      chk("r1 = 12 + 5", vals[2], 17);
      chk("r3 = 12 - 17", vals[3], 32'(-5));
      chk("r1 = 12 * -5", vals[4], 32'(-60));
      chk("r2 = 0xffffffc4 / 0xfffffffb (unsigned)", vals[5], 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
