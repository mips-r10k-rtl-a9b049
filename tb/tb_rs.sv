// tb_rs: the reservation stations against a model of five tag-only entries. Random
// dispatches into free stations, CDB tag broadcasts (biased towards waiting tags), unit
// readiness and squash masks; every cycle busy and each station's issue request and fields
// are compared. Counts issues that happen in the same cycle as the waking CDB tag.
module tb_rs;
  import r10k_pkg::*;
  localparam int N = 8, PR = 12, RW = $clog2(N), PW = $clog2(PR);
  logic clk = 0, rst_n = 0;
  logic disp_valid, disp_has_dest, disp_r1, disp_r2, cdb_valid;
  fu_e disp_fu;
  op_e disp_op;
  logic [PW-1:0] disp_T, disp_T1, disp_T2, cdb_tag;
  logic [XLEN-1:0] disp_imm;
  logic [RW-1:0] disp_rob;
  logic [NUM_FU-1:0] busy, fu_ready, issue_valid;
  op_e             issue_op       [NUM_FU];
  logic            issue_has_dest [NUM_FU];
  logic [PW-1:0]   issue_T        [NUM_FU];
  logic [PW-1:0]   issue_T1       [NUM_FU];
  logic [PW-1:0]   issue_T2       [NUM_FU];
  logic [XLEN-1:0] issue_imm      [NUM_FU];
  logic [RW-1:0]   issue_rob      [NUM_FU];
  logic [N-1:0] squash_mask;

  typedef struct {
    logic busy; op_e op; logic hd; int T; int T1; logic r1; int T2; logic r2;
    logic [XLEN-1:0] imm; int rob;
  } ent_t;
  ent_t m [NUM_FU];
  int checks = 0, failures = 0, wake_issue = 0, issues = 0, squashes = 0;

  rs #(.ROB_DEPTH(N), .PHYS_REGS(PR)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    disp_valid = 0; cdb_valid = 0; fu_ready = '0; squash_mask = '0;
    disp_fu = FU_ALU; disp_op = OP_ADD; disp_has_dest = 0; disp_T = '0; disp_T1 = '0;
    disp_T2 = '0; disp_r1 = 0; disp_r2 = 0; disp_imm = '0; disp_rob = '0; cdb_tag = '0;
    foreach (m[i]) m[i] = '{busy: 0, op: OP_ADD, hd: 0, T: 0, T1: 0, r1: 0, T2: 0, r2: 0,
                           imm: '0, rob: 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      logic exp_iss [NUM_FU];
      logic m1, m2;
      int f;
      @(negedge clk);
      f = $urandom_range(0, NUM_FU - 1);
      disp_valid = !m[f].busy && ($urandom_range(0, 1) == 1);
      disp_fu = fu_e'(f);
      disp_op = op_e'($urandom_range(0, 6));
      disp_has_dest = $urandom_range(0, 1);
      disp_T  = PW'($urandom_range(0, PR - 1));
      disp_T1 = PW'($urandom_range(0, PR - 1));
      disp_T2 = PW'($urandom_range(0, PR - 1));
      disp_r1 = ($urandom_range(0, 2) == 0);
      disp_r2 = ($urandom_range(0, 2) == 0);
      disp_imm = $urandom;
      disp_rob = RW'($urandom_range(0, N - 1));
      cdb_valid = $urandom_range(0, 1);
      f = $urandom_range(0, NUM_FU - 1);
      cdb_tag = ($urandom_range(0, 1) == 1) ? PW'(m[f].T1) : PW'(m[f].T2);
      fu_ready = NUM_FU'($urandom);
      squash_mask = ($urandom_range(0, 15) == 0) ? N'($urandom) : '0;
      #1;
      for (int i = 0; i < NUM_FU; i++) begin
        m1 = m[i].r1 || (cdb_valid && cdb_tag == PW'(m[i].T1));
        m2 = m[i].r2 || (cdb_valid && cdb_tag == PW'(m[i].T2));
        exp_iss[i] = m[i].busy && m1 && m2 && fu_ready[i] && !squash_mask[m[i].rob];
        chk("busy", busy[i], m[i].busy);
        chk("issue_valid", issue_valid[i], exp_iss[i]);
        if (exp_iss[i]) begin
          chk("issue_op", issue_op[i], m[i].op);
          chk("issue_has_dest", issue_has_dest[i], m[i].hd);
          chk("issue_T", issue_T[i], m[i].T);
          chk("issue_T1", issue_T1[i], m[i].T1);
          chk("issue_T2", issue_T2[i], m[i].T2);
          chk("issue_imm", issue_imm[i], m[i].imm);
          chk("issue_rob", issue_rob[i], m[i].rob);
          issues++;
          if (!(m[i].r1 && m[i].r2)) wake_issue++;
        end
      end
      @(posedge clk);
      for (int i = 0; i < NUM_FU; i++) begin
        if (m[i].busy) begin
          if (squash_mask[m[i].rob]) squashes++;
          m[i].r1 = m[i].r1 || (cdb_valid && cdb_tag == PW'(m[i].T1));
          m[i].r2 = m[i].r2 || (cdb_valid && cdb_tag == PW'(m[i].T2));
          if (exp_iss[i] || squash_mask[m[i].rob]) m[i].busy = 0;
        end
      end
      if (disp_valid)
        m[disp_fu] = '{busy: 1, op: disp_op, hd: disp_has_dest, T: int'(disp_T),
                       T1: int'(disp_T1), r1: disp_r1, T2: int'(disp_T2), r2: disp_r2,
                       imm: disp_imm, rob: int'(disp_rob)};
    end
    chk("issues", 32'(issues > 100), 1);
    chk("wakeup and issue in one cycle", 32'(wake_issue > 10), 1);
    chk("squashes", 32'(squashes > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
