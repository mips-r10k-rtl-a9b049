// tb_fu: two functional units, LATENCY 1 and 4, receive the same random operations. For
// each, the result (computed here independently), the store address/data, the load address,
// and the number of cycles from issue to the CDB request (LATENCY + 1) are checked; grants
// are delayed at random and the unit must hold its result until granted. An operation whose
// ROB entry is squashed must disappear without a request. The memory model reports a fault
// for addresses that are 1 modulo 4; a load from one must carry out_exc, nothing else may.
module tb_fu;
  import r10k_pkg::*;
  localparam int N = 8, PR = 12, RW = $clog2(N), PW = $clog2(PR);
  localparam int LATS [2] = '{1, 4};
  logic clk = 0, rst_n = 0;
  logic in_valid, in_has_dest;
  op_e in_op;
  logic [PW-1:0] in_T;
  logic [RW-1:0] in_rob;
  logic [XLEN-1:0] in_a, in_b, in_imm;
  logic [N-1:0] squash_mask;
  logic            mem_fault [2], o_exc [2];
  logic            ready [2], mem_re [2], req [2], grant [2], o_hd [2], o_st [2];
  logic [XLEN-1:0] mem_addr [2], mem_rdata [2], o_val [2], o_sa [2], o_sd [2];
  logic [PW-1:0]   o_T [2];
  logic [RW-1:0]   o_rob [2];
  int checks = 0, failures = 0, faults = 0;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    fu #(.ROB_DEPTH(N), .PHYS_REGS(PR), .LATENCY(LATS[g])) dut (
      .clk, .rst_n, .ready (ready[g]), .in_valid, .in_op, .in_has_dest, .in_T, .in_rob,
      .in_a, .in_b, .in_imm, .mem_re (mem_re[g]), .mem_addr (mem_addr[g]),
      .mem_rdata (mem_rdata[g]), .mem_fault (mem_fault[g]), .out_exc (o_exc[g]), .req (req[g]), .grant (grant[g]),
      .out_has_dest (o_hd[g]), .out_is_store (o_st[g]), .out_T (o_T[g]), .out_rob (o_rob[g]),
      .out_value (o_val[g]), .out_st_addr (o_sa[g]), .out_st_data (o_sd[g]), .squash_mask);
    assign mem_rdata[g] = mem_addr[g] ^ 32'h5a5a_0f0f;
    assign mem_fault[g] = mem_addr[g][1:0] == 2'd1;
  end

  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  function automatic logic [XLEN-1:0] model(op_e op, logic [XLEN-1:0] a, b, imm);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_ADDI: return a + imm;
      OP_MUL:  return a * b;
      OP_DIV:  return (b == 0) ? 32'hffff_ffff : a / b;
      OP_LD:   return (b + imm) ^ 32'h5a5a_0f0f;
      default: return 'x;
    endcase
  endfunction

  initial begin
    in_valid = 0; in_op = OP_ADD; in_has_dest = 0; in_T = '0; in_rob = '0;
    in_a = '0; in_b = '0; in_imm = '0; squash_mask = '0;
    grant[0] = 0; grant[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      op_e op;
      logic [XLEN-1:0] a, b, imm;
      int seen [2], gdelay [2];
      bit squash_it;
      bit done [2];
      op = op_e'($urandom_range(0, 6));
      a = $urandom; b = ($urandom_range(0, 7) == 0) ? 0 : $urandom_range(0, 1000);
      imm = $urandom_range(0, 255);
      squash_it = ($urandom_range(0, 9) == 0);
      @(negedge clk);
      chk("ready before issue", ready[0] && ready[1], 1);
      in_valid = 1; in_op = op; in_has_dest = (op != OP_ST); in_T = PW'(n % PR);
      in_rob = RW'(n % N); in_a = a; in_b = b; in_imm = imm;
      @(negedge clk);
      in_valid = 0;
      if (squash_it) begin
        squash_mask = N'(1) << (n % N);
        @(negedge clk);
        squash_mask = '0;
        repeat (6) begin
          chk("no request after squash", req[0] || req[1], 0);
          @(negedge clk);
        end
        continue;
      end
      seen = '{-1, -1};
      done = '{0, 0};
      gdelay = '{$urandom_range(0, 3), $urandom_range(0, 3)};
      for (int c = 1; c < 20 && !(done[0] && done[1]); c++) begin
        for (int g = 0; g < 2; g++) begin
          if (!done[g] && req[g] && seen[g] < 0) begin
            seen[g] = c;
            chk("issue-to-request cycles", c, LATS[g] + 1);
          end
          grant[g] = !done[g] && req[g] && (c - seen[g] >= gdelay[g]);
          if (req[g]) begin
            chk("out_T", o_T[g], n % PR);
            chk("out_rob", o_rob[g], n % N);
            chk("out_has_dest", o_hd[g], op != OP_ST);
            chk("out_is_store", o_st[g], op == OP_ST);
            chk("out_exc", o_exc[g], op == OP_LD && (b + imm) % 4 == 1);
            if (g == 0 && seen[g] == c && op == OP_LD && (b + imm) % 4 == 1) faults++;
            if (op == OP_ST) begin
              chk("store addr", o_sa[g], b + imm);
              chk("store data", o_sd[g], a);
            end else begin
              chk("value", o_val[g], model(op, a, b, imm));
            end
          end
        end
        #1;
        for (int g = 0; g < 2; g++) if (grant[g]) chk("ready in grant cycle", ready[g], 1);
        @(negedge clk);
        for (int g = 0; g < 2; g++) if (grant[g]) begin done[g] = 1; grant[g] = 0; end
      end
      chk("both completed", done[0] && done[1], 1);
    end
    chk("faulting loads seen", 32'(faults > 3), 1);
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
