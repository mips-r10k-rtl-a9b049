// tb_ckpt_table: checkpoint slots against a list model. A small ROB-like sequence of
// instructions is dispatched (some taking checkpoints, some renaming), retired in order,
// cut back by restores and occasionally cleared by a serial rollback. Every cycle full, hit
// and, on a hit, the saved map (including the checkpointed instruction's own rename) and the
// count of registers allocated since are compared with the model.
module tb_ckpt_table;
  localparam int NC = 4, AR = 4, N = 8, PR = 12;
  localparam int AW = $clog2(AR), PW = $clog2(PR), RW = $clog2(N), CW = $clog2(PR - AR + 1);
  logic clk = 0, rst_n = 0;
  logic take, rename_we, full, alloc, retire_valid, restore_req, hit, clear_all;
  logic [RW-1:0] take_rob, retire_idx, rob_head, restore_rob;
  logic [PW-1:0] cur_map [AR];
  logic [AW-1:0] rename_areg;
  logic [PW-1:0] rename_tag;
  logic [PW-1:0] rd_map [AR];
  logic [CW-1:0] rd_allocs;

  typedef struct { int rob; int map [AR]; int allocs; } slot_t;
  slot_t live [$];
  int infl [$];
  int tail = 0;
  int checks = 0, failures = 0, hits = 0, misses = 0, fulls = 0;

  ckpt_table #(.NUM_CKPT(NC), .ARCH_REGS(AR), .ROB_DEPTH(N), .PHYS_REGS(PR)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    take = 0; rename_we = 0; alloc = 0; retire_valid = 0; restore_req = 0; clear_all = 0;
    take_rob = '0; retire_idx = '0; rob_head = '0; restore_rob = '0; rename_areg = '0;
    rename_tag = '0;
    foreach (cur_map[i]) cur_map[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int mode, k, hit_pos;
      bit disp;
      @(negedge clk);
      take = 0; rename_we = 0; alloc = 0; retire_valid = 0; restore_req = 0; clear_all = 0;
      rob_head = RW'(infl.size() > 0 ? infl[0] : tail);
      foreach (cur_map[i]) cur_map[i] = PW'($urandom_range(0, PR - 1));
      rename_areg = AW'($urandom_range(0, AR - 1));
      rename_tag = PW'($urandom_range(0, PR - 1));
      mode = $urandom_range(0, 19);
      hit_pos = -1;
      disp = 0;
      if (mode < 10 && infl.size() < N) begin              // dispatch
        disp = 1;
        rename_we = $urandom_range(0, 1);
        alloc = rename_we;
        take = (live.size() < NC) && ($urandom_range(0, 2) == 0);
        take_rob = RW'(tail);
        if (infl.size() > 0 && $urandom_range(0, 1) == 1) begin
          retire_valid = 1; retire_idx = RW'(infl[0]);
        end
      end else if (mode < 15 && infl.size() > 0) begin    // retire only
        retire_valid = 1; retire_idx = RW'(infl[0]);
      end else if (mode < 19 && infl.size() > 0) begin    // restore
        k = $urandom_range(0, infl.size() - 1);
        restore_req = 1; restore_rob = RW'(infl[k]);
        foreach (live[s]) if (live[s].rob == infl[k]) hit_pos = s;
        // as in the core: a miss with younger entries falls back to serial rollback
        clear_all = (hit_pos < 0) && (k < infl.size() - 1);
      end else begin
        clear_all = 1;
      end
      #1;
      chk("full", full, live.size() == NC);
      if (live.size() == NC) fulls++;
      chk("hit", hit, hit_pos >= 0);
      if (hit_pos >= 0) begin
        hits++;
        for (int a = 0; a < AR; a++) chk("saved map", rd_map[a], live[hit_pos].map[a]);
        chk("allocations since", rd_allocs, live[hit_pos].allocs);
      end else if (restore_req) misses++;
      @(posedge clk);
      if (clear_all) live.delete();
      if (restore_req) begin
        if (hit_pos >= 0 && !clear_all) begin
          // drop the restored slot and all younger ones
          for (int s = live.size() - 1; s >= 0; s--)
            if (((live[s].rob - infl[0] + N) % N) >= ((infl[k] - infl[0] + N) % N))
              live.delete(s);
        end
        while (infl.size() > k + 1) void'(infl.pop_back());
        tail = (infl[k] + 1) % N;
      end else if (!clear_all) begin
        foreach (live[s]) if (alloc) live[s].allocs++;
        if (retire_valid) begin
          for (int s = live.size() - 1; s >= 0; s--)
            if (live[s].rob == infl[0]) live.delete(s);
          void'(infl.pop_front());
        end
        if (disp) begin
          if (take) begin
            slot_t n;
            n.rob = tail; n.allocs = 0;
            for (int a = 0; a < AR; a++)
              n.map[a] = (rename_we && rename_areg == AW'(a)) ? int'(rename_tag)
                                                              : int'(cur_map[a]);
            live.push_back(n);
          end
          infl.push_back(tail);
          tail = (tail + 1) % N;
        end
      end
    end
    chk("hits", 32'(hits > 20), 1);
    chk("misses", 32'(misses > 20), 1);
    chk("table full", 32'(fulls > 0), 1);
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
