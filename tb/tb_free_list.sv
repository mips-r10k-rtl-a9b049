// tb_free_list: reset contents (ARCH_REGS..PHYS_REGS-1 in order), then random allocations
// and returns against a queue model; head tag, count, empty and the whole list in order are
// compared every cycle. Rewinds (checkpoint restore) give back the tags allocated since a
// mark, which must reappear at the head in their original order. Also replays the list order of the renaming walkthrough.
module tb_free_list;
  localparam int AR = 4, PR = 12, D = PR - AR, PW = $clog2(PR), CW = $clog2(D + 1);
  logic clk = 0, rst_n = 0;
  logic alloc, push, empty, rewind;
  logic [CW-1:0] rewind_n;
  logic [PW-1:0] since [$];     // tags popped since the last mark, oldest first
  logic since_ok = 1;
  int rewinds = 0;
  logic [PW-1:0] alloc_tag, push_tag;
  logic [CW-1:0] count;
  logic [PW-1:0] entry [D];
  logic [$clog2(D)-1:0] head;
  logic [PW-1:0] q [$];
  int checks = 0, failures = 0, empties = 0, fulls = 0;

  free_list #(.ARCH_REGS(AR), .PHYS_REGS(PR)) dut (.clk, .rst_n, .alloc, .alloc_tag, .empty,
    .push, .push_tag, .rewind, .rewind_n, .count, .entry, .head);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic compare();
    chk("count", count, q.size());
    chk("empty", empty, q.size() == 0);
    if (q.size() > 0) chk("alloc_tag", alloc_tag, q[0]);
    for (int k = 0; k < q.size(); k++) chk("entry", entry[k], q[k]);
  endtask

  task automatic step(logic a, logic p, logic [PW-1:0] t);
    @(negedge clk);
    alloc = a; push = p; push_tag = t;
    #1 compare();
    @(posedge clk);
    if (a) since.push_back(q.pop_front());
    if (p) q.push_back(t);
    if (q.size() + since.size() > D) since_ok = 0;
    @(negedge clk);
    alloc = 0; push = 0;
  endtask

  initial begin
    alloc = 0; push = 0; push_tag = '0; rewind = 0; rewind_n = '0;
    for (int i = AR; i < PR; i++) q.push_back(PW'(i));
    repeat (2) @(posedge clk);
    rst_n = 1;
    // walkthrough: allocate PR#5..PR#8 (indices 4..7), return PR#2 while allocating PR#8,
    // then return PR#8 and PR#7 on rollback: list tail reads PR#2, PR#8, PR#7
    step(1, 0, 0); step(1, 0, 0); step(1, 0, 0);
    step(1, 1, 1);
    step(0, 1, 7);
    step(0, 1, 6);
    #1 compare();
    chk("tail-2", entry[q.size() - 3], 1);
    chk("tail-1", entry[q.size() - 2], 7);
    chk("tail",   entry[q.size() - 1], 6);
    since.delete();
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic a, p;
      int bias;
      if ($urandom_range(0, 19) == 0) begin
        // give back everything allocated since the mark, in one cycle
        if (since_ok && since.size() > 0) begin
          @(negedge clk);
          rewind = 1; rewind_n = CW'(since.size());
          @(posedge clk);
          for (int k = since.size() - 1; k >= 0; k--) q.push_front(since[k]);
          rewinds++;
          @(negedge clk);
          rewind = 0;
        end
        since.delete();
        since_ok = 1;
      end
      bias = (cyc / 300) % 2;       // alternate between draining and filling
      a = (q.size() > 0) && ($urandom_range(0, 3) < (bias ? 3 : 1));
      p = ((q.size() < D) || a) && ($urandom_range(0, 3) < (bias ? 1 : 3));
      if (q.size() == 0) empties++;
      if (q.size() == D) fulls++;
      step(a, p, PW'($urandom_range(0, PR - 1)));
    end
    chk("reached empty", 32'(empties > 0), 1);
    chk("reached full", 32'(fulls > 0), 1);
    chk("rewinds", 32'(rewinds > 10), 1);
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
