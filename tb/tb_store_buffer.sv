// tb_store_buffer: stores park address/data in their ROB slot and reach the memory port only
// when that slot retires; a slot handed to a new instruction (dispatch) forgets an old store,
// so a rolled-back store never writes. Checked against a per-slot model.
module tb_store_buffer;
  import r10k_pkg::*;
  localparam int N = 8, RW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic alloc_valid, wr_valid, retire_valid, mem_we;
  logic [RW-1:0] alloc_idx, wr_idx, retire_idx;
  logic [XLEN-1:0] wr_addr, wr_data, mem_waddr, mem_wdata;
  logic full [N];
  logic [XLEN-1:0] ad [N], da [N];
  int checks = 0, failures = 0, writes = 0;

  store_buffer #(.ROB_DEPTH(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    alloc_valid = 0; wr_valid = 0; retire_valid = 0;
    alloc_idx = '0; wr_idx = '0; retire_idx = '0; wr_addr = '0; wr_data = '0;
    foreach (full[i]) begin full[i] = 0; ad[i] = '0; da[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      alloc_valid = $urandom_range(0, 3) == 0;
      alloc_idx = RW'($urandom_range(0, N - 1));
      wr_valid = $urandom_range(0, 1);
      wr_idx = RW'($urandom_range(0, N - 1));
      wr_addr = $urandom; wr_data = $urandom;
      retire_valid = $urandom_range(0, 1);
      retire_idx = RW'($urandom_range(0, N - 1));
      if (wr_valid && alloc_valid && wr_idx == alloc_idx) alloc_valid = 0;
      #1;
      chk("mem_we", mem_we, retire_valid && full[retire_idx]);
      if (retire_valid && full[retire_idx]) begin
        chk("mem_waddr", mem_waddr, ad[retire_idx]);
        chk("mem_wdata", mem_wdata, da[retire_idx]);
        writes++;
      end
      @(posedge clk);
      if (retire_valid) full[retire_idx] = 0;
      if (alloc_valid) full[alloc_idx] = 0;
      if (wr_valid) begin full[wr_idx] = 1; ad[wr_idx] = wr_addr; da[wr_idx] = wr_data; end
    end
    chk("writes", 32'(writes > 100), 1);
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
