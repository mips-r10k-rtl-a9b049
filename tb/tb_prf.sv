// tb_prf: random reads and writes of the physical register file against a shadow array,
// including reads of the register written in the same cycle (must return the new value).
module tb_prf;
  import r10k_pkg::*;
  localparam int PR = 12, NR = 3, PW = $clog2(PR);
  logic clk = 0, rst_n = 0;
  logic [PW-1:0]   raddr [NR];
  logic [XLEN-1:0] rdata [NR];
  logic we;
  logic [PW-1:0] waddr;
  logic [XLEN-1:0] wdata;
  logic [XLEN-1:0] shadow [PR];
  int checks = 0, failures = 0, bypasses = 0;

  prf #(.PHYS_REGS(PR), .NREAD(NR)) dut (.clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    we = 0; waddr = '0; wdata = '0;
    for (int i = 0; i < NR; i++) raddr[i] = '0;
    for (int i = 0; i < PR; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 1) == 1);
      waddr = PW'($urandom_range(0, PR - 1));
      wdata = $urandom;
      for (int i = 0; i < NR; i++)
        raddr[i] = ($urandom_range(0, 3) == 0) ? waddr : PW'($urandom_range(0, PR - 1));
      #1;
      for (int i = 0; i < NR; i++) begin
        logic [XLEN-1:0] exp;
        exp = (we && waddr == raddr[i]) ? wdata : shadow[raddr[i]];
        if (we && waddr == raddr[i]) bypasses++;
        checks++;
        if (rdata[i] !== exp) begin
          failures++;
          $display("FAIL port %0d addr %0d got %h exp %h", i, raddr[i], rdata[i], exp);
        end
      end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    checks++;
    if (bypasses == 0) failures++;
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
