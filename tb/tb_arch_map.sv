// tb_arch_map: reset mapping (register i -> physical register i) and random retire writes,
// checked against a shadow copy through both read ports.
module tb_arch_map;
  localparam int AR = 4, PR = 12, AW = $clog2(AR), PW = $clog2(PR);
  logic clk = 0, rst_n = 0;
  logic we;
  logic [AW-1:0] areg, rd_areg;
  logic [PW-1:0] tag, rd_tag;
  logic [PW-1:0] arch_tag [AR];
  logic [PW-1:0] shadow [AR];
  int checks = 0, failures = 0;

  arch_map #(.ARCH_REGS(AR), .PHYS_REGS(PR)) dut (.clk, .rst_n, .retire_we (we),
    .retire_areg (areg), .retire_tag (tag), .rd_areg, .rd_tag, .arch_tag);

  always #5 clk = ~clk;

  task automatic compare();
    for (int i = 0; i < AR; i++) begin
      checks++;
      if (arch_tag[i] !== shadow[i]) begin
        failures++;
        $display("FAIL arch_tag[%0d]=%0d exp %0d", i, arch_tag[i], shadow[i]);
      end
    end
    checks++;
    if (rd_tag !== shadow[rd_areg]) begin
      failures++;
      $display("FAIL rd_tag");
    end
  endtask

  initial begin
    we = 0; areg = '0; tag = '0; rd_areg = '0;
    for (int i = 0; i < AR; i++) shadow[i] = PW'(i);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int cyc = 0; cyc < 1000; cyc++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      areg = AW'($urandom_range(0, AR - 1));
      tag = PW'($urandom_range(0, PR - 1));
      rd_areg = AW'($urandom_range(0, AR - 1));
      @(posedge clk);
      if (we) shadow[areg] = tag;
      @(negedge clk);
      we = 0;
      compare();
    end
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
