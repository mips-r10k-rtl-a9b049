// tb_map_table: the map table against a behavioural model (mapping array plus a ready bit per
// physical register). Random renames, CDB broadcasts and rollback restores; every cycle the
// checkpoint reloads of the whole table; every cycle the source/Told reads (with same-cycle CDB bypass) and the whole table are compared.
module tb_map_table;
  localparam int AR = 4, PR = 12, AW = $clog2(AR), PW = $clog2(PR);
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] s1, s2, d;
  logic [PW-1:0] t1, t2, told;
  logic r1, r2;
  logic rn_we, cdb_v, rs_we;
  logic [AW-1:0] rn_a, rs_a;
  logic [PW-1:0] rn_t, cdb_t, rs_t;
  logic [PW-1:0] map_tag [AR];
  logic ld_all;
  logic [PW-1:0] ld_tags [AR];
  int loads = 0;
  logic map_rdy [AR];
  logic [PW-1:0] m [AR];
  logic rdy [PR];
  int checks = 0, failures = 0, bypass_hits = 0;

  map_table #(.ARCH_REGS(AR), .PHYS_REGS(PR)) dut (.clk, .rst_n,
    .src1_areg (s1), .src2_areg (s2), .dst_areg (d),
    .src1_tag (t1), .src1_rdy (r1), .src2_tag (t2), .src2_rdy (r2), .dst_told (told),
    .rename_we (rn_we), .rename_areg (rn_a), .rename_tag (rn_t),
    .cdb_valid (cdb_v), .cdb_tag (cdb_t),
    .restore_we (rs_we), .restore_areg (rs_a), .restore_tag (rs_t),
    .load_all (ld_all), .load_tags (ld_tags), .map_tag, .map_rdy);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    {rn_we, cdb_v, rs_we, ld_all} = '0;
    foreach (ld_tags[i]) ld_tags[i] = '0;
    s1 = '0; s2 = '0; d = '0; rn_a = '0; rn_t = '0; cdb_t = '0; rs_a = '0; rs_t = '0;
    for (int i = 0; i < AR; i++) m[i] = PW'(i);
    for (int i = 0; i < PR; i++) rdy[i] = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      s1 = AW'($urandom_range(0, AR - 1));
      s2 = AW'($urandom_range(0, AR - 1));
      d  = AW'($urandom_range(0, AR - 1));
      rn_we = ($urandom_range(0, 2) == 0);
      rs_we = !rn_we && ($urandom_range(0, 3) == 0);
      ld_all = !rn_we && !rs_we && ($urandom_range(0, 15) == 0);
      foreach (ld_tags[i]) ld_tags[i] = PW'($urandom_range(0, PR - 1));
      rn_a = AW'($urandom_range(0, AR - 1));
      rn_t = PW'($urandom_range(0, PR - 1));
      rs_a = AW'($urandom_range(0, AR - 1));
      rs_t = PW'($urandom_range(0, PR - 1));
      cdb_v = ($urandom_range(0, 1) == 1);
      // half of the broadcasts hit a source tag, to exercise the bypass
      cdb_t = ($urandom_range(0, 1) == 1) ? m[s1] : PW'($urandom_range(0, PR - 1));
      if (cdb_v && rn_we && cdb_t == rn_t) cdb_v = 0;   // a new tag is never in flight
      #1;
      chk("src1_tag", t1, m[s1]);
      chk("src2_tag", t2, m[s2]);
      chk("told", told, m[d]);
      chk("src1_rdy", r1, rdy[m[s1]] || (cdb_v && cdb_t == m[s1]));
      chk("src2_rdy", r2, rdy[m[s2]] || (cdb_v && cdb_t == m[s2]));
      if (!rdy[m[s1]] && cdb_v && cdb_t == m[s1]) bypass_hits++;
      for (int i = 0; i < AR; i++) begin
        chk("map_tag", map_tag[i], m[i]);
        chk("map_rdy", map_rdy[i], rdy[m[i]]);
      end
      @(posedge clk);
      if (cdb_v) rdy[cdb_t] = 1'b1;
      if (rn_we) begin m[rn_a] = rn_t; rdy[rn_t] = 1'b0; end
      if (rs_we) m[rs_a] = rs_t;
      if (ld_all) begin foreach (m[i]) m[i] = ld_tags[i]; loads++; end
    end
    chk("bypass exercised", 32'(bypass_hits > 0), 1);
    chk("checkpoint loads exercised", 32'(loads > 0), 1);
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
