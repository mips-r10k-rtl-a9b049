// tb_cdb_arb: exhaustive check of the CDB arbiter. For every request pattern the grant must
// be one-hot on the lowest-numbered requester, and valid must follow "any request".
module tb_cdb_arb;
  localparam int N = 5;
  logic [N-1:0] req, grant;
  logic valid;
  int checks = 0, failures = 0;

  cdb_arb #(.N(N)) dut (.req, .grant, .valid);

  initial begin
    for (int r = 0; r < (1 << N); r++) begin
      logic [N-1:0] exp;
      req = N'(r);
      #1;
      exp = '0;
      for (int i = 0; i < N; i++) if (req[i]) begin exp[i] = 1'b1; break; end
      checks++;
      if (grant !== exp || valid !== (r != 0)) begin
        failures++;
        $display("FAIL req=%b grant=%b exp=%b valid=%b", req, grant, exp, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
