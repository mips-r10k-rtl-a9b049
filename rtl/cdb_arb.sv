// cdb_arb: picks the one functional unit that completes this cycle.
//
// The core has a single CDB, which carries only a physical register tag (and, in this design,
// the ROB index of the completing instruction). When several units have finished, the
// lowest-numbered request wins and the others wait; the fixed priority is this design's
// choice. Purely combinational.
module cdb_arb #(
  parameter int N = 5
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] grant,
  output logic         valid
);

  always_comb begin
    grant = '0;
    for (int i = N - 1; i >= 0; i--)
      if (req[i]) grant = N'(1) << i;
    valid = |req;
  end

endmodule
