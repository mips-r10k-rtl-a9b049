// arch_map: architectural (committed) map table.
//
// Holds, for each architectural register, the physical register written by the youngest
// retired instruction. After reset register i maps to physical register i, matching the
// speculative map table. At retire the ROB head's T is recorded for its logical destination.
// The register array is the document's; reset values and the observation port are this
// design's choices. Timing: one write per cycle, visible after the next rising edge.
module arch_map #(
  parameter int ARCH_REGS = 4,
  parameter int PHYS_REGS = 12,
  localparam int AW = $clog2(ARCH_REGS),
  localparam int PW = $clog2(PHYS_REGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          retire_we,
  input  logic [AW-1:0] retire_areg,
  input  logic [PW-1:0] retire_tag,
  input  logic [AW-1:0] rd_areg,
  output logic [PW-1:0] rd_tag,
  output logic [PW-1:0] arch_tag [ARCH_REGS]
);

  logic [PW-1:0] map_q [ARCH_REGS];

  always_comb begin
    rd_tag = map_q[rd_areg];
    for (int i = 0; i < ARCH_REGS; i++) arch_tag[i] = map_q[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ARCH_REGS; i++) map_q[i] <= PW'(i);
    end else if (retire_we) begin
      map_q[retire_areg] <= retire_tag;
    end
  end

endmodule
