// prf: physical register file, the only place values live.
//
// Issuing instructions read their operands here in S; the completing instruction writes its
// result here in C. A read of the register being written in the same cycle returns the new
// value (write-through bypass), so an instruction woken by this cycle's CDB tag can issue in
// that same cycle. All registers reset to zero. The number of read ports is a parameter; the
// document does not give it. Timing: combinational reads, write at the rising edge.
module prf
  import r10k_pkg::*;
#(
  parameter int PHYS_REGS = 12,
  parameter int NREAD     = 2,
  localparam int PW = $clog2(PHYS_REGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PW-1:0]   raddr [NREAD],
  output logic [XLEN-1:0] rdata [NREAD],
  input  logic            we,
  input  logic [PW-1:0]   waddr,
  input  logic [XLEN-1:0] wdata
);

  logic [XLEN-1:0] regs_q [PHYS_REGS];

  always_comb begin
    for (int i = 0; i < NREAD; i++)
      rdata[i] = (we && waddr == raddr[i]) ? wdata : regs_q[raddr[i]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < PHYS_REGS; i++) regs_q[i] <= '0;
    end else if (we) begin
      regs_q[waddr] <= wdata;
    end
  end

endmodule
