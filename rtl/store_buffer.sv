// store_buffer: the store half of the load/store queue, indexed by ROB entry.
//
// A store computes its address and data in its unit and, when it completes, parks them in the
// slot of its ROB entry. When that entry retires the core writes the slot to the data cache,
// so memory is only changed by retired stores and a rolled-back store never reaches it (its
// slot is emptied when the ROB entry is handed to the next instruction). The
// document only names the LSQ ("store write LSQ head to D$"); keeping one slot per ROB entry
// is the simplest structure that does this. Loads do not search this buffer.
// Timing: write at the rising edge, combinational read of the retiring slot.
module store_buffer
  import r10k_pkg::*;
#(
  parameter int ROB_DEPTH = 8,
  localparam int RW = $clog2(ROB_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            alloc_valid,   // dispatch of any instruction empties its slot
  input  logic [RW-1:0]   alloc_idx,
  input  logic            wr_valid,
  input  logic [RW-1:0]   wr_idx,
  input  logic [XLEN-1:0] wr_addr,
  input  logic [XLEN-1:0] wr_data,
  input  logic            retire_valid,
  input  logic [RW-1:0]   retire_idx,
  output logic            mem_we,
  output logic [XLEN-1:0] mem_waddr,
  output logic [XLEN-1:0] mem_wdata
);

  logic [XLEN-1:0] addr_q [ROB_DEPTH];
  logic [XLEN-1:0] data_q [ROB_DEPTH];
  logic [ROB_DEPTH-1:0] full_q;

  always_comb begin
    mem_we    = retire_valid && full_q[retire_idx];
    mem_waddr = addr_q[retire_idx];
    mem_wdata = data_q[retire_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= '0;
      for (int i = 0; i < ROB_DEPTH; i++) begin
        addr_q[i] <= '0;
        data_q[i] <= '0;
      end
    end else begin
      if (retire_valid) full_q[retire_idx] <= 1'b0;
      if (alloc_valid)  full_q[alloc_idx]  <= 1'b0;
      if (wr_valid) begin
        full_q[wr_idx] <= 1'b1;
        addr_q[wr_idx] <= wr_addr;
        data_q[wr_idx] <= wr_data;
      end
    end
  end

endmodule
