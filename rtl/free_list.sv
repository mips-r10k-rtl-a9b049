// free_list: FIFO of unallocated physical register tags.
//
// Dispatch takes the tag at the head for an instruction's new destination (T). Retire
// returns the ROB head's Told, and serial rollback returns the undone instruction's T; both
// enter at the tail, which reproduces the list order of the walkthrough ("PR#2, PR#8, PR#7"
// after undoing two instructions). After reset the list holds physical registers
// ARCH_REGS .. PHYS_REGS-1 in increasing order; the capacity is PHYS_REGS - ARCH_REGS, which
// by "#physical = #architectural + #ROB entries" equals the ROB depth.
//
// A checkpoint restore moves the head back over the registers allocated since the
// checkpoint: they are still stored there, because the tail cannot reach them while the
// instructions that own them are in flight.
//
// Interface: alloc_tag/empty are combinational from the state; alloc pops at the next edge
// and must not be asserted when empty. One push per cycle; a push and a pop may share a cycle.
module free_list #(
  parameter int ARCH_REGS = 4,
  parameter int PHYS_REGS = 12,
  localparam int DEPTH = PHYS_REGS - ARCH_REGS,
  localparam int PW = $clog2(PHYS_REGS),
  localparam int IW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          alloc,
  output logic [PW-1:0] alloc_tag,
  output logic          empty,
  input  logic          push,
  input  logic [PW-1:0] push_tag,
  // checkpoint recovery: give back the last rewind_n allocations in one cycle
  input  logic          rewind,
  input  logic [CW-1:0] rewind_n,
  output logic [CW-1:0] count,
  output logic [PW-1:0] entry [DEPTH],   // entry[k]: k-th tag from the head (valid below count)
  output logic [IW-1:0] head
);

  logic [PW-1:0] mem_q [DEPTH];
  logic [IW-1:0] head_q, tail_q;
  logic [CW-1:0] count_q;

  function automatic logic [IW-1:0] inc(logic [IW-1:0] p);
    return (p == IW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    alloc_tag = mem_q[head_q];
    empty     = (count_q == '0);
    count     = count_q;
    head      = head_q;
    for (int k = 0; k < DEPTH; k++)
      entry[k] = mem_q[(int'(head_q) + k) % DEPTH];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= PW'(ARCH_REGS + i);
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= CW'(DEPTH);
    end else begin
      if (alloc) head_q <= inc(head_q);
      if (push) begin
        mem_q[tail_q] <= push_tag;
        tail_q        <= inc(tail_q);
      end
      count_q <= count_q + CW'(push) - CW'(alloc);
      if (rewind) begin
        head_q  <= IW'((int'(head_q) + DEPTH - int'(rewind_n)) % DEPTH);
        count_q <= count_q + rewind_n;
      end
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !empty);
  a_rewind_alone: assert property (@(posedge clk) disable iff (!rst_n)
    rewind |-> !(alloc || push));
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
    (push && !alloc) |-> count_q < CW'(DEPTH));

endmodule
