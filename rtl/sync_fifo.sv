// sync_fifo: synchronous first-in first-out buffer of any packed type.
//
// A circular buffer of DEPTH entries with a read and a write pointer and an
// occupancy counter. Push and pop may happen in the same cycle, also when
// full (the pop frees the slot). The head entry is visible on rdata while
// `empty` is low (first-word fall-through). Used as the CPU write FIFO and
// as the switch box input buffers; the depth is the user's choice.
module sync_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 4,
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  T             wdata,
  input  logic         pop,
  output T             rdata,
  output logic         full,
  output logic         empty,
  output logic [PTR_W:0] count
);

  T                 mem [DEPTH];
  logic [PTR_W-1:0] wptr_q, rptr_q;
  logic [PTR_W:0]   cnt_q;
  logic             do_push, do_pop;

  assign full    = (cnt_q == (PTR_W+1)'(DEPTH));
  assign empty   = (cnt_q == '0);
  assign count   = cnt_q;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign rdata   = mem[rptr_q];

  function automatic logic [PTR_W-1:0] incr(input logic [PTR_W-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_q <= '0;
      rptr_q <= '0;
      cnt_q  <= '0;
    end else begin
      if (do_push) wptr_q <= incr(wptr_q);
      if (do_pop)  rptr_q <= incr(rptr_q);
      cnt_q <= cnt_q + (PTR_W+1)'(do_push) - (PTR_W+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr_q] <= wdata;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push && full |-> pop)
    else $error("sync_fifo: push while full");

endmodule
