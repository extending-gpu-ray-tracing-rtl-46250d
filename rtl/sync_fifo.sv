// sync_fifo: single-clock first-in first-out queue. The HSU uses two: the
// memory access FIFO, which holds node fetch requests of warp buffer threads
// and presents one to the L1 cache per cycle, and the response FIFO, which
// holds node data returned by the cache or interconnect until the warp buffer
// takes it, one per cycle.
//
// Interface: push/push_data with full, pop/pop_data with empty. pop_data is
// the head entry, valid while empty is low (first-word fall-through); a push
// and a pop may happen in the same cycle, also when full. Pushing into a full
// FIFO without popping, or popping an empty one, violates the protocol and is
// flagged by assertions. Depths are this design's choice; the description
// does not size either FIFO.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  output logic             full,
  input  logic             pop,
  output logic [WIDTH-1:0] pop_data,
  output logic             empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic [AW:0]      count;
  logic             do_push, do_pop;

  assign empty    = (count == 0);
  assign full     = (count == (AW+1)'(DEPTH));
  assign do_pop   = pop && !empty;
  assign do_push  = push && (!full || do_pop);
  assign pop_data = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wr_ptr] <= push_data;

  // protocol rules
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("sync_fifo: push into full FIFO");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("sync_fifo: pop from empty FIFO");
endmodule
