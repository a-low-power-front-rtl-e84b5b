// bbq: basic block queue between block prediction and instruction fetch.
//
// A FIFO of predicted blocks (descriptor address, type, instruction address,
// length, hints, prediction). The prediction side pushes up to one block per
// cycle; the fetch side pops the oldest block once all its instructions have
// been fetched. Because prediction usually runs ahead of fetch, the queue
// also gives a view of the upcoming instruction addresses: every entry is
// visible, oldest first, so the prefetcher can scan it. Each entry carries a
// "prefetch checked" flag the prefetcher sets by its position in the queue.
// A flush (misprediction) empties the queue in one cycle.
// Push and pop may happen in the same cycle. ready = not full. The 4-entry
// depth is the document's; the flag and the flush are this design's.
module bbq
  import bliss_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      flush,
  input  logic                      push,
  input  bbq_entry_t                push_entry,
  output logic                      ready,
  input  logic                      pop,
  output logic [$clog2(DEPTH):0]    count,
  output bbq_entry_t                entries [DEPTH],   // [0] is the oldest
  output logic                      checked [DEPTH],
  input  logic                      mark_valid,
  input  logic [$clog2(DEPTH)-1:0]  mark_pos            // position from the oldest
);
  localparam int unsigned PTR_W = $clog2(DEPTH);

  bbq_entry_t       mem_q   [DEPTH];
  logic             chk_q   [DEPTH];
  logic [PTR_W-1:0] head_q, tail_q;
  logic [PTR_W:0]   count_q;

  logic do_push, do_pop;
  assign ready   = (count_q != (PTR_W+1)'(DEPTH));
  assign do_push = push && ready;
  assign do_pop  = pop && (count_q != '0);
  assign count   = count_q;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      entries[i] = mem_q[head_q + PTR_W'(i)];
      checked[i] = chk_q[head_q + PTR_W'(i)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        mem_q[i] <= '0;
        chk_q[i] <= 1'b0;
      end
    end else if (flush) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      if (mark_valid) chk_q[head_q + mark_pos] <= 1'b1;
      if (do_push) begin
        mem_q[tail_q] <= push_entry;
        chk_q[tail_q] <= 1'b0;
        tail_q        <= tail_q + 1'b1;
      end
      if (do_pop) head_q <= head_q + 1'b1;
      count_q <= count_q + (PTR_W+1)'(do_push) - (PTR_W+1)'(do_pop);
    end
  end

  // The fetch side never pops an empty queue.
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> count_q != '0);

endmodule
