// ras: return address stack for predicting the target of RET blocks.
//
// A circular stack of descriptor addresses. A call block (JAL, JALR) pushes
// the address of the descriptor after it; a RET block pops, and the value on
// top is available combinationally as the predicted return target. When the
// stack is full a push overwrites the oldest entry; popping an empty stack
// returns whatever the slot holds (a misprediction the back-end corrects).
// The depth of 8 is the document's; the overflow behaviour and the absence of
// repair after a misprediction are this design's choices.
// Push and pop in the same cycle are not expected (a block is either a call
// or a return); if both are asserted, the push wins.
module ras #(
  parameter int unsigned DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [29:0]  push_addr,
  input  logic         pop,
  output logic [29:0]  top,
  output logic         empty
);
  localparam int unsigned PTR_W = $clog2(DEPTH);

  logic [29:0]      stack_q [DEPTH];
  logic [PTR_W-1:0] sp_q;     // index of the top entry
  logic [PTR_W:0]   count_q;  // entries held, saturates at DEPTH

  assign top   = stack_q[sp_q];
  assign empty = (count_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_q    <= '0;
      count_q <= '0;
      for (int i = 0; i < DEPTH; i++) stack_q[i] <= '0;
    end else if (push) begin
      sp_q                 <= sp_q + 1'b1;
      stack_q[sp_q + 1'b1] <= push_addr;
      if (count_q != (PTR_W+1)'(DEPTH)) count_q <= count_q + 1'b1;
    end else if (pop) begin
      sp_q <= sp_q - 1'b1;
      if (count_q != '0) count_q <= count_q - 1'b1;
    end
  end

endmodule
