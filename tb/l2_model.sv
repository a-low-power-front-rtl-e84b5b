// l2_model: behavioural stand-in for the unified L2 cache (testbench only).
//
// Accepts one 32-byte line request at a time (req_ready low while busy) and
// returns the line LAT cycles later. Words written into dmem by the
// testbench (descriptors) are returned as written; every other word holds
// instr_word(address), a value the testbenches can recompute to check the
// instructions that reach the back-end. The default LAT of 5 matches a
// 5-cycle L2 access; main-memory misses are not modelled.
module l2_model
  import bliss_pkg::*;
#(
  parameter int unsigned LAT = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  input  logic [29:0]  req_addr,
  output logic         req_ready,
  output logic         resp_valid,
  output line_t        resp_line
);
  logic [31:0] dmem [logic [29:0]];
  int unsigned requests = 0;

  function automatic logic [31:0] instr_word(input logic [29:0] a);
    return 32'hA500_0000 ^ {2'b00, a};
  endfunction

  function automatic logic [31:0] word_at(input logic [29:0] a);
    return dmem.exists(a) ? dmem[a] : instr_word(a);
  endfunction

  logic        busy;
  int unsigned cnt;
  logic [29:0] addr_q;

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cnt        <= 0;
      resp_valid <= 1'b0;
      resp_line  <= '0;
      addr_q     <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (!busy && req_valid) begin
        busy     <= 1'b1;
        cnt      <= LAT - 1;
        addr_q   <= {req_addr[29:3], 3'b000};
        requests <= requests + 1;
      end else if (busy) begin
        if (cnt == 0) begin
          busy       <= 1'b0;
          resp_valid <= 1'b1;
          for (int i = 0; i < 8; i++) resp_line[32*i +: 32] <= word_at(addr_q + 30'(i));
        end else begin
          cnt <= cnt - 1;
        end
      end
    end
  end
endmodule
