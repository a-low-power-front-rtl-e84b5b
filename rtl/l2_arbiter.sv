// l2_arbiter: shares the front-end's single L2 port.
//
// Three front-end requesters contend for L2: instruction-fetch misses,
// BB-cache (descriptor) misses and prefetches. Fixed priority in that order:
// a demand instruction miss stalls the back-end, a descriptor miss stalls
// prediction, a prefetch is speculative. One request is outstanding at a
// time; the response line is routed back to the requester that was granted.
//
// Handshake: a requester holds req[i] and addr[i] until gnt[i] (one cycle).
// The L2 side sees a valid/ready request and returns exactly one response
// line per accepted request, any number of cycles later. The priority order
// and single outstanding request are this design's choices.
module l2_arbiter
  import bliss_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [2:0]   req,          // indexed by l2_src_e
  input  logic [29:0]  addr [3],
  output logic [2:0]   gnt,
  output logic [2:0]   resp_valid,
  output line_t        resp_line,
  // to L2
  output logic         l2_req_valid,
  output logic [29:0]  l2_req_addr,
  input  logic         l2_req_ready,
  input  logic         l2_resp_valid,
  input  line_t        l2_resp_line
);
  logic       busy_q;
  logic [1:0] owner_q;
  logic [1:0] sel;
  logic       any;

  always_comb begin
    any = |req;
    sel = 2'd0;
    if (req[L2_SRC_FETCH])    sel = 2'(L2_SRC_FETCH);
    else if (req[L2_SRC_BBC]) sel = 2'(L2_SRC_BBC);
    else if (req[L2_SRC_PF])  sel = 2'(L2_SRC_PF);
  end

  assign l2_req_valid = !busy_q && any;
  assign l2_req_addr  = addr[sel];

  always_comb begin
    gnt = '0;
    if (l2_req_valid && l2_req_ready) gnt[sel] = 1'b1;
    resp_valid = '0;
    if (busy_q && l2_resp_valid) resp_valid[owner_q] = 1'b1;
  end
  assign resp_line = l2_resp_line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
    end else if (l2_req_valid && l2_req_ready) begin
      busy_q  <= 1'b1;
      owner_q <= sel;
    end else if (l2_resp_valid) begin
      busy_q  <= 1'b0;
    end
  end

  // L2 answers only what was asked.
  assert property (@(posedge clk) disable iff (!rst_n) l2_resp_valid |-> busy_q);

endmodule
