// icache: small set-associative L1 instruction cache, two-cycle pipelined.
//
// One port, one request per cycle, three operations:
//   READ   cycle t: request; cycle t+1: all tags of the set are compared and
//          the hitting way is registered; cycle t+2: only that way's data
//          array is read and the line is returned (resp_valid, resp_hit,
//          resp_line). Reading tags first and data one cycle later spends
//          data-array energy only on the way that hits.
//   PROBE  the same tag compare without the data read; used by the
//          prefetcher to filter prefetches when the port is idle.
//   FILL   writes a whole line in the request cycle (no response).
// Requests may be issued back to back; responses come out in order two
// cycles later. If a FILL replaces the way a READ hit in before that READ's
// data is read, the READ reports a miss instead of returning the new line.
//
// Set index: normally the line-address bits above the line offset. With
// hint redistribution the block's 3 compiler hint bits are combined with the
// top of the index so the compiler can spread hot blocks over the sets; with
// hint exclusion the fetch logic simply never fills excluded blocks. The tag
// holds the whole line address, so a line is found whatever set the hints
// chose. Default geometry (2 KB, 2 ways, 32-byte lines, 2-cycle access) is
// the document's small I-cache. The exact way the hint bits enter the index
// (XOR into the top index bits), the full-line-address tag and the
// victim-pointer replacement are this design's choices.
module icache
  import bliss_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 2048,
  parameter int unsigned WAYS       = 2,
  parameter hint_mode_e  HINT_MODE  = HINTS_REDISTRIBUTE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // request
  input  logic                 req_valid,
  input  logic [1:0]           req_op,      // 0 READ, 1 PROBE, 2 FILL
  input  logic [29:0]          req_addr,    // word address
  input  logic [HINT_W-1:0]    req_hints,
  input  line_t                req_line,    // FILL data
  // response, two cycles after a READ or PROBE
  output logic                 resp_valid,
  output logic [1:0]           resp_op,
  output logic [29:0]          resp_addr,
  output logic                 resp_hit,
  output line_t                resp_line
);
  localparam int unsigned SETS  = SIZE_BYTES / (WAYS * LINE_WORDS * 4);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = 30 - LINE_OFF_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  localparam logic [1:0] OP_READ = 2'd0, OP_PROBE = 2'd1, OP_FILL = 2'd2;

  logic [TAG_W-1:0] tag_q   [SETS][WAYS];
  logic             valid_q [SETS][WAYS];
  line_t            data_q  [SETS][WAYS];
  logic [WAY_W-1:0] victim_q[SETS];

  function automatic logic [IDX_W-1:0] set_index(input logic [29:0] a,
                                                 input logic [HINT_W-1:0] h);
    logic [IDX_W-1:0] base;
    base = a[LINE_OFF_W +: IDX_W];
    if (HINT_MODE == HINTS_REDISTRIBUTE) begin
      if (IDX_W >= HINT_W) base = base ^ (IDX_W'(h) << (IDX_W - HINT_W));
      else                 base = base ^ IDX_W'(h);
    end
    return base;
  endfunction

  function automatic logic [WAY_W-1:0] next_way(input logic [WAY_W-1:0] w);
    return (w == WAY_W'(WAYS - 1)) ? '0 : w + 1'b1;
  endfunction

  // ---------------- stage 1: request registered ----------------
  logic              s1_valid;
  logic [1:0]        s1_op;
  logic [29:0]       s1_addr;
  logic [IDX_W-1:0]  s1_idx;

  // ---------------- stage 2: tag result registered -------------
  logic              s2_valid;
  logic [1:0]        s2_op;
  logic [29:0]       s2_addr;
  logic [IDX_W-1:0]  s2_idx;
  logic              s2_hit;
  logic [WAY_W-1:0]  s2_way;

  // tag compare for stage 1
  logic              s1_hit;
  logic [WAY_W-1:0]  s1_way;
  always_comb begin
    s1_hit = 1'b0;
    s1_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[s1_idx][w] && tag_q[s1_idx][w] == s1_addr[29:LINE_OFF_W]) begin
        s1_hit = 1'b1;
        s1_way = WAY_W'(w);
      end
  end

  // fill: overwrite the line if already present, else the victim way
  logic [IDX_W-1:0]  f_idx;
  logic [WAY_W-1:0]  f_way;
  logic              f_present;
  assign f_idx = set_index(req_addr, req_hints);
  always_comb begin
    f_present = 1'b0;
    f_way     = victim_q[f_idx];
    for (int w = 0; w < WAYS; w++)
      if (valid_q[f_idx][w] && tag_q[f_idx][w] == req_addr[29:LINE_OFF_W]) begin
        f_present = 1'b1;
        f_way     = WAY_W'(w);
      end
  end

  logic do_fill;
  assign do_fill = req_valid && req_op == OP_FILL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
      s1_op    <= OP_READ;
      s1_addr  <= '0;
      s1_idx   <= '0;
      s2_op    <= OP_READ;
      s2_addr  <= '0;
      s2_idx   <= '0;
      s2_hit   <= 1'b0;
      s2_way   <= '0;
      for (int s = 0; s < SETS; s++) begin
        victim_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) valid_q[s][w] <= 1'b0;
      end
    end else begin
      s1_valid <= req_valid && req_op != OP_FILL;
      s1_op    <= req_op;
      s1_addr  <= req_addr;
      s1_idx   <= set_index(req_addr, req_hints);

      s2_valid <= s1_valid;
      s2_op    <= s1_op;
      s2_addr  <= s1_addr;
      s2_idx   <= s1_idx;
      // a fill replacing the hit way before its data is read turns the hit
      // into a miss (the requester then fetches the line again)
      s2_hit   <= s1_hit && !(do_fill && f_idx == s1_idx && f_way == s1_way &&
                              req_addr[29:LINE_OFF_W] != s1_addr[29:LINE_OFF_W]);
      s2_way   <= s1_way;

      if (do_fill) begin
        valid_q[f_idx][f_way] <= 1'b1;
        tag_q  [f_idx][f_way] <= req_addr[29:LINE_OFF_W];
        data_q [f_idx][f_way] <= req_line;
        if (!f_present) victim_q[f_idx] <= next_way(f_way);
      end else if (s1_valid && s1_op == OP_READ && s1_hit && s1_way == victim_q[s1_idx]) begin
        victim_q[s1_idx] <= next_way(s1_way);
      end
    end
  end

  // ---------------- stage 2 outputs: data read of one way ----------------
  assign resp_valid = s2_valid;
  assign resp_op    = s2_op;
  assign resp_addr  = s2_addr;
  assign resp_hit   = s2_hit;
  assign resp_line  = (s2_valid && s2_op == OP_READ && s2_hit) ? data_q[s2_idx][s2_way] : '0;

endmodule
