// prefetcher: execution-based instruction prefetcher fed by the BBQ.
//
// Prediction runs ahead of instruction fetch, so the blocks waiting in the
// BBQ behind the one being fetched show which instruction lines are needed
// next. The prefetcher takes the oldest such block it has not yet examined
// and checks the line holding its first instruction:
//   - already in the prefetch buffer: nothing to do;
//   - otherwise it probes the I-cache tags, using the cache port only in a
//     cycle the fetch unit leaves idle, so no extra port is needed;
//   - on a probe miss it reads the line from L2 into the prefetch buffer.
// In hint-exclusion mode a block marked "exclude from L1" is never in the
// I-cache, so it is prefetched without a probe.
// Prefetched lines wait in a small fully associative buffer (oldest replaced
// first) rather than in the cache, so wrong prefetches do not pollute it.
// The fetch unit looks lines up there on an I-cache miss and takes them out.
//
// Timing: a probe returns two cycles after issue (I-cache pipeline); an L2
// prefetch is one outstanding request through the L2 arbiter. A flush drops
// a pending probe; an L2 prefetch under way is still completed.
// Prefetching from BBQ contents, probing only when the port is idle and the
// separate buffer follow the document. The buffer size (4 lines), examining
// only the first line of each block and one prefetch at a time are this
// design's choices.
module prefetcher
  import bliss_pkg::*;
#(
  parameter int unsigned BBQ_DEPTH  = 4,
  parameter int unsigned PB_ENTRIES = 4,
  parameter hint_mode_e  HINT_MODE  = HINTS_REDISTRIBUTE
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          flush,
  // BBQ view
  input  logic [$clog2(BBQ_DEPTH):0]    bbq_count,
  input  bbq_entry_t                    bbq_entries [BBQ_DEPTH],
  input  logic                          bbq_checked [BBQ_DEPTH],
  output logic                          mark_valid,
  output logic [$clog2(BBQ_DEPTH)-1:0]  mark_pos,
  // I-cache port, used only when port_free
  input  logic                          port_free,
  output logic                          ic_req_valid,
  output logic [29:0]                   ic_req_addr,
  output logic [HINT_W-1:0]             ic_req_hints,
  input  logic                          ic_resp_valid,
  input  logic [1:0]                    ic_resp_op,
  input  logic                          ic_resp_hit,
  // L2
  output logic                          l2_req_valid,
  output logic [29:0]                   l2_req_addr,
  input  logic                          l2_gnt,
  input  logic                          l2_resp_valid,
  input  line_t                         l2_resp_line,
  // prefetch buffer lookup by the fetch unit
  input  logic [29:0]                   pb_addr,
  output logic                          pb_hit,
  output line_t                         pb_line,
  input  logic                          pb_take,
  // event strobes
  output logic                          ev_probe,
  output logic                          ev_prefetch
);
  localparam int unsigned QP_W  = $clog2(BBQ_DEPTH);
  localparam int unsigned PB_W  = (PB_ENTRIES > 1) ? $clog2(PB_ENTRIES) : 1;
  localparam logic [1:0]  OP_PROBE = 2'd1;

  typedef enum logic [2:0] {P_IDLE, P_PROBE1, P_PROBE2, P_L2REQ, P_L2WAIT} pstate_e;

  pstate_e                 state_q;
  logic [29:0]             addr_q;        // line being handled (word address, offset 0)

  // prefetch buffer
  logic                    pbv_q   [PB_ENTRIES];
  logic [29:0]             pbtag_q [PB_ENTRIES];
  line_t                   pbdat_q [PB_ENTRIES];
  logic [PB_W-1:0]         pbnext_q;

  function automatic logic [29:0] line_of(input logic [29:0] a);
    return {a[29:LINE_OFF_W], {LINE_OFF_W{1'b0}}};
  endfunction

  // lookup by the fetch unit
  logic [PB_W-1:0] pb_hit_idx;
  always_comb begin
    pb_hit     = 1'b0;
    pb_hit_idx = '0;
    for (int i = 0; i < PB_ENTRIES; i++)
      if (pbv_q[i] && pbtag_q[i] == line_of(pb_addr)) begin
        pb_hit     = 1'b1;
        pb_hit_idx = PB_W'(i);
      end
  end
  assign pb_line = pbdat_q[pb_hit_idx];

  // candidate: oldest unexamined block behind the head
  logic             cand_valid;
  logic [QP_W-1:0]  cand_pos;
  bbq_entry_t       cand;
  always_comb begin
    cand_valid = 1'b0;
    cand_pos   = '0;
    for (int i = BBQ_DEPTH - 1; i >= 1; i--)
      if ((QP_W+1)'(i) < bbq_count && !bbq_checked[i]) begin
        cand_valid = 1'b1;
        cand_pos   = QP_W'(i);
      end
    cand = bbq_entries[cand_pos];
  end

  logic cand_in_pb;
  always_comb begin
    cand_in_pb = 1'b0;
    for (int i = 0; i < PB_ENTRIES; i++)
      if (pbv_q[i] && pbtag_q[i] == line_of(cand.iaddr)) cand_in_pb = 1'b1;
  end

  logic cand_skip, cand_direct, cand_probe;
  assign cand_skip   = cand_valid && (cand.len == '0 || cand_in_pb);
  assign cand_direct = cand_valid && !cand_skip && HINT_MODE == HINTS_EXCLUDE && cand.hints[0];
  assign cand_probe  = cand_valid && !cand_skip && !cand_direct && port_free;

  logic idle_go;
  assign idle_go = (state_q == P_IDLE) && !flush;

  assign mark_valid   = idle_go && (cand_skip || cand_direct || cand_probe);
  assign mark_pos     = cand_pos;
  assign ic_req_valid = idle_go && cand_probe;
  assign ic_req_addr  = line_of(cand.iaddr);
  assign ic_req_hints = cand.hints;
  assign ev_probe     = ic_req_valid;

  assign l2_req_valid = (state_q == P_L2REQ);
  assign l2_req_addr  = addr_q;
  assign ev_prefetch  = l2_req_valid && l2_gnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= P_IDLE;
      addr_q   <= '0;
      pbnext_q <= '0;
      for (int i = 0; i < PB_ENTRIES; i++) begin
        pbv_q[i]   <= 1'b0;
        pbtag_q[i] <= '0;
        pbdat_q[i] <= '0;
      end
    end else begin
      if (pb_take) pbv_q[pb_hit_idx] <= 1'b0;
      unique case (state_q)
        P_IDLE: begin
          if (idle_go && cand_direct) begin
            addr_q  <= line_of(cand.iaddr);
            state_q <= P_L2REQ;
          end else if (idle_go && cand_probe) begin
            addr_q  <= line_of(cand.iaddr);
            state_q <= P_PROBE1;
          end
        end
        P_PROBE1: state_q <= flush ? P_IDLE : P_PROBE2;
        P_PROBE2: begin
          if (flush)                                                  state_q <= P_IDLE;
          else if (ic_resp_valid && ic_resp_op == OP_PROBE && !ic_resp_hit) state_q <= P_L2REQ;
          else                                                        state_q <= P_IDLE;
        end
        P_L2REQ: begin
          if (flush)       state_q <= P_IDLE;
          else if (l2_gnt) state_q <= P_L2WAIT;
        end
        P_L2WAIT: begin
          if (l2_resp_valid) begin
            pbv_q[pbnext_q]   <= 1'b1;
            pbtag_q[pbnext_q] <= addr_q;
            pbdat_q[pbnext_q] <= l2_resp_line;
            pbnext_q          <= (pbnext_q == PB_W'(PB_ENTRIES - 1)) ? '0 : pbnext_q + 1'b1;
            state_q           <= P_IDLE;
          end
        end
        default: state_q <= P_IDLE;
      endcase
    end
  end

endmodule
