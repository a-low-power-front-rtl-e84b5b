// bliss_frontend: low-power decoupled front-end for a block-aware ISA.
//
// The front-end has two halves joined by the basic block queue (BBQ):
//   Prediction: the PC (always the address of a basic block descriptor)
//   looks up its descriptor. The descriptor, with the bimodal predictor's
//   direction and the RAS for returns, yields the next PC, and the block is
//   pushed into the BBQ. On a miss prediction stalls while the descriptor is
//   read from L2.
//   Descriptor storage comes in two configurations, chosen by UNIFIED:
//     UNIFIED=1 (default): no separate BB-cache. Descriptor lines and
//       instruction lines share one cache array and its single port;
//       descriptor lookups use the cycles instruction fetch leaves free
//       (desc_fetch), so at most one block is predicted every three cycles.
//     UNIFIED=0: a separate small BB-cache looked up in the same cycle, one
//       block per cycle, refilled one descriptor at a time.
//   Fetch: the fetch unit reads the instructions of the oldest BBQ block
//   from the small two-cycle I-cache using the descriptor's instruction
//   address and length, and hands them to the back-end. Meanwhile the
//   prefetcher scans the younger BBQ blocks, probes the I-cache when its port
//   is idle and pulls missing lines from L2 into a prefetch buffer.
// Compiler hints carried by descriptors steer the I-cache set index
// (redistribution, the default) or keep blocks out of the I-cache
// (exclusion). The single L2 port is shared by descriptor refills, demand
// instruction misses and prefetches.
//
// Back-end interface: pkt_valid/pkt/pkt_ready carry instruction packets;
// redirect_valid/redirect_pc restart prediction after a misprediction
// (flushing the BBQ and fetch); bp_upd_* train the predictor. L2 interface:
// line requests (valid/ready, 32-byte line word address) and one response
// line per request. ev reports one-cycle event strobes.
//
// Default sizes are the small configuration evaluated in the document:
// 16-set 2-way BB-cache (UNIFIED=0), 2 KB 2-way I-cache with 32-byte lines
// and 2-cycle access, 4-entry BBQ, 256-entry bimodal predictor, 8-entry
// RAS. The default combination (unified storage, prefetching, hint
// redistribution) is the document's best-performing one. The size of the
// unified array (taken equal to the I-cache, 2 KB), the prefetch buffer
// size, the L2 protocol and the flush behaviour are this design's choices.
module bliss_frontend
  import bliss_pkg::*;
#(
  parameter logic [29:0] RESET_PC   = 30'd0,
  parameter int unsigned BBC_SETS   = 16,
  parameter int unsigned BBC_WAYS   = 2,
  parameter int unsigned BP_ENTRIES = 256,
  parameter int unsigned RAS_DEPTH  = 8,
  parameter int unsigned BBQ_DEPTH  = 4,
  parameter int unsigned IC_SIZE    = 2048,
  parameter int unsigned IC_WAYS    = 2,
  parameter int unsigned PB_ENTRIES = 4,
  parameter hint_mode_e  HINT_MODE  = HINTS_REDISTRIBUTE,
  parameter bit          UNIFIED    = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  // back-end
  output logic         pkt_valid,
  output fetch_pkt_t   pkt,
  input  logic         pkt_ready,
  input  logic         redirect_valid,
  input  logic [29:0]  redirect_pc,
  input  logic         bp_upd_valid,
  input  logic [29:0]  bp_upd_pc,
  input  logic         bp_upd_taken,
  // L2
  output logic         l2_req_valid,
  output logic [29:0]  l2_req_addr,
  input  logic         l2_req_ready,
  input  logic         l2_resp_valid,
  input  line_t        l2_resp_line,
  // events
  output fe_events_t   ev
);
  localparam int unsigned BBQ_PW = $clog2(BBQ_DEPTH);

  // ------------------------------------------------------------ prediction
  logic [29:0]  pc_q, npc;
  logic         bbc_hit;
  bbc_entry_t   bbc_entry;
  logic         bp_taken;
  logic [29:0]  ras_top;
  logic         ras_empty;
  logic         advance, ras_push, ras_pop;
  logic [29:0]  ras_push_addr;
  bbq_entry_t   bbq_in;
  logic         bbq_ready;


  bimod_predictor #(.ENTRIES(BP_ENTRIES)) u_bp (
    .clk, .rst_n,
    .pred_pc   (pc_q),
    .pred_taken(bp_taken),
    .upd_valid (bp_upd_valid),
    .upd_pc    (bp_upd_pc),
    .upd_taken (bp_upd_taken)
  );

  ras #(.DEPTH(RAS_DEPTH)) u_ras (
    .clk, .rst_n,
    .push     (ras_push),
    .push_addr(ras_push_addr),
    .pop      (ras_pop),
    .top      (ras_top),
    .empty    (ras_empty)
  );

  next_pc u_npc (
    .pc            (pc_q),
    .bbc_hit       (bbc_hit),
    .bbc_entry     (bbc_entry),
    .bp_taken      (bp_taken),
    .ras_top       (ras_top),
    .bbq_ready     (bbq_ready),
    .redirect_valid(redirect_valid),
    .redirect_pc   (redirect_pc),
    .npc           (npc),
    .advance       (advance),
    .bbq_entry     (bbq_in),
    .ras_push      (ras_push),
    .ras_push_addr (ras_push_addr),
    .ras_pop       (ras_pop)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc_q <= RESET_PC;
    else        pc_q <= npc;
  end

  // ------------------------------------------------------------ BBQ
  logic [BBQ_PW:0]  bbq_count;
  bbq_entry_t       bbq_entries [BBQ_DEPTH];
  logic             bbq_checked [BBQ_DEPTH];
  logic             bbq_pop;
  logic             pf_mark_valid;
  logic [BBQ_PW-1:0] pf_mark_pos;

  bbq #(.DEPTH(BBQ_DEPTH)) u_bbq (
    .clk, .rst_n,
    .flush     (redirect_valid),
    .push      (advance),
    .push_entry(bbq_in),
    .ready     (bbq_ready),
    .pop       (bbq_pop),
    .count     (bbq_count),
    .entries   (bbq_entries),
    .checked   (bbq_checked),
    .mark_valid(pf_mark_valid),
    .mark_pos  (pf_mark_pos)
  );

  // ------------------------------------------------------------ L2 sharing
  logic [2:0]   l2_req, l2_gnt, l2_rvalid;
  logic [29:0]  l2_addr [3];
  line_t        l2_rline;

  l2_arbiter u_arb (
    .clk, .rst_n,
    .req          (l2_req),
    .addr         (l2_addr),
    .gnt          (l2_gnt),
    .resp_valid   (l2_rvalid),
    .resp_line    (l2_rline),
    .l2_req_valid (l2_req_valid),
    .l2_req_addr  (l2_req_addr),
    .l2_req_ready (l2_req_ready),
    .l2_resp_valid(l2_resp_valid),
    .l2_resp_line (l2_resp_line)
  );

  // fetch-side signals
  logic               fu_ic_valid, pf_ic_valid;
  logic [1:0]         fu_ic_op;
  logic [29:0]        fu_ic_addr, pf_ic_addr;
  logic [HINT_W-1:0]  fu_ic_hints, pf_ic_hints;
  line_t              fu_ic_line;
  logic               ic_resp_valid, ic_resp_hit;
  logic [1:0]         ic_resp_op;
  logic [29:0]        ic_resp_addr;
  line_t              ic_resp_line;
  logic [29:0]        pb_addr;
  logic               pb_hit, pb_take;
  line_t              pb_line;
  logic               ev_ic_miss, ev_pb_hit, ev_probe, ev_prefetch, ev_line_reuse;

  // ------------------------------------------------------------ descriptors
  // Shared-port signals of the descriptor side (unified configuration).
  logic               df_ic_valid;
  logic [1:0]         df_ic_op;
  logic [29:0]        df_ic_addr;
  line_t              df_ic_line;
  logic               ev_desc_miss, ev_desc_refill;

  if (UNIFIED) begin : g_unified
    desc_fetch u_df (
      .clk, .rst_n,
      .redirect     (redirect_valid),
      .pc           (pc_q),
      .bbq_ready    (bbq_ready),
      .port_free    (!fu_ic_valid),
      .ic_req_valid (df_ic_valid),
      .ic_req_op    (df_ic_op),
      .ic_req_addr  (df_ic_addr),
      .ic_req_line  (df_ic_line),
      .ic_resp_valid(ic_resp_valid),
      .ic_resp_op   (ic_resp_op),
      .ic_resp_hit  (ic_resp_hit),
      .ic_resp_line (ic_resp_line),
      .l2_req_valid (l2_req[L2_SRC_BBC]),
      .l2_req_addr  (l2_addr[L2_SRC_BBC]),
      .l2_gnt       (l2_gnt[L2_SRC_BBC]),
      .l2_resp_valid(l2_rvalid[L2_SRC_BBC]),
      .l2_resp_line (l2_rline),
      .hit          (bbc_hit),
      .entry        (bbc_entry),
      .ev_miss      (ev_desc_miss),
      .ev_refill    (ev_desc_refill)
    );
  end else begin : g_split
    // Separate BB-cache. On a miss the PC's line is read from L2 and the
    // descriptor it addresses is written into the BB-cache. The request
    // completes even if a redirect moves the PC meanwhile.
    typedef enum logic [1:0] {R_IDLE, R_REQ, R_WAIT} rstate_e;
    rstate_e      rstate_q;
    logic         bbc_fill;
    logic [29:0]  refill_pc_q;
    logic [$clog2(BBC_WAYS)-1:0] bbc_way;

    bb_cache #(.SETS(BBC_SETS), .WAYS(BBC_WAYS)) u_bbc (
      .clk, .rst_n,
      .lookup_pc (pc_q),
      .hit       (bbc_hit),
      .entry     (bbc_entry),
      .hit_way   (bbc_way),
      .fill_valid(bbc_fill),
      .fill_pc   (refill_pc_q),
      .fill_bbd  (bbd_t'(l2_rline[32*int'(refill_pc_q[LINE_OFF_W-1:0]) +: 32]))
    );

    assign l2_req[L2_SRC_BBC]  = (rstate_q == R_REQ);
    assign l2_addr[L2_SRC_BBC] = {refill_pc_q[29:LINE_OFF_W], {LINE_OFF_W{1'b0}}};
    assign bbc_fill            = (rstate_q == R_WAIT) && l2_rvalid[L2_SRC_BBC];
    assign ev_desc_miss        = !bbc_hit && !redirect_valid && rstate_q == R_IDLE;
    assign ev_desc_refill      = bbc_fill;
    assign df_ic_valid         = 1'b0;
    assign df_ic_op            = 2'd0;
    assign df_ic_addr          = '0;
    assign df_ic_line          = '0;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rstate_q    <= R_IDLE;
        refill_pc_q <= '0;
      end else begin
        unique case (rstate_q)
          R_IDLE: if (!bbc_hit && !redirect_valid) begin
                    refill_pc_q <= pc_q;
                    rstate_q    <= R_REQ;
                  end
          R_REQ:  if (l2_gnt[L2_SRC_BBC]) rstate_q <= R_WAIT;
          R_WAIT: if (l2_rvalid[L2_SRC_BBC]) rstate_q <= R_IDLE;
          default: rstate_q <= R_IDLE;
        endcase
      end
    end
  end

  // ------------------------------------------------------------ fetch side
  fetch_unit #(.HINT_MODE(HINT_MODE)) u_fetch (
    .clk, .rst_n,
    .flush        (redirect_valid),
    .head_valid   (bbq_count != '0),
    .head         (bbq_entries[0]),
    .pop          (bbq_pop),
    .ic_req_valid (fu_ic_valid),
    .ic_req_op    (fu_ic_op),
    .ic_req_addr  (fu_ic_addr),
    .ic_req_hints (fu_ic_hints),
    .ic_req_line  (fu_ic_line),
    .ic_resp_valid(ic_resp_valid),
    .ic_resp_op   (ic_resp_op),
    .ic_resp_hit  (ic_resp_hit),
    .ic_resp_line (ic_resp_line),
    .pb_addr      (pb_addr),
    .pb_hit       (pb_hit),
    .pb_line      (pb_line),
    .pb_take      (pb_take),
    .l2_req_valid (l2_req[L2_SRC_FETCH]),
    .l2_req_addr  (l2_addr[L2_SRC_FETCH]),
    .l2_gnt       (l2_gnt[L2_SRC_FETCH]),
    .l2_resp_valid(l2_rvalid[L2_SRC_FETCH]),
    .l2_resp_line (l2_rline),
    .pkt_valid    (pkt_valid),
    .pkt          (pkt),
    .pkt_ready    (pkt_ready),
    .ev_ic_miss   (ev_ic_miss),
    .ev_pb_hit    (ev_pb_hit),
    .ev_line_reuse(ev_line_reuse)
  );

  prefetcher #(.BBQ_DEPTH(BBQ_DEPTH), .PB_ENTRIES(PB_ENTRIES), .HINT_MODE(HINT_MODE)) u_pf (
    .clk, .rst_n,
    .flush        (redirect_valid),
    .bbq_count    (bbq_count),
    .bbq_entries  (bbq_entries),
    .bbq_checked  (bbq_checked),
    .mark_valid   (pf_mark_valid),
    .mark_pos     (pf_mark_pos),
    .port_free    (!fu_ic_valid && !df_ic_valid),
    .ic_req_valid (pf_ic_valid),
    .ic_req_addr  (pf_ic_addr),
    .ic_req_hints (pf_ic_hints),
    .ic_resp_valid(ic_resp_valid),
    .ic_resp_op   (ic_resp_op),
    .ic_resp_hit  (ic_resp_hit),
    .l2_req_valid (l2_req[L2_SRC_PF]),
    .l2_req_addr  (l2_addr[L2_SRC_PF]),
    .l2_gnt       (l2_gnt[L2_SRC_PF]),
    .l2_resp_valid(l2_rvalid[L2_SRC_PF]),
    .l2_resp_line (l2_rline),
    .pb_addr      (pb_addr),
    .pb_hit       (pb_hit),
    .pb_line      (pb_line),
    .pb_take      (pb_take),
    .ev_probe     (ev_probe),
    .ev_prefetch  (ev_prefetch)
  );

  // Cache port: the fetch unit first, then descriptor lookups (unified
  // configuration), probes only in cycles nobody else uses.
  logic               ic_req_valid;
  logic [1:0]         ic_req_op;
  logic [29:0]        ic_req_addr;
  logic [HINT_W-1:0]  ic_req_hints;

  line_t              ic_req_line;

  always_comb begin
    ic_req_line = fu_ic_line;
    if (fu_ic_valid) begin
      ic_req_valid = 1'b1;
      ic_req_op    = fu_ic_op;
      ic_req_addr  = fu_ic_addr;
      ic_req_hints = fu_ic_hints;
    end else if (df_ic_valid) begin
      // descriptor lines are indexed without hints
      ic_req_valid = 1'b1;
      ic_req_op    = df_ic_op;
      ic_req_addr  = df_ic_addr;
      ic_req_hints = '0;
      ic_req_line  = df_ic_line;
    end else begin
      ic_req_valid = pf_ic_valid;
      ic_req_op    = 2'd1;   // PROBE
      ic_req_addr  = pf_ic_addr;
      ic_req_hints = pf_ic_hints;
    end
  end

  icache #(.SIZE_BYTES(IC_SIZE), .WAYS(IC_WAYS), .HINT_MODE(HINT_MODE)) u_ic (
    .clk, .rst_n,
    .req_valid (ic_req_valid),
    .req_op    (ic_req_op),
    .req_addr  (ic_req_addr),
    .req_hints (ic_req_hints),
    .req_line  (ic_req_line),
    .resp_valid(ic_resp_valid),
    .resp_op   (ic_resp_op),
    .resp_addr (ic_resp_addr),
    .resp_hit  (ic_resp_hit),
    .resp_line (ic_resp_line)
  );

  // ------------------------------------------------------------ events
  always_comb begin
    ev            = '0;
    ev.bbc_hit    = advance;
    ev.bbc_miss   = ev_desc_miss;
    ev.bbc_refill = ev_desc_refill;
    ev.bbq_full   = !bbq_ready && !redirect_valid;
    ev.redirect   = redirect_valid;
    ev.ras_push   = ras_push;
    ev.ras_pop    = ras_pop;
    ev.pred_taken = advance && is_cond(bbc_entry.btype) && bp_taken;
    ev.ic_miss    = ev_ic_miss;
    ev.pb_hit     = ev_pb_hit;
    ev.probe      = ev_probe;
    ev.prefetch   = ev_prefetch;
    ev.line_reuse = ev_line_reuse;
  end

endmodule
