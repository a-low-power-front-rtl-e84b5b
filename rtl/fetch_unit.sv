// fetch_unit: instruction fetch driven by the basic block queue.
//
// For the oldest block in the BBQ it reads the block's instructions from the
// I-cache using the descriptor's instruction address and length, one cache
// line per access, and hands each line's share of the block to the back-end
// as one packet (up to 8 instructions). A block that fits in one line costs a
// single access. When every instruction of the block has been delivered the
// block is popped from the BBQ. A block of length 0 yields one empty packet
// so the back-end still sees the block.
//
// The last line delivered is kept in a one-line buffer. When the next
// block starts in that same line (sequential blocks packed in one line) its
// packet is built from the buffer with no cache access at all, saving the
// tag and data access and leaving the port to descriptor fetch and probes.
//
// On an I-cache miss the line is taken from the prefetch buffer if the
// prefetcher already brought it in, otherwise it is requested from L2. The
// line is then written into the I-cache (unless the block carries the
// "exclude from L1" hint in exclusion mode) and delivered.
//
// Timing: request in the IDLE cycle, response two cycles later (RESP), packet
// offered in the following cycle (OUT) and held until pkt_ready. A block
// served from the line buffer goes from IDLE straight to OUT. Accesses are
// not overlapped. A flush (misprediction) abandons the current block; an L2
// refill already under way is still completed into the I-cache, but its
// instructions are dropped.
// The fetch flow and the merging of accesses to one line by sequential
// blocks follow the document's description of the BLISS front-end; the
// packet format, the one-line buffer as the way to merge, the non-overlapped
// accesses and the flush handling are this design's choices.
module fetch_unit
  import bliss_pkg::*;
#(
  parameter hint_mode_e HINT_MODE = HINTS_REDISTRIBUTE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 flush,
  // BBQ head
  input  logic                 head_valid,
  input  bbq_entry_t           head,
  output logic                 pop,
  // I-cache port (this unit has priority over the prefetcher)
  output logic                 ic_req_valid,
  output logic [1:0]           ic_req_op,
  output logic [29:0]          ic_req_addr,
  output logic [HINT_W-1:0]    ic_req_hints,
  output line_t                ic_req_line,
  input  logic                 ic_resp_valid,
  input  logic [1:0]           ic_resp_op,
  input  logic                 ic_resp_hit,
  input  line_t                ic_resp_line,
  // prefetch buffer lookup (combinational)
  output logic [29:0]          pb_addr,
  input  logic                 pb_hit,
  input  line_t                pb_line,
  output logic                 pb_take,
  // L2 request / response
  output logic                 l2_req_valid,
  output logic [29:0]          l2_req_addr,
  input  logic                 l2_gnt,
  input  logic                 l2_resp_valid,
  input  line_t                l2_resp_line,
  // to the back-end
  output logic                 pkt_valid,
  output fetch_pkt_t           pkt,
  input  logic                 pkt_ready,
  // event strobes
  output logic                 ev_ic_miss,
  output logic                 ev_pb_hit,
  output logic                 ev_line_reuse
);
  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_RESP, S_L2REQ, S_L2WAIT, S_OUT} state_e;

  localparam logic [1:0] OP_READ = 2'd0, OP_FILL = 2'd2;

  state_e           state_q;
  logic [LEN_W-1:0] done_q;      // instructions of the head block delivered
  logic             killed_q;    // flushed while an L2 refill was outstanding
  fetch_pkt_t       pkt_q;

  logic [29:0]      cur_addr;
  logic [LEN_W-1:0] remaining;
  logic [LINE_OFF_W-1:0] cur_off;
  logic [4:0]       room;        // words from cur_addr to the end of its line
  logic [3:0]       cnt;
  logic             no_alloc;

  assign cur_addr  = head.iaddr + 30'(done_q);
  assign remaining = head.len - done_q;
  assign cur_off   = cur_addr[LINE_OFF_W-1:0];
  assign room      = 5'(LINE_WORDS) - 5'(cur_off);
  assign cnt       = (5'(remaining) < room) ? 4'(remaining) : 4'(room);
  assign no_alloc  = (HINT_MODE == HINTS_EXCLUDE) && head.hints[0];

  function automatic fetch_pkt_t make_pkt(input line_t line);
    fetch_pkt_t p;
    p.pc    = head.pc;
    p.iaddr = cur_addr;
    p.count = cnt;
    p.last  = (4'(remaining) == cnt);
    p.pred_next = head.pred_next;
    p.words = line >> (32 * int'(cur_off));
    return p;
  endfunction

  // address, hints and allocation rule of the outstanding L2 refill
  logic [29:0]       l2_addr_q;
  logic [HINT_W-1:0] hints_q;
  logic              no_alloc_q;

  // Last line delivered, kept for the next block: sequential blocks that
  // share a line are served from it with no cache access. Instructions are
  // never written, so the copy cannot go stale.
  logic              lb_valid_q;
  logic [29:0]       lb_addr_q;
  line_t             lb_line_q;
  logic              reuse;
  assign reuse = (state_q == S_IDLE) && head_valid && !flush && head.len != '0 &&
                 lb_valid_q && lb_addr_q == {cur_addr[29:LINE_OFF_W], {LINE_OFF_W{1'b0}}};
  assign ev_line_reuse = reuse;

  // line source for a miss
  logic  miss_from_pb;
  assign pb_addr      = {cur_addr[29:LINE_OFF_W], {LINE_OFF_W{1'b0}}};
  assign miss_from_pb = (state_q == S_RESP) && ic_resp_valid && ic_resp_op == OP_READ &&
                        !ic_resp_hit && pb_hit && !flush;
  assign pb_take      = miss_from_pb;

  logic l2_fill;
  assign l2_fill = (state_q == S_L2WAIT) && l2_resp_valid;

  always_comb begin
    ic_req_valid = 1'b0;
    ic_req_op    = OP_READ;
    ic_req_addr  = cur_addr;
    ic_req_hints = head.hints;
    ic_req_line  = '0;
    if (state_q == S_IDLE && head_valid && !flush && head.len != '0 && !reuse) begin
      ic_req_valid = 1'b1;
    end else if (miss_from_pb && !no_alloc) begin
      ic_req_valid = 1'b1;
      ic_req_op    = OP_FILL;
      ic_req_line  = pb_line;
    end else if (l2_fill && !no_alloc_q) begin
      ic_req_valid = 1'b1;
      ic_req_op    = OP_FILL;
      ic_req_addr  = l2_addr_q;
      ic_req_hints = hints_q;
      ic_req_line  = l2_resp_line;
    end
  end

  assign l2_req_valid = (state_q == S_L2REQ);
  assign l2_req_addr  = l2_addr_q;

  assign pkt_valid  = (state_q == S_OUT);
  assign pkt        = pkt_q;
  assign pop        = (state_q == S_OUT) && pkt_ready && pkt_q.last && !flush;
  assign ev_ic_miss = (state_q == S_RESP) && ic_resp_valid && ic_resp_op == OP_READ &&
                      !ic_resp_hit && !flush;
  assign ev_pb_hit  = miss_from_pb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      done_q    <= '0;
      killed_q  <= 1'b0;
      pkt_q     <= '0;
      l2_addr_q <= '0;
      hints_q   <= '0;
      no_alloc_q <= 1'b0;
      lb_valid_q <= 1'b0;
      lb_addr_q  <= '0;
      lb_line_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (head_valid && !flush) begin
            if (head.len == '0) begin
              pkt_q   <= make_pkt('0);
              state_q <= S_OUT;
            end else if (reuse) begin
              pkt_q   <= make_pkt(lb_line_q);
              state_q <= S_OUT;
            end else begin
              state_q <= S_WAIT;
            end
          end
        end
        S_WAIT: state_q <= flush ? S_IDLE : S_RESP;
        S_RESP: begin
          if (flush) begin
            state_q <= S_IDLE;
          end else if (ic_resp_valid && ic_resp_op == OP_READ) begin
            if (ic_resp_hit || pb_hit) begin
              lb_valid_q <= 1'b1;
              lb_addr_q  <= pb_addr;
            end
            if (ic_resp_hit) begin
              pkt_q     <= make_pkt(ic_resp_line);
              lb_line_q <= ic_resp_line;
              state_q   <= S_OUT;
            end else if (pb_hit) begin
              pkt_q     <= make_pkt(pb_line);
              lb_line_q <= pb_line;
              state_q   <= S_OUT;
            end else begin
              l2_addr_q <= pb_addr;
              hints_q   <= head.hints;
              no_alloc_q <= no_alloc;
              state_q   <= S_L2REQ;
            end
          end
        end
        S_L2REQ: begin
          if (flush)       state_q <= S_IDLE;
          else if (l2_gnt) state_q <= S_L2WAIT;
        end
        S_L2WAIT: begin
          if (flush) killed_q <= 1'b1;
          if (l2_resp_valid) begin
            killed_q <= 1'b0;
            if (killed_q || flush) begin
              state_q <= S_IDLE;
            end else begin
              pkt_q      <= make_pkt(l2_resp_line);
              lb_valid_q <= 1'b1;
              lb_addr_q  <= l2_addr_q;
              lb_line_q  <= l2_resp_line;
              state_q    <= S_OUT;
            end
          end
        end
        S_OUT: begin
          if (flush) begin
            state_q <= S_IDLE;
          end else if (pkt_ready) begin
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase

      // progress through the head block
      if (flush) begin
        done_q <= '0;
      end else if (state_q == S_OUT && pkt_ready) begin
        done_q <= pkt_q.last ? '0 : done_q + LEN_W'(pkt_q.count);
      end
    end
  end

endmodule
