// desc_fetch: descriptor fetch for the unified I-cache / BB-cache.
//
// In the unified configuration there is no separate BB-cache: descriptor
// lines and instruction lines share one cache array and its single port.
// Each 32-byte line holds either eight descriptors or eight instructions;
// since descriptors and instructions live in different sections of the
// program, their addresses never share a line. This unit looks up the line
// holding the current PC through the shared port, in a cycle the
// instruction fetch unit leaves free, and two cycles later (the cache
// latency) presents the decoded descriptor to the next-PC logic for one
// cycle (hit). On a miss it reads the whole descriptor line from L2, writes
// it into the cache at the next free port cycle and looks up again.
// A redirect abandons a lookup; an L2 read under way still completes and is
// written into the cache.
// Sharing one port between descriptor and instruction fetch, with
// instruction fetch first, follows the document. Presenting one descriptor
// per lookup (at most one block every three cycles), filling whole lines
// and the FSM itself are this design's choices.
module desc_fetch
  import bliss_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 redirect,
  input  logic [29:0]          pc,
  input  logic                 bbq_ready,
  // shared cache port, used only when port_free
  input  logic                 port_free,
  output logic                 ic_req_valid,
  output logic [1:0]           ic_req_op,
  output logic [29:0]          ic_req_addr,
  output line_t                ic_req_line,
  input  logic                 ic_resp_valid,
  input  logic [1:0]           ic_resp_op,
  input  logic                 ic_resp_hit,
  input  line_t                ic_resp_line,
  // L2
  output logic                 l2_req_valid,
  output logic [29:0]          l2_req_addr,
  input  logic                 l2_gnt,
  input  logic                 l2_resp_valid,
  input  line_t                l2_resp_line,
  // to next-PC selection
  output logic                 hit,
  output bbc_entry_t           entry,
  // events
  output logic                 ev_miss,
  output logic                 ev_refill
);
  typedef enum logic [2:0] {D_IDLE, D_WAIT, D_RESP, D_L2REQ, D_L2WAIT, D_FILL} dstate_e;
  localparam logic [1:0] OP_READ = 2'd0, OP_FILL = 2'd2;

  dstate_e      state_q;
  logic [29:0]  line_addr_q;
  line_t        line_q;

  function automatic logic [29:0] line_of(input logic [29:0] a);
    return {a[29:LINE_OFF_W], {LINE_OFF_W{1'b0}}};
  endfunction

  logic issue;
  assign issue = (state_q == D_IDLE) && !redirect && bbq_ready && port_free;

  always_comb begin
    ic_req_valid = 1'b0;
    ic_req_op    = OP_READ;
    ic_req_addr  = line_of(pc);
    ic_req_line  = line_q;
    if (issue) begin
      ic_req_valid = 1'b1;
    end else if (state_q == D_FILL && port_free) begin
      ic_req_valid = 1'b1;
      ic_req_op    = OP_FILL;
      ic_req_addr  = line_addr_q;
    end
  end

  logic resp_here;
  assign resp_here = (state_q == D_RESP) && ic_resp_valid && ic_resp_op == OP_READ && !redirect;
  assign hit       = resp_here && ic_resp_hit;
  assign entry     = bbd_to_entry(pc, bbd_t'(ic_resp_line[32*int'(pc[LINE_OFF_W-1:0]) +: 32]));
  assign ev_miss   = resp_here && !ic_resp_hit;
  assign ev_refill = (state_q == D_FILL) && port_free;

  assign l2_req_valid = (state_q == D_L2REQ);
  assign l2_req_addr  = line_addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= D_IDLE;
      line_addr_q <= '0;
      line_q      <= '0;
    end else begin
      unique case (state_q)
        D_IDLE:  if (issue) state_q <= D_WAIT;
        D_WAIT:  state_q <= redirect ? D_IDLE : D_RESP;
        D_RESP: begin
          if (resp_here && !ic_resp_hit) begin
            line_addr_q <= line_of(pc);
            state_q     <= D_L2REQ;
          end else begin
            state_q     <= D_IDLE;
          end
        end
        D_L2REQ:  if (redirect) state_q <= D_IDLE;
                  else if (l2_gnt) state_q <= D_L2WAIT;
        D_L2WAIT: if (l2_resp_valid) begin
                    line_q  <= l2_resp_line;
                    state_q <= D_FILL;
                  end
        D_FILL:   if (port_free) state_q <= D_IDLE;
        default:  state_q <= D_IDLE;
      endcase
    end
  end

endmodule
