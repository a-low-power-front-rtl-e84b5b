// frontend_harness: end-to-end test of the BLISS front-end (testbench only).
//
// A small BLISS program is placed in the L2 stand-in: a nested loop, a call
// to a function containing a data-dependent branch, a return, jumps, an
// empty block and blocks that cross cache lines. The instruction lines of
// the blocks share one address index, so without hints they fight over one
// two-way I-cache set; each descriptor carries different hint bits.
// A back-end model accepts packets (with random stalls), executes the
// program's control flow itself, checks that every block arrives in program
// order with the right instruction words, trains the predictor on every
// conditional block and redirects the front-end whenever the prediction
// carried with the block is wrong. It counts each front-end mechanism and
// fails if one never happened. OUTER sets the outer loop trip count;
// HINT_MODE, UNIFIED and the cache sizes select the front-end configuration
// (defaults: the front-end's own defaults, instantiated without a parameter
// list). The wrapping testbench holds the watchdog, reports checks/failures
// and ends the run once done is set.
module frontend_harness
  import bliss_pkg::*;
#(
  parameter hint_mode_e HINT_MODE = HINTS_REDISTRIBUTE,
  parameter bit         UNIFIED   = 1'b1,
  parameter int         OUTER     = 30,
  // sizes used only by the non-default instance
  parameter int unsigned IC_SIZE  = 2048,
  parameter int unsigned IC_WAYS  = 2,
  parameter int unsigned BBC_SETS = 16,
  parameter int unsigned BBC_WAYS = 2,
  // the program fits in the instruction cache: expect cold misses only, so
  // prefetch-buffer hits are not required
  parameter bit          FITS_L1  = 1'b0
);
  logic clk = 0, rst_n = 0;
  logic pkt_valid, pkt_ready;
  fetch_pkt_t pkt;
  logic redirect_valid, bp_upd_valid, bp_upd_taken;
  logic [29:0] redirect_pc, bp_upd_pc;
  logic l2_req_valid, l2_req_ready, l2_resp_valid;
  logic [29:0] l2_req_addr;
  line_t l2_resp_line;
  fe_events_t ev;
  int checks = 0, failures = 0, cycle = 0;
  logic done = 0;   // set at the end of the run or by the watchdog

  localparam bit DEFAULTS = HINT_MODE == HINTS_REDISTRIBUTE && UNIFIED && IC_SIZE == 2048 &&
                           IC_WAYS == 2 && BBC_SETS == 16 && BBC_WAYS == 2;
  if (DEFAULTS) begin : g_default
    bliss_frontend dut (.*);
  end else begin : g_mode
    bliss_frontend #(.HINT_MODE(HINT_MODE), .UNIFIED(UNIFIED), .IC_SIZE(IC_SIZE),
                     .IC_WAYS(IC_WAYS), .BBC_SETS(BBC_SETS), .BBC_WAYS(BBC_WAYS)) dut (.*);
  end

  l2_model u_l2 (.clk, .rst_n, .req_valid(l2_req_valid), .req_addr(l2_req_addr),
                 .req_ready(l2_req_ready), .resp_valid(l2_resp_valid), .resp_line(l2_resp_line));

  always #5 clk = ~clk;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // ---------------- program ----------------
  localparam logic [29:0] D = 30'h0;     // descriptor base = reset PC
  typedef struct {
    bb_type_e    t;
    int          off;
    int          len;
    logic [12:0] iptr;
    logic [2:0]  hints;
  } desc_s;
  desc_s prog [logic [29:0]];

  task automatic put(input int k, input bb_type_e t, input int off, input int len,
                     input logic [12:0] iptr, input logic [2:0] h);
    bbd_t w;
    prog[D + 30'(k)] = '{t, off, len, iptr, h};
    w = '{btype: t, offset: 8'(off), len: 4'(len), iptr: iptr, hints: h};
    u_l2.dmem[D + 30'(k)] = w;
  endtask

  initial begin
    put(0,  BT_FT,   0, 5,  13'h0100, 3'd0);
    put(1,  BT_LOOP, 0, 6,  13'h0200, 3'd1);   // inner loop on itself
    put(2,  BT_JAL,  8, 3,  13'h0300, 3'd2);   // call D+10
    put(3,  BT_J,    2, 2,  13'h0400, 3'd3);   // skip D+4
    put(4,  BT_FT,   0, 1,  13'h0500, 3'd0);   // never executed
    put(5,  BT_LOOP, -5, 9, 13'h0606, 3'd4);   // outer loop back to D+0
    put(6,  BT_J,    0, 0,  13'h0700, 3'd0);   // end: spins on itself
    put(10, BT_FT,   0, 12, 13'h0104, 3'd5);
    put(11, BT_B,    2, 2,  13'h0800, 3'd0);   // taken on odd calls
    put(12, BT_FT,   0, 1,  13'h0900, 3'd0);
    put(13, BT_RET,  0, 4,  13'h0a00, 3'd0);
  end

  // architectural interpreter state
  int inner = 0, outer = 0, calls = 0;
  logic [29:0] ret_stack [$];

  function automatic logic [29:0] exec_next(input logic [29:0] pc, output logic taken);
    desc_s d;
    d = prog[pc];
    taken = 0;
    case (d.t)
      BT_FT:  return pc + 1;
      BT_J:   return pc + 30'(d.off);
      BT_JAL: begin ret_stack.push_back(pc + 1); calls++; return pc + 30'(d.off); end
      BT_RET: return ret_stack.pop_back();
      BT_B: begin taken = calls[0]; return taken ? pc + 30'(d.off) : pc + 1; end
      BT_LOOP: begin
        if (pc == D + 1) begin
          taken = (inner < 3);
          inner = taken ? inner + 1 : 0;
        end else begin
          taken = (outer < OUTER - 1);
          outer = outer + 1;
        end
        return taken ? pc + 30'(d.off) : pc + 1;
      end
      default: return pc + 1;
    endcase
  endfunction

  // ---------------- back-end model ----------------
  logic [29:0] exp_pc = D;
  int          done_words = 0;
  int          blocks = 0, redirects = 0;
  logic        redirect_q = 0;
  bit          redirect_pending = 0;
  logic [29:0] redirect_pc_q;
  int          n_ev [13];
  bit          finished = 0;

  assign redirect_valid = redirect_q;
  assign redirect_pc    = redirect_pc_q;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      n_ev[0]  += ev.bbc_hit;   n_ev[1]  += ev.bbc_miss; n_ev[2]  += ev.bbc_refill;
      n_ev[3]  += ev.bbq_full;  n_ev[4]  += ev.redirect; n_ev[5]  += ev.ras_push;
      n_ev[6]  += ev.ras_pop;   n_ev[7]  += ev.pred_taken; n_ev[8] += ev.ic_miss;
      n_ev[9]  += ev.pb_hit;    n_ev[10] += ev.probe;    n_ev[11] += ev.prefetch;
      n_ev[12] += ev.line_reuse;
    end
  end

  initial begin
    foreach (n_ev[i]) n_ev[i] = 0;
    pkt_ready = 0; bp_upd_valid = 0; bp_upd_pc = 0; bp_upd_taken = 0; redirect_pc_q = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (!finished) begin
      // inputs change on the falling edge, away from the sampling edge
      @(negedge clk);
      bp_upd_valid = 0;
      redirect_q   = 0;
      if (redirect_pending) begin
        // one cycle of redirect, no packet accepted
        pkt_ready        = 0;
        redirect_q       = 1;
        redirect_pending = 0;
        continue;
      end
      pkt_ready = ($urandom_range(3) != 0);
      #1;
      if (pkt_valid && pkt_ready) begin
        desc_s d;
        logic [29:0] ia;
        logic taken;
        logic [29:0] nxt;
        d = prog.exists(pkt.pc) ? prog[pkt.pc] : '{BT_FT, 0, 0, 13'h0, 3'h0};
        check(pkt.pc == exp_pc, $sformatf("block %h arrived, expected %h", pkt.pc, exp_pc));
        ia = {exp_pc[29:13], d.iptr} + 30'(done_words);
        check(pkt.iaddr == ia, $sformatf("packet address %h expected %h", pkt.iaddr, ia));
        for (int i = 0; i < int'(pkt.count); i++)
          check(pkt.words[32*i +: 32] == u_l2.instr_word(ia + 30'(i)), "instruction word");
        done_words += int'(pkt.count);
        check(pkt.last == (done_words == d.len), "last packet flag");
        if (pkt.last) begin
          nxt = exec_next(exp_pc, taken);
          blocks++;
          bp_upd_valid = (d.t == BT_B || d.t == BT_LOOP);
          bp_upd_pc    = exp_pc;
          bp_upd_taken = taken;
          if (pkt.pred_next != nxt) begin
            redirect_pc_q    = nxt;
            redirect_pending = 1;
            redirects++;
          end
          exp_pc     = nxt;
          done_words = 0;
          if (exp_pc == D + 6) finished = 1;
        end
      end
    end
    pkt_ready = 0;
    repeat (2) @(posedge clk);
    check(outer == OUTER, $sformatf("outer loop ran %0d times", outer));
    $display("cycles=%0d blocks=%0d redirects=%0d", cycle, blocks, redirects);
    $display("events: bbc_hit=%0d bbc_miss=%0d bbc_refill=%0d bbq_full=%0d redirect=%0d ras_push=%0d ras_pop=%0d pred_taken=%0d ic_miss=%0d pb_hit=%0d probe=%0d prefetch=%0d line_reuse=%0d",
             n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5], n_ev[6], n_ev[7], n_ev[8], n_ev[9], n_ev[10], n_ev[11], n_ev[12]);
    for (int i = 0; i < 13; i++)
      if (!(FITS_L1 && i == 9)) check(n_ev[i] > 0, $sformatf("event %0d happened", i));
    if (FITS_L1) check(n_ev[8] <= 16, $sformatf("only cold misses, saw %0d", n_ev[8]));
    check(n_ev[4] == redirects - int'(redirect_pending), "every misprediction caused one redirect");
    done = 1;
  end
endmodule
