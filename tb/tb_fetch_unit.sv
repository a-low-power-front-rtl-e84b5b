// tb_fetch_unit: self-checking test of BBQ-driven instruction fetch.
// The fetch unit runs against the real I-cache, the L2 stand-in and a
// one-line prefetch buffer kept by the testbench. A stream of blocks (some
// crossing cache lines, one of length 0, some repeated) is fed as the BBQ
// head; every packet is compared with the expected split of each block into
// line-sized pieces and with the instruction values the L2 stand-in returns.
// Also checked: a block starting in the line just delivered is served from
// the one-line buffer in one cycle with no cache access; a block whose line
// is cached (but not buffered) hits and takes exactly three cycles from head
// to packet; a miss whose line sits in the prefetch buffer
// is served from it without L2; a flush abandons a block.
module tb_fetch_unit;
  import bliss_pkg::*;
  logic clk = 0, rst_n = 0;
  logic flush = 0, head_valid, pop;
  bbq_entry_t head;
  logic ic_req_valid, ic_resp_valid, ic_resp_hit;
  logic [1:0] ic_req_op, ic_resp_op;
  logic [29:0] ic_req_addr, ic_resp_addr;
  logic [2:0] ic_req_hints;
  line_t ic_req_line, ic_resp_line;
  logic [29:0] pb_addr;
  logic pb_hit, pb_take;
  line_t pb_line;
  logic l2_req_valid, l2_gnt, l2_resp_valid, l2_ready;
  logic [29:0] l2_req_addr;
  line_t l2_resp_line;
  logic pkt_valid, pkt_ready;
  fetch_pkt_t pkt;
  logic ev_ic_miss, ev_pb_hit, ev_line_reuse;
  int checks = 0, failures = 0, cycle = 0;
  int misses = 0, pbhits = 0, reuses = 0, reads = 0;

  fetch_unit #(.HINT_MODE(HINTS_REDISTRIBUTE)) dut (.*);

  icache u_ic (.clk, .rst_n, .req_valid(ic_req_valid), .req_op(ic_req_op), .req_addr(ic_req_addr),
               .req_hints(ic_req_hints), .req_line(ic_req_line), .resp_valid(ic_resp_valid),
               .resp_op(ic_resp_op), .resp_addr(ic_resp_addr), .resp_hit(ic_resp_hit),
               .resp_line(ic_resp_line));

  l2_model u_l2 (.clk, .rst_n, .req_valid(l2_req_valid), .req_addr(l2_req_addr), .req_ready(l2_ready),
                 .resp_valid(l2_resp_valid), .resp_line(l2_resp_line));
  assign l2_gnt = l2_req_valid && l2_ready;

  // one-line prefetch buffer stand-in
  logic        pbv = 0;
  logic [29:0] pbtag;
  assign pb_hit = pbv && pbtag == {pb_addr[29:3], 3'b0};
  always_comb for (int i = 0; i < 8; i++) pb_line[32*i +: 32] = 32'hA500_0000 ^ {2'b0, pbtag + 30'(i)};
  always @(posedge clk) if (pb_take) pbv <= 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (ev_ic_miss) misses++;
    if (ev_pb_hit) pbhits++;
    if (ev_line_reuse) reuses++;
    if (ic_req_valid && ic_req_op == 2'd0) reads++;
  end
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  bbq_entry_t q [$];
  assign head_valid = q.size() > 0;
  assign head = q.size() > 0 ? q[0] : '0;
  always @(posedge clk) if (pop) void'(q.pop_front());

  function automatic bbq_entry_t blk(input logic [29:0] pc, input logic [29:0] ia, input logic [3:0] len);
    return '{pc: pc, btype: BT_FT, iaddr: ia, len: len, hints: 3'(pc), pred_taken: 0, pred_next: pc + 1};
  endfunction

  // run one block through, check its packets; returns cycles to first packet
  task automatic run_block(input bbq_entry_t b, output int lat);
    int t0, done;
    logic [29:0] a;
    int exp_cnt;
    q.push_back(b);
    t0 = cycle; done = 0; lat = -1;
    while (1) begin
      pkt_ready = $urandom_range(3) != 0;
      @(posedge clk); #1;
      if (pkt_valid && pkt_ready) ;  // consumed on the previous edge is handled below
      if (pkt_valid) begin
        if (lat < 0) lat = cycle - t0;
        a = b.iaddr + 30'(done);
        exp_cnt = 8 - int'(a[2:0]);
        if (exp_cnt > int'(b.len) - done) exp_cnt = int'(b.len) - done;
        check(pkt.pc == b.pc && pkt.iaddr == a && int'(pkt.count) == exp_cnt, 
              $sformatf("packet of block %h: addr %h cnt %0d exp %h %0d", b.pc, pkt.iaddr, pkt.count, a, exp_cnt));
        check(pkt.last == (done + exp_cnt == int'(b.len)), "last flag");
        for (int i = 0; i < exp_cnt; i++)
          check(pkt.words[32*i +: 32] == (32'hA500_0000 ^ {2'b0, a + 30'(i)}), "instruction word");
        // wait for acceptance
        while (!pkt_ready) begin pkt_ready = $urandom_range(1); if (!pkt_ready) @(posedge clk); #0; end
        @(posedge clk); #1;
        pkt_ready = 0;
        done += exp_cnt;
        if (done >= int'(b.len)) break;
      end
    end
    pkt_ready = 0;
    check(q.size() == 0, "block popped after its last packet");
  endtask

  int lat, r0;
  initial begin
    pkt_ready = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    run_block(blk(30'h40, 30'h1000, 4'd4), lat);           // cold miss
    check(lat > 5, "cold miss goes to L2");
    r0 = reads;
    run_block(blk(30'h44, 30'h1004, 4'd4), lat);           // same line: reused
    check(lat == 1 && reuses == 1 && reads == r0, $sformatf("line reuse: latency %0d, reads %0d", lat, reads - r0));
    run_block(blk(30'h41, 30'h1006, 4'd15), lat);          // spans three lines
    run_block(blk(30'h40, 30'h1000, 4'd4), lat);           // cached, not buffered
    check(lat == 3, $sformatf("hit latency %0d, expected 3", lat));
    run_block(blk(30'h42, 30'h1020, 4'd0), lat);           // empty block
    check(lat == 1, "empty block packet next cycle");
    // prefetch buffer holds line 0x3000
    pbv = 1; pbtag = 30'h3000;
    run_block(blk(30'h43, 30'h3002, 4'd3), lat);
    check(lat == 3 && pbhits == 1, "miss served from prefetch buffer");
    run_block(blk(30'h40, 30'h1000, 4'd4), lat);           // move the buffer away
    run_block(blk(30'h43, 30'h3002, 4'd3), lat);
    check(lat == 3 && pbhits == 1, "prefetched line was written to the cache");
    for (int n = 0; n < 40; n++)
      run_block(blk(30'(n), 30'h5000 + 30'($urandom_range(200)), 4'($urandom_range(15))), lat);
    // flush while a miss is outstanding
    q.push_back(blk(30'h99, 30'h7000, 4'd5));
    repeat (6) @(posedge clk);
    #1 flush = 1; q.delete();
    @(posedge clk); #1 flush = 0;
    repeat (12) @(posedge clk); #1;
    check(!pkt_valid, "flushed block delivers nothing");
    run_block(blk(30'h99, 30'h7000, 4'd5), lat);
    check(lat == 3, $sformatf("refill completed into the cache despite the flush (%0d)", lat));
    check(misses > 3, "misses happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
