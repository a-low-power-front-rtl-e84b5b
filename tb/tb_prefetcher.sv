// tb_prefetcher: self-checking test of the BBQ-driven prefetcher.
// The prefetcher runs against the real I-cache and the L2 stand-in while the
// testbench plays the BBQ. Checks: the head block (position 0) is never
// examined; no probe is issued while the cache port is busy; a block whose
// line is in the I-cache is probed and not prefetched; a block whose line is
// missing is probed, fetched from L2 and then found in the prefetch buffer
// with the right data; each examined block is marked; taking a line out of
// the buffer removes it; a block whose line is already buffered is marked
// without a probe.
module tb_prefetcher;
  import bliss_pkg::*;
  logic clk = 0, rst_n = 0;
  logic flush = 0;
  logic [2:0] bbq_count;
  bbq_entry_t bbq_entries [4];
  logic bbq_checked [4];
  logic mark_valid;
  logic [1:0] mark_pos;
  logic port_free;
  logic pf_ic_valid;
  logic [29:0] pf_ic_addr;
  logic [2:0] pf_ic_hints;
  logic ic_resp_valid, ic_resp_hit;
  logic [1:0] ic_resp_op;
  logic [29:0] ic_resp_addr;
  line_t ic_resp_line;
  logic l2_req_valid, l2_gnt, l2_resp_valid, l2_ready;
  logic [29:0] l2_req_addr;
  line_t l2_resp_line;
  logic [29:0] pb_addr;
  logic pb_hit, pb_take;
  line_t pb_line;
  logic ev_probe, ev_prefetch;
  int checks = 0, failures = 0, probes = 0, prefetches = 0;

  // testbench side of the I-cache port (fills)
  logic tb_ic_valid = 0;
  logic [29:0] tb_ic_addr;
  line_t tb_ic_line;

  prefetcher #(.BBQ_DEPTH(4), .PB_ENTRIES(4)) dut (
    .clk, .rst_n, .flush, .bbq_count, .bbq_entries, .bbq_checked, .mark_valid, .mark_pos,
    .port_free, .ic_req_valid(pf_ic_valid), .ic_req_addr(pf_ic_addr), .ic_req_hints(pf_ic_hints),
    .ic_resp_valid, .ic_resp_op, .ic_resp_hit, .l2_req_valid, .l2_req_addr, .l2_gnt,
    .l2_resp_valid, .l2_resp_line, .pb_addr, .pb_hit, .pb_line, .pb_take, .ev_probe, .ev_prefetch);

  icache u_ic (.clk, .rst_n, .req_valid(tb_ic_valid || pf_ic_valid), .req_op(tb_ic_valid ? 2'd2 : 2'd1),
               .req_addr(tb_ic_valid ? tb_ic_addr : pf_ic_addr), .req_hints(tb_ic_valid ? 3'd0 : pf_ic_hints),
               .req_line(tb_ic_line), .resp_valid(ic_resp_valid), .resp_op(ic_resp_op),
               .resp_addr(ic_resp_addr), .resp_hit(ic_resp_hit), .resp_line(ic_resp_line));

  l2_model u_l2 (.clk, .rst_n, .req_valid(l2_req_valid), .req_addr(l2_req_addr), .req_ready(l2_ready),
                 .resp_valid(l2_resp_valid), .resp_line(l2_resp_line));
  assign l2_gnt = l2_req_valid && l2_ready;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (ev_probe) probes++;
    if (ev_prefetch) prefetches++;
    if (mark_valid) bbq_checked[mark_pos] <= 1'b1;
  end
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bbq_entry_t blk(input logic [29:0] ia);
    return '{pc: ia, btype: BT_FT, iaddr: ia, len: 4'd4, hints: 3'd0, pred_taken: 0, pred_next: 0};
  endfunction

  function automatic line_t pattern(input logic [29:0] a);
    line_t l;
    for (int i = 0; i < 8; i++) l[32*i +: 32] = 32'hA500_0000 ^ {2'b0, a[29:3], 3'(i)};
    return l;
  endfunction

  initial begin
    port_free = 0; pb_take = 0; pb_addr = 0; bbq_count = 0;
    for (int i = 0; i < 4; i++) begin bbq_entries[i] = '0; bbq_checked[i] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // line 0x2000 already cached
    tb_ic_valid = 1; tb_ic_addr = 30'h2000; tb_ic_line = pattern(30'h2000);
    @(posedge clk); #1 tb_ic_valid = 0;
    // BBQ: head 0x1000 (must be ignored), then 0x2000 (cached), 0x3004 (missing)
    bbq_entries[0] = blk(30'h1000); bbq_entries[1] = blk(30'h2003); bbq_entries[2] = blk(30'h3004);
    bbq_count = 3;
    repeat (5) @(posedge clk); #1;
    check(probes == 0, "no probe while the port is busy");
    port_free = 1;
    repeat (40) @(posedge clk); #1;
    check(probes == 2, $sformatf("two probes, saw %0d", probes));
    check(prefetches == 1, $sformatf("one prefetch, saw %0d", prefetches));
    check(!bbq_checked[0] && bbq_checked[1] && bbq_checked[2], "entries 1 and 2 marked, head not");
    pb_addr = 30'h3000; #1;
    check(pb_hit && pb_line == pattern(30'h3000), "prefetched line in buffer");
    pb_addr = 30'h2000; #1;
    check(!pb_hit, "cached line not prefetched");
    pb_addr = 30'h1000; #1;
    check(!pb_hit, "head line not prefetched");
    // another block on the buffered line: marked without probe
    bbq_entries[3] = blk(30'h3006); bbq_count = 4;
    repeat (5) @(posedge clk); #1;
    check(bbq_checked[3] && probes == 2, "buffered line needs no probe");
    // take the line
    pb_addr = 30'h3000; pb_take = 1; @(posedge clk); #1 pb_take = 0;
    check(!pb_hit, "taken line leaves the buffer");
    // many misses: buffer keeps the 4 most recent
    for (int n = 0; n < 6; n++) begin
      bbq_checked[1] = 0; bbq_entries[1] = blk(30'h4000 + 30'(8 * n)); bbq_count = 2;
      repeat (20) @(posedge clk); #1;
    end
    check(prefetches == 7, $sformatf("seven prefetches, saw %0d", prefetches));
    for (int n = 0; n < 6; n++) begin
      pb_addr = 30'h4000 + 30'(8 * n); #1;
      check(pb_hit == (n >= 2), $sformatf("buffer holds line %0d: %b", n, pb_hit));
      if (pb_hit) check(pb_line == pattern(pb_addr), "buffer data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
