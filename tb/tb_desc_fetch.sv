// tb_desc_fetch: self-checking test of descriptor fetch through the shared
// cache (unified configuration).
// desc_fetch runs against the real I-cache and the L2 stand-in, which holds
// a line of hand-made descriptors. Checks: no cache request while the port
// is taken or the BBQ is full; a first lookup misses, reads the descriptor
// line from L2 once, writes it into the cache and then hits; every hit
// presents the descriptor at the PC with its target already computed
// (checked against a fixed expected target for one descriptor); other PCs in
// the same line hit with no further L2 traffic; with the PC held the unit
// delivers one descriptor every three cycles; a redirect during a lookup
// drops it without a hit or a miss.
module tb_desc_fetch;
  import bliss_pkg::*;
  logic clk = 0, rst_n = 0;
  logic redirect = 0, bbq_ready = 0, port_free = 0;
  logic [29:0] pc = '0;
  logic df_valid;
  logic [1:0] df_op;
  logic [29:0] df_addr;
  line_t df_line;
  logic ic_resp_valid, ic_resp_hit;
  logic [1:0] ic_resp_op;
  logic [29:0] ic_resp_addr;
  line_t ic_resp_line;
  logic l2_req_valid, l2_ready, l2_gnt, l2_resp_valid;
  logic [29:0] l2_req_addr;
  line_t l2_resp_line;
  logic hit, ev_miss, ev_refill;
  bbc_entry_t entry;
  int checks = 0, failures = 0;
  int hits = 0, misses = 0, refills = 0, busy_reqs = 0, bad_entries = 0;

  desc_fetch dut (
    .clk, .rst_n, .redirect, .pc, .bbq_ready, .port_free,
    .ic_req_valid(df_valid), .ic_req_op(df_op), .ic_req_addr(df_addr), .ic_req_line(df_line),
    .ic_resp_valid, .ic_resp_op, .ic_resp_hit, .ic_resp_line,
    .l2_req_valid, .l2_req_addr, .l2_gnt, .l2_resp_valid, .l2_resp_line,
    .hit, .entry, .ev_miss, .ev_refill);

  icache u_ic (.clk, .rst_n, .req_valid(df_valid), .req_op(df_op), .req_addr(df_addr),
               .req_hints(3'd0), .req_line(df_line), .resp_valid(ic_resp_valid),
               .resp_op(ic_resp_op), .resp_addr(ic_resp_addr), .resp_hit(ic_resp_hit),
               .resp_line(ic_resp_line));

  l2_model u_l2 (.clk, .rst_n, .req_valid(l2_req_valid), .req_addr(l2_req_addr), .req_ready(l2_ready),
                 .resp_valid(l2_resp_valid), .resp_line(l2_resp_line));
  assign l2_gnt = l2_req_valid && l2_ready;

  always #5 clk = ~clk;

  // monitors, sampled just before each edge
  always @(negedge clk) if (rst_n) begin
    if (df_valid && !port_free) busy_reqs++;
    if (hit) begin
      hits++;
      if (entry != bbd_to_entry(pc, bbd_t'(u_l2.word_at(pc)))) bad_entries++;
    end
    if (ev_miss) misses++;
    if (ev_refill) refills++;
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

  function automatic logic [31:0] desc(input bb_type_e t, input logic [7:0] off,
                                       input logic [3:0] len, input logic [12:0] iptr,
                                       input logic [2:0] h);
    bbd_t d;
    d = '{btype: t, offset: off, len: len, iptr: iptr, hints: h};
    return d;
  endfunction

  initial begin
    int h0, r0;
    // descriptor line at 0x40: 0x42 is a backward branch to 0x40
    for (int i = 0; i < 8; i++)
      u_l2.dmem[30'h40 + 30'(i)] = desc(BT_FT, 8'(i), 4'(i + 1), 13'h100 + 13'(16 * i), 3'(i));
    u_l2.dmem[30'h42] = desc(BT_B, 8'hFE, 4'd5, 13'h1234, 3'd5);
    repeat (2) @(posedge clk); #1 rst_n = 1;
    pc = 30'h42;
    // port taken, then BBQ full: nothing may be issued
    bbq_ready = 1; port_free = 0;
    repeat (10) @(posedge clk); #1;
    bbq_ready = 0; port_free = 1;
    repeat (10) @(posedge clk); #1;
    check(busy_reqs == 0 && !df_valid, "no request while the port is taken");
    check(hits == 0 && misses == 0, "no lookup while the BBQ is full");
    // first lookup: miss, L2 read, fill, then a hit
    bbq_ready = 1;
    wait (hit); #1;
    check(misses == 1, $sformatf("one miss before the first hit, saw %0d", misses));
    check(refills == 1, "one line written into the cache");
    check(u_l2.requests == 1, "one L2 read");
    check(entry.btype == BT_B && entry.target == 30'h40 && entry.len == 4'd5 &&
          entry.iptr == 13'h1234 && entry.hints == 3'd5, "descriptor decoded with its target");
    // PC held: a descriptor every three cycles
    @(posedge clk); #1;
    h0 = hits;
    repeat (30) @(posedge clk); #1;
    check(hits - h0 == 10, $sformatf("ten lookups in thirty cycles, saw %0d", hits - h0));
    // other descriptors of the same line hit with no L2 traffic
    r0 = int'(u_l2.requests);
    for (int i = 0; i < 8; i++) begin
      pc = 30'h40 + 30'(i);
      h0 = hits;
      repeat (6) @(posedge clk); #1;
      check(hits > h0, $sformatf("descriptor %0d found", i));
    end
    check(int'(u_l2.requests) == r0 && misses == 1, "same line, no new miss");
    // redirect while a lookup of an uncached line is in flight
    pc = 30'h80;
    wait (df_valid); @(posedge clk); #1;
    redirect = 1; pc = 30'h41;
    @(posedge clk); #1 redirect = 0;
    check(misses == 1, "redirected lookup reports no miss");
    h0 = hits;
    repeat (6) @(posedge clk); #1;
    check(hits > h0, "lookups resume after the redirect");
    check(bad_entries == 0, $sformatf("%0d hits with a wrong descriptor", bad_entries));
    check(busy_reqs == 0, "port rule held throughout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
