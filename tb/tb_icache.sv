// tb_icache: self-checking test of the pipelined I-cache.
// Checks: a READ answers exactly two cycles after the request; misses before
// a fill, hits with the filled line after; PROBE reports hit/miss without
// data; back-to-back reads return in order; a third line in a two-way set
// evicts the least recently used one; with hint redistribution, blocks that
// share an address index but carry different hints land in different sets
// and no longer evict each other; a READ whose hit way is replaced by a FILL
// in the next cycle reports a miss rather than the new line's data.
module tb_icache;
  import bliss_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid, resp_valid, resp_hit;
  logic [1:0] req_op, resp_op;
  logic [29:0] req_addr, resp_addr;
  logic [2:0] req_hints;
  line_t req_line, resp_line;
  int checks = 0, failures = 0;
  int cycle = 0;

  icache #(.SIZE_BYTES(2048), .WAYS(2), .HINT_MODE(HINTS_REDISTRIBUTE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
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

  function automatic line_t pattern(input logic [29:0] a);
    line_t l;
    for (int i = 0; i < 8; i++) l[32*i +: 32] = {a[29:3], 3'(i)} ^ 32'hC0DE_0000;
    return l;
  endfunction

  task automatic fill(input logic [29:0] a, input logic [2:0] h);
    req_valid = 1; req_op = 2; req_addr = a; req_hints = h; req_line = pattern(a);
    @(posedge clk); #1 req_valid = 0;
  endtask

  // issue a READ or PROBE and check the response two cycles later
  task automatic access(input logic [1:0] op, input logic [29:0] a, input logic [2:0] h,
                        input logic exp_hit);
    int t0;
    req_valid = 1; req_op = op; req_addr = a; req_hints = h;
    t0 = cycle;
    @(posedge clk); #1 req_valid = 0;
    check(!resp_valid, "no response after one cycle");
    @(posedge clk); #1;
    check(resp_valid && cycle - t0 == 2, "response two cycles after the request");
    check(resp_op == op && resp_addr == a, "response op/addr");
    check(resp_hit == exp_hit, $sformatf("hit=%b expected %b for %h", resp_hit, exp_hit, a));
    if (op == 0 && exp_hit) check(resp_line == pattern(a), "line data");
  endtask

  initial begin
    req_valid = 0; req_op = 0; req_addr = 0; req_hints = 0; req_line = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    access(0, 30'h100, 0, 0);
    fill(30'h100, 0);
    access(0, 30'h103, 0, 1);        // same line, other word
    access(1, 30'h100, 0, 1);        // probe
    access(1, 30'h200, 0, 0);
    // back-to-back reads: three requests in three cycles
    fill(30'h208, 0); fill(30'h210, 0);
    req_valid = 1; req_op = 0; req_hints = 0;
    req_addr = 30'h100; @(posedge clk); #1;
    req_addr = 30'h208; @(posedge clk); #1;
    check(resp_valid && resp_hit && resp_addr == 30'h100 && resp_line == pattern(30'h100), "pipelined 1");
    req_addr = 30'h210; @(posedge clk); #1; req_valid = 0;
    check(resp_valid && resp_hit && resp_addr == 30'h208 && resp_line == pattern(30'h208), "pipelined 2");
    @(posedge clk); #1;
    check(resp_valid && resp_hit && resp_addr == 30'h210 && resp_line == pattern(30'h210), "pipelined 3");
    @(posedge clk); #1;
    // 32 sets: lines 0x1000, 0x1100, 0x1200 share set 0 (word address bits [7:3])
    fill(30'h1000, 0); fill(30'h1100, 0);
    access(0, 30'h1000, 0, 1);       // 0x1100 now least recently used
    fill(30'h1200, 0);
    access(1, 30'h1000, 0, 1);
    access(1, 30'h1100, 0, 0);
    access(1, 30'h1200, 0, 1);
    // redistribution: same address index, different hints -> different sets
    fill(30'h2000, 1); fill(30'h2100, 2); fill(30'h2200, 3); fill(30'h2300, 4);
    access(0, 30'h2000, 1, 1);
    access(0, 30'h2100, 2, 1);
    access(0, 30'h2200, 3, 1);
    access(0, 30'h2300, 4, 1);
    access(1, 30'h2000, 0, 0);       // looked up with other hints: other set
    // fill right behind a read, replacing the way the read hit in (set 5)
    fill(30'h3028, 0); fill(30'h3128, 0);   // victim pointer back on way 0
    req_valid = 1; req_op = 0; req_addr = 30'h3028; req_hints = 0;
    @(posedge clk); #1;
    req_op = 2; req_addr = 30'h3228; req_line = pattern(30'h3228);
    @(posedge clk); #1 req_valid = 0;
    check(resp_valid && resp_addr == 30'h3028 && !resp_hit, "read overtaken by a fill misses");
    @(posedge clk); #1;
    access(0, 30'h3228, 0, 1);
    access(0, 30'h3128, 0, 1);
    access(1, 30'h3028, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
