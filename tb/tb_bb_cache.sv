// tb_bb_cache: self-checking test of the descriptor cache.
// Fills descriptors, checks same-cycle lookup hits, the stored PC-relative
// target (positive and negative offsets), misses on other tags, and that a
// third block mapping to a two-way set evicts the least recently used one.
module tb_bb_cache;
  import bliss_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [29:0] lookup_pc, fill_pc;
  logic hit, fill_valid;
  bbc_entry_t entry;
  logic [0:0] hit_way;
  bbd_t fill_bbd;
  int checks = 0, failures = 0;

  bb_cache #(.SETS(16), .WAYS(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic fill(input logic [29:0] pc, input bb_type_e t, input logic [7:0] off,
                      input logic [3:0] len, input logic [12:0] iptr, input logic [2:0] h);
    fill_pc    = pc;
    fill_bbd   = '{btype: t, offset: off, len: len, iptr: iptr, hints: h};
    fill_valid = 1;
    @(posedge clk); #1;
    fill_valid = 0;
  endtask

  task automatic expect_hit(input logic [29:0] pc, input bb_type_e t, input logic [29:0] tgt,
                            input logic [3:0] len, input logic [12:0] iptr, input logic [2:0] h);
    lookup_pc = pc; #1;
    check(hit, $sformatf("hit at %h", pc));
    check(entry.btype == t && entry.target == tgt && entry.len == len &&
          entry.iptr == iptr && entry.hints == h, $sformatf("entry at %h", pc));
  endtask

  task automatic expect_miss(input logic [29:0] pc);
    lookup_pc = pc; #1;
    check(!hit, $sformatf("miss at %h", pc));
  endtask

  initial begin
    fill_valid = 0; lookup_pc = 0; fill_pc = 0; fill_bbd = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    expect_miss(30'h10);
    fill(30'h10, BT_B, 8'h05, 4'd3, 13'h123, 3'd2);
    expect_hit(30'h10, BT_B, 30'h15, 4'd3, 13'h123, 3'd2);
    fill(30'h23, BT_J, 8'hFE, 4'd7, 13'h0AA, 3'd0);           // offset -2
    expect_hit(30'h23, BT_J, 30'h21, 4'd7, 13'h0AA, 3'd0);
    expect_miss(30'h33);                                        // same set, other tag
    // set 0: two ways
    fill(30'h100, BT_FT, 8'h00, 4'd1, 13'h1, 3'd0);
    fill(30'h200, BT_RET, 8'h00, 4'd2, 13'h2, 3'd1);
    expect_hit(30'h100, BT_FT, 30'h100, 4'd1, 13'h1, 3'd0);
    expect_hit(30'h200, BT_RET, 30'h200, 4'd2, 13'h2, 3'd1);
    // touch 0x100 so 0x200 is least recently used, then fill a third block
    lookup_pc = 30'h100; @(posedge clk); #1;
    fill(30'h300, BT_JAL, 8'h10, 4'd4, 13'h3, 3'd4);
    expect_hit(30'h100, BT_FT, 30'h100, 4'd1, 13'h1, 3'd0);
    expect_miss(30'h200);
    expect_hit(30'h300, BT_JAL, 30'h310, 4'd4, 13'h3, 3'd4);
    // every set independent
    for (int s = 0; s < 16; s++) fill(30'h4000 + 30'(s), BT_LOOP, 8'(s), 4'(s), 13'(s), 3'(s));
    for (int s = 0; s < 16; s++)
      expect_hit(30'h4000 + 30'(s), BT_LOOP, 30'h4000 + 30'(2*s), 4'(s), 13'(s), 3'(s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
