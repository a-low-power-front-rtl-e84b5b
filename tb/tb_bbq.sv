// tb_bbq: self-checking test of the basic block queue.
// Random pushes and pops against a reference queue: order, count, the full
// flag at 4 entries, simultaneous push and pop, the per-entry prefetch
// flags (set by position, cleared on a new push) and the one-cycle flush.
module tb_bbq;
  import bliss_pkg::*;
  logic clk = 0, rst_n = 0;
  logic flush, push, ready, pop, mark_valid;
  bbq_entry_t push_entry;
  logic [2:0] count;
  bbq_entry_t entries [4];
  logic checked [4];
  logic [1:0] mark_pos;
  int checks = 0, failures = 0;
  bbq_entry_t ref_q [$];
  logic ref_chk [$];
  int fulls = 0;
  logic acc_push;
  bbq_entry_t pushed_e;

  bbq #(.DEPTH(4)) dut (.*);

  always #5 clk = ~clk;
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

  function automatic bbq_entry_t rand_entry();
    bbq_entry_t e;
    e = '{pc: 30'($urandom), btype: bb_type_e'($urandom_range(7)), iaddr: 30'($urandom),
          len: 4'($urandom), hints: 3'($urandom), pred_taken: 1'($urandom), pred_next: 30'($urandom)};
    return e;
  endfunction

  initial begin
    flush = 0; push = 0; pop = 0; mark_valid = 0; mark_pos = 0; push_entry = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      // compare visible state
      check(count == 3'(ref_q.size()), $sformatf("count %0d exp %0d", count, ref_q.size()));
      check(ready == (ref_q.size() < 4), "ready");
      if (!ready) fulls++;
      for (int i = 0; i < ref_q.size(); i++) begin
        check(entries[i] == ref_q[i], $sformatf("entry %0d", i));
        check(checked[i] == ref_chk[i], $sformatf("checked %0d", i));
      end
      // drive
      flush      = ($urandom_range(60) == 0);
      push       = $urandom_range(2) != 0;
      pop        = ($urandom_range(2) != 0) && ref_q.size() > 0;
      push_entry = rand_entry();
      mark_valid = ref_q.size() > 0 && $urandom_range(1);
      mark_pos   = 2'($urandom_range(ref_q.size() > 0 ? ref_q.size() - 1 : 0));
      acc_push   = push && ref_q.size() < 4;
      pushed_e   = push_entry;
      #1;
      @(posedge clk); #1;
      if (flush) begin
        ref_q.delete(); ref_chk.delete();
      end else begin
        if (mark_valid) ref_chk[mark_pos] = 1;
        if (pop) begin void'(ref_q.pop_front()); void'(ref_chk.pop_front()); end
        if (acc_push) begin ref_q.push_back(pushed_e); ref_chk.push_back(1'b0); end
      end
      push = 0; pop = 0; mark_valid = 0; flush = 0;
    end
    check(fulls > 0, "queue became full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
